// unum4_lzd: leading zeros/ones detector.
//
// Counts how many bits below the MSB of a 2's complement word repeat the MSB
// (the sign). Shifting the word left by this count normalises it: its two top
// bits then differ. An all-zero or all-one word gives W-1. The unit is used to
// normalise significands after subnormal unpacking, addition, multiplication
// and division. Purely combinational (a priority scan from the MSB down).
module unum4_lzd #(
  parameter int W  = 32,
  parameter int CW = $clog2(W)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] cnt
);
  always_comb begin
    logic found;
    found = 1'b0;
    cnt   = CW'(W - 1);
    for (int i = W - 2; i >= 0; i--) begin
      if (!found && (x[i] != x[W-1])) begin
        cnt   = CW'(W - 2 - i);
        found = 1'b1;
      end
    end
  end
endmodule
