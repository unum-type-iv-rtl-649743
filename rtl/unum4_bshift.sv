// unum4_bshift: barrel shifter.
//
// left = 0: arithmetic right shift of a 2's complement word by sh places.
// sticky is set when any 1 was shifted out, that is when the exact quotient
// x / 2^sh is larger than the result y; callers fold it into an LSB so that
// later rounding still sees an inexact result. Shifts of W or more places
// leave only sign bits.
// left = 1: logical left shift, sticky = 0.
// Purely combinational.
module unum4_bshift #(
  parameter int W  = 32,
  parameter int SW = $clog2(W) + 1
) (
  input  logic [W-1:0]  x,
  input  logic [SW-1:0] sh,
  input  logic          left,
  output logic [W-1:0]  y,
  output logic          sticky
);
  always_comb begin
    logic [W-1:0] mask;
    mask = '0;
    if (left) begin
      y      = (32'(sh) >= W) ? '0 : (x << sh);
      sticky = 1'b0;
    end else if (32'(sh) >= W) begin
      y      = {W{x[W-1]}};
      sticky = |x;
    end else begin
      y      = W'($signed(x) >>> sh);
      mask   = ~({W{1'b1}} << sh);
      sticky = |(x & mask);
    end
  end
endmodule
