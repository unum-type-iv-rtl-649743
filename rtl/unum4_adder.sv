// unum4_adder: 2's complement adder/subtractor.
//
// s = a + b when sub = 0 and s = a - b when sub = 1, computed as
// a + (b xor sub) + sub with a single carry chain. The caller sizes W so the
// result cannot overflow (the add/sub unit gives its significands two integer
// bits). Purely combinational.
module unum4_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  assign s = a + (b ^ {W{sub}}) + W'(sub);
endmodule
