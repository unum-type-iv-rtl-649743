// unum4_multiplier: signed significand multiplier.
//
// Full-width product of two W-bit 2's complement numbers. With significands
// that have one integer bit, the 2W-bit product has two integer bits, which
// is enough for (-1) x (-1) = +1. Purely combinational; the multiplication
// unit registers around it.
module unum4_multiplier #(
  parameter int W = 29
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  assign p = (2*W)'($signed(a) * $signed(b));
endmodule
