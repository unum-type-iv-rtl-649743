// unum4_expdiff: exponent difference unit of the adder.
//
// Compares the exponents of two unpacked operands and tells which operand has
// the larger magnitude exponent (swap = 1 when it is b), the exponent of the
// result before normalisation (e_big) and the alignment shift |ea - eb|,
// saturated to the largest value of SW bits. A zero operand never counts as
// the larger one and needs no shift, since its significand is 0 anyway.
// Purely combinational.
module unum4_expdiff #(
  parameter int XW = 24,
  parameter int SW = 6
) (
  input  logic [XW-1:0] ea,
  input  logic [XW-1:0] eb,
  input  logic          za,
  input  logic          zb,
  output logic          swap,
  output logic [XW-1:0] e_big,
  output logic [SW-1:0] d
);
  always_comb begin
    logic signed [XW:0] diff;
    diff = '0;
    if (za) begin
      swap = 1'b1;
    end else if (zb) begin
      swap = 1'b0;
    end else begin
      swap = $signed(eb) > $signed(ea);
      diff = swap ? ($signed({eb[XW-1], eb}) - $signed({ea[XW-1], ea}))
                  : ($signed({ea[XW-1], ea}) - $signed({eb[XW-1], eb}));
    end
    e_big = swap ? eb : ea;
    if (diff > $signed((XW+1)'((1 << SW) - 1))) d = '1;
    else                                          d = SW'(diff);
  end
endmodule
