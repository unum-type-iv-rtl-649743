// unum4_norm: significand normaliser (helper of the processing units).
//
// Takes a 2's complement value v with one integer bit (value v * 2^-(NI-1)),
// finds with the leading zeros/ones detector how far it can be shifted left
// before its two top bits differ, shifts it with the barrel shifter and keeps
// the NO top bits. Bits that fall off the right end are OR-ed into the LSB of
// the result (a sticky bit), so rounding later still sees an inexact value.
// The exponent of the result is the input exponent minus lead. zero flags
// v = 0. Purely combinational.
module unum4_norm #(
  parameter int NI = 36,
  parameter int NO = 32,
  parameter int LW = $clog2(NI)
) (
  input  logic [NI-1:0] v,
  output logic [NO-1:0] m,
  output logic [LW-1:0] lead,
  output logic          zero
);
  localparam int SW = $clog2(NI) + 1;
  logic [NI-1:0] vs;
  logic          unused_sticky;

  unum4_lzd #(.W(NI), .CW(LW)) u_lzd (.x(v), .cnt(lead));
  unum4_bshift #(.W(NI), .SW(SW)) u_shl (
    .x(v), .sh(SW'(lead)), .left(1'b1), .y(vs), .sticky(unused_sticky));

  assign zero = (v == '0);

  if (NI > NO) begin : g_trunc
    assign m = {vs[NI-1 -: NO-1], vs[NI-NO] | (|vs[NI-NO-1:0])};
  end else if (NI == NO) begin : g_same
    assign m = vs;
  end else begin : g_pad
    assign m = {vs, {(NO-NI){1'b0}}};
  end
endmodule
