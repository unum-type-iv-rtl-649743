// unum4_unpack: Unum-IV unpack unit (3 pipeline stages).
//
// Splits a Unum-IV<DATA_W,EXP_SZ_W> word into a signed exponent and a
// normalised 2's complement significand.
//   stage 1: registers the word.
//   stage 2: reads the exponent size ExpSz from the top EXP_SZ_W bits, cuts
//            the ExpSz-bit exponent field E and the fraction F (left-aligned)
//            out of the rest with barrel shifts, and detects the subnormal
//            code (ExpSz all ones and E all zeros).
//   stage 3: evaluates the 1's complement exponent with its hidden bit
//            (the inverse of the MSB of E), prefixes the fraction with its
//            hidden bit (the inverse of the fraction MSB, or equal to it for
//            a subnormal), normalises subnormals with the leading zeros/ones
//            detector and flags zero.
// Output: m has MAN_MAX_W bits, one integer (sign) bit, and is normalised
// (m in [0.5,1) or [-1,-0.5)) unless zero = 1; the value is m * 2^e.
// The three-stage latency follows the document; which work sits in which
// stage, the field order and the normalisation of subnormals are this
// design's choices. Every register resets asynchronously on rst.
module unum4_unpack
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
  parameter int MW       = man_max_w(DATA_W, EXP_SZ_W),
  parameter int XW       = exp_int_w(DATA_W, EXP_SZ_W)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x,
  output logic              out_valid,
  output logic              zero,
  output logic [XW-1:0]     e,
  output logic [MW-1:0]     m
);
  localparam int W0   = DATA_W - EXP_SZ_W;     // exponent + fraction bits
  localparam int M    = exp_sz_max(EXP_SZ_W);  // widest exponent field
  localparam int SW   = $clog2(W0) + 1;
  localparam int LW   = $clog2(MW);
  localparam longint EMIN = emin(EXP_SZ_W);

  // stage 1
  logic              v1;
  logic [DATA_W-1:0] x1;
  // stage 2
  logic                v2;
  logic [EXP_SZ_W-1:0] es2;
  logic [W0-1:0]       e_raw2, f_al2;
  logic                sub2, emsb2;
  // stage 2 combinational
  logic [EXP_SZ_W-1:0] es;
  logic [W0-1:0]       rest, e_raw, f_al;
  logic                s_unused0, s_unused1;
  // stage 3 combinational
  logic signed [XW-1:0] e_c;
  logic [MW-1:0]        m_c, m_n;
  logic [LW-1:0]        lead;
  logic                 z_c;

  assign es   = x1[DATA_W-1 -: EXP_SZ_W];
  assign rest = x1[W0-1:0];

  // E = rest >> (W0 - ExpSz): the ExpSz top bits, right-aligned
  unum4_bshift #(.W(W0), .SW(SW)) u_ext_e (
    .x(rest), .sh(SW'(W0) - SW'(es)), .left(1'b0), .y(e_raw), .sticky(s_unused0));
  // F = rest << ExpSz: the fraction, left-aligned
  unum4_bshift #(.W(W0), .SW(SW)) u_ext_f (
    .x(rest), .sh(SW'(es)), .left(1'b1), .y(f_al), .sticky(s_unused1));

  always_comb begin
    logic [W0-1:0] e_mask;
    logic [XW-1:0] e_u;
    e_mask = ~({W0{1'b1}} << es2);
    e_u    = XW'(e_raw2 & e_mask);     // arithmetic shift filled sign bits
    if (es2 == '0)
      e_c = '0;
    else if (sub2)
      e_c = XW'(EMIN);
    else if (emsb2)
      e_c = e_u;                                   // hidden bit 0: positive
    else
      e_c = e_u + XW'(1) - (XW'(1) << es2);        // hidden bit 1: negative
    m_c = sub2 ? {f_al2[W0-1], f_al2} : {~f_al2[W0-1], f_al2};
  end

  unum4_norm #(.NI(MW), .NO(MW), .LW(LW)) u_norm (
    .v(m_c), .m(m_n), .lead(lead), .zero(z_c));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; x1 <= '0;
      v2 <= 1'b0; es2 <= '0; e_raw2 <= '0; f_al2 <= '0; sub2 <= 1'b0; emsb2 <= 1'b0;
      out_valid <= 1'b0; zero <= 1'b0; e <= '0; m <= '0;
    end else begin
      v1 <= in_valid;
      x1 <= x;
      v2     <= v1;
      es2    <= es;
      e_raw2 <= e_raw;
      f_al2  <= f_al;
      emsb2  <= rest[W0-1];
      sub2   <= (es == EXP_SZ_W'(M)) && ((e_raw & ~({W0{1'b1}} << es)) == '0);
      out_valid <= v2;
      zero      <= z_c;
      e         <= e_c - XW'(lead);
      m         <= m_n;
    end
  end
endmodule
