// unum4_addsub: Unum-IV addition/subtraction unit (6 pipeline stages).
//
// Adds (sub = 0) or subtracts (sub = 1) two unpacked operands.
//   stage 1: sign-extends both significands to two integer bits and negates
//            b for a subtraction (two integer bits hold -(-1) = +1).
//   stage 2: exponent difference: picks the operand with the larger exponent
//            and the alignment distance.
//   stage 3: aligns the other significand with the barrel shifter, keeping
//            guard and round bits and a sticky bit for everything shifted out.
//   stage 4: adds the two aligned significands.
//   stage 5: normalises the sum with the leading zeros/ones detector.
//   stage 6: output register.
// Output: a result significand of MAN_MAX_W+3 bits (one integer bit, then
// MAN_MAX_W-1 fraction bits, guard, round, and sticky as LSB), its exponent,
// and zero. The six-stage latency follows the document; the contents of each
// stage are this design's choice. Fully pipelined: one operation per cycle.
module unum4_addsub
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
  parameter int MW       = man_max_w(DATA_W, EXP_SZ_W),
  parameter int XW       = exp_int_w(DATA_W, EXP_SZ_W),
  parameter int RW       = res_man_w(DATA_W, EXP_SZ_W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          sub,
  input  logic          za,
  input  logic [XW-1:0] ea,
  input  logic [MW-1:0] ma,
  input  logic          zb,
  input  logic [XW-1:0] eb,
  input  logic [MW-1:0] mb,
  output logic          out_valid,
  output logic          zero,
  output logic [XW-1:0] e,
  output logic [RW-1:0] m
);
  localparam int EW = MW + 1;        // two integer bits
  localparam int AW = EW + 3;        // + guard, round, sticky
  localparam int SW = $clog2(AW) + 1;
  localparam int LW = $clog2(AW);

  // stage 1
  logic v1, za1, zb1;
  logic [XW-1:0] ea1, eb1;
  logic [EW-1:0] ma1, mb1;
  // stage 2
  logic v2;
  logic [XW-1:0] e2;
  logic [EW-1:0] big2, small2;
  logic [SW-1:0] d2;
  // stage 3
  logic v3;
  logic [XW-1:0] e3;
  logic [AW-1:0] big3, small3;
  // stage 4
  logic v4;
  logic [XW-1:0] e4;
  logic [AW-1:0] sum4;
  // stage 5
  logic v5, z5;
  logic [XW-1:0] e5;
  logic [RW-1:0] m5;

  // combinational pieces
  logic [EW-1:0] mb_neg;
  logic          swap;
  logic [XW-1:0] e_big;
  logic [SW-1:0] d;
  logic [AW-1:0] small_sh, sum;
  logic          sticky;
  logic [RW-1:0] m_n;
  logic [LW-1:0] lead;
  logic          z_n;

  unum4_adder #(.W(EW)) u_neg (
    .a('0), .b({mb[MW-1], mb}), .sub(sub), .s(mb_neg));

  unum4_expdiff #(.XW(XW), .SW(SW)) u_expdiff (
    .ea(ea1), .eb(eb1), .za(za1), .zb(zb1), .swap(swap), .e_big(e_big), .d(d));

  unum4_bshift #(.W(AW), .SW(SW)) u_align (
    .x({small2, 3'b000}), .sh(d2), .left(1'b0), .y(small_sh), .sticky(sticky));

  unum4_adder #(.W(AW)) u_add (
    .a(big3), .b(small3), .sub(1'b0), .s(sum));

  unum4_norm #(.NI(AW), .NO(RW), .LW(LW)) u_norm (
    .v(sum4), .m(m_n), .lead(lead), .zero(z_n));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; za1 <= 1'b0; zb1 <= 1'b0; ea1 <= '0; eb1 <= '0; ma1 <= '0; mb1 <= '0;
      v2 <= 1'b0; e2 <= '0; big2 <= '0; small2 <= '0; d2 <= '0;
      v3 <= 1'b0; e3 <= '0; big3 <= '0; small3 <= '0;
      v4 <= 1'b0; e4 <= '0; sum4 <= '0;
      v5 <= 1'b0; z5 <= 1'b0; e5 <= '0; m5 <= '0;
      out_valid <= 1'b0; zero <= 1'b0; e <= '0; m <= '0;
    end else begin
      // stage 1: sign extension and negation
      v1  <= in_valid;
      za1 <= za;  zb1 <= zb;
      ea1 <= ea;  eb1 <= eb;
      ma1 <= {ma[MW-1], ma};
      mb1 <= mb_neg;
      // stage 2: exponent difference and operand swap
      v2     <= v1;
      e2     <= e_big;
      big2   <= swap ? mb1 : ma1;
      small2 <= swap ? ma1 : mb1;
      d2     <= d;
      // stage 3: alignment
      v3     <= v2;
      e3     <= e2;
      big3   <= {big2, 3'b000};
      small3 <= {small_sh[AW-1:1], small_sh[0] | sticky};
      // stage 4: addition
      v4   <= v3;
      e4   <= e3;
      sum4 <= sum;
      // stage 5: normalisation (the sum has two integer bits: +1)
      v5 <= v4;
      z5 <= z_n;
      e5 <= e4 + XW'(1) - XW'(lead);
      m5 <= m_n;
      // stage 6: output
      out_valid <= v5;
      zero      <= z5;
      e         <= e5;
      m         <= m5;
    end
  end
endmodule
