// unum4_pack: Unum-IV pack unit (3 + ROUNDING pipeline stages).
//
// Turns a processing-unit result (zero flag, exponent e, normalised
// significand m with guard, round and sticky bits) into a
// Unum-IV<DATA_W,EXP_SZ_W> word and raises the overflow and underflow flags.
//   stage 1: range check. e above the largest exponent is an overflow; a
//            magnitude below the smallest positive number (minpos) is an
//            underflow; an exponent below the smallest normal one is
//            denormalised by the barrel shifter (sticky kept) to the
//            subnormal exponent. The exponent size ExpSz is the bit length
//            of |e| (leading-zero count of |e|), or all ones for a subnormal.
//   stage 2 (ROUNDING = 1 only): round to nearest, ties to even, at the
//            FracSize = DATA_W-EXP_SZ_W-ExpSz fraction bits this exponent
//            leaves. With ROUNDING = 0 the extra bits are dropped, which on
//            2's complement significands truncates towards minus infinity.
//   stage 3: a rounding carry renormalises (0.111.. -> 1.0 raises e; -0.5
//            lowers e; a subnormal that reaches 0.5 becomes normal) and the
//            1's complement exponent field is formed: E = e for e > 0 and
//            E = e - 1 (the inverted magnitude) for e < 0, ExpSz bits wide.
//   stage 4: assembles {ExpSz, E, F}; zero packs as ExpSz all ones with
//            E = F = 0.
// The stage count follows the document; the split, the flag rules and the
// field order are this design's choices. Fully pipelined. dbz is carried
// alongside the result. o holds the packed result even when a flag is set;
// the control logic decides what to do with it.
module unum4_pack
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
  parameter bit ROUNDING = 1'b1,
  parameter int XW       = exp_int_w(DATA_W, EXP_SZ_W),
  parameter int RW       = res_man_w(DATA_W, EXP_SZ_W)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              zero,
  input  logic              dbz_in,
  input  logic [XW-1:0]     e,
  input  logic [RW-1:0]     m,
  output logic              out_valid,
  output logic [DATA_W-1:0] o,
  output logic              overflow,
  output logic              underflow,
  output logic              dbz
);
  localparam int W0    = DATA_W - EXP_SZ_W;        // E + F bits
  localparam int M     = exp_sz_max(EXP_SZ_W);
  localparam int FSSUB = W0 - M;                   // fraction bits at ExpSz = M
  localparam int SW    = $clog2(RW) + 1;
  localparam int KW    = EXP_SZ_W;
  localparam longint EMAX  = unum4_pkg::emax(EXP_SZ_W);
  localparam longint EMIN  = unum4_pkg::emin(EXP_SZ_W);
  localparam longint EUNF  = EMIN - longint'(FSSUB);         // e <= EUNF: below minpos

  // bit length of |x|, saturated at M (larger values overflow anyway)
  function automatic logic [KW-1:0] bitlen(input logic signed [XW-1:0] x);
    logic [XW-1:0] mag;
    logic [KW-1:0] k;
    mag = x[XW-1] ? XW'(-x) : XW'(x);
    k = '0;
    for (int i = 0; i < XW; i++)
      if (mag[i]) k = (i + 1 > M) ? KW'(M) : KW'(i + 1);
    return k;
  endfunction

  // ---------------- stage 1: range check, denormalisation, ExpSz
  logic                 v1, z1, ovf1, unf1, sub1, dbz1;
  logic signed [XW-1:0] e1;
  logic [RW-1:0]        m1;
  logic [KW-1:0]        k1;

  logic signed [XW-1:0] es_in;
  logic                 is_m1, ovf_c, unf_c, sub_c;
  logic [SW-1:0]        dsh;
  logic [RW-1:0]        m_dn;
  logic                 dn_sticky;

  assign es_in = $signed(e);
  assign is_m1 = (m == {1'b1, {(RW-1){1'b0}}});   // significand exactly -1
  assign ovf_c = !zero && (es_in > $signed(XW'(EMAX)));
  assign unf_c = !zero && ((es_in < $signed(XW'(EUNF))) ||
                           ((es_in == $signed(XW'(EUNF))) && !is_m1));
  assign sub_c = es_in < $signed(XW'(EMIN));
  assign dsh   = sub_c ? SW'(XW'(EMIN) - e) : '0;   // at most FSSUB here

  unum4_bshift #(.W(RW), .SW(SW)) u_denorm (
    .x(m), .sh(dsh), .left(1'b0), .y(m_dn), .sticky(dn_sticky));

  // ---------------- stage 2: rounding
  logic                 v2, z2, ovf2, unf2, sub2, dbz2;
  logic signed [XW-1:0] e2;
  logic [RW-1:0]        q2;
  logic [KW-1:0]        k2;

  logic [RW-1:0] q_tr, q_rn;
  logic [SW-1:0] drop;
  logic          s_unused;
  logic          guard, stick;

  assign drop = SW'(k1) + SW'(3);
  unum4_bshift #(.W(RW), .SW(SW)) u_round_sh (
    .x(m1), .sh(drop), .left(1'b0), .y(q_tr), .sticky(s_unused));

  always_comb begin
    logic [RW-1:0] below;
    guard = m1[$clog2(RW)'(drop - 1'b1)];
    below = m1 & ~({RW{1'b1}} << (drop - 1'b1));
    stick = |below;
    q_rn  = q_tr + RW'({guard & (stick | q_tr[0])});
  end

  if (ROUNDING) begin : g_round
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        v2 <= 1'b0; z2 <= 1'b0; ovf2 <= 1'b0; unf2 <= 1'b0; sub2 <= 1'b0; dbz2 <= 1'b0;
        e2 <= '0; q2 <= '0; k2 <= '0;
      end else begin
        v2 <= v1; z2 <= z1; ovf2 <= ovf1; unf2 <= unf1; sub2 <= sub1; dbz2 <= dbz1;
        e2 <= e1; q2 <= q_rn; k2 <= k1;
      end
    end
  end else begin : g_trunc
    always_comb begin
      v2 = v1; z2 = z1; ovf2 = ovf1; unf2 = unf1; sub2 = sub1; dbz2 = dbz1;
      e2 = e1; q2 = q_tr; k2 = k1;
    end
  end

  // ---------------- stage 3: carry renormalisation, exponent field
  logic                 v3, z3, ovf3, unf3, dbz3;
  logic [KW-1:0]        k3;
  logic [W0-1:0]        ef3;     // E field, right-aligned
  logic [W0-1:0]        f3;      // F field, right-aligned, FracSize bits

  logic signed [XW-1:0] e_f;
  logic [KW-1:0]        k_f;
  logic [W0-1:0]        f_f, e_fld;
  logic                 sub_f, ovf_f;

  always_comb begin
    int unsigned   fs;
    logic [RW-1:0] one_fs, half_fs;
    fs      = W0 - int'(k2);
    one_fs  = RW'(1) << fs;          // +1.0 at this fraction size
    half_fs = RW'(1) << (fs - 1);    // +0.5
    e_f   = e2;
    sub_f = sub2;
    f_f   = W0'(q2) & ~({W0{1'b1}} << fs);
    if (sub2) begin
      // subnormal that rounded up to 0.5: normal, same exponent, same bits
      if (!q2[RW-1] && q2[fs-1]) sub_f = 1'b0;
    end else if (q2 == one_fs) begin
      // 0.111.. rounded to 1.0: becomes 0.5 x 2^(e+1)
      e_f = e2 + XW'(1);
    end else if (q2 == -half_fs) begin
      // -0.5 is -1.0 x 2^(e-1); -0.5 x 2^EMIN stays subnormal
      if (e2 == $signed(XW'(EMIN))) sub_f = 1'b1;
      else                           e_f = e2 - XW'(1);
    end
    ovf_f = e_f > $signed(XW'(EMAX));
    k_f   = sub_f ? KW'(M) : bitlen(e_f);
    // fraction after a carry: 0.5 -> F = 100..0 ; -1.0 -> F = 000..0
    if (!sub2 && (q2 == one_fs))
      f_f = W0'(1) << (W0 - int'(k_f) - 1);
    else if (!sub2 && (q2 == -half_fs))
      f_f = sub_f ? (W0'(1) << (FSSUB - 1)) : '0;
    if (sub_f)
      e_fld = '0;
    else if (e_f > 0)
      e_fld = W0'(e_f);
    else
      e_fld = W0'(e_f - XW'(1));
    e_fld = e_fld & ~({W0{1'b1}} << k_f);
  end

  // ---------------- stage 4: assembly
  logic [W0-1:0] rest;
  assign rest = (k3 == '0) ? f3 : ((ef3 << (W0 - int'(k3))) | f3);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; z1 <= 1'b0; ovf1 <= 1'b0; unf1 <= 1'b0; sub1 <= 1'b0; dbz1 <= 1'b0;
      e1 <= '0; m1 <= '0; k1 <= '0;
      v3 <= 1'b0; z3 <= 1'b0; ovf3 <= 1'b0; unf3 <= 1'b0; dbz3 <= 1'b0;
      k3 <= '0; ef3 <= '0; f3 <= '0;
      out_valid <= 1'b0; o <= '0; overflow <= 1'b0; underflow <= 1'b0; dbz <= 1'b0;
    end else begin
      // stage 1
      v1   <= in_valid;
      z1   <= zero;
      dbz1 <= dbz_in;
      ovf1 <= ovf_c;
      unf1 <= unf_c;
      sub1 <= sub_c;
      e1   <= sub_c ? $signed(XW'(EMIN)) : es_in;
      m1   <= sub_c ? {m_dn[RW-1:1], m_dn[0] | dn_sticky} : m;
      k1   <= sub_c ? KW'(M) : bitlen(es_in);
      // stage 3
      v3   <= v2;
      z3   <= z2;
      dbz3 <= dbz2;
      ovf3 <= ovf2 | (ovf_f & !z2 & !unf2);
      unf3 <= unf2;
      k3   <= k_f;
      ef3  <= e_fld;
      f3   <= f_f;
      // stage 4
      out_valid <= v3;
      overflow  <= ovf3;
      underflow <= unf3;
      dbz       <= dbz3;
      o         <= z3 ? {{EXP_SZ_W{1'b1}}, {W0{1'b0}}} : {k3, rest};
    end
  end
endmodule
