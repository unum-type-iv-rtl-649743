// unum4_fpu_tester: drives one Unum-IV FPU instance with NOPS operations and
// checks every result, flag and latency against the reference model.
//
// Operands come from rand_word(): random exponent sizes up to ES_LIM, random
// fields, at most SIG fraction bits; a share of operations uses directed
// operands (zero, extreme exponents) so that every mechanism occurs. A start
// pulse is sometimes repeated while the FPU is busy, which must be ignored.
// WIDE = 1 is for formats wider than the double arithmetic of the reference
// model can follow exactly: it leaves out the directed operands far from 1
// or with long significands; half of the divisions get a dividend that is
// the exact product of the divisor and a random short number, and must
// return that number bit-exactly; the other divisions are checked against
// the exact quotient in wide integer arithmetic (div_exact_ok) and, as a
// coarse second check, to lie within 2^-40 of it.
// DEFAULTS = 1 instantiates the FPU without a parameter list (its own
// defaults, which must then equal DW, K and RND). Counters report how often
// each mechanism happened.
// Timing: one operation at a time; start is driven at a falling edge, and
// done must arrive exactly the expected number of cycles later.
module unum4_fpu_tester
  import unum4_ref_pkg::*;
#(
  parameter int DW       = 16,
  parameter int K        = 3,
  parameter bit RND      = 1'b1,
  parameter int SIG      = 64,
  parameter int ES_LIM   = 7,
  parameter int NOPS     = 2000,
  parameter bit DEFAULTS = 1'b0,
  parameter bit WIDE     = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output bit   finished,
  output int   n_op[4],
  output int   n_ovf,
  output int   n_unf,
  output int   n_dbz,
  output int   n_sub_in,
  output int   n_sub_out,
  output int   n_zero_out,
  output int   n_round_up,
  output int   n_ignored,
  output int   n_carry
);
  localparam int W0    = DW - K;
  localparam int MX    = (1 << K) - 1;
  localparam int MW    = DW - K + 1;
  localparam int EXTRA = RND ? 3 : 0;
  localparam int P     = 3 + (RND ? 1 : 0);

  logic          start;
  logic [1:0]    op;
  logic [DW-1:0] a, b, o;
  logic          done, dbz, unf, ovf;

  if (DEFAULTS) begin : g_def
    unum4_fpu u_dut (.clk(clk), .rst(rst), .start(start), .op(op), .a(a), .b(b),
                     .o(o), .done(done), .div_by_zero(dbz), .underflow(unf),
                     .overflow(ovf));
  end else begin : g_par
    unum4_fpu #(.DATA_W(DW), .EXP_SZ_W(K), .ROUNDING(RND)) u_dut (
      .clk(clk), .rst(rst), .start(start), .op(op), .a(a), .b(b),
      .o(o), .done(done), .div_by_zero(dbz), .underflow(unf), .overflow(ovf));
  end

  function automatic int latency(input int opc);
    int l;
    case (opc)
      0, 1:    l = 6;
      3:       l = 4;
      default: l = 5 + MW + EXTRA;
    endcase
    return 4 + l + P;
  endfunction

  function automatic logic [DW-1:0] directed(input int sel);
    logic [63:0] w;
    case (sel)
      0: w = zero_word(DW, K);                                  // zero
      1: w = (64'(MX) << W0) | 64'($urandom_range(15, 1));      // tiny subnormal
      2: w = (64'(MX) << W0) | ((64'd1 << (W0 - 1)) - 1);       // maxpos
      3: w = (64'(MX) << W0) | (64'd1 << (W0 - MX));            // smallest normal exp
      4: w = (64'(MX) << W0) | (64'd1 << (W0 - MX)) | (64'd1 << (W0 - MX - 1)); // -minnormal-ish
      default: w = 64'd0;                                       // 1 x 2^0 ... ExpSz 0
    endcase
    return DW'(w);
  endfunction

  // Exact check of a quotient o = a / b in integer arithmetic, for WIDE
  // formats whose fractions are longer than a double. a and b must have
  // short significands (a: at most 40 fraction bits, b: at most 20) and o
  // must be a normal number. o is right when the exact quotient q lies
  // within o's rounding interval: [o, o + ulp) for truncation, or between
  // the midpoints to its neighbours for rounding to nearest (ties: even o).
  // The neighbour below o may lie in the next smaller binade, whose ulp
  // differs.
  function automatic int es_of(input longint e);
    return bitlen((e < 0) ? -e : e);
  endfunction

  // sign of  A * 2^ea - X * Bp * 2^ex
  function automatic int cmp_q(input logic signed [255:0] A, input int ea,
                               input logic signed [255:0] X, input logic signed [255:0] Bp,
                               input int ex);
    logic signed [255:0] l, r;
    int mn;
    mn = (ea < ex) ? ea : ex;
    l = A <<< (ea - mn);
    r = (X * Bp) <<< (ex - mn);
    return (l < r) ? -1 : (l > r) ? 1 : 0;
  endfunction

  function automatic bit div_exact_ok(input logic [63:0] aw, input logic [63:0] bw,
                                      input logic [63:0] ow);
    uval_t va, vb;
    logic signed [255:0] A, Bp, O, U, PU, X;
    longint S, e, ff, ee;
    int es, fs, ue, pe, m, c1, c2;
    bit sub, hid;
    va = decode(aw, DW, K);
    vb = decode(bw, DW, K);
    // integer decode of o
    es = int'((ow >> W0) & ((64'd1 << K) - 1));
    fs = W0 - es;
    ee = longint'((ow >> fs) & ((64'd1 << es) - 1));
    ff = longint'(ow & ((64'd1 << fs) - 1));
    sub = (es == MX) && (ee == 0);
    if (va.zero) return sub && ff == 0;
    if (sub) return 0;
    if (es == 0) e = 0;
    else if (!ee[es-1]) e = ee - ((longint'(1) << es) - 1);
    else e = ee;
    hid = !ff[fs-1];
    S = hid ? ff - (longint'(1) << fs) : ff;
    // exact operands: a = A * 2^(ea-40), b = B * 2^(eb-20)
    A = 256'(longint'(va.m * pow2(40)));
    Bp = 256'(longint'(vb.m * pow2(20)));
    if (Bp < 0) begin A = -A; Bp = -Bp; end
    ue = int'(e) - (W0 - es_of(e));
    if (S == (longint'(1) << (fs - 1)))  pe = int'(e) - 1 - (W0 - es_of(e - 1));
    else if (S == -(longint'(1) << fs))  pe = int'(e) + 1 - (W0 - es_of(e + 1));
    else                                  pe = ue;
    m = ((ue < pe) ? ue : pe) - 1;
    O = 256'(S) <<< (ue - m);
    U = 256'(1) <<< (ue - m);
    PU = 256'(1) <<< (pe - m);
    if (!RND) begin
      c1 = cmp_q(A, va.e - 40, O, Bp, vb.e - 20 + m);
      c2 = cmp_q(A, va.e - 40, O + U, Bp, vb.e - 20 + m);
      return c1 >= 0 && c2 < 0;
    end
    X = O - (PU >>> 1);
    c1 = cmp_q(A, va.e - 40, X, Bp, vb.e - 20 + m);
    X = O + (U >>> 1);
    c2 = cmp_q(A, va.e - 40, X, Bp, vb.e - 20 + m);
    if (c1 < 0 || c2 > 0) return 0;
    if (c1 == 0 || c2 == 0) return S[0] == 1'b0;
    return 1;
  endfunction

  // o within 2^-40 of the exact value r, relative to r
  function automatic bit close(input uval_t x, input uval_t r);
    real xv, rv;
    if (x.zero || r.zero) return x.zero == r.zero;
    xv = x.m * pow2(x.e - r.e);
    rv = r.m;
    return (xv - rv <= pow2(-40) * ((rv < 0.0) ? -rv : rv)) &&
           (rv - xv <= pow2(-40) * ((rv < 0.0) ? -rv : rv));
  endfunction

  function automatic int pick_directed();
    int sel;
    sel = int'($urandom_range(5, 0));
    if (WIDE) sel = sel[0] ? 0 : 5;
    return sel;
  endfunction

  initial begin
    uval_t va, vb, vr, vt;
    uval_t vc, vo;
    enc_t  ex, et, ec;
    bit    edbz, exc, approx;
    logic [DW-1:0] a_q, b_q;
    int    opc, cyc, lat;
    checks = 0; failures = 0; finished = 0;
    n_op = '{default: 0};
    n_ovf = 0; n_unf = 0; n_dbz = 0; n_sub_in = 0; n_sub_out = 0; n_zero_out = 0;
    n_round_up = 0; n_ignored = 0; n_carry = 0;
    start = 0; op = 0; a = '0; b = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int i = 0; i < NOPS; i++) begin
      opc = int'($urandom_range(3, 0));
      a = DW'(rand_word(DW, K, SIG, ES_LIM));
      b = DW'(rand_word(DW, K, SIG, ES_LIM));
      if ($urandom_range(7, 0) == 0) a = directed(pick_directed());
      if ($urandom_range(7, 0) == 0) b = directed(pick_directed());
      approx = 0;
      if (WIDE && opc == 2) begin
        if ($urandom_range(1, 0) == 0) begin
          // dividend = divisor x c, exactly representable: quotient is c
          vc = decode(rand_word(DW, K, SIG, ES_LIM), DW, K);
          ec = encode(compute(vc, decode(64'(b), DW, K), 3, W0, edbz), DW, K, RND);
          if (!ec.ovf && !ec.unf) a = DW'(ec.bits);
        end else approx = 1;
      end
      va = decode(64'(a), DW, K);
      vb = decode(64'(b), DW, K);
      if ((64'(a) >> W0) == 64'(MX) && ((64'(a) >> (W0 - MX)) & ((64'd1 << MX) - 1)) == 0)
        n_sub_in++;
      vr = compute(va, vb, opc, W0, edbz);
      ex = encode(vr, DW, K, RND);
      et = encode(vr, DW, K, 1'b0);
      if (!edbz && !ex.ovf && !ex.unf && ex.bits != et.bits) n_round_up++;
      a_q = a; b_q = b;
      op = 2'(opc);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      // a second start while busy, with other operands, must be ignored
      if ($urandom_range(3, 0) == 0) begin
        start = 1; op = 2'($urandom_range(3, 0)); a = ~a; b = ~b;
        @(negedge clk);
        start = 0; cyc++; n_ignored++;
      end
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      lat = latency(opc);
      exc = edbz || ex.ovf || ex.unf;
      checks++;
      if (!done || cyc != lat) begin
        failures++;
        $display("FAIL latency op=%0d: %0d cycles, expected %0d", opc, cyc, lat);
      end
      checks++;
      if (dbz != edbz || ovf != (ex.ovf && !edbz) || unf != (ex.unf && !edbz)) begin
        failures++;
        $display("FAIL flags op=%0d a=%h b=%h: dbz/ovf/unf=%b%b%b expected %b%b%b",
                 opc, a, b, dbz, ovf, unf, edbz, ex.ovf, ex.unf);
      end
      checks++;
      vo = decode(64'(o), DW, K);
      if (approx && !exc ? !(close(vo, vr) && div_exact_ok(64'(a_q), 64'(b_q), 64'(o)))
                         : o != (exc ? DW'(zero_word(DW, K)) : DW'(ex.bits))) begin
        failures++;
        $display("FAIL result op=%0d a=%h b=%h: o=%h expected %h (exc=%0d)",
                 opc, a, b, o, exc ? DW'(zero_word(DW, K)) : DW'(ex.bits), exc);
      end
      n_op[opc]++;
      if (dbz) n_dbz++;
      if (ovf) n_ovf++;
      if (unf) n_unf++;
      if (!exc && vr.zero) n_zero_out++;
      if (!exc && (64'(o) >> W0) == 64'(MX) && ((64'(o) >> (W0 - MX)) & ((64'd1 << MX) - 1)) == 0
          && !vr.zero) n_sub_out++;
      // rounding carried into the next exponent (significand 0.111.. -> 1.0)
      if (!exc && !vr.zero) begin
        vt = decode(64'(o), DW, K);
        if (vt.e != vr.e) n_carry++;
      end
      @(negedge clk);
    end
    finished = 1;
  end
endmodule
