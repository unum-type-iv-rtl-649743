// unum4_ref_pkg: behavioural reference model of Unum-IV<DATA_W,EXP_SZ_W>
// arithmetic for the testbenches.
//
// It works directly from the format definition, independently of the RTL:
// a value is held as a real significand m in [0.5,1) or [-1,-0.5) and an
// integer exponent e (so exponents far beyond the range of a double are
// fine). decode() evaluates the fields of a word; encode() searches the
// exponent size for an exponent, rounds the significand at the fraction
// width that leaves (floor for truncation, nearest-even otherwise) and
// reports overflow (exponent above the largest one) and underflow
// (magnitude below the smallest positive number). Words of up to 64 bits;
// results are exact as long as significands fit in a double's 53 bits.
package unum4_ref_pkg;

  typedef struct {
    bit  zero;
    real m;
    int  e;
  } uval_t;

  typedef struct {
    logic [63:0] bits;
    bit          ovf;
    bit          unf;
  } enc_t;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic uval_t norm(input real m, input int e);
    uval_t v;
    v.zero = (m == 0.0);
    v.m = m;
    v.e = e;
    if (!v.zero) begin
      while (v.m >= 1.0 || v.m < -1.0) begin v.m = v.m / 2.0; v.e++; end
      while ((v.m > 0.0 && v.m < 0.5) || (v.m < 0.0 && v.m >= -0.5)) begin
        v.m = v.m * 2.0; v.e--;
      end
    end else begin
      v.e = 0;
    end
    return v;
  endfunction

  function automatic longint emax(input int k);
    return (longint'(1) << ((1 << k) - 1)) - 1;
  endfunction
  function automatic longint emin(input int k);
    return 2 - (longint'(1) << ((1 << k) - 1));
  endfunction

  function automatic logic [63:0] zero_word(input int dw, input int k);
    return ((64'd1 << k) - 1) << (dw - k);
  endfunction

  function automatic uval_t decode(input logic [63:0] x, input int dw, input int k);
    int mx, w0, es, fs;
    longint ee, ff, sint;
    bit sub, hid;
    mx = (1 << k) - 1;
    w0 = dw - k;
    es = int'((x >> w0) & ((64'd1 << k) - 1));
    fs = w0 - es;
    ee = longint'((x >> fs) & ((64'd1 << es) - 1));
    ff = longint'(x & ((64'd1 << fs) - 1));
    sub = (es == mx) && (ee == 0);
    if (es == 0)            ee = 0;
    else if (sub)           ee = emin(k);
    else if (!ee[es-1])     ee = ee - ((longint'(1) << es) - 1);
    hid  = sub ? ff[fs-1] : !ff[fs-1];
    sint = hid ? ff - (longint'(1) << fs) : ff;
    return norm(real'(sint) / pow2(fs), int'(ee));
  endfunction

  function automatic real rnd(input real x, input bit nearest);
    real f, r;
    f = $floor(x);
    if (!nearest) return f;
    r = x - f;
    if (r > 0.5) return f + 1.0;
    if (r < 0.5) return f;
    // tie: to even
    if ($floor(f / 2.0) * 2.0 == f) return f;
    return f + 1.0;
  endfunction

  function automatic int bitlen(input longint a);
    int n;
    n = 0;
    while (a != 0) begin a = a >> 1; n++; end
    return n;
  endfunction

  function automatic enc_t encode(input uval_t v0, input int dw, input int k, input bit nearest);
    enc_t r;
    uval_t v;
    int mx, w0, fssub, kk, fs;
    longint e, q, eabs, efld;
    real qr;
    r.bits = zero_word(dw, k);
    r.ovf = 0;
    r.unf = 0;
    if (v0.zero) return r;
    v = norm(v0.m, v0.e);
    mx = (1 << k) - 1;
    w0 = dw - k;
    fssub = w0 - mx;
    e = v.e;
    if (e > emax(k)) begin r.ovf = 1; return r; end
    if (e < emin(k) - fssub || (e == emin(k) - fssub && v.m != -1.0)) begin
      r.unf = 1; return r;
    end
    if (e < emin(k)) begin
      qr = rnd(v.m * pow2(int'(e - emin(k)) + fssub), nearest);
      q  = longint'(qr);
      if (q >= (longint'(1) << (fssub - 1)))   // rounded up into the normal range
        return encode(norm(qr / pow2(fssub), int'(emin(k))), dw, k, nearest);
      r.bits = (64'(mx) << w0) | (64'(q) & ((64'd1 << fssub) - 1));
      return r;
    end
    eabs = (e < 0) ? -e : e;
    kk = bitlen(eabs);
    fs = w0 - kk;
    qr = rnd(v.m * pow2(fs), nearest);
    q  = longint'(qr);
    if (q == (longint'(1) << fs))
      return encode(norm(0.5, int'(e) + 1), dw, k, nearest);
    if (q == -(longint'(1) << (fs - 1)))
      return encode(norm(-1.0, int'(e) - 1), dw, k, nearest);
    efld = (e > 0) ? e : e - 1;
    r.bits = (64'(kk) << w0) | ((64'(efld) & ((64'd1 << kk) - 1)) << fs)
           | (64'(q) & ((64'd1 << fs) - 1));
    return r;
  endfunction

  // op: 0 add, 1 sub, 2 div, 3 mul. w0 bounds the result precision, so a
  // far smaller addend only matters through its sign.
  function automatic uval_t compute(input uval_t a, input uval_t b, input int op,
                                    input int w0, output bit dbz);
    uval_t larger, lesser;
    int d;
    dbz = 0;
    case (op)
      0, 1: begin
        if (op == 1) b = norm(-b.m, b.e);
        if (a.zero) return b;
        if (b.zero) return a;
        if (a.e >= b.e) begin larger = a; lesser = b; end
        else begin larger = b; lesser = a; end
        d = larger.e - lesser.e;
        if (d >= w0 + 3)
          return norm(larger.m + ((lesser.m > 0.0) ? pow2(-(w0 + 5)) : -pow2(-(w0 + 5))), larger.e);
        return norm(larger.m + lesser.m * pow2(-d), larger.e);
      end
      2: begin
        if (b.zero) begin dbz = 1; return norm(0.0, 0); end
        if (a.zero) return a;
        return norm(a.m / b.m, a.e - b.e);
      end
      default: begin
        if (a.zero || b.zero) return norm(0.0, 0);
        return norm(a.m * b.m, a.e + b.e);
      end
    endcase
  endfunction

  // Significand of a normalised value cut to w bits (one integer bit) with
  // everything below OR-ed into the LSB, as a processing unit delivers it.
  function automatic logic [63:0] sticky_cut(input real m, input int w);
    real x, f;
    longint q;
    x = m * pow2(w - 1);
    f = $floor(x);
    q = longint'(f);
    if (x != f) q = q | 1;
    return 64'(q) & ((w >= 64) ? '1 : ((64'd1 << w) - 1));
  endfunction

  // Random word of the format whose significand keeps at most sig fraction
  // bits, and whose exponent size is at most es_lim.
  function automatic logic [63:0] rand_word(input int dw, input int k, input int sig,
                                            input int es_lim);
    logic [63:0] x;
    int w0, es, fs;
    w0 = dw - k;
    x  = {$urandom, $urandom} & ((dw >= 64) ? '1 : ((64'd1 << dw) - 1));
    es = int'($urandom_range(es_lim, 0));
    x  = (x & ((64'd1 << w0) - 1)) | (64'(es) << w0);
    fs = w0 - es;
    if (fs > sig) x = x & ~((64'd1 << (fs - sig)) - 1);
    return x;
  endfunction

  // A processing unit result is right when its significand m (rw bits,
  // normalised) equals the exact significand down to bit 2 and bits 1..0
  // are non-zero exactly when the exact value has anything below bit 2.
  function automatic bit result_ok(input bit zero, input int e, input logic [63:0] m,
                                   input int rw, input uval_t exp_v);
    logic [63:0] c;
    if (exp_v.zero) return zero;
    if (zero || e != exp_v.e) return 0;
    c = sticky_cut(exp_v.m, rw - 1);
    return ((m >> 2) == (c >> 1)) && ((m[1:0] != 0) == c[0]);
  endfunction

  // Significand bits (w bits, one integer bit) of a normalised value.
  function automatic logic [63:0] man_bits(input real m, input int w);
    return 64'(longint'(m * pow2(w - 1))) & ((64'd1 << w) - 1);
  endfunction

  // A 64-bit integer as a real that rounds exactly like it: integers beyond
  // 50 bits are cut and a half unit stands for the bits cut off.
  function automatic real int_sticky(input longint x);
    bit st;
    int sh;
    st = 0;
    sh = 0;
    while (x >= (longint'(1) << 50) || x < -(longint'(1) << 50)) begin
      st = st | x[0];
      x = x >>> 1;
      sh++;
    end
    return (real'(x) + (st ? 0.5 : 0.0)) * pow2(sh);
  endfunction

  // Like compute(), but add, subtract and multiply significands of up to
  // 30 bits exactly in integer arithmetic, so that results of full-width
  // Unum-IV<32,K> operands round exactly like the exact values.
  function automatic uval_t compute_exact(input uval_t a, input uval_t b, input int op,
                                          input int w0, output bit dbz);
    longint ia, ib;
    int d;
    uval_t t;
    dbz = 0;
    if (op == 2 || a.zero || b.zero) return compute(a, b, op, w0, dbz);
    if (op == 1) b = norm(-b.m, b.e);
    ia = longint'(a.m * pow2(30));
    ib = longint'(b.m * pow2(30));
    if (op == 3) return norm(int_sticky(ia * ib) * pow2(-60), a.e + b.e);
    if (a.e < b.e) begin t = a; a = b; b = t; ia = longint'(a.m * pow2(30)); ib = longint'(b.m * pow2(30)); end
    d = a.e - b.e;
    if (d > 30) return compute(a, b, 0, w0, dbz);
    return norm(int_sticky((ia << d) + ib) * pow2(-30 - d), a.e);
  endfunction

endpackage
