// unum4_pkg: shared constants, operation codes and width functions for the
// Unum-IV floating-point unit.
//
// A Unum-IV<DATA_W,EXP_SZ_W> word holds, from MSB to LSB, an EXP_SZ_W-bit
// exponent-size field ExpSz, an ExpSz-bit 1's complement exponent E with a
// hidden MSB, and a FracSize = DATA_W-EXP_SZ_W-ExpSz bit fraction F of a 2's
// complement significand with a hidden MSB. The field order is this design's
// choice; the field meanings follow the format definition.
//
// Inside the unit every value travels unpacked as
//   zero flag, exponent e (signed, exp_int_w bits), significand m
// where m is a 2's complement fixed-point number with one integer (sign) bit,
// normalised so that its two top bits differ (m in [0.5,1) or [-1,-0.5)).
package unum4_pkg;

  // Operation codes, numbered in the order the operations are listed
  // (addition, subtraction, division, multiplication).
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_DIV = 2'd2,
    OP_MUL = 2'd3
  } op_t;

  // Largest explicit exponent size, 2^EXP_SZ_W - 1.
  function automatic int exp_sz_max(input int exp_sz_w);
    return (1 << exp_sz_w) - 1;
  endfunction

  // EXP_MAX_W: widest exponent including its hidden bit.
  function automatic int exp_max_w(input int exp_sz_w);
    return 1 << exp_sz_w;
  endfunction

  // MAN_MAX_W: widest significand including its hidden (sign) bit.
  function automatic int man_max_w(input int data_w, input int exp_sz_w);
    return data_w - exp_sz_w + 1;
  endfunction

  // Width of the internal signed exponent: wide enough for the sum of two
  // exponents of normalised subnormals plus normalisation shifts.
  function automatic int exp_int_w(input int data_w, input int exp_sz_w);
    return exp_max_w(exp_sz_w) + $clog2(man_max_w(data_w, exp_sz_w)) + 3;
  endfunction

  // Width of a processing-unit result significand: MAN_MAX_W plus guard,
  // round and sticky bits (sticky is the LSB).
  function automatic int res_man_w(input int data_w, input int exp_sz_w);
    return man_max_w(data_w, exp_sz_w) + 3;
  endfunction

  // Largest exponent value, 2^(2^EXP_SZ_W-1) - 1.
  function automatic longint emax(input int exp_sz_w);
    return (longint'(1) << exp_sz_max(exp_sz_w)) - 1;
  endfunction

  // Exponent of the subnormal encoding (ExpSz all ones, E all zeros), which
  // is also the smallest normal exponent: -2^(2^EXP_SZ_W-1) + 2.
  function automatic longint emin(input int exp_sz_w);
    return 2 - (longint'(1) << exp_sz_max(exp_sz_w));
  endfunction

endpackage
