// tb_unum4_pack: checks the pack unit at Unum-IV<16,3>, with rounding to
// nearest-even (4 stages) and with truncation (3 stages) side by side.
// Random normalised significands with guard/round/sticky bits and exponents
// spread over and beyond the representable range stream in one per cycle;
// each packed word and its overflow/underflow flags must match the reference
// model's encoding of the exact input value, 4 or 3 cycles later.
module tb_unum4_pack;
  import unum4_ref_pkg::*;
  import unum4_pkg::*;
  localparam int DW = 16, K = 3;
  localparam int XW = exp_int_w(DW, K), RW = res_man_w(DW, K);
  localparam int N  = 30000;
  localparam int EMX = int'(unum4_pkg::emax(K)), EMN = int'(unum4_pkg::emin(K));

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, zero, dbz_in;
  logic [XW-1:0] e;
  logic [RW-1:0] m;
  logic          v1, v0, ovf1, ovf0, unf1, unf0, dbz1, dbz0;
  logic [DW-1:0] o1, o0;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_sub = 0;

  unum4_pack #(.DATA_W(DW), .EXP_SZ_W(K), .ROUNDING(1)) dut_rn (
    .clk(clk), .rst(rst), .in_valid(in_valid), .zero(zero), .dbz_in(dbz_in), .e(e), .m(m),
    .out_valid(v1), .o(o1), .overflow(ovf1), .underflow(unf1), .dbz(dbz1));
  unum4_pack #(.DATA_W(DW), .EXP_SZ_W(K), .ROUNDING(0)) dut_tr (
    .clk(clk), .rst(rst), .in_valid(in_valid), .zero(zero), .dbz_in(dbz_in), .e(e), .m(m),
    .out_valid(v0), .o(o0), .overflow(ovf0), .underflow(unf0), .dbz(dbz0));

  typedef struct { bit v; uval_t u; bit dbz; } in_t;
  in_t hist[$];

  initial begin
    in_valid = 0; zero = 0; dbz_in = 0; e = '0; m = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N + 6; i++) begin
      logic [RW-1:0] r;
      int ee;
      r = RW'({$urandom, $urandom});
      r[RW-2] = ~r[RW-1];                         // normalised
      if ($urandom_range(3, 0) == 0) r[RW-3:0] = '1;   // long carries
      case ($urandom_range(3, 0))
        0: ee = int'($urandom_range(EMX + 3, 0)) - 2 * EMX;     // far below
        1: ee = EMN - int'($urandom_range(16, 0));              // subnormal range
        2: ee = EMX - int'($urandom_range(3, 0)) + int'($urandom_range(1, 0));
        default: ee = int'($urandom_range(2 * EMX, 0)) - EMX;
      endcase
      in_valid = (i < N);
      zero   = ($urandom_range(31, 0) == 0);
      dbz_in = ($urandom_range(63, 0) == 0);
      e = XW'(ee);
      m = r;
      @(negedge clk);
    end
  end

  // the input as it was sampled, and checks 3 and 4 cycles later
  always @(posedge clk) begin
    if (!rst) begin
      in_t x;
      x.v = in_valid;
      x.u = zero ? norm(0.0, 0) : norm(real'($signed(m)) / pow2(RW - 1), int'($signed(e)));
      x.dbz = dbz_in;
      hist.push_front(x);
      if (hist.size() > 5) void'(hist.pop_back());
    end
  end

  task automatic check(input in_t x, input bit v, input logic [DW-1:0] o, input bit ovf,
                       input bit unf, input bit dbz, input bit rn);
    enc_t ex;
    checks++;
    if (v != x.v) begin
      failures++;
      $display("FAIL rn=%0d valid/latency", rn);
      return;
    end
    if (!x.v) return;
    ex = encode(x.u, DW, K, rn);
    checks++;
    if (ovf != ex.ovf || unf != ex.unf || dbz != x.dbz ||
        (!ex.ovf && !ex.unf && o != DW'(ex.bits))) begin
      failures++;
      $display("FAIL rn=%0d m=%f e=%0d: o=%h ovf=%0d unf=%0d expected %h %0d %0d",
               rn, x.u.m, x.u.e, o, ovf, unf, DW'(ex.bits), ex.ovf, ex.unf);
    end
    if (rn) begin
      if (ex.ovf) n_ovf++;
      if (ex.unf) n_unf++;
      if (!ex.ovf && !ex.unf && !x.u.zero && x.u.e < EMN) n_sub++;
    end
  endtask

  always @(negedge clk) begin
    if (!rst && hist.size() == 5) begin
      check(hist[3], v1, o1, ovf1, unf1, dbz1, 1'b1);
      check(hist[2], v0, o0, ovf0, unf0, dbz0, 1'b0);
    end
  end

  initial begin
    repeat (N + 20) @(posedge clk);
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL overflow/underflow/subnormal not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (N * 4) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
