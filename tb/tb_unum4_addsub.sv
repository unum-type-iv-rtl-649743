// tb_unum4_addsub: checks the add/sub unit at Unum-IV<16,3>: one random addition or subtraction per cycle, including zero operands, far-apart exponents and cancellation; each result must arrive exactly 6 cycles later.
// Results are compared with the reference model's exact result down to the
// round bit, with the sticky bit below it.
module tb_unum4_addsub;
  import unum4_pkg::*;
  localparam int DW = 16, K = 3;
  localparam int MW = man_max_w(DW, K), XW = exp_int_w(DW, K), RW = res_man_w(DW, K);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, sub, za, zb, out_valid, zero, dbz;
  logic [XW-1:0] ea, eb, e;
  logic [MW-1:0] ma, mb;
  logic [RW-1:0] m;
  int checks, failures;
  bit fin;

  assign dbz = 1'b0;
  unum4_addsub #(.DATA_W(DW), .EXP_SZ_W(K)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .za(za), .ea(ea), .ma(ma), .zb(zb), .eb(eb), .mb(mb), .out_valid(out_valid), .zero(zero), .e(e), .m(m), .sub(sub));

  unum4_unit_driver #(.DW(DW), .K(K), .OPC(0), .LAT(6), .GAP(0), .N(6000)) drv (
    .clk(clk), .rst(rst), .in_valid(in_valid), .sub(sub), .za(za), .ea(ea), .ma(ma),
    .zb(zb), .eb(eb), .mb(mb), .out_valid(out_valid), .zero(zero), .dbz(dbz), .e(e),
    .m(m), .checks(checks), .failures(failures), .finished(fin));

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
