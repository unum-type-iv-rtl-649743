// tb_unum4_fpu_full: the FPU at its default configuration, Unum-IV<32,4>
// with rounding to nearest-even, checked end to end against the reference
// model. Operands keep at most 19 fraction bits so that the reference's
// double arithmetic stays exact; exponent sizes span the whole 0..15 range,
// so exponents up to +-32767, overflows, underflows and subnormals all occur.
module tb_unum4_fpu_full;
  logic clk = 0;
  logic rst = 1;
  always #5 clk = ~clk;

  int checks, failures;
  bit fin;
  int n_op[4];
  int n_ovf, n_unf, n_dbz, n_sub_in, n_sub_out, n_zero, n_rup, n_ign, n_carry;

  unum4_fpu_tester #(.DW(32), .K(4), .RND(1), .SIG(19), .ES_LIM(15), .NOPS(4000),
                     .DEFAULTS(1)) t0 (
    .clk(clk), .rst(rst), .checks(checks), .failures(failures), .finished(fin),
    .n_op(n_op), .n_ovf(n_ovf), .n_unf(n_unf), .n_dbz(n_dbz),
    .n_sub_in(n_sub_in), .n_sub_out(n_sub_out), .n_zero_out(n_zero),
    .n_round_up(n_rup), .n_ignored(n_ign), .n_carry(n_carry));

  initial begin
    int f;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (fin);
    f = failures;
    $display("add %0d sub %0d div %0d mul %0d ovf %0d unf %0d dbz %0d sub_in %0d sub_out %0d zero %0d round_up %0d carry %0d ignored %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_ovf, n_unf, n_dbz, n_sub_in, n_sub_out,
             n_zero, n_rup, n_carry, n_ign);
    if (n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_ovf == 0 ||
        n_unf == 0 || n_dbz == 0 || n_rup == 0) begin
      f++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
