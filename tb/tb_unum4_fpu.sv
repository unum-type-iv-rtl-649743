// tb_unum4_fpu: end-to-end test of the Unum-IV FPU.
//
// Runs eight FPU configurations side by side, Unum-IV<16,3>, <8,2> and
// <32,3> (operands cut to 19 fraction bits), each with rounding to
// nearest-even and with truncation, and Unum-IV<64,4> in both modes
// (operands cut to 19 fraction bits, exponents below 2^4; divisions with
// exact quotients checked bit-exactly, others to within 2^-40),
// through random and
// directed additions, subtractions, divisions and multiplications. Every
// result, flag and start-to-done latency is compared with the reference
// model. Then it checks that each mechanism of the design occurred at least
// once: every operation, overflow, underflow, divide by zero, subnormal
// operands and results, zero results, rounding up, a rounding carry into the
// next exponent, and a start ignored while busy.
module tb_unum4_fpu;
  logic clk = 0;
  logic rst = 1;
  always #5 clk = ~clk;

  localparam int NT = 8;
  int  checks[NT], failures[NT];
  bit  fin[NT];
  int  n_op[NT][4];
  int  n_ovf[NT], n_unf[NT], n_dbz[NT], n_sub_in[NT], n_sub_out[NT], n_zero[NT];
  int  n_rup[NT], n_ign[NT], n_carry[NT];

  unum4_fpu_tester #(.DW(16), .K(3), .RND(1), .ES_LIM(7), .NOPS(3000)) t0 (
    .clk(clk), .rst(rst), .checks(checks[0]), .failures(failures[0]), .finished(fin[0]),
    .n_op(n_op[0]), .n_ovf(n_ovf[0]), .n_unf(n_unf[0]), .n_dbz(n_dbz[0]),
    .n_sub_in(n_sub_in[0]), .n_sub_out(n_sub_out[0]), .n_zero_out(n_zero[0]),
    .n_round_up(n_rup[0]), .n_ignored(n_ign[0]), .n_carry(n_carry[0]));
  unum4_fpu_tester #(.DW(16), .K(3), .RND(0), .ES_LIM(7), .NOPS(3000)) t1 (
    .clk(clk), .rst(rst), .checks(checks[1]), .failures(failures[1]), .finished(fin[1]),
    .n_op(n_op[1]), .n_ovf(n_ovf[1]), .n_unf(n_unf[1]), .n_dbz(n_dbz[1]),
    .n_sub_in(n_sub_in[1]), .n_sub_out(n_sub_out[1]), .n_zero_out(n_zero[1]),
    .n_round_up(n_rup[1]), .n_ignored(n_ign[1]), .n_carry(n_carry[1]));
  unum4_fpu_tester #(.DW(8), .K(2), .RND(1), .ES_LIM(3), .NOPS(3000)) t2 (
    .clk(clk), .rst(rst), .checks(checks[2]), .failures(failures[2]), .finished(fin[2]),
    .n_op(n_op[2]), .n_ovf(n_ovf[2]), .n_unf(n_unf[2]), .n_dbz(n_dbz[2]),
    .n_sub_in(n_sub_in[2]), .n_sub_out(n_sub_out[2]), .n_zero_out(n_zero[2]),
    .n_round_up(n_rup[2]), .n_ignored(n_ign[2]), .n_carry(n_carry[2]));
  unum4_fpu_tester #(.DW(8), .K(2), .RND(0), .ES_LIM(3), .NOPS(3000)) t3 (
    .clk(clk), .rst(rst), .checks(checks[3]), .failures(failures[3]), .finished(fin[3]),
    .n_op(n_op[3]), .n_ovf(n_ovf[3]), .n_unf(n_unf[3]), .n_dbz(n_dbz[3]),
    .n_sub_in(n_sub_in[3]), .n_sub_out(n_sub_out[3]), .n_zero_out(n_zero[3]),
    .n_round_up(n_rup[3]), .n_ignored(n_ign[3]), .n_carry(n_carry[3]));

  unum4_fpu_tester #(.DW(32), .K(3), .RND(1), .SIG(19), .ES_LIM(7), .NOPS(3000)) t4 (
    .clk(clk), .rst(rst), .checks(checks[4]), .failures(failures[4]), .finished(fin[4]),
    .n_op(n_op[4]), .n_ovf(n_ovf[4]), .n_unf(n_unf[4]), .n_dbz(n_dbz[4]),
    .n_sub_in(n_sub_in[4]), .n_sub_out(n_sub_out[4]), .n_zero_out(n_zero[4]),
    .n_round_up(n_rup[4]), .n_ignored(n_ign[4]), .n_carry(n_carry[4]));

  unum4_fpu_tester #(.DW(64), .K(4), .RND(0), .SIG(19), .ES_LIM(4), .NOPS(3000), .WIDE(1)) t5 (
    .clk(clk), .rst(rst), .checks(checks[5]), .failures(failures[5]), .finished(fin[5]),
    .n_op(n_op[5]), .n_ovf(n_ovf[5]), .n_unf(n_unf[5]), .n_dbz(n_dbz[5]),
    .n_sub_in(n_sub_in[5]), .n_sub_out(n_sub_out[5]), .n_zero_out(n_zero[5]),
    .n_round_up(n_rup[5]), .n_ignored(n_ign[5]), .n_carry(n_carry[5]));

  unum4_fpu_tester #(.DW(32), .K(3), .RND(0), .SIG(19), .ES_LIM(7), .NOPS(3000)) t6 (
    .clk(clk), .rst(rst), .checks(checks[6]), .failures(failures[6]), .finished(fin[6]),
    .n_op(n_op[6]), .n_ovf(n_ovf[6]), .n_unf(n_unf[6]), .n_dbz(n_dbz[6]),
    .n_sub_in(n_sub_in[6]), .n_sub_out(n_sub_out[6]), .n_zero_out(n_zero[6]),
    .n_round_up(n_rup[6]), .n_ignored(n_ign[6]), .n_carry(n_carry[6]));

  unum4_fpu_tester #(.DW(64), .K(4), .RND(1), .SIG(19), .ES_LIM(4), .NOPS(3000), .WIDE(1)) t7 (
    .clk(clk), .rst(rst), .checks(checks[7]), .failures(failures[7]), .finished(fin[7]),
    .n_op(n_op[7]), .n_ovf(n_ovf[7]), .n_unf(n_unf[7]), .n_dbz(n_dbz[7]),
    .n_sub_in(n_sub_in[7]), .n_sub_out(n_sub_out[7]), .n_zero_out(n_zero[7]),
    .n_round_up(n_rup[7]), .n_ignored(n_ign[7]), .n_carry(n_carry[7]));

  task automatic need(input string what, input int count, inout int c, inout int f);
    c++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      f++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int c, f;
    int ops[4];
    repeat (3) @(posedge clk);
    rst = 0;
    wait (fin.and());
    c = 0; f = 0;
    for (int t = 0; t < NT; t++) begin
      c += checks[t];
      f += failures[t];
      $display("config %0d: %0d checks, %0d failures", t, checks[t], failures[t]);
    end
    $display("mechanisms (all configurations):");
    ops = '{default: 0};
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < 4; k++) ops[k] += n_op[t][k];
    need("addition", ops[0], c, f);
    need("subtraction", ops[1], c, f);
    need("division", ops[2], c, f);
    need("multiplication", ops[3], c, f);
    need("overflow", n_ovf.sum(), c, f);
    need("underflow", n_unf.sum(), c, f);
    need("divide by zero", n_dbz.sum(), c, f);
    need("subnormal operand", n_sub_in.sum(), c, f);
    need("subnormal result", n_sub_out.sum(), c, f);
    need("zero result", n_zero.sum(), c, f);
    need("round to nearest went up", n_rup[0] + n_rup[2] + n_rup[4] + n_rup[7], c, f);
    need("rounding carry to next exp", n_carry.sum(), c, f);
    need("start ignored while busy", n_ign.sum(), c, f);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end
endmodule
