// tb_unum4_ctrl: checks the control logic alone. A small model of the data
// path returns the unpacked token 3 cycles after issue and the packed result
// a random number of cycles later. Checked: start is accepted only when idle,
// the token is dispatched to the unit op selects (0 add, 1 sub, 2 div,
// 3 mul), done strobes exactly once, one cycle after the pack result, with
// that result, and an exception strobes its flag and forces o to the zero
// encoding.
module tb_unum4_ctrl;
  localparam int DW = 16, K = 3;
  localparam logic [DW-1:0] ZW = {{K{1'b1}}, {(DW-K){1'b0}}};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, issue, busy, unp_valid, as_valid, as_sub, mul_valid, div_valid;
  logic pk_valid, pk_ovf, pk_unf, pk_dbz, done, div_by_zero, underflow, overflow;
  logic [1:0] op;
  logic [DW-1:0] pk_o, o;
  int checks = 0, failures = 0;
  int n_ign = 0;

  unum4_ctrl #(.DATA_W(DW), .EXP_SZ_W(K)) dut (.*);

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    start = 0; op = 0; unp_valid = 0; pk_valid = 0; pk_o = '0;
    pk_ovf = 0; pk_unf = 0; pk_dbz = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int opc, wait_c, exc;
      logic [DW-1:0] res;
      opc = int'($urandom_range(3, 0));
      op = 2'(opc);
      start = 1;
      #1 chk(issue && !busy, "issue when idle");
      @(negedge clk);
      start = 1; op = ~op;                     // ignored: busy
      #1 chk(!issue && busy, "no issue while busy");
      n_ign++;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      unp_valid = 1;
      #1 chk(as_valid == (opc < 2) && as_sub == (opc == 1) && div_valid == (opc == 2) &&
             mul_valid == (opc == 3), "dispatch");
      @(negedge clk);
      unp_valid = 0;
      wait_c = int'($urandom_range(40, 1));
      repeat (wait_c) begin
        @(negedge clk);
        chk(!done, "no early done");
      end
      res = DW'($urandom);
      exc = int'($urandom_range(5, 0));
      pk_valid = 1; pk_o = res;
      pk_ovf = (exc == 1); pk_unf = (exc == 2); pk_dbz = (exc == 3);
      @(negedge clk);
      pk_valid = 0; pk_ovf = 0; pk_unf = 0; pk_dbz = 0;
      chk(done, "done one cycle after the pack result");
      chk(overflow == (exc == 1) && underflow == (exc == 2) && div_by_zero == (exc == 3),
          "exception strobes");
      chk(o == ((exc >= 1 && exc <= 3) ? ZW : res), "result / forced zero");
      @(negedge clk);
      chk(!done && !overflow && !underflow && !div_by_zero && !busy, "strobes last one cycle");
    end
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
