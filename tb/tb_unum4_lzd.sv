// tb_unum4_lzd: checks the leading zeros/ones detector on random words with
// random run lengths of the sign bit (all lengths 0..W-1 occur). The expected
// count is the largest shift that keeps the word's value, found by shifting.
module tb_unum4_lzd;
  localparam int W = 29, CW = $clog2(W);
  logic [W-1:0] x;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;
  unum4_lzd #(.W(W)) dut (.x(x), .cnt(cnt));
  initial begin
    for (int i = 0; i < 20000; i++) begin
      int run, expc;
      logic [W-1:0] y;
      x = W'({$urandom, $urandom});
      run = int'($urandom_range(W - 1, 0));
      for (int j = W - 2; j >= W - 1 - run && j >= 0; j--) x[j] = x[W-1];
      // reference: shift left while the value (as signed) survives
      expc = 0;
      y = x;
      while (expc < W - 1 && $signed(W'(y << 1)) == $signed(y) * 2) begin
        y = y << 1; expc++;
      end
      #1;
      checks++;
      if (int'(cnt) != expc) begin
        failures++;
        $display("FAIL x=%b cnt=%0d expected %0d", x, cnt, expc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
