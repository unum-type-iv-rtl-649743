// tb_unum4_serial_div: checks the serial divider: quotient bits and the
// inexact flag against integer division, and done exactly NQ+1 cycles after
// start, busy in between.
module tb_unum4_serial_div;
  localparam int W = 15, NQ = 18;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy, done, rem_nz;
  logic [W-1:0] a, b;
  logic [NQ-1:0] q;
  int checks = 0, failures = 0;
  unum4_serial_div #(.W(W), .NQ(NQ)) dut (.*);
  initial begin
    start = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      longint num, eq, er;
      int c;
      b = W'($urandom_range((1 << W) - 1, 1));
      a = W'($urandom_range(2 * int'(b) - 1 > (1 << W) - 1 ? (1 << W) - 1 : 2 * int'(b) - 1, 0));
      start = 1;
      @(negedge clk);
      start = 0;
      c = 1;
      while (!done && c < 100) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL not busy"); end
        @(negedge clk); c++;
      end
      num = longint'(a) << (NQ - 1);
      eq = num / longint'(b);
      er = num % longint'(b);
      checks++;
      if (c != NQ + 1 || longint'(q) != eq || rem_nz != (er != 0)) begin
        failures++;
        $display("FAIL a=%0d b=%0d q=%0d rem_nz=%0d cycles=%0d expected %0d %0d %0d",
                 a, b, q, rem_nz, c, eq, er != 0, NQ + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
