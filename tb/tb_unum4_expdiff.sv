// tb_unum4_expdiff: checks the exponent difference unit: which operand is
// larger, its exponent, and the saturated distance, with zero operands.
module tb_unum4_expdiff;
  localparam int XW = 12, SW = 5;
  logic [XW-1:0] ea, eb, e_big;
  logic za, zb, swap;
  logic [SW-1:0] d;
  int checks = 0, failures = 0;
  unum4_expdiff #(.XW(XW), .SW(SW)) dut (.*);
  initial begin
    for (int i = 0; i < 20000; i++) begin
      int a, b, dd, sw;
      a = int'($urandom_range(200, 0)) - 100;
      b = a + int'($urandom_range(80, 0)) - 40;
      ea = XW'(a); eb = XW'(b);
      za = ($urandom_range(9, 0) == 0); zb = ($urandom_range(9, 0) == 0);
      #1;
      if (za)      begin sw = 1; dd = 0; end
      else if (zb) begin sw = 0; dd = 0; end
      else begin sw = (b > a); dd = sw ? b - a : a - b; end
      if (dd > 31) dd = 31;
      checks++;
      if (swap != sw[0] || int'(d) != dd || $signed(e_big) != (sw ? b : a)) begin
        failures++; $display("FAIL ea=%0d eb=%0d za=%0d zb=%0d", a, b, za, zb);
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
