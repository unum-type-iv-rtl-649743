// tb_unum4_multiplier: checks the signed significand multiplier against
// 64-bit integer products, extreme operands (-2^(W-1)) included.
module tb_unum4_multiplier;
  localparam int W = 29;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  unum4_multiplier #(.W(W)) dut (.*);
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint e;
      a = W'($urandom); b = W'($urandom);
      if (i % 100 == 0) a = {1'b1, {(W-1){1'b0}}};
      if (i % 300 == 0) b = {1'b1, {(W-1){1'b0}}};
      #1;
      e = longint'($signed(a)) * longint'($signed(b));
      checks++;
      if (p != (2*W)'(e)) begin
        failures++; $display("FAIL a=%h b=%h p=%h", a, b, p);
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
