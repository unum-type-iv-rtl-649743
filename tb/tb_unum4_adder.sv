// tb_unum4_adder: checks the adder/subtractor against integer arithmetic.
module tb_unum4_adder;
  localparam int W = 33;
  logic [W-1:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;
  unum4_adder #(.W(W)) dut (.*);
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint e;
      a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom});
      sub = 1'($urandom_range(1, 0));
      #1;
      e = sub ? (longint'(a) - longint'(b)) : (longint'(a) + longint'(b));
      checks++;
      if (s != W'(e)) begin
        failures++; $display("FAIL a=%h b=%h sub=%0d s=%h", a, b, sub, s);
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
