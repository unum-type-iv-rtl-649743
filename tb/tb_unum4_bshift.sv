// tb_unum4_bshift: checks the barrel shifter: arithmetic right shifts with
// sticky (shifts beyond the width included) against division by powers of
// two, and left shifts against multiplication.
module tb_unum4_bshift;
  localparam int W = 32, SW = 7;
  logic [W-1:0] x, y;
  logic [SW-1:0] sh;
  logic left, sticky;
  int checks = 0, failures = 0;
  unum4_bshift #(.W(W), .SW(SW)) dut (.*);
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint xv, q, r;
      x = $urandom;
      sh = SW'($urandom_range(40, 0));
      left = 1'($urandom_range(1, 0));
      #1;
      xv = longint'($signed(x));
      checks++;
      if (left) begin
        if (y != W'(xv * (longint'(1) << sh)) || sticky) begin
          failures++; $display("FAIL left x=%h sh=%0d y=%h", x, sh, y);
        end
      end else begin
        // floor division and remainder
        q = xv >>> sh;
        r = xv - (q << sh);
        if ($signed(y) != q || sticky != (r != 0)) begin
          failures++; $display("FAIL right x=%h sh=%0d y=%h st=%0d", x, sh, y, sticky);
        end
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
