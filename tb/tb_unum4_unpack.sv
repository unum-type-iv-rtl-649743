// tb_unum4_unpack: checks the unpack unit at Unum-IV<32,4>.
// Random words (and zero, subnormals, each exponent size) stream in one per
// cycle; each output must come exactly 3 cycles later and carry the exponent
// and normalised significand the reference model decodes from the word.
module tb_unum4_unpack;
  import unum4_ref_pkg::*;
  import unum4_pkg::*;
  localparam int DW = 32, K = 4;
  localparam int MW = man_max_w(DW, K), XW = exp_int_w(DW, K);
  localparam int N  = 20000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, out_valid, zero;
  logic [DW-1:0] x;
  logic [XW-1:0] e;
  logic [MW-1:0] m;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist[$];
  int vhist[$];

  unum4_unpack #(.DATA_W(DW), .EXP_SZ_W(K)) dut (.*);

  initial begin
    in_valid = 0; x = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N + 4; i++) begin
      in_valid = (i < N) && ($urandom_range(7, 0) != 0);
      x = DW'(rand_word(DW, K, 64, 15));
      if (i % 50 == 0) x = DW'(zero_word(DW, K));
      if (i % 50 == 1) x = {4'hF, 28'($urandom_range(255, 0))};   // subnormals
      @(negedge clk);
    end
  end

  // reference: what went in 3 cycles ago
  always @(posedge clk) begin
    if (!rst) begin
      hist.push_back(x);
      vhist.push_back(int'(in_valid));
      if (hist.size() > 3) begin
        logic [DW-1:0] w;
        int v;
        uval_t r;
        real mr;
        w = hist.pop_front();
        v = vhist.pop_front();
        checks++;
        if (out_valid != v[0]) begin
          failures++;
          $display("FAIL valid/latency: out_valid=%0d expected %0d", out_valid, v);
        end
        if (v[0]) begin
          r  = decode(64'(w), DW, K);
          mr = real'($signed(m)) / pow2(MW - 1);
          checks++;
          if (zero != r.zero || (!r.zero && (mr != r.m || $signed(e) != r.e))) begin
            failures++;
            $display("FAIL x=%h: zero=%0d e=%0d m=%f expected zero=%0d e=%0d m=%f",
                     w, zero, $signed(e), mr, r.zero, r.e, r.m);
          end
        end
      end
    end
  end

  initial begin
    repeat (N + 20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (N * 4) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
