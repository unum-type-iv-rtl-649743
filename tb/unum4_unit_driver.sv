// unum4_unit_driver: stimulus and checking shared by the add/sub,
// multiplication and division unit testbenches.
//
// Produces random unpacked operands (decoded by the reference model from
// random Unum-IV<DW,K> words, including zeros and subnormals) one at a time
// or, when GAP = 0, one per cycle, and checks each result LAT cycles after
// its operands against the reference model's exact result (see
// unum4_ref_pkg::result_ok).  OPC selects the operation the reference
// computes; for OPC = 0 the sub input toggles randomly between add and
// subtract.
module unum4_unit_driver
  import unum4_ref_pkg::*;
  import unum4_pkg::*;
#(
  parameter int DW  = 16,
  parameter int K   = 3,
  parameter int OPC = 0,
  parameter int LAT = 6,
  parameter int GAP = 0,
  parameter int N   = 5000,
  parameter int MW  = man_max_w(DW, K),
  parameter int XW  = exp_int_w(DW, K),
  parameter int RW  = res_man_w(DW, K)
) (
  input  logic          clk,
  input  logic          rst,
  output logic          in_valid,
  output logic          sub,
  output logic          za,
  output logic [XW-1:0] ea,
  output logic [MW-1:0] ma,
  output logic          zb,
  output logic [XW-1:0] eb,
  output logic [MW-1:0] mb,
  input  logic          out_valid,
  input  logic          zero,
  input  logic          dbz,
  input  logic [XW-1:0] e,
  input  logic [RW-1:0] m,
  output int            checks,
  output int            failures,
  output bit            finished
);
  typedef struct {
    int    t;
    uval_t r;
    bit    dbz;
  } exp_t;
  exp_t q[$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic drive_one(output exp_t x);
    uval_t a, b;
    int opc;
    a = decode(rand_word(DW, K, 64, (1 << K) - 1), DW, K);
    b = decode(rand_word(DW, K, 64, (1 << K) - 1), DW, K);
    if ($urandom_range(15, 0) == 0) a = norm(0.0, 0);
    if ($urandom_range(15, 0) == 0) b = norm(0.0, 0);
    opc = OPC;
    sub = (OPC == 0) ? 1'($urandom_range(1, 0)) : 1'b0;
    if (OPC == 0 && sub) opc = 1;
    in_valid = 1;
    za = a.zero;  ea = XW'(a.e);  ma = a.zero ? '0 : MW'(man_bits(a.m, MW));
    zb = b.zero;  eb = XW'(b.e);  mb = b.zero ? '0 : MW'(man_bits(b.m, MW));
    x.t = cyc;
    x.r = compute(a, b, opc, DW, x.dbz);
  endtask

  initial begin
    exp_t x;
    checks = 0; failures = 0; finished = 0;
    in_valid = 0; sub = 0; za = 0; zb = 0; ea = '0; eb = '0; ma = '0; mb = '0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      drive_one(x);
      q.push_back(x);
      @(negedge clk);
      in_valid = 0;
      repeat (GAP) @(negedge clk);
    end
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came", q.size());
    end
    finished = 1;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t x;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        x = q.pop_front();
        if (cyc - x.t != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cyc - x.t, LAT);
        end
        checks++;
        if (OPC == 2 && (dbz != x.dbz)) begin
          failures++;
          $display("FAIL dbz=%0d expected %0d", dbz, x.dbz);
        end else if (!x.dbz && !result_ok(zero, int'($signed(e)), 64'(m), RW, x.r)) begin
          failures++;
          $display("FAIL result zero=%0d e=%0d m=%h expected zero=%0d e=%0d m=%f",
                   zero, $signed(e), m, x.r.zero, x.r.e, x.r.m);
        end
      end
    end
  end
endmodule
