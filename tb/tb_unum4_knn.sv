// tb_unum4_knn: k-nearest-neighbour classification run on the FPU at its
// default configuration, Unum-IV<32,4> with rounding.
//
// Two experiments, each over NB random benchmarks of NP labelled 2-D points
// (3 classes) and NT test points, with K = 10 neighbours:
//   1: training points in [0.99999, 1], test points in [0.9, 1]
//      (resolution near 1);
//   2: all points in [0, 1e22], so squared distances reach 1e44
//      (dynamic range).
// Every squared distance (x-t)^2 + (y-u)^2 is computed by the FPU with two
// subtractions, two multiplications and one addition; each FPU result is
// checked bit-exactly against the reference model, and must raise no
// exception. The test points are then classified by majority vote of the
// 10 nearest training points, once with the FPU distances and once with
// double-precision distances, and the agreement is reported; a benchmark
// set whose agreement falls below MIN_AGREE percent counts as a failure.
module tb_unum4_knn;
  import unum4_ref_pkg::*;
  localparam int DW = 32, K = 4, RND = 1;
  localparam int NB = 10, NP = 40, NT = 8, KNN = 10, NCLS = 3;
  localparam int MIN_AGREE = 80;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start;
  logic [1:0] op;
  logic [DW-1:0] a, b, o;
  logic done, dbz, unf, ovf;
  int checks = 0, failures = 0, n_ops = 0;

  unum4_fpu u_dut (.clk(clk), .rst(rst), .start(start), .op(op), .a(a), .b(b), .o(o),
                   .done(done), .div_by_zero(dbz), .underflow(unf), .overflow(ovf));

  function automatic logic [DW-1:0] to_unum(input real x);
    enc_t e;
    e = encode(norm(x, 0), DW, K, 1'b1);
    return DW'(e.bits);
  endfunction

  task automatic fpu(input logic [DW-1:0] x, input logic [DW-1:0] y, input int opc,
                     output logic [DW-1:0] r);
    uval_t ex;
    enc_t  ee;
    bit    edbz;
    ex = compute_exact(decode(64'(x), DW, K), decode(64'(y), DW, K), opc, DW - K, edbz);
    ee = encode(ex, DW, K, 1'b1);
    @(negedge clk);
    a = x; b = y; op = 2'(opc); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    r = o;
    n_ops++;
    checks++;
    if (o != DW'(ee.bits) || dbz || ovf || unf || ee.ovf || ee.unf) begin
      failures++;
      $display("FAIL op=%0d %h %h: o=%h flags=%b%b%b expected %h", opc, x, y, o,
               dbz, ovf, unf, DW'(ee.bits));
    end
  endtask

  // majority vote of the KNN smallest distances (ties: lower index, lower class)
  function automatic int classify(input real dst[NP], input int lab[NP]);
    bit used[NP];
    int votes[NCLS];
    int best;
    used = '{default: 0};
    votes = '{default: 0};
    for (int k = 0; k < KNN; k++) begin
      int bi;
      bi = -1;
      for (int i = 0; i < NP; i++)
        if (!used[i] && (bi < 0 || dst[i] < dst[bi])) bi = i;
      used[bi] = 1;
      votes[lab[bi]]++;
    end
    best = 0;
    for (int c = 1; c < NCLS; c++) if (votes[c] > votes[best]) best = c;
    return best;
  endfunction

  initial begin
    real px[NP], py[NP], dref[NP], dfpu[NP];
    int  lab[NP];
    logic [DW-1:0] ux[NP], uy[NP];
    start = 0; op = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ex = 1; ex <= 2; ex++) begin
      int agree;
      agree = 0;
      for (int bm = 0; bm < NB; bm++) begin
        for (int i = 0; i < NP; i++) begin
          if (ex == 1) begin
            px[i] = 0.99999 + 0.00001 * (real'($urandom) / 4294967296.0);
            py[i] = 0.99999 + 0.00001 * (real'($urandom) / 4294967296.0);
          end else begin
            px[i] = 1.0e22 * (real'($urandom) / 4294967296.0);
            py[i] = 1.0e22 * (real'($urandom) / 4294967296.0);
          end
          lab[i] = int'($urandom_range(NCLS - 1, 0));
          ux[i] = to_unum(px[i]);
          uy[i] = to_unum(py[i]);
        end
        for (int t = 0; t < NT; t++) begin
          real tx, ty;
          logic [DW-1:0] utx, uty, dx, dy, sx, sy, dd;
          if (ex == 1) begin
            tx = 0.9 + 0.1 * (real'($urandom) / 4294967296.0);
            ty = 0.9 + 0.1 * (real'($urandom) / 4294967296.0);
          end else begin
            tx = 1.0e22 * (real'($urandom) / 4294967296.0);
            ty = 1.0e22 * (real'($urandom) / 4294967296.0);
          end
          utx = to_unum(tx);
          uty = to_unum(ty);
          for (int i = 0; i < NP; i++) begin
            uval_t v;
            fpu(ux[i], utx, 1, dx);
            fpu(uy[i], uty, 1, dy);
            fpu(dx, dx, 3, sx);
            fpu(dy, dy, 3, sy);
            fpu(sx, sy, 0, dd);
            v = decode(64'(dd), DW, K);
            dfpu[i] = v.zero ? 0.0 : v.m * pow2(v.e);
            dref[i] = (px[i] - tx) * (px[i] - tx) + (py[i] - ty) * (py[i] - ty);
          end
          if (classify(dfpu, lab) == classify(dref, lab)) agree++;
        end
      end
      $display("experiment %0d: %0d of %0d classifications agree with double precision (%0d%%)",
               ex, agree, NB * NT, agree * 100 / (NB * NT));
      checks++;
      if (agree * 100 < MIN_AGREE * NB * NT) begin
        failures++;
        $display("FAIL experiment %0d agreement below %0d%%", ex, MIN_AGREE);
      end
    end
    $display("%0d FPU operations", n_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
