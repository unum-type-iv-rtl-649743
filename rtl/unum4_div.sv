// unum4_div: Unum-IV division unit (5 + MAN_MAX_W + EXTRA pipeline stages).
//
// Divides unpacked operand a by b. EXTRA is 3 with rounding (guard, round
// and sticky quotient bits) and 0 with truncation.
//   stage 1: takes the magnitudes of both significands, the quotient sign and
//            the exponent difference; flags a zero divisor.
//   stages 2 .. MAN_MAX_W+EXTRA+2: the shift-and-subtract serial divider
//            computes |ma| / (2|mb|), which lies in [0.25,1], one bit per
//            cycle, MAN_MAX_W+1+EXTRA bits in all, plus a sticky bit from
//            the final remainder.
//   next stage: applies the quotient sign (2's complement negation with the
//            sticky bit as LSB).
//   last stage: normalises and registers the result.
// Output format as for unum4_addsub, plus dbz (divide by zero; the result is
// then meaningless). The unit holds one division at a time: a new in_valid
// while busy restarts it. The latency follows the document; the internal
// split is this design's choice.
module unum4_div
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
  parameter bit ROUNDING = 1'b1,
  parameter int MW       = man_max_w(DATA_W, EXP_SZ_W),
  parameter int XW       = exp_int_w(DATA_W, EXP_SZ_W),
  parameter int RW       = res_man_w(DATA_W, EXP_SZ_W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          za,
  input  logic [XW-1:0] ea,
  input  logic [MW-1:0] ma,
  input  logic          zb,
  input  logic [XW-1:0] eb,
  input  logic [MW-1:0] mb,
  output logic          busy,
  output logic          out_valid,
  output logic          zero,
  output logic          dbz,
  output logic [XW-1:0] e,
  output logic [RW-1:0] m
);
  localparam int EXTRA = ROUNDING ? 3 : 0;
  localparam int NQ    = MW + 1 + EXTRA;   // quotient bits, first of weight 1
  localparam int DW    = MW + 1;           // divider operand width
  localparam int NW    = NQ + 2;           // sign + quotient + sticky
  localparam int LW    = $clog2(NW);

  // stage 1
  logic          v1, z1, dbz1, neg1;
  logic [XW-1:0] e1;
  logic [DW-1:0] a1, b1;
  // divider
  logic          dv_busy, dv_done, rem_nz;
  logic [NQ-1:0] q;
  // sign stage
  logic          v3, z3, dbz3;
  logic [XW-1:0] e3;
  logic [NW-1:0] sq3;

  logic [MW-1:0] abs_a, abs_b;
  logic [NW-1:0] mag;
  logic [RW-1:0] m_n;
  logic [LW-1:0] lead;
  logic          z_n;

  assign abs_a = ma[MW-1] ? (~ma + 1'b1) : ma;   // |-1| = 1.0 fits unsigned
  assign abs_b = mb[MW-1] ? (~mb + 1'b1) : mb;
  assign mag   = {1'b0, q, rem_nz};

  unum4_serial_div #(.W(DW), .NQ(NQ)) u_sdiv (
    .clk(clk), .rst(rst), .start(v1),
    .a(a1), .b(b1),
    .busy(dv_busy), .done(dv_done), .q(q), .rem_nz(rem_nz));

  unum4_norm #(.NI(NW), .NO(RW), .LW(LW)) u_norm (
    .v(sq3), .m(m_n), .lead(lead), .zero(z_n));

  assign busy = v1 | dv_busy | v3 | out_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; z1 <= 1'b0; dbz1 <= 1'b0; neg1 <= 1'b0; e1 <= '0; a1 <= '0; b1 <= '0;
      v3 <= 1'b0; z3 <= 1'b0; dbz3 <= 1'b0; e3 <= '0; sq3 <= '0;
      out_valid <= 1'b0; zero <= 1'b0; dbz <= 1'b0; e <= '0; m <= '0;
    end else begin
      // stage 1: magnitudes, sign, exponent difference
      v1 <= in_valid;
      if (in_valid) begin
        z1   <= za & ~zb;
        dbz1 <= zb;
        neg1 <= ma[MW-1] ^ mb[MW-1];
        // quotient = 2 x (|ma| / 2|mb|); sign/quotient word has 2 integer bits
        e1   <= ea - eb + XW'(2);
        a1   <= {1'b0, abs_a};
        b1   <= {abs_b, 1'b0};
      end
      // sign stage
      v3   <= dv_done;
      z3   <= z1;
      dbz3 <= dbz1;
      e3   <= e1;
      sq3  <= neg1 ? (~mag + 1'b1) : mag;
      // normalisation and output
      out_valid <= v3;
      zero      <= z3 | dbz3 | z_n;
      dbz       <= dbz3;
      e         <= e3 - XW'(lead);
      m         <= (z3 | dbz3) ? '0 : m_n;
    end
  end
endmodule
