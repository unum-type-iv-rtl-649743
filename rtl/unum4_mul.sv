// unum4_mul: Unum-IV multiplication unit (4 pipeline stages).
//
// Multiplies two unpacked operands.
//   stage 1: registers the operands.
//   stage 2: multiplies the significands (2 x MAN_MAX_W bit product with two
//            integer bits) and adds the exponents.
//   stage 3: normalises the product with the leading zeros/ones detector
//            (at most two places, since both inputs are normalised) and folds
//            the low product bits into a sticky LSB.
//   stage 4: output register.
// Output format as for unum4_addsub. The four-stage latency follows the
// document; the contents of each stage are this design's choice. Fully
// pipelined.
module unum4_mul
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
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
  output logic          out_valid,
  output logic          zero,
  output logic [XW-1:0] e,
  output logic [RW-1:0] m
);
  localparam int PW = 2 * MW;
  localparam int LW = $clog2(PW);

  logic v1, z1;
  logic [XW-1:0] ea1, eb1;
  logic [MW-1:0] ma1, mb1;
  logic v2, z2;
  logic [XW-1:0] e2;
  logic [PW-1:0] p2;
  logic v3, z3;
  logic [XW-1:0] e3;
  logic [RW-1:0] m3;

  logic [PW-1:0] p;
  logic [RW-1:0] m_n;
  logic [LW-1:0] lead;
  logic          z_n;

  unum4_multiplier #(.W(MW)) u_mult (.a(ma1), .b(mb1), .p(p));
  unum4_norm #(.NI(PW), .NO(RW), .LW(LW)) u_norm (
    .v(p2), .m(m_n), .lead(lead), .zero(z_n));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; z1 <= 1'b0; ea1 <= '0; eb1 <= '0; ma1 <= '0; mb1 <= '0;
      v2 <= 1'b0; z2 <= 1'b0; e2 <= '0; p2 <= '0;
      v3 <= 1'b0; z3 <= 1'b0; e3 <= '0; m3 <= '0;
      out_valid <= 1'b0; zero <= 1'b0; e <= '0; m <= '0;
    end else begin
      v1  <= in_valid;
      z1  <= za | zb;
      ea1 <= ea;  eb1 <= eb;
      ma1 <= ma;  mb1 <= mb;
      v2 <= v1;
      z2 <= z1;
      e2 <= ea1 + eb1;
      p2 <= p;
      // the product has two integer bits: +1
      v3 <= v2;
      z3 <= z2 | z_n;
      e3 <= e2 + XW'(1) - XW'(lead);
      m3 <= m_n;
      out_valid <= v3;
      zero      <= z3;
      e         <= e3;
      m         <= z3 ? '0 : m3;
    end
  end
endmodule
