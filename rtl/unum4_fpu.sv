// unum4_fpu: Unum-IV floating-point unit, top level.
//
// Adds, subtracts, divides and multiplies two Unum-IV<DATA_W,EXP_SZ_W>
// numbers. Two unpack units (3 stages) decode the operands into signed
// exponents and normalised 2's complement significands; the control logic
// steers them to the add/sub unit (6 stages), the multiplication unit
// (4 stages) or the serial division unit (5+MAN_MAX_W+EXTRA stages); the pack
// unit (3+ROUNDING stages) rounds (ROUNDING = 1: nearest, ties to even;
// ROUNDING = 0: truncation) and encodes the result; the control logic
// raises done and the exception strobes.
// Interface: start strobes a, b and op (0 add, 1 subtract, 2 divide,
// 3 multiply) in; done strobes one cycle with o valid and with div_by_zero,
// underflow and overflow. On an exception o is the encoding of zero. One
// operation is in flight at a time; start is ignored until done.
// Latency from start to done: 3 + unit + (3+ROUNDING) + 1 cycles, i.e. 14
// (add/sub), 12 (multiply) and 5+MAN_MAX_W+EXTRA+8 (divide) with ROUNDING=1.
// rst is an asynchronous, active-high reset.
// Defaults: Unum-IV<32,4> with rounding, the configuration used for the
// application experiments.
module unum4_fpu
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4,
  parameter bit ROUNDING = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [1:0]        op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] o,
  output logic              done,
  output logic              div_by_zero,
  output logic              underflow,
  output logic              overflow
);
  localparam int MW = man_max_w(DATA_W, EXP_SZ_W);
  localparam int XW = exp_int_w(DATA_W, EXP_SZ_W);
  localparam int RW = res_man_w(DATA_W, EXP_SZ_W);

  initial begin
    assert (DATA_W - EXP_SZ_W - exp_sz_max(EXP_SZ_W) >= 1)
      else $error("Unum-IV<%0d,%0d> leaves no fraction bit at the widest exponent",
                  DATA_W, EXP_SZ_W);
  end

  logic issue, busy;
  logic ua_valid, ub_valid;
  logic za, zb;
  logic [XW-1:0] ea, eb;
  logic [MW-1:0] ma, mb;
  logic as_in, as_sub, mul_in, div_in;
  logic as_v, as_z;  logic [XW-1:0] as_e;  logic [RW-1:0] as_m;
  logic mu_v, mu_z;  logic [XW-1:0] mu_e;  logic [RW-1:0] mu_m;
  logic dv_v, dv_z, dv_dbz, dv_busy;  logic [XW-1:0] dv_e;  logic [RW-1:0] dv_m;
  logic pk_in, pk_z, pk_dbz_in;  logic [XW-1:0] pk_e;  logic [RW-1:0] pk_m;
  logic pk_v, pk_ovf, pk_unf, pk_dbz;  logic [DATA_W-1:0] pk_o;
  logic unused_ub_valid, unused_dv_busy, unused_busy;

  unum4_unpack #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W)) u_unpack_a (
    .clk(clk), .rst(rst), .in_valid(issue), .x(a),
    .out_valid(ua_valid), .zero(za), .e(ea), .m(ma));
  unum4_unpack #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W)) u_unpack_b (
    .clk(clk), .rst(rst), .in_valid(issue), .x(b),
    .out_valid(ub_valid), .zero(zb), .e(eb), .m(mb));

  unum4_addsub #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W)) u_addsub (
    .clk(clk), .rst(rst), .in_valid(as_in), .sub(as_sub),
    .za(za), .ea(ea), .ma(ma), .zb(zb), .eb(eb), .mb(mb),
    .out_valid(as_v), .zero(as_z), .e(as_e), .m(as_m));

  unum4_mul #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W)) u_mul (
    .clk(clk), .rst(rst), .in_valid(mul_in),
    .za(za), .ea(ea), .ma(ma), .zb(zb), .eb(eb), .mb(mb),
    .out_valid(mu_v), .zero(mu_z), .e(mu_e), .m(mu_m));

  unum4_div #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W), .ROUNDING(ROUNDING)) u_div (
    .clk(clk), .rst(rst), .in_valid(div_in),
    .za(za), .ea(ea), .ma(ma), .zb(zb), .eb(eb), .mb(mb),
    .busy(dv_busy), .out_valid(dv_v), .zero(dv_z), .dbz(dv_dbz), .e(dv_e), .m(dv_m));

  // One operation in flight: at most one unit delivers in a cycle.
  always_comb begin
    pk_in     = as_v | mu_v | dv_v;
    pk_z      = as_z;
    pk_e      = as_e;
    pk_m      = as_m;
    pk_dbz_in = 1'b0;
    if (mu_v) begin
      pk_z = mu_z;  pk_e = mu_e;  pk_m = mu_m;
    end else if (dv_v) begin
      pk_z = dv_z;  pk_e = dv_e;  pk_m = dv_m;  pk_dbz_in = dv_dbz;
    end
  end

  unum4_pack #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W), .ROUNDING(ROUNDING)) u_pack (
    .clk(clk), .rst(rst), .in_valid(pk_in), .zero(pk_z), .dbz_in(pk_dbz_in),
    .e(pk_e), .m(pk_m),
    .out_valid(pk_v), .o(pk_o), .overflow(pk_ovf), .underflow(pk_unf), .dbz(pk_dbz));

  unum4_ctrl #(.DATA_W(DATA_W), .EXP_SZ_W(EXP_SZ_W)) u_ctrl (
    .clk(clk), .rst(rst), .start(start), .op(op), .issue(issue), .busy(busy),
    .unp_valid(ua_valid), .as_valid(as_in), .as_sub(as_sub),
    .mul_valid(mul_in), .div_valid(div_in),
    .pk_valid(pk_v), .pk_o(pk_o), .pk_ovf(pk_ovf), .pk_unf(pk_unf), .pk_dbz(pk_dbz),
    .o(o), .done(done), .div_by_zero(div_by_zero), .underflow(underflow),
    .overflow(overflow));

  assign unused_ub_valid = ub_valid;
  assign unused_dv_busy  = dv_busy;
  assign unused_busy     = busy;

  // At most one processing unit hands a result to the pack unit per cycle.
  assert property (@(posedge clk) disable iff (rst) $onehot0({as_v, mu_v, dv_v}));
endmodule
