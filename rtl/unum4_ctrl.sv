// unum4_ctrl: control logic of the Unum-IV FPU.
//
// Sequences one operation at a time through the unpack, processing and pack
// stages and handles the exceptions.
//   - A start strobe is accepted only while idle; it latches op and sends a
//     valid token into the unpack units. Starts while busy are ignored.
//   - When the unpacked operands come out, the token is steered by op to the
//     add/sub unit (op 0 add, op 1 subtract), the division unit (op 2) or
//     the multiplication unit (op 3).
//   - When the pack unit delivers, done strobes for one cycle with the result
//     and the exception strobes. On an exception (overflow, underflow or
//     divide by zero) the computation is interrupted: the result is not
//     propagated and o is forced to the encoding of zero.
// Outputs are registered: done comes one cycle after the pack unit's valid.
// The strobe interface follows the document; one-operation-at-a-time issue,
// the operation codes and forcing o to zero are this design's choices.
module unum4_ctrl
  import unum4_pkg::*;
#(
  parameter int DATA_W   = 32,
  parameter int EXP_SZ_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [1:0]        op,
  output logic              issue,       // token into the unpack units
  output logic              busy,
  // dispatch, when the unpacked operands are ready
  input  logic              unp_valid,
  output logic              as_valid,
  output logic              as_sub,
  output logic              mul_valid,
  output logic              div_valid,
  // result of the pack unit
  input  logic              pk_valid,
  input  logic [DATA_W-1:0] pk_o,
  input  logic              pk_ovf,
  input  logic              pk_unf,
  input  logic              pk_dbz,
  // FPU outputs
  output logic [DATA_W-1:0] o,
  output logic              done,
  output logic              div_by_zero,
  output logic              underflow,
  output logic              overflow
);
  localparam logic [DATA_W-1:0] ZERO_WORD = {{EXP_SZ_W{1'b1}}, {(DATA_W-EXP_SZ_W){1'b0}}};

  typedef enum logic {IDLE, BUSY} state_t;
  state_t state;
  op_t    op_q;

  assign issue     = start && (state == IDLE);
  assign busy      = (state == BUSY);
  assign as_valid  = unp_valid && ((op_q == OP_ADD) || (op_q == OP_SUB));
  assign as_sub    = (op_q == OP_SUB);
  assign mul_valid = unp_valid && (op_q == OP_MUL);
  assign div_valid = unp_valid && (op_q == OP_DIV);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= IDLE;
      op_q        <= OP_ADD;
      o           <= '0;
      done        <= 1'b0;
      div_by_zero <= 1'b0;
      underflow   <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      done        <= 1'b0;
      div_by_zero <= 1'b0;
      underflow   <= 1'b0;
      overflow    <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= BUSY;
          op_q  <= op_t'(op);
        end
        BUSY: if (pk_valid) begin
          state       <= IDLE;
          done        <= 1'b1;
          div_by_zero <= pk_dbz;
          overflow    <= pk_ovf & ~pk_dbz;
          underflow   <= pk_unf & ~pk_dbz;
          o           <= (pk_dbz | pk_ovf | pk_unf) ? ZERO_WORD : pk_o;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
