// unum4_serial_div: shift-and-subtract (restoring) serial divider.
//
// Divides the unsigned dividend a by the unsigned divisor b, producing NQ
// quotient bits, one per clock cycle. The first bit has weight 2^0, so the
// caller must keep a < 2b; q then equals floor(a/b * 2^(NQ-1)) and rem_nz
// tells whether the division was inexact.
// Timing: a one-cycle start pulse loads the operands; the quotient bits are
// produced on the next NQ clock edges; done pulses for one cycle together with
// valid q and rem_nz, NQ+1 cycles after start. busy is high from the cycle
// after start until done. A start while busy restarts the division.
module unum4_serial_div #(
  parameter int W  = 29,
  parameter int NQ = 33
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic          busy,
  output logic          done,
  output logic [NQ-1:0] q,
  output logic          rem_nz
);
  localparam int CNTW = $clog2(NQ + 1);

  logic [W:0]      r;      // partial remainder, always below 2b
  logic [W:0]      d;
  logic [CNTW-1:0] cnt;
  logic            ge;
  logic [W:0]      r_sub;

  assign ge     = r >= d;
  assign r_sub  = ge ? (r - d) : r;
  assign rem_nz = |r;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      r    <= '0;
      d    <= '0;
      q    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        r    <= {1'b0, a};
        d    <= {1'b0, b};
        q    <= '0;
        cnt  <= CNTW'(NQ);
        busy <= 1'b1;
      end else if (busy) begin
        q   <= {q[NQ-2:0], ge};
        // The last step keeps the final remainder unshifted; only its
        // being non-zero matters.
        r   <= (cnt == CNTW'(1)) ? r_sub : {r_sub[W-1:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
