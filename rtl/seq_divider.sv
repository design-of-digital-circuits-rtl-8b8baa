// seq_divider: N-bit unsigned sequential divider, q = dividend / divisor,
// r = dividend % divisor.
//
// Restoring shift-and-subtract, one quotient bit per clock. While idle (or
// done) ready is 1; a start seen while ready captures dividend and divisor
// and the divider is busy for exactly N cycles (ready = 0). It then holds
// q and r and raises done until the next start or reset. reset clears it to
// idle with q = r = 0, which is how the mean controller's Load_regs wipes the
// previous result. Division by zero gives q = all ones and r = dividend.
// Only the port list (start, dividend, divisor, reset, R, Q, ready, done) is
// taken from the mean datapath; the algorithm and timing are this design's.
// Interface: clk, reset (synchronous, active high), start, dividend, divisor
// -> q, r, ready, done.
module seq_divider
  import algo_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] q,
  output logic [N-1:0] r,
  output logic         ready,
  output logic         done
);
  localparam int unsigned CW = $clog2(N + 1);

  div_state_t    state;
  logic [N-1:0]  dsr;        // captured divisor
  logic [N-1:0]  rem;        // partial remainder (always below the divisor)
  logic [N-1:0]  quo;        // dividend shifting out, quotient shifting in
  logic [CW-1:0] steps;      // quotient bits still to produce

  // One restoring step: shift the next dividend bit into the remainder and
  // subtract the divisor if it fits.
  logic [N:0] shifted, trial;
  always_comb begin
    shifted = {rem, quo[N-1]};
    trial   = shifted - {1'b0, dsr};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= DIV_IDLE;
      dsr   <= '0;
      rem   <= '0;
      quo   <= '0;
      steps <= '0;
    end else begin
      unique case (state)
        DIV_IDLE, DIV_DONE: begin
          if (start) begin
            dsr   <= divisor;
            rem   <= '0;
            quo   <= dividend;
            steps <= CW'(N);
            state <= DIV_BUSY;
          end
        end
        DIV_BUSY: begin
          if (trial[N]) begin          // negative: restore
            rem <= shifted[N-1:0];   // shifted[N] is 0 here
            quo <= {quo[N-2:0], 1'b0};
          end else begin
            rem <= trial[N-1:0];
            quo <= {quo[N-2:0], 1'b1};
          end
          steps <= steps - 1'b1;
          if (steps == CW'(1)) state <= DIV_DONE;
        end
        default: state <= DIV_IDLE;
      endcase
    end
  end

  assign ready = (state != DIV_BUSY);
  assign done  = (state == DIV_DONE);
  assign q     = (state == DIV_DONE) ? quo : '0;
  assign r     = (state == DIV_DONE) ? rem : '0;
endmodule
