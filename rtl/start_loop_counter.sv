// start_loop_counter: counts Start requests, exactly once per request.
//
// The small example used to show the Start-loop hazard: from S_idle
// (Ready = 1) a Start moves to S_incr, which does R <- R + 1. If S_incr went
// straight back to S_idle, a Start held high for several cycles would count
// several times. Here S_incr goes to S_done, which stays until Start is
// de-asserted and only then returns to S_idle, so each Start pulse, however
// long, adds one. R is cleared by reset and wraps modulo 2^W.
// Interface: clk, rst (synchronous, active high), start -> ready, r.
module start_loop_counter
  import algo_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         ready,
  output logic [W-1:0] r
);
  slc_state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SLC_IDLE;
      r     <= '0;
    end else begin
      unique case (state)
        SLC_IDLE: if (start) state <= SLC_INCR;
        SLC_INCR: begin
          r     <= r + 1'b1;
          state <= SLC_DONE;
        end
        SLC_DONE: if (!start) state <= SLC_IDLE;
        default:  state <= SLC_IDLE;
      endcase
    end
  end

  assign ready = (state == SLC_IDLE);
endmodule
