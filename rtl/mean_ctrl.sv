// mean_ctrl: controller of the arithmetic-mean circuit (M = S/k).
//
// A five-state machine that follows the modified ASMD chart of the design:
//   S_idle      Ready = 1. On Start: Load_regs (S <- 0, A <- k-1, divider
//               cleared) and go to S_sum.
//   S_sum       Add (S <- S + Reg[A]) every cycle. If A_zero, go to
//               S_div_start; otherwise Decr_A (A <- A-1) and stay.
//   S_div_start Divide (start the divider on S/k). Stay until Div_ready
//               shows the divider has taken the request, then go to S_div.
//   S_div       Wait for Div_done, then go to S_done.
//   S_done      Done = 1 for one cycle, then back to S_idle.
// Load_regs and Decr_A are conditional (Mealy) outputs, the others depend on
// the state only. Reset is synchronous and active high and returns to S_idle.
// Interface: clk, rst, start, a_zero, div_ready, div_done -> load_regs, add,
// divide, decr_a, ready, done.
module mean_ctrl
  import algo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic a_zero,
  input  logic div_ready,
  input  logic div_done,
  output logic load_regs,
  output logic add,
  output logic divide,
  output logic decr_a,
  output logic ready,
  output logic done
);
  mean_state_t state, next;

  always_ff @(posedge clk) begin
    if (rst) state <= MEAN_IDLE;
    else     state <= next;
  end

  always_comb begin
    next      = state;
    load_regs = 1'b0;
    add       = 1'b0;
    divide    = 1'b0;
    decr_a    = 1'b0;
    ready     = 1'b0;
    done      = 1'b0;
    unique case (state)
      MEAN_IDLE: begin
        ready = 1'b1;
        if (start) begin
          load_regs = 1'b1;
          next      = MEAN_SUM;
        end
      end
      MEAN_SUM: begin
        add = 1'b1;
        if (a_zero) next = MEAN_DIV_START;
        else        decr_a = 1'b1;
      end
      MEAN_DIV_START: begin
        divide = 1'b1;
        if (div_ready) next = MEAN_DIV;
      end
      MEAN_DIV: begin
        if (div_done) next = MEAN_DONE;
      end
      MEAN_DONE: begin
        done = 1'b1;
        next = MEAN_IDLE;
      end
      default: next = MEAN_IDLE;
    endcase
  end
endmodule
