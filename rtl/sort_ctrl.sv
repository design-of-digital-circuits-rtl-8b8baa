// sort_ctrl: controller of the register-file sorter.
//
// Runs the exchange sort
//   for i = 0 to k-2: A = Reg[i]; for j = i+1 to k-1: B = Reg[j];
//     if B < A then Reg[i] = B; Reg[j] = A; A = Reg[i]
// on a datapath with one read port and one write port. States:
//   Idle        Ready = 1. On Start: Init_i (i <- 0), go to OuterLoop.
//   OuterLoop   Load_A (A <- Reg[i]) and Init_j (j <- i+1).
//   InnerLoop   Load_B (B <- Reg[j]); j settled in the previous cycle.
//   Compare     B_lt_A ? Swap : CheckLoops.
//   Swap        Two cycles (a self-loop on a phase bit): first Store_A
//               (Reg[j] <- A), then Store_B (Reg[i] <- B), because there is
//               only one write port.
//   CheckLoops  Load_A (A <- Reg[i], which picks up the swapped value). If not
//               j_done: Incr_j, back to InnerLoop. Else if not i_done: Incr_i,
//               back to OuterLoop. Else Done.
//   Done        Done = 1 for one cycle, then Idle.
// The states and their order follow the design's state diagram. Compare is
// this design's addition: B is a register loaded from the read port, so the
// B < A test can only be made the cycle after InnerLoop loads it.
// Cycles per sort: 1 (Idle) + (k-1) OuterLoop + k(k-1)/2 x 3 (InnerLoop,
// Compare, CheckLoops) + 2 per swap, then Done.
// Interface: clk, rst (synchronous, active high), start, status -> control,
// ready, done.
module sort_ctrl
  import algo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic i_done,
  input  logic j_done,
  input  logic b_lt_a,
  output logic init_i,
  output logic init_j,
  output logic incr_i,
  output logic incr_j,
  output logic load_a,
  output logic load_b,
  output logic store_a,
  output logic store_b,
  output logic ready,
  output logic done
);
  sort_state_t state, next;
  logic        swap_phase;   // 0: Reg[j] <- A, 1: Reg[i] <- B

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= SORT_IDLE;
      swap_phase <= 1'b0;
    end else begin
      state      <= next;
      swap_phase <= (state == SORT_SWAP) && !swap_phase;
    end
  end

  always_comb begin
    next    = state;
    init_i  = 1'b0;
    init_j  = 1'b0;
    incr_i  = 1'b0;
    incr_j  = 1'b0;
    load_a  = 1'b0;
    load_b  = 1'b0;
    store_a = 1'b0;
    store_b = 1'b0;
    ready   = 1'b0;
    done    = 1'b0;
    unique case (state)
      SORT_IDLE: begin
        ready = 1'b1;
        if (start) begin
          init_i = 1'b1;
          next   = SORT_OUTER;
        end
      end
      SORT_OUTER: begin
        load_a = 1'b1;
        init_j = 1'b1;
        next   = SORT_INNER;
      end
      SORT_INNER: begin
        load_b = 1'b1;
        next   = SORT_COMPARE;
      end
      SORT_COMPARE: begin
        next = b_lt_a ? SORT_SWAP : SORT_CHECK;
      end
      SORT_SWAP: begin
        if (!swap_phase) begin
          store_a = 1'b1;
        end else begin
          store_b = 1'b1;
          next    = SORT_CHECK;
        end
      end
      SORT_CHECK: begin
        load_a = 1'b1;
        if (!j_done) begin
          incr_j = 1'b1;
          next   = SORT_INNER;
        end else if (!i_done) begin
          incr_i = 1'b1;
          next   = SORT_OUTER;
        end else begin
          next = SORT_DONE;
        end
      end
      SORT_DONE: begin
        done = 1'b1;
        next = SORT_IDLE;
      end
      default: next = SORT_IDLE;
    endcase
  end

  // Only one write port: the two stores never coincide.
  a_one_store: assert property (@(posedge clk) disable iff (rst) !(store_a && store_b));
endmodule
