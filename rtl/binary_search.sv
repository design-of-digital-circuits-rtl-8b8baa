// binary_search: looks for a value T in a sorted array of K N-bit words.
//
// Algorithm (L and R bound the part of the array where T can still be):
//   L = 0; R = K-1
//   while L <= R: m = floor((L+R)/2)
//     if A[m] < T: L = m+1  elif A[m] > T: R = m-1  else: found at m
//   otherwise unsuccessful
// The array sits in a K x N register file with one combinational read port
// addressed by m, so each probe takes two cycles: Mid computes m (or ends the
// search when L > R) and Compare reads A[m] and moves L or R. L and R are
// signed and one bit wider than needed, so R = -1 and L = K are held
// exactly. A search costs at most 2*(floor(log2 K)+1)+1 cycles after Start
// plus one Done cycle. Words are unsigned and must be in ascending order.
// The algorithm comes from the design; the state split, the fill port
// (wr_*) and the ready/done/found handshake are this design's choice.
// Interface: clk, rst (synchronous, active high), start, target, wr_en,
// wr_addr, wr_data -> ready, done (one cycle), found, index (held until the
// next start).
module binary_search
  import algo_pkg::*;
#(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [N-1:0]  target,
  output logic          ready,
  output logic          done,
  output logic          found,
  output logic [AW-1:0] index,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data
);
  localparam int unsigned BW = AW + 2;   // width of L, R and L+R

  bs_state_t             state;
  logic signed [BW-1:0]  lo, hi;
  logic        [AW-1:0]  m;
  logic        [N-1:0]   t;
  logic        [N-1:0]   a_m;
  logic signed [BW-1:0]  mid_sum;

  reg_file #(.K(K), .N(N)) u_rf (
    .clk, .r_addr(m), .r_data(a_m),
    .w_en(wr_en && ready), .w_addr(wr_addr), .w_data(wr_data)
  );

  assign mid_sum = lo + hi;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= BS_IDLE;
      lo    <= '0;
      hi    <= '0;
      m     <= '0;
      t     <= '0;
      found <= 1'b0;
      index <= '0;
    end else begin
      unique case (state)
        BS_IDLE: begin
          if (start) begin
            lo    <= '0;
            hi    <= BW'(K - 1);
            t     <= target;
            found <= 1'b0;
            index <= '0;
            state <= BS_MID;
          end
        end
        BS_MID: begin
          if (lo > hi) begin
            state <= BS_DONE;                 // unsuccessful
          end else begin
            m     <= AW'(mid_sum >>> 1);
            state <= BS_COMPARE;
          end
        end
        BS_COMPARE: begin
          if (a_m < t) begin
            lo    <= BW'(m) + 1'sb1;
            state <= BS_MID;
          end else if (a_m > t) begin
            hi    <= BW'(m) - 1'sb1;
            state <= BS_MID;
          end else begin
            found <= 1'b1;
            index <= m;
            state <= BS_DONE;
          end
        end
        BS_DONE: state <= BS_IDLE;
        default: state <= BS_IDLE;
      endcase
    end
  end

  assign ready = (state == BS_IDLE);
  assign done  = (state == BS_DONE);
endmodule
