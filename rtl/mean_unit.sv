// mean_unit: sequential circuit computing the arithmetic mean M = S/k of the
// k N-bit words held in a register file, using one N-bit adder, one read
// port and one N-bit divider.
//
// mean_ctrl sequences mean_datapath: after Start it sums the words from
// address k-1 down to 0 (one word per cycle), starts the divider on S/k,
// waits for it and pulses Done; m then holds the mean until the next Start.
// Latency from the cycle Start is seen in S_idle to the Done cycle:
// k cycles of S_sum, 1 of S_div_start, N+1 of S_div, then S_done, i.e. Done
// is high K+N+3 cycles after that cycle. Fill the register file through
// wr_* while ready is high.
// Interface: clk, rst (synchronous, active high), start, wr_en, wr_addr,
// wr_data -> ready, done, m.
module mean_unit #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          ready,
  output logic          done,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  output logic [N-1:0]  m
);
  logic load_regs, add, divide, decr_a;
  logic a_zero, div_ready, div_done;

  mean_ctrl u_ctrl (
    .clk, .rst, .start, .a_zero, .div_ready, .div_done,
    .load_regs, .add, .divide, .decr_a, .ready, .done
  );

  mean_datapath #(.K(K), .N(N)) u_dp (
    .clk, .rst, .load_regs, .add, .divide, .decr_a,
    .a_zero, .div_ready, .div_done,
    .wr_en, .wr_addr, .wr_data, .m
  );
endmodule
