// sorter: sorts the k N-bit words of a register file into ascending order
// using one read port, one write port, two loop counters, two registers and
// one comparator.
//
// sort_ctrl sequences sort_datapath through the exchange sort (see
// sort_ctrl for the states). While ready is high the register file belongs
// to the outside: ext_we/ext_addr/ext_wdata write it and ext_rdata shows
// the word at ext_addr. A pulse of start (seen in Idle) sorts the words;
// done is high for one cycle at the end, and the words can then be read
// back. Writes requested while a sort runs are ignored.
// Interface: clk, rst (synchronous, active high), start, ext_* -> ready,
// done, ext_rdata.
module sorter #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          ready,
  output logic          done,
  input  logic          ext_we,
  input  logic [AW-1:0] ext_addr,
  input  logic [N-1:0]  ext_wdata,
  output logic [N-1:0]  ext_rdata
);
  logic init_i, init_j, incr_i, incr_j, load_a, load_b, store_a, store_b;
  logic i_done, j_done, b_lt_a;

  sort_ctrl u_ctrl (
    .clk, .rst, .start, .i_done, .j_done, .b_lt_a,
    .init_i, .init_j, .incr_i, .incr_j, .load_a, .load_b, .store_a, .store_b,
    .ready, .done
  );

  sort_datapath #(.K(K), .N(N)) u_dp (
    .clk, .rst, .init_i, .init_j, .incr_i, .incr_j,
    .load_a, .load_b, .store_a, .store_b,
    .i_done, .j_done, .b_lt_a,
    .ext_sel(ready), .ext_we(ext_we), .ext_addr, .ext_wdata, .ext_rdata
  );
endmodule
