// algo_hw_top: four algorithm-to-hardware circuits side by side.
//
//   mean_*  mean_unit          M = (sum of k words) / k, one adder, one
//                              read port, sequential divider
//   sort_*  sorter             ascending exchange sort of k words in place
//   bs_*    binary_search      search of a sorted k-word array for T
//   slc_*   start_loop_counter one count per Start pulse
// They share only the clock and the synchronous, active-high reset; each
// keeps its own Start/Ready/Done handshake and register-file fill port.
// K (words) and N (bits per word) are common parameters.
module algo_hw_top #(
  parameter int unsigned K   = 4,
  parameter int unsigned N   = 8,
  parameter int unsigned SLC_W = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             rst,
  // arithmetic mean
  input  logic             mean_start,
  output logic             mean_ready,
  output logic             mean_done,
  input  logic             mean_wr_en,
  input  logic [AW-1:0]    mean_wr_addr,
  input  logic [N-1:0]     mean_wr_data,
  output logic [N-1:0]     mean_m,
  // sorter
  input  logic             sort_start,
  output logic             sort_ready,
  output logic             sort_done,
  input  logic             sort_we,
  input  logic [AW-1:0]    sort_addr,
  input  logic [N-1:0]     sort_wdata,
  output logic [N-1:0]     sort_rdata,
  // binary search
  input  logic             bs_start,
  input  logic [N-1:0]     bs_target,
  output logic             bs_ready,
  output logic             bs_done,
  output logic             bs_found,
  output logic [AW-1:0]    bs_index,
  input  logic             bs_wr_en,
  input  logic [AW-1:0]    bs_wr_addr,
  input  logic [N-1:0]     bs_wr_data,
  // Start-loop counter
  input  logic             slc_start,
  output logic             slc_ready,
  output logic [SLC_W-1:0] slc_r
);
  mean_unit #(.K(K), .N(N)) u_mean (
    .clk, .rst, .start(mean_start), .ready(mean_ready), .done(mean_done),
    .wr_en(mean_wr_en), .wr_addr(mean_wr_addr), .wr_data(mean_wr_data),
    .m(mean_m)
  );

  sorter #(.K(K), .N(N)) u_sort (
    .clk, .rst, .start(sort_start), .ready(sort_ready), .done(sort_done),
    .ext_we(sort_we), .ext_addr(sort_addr), .ext_wdata(sort_wdata),
    .ext_rdata(sort_rdata)
  );

  binary_search #(.K(K), .N(N)) u_bs (
    .clk, .rst, .start(bs_start), .target(bs_target),
    .ready(bs_ready), .done(bs_done), .found(bs_found), .index(bs_index),
    .wr_en(bs_wr_en), .wr_addr(bs_wr_addr), .wr_data(bs_wr_data)
  );

  start_loop_counter #(.W(SLC_W)) u_slc (
    .clk, .rst, .start(slc_start), .ready(slc_ready), .r(slc_r)
  );
endmodule
