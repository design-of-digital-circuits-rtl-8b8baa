// sort_datapath: datapath of the register-file sorter.
//
// Parts: up-counters i (loads 0) and j (loads i+1); registers A and B, both
// loaded from the register file's read port; a comparator giving B_lt_A;
// detectors i_done (i = k-2) and j_done (j = k-1); and a K x N register file
// with one read and one write port. Multiplexers, as in the design:
//   read address  = Load_B ? j : i
//   write address = Store_B ? i : j     (Reg[i] <- B, Reg[j] <- A)
//   write data    = Store_B ? B : A
//   write enable  = Store_A | Store_B
// When ext_sel is 1 (the controller is idle) both register-file addresses
// come from ext_addr, ext_we writes ext_wdata and ext_rdata shows the word,
// so the rest of a system can load the words and read back the result. That
// access path is modelled on the design's alternate datapath; the values
// compared are unsigned.
// Interface: clk, rst (synchronous, active high), control, external port ->
// status, ext_rdata.
module sort_datapath #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          init_i,
  input  logic          init_j,
  input  logic          incr_i,
  input  logic          incr_j,
  input  logic          load_a,
  input  logic          load_b,
  input  logic          store_a,
  input  logic          store_b,
  output logic          i_done,
  output logic          j_done,
  output logic          b_lt_a,
  input  logic          ext_sel,
  input  logic          ext_we,
  input  logic [AW-1:0] ext_addr,
  input  logic [N-1:0]  ext_wdata,
  output logic [N-1:0]  ext_rdata
);
  logic [AW-1:0] i, j;
  logic [N-1:0]  a, b;
  logic [AW-1:0] r_addr, w_addr;
  logic [N-1:0]  r_data, w_data;
  logic          w_en;

  up_counter #(.W(AW)) u_i (
    .clk, .rst, .load(init_i), .count(incr_i), .d('0), .q(i)
  );
  up_counter #(.W(AW)) u_j (
    .clk, .rst, .load(init_j), .count(incr_j), .d(i + 1'b1), .q(j)
  );

  eq_detect #(.W(AW), .VALUE(K - 2)) u_i_done (.c(i), .eq(i_done));
  eq_detect #(.W(AW), .VALUE(K - 1)) u_j_done (.c(j), .eq(j_done));

  always_comb begin
    if (ext_sel) begin
      r_addr = ext_addr;
      w_addr = ext_addr;
      w_data = ext_wdata;
      w_en   = ext_we;
    end else begin
      r_addr = load_b  ? j : i;
      w_addr = store_b ? i : j;
      w_data = store_b ? b : a;
      w_en   = store_a | store_b;
    end
  end

  reg_file #(.K(K), .N(N)) u_rf (
    .clk, .r_addr, .r_data, .w_en, .w_addr, .w_data
  );
  assign ext_rdata = r_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else begin
      if (load_a) a <= r_data;
      if (load_b) b <= r_data;
    end
  end

  assign b_lt_a = (b < a);
endmodule
