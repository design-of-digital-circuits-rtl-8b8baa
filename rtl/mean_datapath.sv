// mean_datapath: datapath of the arithmetic-mean circuit.
//
// Holds the k words in a K x N register file that is read through one port
// addressed by the down-counter A. The sum register S is enabled by
// Load_regs OR Add and takes 0 on Load_regs, otherwise S + Reg[A] from the
// single N-bit adder. An N-bit sequential divider divides S by the constant
// k when Divide is asserted; it is reset by Reset or Load_regs, and its
// quotient is the mean M (its remainder is not used). Status outputs:
// A_zero (NOR of A), Div_ready and Div_done.
// As in the design, S is N bits wide, so the sum wraps modulo 2^N if the k
// words add up to 2^N or more. The external write port (wr_*) that fills
// the register file is this design's addition.
// Interface: clk, rst, control inputs, write port -> status, m.
module mean_datapath #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // control
  input  logic          load_regs,
  input  logic          add,
  input  logic          divide,
  input  logic          decr_a,
  // status
  output logic          a_zero,
  output logic          div_ready,
  output logic          div_done,
  // register file fill port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  // result
  output logic [N-1:0]  m
);
  logic [AW-1:0] a;
  logic [N-1:0]  reg_a;    // Reg[A]
  logic [N-1:0]  s;
  logic [N-1:0]  sum;
  logic [N-1:0]  unused_r;

  down_counter #(.W(AW)) u_a (
    .clk, .rst, .load(load_regs), .count(decr_a), .d(AW'(K - 1)), .q(a)
  );

  zero_detect #(.W(AW)) u_a_zero (.c(a), .zero(a_zero));

  reg_file #(.K(K), .N(N)) u_rf (
    .clk, .r_addr(a), .r_data(reg_a),
    .w_en(wr_en), .w_addr(wr_addr), .w_data(wr_data)
  );

  assign sum = s + reg_a;

  always_ff @(posedge clk) begin
    if (rst)                   s <= '0;
    else if (load_regs || add) s <= load_regs ? '0 : sum;
  end

  seq_divider #(.N(N)) u_div (
    .clk, .reset(rst || load_regs), .start(divide),
    .dividend(s), .divisor(N'(K)),
    .q(m), .r(unused_r), .ready(div_ready), .done(div_done)
  );
endmodule
