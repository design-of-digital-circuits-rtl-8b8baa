// reg_file: K x N register file with one read port and one write port.
//
// Reading is combinational: r_data shows word r_addr in the same cycle, so a
// register loaded from r_data at the next edge sees the address that was set
// up one cycle earlier (an address counter needs a cycle to settle before its
// word can be captured). Writing takes place on the rising clock edge when
// w_en is 1; a read of the word being written returns the old value until
// that edge. There is no reset: the contents are whatever was last written.
// Interface: clk; r_addr -> r_data; w_en, w_addr, w_data.
module reg_file #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] r_addr,
  output logic [N-1:0]  r_data,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  logic [N-1:0]  w_data
);
  logic [N-1:0] mem [K];

  assign r_data = mem[r_addr];

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
  end
endmodule
