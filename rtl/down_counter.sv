// down_counter: loadable W-bit down-counter (the address counter A of the
// arithmetic-mean datapath).
//
// On a rising clock edge: rst clears it, load takes d (A <- k-1), otherwise
// count decrements it (A <- A-1). Load has priority over count. The count
// wraps from 0 to all ones; the controller never asks for that.
// Interface: clk, rst (synchronous, active high), load, count, d -> q.
module down_counter #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         count,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (load)  q <= d;
    else if (count) q <= q - 1'b1;
  end
endmodule
