// up_counter: loadable W-bit up-counter (the loop counters i and j of the
// sorting datapath).
//
// On a rising clock edge: rst clears it, load takes d (i <- 0, j <- i+1),
// otherwise count increments it (+1). Load has priority over count.
// Interface: clk, rst (synchronous, active high), load, count, d -> q.
module up_counter #(
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
    else if (count) q <= q + 1'b1;
  end
endmodule
