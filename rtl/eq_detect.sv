// eq_detect: C = VALUE check for a counter against a constant (e.g. k-1).
//
// Each bit of c is compared with the matching bit of the constant by an XNOR
// (1 when the two bits agree) and the W results are ANDed, so eq is 1 only
// when all bits agree. The sorter uses it for i_done (i = k-2) and
// j_done (j = k-1). Purely combinational.
// Interface: c (W bits) in, eq out; VALUE is a parameter.
module eq_detect #(
  parameter int unsigned W     = 2,
  parameter int unsigned VALUE = 3
) (
  input  logic [W-1:0] c,
  output logic         eq
);
  localparam logic [W-1:0] K = W'(VALUE);
  logic [W-1:0] same;
  assign same = ~(c ^ K);
  assign eq   = &same;
endmodule
