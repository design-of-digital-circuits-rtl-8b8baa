// zero_detect: C = 0 check for a counter.
//
// A W-input NOR: the output is 1 only when every bit of c is 0. This is the
// usual way to test a down-counter for the end of its loop, and it is what
// produces A_zero for the arithmetic-mean controller. Purely combinational.
// Interface: c (W bits) in, zero out.
module zero_detect #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] c,
  output logic         zero
);
  assign zero = ~(|c);
endmodule
