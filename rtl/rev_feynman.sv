// rev_feynman: the Feynman (controlled-NOT) gate, the 2x2 reversible gate of
// the adder. P passes A through; Q = A xor B. With B tied to 0 it copies A,
// which is how the design fans a wire out. Purely combinational.
//
// The gate function is the published one.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
