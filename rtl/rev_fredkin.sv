// rev_fredkin: the Fredkin (controlled-swap) gate. A is the control and
// passes through as P. When A is 0, B goes to Q and C to R; when A is 1 they
// trade places: Q = A'B + AC, R = AB + A'C. The adder uses it as a 2-to-1
// multiplexer and as a conditional swap of two wires. Purely combinational.
//
// The gate function is the published one; only the outputs are modelled,
// not the gate's quantum realisation.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
