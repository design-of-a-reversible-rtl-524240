// rev_peres: the Peres gate, a 3x3 reversible gate with P = A, Q = A xor B and
// R = AB xor C (the standard definition of this gate). With C = 0 it is a
// reversible half adder: Q is the sum and R the carry. The adder uses it as
// the half adder of its incrementers, converters and ripple adder, and as
// the two-input OR of the sticky-bit cascade. Purely combinational.
//
// The architecture uses this gate by name; the function above is the standard
// definition from the reversible-logic literature.
module rev_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
