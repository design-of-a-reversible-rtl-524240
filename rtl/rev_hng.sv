// rev_hng: the HNG gate, a 4x4 reversible gate with P = A, Q = B,
// R = A xor B xor C and S = (A xor B)C xor AB xor D (the standard definition of
// this gate). With D = 0 it is a reversible full adder: R is the sum of A, B
// and carry-in C, and S the carry out. The subtracters and the ripple carry
// adder are chains of these. Purely combinational.
//
// The architecture uses this gate by name; the function above is the standard
// definition from the reversible-logic literature.
module rev_hng (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
