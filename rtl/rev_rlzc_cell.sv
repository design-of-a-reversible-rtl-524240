// rev_rlzc_cell: one cell of the reversible leading zero counter. A and B are
// two flags from above (B the more significant), C and D arrive from the cell
// to the left: C says a one has already been seen further left, D is the count
// bit accumulated so far. The cell outputs
//   d_out = D + A B' C'   (the first one lies in the A half: count bit set)
//   c_out = A + B + C     (a one has now been seen)
// which go right to the next cell. The reversible realisation carries further
// garbage outputs that the counter does not use; only the two logic outputs are
// modelled here. Purely combinational.
//
// The two output functions are the published ones; the cell's garbage
// outputs and its quantum realisation are not modelled.
module rev_rlzc_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic d_out,
  output logic c_out
);
  assign d_out = d | (a & ~b & ~c);
  assign c_out = a | b | c;
endmodule
