// rev_incrementer: N-bit conditional reversible incrementer,
// sum = a + cin modulo 2^N. It is a ripple chain of Peres gates used as half
// adders: the carry into the least significant gate is cin, and every gate
// passes its carry to the next. The final carry is brought out as cout. The
// normalization unit uses an 8-bit instance to add one to the exponent when the
// significand sum has to move one place to the right. Purely combinational.
//
// The Peres chain follows the published normalization unit; bringing out the
// final carry is this implementation's choice (it is unused).
module rev_incrementer #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0]   carry;
  logic [N-1:0] g_p;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    rev_peres u_rha (
      .a(a[i]), .b(carry[i]), .c(1'b0),
      .p(g_p[i]), .q(sum[i]), .r(carry[i+1])
    );
  end

  assign cout = carry[N];
endmodule
