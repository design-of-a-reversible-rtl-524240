// rev_subtracter: N-bit reversible subtracter, diff = a - b modulo 2^N.
// It is a ripple chain of HNG gates used as full adders. Each subtrahend bit is
// inverted on its way into its gate and the carry into the least significant
// gate is tied to 1, so the chain forms a + ~b + 1. The carry out of the top
// gate is not used. The conditional swap uses a 9-bit instance for the
// exponent difference and the normalization unit an 8-bit one to subtract the
// leading zero count from the exponent. Purely combinational.
//
// The HNG chain with inverted subtrahend and carry-in 1 follows the published
// swap and normalization units; making it a shared parameterised module is
// this implementation's choice.
module rev_subtracter #(
  parameter int unsigned N = 9
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] diff
);
  logic [N:0]   carry;
  logic [N-1:0] g_p, g_q;   // pass-through outputs of the gates (garbage)

  assign carry[0] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_bit
    rev_hng u_rfa (
      .a(a[i]), .b(~b[i]), .c(carry[i]), .d(1'b0),
      .p(g_p[i]), .q(g_q[i]), .r(diff[i]), .s(carry[i+1])
    );
  end
endmodule
