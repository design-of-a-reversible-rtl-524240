// rev_sm_conv: N-bit reversible conversion between sign-magnitude and two's
// complement. The sign bit passes straight through and is fanned out by
// Feynman gates onto every magnitude bit (an XOR), and a chain of N-1 Peres
// half adders then adds the sign in at the least significant end. For a
// negative number this forms ~m + 1, so the same circuit maps sign-magnitude
// to two's complement and two's complement back to sign-magnitude. The only
// odd case is 1000...0, which maps to itself (-2^(N-1) <-> -0). With the sign
// output ignored it is an absolute-value unit. Purely combinational.
//
// The circuit is the published conversion unit. Using a 9-bit instance to get
// the shift amount from the exponent difference is this implementation's
// reading of the alignment stage.
module rev_sm_conv #(
  parameter int unsigned N = 28
) (
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  logic         sign;
  logic [N-2:0] flipped;
  logic [N-1:0] carry;
  logic [N-2:0] g_fan, g_p;

  assign sign     = din[N-1];
  assign carry[0] = sign;

  for (genvar i = 0; i < N - 1; i++) begin : g_bit
    rev_feynman u_xor (
      .a(sign), .b(din[i]), .p(g_fan[i]), .q(flipped[i])
    );
    rev_peres u_rha (
      .a(flipped[i]), .b(carry[i]), .c(1'b0),
      .p(g_p[i]), .q(dout[i]), .r(carry[i+1])
    );
  end

  assign dout[N-1] = sign;
endmodule
