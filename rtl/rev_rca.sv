// rev_rca: N-bit reversible ripple carry adder for two's complement operands.
// The least significant position is a Peres gate used as a half adder (there
// is no carry in); the other N-1 positions are HNG gates used as full adders.
// The sum is returned sign-extended to N+1 bits so that it cannot overflow:
// the extra bit is a[N-1] xor b[N-1] xor carry-out, formed with two Feynman
// gates. The full design uses N = 28. Purely combinational.
//
// The Peres-then-HNG ripple structure is as published; forming the 29th bit
// with two Feynman gates is this implementation's choice.
module rev_rca #(
  parameter int unsigned N = 28
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  logic [N:0]   carry;
  logic [N-1:0] g_p, g_q;
  logic         ab_x, g_f0, g_f1;

  rev_peres u_rha (
    .a(a[0]), .b(b[0]), .c(1'b0),
    .p(g_p[0]), .q(sum[0]), .r(carry[1])
  );
  assign g_q[0]   = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_bit
    rev_hng u_rfa (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(g_p[i]), .q(g_q[i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  rev_feynman u_x0 (.a(a[N-1]), .b(b[N-1]),  .p(g_f0), .q(ab_x));
  rev_feynman u_x1 (.a(carry[N]), .b(ab_x), .p(g_f1), .q(sum[N]));
endmodule
