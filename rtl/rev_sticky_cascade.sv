// rev_sticky_cascade: the sticky bit of the alignment, the OR of N bits formed
// by a linear cascade of reversible two-input OR stages. Stage i ORs input bit
// i into the running result of the stages before it. Each stage is a Peres
// gate with a constant 0 on its third input, which gives a xor b and a AND b,
// followed by a Feynman gate that combines the two into a OR b (the two terms
// are never both 1). The full design ORs the 230 shifter outputs that lie
// below the round bit. Purely combinational; the delay grows linearly with N.
//
// The linear cascade over 230 bits is as published; the published design
// uses one Peres gate per stage, and the added Feynman gate per stage is this
// implementation's way of getting the OR from it.
module rev_sticky_cascade #(
  parameter int unsigned N = 230
) (
  input  logic [N-1:0] din,
  output logic         sticky
);
  logic [N:0]   run;
  logic [N-1:0] x_q, x_r, g_p, g_f;

  assign run[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_or
    rev_peres u_pg (
      .a(run[i]), .b(din[i]), .c(1'b0),
      .p(g_p[i]), .q(x_q[i]), .r(x_r[i])
    );
    rev_feynman u_fy (
      .a(x_r[i]), .b(x_q[i]), .p(g_f[i]), .q(run[i+1])
    );
  end

  assign sticky = run[N];
endmodule
