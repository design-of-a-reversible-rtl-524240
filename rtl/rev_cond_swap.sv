// rev_cond_swap: reversible conditional swap of the two binary32 operands.
// The 8-bit exponents are widened to 9 bits and subtracted, exp_a - exp_b, by a
// chain of nine HNG gates (rev_subtracter). The sign of that 9-bit difference
// drives the control input of an array of 32 Fredkin gates: when
// exp_a < exp_b the whole operands trade places, otherwise they pass through.
// Output x is therefore always the operand with the larger (or equal)
// exponent and y the one to be aligned. The 9-bit two's complement difference
// goes on to the alignment unit. Purely combinational.
//
// Gate structure as published. Which exponent is inverted is read from the
// swap rule (swap when exp_a < exp_b); the swapped output is an extra
// observation port of this implementation.
module rev_cond_swap
  import rfp_pkg::*;
(
  input  fp32_t            a,
  input  fp32_t            b,
  output fp32_t            x,
  output fp32_t            y,
  output logic [EXP_W:0]   exp_diff,  // exp_a - exp_b, 9-bit two's complement
  output logic             swapped    // control line of the Fredkin array
);
  logic [31:0] a_bits, b_bits, x_bits, y_bits, g_ctl;

  rev_subtracter #(.N(EXP_W + 1)) u_sub (
    .a   ({1'b0, a.exp}),
    .b   ({1'b0, b.exp}),
    .diff(exp_diff)
  );

  assign swapped = exp_diff[EXP_W];
  assign a_bits  = a;
  assign b_bits  = b;

  for (genvar i = 0; i < 32; i++) begin : g_swap
    rev_fredkin u_fk (
      .a(swapped), .b(a_bits[i]), .c(b_bits[i]),
      .p(g_ctl[i]), .q(x_bits[i]), .r(y_bits[i])
    );
  end

  assign x = fp32_t'(x_bits);
  assign y = fp32_t'(y_bits);
endmodule
