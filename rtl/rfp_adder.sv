// rfp_adder: binary32 floating-point adder built entirely from reversible
// gates (Feynman, Fredkin, Peres, HNG), combinational from end to end with no
// clock and no state.
//   1. rev_cond_swap subtracts the exponents and swaps the operands so that x
//      has the larger exponent.
//   2. rev_align right-shifts y's significand by the exponent difference and
//      forms guard, round and sticky bits.
//   3. Two 28-bit conversion units put both signed significands into two's
//      complement, a 28-bit ripple carry adder sums them to a 29-bit
//      sign-extended result, and a 29-bit conversion unit turns it back into
//      sign and 28-bit magnitude. The sign is the sign of the result.
//   4. rev_normalize normalizes the magnitude, adjusts x's exponent and
//      truncates (round toward zero).
// Supported: normal operands and normal results. Zero, subnormal, infinity
// and NaN operands, an exact zero result, and exponent overflow or underflow
// are not handled; the output is then meaningless.
//
// The stage order and widths follow the published architecture; the
// restriction to normal operands and results is the published scope, and the
// always-1 leading bit is this implementation's reading of it.
module rfp_adder
  import rfp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t sum
);
  fp32_t              x, y;
  logic [EXP_W:0]     exp_diff;
  logic               swapped;
  logic [EXT_W-1:0]   x_ext, y_ext, x_tc, y_tc;
  logic [ASH_K-1:0]   shift_amt;
  logic [SUM_W-1:0]   s_tc, s_sm;
  logic               right_shift;
  logic [NSH_K-1:0]   lzc;

  rev_cond_swap u_swap (
    .a(a), .b(b), .x(x), .y(y), .exp_diff(exp_diff), .swapped(swapped)
  );

  rev_align u_align (
    .y(y), .exp_diff(exp_diff), .y_ext(y_ext), .shift_amt(shift_amt)
  );

  assign x_ext = {x.sign, 1'b1, x.frac, 3'b000};

  rev_sm_conv #(.N(EXT_W)) u_conv_x (.din(x_ext), .dout(x_tc));
  rev_sm_conv #(.N(EXT_W)) u_conv_y (.din(y_ext), .dout(y_tc));

  rev_rca #(.N(EXT_W)) u_add (.a(x_tc), .b(y_tc), .sum(s_tc));

  rev_sm_conv #(.N(SUM_W)) u_conv_s (.din(s_tc), .dout(s_sm));

  rev_normalize u_norm (
    .exp_in     (x.exp),
    .mag        (s_sm[EXT_W-1:0]),
    .exp_out    (sum.exp),
    .frac_out   (sum.frac),
    .right_shift(right_shift),
    .lzc        (lzc)
  );

  assign sum.sign = s_sm[SUM_W-1];
endmodule
