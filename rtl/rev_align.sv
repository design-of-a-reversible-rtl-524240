// rev_align: reversible alignment of the smaller operand's significand.
// The 9-bit two's complement exponent difference from the conditional swap is
// turned into its magnitude by a 9-bit sign-magnitude conversion unit whose
// sign output is ignored; the low 8 bits are the shift amount. The significand
// of y, with its leading one made explicit, is placed at the top of a 256-bit
// word and shifted right by a (256, 8) barrel shifter. Output bits 1..24
// (counted from the most significant end) are the aligned significand, bit 25
// is the guard bit, bit 26 the round bit, and bits 27..256 (230 bits) are
// ORed by the Peres-gate cascade into the sticky bit. The sign of y bypasses
// the shifter. The result is the 28-bit sign-magnitude word
// {sign, significand[23:0], guard, round, sticky}. Purely combinational.
// Zero and subnormal operands are not supported: the leading one is always 1.
//
// Bit placement (significand, guard, round, sticky from bits 27..256) is as
// published; putting the significand at the top of the shifter input is this
// implementation's reading.
module rev_align
  import rfp_pkg::*;
(
  input  fp32_t              y,
  input  logic [EXP_W:0]     exp_diff,   // 9-bit two's complement difference
  output logic [EXT_W-1:0]   y_ext,      // {sign, sig, guard, round, sticky}
  output logic [ASH_K-1:0]   shift_amt   // |exp_diff|
);
  localparam int unsigned STICKY_N = ASH_N - SIG_W - 2;   // 230

  logic [EXP_W:0]   diff_sm;
  logic [ASH_N-1:0] sh_in, sh_out;
  logic             sticky;

  rev_sm_conv #(.N(EXP_W + 1)) u_mag (
    .din (exp_diff),
    .dout(diff_sm)
  );
  assign shift_amt = diff_sm[ASH_K-1:0];

  assign sh_in = {1'b1, y.frac, {(ASH_N - SIG_W){1'b0}}};

  rev_barrel_rshift #(.N(ASH_N), .K(ASH_K)) u_shift (
    .din (sh_in),
    .amt (shift_amt),
    .dout(sh_out)
  );

  rev_sticky_cascade #(.N(STICKY_N)) u_sticky (
    .din   (sh_out[STICKY_N-1:0]),
    .sticky(sticky)
  );

  assign y_ext = {y.sign, sh_out[ASH_N-1 -: SIG_W + 2], sticky};
endmodule
