// rev_normalize: reversible post-addition normalization and rounding.
// Inputs are the exponent of the larger operand and the 28-bit magnitude of
// the significand sum, whose bit 26 is the leading-one position of a
// normalized result and bit 27 a carry out of it.
// Stage 1: bit 27 drives the control of a bank of 28 Fredkin multiplexers that
// shift the magnitude one place right, and the carry input of an 8-bit Peres
// incrementer that adds one to the exponent.
// Stage 2: magnitude bits 26..0, padded with five zeros to 32 bits, go to a
// (32, 5) leading zero counter. Its count is both the shift amount of a
// (32, 5) left barrel shifter and the subtrahend of an 8-bit HNG subtracter
// applied to the (possibly incremented) exponent. After a right shift the
// count is zero, so nothing more happens.
// Rounding is round toward zero and needs no gates: of the shifted word, bit
// 31 is the implicit leading one and bits 7..0 are dropped; bits 30..8 are the
// 23-bit trailing significand. Exponent overflow and underflow are not
// detected. Purely combinational.
//
// The two-stage structure is as published; padding the 27 magnitude bits with
// five zeros for the 32-bit counter and shifter is this implementation's
// choice, made so that the count is zero after a right shift.
module rev_normalize
  import rfp_pkg::*;
(
  input  logic [EXP_W-1:0]  exp_in,
  input  logic [EXT_W-1:0]  mag,
  output logic [EXP_W-1:0]  exp_out,
  output logic [FRAC_W-1:0] frac_out,
  output logic              right_shift,  // stage 1 shifted right
  output logic [NSH_K-1:0]  lzc           // stage 2 left shift amount
);
  logic [EXP_W-1:0] exp_inc;
  logic             g_cout;
  logic [EXT_W-1:0] mag_r, g_ctl, g_r;
  logic [EXT_W:0]   mag_ext;
  logic [NSH_N-1:0] word, shifted;

  assign right_shift = mag[EXT_W-1];

  rev_incrementer #(.N(EXP_W)) u_inc (
    .a(exp_in), .cin(right_shift), .sum(exp_inc), .cout(g_cout)
  );

  assign mag_ext = {1'b0, mag};
  for (genvar i = 0; i < EXT_W; i++) begin : g_rmux
    rev_fredkin u_mux (
      .a(right_shift), .b(mag_ext[i]), .c(mag_ext[i+1]),
      .p(g_ctl[i]), .q(mag_r[i]), .r(g_r[i])
    );
  end

  assign word = {mag_r[EXT_W-2:0], {(NSH_N - EXT_W + 1){1'b0}}};

  rev_rlzcu #(.N(NSH_N), .K(NSH_K)) u_lzc (
    .din(word), .count(lzc)
  );

  rev_barrel_lshift #(.N(NSH_N), .K(NSH_K)) u_lsh (
    .din(word), .amt(lzc), .dout(shifted)
  );

  rev_subtracter #(.N(EXP_W)) u_sub (
    .a(exp_inc), .b({{(EXP_W - NSH_K){1'b0}}, lzc}), .diff(exp_out)
  );

  // round toward zero: keep the 23 bits below the implicit one
  assign frac_out = shifted[NSH_N-2 -: FRAC_W];
endmodule
