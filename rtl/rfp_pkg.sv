// rfp_pkg: widths and the binary32 field layout shared by the reversible
// floating-point adder. The operand format is IEEE 754 binary32 (sign, 8-bit
// biased exponent, 23-bit trailing significand). The internal widths follow
// the datapath: a 24-bit significand with its leading one, three extra bits
// (guard, round, sticky) and a sign give the 28-bit signed significands that
// are added; the sum is sign-extended to 29 bits. Alignment uses a
// (256, 8) right barrel shifter and normalization a (32, 5) left barrel
// shifter with a 32-input leading zero counter.
//
// The widths are those of the published architecture; grouping them in a
// package and the fp32_t struct are this implementation's.
package rfp_pkg;

  localparam int unsigned EXP_W    = 8;            // biased exponent
  localparam int unsigned FRAC_W   = 23;           // trailing significand field
  localparam int unsigned SIG_W    = FRAC_W + 1;   // significand with leading one
  localparam int unsigned EXT_W    = SIG_W + 4;    // sign + sig + guard, round, sticky = 28
  localparam int unsigned SUM_W    = EXT_W + 1;    // sign-extended sum = 29
  localparam int unsigned ASH_N    = 256;          // alignment shifter width
  localparam int unsigned ASH_K    = 8;            // alignment shift amount width
  localparam int unsigned NSH_N    = 32;           // normalization shifter width
  localparam int unsigned NSH_K    = 5;            // normalization shift amount width

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

endpackage
