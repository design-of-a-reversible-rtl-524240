// rev_normalize_tb: the normalization and truncation unit against a loop
// model. A magnitude with bit 27 set is halved and the exponent raised by
// one; otherwise the magnitude is shifted left until bit 26 is 1 and the
// exponent lowered by the number of places. The 23 bits below the leading
// one (bits 25..3 after normalizing) are the result's trailing significand.
// Every leading-one position from bit 27 down to bit 0 is exercised.
module rev_normalize_tb;
  import rfp_pkg::*;
  logic [EXP_W-1:0]  exp_in, exp_out;
  logic [EXT_W-1:0]  mag;
  logic [FRAC_W-1:0] frac_out;
  logic              right_shift;
  logic [NSH_K-1:0]  lzc;
  int   checks = 0, failures = 0;

  rev_normalize u_dut (.exp_in(exp_in), .mag(mag), .exp_out(exp_out),
                       .frac_out(frac_out), .right_shift(right_shift), .lzc(lzc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [EXT_W-1:0] m;
    int               e, top;
    for (int i = 0; i < 6000; i++) begin
      top    = i % 28;
      mag    = EXT_W'($urandom) & ((EXT_W'(1) << top) - EXT_W'(1));
      mag[top] = 1'b1;
      exp_in = EXP_W'($urandom_range(30, 250));
      #1;
      m = mag;
      e = int'(exp_in);
      if (m[27]) begin
        m = m >> 1;
        e = e + 1;
      end
      while (!m[26]) begin
        m = m << 1;
        e = e - 1;
      end
      checks++;
      if (exp_out !== EXP_W'(e) || frac_out !== m[25:3] || right_shift !== mag[27]) begin
        failures++;
        if (failures < 5) $display("FAIL exp=%0d mag=%h got %0d/%h want %0d/%h",
                                   exp_in, mag, exp_out, frac_out, e, m[25:3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
