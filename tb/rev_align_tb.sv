// rev_align_tb: the alignment unit against an arithmetic model. For a shift
// s = |exp_diff| the 26-bit value {significand, guard, round} is the
// significand times 4 divided by 2^s (truncated), and sticky is 1 when that
// division drops any 1 bit. Every difference from -255 to 255 is used, with
// random significands and signs.
module rev_align_tb;
  import rfp_pkg::*;
  fp32_t            y;
  logic [EXP_W:0]   exp_diff;
  logic [EXT_W-1:0] y_ext;
  logic [7:0]       shift_amt;
  int   checks = 0, failures = 0;
  int   n_sticky = 0;

  rev_align u_dut (.y(y), .exp_diff(exp_diff), .y_ext(y_ext), .shift_amt(shift_amt));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] t, kept;
    logic        st;
    int          d, s;
    for (int i = 0; i < 6000; i++) begin
      d = (i < 511) ? i - 255 : $urandom_range(0, 510) - 255;
      y = fp32_t'($urandom);
      if (i % 3 == 0) y.frac = y.frac & ~FRAC_W'($urandom);
      exp_diff = 9'(d);
      #1;
      s    = (d < 0) ? -d : d;
      t    = {1'b1, y.frac, 2'b00};
      kept = (s >= 26) ? '0 : t >> s;
      st   = (s >= 26) ? 1'b1 : ((t & ((26'd1 << s) - 26'd1)) != 0);
      if (st) n_sticky++;
      checks++;
      if (y_ext !== {y.sign, kept, st} || shift_amt !== 8'(s)) begin
        failures++;
        if (failures < 5) $display("FAIL d=%0d y=%h y_ext=%h want %h", d, y, y_ext, {y.sign, kept, st});
      end
    end
    checks++;
    if (n_sticky == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
