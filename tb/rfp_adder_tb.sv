// rfp_adder_tb: end-to-end self-checking test of the binary32 reversible
// adder at its only (default) size. A reference model adds the two operands
// exactly in a 300-bit integer, truncates to 24 significant bits (round
// toward zero) and is compared with the adder's output. Operands are normal
// numbers; cases whose exact result is zero, subnormal or overflows are
// outside the adder's range and are skipped (and counted). The test also
// counts how often each mechanism of the datapath was exercised (operand
// swap, alignment shift with a sticky bit, a shift past all kept bits,
// negative significand sum, one-place right normalization, multi-place left
// normalization, dropped bits in the rounding) and fails if one never was.
// The adder is combinational; each vector is applied and checked after 1 ns.
module rfp_adder_tb;
  import rfp_pkg::*;

  localparam int unsigned NVEC = 20000;
  localparam int unsigned W    = 300;

  fp32_t a, b, s;
  int    checks = 0, failures = 0, skipped = 0;
  int    n_swap = 0, n_noswap = 0, n_sticky = 0, n_far = 0, n_neg = 0;
  int    n_rshift = 0, n_lshift = 0, n_trunc = 0;

  rfp_adder u_dut (.a(a), .b(b), .sum(s));

  initial begin : watchdog
    #(NVEC * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact sum, truncated toward zero; ok = 0 when outside the supported range
  function automatic fp32_t ref_add(input fp32_t p, input fp32_t q, output bit ok);
    fp32_t   big, sml, r;
    logic [W-1:0] vb, vs, mag;
    int      d, top, e;
    logic    sg;
    if (p.exp >= q.exp) begin big = p; sml = q; end
    else                begin big = q; sml = p; end
    d  = int'(big.exp) - int'(sml.exp);
    vb = W'({1'b1, big.frac}) << 256;
    vs = (W'({1'b1, sml.frac}) << 256) >> d;
    if (big.sign == sml.sign) begin mag = vb + vs; sg = big.sign; end
    else if (vb >= vs)        begin mag = vb - vs; sg = big.sign; end
    else                      begin mag = vs - vb; sg = sml.sign; end
    ok  = 1'b0;
    r   = '0;
    top = -1;
    for (int i = 0; i < W; i++) if (mag[i]) top = i;
    if (top < FRAC_W) return r;
    e = int'(big.exp) + top - (256 + FRAC_W);
    if (e < 1 || e > 254) return r;
    ok     = 1'b1;
    r.sign = sg;
    r.exp  = EXP_W'(e);
    r.frac = FRAC_W'(mag >> (top - FRAC_W));
    return r;
  endfunction

  function automatic fp32_t rand_normal();
    fp32_t f;
    f.sign = 1'($urandom);
    f.exp  = EXP_W'($urandom_range(1, 254));
    f.frac = FRAC_W'($urandom);
    return f;
  endfunction

  task automatic check(input fp32_t p, input fp32_t q);
    fp32_t exp_s;
    bit    ok;
    a = p;
    b = q;
    #1;
    exp_s = ref_add(p, q, ok);
    if (!ok) begin
      skipped++;
      return;
    end
    // mechanism coverage
    if (u_dut.swapped) n_swap++; else n_noswap++;
    if (u_dut.y_ext[0]) n_sticky++;
    if (u_dut.shift_amt >= 8'd27) n_far++;
    if (u_dut.s_tc[SUM_W-1]) n_neg++;
    if (u_dut.right_shift) n_rshift++;
    if (u_dut.lzc != 0) n_lshift++;
    if (u_dut.u_norm.shifted[7:0] != 0) n_trunc++;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH %h + %h: got %h expected %h", p, q, s, exp_s);
    end
  endtask

  task automatic cover_check(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin : stim
    fp32_t p, q;
    // directed: 1.0 + 1.0 = 2.0, 1.5 + 0.25, 1.0 - 0.75, 3.0 - 3.0*(1-2^-23)
    check(32'h3f800000, 32'h3f800000);
    check(32'h3fc00000, 32'h3e800000);
    check(32'h3f800000, 32'hbf400000);
    check(32'h3e800000, 32'h3fc00000);
    check(32'h40400000, 32'hc03fffff);
    check(32'h3f800000, 32'h33800001);  // 1 + tiny: sticky only
    check(32'h3f800000, 32'hb3800001);  // 1 - tiny: rounds down below 1
    for (int i = 0; i < NVEC; i++) begin
      p = rand_normal();
      q = rand_normal();
      case ($urandom_range(0, 3))
        0: q.exp = (p.exp > 3 && p.exp < 252) ? EXP_W'(int'(p.exp) + $urandom_range(0, 4) - 2) : p.exp;
        1: q.exp = (p.exp > 40 && p.exp < 214) ? EXP_W'(int'(p.exp) + $urandom_range(0, 80) - 40) : p.exp;
        2: begin  // near cancellation
          q = p;
          q.sign = ~p.sign;
          q.frac = p.frac ^ FRAC_W'($urandom_range(1, 255) << $urandom_range(0, 15));
        end
        default: ;
      endcase
      check(p, q);
    end
    $display("mechanism counts:");
    cover_check("operand swap", n_swap);
    cover_check("no swap", n_noswap);
    cover_check("sticky bit set", n_sticky);
    cover_check("shift past round bit", n_far);
    cover_check("negative sum", n_neg);
    cover_check("right normalization", n_rshift);
    cover_check("left normalization", n_lshift);
    cover_check("bits dropped by rounding", n_trunc);
    $display("skipped (outside range): %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
