// rev_cond_swap_tb: random and directed check of the conditional swap. The
// expected outputs are the operand with the larger exponent as x (a on a tie),
// the other as y, and the 9-bit difference exp_a - exp_b.
module rev_cond_swap_tb;
  import rfp_pkg::*;
  fp32_t a, b, x, y;
  logic [EXP_W:0] exp_diff;
  logic swapped;
  int   checks = 0, failures = 0;

  rev_cond_swap u_dut (.a(a), .b(b), .x(x), .y(y), .exp_diff(exp_diff), .swapped(swapped));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fp32_t p, input fp32_t q);
    int d;
    a = p;
    b = q;
    #1;
    d = int'(p.exp) - int'(q.exp);
    checks++;
    if (exp_diff !== 9'(d) || x !== (d < 0 ? q : p) || y !== (d < 0 ? p : q)
        || swapped !== (d < 0)) begin
      failures++;
      $display("FAIL a=%h b=%h x=%h y=%h diff=%h", p, q, x, y, exp_diff);
    end
  endtask

  initial begin
    run(32'h3f800000, 32'h40000000);
    run(32'h40000000, 32'h3f800000);
    run(32'h7f000000, 32'h00800000);
    run(32'h00800000, 32'h7f7fffff);
    run(32'h12345678, 32'h12345678 ^ 32'h80000001);
    for (int i = 0; i < 5000; i++) run(fp32_t'($urandom), fp32_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
