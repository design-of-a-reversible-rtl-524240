// rev_fredkin_tb: exhaustive check of the Fredkin gate: the control passes
// through, B and C are swapped exactly when the control is 1, and the gate is
// a bijection on its eight input patterns.
module rev_fredkin_tb;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int   checks = 0, failures = 0;

  rev_fredkin u_dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || {q, r} !== (a ? {c, b} : {b, c})) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
