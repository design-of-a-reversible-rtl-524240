// rev_peres_tb: exhaustive check of the Peres gate: P = A, Q = A xor B,
// R = AB xor C; with C = 0 the pair (R, Q) is the two-bit sum A + B; and the
// gate is a bijection on its eight input patterns.
module rev_peres_tb;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int   checks = 0, failures = 0;

  rev_peres u_dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      if (!c) begin
        checks++;
        if ({r, q} !== 2'(a) + 2'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b", a, b);
        end
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
