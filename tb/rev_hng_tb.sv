// rev_hng_tb: exhaustive check of the HNG gate: with D = 0 the pair (S, R)
// is the two-bit sum A + B + C (full adder) and P, Q pass A, B through; with
// D = 1 the carry output is inverted; the gate is a bijection on its sixteen
// input patterns.
module rev_hng_tb;
  logic a, b, c, d, p, q, r, s;
  logic [15:0] seen;
  int   checks = 0, failures = 0;

  rev_hng u_dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      total = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (p !== a || q !== b || r !== total[0] || s !== (total[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hffff) begin
      failures++;
      $display("FAIL not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
