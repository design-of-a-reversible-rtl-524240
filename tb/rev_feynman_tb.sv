// rev_feynman_tb: exhaustive check of the Feynman gate against its truth
// table (P = A, Q = 1 exactly when A and B differ).
module rev_feynman_tb;
  logic a, b, p, q;
  int   checks = 0, failures = 0;

  rev_feynman u_dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
