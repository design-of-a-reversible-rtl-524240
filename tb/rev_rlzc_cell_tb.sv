// rev_rlzc_cell_tb: exhaustive check of the leading zero counter cell:
// d_out = D + A B' C' and c_out = A + B + C.
module rev_rlzc_cell_tb;
  logic a, b, c, d, d_out, c_out;
  int   checks = 0, failures = 0;

  rev_rlzc_cell u_dut (.a(a), .b(b), .c(c), .d(d), .d_out(d_out), .c_out(c_out));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if (d_out !== (d || (a && !b && !c)) || c_out !== (a || b || c)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b d_out=%b c_out=%b", a, b, c, d, d_out, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
