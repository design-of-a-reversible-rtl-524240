// rev_sticky_cascade_tb: the 230-input OR cascade. Every single-one input
// pattern, the all-zero input, and random sparse patterns are compared with
// the reduction OR of the input.
module rev_sticky_cascade_tb;
  logic [229:0] din;
  logic         sticky;
  int   checks = 0, failures = 0;

  rev_sticky_cascade u_dut (.din(din), .sticky(sticky));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    #1;
    checks++;
    if (sticky !== (|din)) begin
      failures++;
      if (failures < 5) $display("FAIL din=%h sticky=%b", din, sticky);
    end
  endtask

  initial begin
    din = '0;
    chk();
    for (int i = 0; i < 230; i++) begin
      din = 230'd1 << i;
      chk();
    end
    for (int i = 0; i < 1000; i++) begin
      din = '0;
      if (i % 2 == 0) begin
        din[$urandom_range(0, 229)] = 1'b1;
        din[$urandom_range(0, 229)] = 1'b1;
      end
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
