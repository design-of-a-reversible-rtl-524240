// rev_rca_tb: the 28-bit ripple carry adder against signed addition, with the
// 29-bit sign-extended sum compared in full. Extremes of the two's complement
// range are included so the extra sum bit is exercised.
module rev_rca_tb;
  logic [27:0] a, b;
  logic [28:0] sum;
  int   checks = 0, failures = 0;

  rev_rca u_dut (.a(a), .b(b), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [27:0] p, input logic [27:0] q);
    longint want;
    a = p;
    b = q;
    #1;
    want = longint'($signed(p)) + longint'($signed(q));
    checks++;
    if (sum !== 29'(want)) begin
      failures++;
      if (failures < 5) $display("FAIL %h + %h = %h want %h", p, q, sum, 29'(want));
    end
  endtask

  initial begin
    chk(28'h7ffffff, 28'h7ffffff);
    chk(28'h8000000, 28'h8000000);
    chk(28'h8000000, 28'h7ffffff);
    chk(28'hfffffff, 28'h0000001);
    for (int i = 0; i < 5000; i++) chk(28'($urandom), 28'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
