// rev_barrel_lshift_tb: the (32, 5) left barrel shifter against the <<
// operator, for every shift amount with random data.
module rev_barrel_lshift_tb;
  logic [31:0] din, dout;
  logic [4:0]  amt;
  int   checks = 0, failures = 0;

  rev_barrel_lshift u_dut (.din(din), .amt(amt), .dout(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      din = (i < 32) ? 32'hffffffff : $urandom;
      amt = 5'(i);
      #1;
      checks++;
      if (dout !== (din << amt)) begin
        failures++;
        if (failures < 5) $display("FAIL din=%h amt=%0d dout=%h", din, amt, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
