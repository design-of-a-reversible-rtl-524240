// rev_barrel_rshift_tb: the (256, 8) right barrel shifter against the >>
// operator, for every shift amount with random data and random pairs.
module rev_barrel_rshift_tb;
  logic [255:0] din, dout;
  logic [7:0]   amt;
  int   checks = 0, failures = 0;

  rev_barrel_rshift u_dut (.din(din), .amt(amt), .dout(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rand256();
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      din = (i < 256) ? {256{1'b1}} : rand256();
      amt = (i < 512) ? 8'(i) : 8'($urandom);
      #1;
      checks++;
      if (dout !== (din >> amt)) begin
        failures++;
        if (failures < 5) $display("FAIL amt=%0d", amt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
