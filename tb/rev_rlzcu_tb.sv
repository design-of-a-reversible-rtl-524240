// rev_rlzcu_tb: the leading zero counter unit at its default (32, 5) size and
// at the (8, 3) size of the worked example (input 00000101 gives 5). Inputs
// with a known leading-one position and random lower bits are compared with a
// count made by a loop. The all-zero input gives 0.
module rev_rlzcu_tb;
  logic [31:0] d32;
  logic [4:0]  c32;
  logic [7:0]  d8;
  logic [2:0]  c8;
  int   checks = 0, failures = 0;

  rev_rlzcu               u_dut  (.din(d32), .count(c32));
  rev_rlzcu #(.N(8), .K(3)) u_dut8 (.din(d8), .count(c8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz(input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) if (v[i]) return n - 1 - i;
    return 0;
  endfunction

  initial begin
    d8  = 8'b0000_0101;
    d32 = '0;
    #1;
    checks++;
    if (c8 !== 3'd5) begin failures++; $display("FAIL example: %0d", c8); end
    checks++;
    if (c32 !== 5'd0) begin failures++; $display("FAIL all zero: %0d", c32); end
    for (int i = 0; i < 3000; i++) begin
      d32 = $urandom >> $urandom_range(0, 31);
      d32[31 - (i % 32)] = 1'b1;
      d32 = d32 & ~(32'hffffffff << (32 - (i % 32))) | (32'd1 << (31 - (i % 32)));
      d8  = 8'($urandom) >> $urandom_range(0, 7);
      #1;
      checks++;
      if (c32 !== 5'(lz(d32, 32)) || (d8 != 0 && c8 !== 3'(lz(32'(d8), 8)))) begin
        failures++;
        if (failures < 5) $display("FAIL d32=%h c32=%0d d8=%b c8=%0d", d32, c32, d8, c8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
