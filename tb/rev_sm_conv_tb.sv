// rev_sm_conv_tb: checks the conversion unit at the three sizes the adder
// uses (9, 28 and 29 bits). Expected: a non-negative word is unchanged; a
// negative one keeps its sign and has its low bits replaced by their two's
// complement negation; 100...0 maps to itself. Converting twice must give the
// input back (the unit is its own inverse).
module rev_sm_conv_tb;
  logic [8:0]  i9,  o9,  r9;
  logic [27:0] i28, o28, r28;
  logic [28:0] i29, o29, r29;
  int   checks = 0, failures = 0;

  rev_sm_conv #(.N(9))  u_c9   (.din(i9),  .dout(o9));
  rev_sm_conv #(.N(9))  u_c9b  (.din(o9),  .dout(r9));
  rev_sm_conv #(.N(28)) u_c28  (.din(i28), .dout(o28));
  rev_sm_conv #(.N(28)) u_c28b (.din(o28), .dout(r28));
  rev_sm_conv #(.N(29)) u_c29  (.din(i29), .dout(o29));
  rev_sm_conv #(.N(29)) u_c29b (.din(o29), .dout(r29));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [28:0] expect_conv(input logic [28:0] v, input int n);
    logic [28:0] mask, lo;
    mask = (29'd1 << (n - 1)) - 29'd1;
    lo   = v & mask;
    if (v[n-1]) lo = (~lo + 29'd1) & mask;
    return (v & ~mask) | lo;
  endfunction

  task automatic chk(input string nm, input logic [28:0] got, input logic [28:0] want,
                     input logic [28:0] back, input logic [28:0] orig);
    checks++;
    if (got !== want || back !== orig) begin
      failures++;
      $display("FAIL %s in=%h got=%h want=%h back=%h", nm, orig, got, want, back);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      i9 = 9'(i);
      #1;
      chk("n9", 29'(o9), expect_conv(29'(i9), 9), 29'(r9), 29'(i9));
    end
    for (int i = 0; i < 4000; i++) begin
      i28 = 28'($urandom);
      i29 = 29'($urandom);
      if (i == 0) begin i28 = 28'h8000000; i29 = 29'h10000000; end
      if (i == 1) begin i28 = 28'h8000001; i29 = 29'h1fffffff; end
      #1;
      chk("n28", 29'(o28), expect_conv(29'(i28), 28), 29'(r28), 29'(i28));
      chk("n29", o29, expect_conv(i29, 29), r29, i29);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
