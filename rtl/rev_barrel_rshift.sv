// rev_barrel_rshift: (N, K) logarithmic right barrel shifter,
// dout = din >> amt with zeros shifted in. It has K stages; stage j moves the
// word 2^j places when bit j of the shift amount is set. Each output bit of a
// stage is the data output of a Fredkin gate used as a 2-to-1 multiplexer,
// with the shift-amount bit on its control input. The full design uses the
// (256, 8) size to align the smaller operand's significand. Purely
// combinational.
//
// The published architecture takes this shifter from earlier work and gives
// only its size; the multiplexer-stage structure is this implementation's.
module rev_barrel_rshift #(
  parameter int unsigned N = 256,
  parameter int unsigned K = 8
) (
  input  logic [N-1:0] din,
  input  logic [K-1:0] amt,
  output logic [N-1:0] dout
);
  logic [K:0][N-1:0] stage;
  logic [K-1:0][N-1:0] g_ctl, g_r;

  assign stage[0] = din;

  for (genvar j = 0; j < K; j++) begin : g_stage
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam int unsigned SRC = i + (1 << j);
      logic far;
      if (SRC < N) begin : g_in
        assign far = stage[j][SRC];
      end else begin : g_zero
        assign far = 1'b0;
      end
      rev_fredkin u_mux (
        .a(amt[j]), .b(stage[j][i]), .c(far),
        .p(g_ctl[j][i]), .q(stage[j+1][i]), .r(g_r[j][i])
      );
    end
  end

  assign dout = stage[K];
endmodule
