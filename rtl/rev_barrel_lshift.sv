// rev_barrel_lshift: (N, K) logarithmic left barrel shifter,
// dout = din << amt with zeros shifted in. It has K stages; stage j moves the
// word 2^j places towards the most significant end when bit j of the shift
// amount is set. Every output bit of a stage is the data output of a Fredkin
// gate used as a 2-to-1 multiplexer. The full design uses the (32, 5) size in
// the normalization unit. Purely combinational.
//
// The published architecture gives only the size of this shifter; the
// multiplexer-stage structure is this implementation's.
module rev_barrel_lshift #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 5
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
      logic near;
      if (i >= (1 << j)) begin : g_in
        assign near = stage[j][i - (1 << j)];
      end else begin : g_zero
        assign near = 1'b0;
      end
      rev_fredkin u_mux (
        .a(amt[j]), .b(stage[j][i]), .c(near),
        .p(g_ctl[j][i]), .q(stage[j+1][i]), .r(g_r[j][i])
      );
    end
  end

  assign dout = stage[K];
endmodule
