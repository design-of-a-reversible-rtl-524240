// rev_rlzcu: (N = 2^K, K) reversible leading zero counter unit, a regular
// array of N-1 RLZC cells in K rows. Row 0 has N/2 cells, each fed a pair of
// input bits (most significant pair at the left), and row r has N/2^(r+1)
// cells fed pairs of the "one seen" outputs of row r-1. Within a row the cells
// are chained left to right starting from constant zeros, and the count bit
// of the rightmost cell of row r is bit r of the leading zero count. The "one
// seen" outputs that feed both the next cell and the row below are fanned out
// with Feynman gates. An all-zero input gives a count of 0. Purely
// combinational; the delay grows with N/2 along the first row.
//
// The cell arrangement follows the published 8-bit example; the feed of row
// r from the 'seen' outputs of row r-1 is this implementation's reading.
module rev_rlzcu #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 5
) (
  input  logic [N-1:0] din,
  output logic [K-1:0] count
);
  // seen[r][j] / bit[r][j]: outputs of cell j (0 = leftmost) of row r
  logic [K-1:0][N/2-1:0] seen, cnt;

  for (genvar r = 0; r < K; r++) begin : g_row
    localparam int unsigned CELLS = N >> (r + 1);
    for (genvar j = 0; j < N / 2; j++) begin : g_cell
      if (j < CELLS) begin : g_used
        logic in_a, in_b, in_c, in_d;
        if (r == 0) begin : g_top
          assign in_b = din[N-1-2*j];
          assign in_a = din[N-2-2*j];
        end else begin : g_low
          assign in_b = seen[r-1][2*j];
          assign in_a = seen[r-1][2*j+1];
        end
        if (j == 0) begin : g_first
          assign in_c = 1'b0;
          assign in_d = 1'b0;
        end else begin : g_next
          assign in_c = seen[r][j-1];
          assign in_d = cnt[r][j-1];
        end
        rev_rlzc_cell u_cell (
          .a(in_a), .b(in_b), .c(in_c), .d(in_d),
          .d_out(cnt[r][j]), .c_out(seen[r][j])
        );
      end else begin : g_unused
        assign cnt[r][j]  = 1'b0;
        assign seen[r][j] = 1'b0;
      end
    end
    assign count[r] = cnt[r][CELLS-1];
  end
endmodule
