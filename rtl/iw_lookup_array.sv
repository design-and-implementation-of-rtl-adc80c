// iw_lookup_array: oldest-first selection over the rows of the window.
//
// The window is a FIFO, so physical position is age: row N-1 (bottom) is
// the oldest, row 0 (top) the youngest. Given one request bit per row, the
// array grants the oldest requester and discards every requester above it.
// It also reports, per row, whether any older row requests; the scheduler
// uses that form for the load/store dependency searches ("is a store pending
// below me?").
//
// As in the source design the search takes lg N levels for N rows: here a
// parallel-prefix OR that at level k merges each row's partial result with
// the row 2^k further down. The dynamic precharge/discharge circuit of the
// original is not transcribed; the function is the same.
//
// Purely combinational. N must be a power of two.
module iw_lookup_array #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] req_i,    // row i requests
  output logic [N-1:0] grant_o,  // one-hot: oldest requester
  output logic [N-1:0] older_o   // some row below row i requests
);

  localparam int unsigned M = $clog2(N);

  // lvl[k][i] = OR of req[i .. i+2^k-1] (clipped at the bottom row)
  logic [N-1:0] lvl [M+1];

  assign lvl[0] = req_i;

  for (genvar k = 0; k < M; k++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_row
      if (i + (1 << k) < N) begin : g_merge
        assign lvl[k+1][i] = lvl[k][i] | lvl[k][i + (1 << k)];
      end else begin : g_edge
        assign lvl[k+1][i] = lvl[k][i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    if (i == N - 1) begin : g_bottom
      assign older_o[i] = 1'b0;
    end else begin : g_inner
      assign older_o[i] = lvl[M][i+1];
    end
  end

  assign grant_o = req_i & ~older_o;

endmodule
