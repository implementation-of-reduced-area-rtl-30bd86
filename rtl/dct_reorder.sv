// dct_reorder: puts the output lines of a reusable N-point DCT in natural
// order.
//
// In split mode (length L < N) the reusable unit interleaves the results of
// its blocks (coefficient j of block B on line j*(N/L) + bitreverse(B), see
// dct_pkg::bus_pos). This block undoes that wiring so that z[B*L + j] is
// coefficient j of block B for every length; at L = N it passes the lines
// straight through. Combinational: a small mux per lane,
// selected by len. This reordering is this design's own.
module dct_reorder
  import dct_pkg::*;
#(
  parameter int N = 32,
  parameter int W = 28
) (
  input  dct_len_e            len,
  input  logic signed [W-1:0] y [N],
  output logic signed [W-1:0] z [N]
);
  localparam int LOG2N = $clog2(N);

  always_comb
    for (int q = 0; q < N; q++) begin
      z[q] = y[q];
      for (int l2 = 2; l2 <= LOG2N; l2++)
        if (int'(len) + 2 == l2 || (l2 == LOG2N && int'(len) + 2 > LOG2N))
          z[q] = y[bus_pos(LOG2N - l2, l2, q)];
    end
endmodule
