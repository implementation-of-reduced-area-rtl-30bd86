// in_mux_asm: input mux assembly of one level of the reusable DCT.
//
// Chooses what the upper N/2-point unit transforms: the butterfly sums a[]
// of the input adder unit when the level runs at full length (sel = 1), or
// the first half of the raw input, sign-extended to the width of a[], when
// the level is split into two N/2-point transforms (sel = 0).
// Combinational, M = N/2 lanes.
module in_mux_asm #(
  parameter int M = 16,  // lanes (N/2)
  parameter int W = 16   // raw sample width; a[] is W+1 bits
) (
  input  logic               sel,
  input  logic signed [W:0]   a [M],
  input  logic signed [W-1:0] x [M],
  output logic signed [W:0]   u [M]
);
  always_comb
    for (int i = 0; i < M; i++) u[i] = sel ? a[i] : (W+1)'(x[i]);
endmodule
