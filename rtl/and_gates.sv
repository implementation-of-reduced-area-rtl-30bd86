// and_gates: a row of AND gates that passes an M-sample vector when enabled
// and forces it to zero otherwise.
//
// The reusable DCT uses two such rows per level: the first stage in front of
// the input adder unit and the second stage in front of the lower N/2-point
// unit. Gating the inputs of the half that is not in use keeps its adders
// from toggling. Combinational.
module and_gates #(
  parameter int M = 32,  // samples
  parameter int W = 16   // sample width
) (
  input  logic               en,
  input  logic signed [W-1:0] x [M],
  output logic signed [W-1:0] y [M]
);
  always_comb
    for (int i = 0; i < M; i++) y[i] = x[i] & {W{en}};
endmodule
