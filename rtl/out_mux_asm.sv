// out_mux_asm: output mux assembly of one level of the reusable DCT.
//
// Drives the odd output lines y(1), y(3), ..., y(N-1) of the level: from
// the output adder unit when the level runs at full length (sel = 1), or
// from the lower N/2-point unit, sign-extended, when the level is split
// (sel = 0). Combinational, M = N/2 lanes.
module out_mux_asm #(
  parameter int M  = 16,  // lanes (N/2)
  parameter int OW = 28,  // width of the output adder unit results
  parameter int LW = 27   // width of the lower unit results (<= OW)
) (
  input  logic               sel,
  input  logic signed [OW-1:0] odd   [M],
  input  logic signed [LW-1:0] lower [M],
  output logic signed [OW-1:0] y     [M]
);
  always_comb
    for (int i = 0; i < M; i++) y[i] = sel ? odd[i] : OW'(lower[i]);
endmodule
