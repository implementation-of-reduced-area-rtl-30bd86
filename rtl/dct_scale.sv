// dct_scale: rounding right shift and saturation between transform stages.
//
// y[i] = clip((x[i] + 2^(sh-1)) >>> sh) to a signed OW-bit range, with the
// shift chosen per transform length: sh = log2(L) + SH_OFS, where L is the
// length selected by len (HEVC scales the first stage by log2(L) - 1 +
// bitdepth - 8 and the second by log2(L) + 6). Combinational. The document
// does not describe scaling; this block is this design's own, so that the
// buffer and the outputs stay 16 bits wide.
module dct_scale
  import dct_pkg::*;
#(
  parameter int N      = 32,  // lanes
  parameter int IW     = 28,  // input width
  parameter int OW     = 16,  // output width
  parameter int SH_OFS = -1   // shift = log2(L) + SH_OFS, must stay >= 1
) (
  input  dct_len_e             len,
  input  logic signed [IW-1:0] x [N],
  output logic signed [OW-1:0] y [N]
);
  localparam logic signed [IW:0] MAXV = (IW+1)'((1 <<< (OW - 1)) - 1);
  localparam logic signed [IW:0] MINV = -(IW+1)'(1 <<< (OW - 1));

  int                 sh;
  logic signed [IW:0] t;

  always_comb begin
    sh = int'(len) + 2 + SH_OFS;
    for (int i = 0; i < N; i++) begin
      t = ((IW+1)'(x[i]) + ((IW+1)'(1) <<< (sh - 1))) >>> sh;
      if (t > MAXV)      y[i] = MAXV[OW-1:0];
      else if (t < MINV) y[i] = MINV[OW-1:0];
      else               y[i] = t[OW-1:0];
    end
  end
endmodule
