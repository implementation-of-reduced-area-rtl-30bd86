// sau: shift-add unit of an N-point integer DCT stage.
//
// Multiplies every butterfly difference b[i] by every odd-row basis value
// C_N[2k+1][i] (k, i = 0..N/2-1). Each constant product is built from shifted
// copies of b[i], one per set bit of |C|, and negated for a negative
// constant, so the unit holds adders only and no multipliers. Combinational;
// p[k][i] is the product for odd output 2k+1 and input i. Products are
// W+7 bits wide because every |C| is below 128. The constants are the HEVC
// integer basis values (see dct_pkg::coef).
module sau
  import dct_pkg::*;
#(
  parameter int N  = 32,  // transform points
  parameter int W  = 17,  // width of b
  parameter int PW = W + 7
) (
  input  logic signed [W-1:0]  b [N/2],
  output logic signed [PW-1:0] p [N/2][N/2]
);
  for (genvar k = 0; k < N / 2; k++) begin : g_row
    for (genvar i = 0; i < N / 2; i++) begin : g_col
      localparam int C   = coef(N, 2 * k + 1, i);
      localparam int MAG = (C < 0) ? -C : C;
      logic signed [PW-1:0] acc;
      always_comb begin
        acc = '0;
        for (int s = 0; s < 7; s++)
          if (((MAG >> s) & 1) != 0) acc = acc + (PW'(b[i]) <<< s);
        p[k][i] = (C < 0) ? -acc : acc;
      end
    end
  end
endmodule
