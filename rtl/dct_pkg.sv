// dct_pkg: types and constants shared by the integer DCT datapath.
//
// The transform is the HEVC-style integer DCT. Every basis value of the
// N-point matrix (N = 4, 8, 16, 32) is +/- one entry of COS_TAB, the integer
// approximation of 64*sqrt(2)*cos(m*pi/64) that HEVC uses, except row 0 which
// is flat 64. coef() folds the angle (2n+1)*k*(32/N) into the first quadrant
// and picks the sign, so no N x N table has to be stored anywhere.
//
// dct_len_e is the run-time transform length. Its encoding (log2(L) - 2) is
// this design's own choice.
package dct_pkg;

  typedef enum logic [1:0] {
    LEN4  = 2'd0,
    LEN8  = 2'd1,
    LEN16 = 2'd2,
    LEN32 = 2'd3
  } dct_len_e;

  // 64*sqrt(2)*cos(m*pi/64) as integerised by HEVC, m = 0..32 (entry 0 is
  // the flat DC value 64).
  localparam int COS_TAB [33] = '{
    64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
    64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4, 0
  };

  // Integer DCT basis value C_N[k][n].
  function automatic int coef(int n_pt, int k, int n);
    int m;
    if (k == 0) return 64;
    m = ((2 * n + 1) * k * (32 / n_pt)) % 128;
    if (m <= 32)      return  COS_TAB[m];
    else if (m <= 64) return -COS_TAB[64 - m];
    else if (m <= 96) return -COS_TAB[m - 64];
    else              return  COS_TAB[128 - m];
  endfunction

  // Transform length in points for a length code.
  function automatic int len_points(dct_len_e len);
    return 4 << len;
  endfunction

  // Index on the output bus of a reusable N-point unit at which natural
  // coefficient q (block q / L, coefficient q % L) appears when the unit runs
  // at length L = 2**log2l, with d = log2(N/L) split levels. Each level of the unit puts its upper half-unit
  // on even lines and its lower half-unit on odd lines, which gives
  // pos = j * (N/L) + bitreverse(block).
  function automatic int bus_pos(int d, int log2l, int q);
    int l, blk, j, rev;
    l   = 1 << log2l;
    blk = q / l;
    j   = q % l;
    rev = 0;
    for (int i = 0; i < d; i++)
      if (((blk >> i) & 1) != 0) rev = rev | (1 << (d - 1 - i));
    return (j << d) + rev;
  endfunction

endpackage
