// dct_ref_pkg: reference model for the integer DCT testbenches.
//
// Builds the HEVC integer basis independently of the RTL: the sign of each
// entry comes from the real cosine, its magnitude from the odd-row constant
// lists of the 4/8/16/32-point HEVC transforms, indexed by the first-quadrant
// angle. Also gives a reference 1-D transform, the line order of a reusable
// unit in split mode (defined recursively, level by level), and the HEVC
// rounding shift with saturation.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Magnitude for angle m*pi/64, m = 0..32, assembled from the per-size lists.
  function automatic int mag_of(int m);
    int l32 [16] = '{90, 90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4};
    int l16 [8]  = '{90, 87, 80, 70, 57, 43, 25, 9};
    int l8  [4]  = '{89, 75, 50, 18};
    int l4  [2]  = '{83, 36};
    if (m == 0 || m == 16) return 64;
    if (m == 32) return 0;
    if (m % 2 == 1) return l32[(m - 1) / 2];
    if (m % 4 == 2) return l16[(m - 2) / 4];
    if (m % 8 == 4) return l8[(m - 4) / 8];
    return l4[(m - 8) / 16];
  endfunction

  function automatic int ref_coef(int n_pt, int k, int n);
    real th, c;
    int  m;
    if (k == 0) return 64;
    th = PI * real'((2 * n + 1) * k) / real'(2 * n_pt);
    c  = $cos(th);
    m  = int'($acos(c < 0.0 ? -c : c) * 64.0 / PI);
    return (c < 0.0) ? -mag_of(m) : mag_of(m);
  endfunction

  // Coefficient j of an L-point transform of x[base .. base+L-1].
  function automatic longint ref_dct(int l, int j, longint x [], int base);
    longint s = 0;
    for (int n = 0; n < l; n++) s += longint'(ref_coef(l, j, n)) * x[base + n];
    return s;
  endfunction

  // Line of an N-point reusable unit at length L that carries coefficient j
  // of block blk: upper half-unit on even lines, lower half-unit on odd lines.
  function automatic int ref_line(int n_pt, int l, int blk, int j);
    int half_blocks;
    if (n_pt == l) return j;
    half_blocks = n_pt / (2 * l);
    if (blk < half_blocks) return 2 * ref_line(n_pt / 2, l, blk, j);
    return 2 * ref_line(n_pt / 2, l, blk - half_blocks, j) + 1;
  endfunction

  // Rounding right shift, then saturation to a signed w-bit value.
  function automatic longint ref_scale(longint v, int sh, int w);
    longint r, hi, lo;
    r  = (v + (longint'(1) <<< (sh - 1))) >>> sh;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (r > hi) return hi;
    if (r < lo) return lo;
    return r;
  endfunction

endpackage
