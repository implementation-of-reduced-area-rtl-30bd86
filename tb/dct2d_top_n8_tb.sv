// dct2d_top_n8_tb: end-to-end test of the 2-D integer DCT built for 8 x 8
// tiles (N = 8, lengths 4 and 8), the size of the 8-point instance with its
// 8 x 8 transposition buffer.
//
// Sends tiles at every transform length the instance supports, with random gaps
// in in_valid and rows offered while the buffer is reading out, so the
// input is held off. Small residual-like tiles and full-range tiles (which
// drive the intermediate and output saturation) are mixed. The expected
// coefficients come from the reference model: per-block row transforms,
// rounding shift log2(L) - 1 and saturation to 16 bits, then per-block
// column transforms, rounding shift log2(L) + 6 and saturation. Each output
// column u is compared with column u of the expected coefficient tile. Also
// checks the column order, the length tag and the latency (first column
// two cycles after the cycle in which the last row is taken), and that
// every length, a held-off row and a saturation each happened at least once.
module dct2d_top_n8_tb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int N     = 8;
  localparam int IN_W  = 16;
  localparam int OUT_W = 16;
  localparam int TILES = 12;
  localparam int NLEN  = $clog2(N) - 1;  // lengths 4 .. N

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n, in_valid, in_ready, out_valid;
  dct_len_e                in_len, out_len;
  logic signed [IN_W-1:0]  in_row  [N];
  logic signed [OUT_W-1:0] out_col [N];
  logic [$clog2(N)-1:0]    out_idx;
  int checks = 0, failures = 0;

  dct2d_top #(.N(8)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint x   [N][N];   // input tile
  longint exp_c [N][N]; // expected output: exp_c[u][v] = out_col[v] of column u
  int     len_seen [4];
  int     sat_seen, stalls;

  // Reference 2-D transform of x at length l into exp_c.
  task automatic ref_tile(int l);
    longint y1 [N][N];
    longint v [] = new[N];
    int lg = $clog2(l);
    for (int r = 0; r < N; r++) begin
      for (int i = 0; i < N; i++) v[i] = x[r][i];
      for (int q = 0; q < N; q++) begin
        longint t = ref_dct(l, q % l, v, (q / l) * l);
        y1[r][q] = ref_scale(t, lg - 1, 16);
        if (y1[r][q] != (t + (longint'(1) <<< (lg - 2))) >>> (lg - 1)) sat_seen++;
      end
    end
    for (int u = 0; u < N; u++) begin
      for (int r = 0; r < N; r++) v[r] = y1[r][u];
      for (int q = 0; q < N; q++) begin
        longint t = ref_dct(l, q % l, v, (q / l) * l);
        exp_c[u][q] = ref_scale(t, lg + 6, OUT_W);
        if (exp_c[u][q] != (t + (longint'(1) <<< (lg + 5))) >>> (lg + 6)) sat_seen++;
      end
    end
  endtask

  initial begin
    int tiles_done, rows_in, cols_out, cyc, last_load_cyc, l;
    bit need_tile;
    rst_n = 1'b0; in_valid = 1'b0; in_len = LEN4;
    for (int i = 0; i < N; i++) in_row[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    need_tile = 1'b1; tiles_done = 0; rows_in = 0; cols_out = 0; cyc = 0; sat_seen = 0; stalls = 0;
    while (tiles_done < TILES) begin
      if (need_tile) begin
        need_tile = 1'b0;
        in_len = dct_len_e'(tiles_done % NLEN);
        l = len_points(in_len);
        for (int r = 0; r < N; r++)
          for (int i = 0; i < N; i++)
            x[r][i] = (tiles_done >= 8) ? longint'($signed(IN_W'($urandom)))
                                        : longint'($urandom_range(0, 510)) - 255;
        ref_tile(l);
        len_seen[int'(in_len)]++;
      end
      @(negedge clk);
      cyc++;
      in_valid = (rows_in < N) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 1) == 1);
      for (int i = 0; i < N; i++) in_row[i] = IN_W'(x[rows_in % N][i]);
      #1;
      if (in_valid && !in_ready) stalls++;
      if (out_valid) begin
        if (cols_out == 0) chk(cyc == last_load_cyc + 2, "latency of first column");
        chk(out_idx == cols_out[$clog2(N)-1:0], "column order");
        chk(out_len == dct_len_e'($clog2(l) - 2), "length tag");
        for (int v = 0; v < N; v++) begin
          chk(longint'(out_col[v]) == exp_c[cols_out][v], "coefficient");
          if (longint'(out_col[v]) != exp_c[cols_out][v] && failures < 10)
            $display("  L=%0d u=%0d v=%0d got=%0d exp=%0d", l, cols_out, v,
                     out_col[v], exp_c[cols_out][v]);
        end
        cols_out++;
        if (cols_out == N) begin
          cols_out = 0; rows_in = 0; tiles_done++; need_tile = 1'b1;
          in_valid = 1'b0;
        end
      end
      if (in_valid && in_ready && rows_in < N) begin
        rows_in++;
        last_load_cyc = cyc;
      end else if (in_valid && in_ready) begin
        chk(1'b0, "row taken before the previous tile was read out");
      end
    end
    for (int m = 0; m < NLEN; m++) begin
      $display("length %0d: %0d tiles", len_points(dct_len_e'(m)), len_seen[m]);
      chk(len_seen[m] > 0, "every transform length used");
    end
    $display("held-off rows: %0d, saturated values: %0d", stalls, sat_seen);
    chk(stalls > 0, "input held off during read-out");
    chk(sat_seen > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
