// transpose_buffer_tb: checks the counter-driven 32 x 32 transposition
// buffer.
//
// Streams random blocks with random gaps in in_valid and keeps offering rows
// during the read phase. Checks that each block's columns come out in order
// 0..N-1 with out_col[r] equal to element out_idx of the r-th row, that the
// length tag follows the block, that in_ready is low exactly during the N
// read cycles, and that the first column is presented in the cycle right
// after the last row is taken.
module transpose_buffer_tb;
  import dct_pkg::*;

  localparam int N = 32;
  localparam int W = 16;
  localparam int BLOCKS = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, in_valid, in_ready, out_valid;
  dct_len_e             in_len, out_len;
  logic signed [W-1:0]  in_row  [N];
  logic signed [W-1:0]  out_col [N];
  logic [$clog2(N)-1:0] out_idx;
  int checks = 0, failures = 0;

  transpose_buffer #(.N(N), .W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  logic signed [W-1:0] blk [N][N];
  dct_len_e blk_len;
  int rows_in, cols_out, blocks_done, stalls, last_load_cyc, cyc;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_len = LEN4;
    for (int i = 0; i < N; i++) in_row[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rows_in = 0; cols_out = 0; blocks_done = 0; stalls = 0; cyc = 0;
    while (blocks_done < BLOCKS) begin
      @(negedge clk);
      cyc++;
      in_valid = ($urandom_range(0, 9) < 7);
      if (rows_in == 0) in_len = dct_len_e'($urandom_range(0, 3));
      for (int i = 0; i < N; i++) in_row[i] = W'($urandom);
      #1;
      if (in_valid && !in_ready) stalls++;
      chk(in_ready == !out_valid, "in_ready is the complement of out_valid");
      if (out_valid) begin
        chk(rows_in == N, "read phase only after a full block");
        chk(out_idx == cols_out[$clog2(N)-1:0], "column order");
        chk(out_len == blk_len, "length tag");
        if (cols_out == 0) chk(cyc == last_load_cyc + 1, "first column one cycle after last row");
        for (int r = 0; r < N; r++) chk(out_col[r] == blk[r][out_idx], "column data");
        cols_out++;
        if (cols_out == N) begin
          cols_out = 0; rows_in = 0; blocks_done++;
        end
      end else if (in_valid) begin
        if (rows_in == 0) blk_len = in_len;
        for (int i = 0; i < N; i++) blk[rows_in][i] = in_row[i];
        rows_in++;
        last_load_cyc = cyc;
      end
    end
    chk(stalls > 0, "a row was held off during a read phase");
    $display("blocks=%0d stalls=%0d", blocks_done, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
