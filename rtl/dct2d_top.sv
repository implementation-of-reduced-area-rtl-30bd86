// dct2d_top: 2-D integer DCT of N x N tiles (HEVC style, N = 32 by default)
// built from two reusable 1-D DCT units and one transposition buffer.
//
//   in_row -> reusable_dct (rows) -> reorder -> scale to MID_W
//          -> transpose_buffer (N x N) -> reusable_dct (columns) -> reorder
//          -> scale to OUT_W -> output register -> out_col
//
// A tile is N input rows of N samples. in_len picks the transform length
// L = 4, 8, 16 or 32 (<= N): the tile is then treated as (N/L)^2
// independent L x L blocks, each transformed in two dimensions; the row unit
// splits every row into N/L blocks and the column unit every column, and
// transposing the whole tile transposes every block in place.
//
// Interface: offer a row with in_valid; it is taken on a cycle with
// in_ready. Keep in_len constant over the N rows of a tile; it must not
// select a length above N (an assertion checks this). After the N-th
// row the buffer reads out N columns on N consecutive cycles; each leaves
// the output register one cycle later with out_valid, out_idx = u and
// out_col[v] = coefficient (vertical frequency v mod L, horizontal
// frequency u mod L) of block (v / L, u / L), i.e. the output is the
// coefficient matrix column by column. Timing: if the last row of a tile is
// taken at clock edge E, the first column is in the output register after
// edge E+1 and the others follow on consecutive cycles; in_ready is low
// during the N read cycles, so a tile takes 2N cycles.
//
// Scaling follows HEVC: after the row stage a rounding shift of
// log2(L) - 1 + (BIT_DEPTH - 8) with saturation to MID_W bits, after the
// column stage log2(L) + 6 with saturation to OUT_W bits. The chain of
// Fig.-2(a) style units (1-D DCT, transposition buffer, 1-D DCT) follows the
// document; scaling, widths, the handshake and the output order are this
// design's own choices.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int N         = 32,  // tile size and largest transform length
  parameter int IN_W      = 16,  // input sample width
  parameter int MID_W     = 16,  // transposition buffer word width
  parameter int OUT_W     = 16,  // output coefficient width
  parameter int BIT_DEPTH = 8    // video bit depth, sets the first shift
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  dct_len_e                in_len,
  input  logic signed [IN_W-1:0]  in_row [N],
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_idx,
  output dct_len_e                out_len,
  output logic signed [OUT_W-1:0] out_col [N]
);
  localparam int W1 = IN_W + $clog2(N) + 7;   // row stage result width
  localparam int W2 = MID_W + $clog2(N) + 7;  // column stage result width

  logic signed [W1-1:0]    y1_bus [N];
  logic signed [W1-1:0]    y1     [N];
  logic signed [MID_W-1:0] y1_s   [N];
  logic                    tb_valid;
  logic [$clog2(N)-1:0]    tb_idx;
  dct_len_e                tb_len;
  logic signed [MID_W-1:0] tb_col [N];
  logic signed [W2-1:0]    y2_bus [N];
  logic signed [W2-1:0]    y2     [N];
  logic signed [OUT_W-1:0] y2_s   [N];

  // Row transform.
  reusable_dct #(.N(N), .W(IN_W)) u_row_dct (.len(in_len), .x(in_row), .y(y1_bus));
  dct_reorder #(.N(N), .W(W1)) u_row_ord (.len(in_len), .y(y1_bus), .z(y1));
  dct_scale #(.N(N), .IW(W1), .OW(MID_W), .SH_OFS(BIT_DEPTH - 9)) u_row_scl (
    .len(in_len), .x(y1), .y(y1_s));

  // Transposition.
  transpose_buffer #(.N(N), .W(MID_W)) u_tbuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_len(in_len), .in_row(y1_s),
    .out_valid(tb_valid), .out_idx(tb_idx), .out_len(tb_len), .out_col(tb_col));

  // Column transform.
  reusable_dct #(.N(N), .W(MID_W)) u_col_dct (.len(tb_len), .x(tb_col), .y(y2_bus));
  dct_reorder #(.N(N), .W(W2)) u_col_ord (.len(tb_len), .y(y2_bus), .z(y2));
  dct_scale #(.N(N), .IW(W2), .OW(OUT_W), .SH_OFS(6)) u_col_scl (
    .len(tb_len), .x(y2), .y(y2_s));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= tb_valid;
    if (tb_valid) begin
      out_idx <= tb_idx;
      out_len <= tb_len;
      out_col <= y2_s;
    end
  end

  // The requested length must not exceed the tile size.
  property p_len_fits;
    @(posedge clk) disable iff (!rst_n) in_valid |-> (len_points(in_len) <= N);
  endproperty
  assert property (p_len_fits);
endmodule
