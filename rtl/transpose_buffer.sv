// transpose_buffer: N x N transposition buffer driven by an up counter.
//
// Storage is N register lines, one per element position of a row. Each
// accepted input row shifts every line by one register (line i takes
// in_row[i] at its head), so after N rows register k of line i holds
// element i of row N-1-k. N output multiplexers, one per register position,
// all take their select from the counter and pick the same line m: together
// they present element m of every stored row, i.e. column m of the block.
// No enable inputs and no clock gating are used; the counter alone sequences
// loading and reading.
//
// Counter cnt has log2(N)+1 bits and counts up, wrapping:
//   cnt = 0 .. N-1   load phase: in_ready = 1, a row is shifted in on every
//                    cycle with in_valid (the counter waits otherwise)
//   cnt = N .. 2N-1  read phase: in_ready = 0, out_valid = 1, the lines hold
//                    and out_col is column out_idx = cnt - N, one per cycle
// out_col[r] is element out_idx of the r-th row loaded. in_len is captured
// with the first row of a block and returned as out_len for its columns.
// The block therefore leaves one cycle after its last row arrives, and the
// buffer takes a new block every 2N cycles at the earliest.
//
// The counter, the register lines, the counter-driven output multiplexers
// and the absence of AND gates follow the document. Holding the lines during
// the read phase, N registers per line and one shared select for all
// multiplexers are this design's own reading; a synchronous reset clears the counter only.
module transpose_buffer
  import dct_pkg::*;
#(
  parameter int N = 32,  // block size (rows and columns)
  parameter int W = 16   // element width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  dct_len_e             in_len,
  input  logic signed [W-1:0]  in_row  [N],
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output dct_len_e             out_len,
  output logic signed [W-1:0]  out_col [N]
);
  localparam int CW = $clog2(N);

  logic [CW:0]         cnt;
  logic signed [W-1:0] line [N][N];   // line[i][k]: register k of line i
  dct_len_e            len_q;
  logic                load;

  assign in_ready = !cnt[CW];
  assign load     = in_ready && in_valid;

  always_ff @(posedge clk)
    if (!rst_n) cnt <= '0;
    else if (load || cnt[CW]) cnt <= cnt + 1'b1;

  always_ff @(posedge clk)
    if (load) begin
      for (int i = 0; i < N; i++) begin
        line[i][0] <= in_row[i];
        for (int k = 1; k < N; k++) line[i][k] <= line[i][k-1];
      end
      if (cnt[CW-1:0] == '0) len_q <= in_len;
    end

  assign out_valid = cnt[CW];
  assign out_idx   = cnt[CW-1:0];
  assign out_len   = len_q;

  // One multiplexer per register position k; row r sits at position N-1-r.
  always_comb
    for (int r = 0; r < N; r++) out_col[r] = line[out_idx][N-1-r];

  // A row offered while the block is being read out is not taken.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) cnt[CW] |-> !load;
  endproperty
  assert property (p_no_overrun);
endmodule
