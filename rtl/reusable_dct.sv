// reusable_dct: N-point reusable integer DCT (N = 4, 8, 16 or 32).
//
// One unit computes, in one combinational pass, either one N-point DCT or
// N/L independent L-point DCTs of consecutive L-sample blocks of x, for any
// L = 4 .. N selected by len. So it always delivers N coefficients per pass
// whatever the transform length.
//
// Level structure (N > 4), recursive down to dct4:
//   full length:  AND gates 1 -> input adder unit -> a[] (sums), b[] (diffs)
//                 a[]  -> input mux -> upper N/2-point unit -> y(0),y(2),...
//                 b[]  -> shift-add unit -> output adder unit
//                      -> output mux -> y(1),y(3),...
//   split (L<N):  x[0..N/2-1] -> input mux -> upper N/2-point unit (even lines)
//                 x[N/2..N-1] -> AND gates 2 -> lower N/2-point unit
//                      -> output mux -> odd lines
// The control unit (dct_ctrl) sets the gates and muxes from len.
//
// Output order: at full length y[k] is coefficient k. At L < N the upper
// unit's results sit on the even lines and the lower unit's on the odd
// lines, at every level, so coefficient j of block B appears on line
// j*(N/L) + bitreverse(B) (dct_pkg::bus_pos). Output width OW = W + log2(N)
// + 7 holds every result without overflow. No scaling or rounding is done.
//
// The level structure follows the reusable architecture of the document;
// the line order in split mode follows its figure (upper unit to even
// outputs, output mux to odd outputs); widths and the len encoding are this
// design's own. The 4-point leaf has a single length and leaves len unused.
// Linted on its own as the top module, Verilator does not expand the unit's
// instances of itself and reports y_even and y_low as undriven; inside any
// parent (dct2d_top, a testbench) the recursion is expanded and they are
// driven.
module reusable_dct
  import dct_pkg::*;
#(
  parameter int N  = 32,
  parameter int W  = 16,
  parameter int OW = W + $clog2(N) + 7
) (
  input  dct_len_e            len,
  input  logic signed [W-1:0]  x [N],
  output logic signed [OW-1:0] y [N]
);
  if (N == 4) begin : g_leaf
    dct4 #(.W(W), .OW(OW)) u_dct4 (.x(x), .y(y));
  end else begin : g_level
    localparam int H   = N / 2;
    localparam int HLW = W + $clog2(H) + 7;   // lower unit result width

    logic en_and1, en_and2, sel_in, sel_out;
    logic signed [W-1:0]   xg     [N];
    logic signed [W-1:0]   x_lo   [H];
    logic signed [W-1:0]   x_hi   [H];
    logic signed [W-1:0]   x_hi_g [H];
    logic signed [W:0]     a      [H];
    logic signed [W:0]     b      [H];
    logic signed [W:0]     u      [H];
    logic signed [W+7:0]   p      [H][H];
    logic signed [OW-1:0]  yo     [H];
    logic signed [OW-1:0]  y_even [H];
    logic signed [HLW-1:0] y_low  [H];
    logic signed [OW-1:0]  y_odd  [H];

    always_comb
      for (int i = 0; i < H; i++) begin
        x_lo[i] = x[i];
        x_hi[i] = x[H + i];
      end

    dct_ctrl #(.N(N)) u_ctrl (
      .len(len), .en_and1(en_and1), .en_and2(en_and2),
      .sel_in(sel_in), .sel_out(sel_out));

    and_gates #(.M(N), .W(W)) u_and1 (.en(en_and1), .x(x), .y(xg));
    iau #(.N(N), .W(W)) u_iau (.x(xg), .a(a), .b(b));
    in_mux_asm #(.M(H), .W(W)) u_imux (.sel(sel_in), .a(a), .x(x_lo), .u(u));
    reusable_dct #(.N(H), .W(W + 1), .OW(OW)) u_upper (
      .len(len), .x(u), .y(y_even));

    and_gates #(.M(H), .W(W)) u_and2 (.en(en_and2), .x(x_hi), .y(x_hi_g));
    reusable_dct #(.N(H), .W(W), .OW(HLW)) u_lower (
      .len(len), .x(x_hi_g), .y(y_low));

    sau #(.N(N), .W(W + 1), .PW(W + 8)) u_sau (.b(b), .p(p));
    oau #(.N(N), .PW(W + 8), .OW(OW)) u_oau (.p(p), .yo(yo));
    out_mux_asm #(.M(H), .OW(OW), .LW(HLW)) u_omux (
      .sel(sel_out), .odd(yo), .lower(y_low), .y(y_odd));

    always_comb
      for (int k = 0; k < H; k++) begin
        y[2 * k]     = y_even[k];
        y[2 * k + 1] = y_odd[k];
      end
  end
endmodule
