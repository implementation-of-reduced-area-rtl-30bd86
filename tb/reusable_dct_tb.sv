// reusable_dct_tb: checks the 32-point reusable DCT at every length.
//
// For L = 4, 8, 16 and 32 it applies random and extreme input vectors,
// computes each block's L-point transform with the reference model and
// compares every coefficient on the output line where the unit's split
// order puts it. A second, 8-point unit is driven with the ramp 1..8 and
// random vectors at lengths 8 and 4 (the 8-point instance of the
// architecture). The units are combinational: outputs are sampled 1 time
// unit after the inputs change.
module reusable_dct_tb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int N  = 32;
  localparam int W  = 16;
  localparam int OW = W + $clog2(N) + 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  dct_len_e            len;
  logic signed [W-1:0]  x [N];
  logic signed [OW-1:0] y [N];
  int checks = 0, failures = 0;

  reusable_dct #(.N(N), .W(W)) dut (.len(len), .x(x), .y(y));

  dct_len_e            len8;
  logic signed [W-1:0]  x8 [8];
  logic signed [W+9:0]  y8 [8];
  reusable_dct #(.N(8), .W(W)) dut8 (.len(len8), .x(x8), .y(y8));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    longint xs [] = new[N];
    int l = len_points(len);
    for (int i = 0; i < N; i++) xs[i] = longint'(x[i]);
    #1;
    for (int blk = 0; blk < N / l; blk++)
      for (int j = 0; j < l; j++) begin
        longint exp_v = ref_dct(l, j, xs, blk * l);
        int     ln    = ref_line(N, l, blk, j);
        checks++;
        if (longint'(y[ln]) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("mismatch L=%0d blk=%0d j=%0d line=%0d got=%0d exp=%0d",
                     l, blk, j, ln, y[ln], exp_v);
        end
      end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) begin
      len = dct_len_e'(m);
      for (int t = 0; t < 60; t++) begin
        for (int i = 0; i < N; i++)
          case (t)
            0:       x[i] = 16'sh7fff;
            1:       x[i] = -16'sh8000;
            2:       x[i] = (i % 2 == 0) ? 16'sh7fff : -16'sh8000;
            3:       x[i] = (i < N / 2) ? -16'sh8000 : 16'sh7fff;
            default: x[i] = W'($urandom);
          endcase
        check_vec();
        @(posedge clk);
      end
    end
    for (int m = 0; m < 2; m++)
      for (int t = 0; t < 50; t++) begin
        longint xs [] = new[8];
        int l;
        len8 = dct_len_e'(m);
        l = len_points(len8);
        for (int i = 0; i < 8; i++) begin
          x8[i] = (t == 0) ? W'(i + 1) : W'($urandom);
          xs[i] = longint'(x8[i]);
        end
        #1;
        for (int blk = 0; blk < 8 / l; blk++)
          for (int j = 0; j < l; j++) begin
            checks++;
            if (longint'(y8[ref_line(8, l, blk, j)]) != ref_dct(l, j, xs, blk * l)) failures++;
          end
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
