// dct_reorder_tb: checks that the reorder stage maps every output line of a
// 32-point reusable unit to natural order (lane B*L + j = coefficient j of
// block B) at every length, using the recursive line order of the reference
// model.
module dct_reorder_tb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int N = 32, W = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dct_len_e            len;
  logic signed [W-1:0] y [N];
  logic signed [W-1:0] z [N];

  dct_reorder #(.N(N), .W(W)) dut (.len(len), .y(y), .z(z));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      int l;
      len = dct_len_e'(m);
      l = len_points(len);
      for (int t = 0; t < 20; t++) begin
        for (int i = 0; i < N; i++) y[i] = (t == 0) ? W'(i) : W'($urandom);
        #1;
        for (int q = 0; q < N; q++) begin
          checks++;
          if (z[q] != y[ref_line(N, l, q / l, q % l)]) failures++;
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
