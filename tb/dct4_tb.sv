// dct4_tb: checks the 4-point integer DCT against the reference
// 4-point basis (64, 83, 36) for random and extreme 16-bit inputs.
module dct4_tb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  localparam int W = 16, OW = W + 9;
  logic signed [W-1:0]  x [4];
  logic signed [OW-1:0] y [4];
  dct4 #(.W(W)) dut (.x(x), .y(y));

  initial begin
    longint xs [] = new[4];
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) begin
        x[i] = (t < 16) ? (((t >> i) & 1) != 0 ? 16'sh7fff : -16'sh8000) : W'($urandom);
        xs[i] = longint'(x[i]);
      end
      #1;
      for (int j = 0; j < 4; j++) chk(longint'(y[j]) == ref_dct(4, j, xs, 0), "coefficient");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
