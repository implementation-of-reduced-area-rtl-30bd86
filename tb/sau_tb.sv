// sau_tb: checks the 32-point shift-add unit: every product p[k][i] must
// equal b[i] times the reference odd-row basis value C32[2k+1][i].
module sau_tb;
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

  localparam int N = 32, W = 17, PW = W + 7;
  logic signed [W-1:0]  b [N/2];
  logic signed [PW-1:0] p [N/2][N/2];
  sau #(.N(N), .W(W)) dut (.b(b), .p(p));

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N / 2; i++)
        b[i] = (t == 0) ? -17'sh10000 : (t == 1) ? 17'shffff : W'($urandom);
      #1;
      for (int k = 0; k < N / 2; k++)
        for (int i = 0; i < N / 2; i++)
          chk(longint'(p[k][i]) == longint'(b[i]) * ref_coef(N, 2 * k + 1, i), "product");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
