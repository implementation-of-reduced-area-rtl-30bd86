// oau_tb: checks the 32-point output adder unit: each yo[k] must be the sum
// of the 16 products of row k, for random and extreme products.
module oau_tb;
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

  localparam int N = 32, PW = 24, OW = PW + 4;
  logic signed [PW-1:0] p  [N/2][N/2];
  logic signed [OW-1:0] yo [N/2];
  oau #(.N(N), .PW(PW)) dut (.p(p), .yo(yo));

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < N / 2; k++)
        for (int i = 0; i < N / 2; i++)
          p[k][i] = (t == 0) ? {1'b1, {(PW-1){1'b0}}} : (t == 1) ? {1'b0, {(PW-1){1'b1}}} : PW'($urandom);
      #1;
      for (int k = 0; k < N / 2; k++) begin
        longint s;
        s = 0;
        for (int i = 0; i < N / 2; i++) s += longint'(p[k][i]);
        chk(longint'(yo[k]) == s, "sum");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
