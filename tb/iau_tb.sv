// iau_tb: checks the 32-point input adder unit against x[i] +/- x[N-1-i]
// for random and extreme 16-bit inputs.
module iau_tb;
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

  localparam int N = 32, W = 16;
  logic signed [W-1:0] x [N];
  logic signed [W:0]   a [N/2];
  logic signed [W:0]   b [N/2];
  iau #(.N(N), .W(W)) dut (.x(x), .a(a), .b(b));

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++)
        x[i] = (t == 0) ? -16'sh8000 : (t == 1) ? ((i < N/2) ? 16'sh7fff : -16'sh8000) : W'($urandom);
      #1;
      for (int i = 0; i < N / 2; i++) begin
        chk(longint'(a[i]) == longint'(x[i]) + longint'(x[N-1-i]), "sum");
        chk(longint'(b[i]) == longint'(x[i]) - longint'(x[N-1-i]), "difference");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
