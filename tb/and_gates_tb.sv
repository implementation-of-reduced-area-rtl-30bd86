// and_gates_tb: checks that the AND-gate row passes the samples when
// enabled and outputs zeros when disabled.
module and_gates_tb;
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

  localparam int M = 32, W = 16;
  logic en;
  logic signed [W-1:0] x [M];
  logic signed [W-1:0] y [M];
  and_gates #(.M(M), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      en = t[0];
      for (int i = 0; i < M; i++) x[i] = W'($urandom) | 16'h0001;
      #1;
      for (int i = 0; i < M; i++) chk(y[i] == (en ? x[i] : '0), "gated sample");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
