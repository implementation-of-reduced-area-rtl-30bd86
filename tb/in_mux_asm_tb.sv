// in_mux_asm_tb: checks the input mux assembly: butterfly sums when
// selected, sign-extended raw samples otherwise.
module in_mux_asm_tb;
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

  localparam int M = 16, W = 16;
  logic sel;
  logic signed [W:0]   a [M];
  logic signed [W-1:0] x [M];
  logic signed [W:0]   u [M];
  in_mux_asm #(.M(M), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel = t[0];
      for (int i = 0; i < M; i++) begin a[i] = (W+1)'($urandom); x[i] = W'($urandom); end
      #1;
      for (int i = 0; i < M; i++)
        chk(longint'(u[i]) == (sel ? longint'(a[i]) : longint'(x[i])), "selected lane");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
