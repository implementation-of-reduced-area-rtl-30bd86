// out_mux_asm_tb: checks the output mux assembly: adder-unit results when
// selected, sign-extended lower-unit results otherwise.
module out_mux_asm_tb;
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

  localparam int M = 16, OW = 28, LW = 27;
  logic sel;
  logic signed [OW-1:0] odd   [M];
  logic signed [LW-1:0] lower [M];
  logic signed [OW-1:0] y     [M];
  out_mux_asm #(.M(M), .OW(OW), .LW(LW)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel = t[0];
      for (int i = 0; i < M; i++) begin odd[i] = OW'($urandom); lower[i] = LW'($urandom); end
      #1;
      for (int i = 0; i < M; i++)
        chk(longint'(y[i]) == (sel ? longint'(odd[i]) : longint'(lower[i])), "selected lane");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
