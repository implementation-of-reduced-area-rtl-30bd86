// dct_ctrl_tb: checks the control unit decode of a 16-point level for
// every transform length: full length for 16 and 32, split for 4 and 8.
module dct_ctrl_tb;
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

  localparam int N = 16;
  dct_len_e len;
  logic en_and1, en_and2, sel_in, sel_out;
  dct_ctrl #(.N(N)) dut (.*);

  initial begin
    for (int m = 0; m < 4; m++) begin
      bit full;
      len = dct_len_e'(m);
      full = len_points(len) >= N;
      #1;
      chk(en_and1 == full, "first-stage AND enable");
      chk(en_and2 == !full, "second-stage AND enable");
      chk(sel_in == full, "input mux select");
      chk(sel_out == full, "output mux select");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
