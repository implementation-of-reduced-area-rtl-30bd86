// dct_scale_tb: checks the inter-stage rounding shift and saturation for
// both stage offsets used by the 2-D transform and every transform length,
// with random values and values around the saturation limits.
module dct_scale_tb;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int N = 8, IW = 28, OW = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dct_len_e             len;
  logic signed [IW-1:0] x  [N];
  logic signed [OW-1:0] y1 [N];
  logic signed [OW-1:0] y2 [N];

  dct_scale #(.N(N), .IW(IW), .OW(OW), .SH_OFS(-1)) dut_row (.len(len), .x(x), .y(y1));
  dct_scale #(.N(N), .IW(IW), .OW(OW), .SH_OFS(6))  dut_col (.len(len), .x(x), .y(y2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      int lg;
      lg = m + 2;
      len = dct_len_e'(m);
      for (int t = 0; t < 200; t++) begin
        for (int i = 0; i < N; i++)
          case (t % 4)
            0: x[i] = IW'($urandom);
            1: x[i] = IW'(longint'(32767) <<< (lg - 1)) + IW'($urandom_range(0, 7)) - IW'(4);
            2: x[i] = -IW'(longint'(32768) <<< (lg - 1)) + IW'($urandom_range(0, 7)) - IW'(4);
            default: x[i] = IW'($signed(16'($urandom)));
          endcase
        #1;
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (longint'(y1[i]) != ref_scale(longint'(x[i]), lg - 1, OW)) failures++;
          if (longint'(y2[i]) != ref_scale(longint'(x[i]), lg + 6, OW)) failures++;
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
