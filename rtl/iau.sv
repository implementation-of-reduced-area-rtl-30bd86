// iau: input adder unit of an N-point integer DCT stage.
//
// Folds the N input samples into N/2 butterfly sums and N/2 differences:
//   a[i] = x[i] + x[N-1-i]    (feeds the even half, an N/2-point DCT)
//   b[i] = x[i] - x[N-1-i]    (feeds the odd half, the shift-add unit)
// Purely combinational; the outputs are one bit wider than the inputs so no
// overflow is possible. The unit and its role follow the reusable DCT
// architecture; the widths are this design's own choice.
module iau #(
  parameter int N = 32,  // transform points
  parameter int W = 16   // input sample width
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W:0]   a [N/2],
  output logic signed [W:0]   b [N/2]
);
  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      a[i] = (W+1)'(x[i]) + (W+1)'(x[N-1-i]);
      b[i] = (W+1)'(x[i]) - (W+1)'(x[N-1-i]);
    end
  end
endmodule
