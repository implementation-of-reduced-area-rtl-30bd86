// oau: output adder unit of an N-point integer DCT stage.
//
// Adds the N/2 shift-add products of each odd output:
//   yo[k] = sum over i of p[k][i]        (= y(2k+1) of the N-point DCT)
// Combinational adder trees. OW must hold the sum of N/2 products; the
// default adds log2(N/2) bits of growth to the product width.
module oau #(
  parameter int N  = 32,  // transform points
  parameter int PW = 24,  // product width
  parameter int OW = PW + $clog2(N / 2)
) (
  input  logic signed [PW-1:0] p  [N/2][N/2],
  output logic signed [OW-1:0] yo [N/2]
);
  always_comb begin
    for (int k = 0; k < N / 2; k++) begin
      yo[k] = '0;
      for (int i = 0; i < N / 2; i++) yo[k] = yo[k] + OW'(p[k][i]);
    end
  end
endmodule
