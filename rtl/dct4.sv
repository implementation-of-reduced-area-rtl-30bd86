// dct4: 4-point integer DCT, the basic building block of the reusable
// architecture.
//
// Built from the same three units as every larger stage: the input adder
// unit folds x into a0,a1 (sums) and b0,b1 (differences); the even outputs
// are the 2-point transform of the sums, y0 = 64(a0+a1) and y2 = 64(a0-a1),
// formed with shifts; the shift-add and output adder units form
//   y1 = 83 b0 + 36 b1,   y3 = 36 b0 - 83 b1.
// Combinational, OW = W + 9 bits (W + log2(4) + 7). The IAU/SAU/OAU
// structure follows the document; the widths are this design's own choice.
module dct4 #(
  parameter int W  = 16,
  parameter int OW = W + 9
) (
  input  logic signed [W-1:0]  x [4],
  output logic signed [OW-1:0] y [4]
);
  logic signed [W:0]   a  [2];
  logic signed [W:0]   b  [2];
  logic signed [W+7:0] p  [2][2];
  logic signed [W+8:0] yo [2];

  iau #(.N(4), .W(W)) u_iau (.x(x), .a(a), .b(b));
  sau #(.N(4), .W(W + 1)) u_sau (.b(b), .p(p));
  oau #(.N(4), .PW(W + 8), .OW(W + 9)) u_oau (.p(p), .yo(yo));

  always_comb begin
    y[0] = (OW'(a[0]) + OW'(a[1])) <<< 6;
    y[2] = (OW'(a[0]) - OW'(a[1])) <<< 6;
    y[1] = OW'(yo[0]);
    y[3] = OW'(yo[1]);
  end
endmodule
