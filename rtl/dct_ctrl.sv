// dct_ctrl: control unit of one level of the reusable N-point DCT.
//
// Decodes the requested transform length into the select and enable lines
// of the level. When the requested length is at least N the level runs as
// one N-point DCT ("full"): the first-stage AND gates pass the input to the
// input adder unit, the input mux assembly feeds the butterfly sums to the
// upper N/2-point unit, the second-stage AND gates block the lower
// N/2-point unit and the output mux assembly takes the odd outputs from the
// output adder unit. Otherwise the level splits into two independent
// N/2-point units: the roles of the gates and muxes swap. Combinational.
// That a control unit drives these lines is the document's; the decode is
// this design's own.
module dct_ctrl
  import dct_pkg::*;
#(
  parameter int N = 32
) (
  input  dct_len_e len,
  output logic     en_and1,   // first-stage AND gates (to the IAU)
  output logic     en_and2,   // second-stage AND gates (to the lower unit)
  output logic     sel_in,    // input mux: 1 = butterfly sums, 0 = x[0..N/2-1]
  output logic     sel_out    // output mux: 1 = OAU, 0 = lower N/2-point unit
);
  localparam int LOG2N = $clog2(N);
  logic full;
  always_comb begin
    full    = (int'(len) + 2) >= LOG2N;
    en_and1 = full;
    en_and2 = !full;
    sel_in  = full;
    sel_out = full;
  end
endmodule
