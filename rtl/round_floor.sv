// round_floor: the ROUND unit. Turns the fixed-point filter sum into an
// integer with the floor function, dout = floor(din / 2^shift). For two's
// complement this is an arithmetic right shift, so negative sums go towards
// minus infinity, as lifting requires for a lossless inverse. The floor is
// the architecture's; taking the number of fraction bits as a run-time
// input is this design's choice, so one datapath can serve lifting steps
// whose coefficients are scaled differently (Q2.14 for irrational
// coefficients, or small integers with a shift of 1 or 2 for the 5/3
// filter). The output keeps the full input width. Combinational.
module round_floor #(
  parameter int unsigned IN_W = 34,
  localparam int unsigned SH_W = $clog2(IN_W)
) (
  input  logic signed [IN_W-1:0] din,
  input  logic [SH_W-1:0]        shift,
  output logic signed [IN_W-1:0] dout
);
  assign dout = din >>> shift;
endmodule
