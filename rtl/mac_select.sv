// mac_select: output multiplexer of the parallel MAC array.
//
// Of the N MAC results it forwards the one whose valid flag is set. Because
// the MAC windows are staggered by one cycle, at most one MAC finishes per
// cycle; an assertion checks that. sel is the index of the chosen MAC, vout
// tells whether any was chosen. Combinational. Driving the select from the
// MACs' own valid flags is this design's choice.
module mac_select #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 34
) (
  input  logic [W-1:0]         din [N],
  input  logic [N-1:0]         vin,
  output logic [W-1:0]         dout,
  output logic                 vout,
  output logic [$clog2(N)-1:0] sel
);
  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++)
      if (vin[i]) sel = ($clog2(N))'(i);
    dout = din[sel];
    vout = |vin;
  end

  always_comb begin
    assert (!$isunknown(vin) -> $onehot0(vin))
      else $error("mac_select: more than one MAC result at once (%b)", vin);
  end
endmodule
