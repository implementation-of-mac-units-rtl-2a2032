// coef_delay_line: the chain of R registers that feeds the MAC units.
//
// taps[0] is the coefficient stream itself (for the first MAC); taps[j] is
// the stream delayed by j enabled clock cycles, one R register per step. The
// j-th MAC therefore sees the same coefficient sequence one cycle after the
// (j-1)-th, which staggers the MAC windows by one sample so that their
// results come out on consecutive cycles.
//
// Registers advance only when en is high; reset clears the token valid bits.
module coef_delay_line
  import lift_pkg::*;
#(
  parameter int unsigned N = lift_pkg::NMAC
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  coef_tok_t tok_in,
  output coef_tok_t taps [N]
);
  coef_tok_t r [N];   // r[0] unused: tap 0 is undelayed

  assign taps[0] = tok_in;
  assign r[0]    = tok_in;

  for (genvar j = 1; j < N; j++) begin : g_r
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  r[j] <= '0;
      else if (en) r[j] <= r[j-1];
    end
    assign taps[j] = r[j];
  end
endmodule
