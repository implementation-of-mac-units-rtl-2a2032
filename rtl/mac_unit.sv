// mac_unit: multiply-accumulate unit of the parallel lifting datapath.
//
// Each enabled cycle with a valid coefficient token it multiplies the
// broadcast sample x by the token's coefficient. A token marked 'first'
// restarts the accumulator with that product; other tokens add to it. On a
// token marked 'last' the completed sum is copied to res and res_valid is
// set for one enabled cycle (it holds while en is low). A unit with
// active = 0 (not used by the current lifting step) ignores its tokens.
//
// Timing: res appears on the enabled clock edge that consumes the 'last'
// token, so a window of n tokens gives its sum n cycles after the 'first'.
// Reset (rst_n, asynchronous, active low) clears the accumulator and flags.
// The multiply-accumulate function is the architecture's; the token
// markers, widths and reset are this design's choices.
module mac_unit
  import lift_pkg::*;
#(
  parameter int unsigned DW = lift_pkg::DATA_W,
  parameter int unsigned AW = lift_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 active,
  input  logic signed [DW-1:0] x,
  input  coef_tok_t            tok,
  output logic signed [AW-1:0] res,
  output logic                 res_valid
);
  logic signed [AW-1:0] acc, prod, acc_next;

  always_comb begin
    prod     = AW'(x) * AW'(tok.coef);
    acc_next = tok.first ? prod : acc + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else if (en) begin
      res_valid <= 1'b0;
      if (active && tok.valid) begin
        acc <= acc_next;
        if (tok.last) begin
          res       <= acc_next;
          res_valid <= 1'b1;
        end
      end
    end
  end
endmodule
