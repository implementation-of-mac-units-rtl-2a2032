// prog_delay: programmable delay buffer. dout is din as it was 'delay'
// enabled cycles earlier (delay = 0 passes din straight through, up to
// MAX_DELAY). A shift register of MAX_DELAY words advances when en is high;
// a multiplexer picks the tap. It lines the stream being corrected up with
// the filter output of the MAC array so that SUB combines matching samples.
// Reset clears the register. The depth and the shift-register structure are
// this design's choices.
module prog_delay #(
  parameter int unsigned W         = 16,
  parameter int unsigned MAX_DELAY = 16,
  localparam int unsigned DLY_W    = $clog2(MAX_DELAY + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [DLY_W-1:0] delay,
  input  logic [W-1:0]     din,
  output logic [W-1:0]     dout
);
  logic [W-1:0] sr [MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < MAX_DELAY; i++) sr[i] <= sr[i-1];
    end
  end

  localparam int unsigned IDX_W = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1;
  logic [DLY_W-1:0] tap;

  // delays above MAX_DELAY are clamped to MAX_DELAY
  always_comb begin
    tap = (delay > DLY_W'(MAX_DELAY)) ? DLY_W'(MAX_DELAY) : delay;
    if (tap == '0) dout = din;
    else           dout = sr[IDX_W'(tap - 1'b1)];
  end
endmodule
