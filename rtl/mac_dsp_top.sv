// mac_dsp_top: the two datapaths of this design, side by side.
//
//  * ffp_*  : the four-function arithmetic pipeline (multiply, divide,
//             square, square root on 3-bit operands). Combinational, no
//             clock; see ffp_pipeline for the operand conventions.
//  * lift_* : the parallel-MAC datapath of one lifting step of a wavelet
//             transform (MAC array, R chain, MUX, ROUND, SUB, programmable
//             delay). Synchronous to clk with asynchronous active-low reset;
//             see lifting_mac_array for streams and timing.
//
// The two are not connected: the arithmetic pipeline is offered as a MAC
// building block, but its 3 x 2-bit multiplier has no accumulator and cannot
// serve the 16-bit MAC units of the lifting datapath, so each keeps its own
// ports. The image memory that would feed the lifting streams is outside
// this design; its streams are the lift_x / lift_tok / lift_d ports.
module mac_dsp_top
  import lift_pkg::*;
#(
  parameter int unsigned N_MAC     = lift_pkg::NMAC,
  parameter int unsigned DELAY_MAX = lift_pkg::MAX_DELAY,
  localparam int unsigned TAP_W = $clog2(N_MAC + 1),
  localparam int unsigned DLY_W = $clog2(DELAY_MAX + 1),
  localparam int unsigned SH_W  = $clog2(ACC_W),
  localparam int unsigned F_W   = ACC_W,
  localparam int unsigned Y_W   = ((DATA_W > F_W) ? DATA_W : F_W) + 1
) (
  // four-function arithmetic pipeline
  input  logic [5:0]               ffp_a,
  input  logic [2:0]               ffp_b,
  input  logic [2:0]               ffp_c,
  input  logic [2:0]               ffp_p,
  input  logic                     ffp_x,
  output logic [6:0]               ffp_s,
  output logic [2:0]               ffp_ck,
  // lifting datapath
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     lift_en,
  input  logic [TAP_W-1:0]         lift_taps,
  input  logic [DLY_W-1:0]         lift_delay,
  input  logic [SH_W-1:0]          lift_frac,
  input  logic signed [DATA_W-1:0] lift_x,
  input  coef_tok_t                lift_tok,
  input  logic signed [DATA_W-1:0] lift_d,
  output logic signed [Y_W-1:0]    lift_y,
  output logic signed [F_W-1:0]    lift_filt,
  output logic [$clog2(N_MAC)-1:0] lift_mac_idx,
  output logic                     lift_y_valid
);
  ffp_pipeline u_ffp (
    .a(ffp_a), .b(ffp_b), .c(ffp_c), .p(ffp_p), .x(ffp_x), .s(ffp_s), .ck(ffp_ck)
  );

  lifting_mac_array #(.N(N_MAC), .MAXD(DELAY_MAX)) u_lift (
    .clk(clk), .rst_n(rst_n), .en(lift_en), .taps(lift_taps), .delay(lift_delay), .frac(lift_frac),
    .x_in(lift_x), .tok_in(lift_tok), .d_in(lift_d),
    .y(lift_y), .filt(lift_filt), .mac_idx(lift_mac_idx), .y_valid(lift_y_valid)
  );
endmodule
