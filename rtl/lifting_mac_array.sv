// lifting_mac_array: parallel multiply-accumulate datapath for one lifting
// step of a discrete wavelet transform.
//
// Three synchronous input streams advance together whenever en is high:
//   x_in   samples that are filtered; broadcast to every MAC unit
//   tok_in the filter coefficients c[0..n-1], repeated, with 'first' on c[0]
//          and 'last' on c[n-1]; it runs through a chain of R registers so
//          that MAC j sees it j cycles late
//   d_in   samples to be corrected; they pass through the programmable delay
// MAC j (j < taps) thus accumulates windows that start j samples later than
// MAC 0's, each computing f[i] = sum_k c[k] x[i+k] for every i with
// i mod taps = j. All windows of one step together give one filter value per
// cycle. The MUX picks the MAC that just finished, ROUND takes the floor of
// the fixed-point sum (frac = number of fraction bits of the coefficients,
// normally lift_pkg::FRAC_W) and SUB forms y = d_delayed - floor(f), registered.
//
// Timing (counted in enabled cycles, index 0 = first sample): f[i] is ready
// in its MAC after the sample x[i+taps-1] (taps cycles after MAC 0 started,
// for i = 0), and y for it leaves the output register on the next enabled
// edge, one output per enabled cycle from then on. y_valid is high for one
// clock per output. With delay = taps the output pairs f[i] with d[i].
// taps must stay constant while tokens are in the chain; flush it with
// taps+1 invalid tokens before changing it.
//
// The MAC array, R chain, MUX, ROUND, SUB and programmable delay are the
// architecture's blocks. The token markers, the stream enable, the widths and
// the valid-driven MUX select are this design's choices.
module lifting_mac_array
  import lift_pkg::*;
#(
  parameter int unsigned N      = lift_pkg::NMAC,
  parameter int unsigned MAXD   = lift_pkg::MAX_DELAY,
  localparam int unsigned TAP_W = $clog2(N + 1),
  localparam int unsigned DLY_W = $clog2(MAXD + 1),
  localparam int unsigned SH_W  = $clog2(ACC_W),
  localparam int unsigned F_W   = ACC_W,
  localparam int unsigned Y_W   = ((DATA_W > F_W) ? DATA_W : F_W) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [TAP_W-1:0]         taps,
  input  logic [DLY_W-1:0]         delay,
  input  logic [SH_W-1:0]          frac,
  input  logic signed [DATA_W-1:0] x_in,
  input  coef_tok_t                tok_in,
  input  logic signed [DATA_W-1:0] d_in,
  output logic signed [Y_W-1:0]    y,
  output logic signed [F_W-1:0]    filt,
  output logic [$clog2(N)-1:0]     mac_idx,
  output logic                     y_valid
);
  coef_tok_t                tap_tok [N];
  logic [ACC_W-1:0]         res     [N];
  logic [N-1:0]             res_v;
  logic [ACC_W-1:0]         sel_sum;
  logic                     sel_v;
  logic [$clog2(N)-1:0]     sel_idx;
  logic signed [F_W-1:0]    rounded;
  logic signed [DATA_W-1:0] d_dly;
  logic signed [Y_W-1:0]    diff;

  coef_delay_line #(.N(N)) u_chain (
    .clk(clk), .rst_n(rst_n), .en(en), .tok_in(tok_in), .taps(tap_tok)
  );

  for (genvar j = 0; j < N; j++) begin : g_mac
    logic signed [ACC_W-1:0] r;
    mac_unit #(.DW(DATA_W), .AW(ACC_W)) u_mac (
      .clk(clk), .rst_n(rst_n), .en(en), .active(TAP_W'(j) < taps),
      .x(x_in), .tok(tap_tok[j]), .res(r), .res_valid(res_v[j])
    );
    assign res[j] = r;
  end

  mac_select #(.N(N), .W(ACC_W)) u_mux (
    .din(res), .vin(res_v), .dout(sel_sum), .vout(sel_v), .sel(sel_idx)
  );

  round_floor #(.IN_W(ACC_W)) u_round (
    .din(sel_sum), .shift(frac), .dout(rounded)
  );

  prog_delay #(.W(DATA_W), .MAX_DELAY(MAXD)) u_delay (
    .clk(clk), .rst_n(rst_n), .en(en), .delay(delay), .din(d_in), .dout(d_dly)
  );

  lift_sub #(.A_W(DATA_W), .B_W(F_W)) u_sub (
    .a(d_dly), .b(rounded), .y(diff)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      filt    <= '0;
      mac_idx <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en & sel_v;
      if (en & sel_v) begin
        y       <= diff;
        filt    <= rounded;
        mac_idx <= sel_idx;
      end
    end
  end
endmodule
