// tb_mac_dsp_top: end-to-end test of the whole design at its default
// parameters.
//
// Lifting datapath: one signal of 2L+6 samples is split into its even and
// odd samples and run through three predict steps of wavelet lifting:
//   5/3        d[i] = x[2i+1] - floor((x[2i] + x[2i+2]) / 2)            taps 2, delay 2
//   9/7 alpha  d[i] = x[2i+1] - floor(alpha (x[2i] + x[2i+2])), alpha = -1.586134342
//              quantised to round(alpha 2^14) = -25987                  taps 2, delay 2
//   DD 4-tap   d[i] = x[2i+3] - floor((-x[2i] + 9x[2i+2] + 9x[2i+4] - x[2i+6]) / 16)
//                                                                       taps 4, delay 3
// The references are written over the original signal, not the streams.
// Random stall cycles are mixed in; each step is flushed before the next.
// Every output is checked, and so is the latency: a step with n taps gives
// its first output n+1 enabled cycles after its first sample.
//
// Arithmetic pipeline: the published result table plus all products,
// squares, valid divisions and square roots.
//
// Each mechanism must happen at least once: stalls, a change of filter
// length, two different programmable delays, a negative floor, output from
// each of the four MAC units, and each of the four arithmetic operations.
module tb_mac_dsp_top;
  import lift_pkg::*;
  localparam int unsigned F_W = ACC_W;
  localparam int unsigned Y_W = ((DATA_W > F_W) ? DATA_W : F_W) + 1;
  localparam int L = 64;

  logic [5:0] ffp_a;
  logic [2:0] ffp_b, ffp_c, ffp_p, ffp_ck;
  logic       ffp_x;
  logic [6:0] ffp_s;
  logic clk = 0, rst_n = 0, lift_en = 0;
  logic [$clog2(NMAC+1)-1:0] lift_taps;
  logic [$clog2(MAX_DELAY+1)-1:0] lift_delay;
  logic [$clog2(ACC_W)-1:0] lift_frac;
  logic signed [DATA_W-1:0] lift_x, lift_d;
  coef_tok_t lift_tok;
  logic signed [Y_W-1:0] lift_y;
  logic signed [F_W-1:0] lift_filt;
  logic [$clog2(NMAC)-1:0] lift_mac_idx;
  logic lift_y_valid;

  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_switch = 0, n_neg = 0, n_mul = 0, n_sqr = 0, n_div = 0, n_sqrt = 0;
  int mac_used [NMAC];
  int delays_seen [$];
  logic signed [DATA_W-1:0] sig [2*L+6];

  mac_dsp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv(input longint v, input longint m);
    longint q;
    q = v / m;
    if (v % m != 0 && v < 0) q -= 1;
    return q;
  endfunction

  // reference output i of each lifting step, from the interleaved signal
  function automatic longint ref_out(input int step, input int i);
    case (step)
      0: return longint'(sig[2*i+1]) - floordiv(longint'(sig[2*i]) + longint'(sig[2*i+2]), 2);
      1: return longint'(sig[2*i+1]) - floordiv(-25987 * (longint'(sig[2*i]) + longint'(sig[2*i+2])), 16384);
      default: return longint'(sig[2*i+3]) - floordiv(-longint'(sig[2*i]) + 9 * longint'(sig[2*i+2])
                                                        + 9 * longint'(sig[2*i+4]) - longint'(sig[2*i+6]), 16);
    endcase
  endfunction

  task automatic lifting_step(input int step, input int n, input int dly,
                              input logic signed [COEF_W-1:0] c [NMAC]);
    int nin, i, got, first_out_at;
    nin = L + n;
    lift_taps  = ($clog2(NMAC+1))'(n);
    lift_delay = ($clog2(MAX_DELAY+1))'(dly);
    n_switch++;
    delays_seen.push_back(dly);
    i = 0; got = 0; first_out_at = -1;
    while (i < nin + NMAC + 2) begin
      logic stall;
      stall = (i > 4) && ($urandom_range(99) < 15);
      lift_en = !stall;
      if (stall) begin
        lift_x = DATA_W'($urandom); lift_d = DATA_W'($urandom); lift_tok = coef_tok_t'($urandom);
      end else begin
        lift_x = (i < nin) ? sig[2*i] : '0;       // even samples, broadcast
        lift_d = (i < nin) ? sig[2*i+1] : '0;     // odd samples, to the delay
        lift_tok = '{valid: i < nin, first: (i % n) == 0, last: (i % n) == n - 1, coef: c[i % n]};
      end
      @(posedge clk);
      #1;
      if (stall) begin
        n_stall++;
        checks++;
        if (lift_y_valid) begin failures++; $display("FAIL output during stall"); end
      end else begin
        if (lift_y_valid) begin
          if (got < L) begin
            longint want;
            want = ref_out(step, got);
            checks++;
            if (longint'(lift_y) !== want) begin
              failures++; $display("FAIL step %0d output %0d: %0d want %0d", step, got, lift_y, want);
            end
          end
          if (first_out_at < 0) first_out_at = i;
          if (lift_filt < 0) n_neg++;
          mac_used[lift_mac_idx]++;
          got++;
        end
        i++;
      end
    end
    checks += 2;
    if (got < L) begin failures++; $display("FAIL step %0d: only %0d outputs", step, got); end
    if (first_out_at != n) begin failures++; $display("FAIL step %0d: first output after %0d samples, want %0d", step, first_out_at + 1, n + 1); end
  endtask

  task automatic ffp_check(input logic [5:0] a, input logic [2:0] b, input logic [2:0] c,
                           input logic [2:0] p, input logic x, input int want, input bit use_s);
    ffp_a = a; ffp_b = b; ffp_c = c; ffp_p = p; ffp_x = x;
    #1;
    checks++;
    if ((use_s ? int'(ffp_s[6:2]) : int'(ffp_ck)) != want) begin
      failures++;
      $display("FAIL arith a=%b b=%b c=%b p=%b x=%b: s=%b ck=%b want %0d", a, b, c, p, x, ffp_s, ffp_ck, want);
    end
  endtask

  initial begin
    logic signed [COEF_W-1:0] c [NMAC];
    ffp_a = '0; ffp_b = '0; ffp_c = '0; ffp_p = '0; ffp_x = 0;
    lift_taps = '0; lift_delay = '0; lift_frac = ($clog2(ACC_W))'(FRAC_W); lift_x = '0; lift_d = '0; lift_tok = '0;
    foreach (sig[k]) sig[k] = DATA_W'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // --- arithmetic pipeline: published table, then full sweeps
    ffp_check(6'b000000, 3'b101, 3'b101, 3'b110, 0, 15, 1);
    ffp_check(6'b100100, 3'b011, 3'b011, 3'b001, 1, 3, 0);
    ffp_check(6'b100100, 3'b001, 3'b010, 3'b001, 1, 6, 0);
    for (int bb = 0; bb < 8; bb++)
      for (int m = 0; m < 4; m++) begin
        ffp_check(6'b0, 3'(bb), 3'(bb), {m[0], m[1], 1'b0}, 0, bb * m, 1); n_mul++;
      end
    for (int m = 0; m < 4; m++) begin
      ffp_check(6'b0, {1'b0, m[1], m[0]}, {1'b0, m[1], m[0]}, {m[0], m[1], 1'b0}, 0, m * m, 1); n_sqr++;
    end
    for (int bb = 1; bb < 8; bb++)
      for (int v = 0; v < 16; v++)
        if (v / bb < 8) begin
          ffp_check({4'(v), 2'b11}, 3'(bb), 3'(bb), 3'b001, 1, v / bb, 0); n_div++;
        end
    for (int v = 0; v < 64; v++) begin
      int r;
      r = 0;
      while ((r + 1) * (r + 1) <= v) r++;
      ffp_check(6'(v), 3'b001, 3'b010, 3'b001, 1, r, 0); n_sqrt++;
    end

    // --- lifting datapath: three predict steps
    c = '{16'sd8192, 16'sd8192, 16'sd0, 16'sd0};
    lifting_step(0, 2, 2, c);
    c = '{-16'sd25987, -16'sd25987, 16'sd0, 16'sd0};
    lifting_step(1, 2, 2, c);
    c = '{-16'sd1024, 16'sd9216, 16'sd9216, -16'sd1024};
    lifting_step(2, 4, 3, c);

    // --- every mechanism must have happened
    checks += 8;
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_switch < 2)  begin failures++; $display("FAIL no filter-length change"); end
    if (delays_seen.unique().size() < 2) begin failures++; $display("FAIL one delay only"); end
    if (n_neg == 0)    begin failures++; $display("FAIL no negative floor"); end
    if (n_mul == 0)    begin failures++; $display("FAIL no multiply"); end
    if (n_sqr == 0)    begin failures++; $display("FAIL no square"); end
    if (n_div == 0)    begin failures++; $display("FAIL no divide"); end
    if (n_sqrt == 0)   begin failures++; $display("FAIL no square root"); end
    for (int j = 0; j < NMAC; j++) begin
      checks++;
      if (mac_used[j] == 0) begin failures++; $display("FAIL MAC %0d unused", j); end
    end
    $display("stalls=%0d filter_steps=%0d negative_floor=%0d mac=%0d/%0d/%0d/%0d mul=%0d sqr=%0d div=%0d sqrt=%0d",
             n_stall, n_switch, n_neg, mac_used[0], mac_used[1], mac_used[2], mac_used[3], n_mul, n_sqr, n_div, n_sqrt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
