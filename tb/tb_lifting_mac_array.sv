// tb_lifting_mac_array: end-to-end test of the parallel-MAC lifting step.
// Runs segments with different filter lengths (taps = 2 with the 5/3 predict
// coefficients 1/2, 1/2 in Q2.14 and again as 1, 1 with a shift of 1, then
// 4, 3, 1 and 4 taps with random coefficients, the last with a shift of 9), with
// random stall cycles, each followed by a flush. For every output the
// testbench computes y = d[i] - floor(sum_k c[k] x[i+k] / 2^14) with 64-bit
// integers and checks the value, the MAC that produced it (i mod taps) and
// its timing: the output for window i must appear on the enabled edge of
// sample i+taps, i.e. taps+1 enabled cycles after the window's first sample,
// and outputs must follow each other on consecutive enabled cycles.
module tb_lifting_mac_array;
  import lift_pkg::*;
  localparam int unsigned N = NMAC, MAXD = MAX_DELAY;
  localparam int unsigned F_W = ACC_W;
  localparam int unsigned Y_W = ((DATA_W > F_W) ? DATA_W : F_W) + 1;

  logic clk = 0, rst_n = 0, en = 0;
  logic [$clog2(N+1)-1:0] taps;
  logic [$clog2(MAXD+1)-1:0] delay;
  logic [$clog2(ACC_W)-1:0] frac;
  logic signed [DATA_W-1:0] x_in, d_in;
  coef_tok_t tok_in;
  logic signed [Y_W-1:0] y;
  logic signed [F_W-1:0] filt;
  logic [$clog2(N)-1:0] mac_idx;
  logic y_valid;
  int checks = 0, failures = 0, cycles = 0;
  int stalls = 0, outputs = 0, neg_filt = 0, tap_switches = 0;
  int mac_used [N];

  lifting_mac_array dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_segment(input int n, input int nblk, input logic signed [COEF_W-1:0] c [N],
                             input int stall_pct, input int sh);
    localparam int PAD = N + 2;
    int L, i, next_out, last_out_idx;
    logic signed [DATA_W-1:0] xs [$], ds [$];
    L = n * nblk;
    for (int k = 0; k < L; k++) begin xs.push_back(DATA_W'($urandom)); ds.push_back(DATA_W'($urandom)); end
    for (int k = 0; k < PAD; k++) begin xs.push_back('0); ds.push_back('0); end
    taps = ($clog2(N+1))'(n);
    delay = ($clog2(MAXD+1))'(n);
    frac = ($clog2(ACC_W))'(sh);
    tap_switches++;
    i = 0; next_out = 0; last_out_idx = -1;
    while (i < L + PAD) begin
      logic stall;
      stall = ($urandom_range(99) < stall_pct);
      if (stall) begin
        en = 0;
        x_in = DATA_W'($urandom); d_in = DATA_W'($urandom); tok_in = coef_tok_t'($urandom);
        stalls++;
      end else begin
        en = 1;
        x_in = xs[i]; d_in = ds[i];
        tok_in = '{valid: i < L, first: (i % n) == 0, last: (i % n) == n - 1, coef: c[i % n]};
      end
      @(posedge clk);
      #1;
      if (stall) begin
        checks++;
        if (y_valid) begin failures++; $display("FAIL output during stall"); end
      end else begin
        if (y_valid) begin
          longint acc, fl, want;
          acc = 0;
          for (int k = 0; k < n; k++) acc += longint'(c[k]) * longint'(xs[next_out + k]);
          fl = acc >>> sh;
          want = longint'(ds[next_out]) - fl;
          checks += 4;
          if (longint'(y) !== want || longint'(filt) !== fl) begin
            failures++; $display("FAIL taps=%0d out %0d: y=%0d want %0d (filt %0d/%0d)", n, next_out, y, want, filt, fl);
          end
          if (int'(mac_idx) != next_out % n) begin failures++; $display("FAIL mac_idx %0d for out %0d", mac_idx, next_out); end
          if (i != next_out + n) begin failures++; $display("FAIL latency: out %0d at sample %0d", next_out, i); end
          if (last_out_idx >= 0 && i != last_out_idx + 1) begin failures++; $display("FAIL outputs not consecutive"); end
          last_out_idx = i;
          mac_used[mac_idx]++;
          if (fl < 0) neg_filt++;
          outputs++;
          next_out++;
        end
        i++;
      end
    end
    checks++;
    if (next_out != L) begin failures++; $display("FAIL taps=%0d: %0d outputs, want %0d", n, next_out, L); end
  endtask

  initial begin
    logic signed [COEF_W-1:0] c [N];
    x_in = '0; d_in = '0; tok_in = '0; taps = '0; delay = '0; frac = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 5/3 predict step: d[i] - floor((x[i] + x[i+1]) / 2), no stalls
    c = '{16'sd8192, 16'sd8192, 16'sd0, 16'sd0};
    run_segment(2, 40, c, 0, FRAC_W);
    // the same step with integer coefficients 1, 1 and a shift of 1
    c = '{16'sd1, 16'sd1, 16'sd0, 16'sd0};
    run_segment(2, 20, c, 10, 1);
    // random filters of every length, with stalls
    foreach (c[k]) c[k] = COEF_W'($urandom);
    run_segment(4, 30, c, 20, FRAC_W);
    foreach (c[k]) c[k] = COEF_W'($urandom);
    run_segment(3, 30, c, 20, FRAC_W);
    foreach (c[k]) c[k] = COEF_W'($urandom);
    run_segment(1, 30, c, 10, FRAC_W);
    foreach (c[k]) c[k] = COEF_W'($urandom);
    run_segment(4, 30, c, 30, 9);

    checks += 4;
    if (stalls == 0)       begin failures++; $display("FAIL no stall happened"); end
    if (neg_filt == 0)     begin failures++; $display("FAIL no negative floor happened"); end
    if (tap_switches < 2)  begin failures++; $display("FAIL no filter-length switch"); end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (mac_used[j] == 0) begin failures++; $display("FAIL MAC %0d never produced an output", j); end
    end
    $display("outputs=%0d stalls=%0d negative_floor=%0d filter_lengths=%0d mac_outputs=%0d/%0d/%0d/%0d",
             outputs, stalls, neg_filt, tap_switches, mac_used[0], mac_used[1], mac_used[2], mac_used[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
