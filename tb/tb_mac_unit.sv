// tb_mac_unit: drives random windows of 1..4 coefficient tokens with random
// samples, random stall cycles and idle tokens, and compares each latched sum
// with a 64-bit reference accumulation. res_valid must rise on the very
// edge that consumes the 'last' token (a window of n tokens gives its sum n
// enabled cycles after its first token) and stay low otherwise. A second
// phase checks that an inactive unit ignores tokens.
module tb_mac_unit;
  import lift_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, active = 1;
  logic signed [DATA_W-1:0] x;
  coef_tok_t tok;
  logic signed [ACC_W-1:0] res;
  logic res_valid;
  int checks = 0, failures = 0, cycles = 0;

  mac_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic v, input logic f, input logic l,
                      input logic signed [DATA_W-1:0] xv, input logic signed [COEF_W-1:0] cv);
    en = e; tok = '{valid: v, first: f, last: l, coef: cv}; x = xv;
    @(posedge clk); #1;
  endtask

  initial begin
    longint ref_sum;
    tok = '0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      int n;
      n = $urandom_range(1, 4);
      ref_sum = 0;
      for (int k = 0; k < n; k++) begin
        logic signed [DATA_W-1:0] xv;
        logic signed [COEF_W-1:0] cv;
        xv = (w < 3) ? -16'sd32768 : DATA_W'($urandom);
        cv = (w < 3) ? -16'sd32768 : COEF_W'($urandom);
        // random stalls: nothing may change while en is low
        while ($urandom_range(3) == 0) begin
          step(0, 1, $urandom_range(1), 1, DATA_W'($urandom), COEF_W'($urandom));
          checks++;
          if (res_valid && k != 0) begin failures++; $display("FAIL valid during stall"); end
        end
        ref_sum += longint'(xv) * longint'(cv);
        step(1, 1, k == 0, k == n - 1, xv, cv);
        checks++;
        if (res_valid !== (k == n - 1)) begin
          failures++; $display("FAIL res_valid=%b at token %0d of %0d", res_valid, k, n);
        end
      end
      checks++;
      if (res !== ACC_W'(ref_sum)) begin
        failures++; $display("FAIL window %0d: res=%0d want %0d", w, res, ref_sum);
      end
      if ($urandom_range(1)) begin
        step(1, 0, 1, 1, DATA_W'($urandom), COEF_W'($urandom));   // idle token
        checks++;
        if (res_valid) begin failures++; $display("FAIL valid on idle token"); end
      end
    end
    // an inactive unit keeps its last result and raises no valid
    active = 0;
    for (int k = 0; k < 8; k++) begin
      logic signed [ACC_W-1:0] keep;
      keep = res;
      step(1, 1, 1, 1, DATA_W'($urandom), COEF_W'($urandom));
      checks++;
      if (res_valid || res !== keep) begin failures++; $display("FAIL inactive unit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
