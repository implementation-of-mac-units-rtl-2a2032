// tb_coef_delay_line: feeds random tokens with random enable and checks that
// tap j always shows the token that entered j enabled cycles earlier (tap 0
// the current input), and that reset clears every delayed tap.
module tb_coef_delay_line;
  import lift_pkg::*;
  localparam int unsigned N = NMAC;
  logic clk = 0, rst_n = 0, en = 0;
  coef_tok_t tok_in;
  coef_tok_t taps [N];
  coef_tok_t hist [$];
  int checks = 0, failures = 0, cycles = 0;

  coef_delay_line #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok_in = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int j = 1; j < N; j++) begin
      checks++;
      if (taps[j] !== '0) begin failures++; $display("FAIL reset tap %0d", j); end
    end
    rst_n = 1;
    for (int j = 0; j < N; j++) hist.push_front('0);
    for (int i = 0; i < 1000; i++) begin
      en = $urandom_range(3) != 0;
      tok_in = coef_tok_t'($urandom);
      #1;
      checks++;
      if (taps[0] !== tok_in) begin failures++; $display("FAIL tap 0"); end
      for (int j = 1; j < N; j++) begin
        checks++;
        if (taps[j] !== hist[j-1]) begin failures++; $display("FAIL tap %0d at %0d", j, i); end
      end
      @(posedge clk);
      if (en) begin hist.push_front(tok_in); void'(hist.pop_back()); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
