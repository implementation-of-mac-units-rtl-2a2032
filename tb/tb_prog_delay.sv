// tb_prog_delay: streams random words with random enable and a delay that
// changes at random between 0 and MAX_DELAY (and one value above, which is
// clamped); dout must equal the word that entered 'delay' enabled cycles
// earlier, from a reference history queue.
module tb_prog_delay;
  localparam int unsigned W = 16, MAXD = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [$clog2(MAXD+1)-1:0] delay;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, cycles = 0;

  prog_delay #(.W(W), .MAX_DELAY(MAXD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; delay = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < MAXD; i++) hist.push_front('0);
    for (int i = 0; i < 2000; i++) begin
      int dl;
      en = $urandom_range(3) != 0;
      din = W'($urandom);
      if (i % 37 == 0) delay = $urandom_range(MAXD + 1);
      dl = (delay > MAXD) ? MAXD : delay;
      #1;
      checks++;
      if (dout !== ((dl == 0) ? din : hist[dl-1])) begin
        failures++; $display("FAIL delay %0d at %0d", delay, i);
      end
      @(posedge clk);
      if (en) begin hist.push_front(din); void'(hist.pop_back()); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
