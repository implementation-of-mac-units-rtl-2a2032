// tb_mac_select: applies random MAC sums with no valid flag or exactly one,
// and checks that the flagged sum, its index and the valid output come out.
module tb_mac_select;
  localparam int unsigned N = 4, W = 34;
  logic [W-1:0] din [N];
  logic [N-1:0] vin;
  logic [W-1:0] dout;
  logic vout;
  logic [$clog2(N)-1:0] sel;
  int checks = 0, failures = 0;

  mac_select #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int k;
      for (int j = 0; j < N; j++) din[j] = {$urandom, $urandom};
      k = $urandom_range(N);             // N means no valid flag
      vin = (k == N) ? '0 : N'(1) << k;
      #1;
      checks++;
      if (vout !== (k != N)) begin failures++; $display("FAIL vout"); end
      if (k != N) begin
        checks += 2;
        if (dout !== din[k]) begin failures++; $display("FAIL dout for MAC %0d", k); end
        if (sel !== k[$clog2(N)-1:0]) begin failures++; $display("FAIL sel %0d want %0d", sel, k); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
