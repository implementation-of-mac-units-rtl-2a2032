// tb_round_floor: compares the ROUND unit with floor(din / 2^shift), computed
// by integer division corrected towards minus infinity, for corner values and
// random positive and negative sums with random shifts 0..33.
module tb_round_floor;
  localparam int unsigned IN_W = 34;
  logic signed [IN_W-1:0] din;
  logic [$clog2(IN_W)-1:0] shift;
  logic signed [IN_W-1:0] dout;
  int checks = 0, failures = 0;

  round_floor #(.IN_W(IN_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint corner [6] = '{0, 1, -1, 16384, -16384, -16385};
    for (int i = 0; i < 2006; i++) begin
      longint v, q, m;
      int sh;
      v = (i < 6) ? corner[i] : longint'(IN_W'({$urandom, $urandom}));
      if (i >= 6 && v >= (64'sd1 <<< (IN_W - 1))) v -= (64'sd1 <<< IN_W);   // sign-extend
      sh = (i < 6) ? 14 : $urandom_range(IN_W - 1);
      din = IN_W'(v);
      shift = ($clog2(IN_W))'(sh);
      #1;
      m = 64'sd1 <<< sh;
      q = v / m;
      if (v % m != 0 && v < 0) q -= 1;
      checks++;
      if (longint'(dout) !== q) begin failures++; $display("FAIL floor(%0d/2^%0d)=%0d want %0d", v, sh, dout, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
