// tb_ffp_pipeline: self-checking test of the four-function arithmetic array.
// Applies the published example vectors of all four operations, then sweeps every legal operand: all 3-bit x 2-bit products,
// all 2-bit squares, every 4-bit / 3-bit division whose quotient fits in 3
// bits, and the square root of every 6-bit number. Expected values are
// computed with integer arithmetic in the testbench. The array is
// combinational, so each vector is checked 1 ns after it is applied.
module tb_ffp_pipeline;
  logic [5:0] a;
  logic [2:0] b, c, p;
  logic       x;
  logic [6:0] s;
  logic [2:0] ck;
  int checks = 0, failures = 0;

  ffp_pipeline dut (.a(a), .b(b), .c(c), .p(p), .x(x), .s(s), .ck(ck));

  task automatic apply(input logic [5:0] ta, input logic [2:0] tb_, input logic [2:0] tc,
                       input logic [2:0] tp, input logic tx);
    a = ta; b = tb_; c = tc; p = tp; x = tx;
    #1;
  endtask

  task automatic expect_s(input logic [4:0] want, input string what);
    checks++;
    if (s[6:2] !== want) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b p=%b x=%b  S6..S2=%b want %b", what, a, b, c, p, x, s[6:2], want);
    end
  endtask

  task automatic expect_ck(input logic [2:0] want, input string what);
    checks++;
    if (ck !== want) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b p=%b x=%b  CK=%b want %b", what, a, b, c, p, x, ck, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published example vectors; P is given as P2P1P0, the multiplier is P1P2
    apply(6'b000000, 3'b001, 3'b001, 3'b100, 0); expect_s(5'b00001, "table mul");
    apply(6'b000000, 3'b010, 3'b010, 3'b100, 0); expect_s(5'b00010, "table mul");
    apply(6'b000000, 3'b010, 3'b010, 3'b010, 0); expect_s(5'b00100, "table mul");
    apply(6'b000000, 3'b011, 3'b011, 3'b010, 0); expect_s(5'b00110, "table mul");
    apply(6'b000000, 3'b100, 3'b100, 3'b110, 0); expect_s(5'b01100, "table mul");
    apply(6'b000000, 3'b101, 3'b101, 3'b110, 0); expect_s(5'b01111, "table mul");
    apply(6'b000000, 3'b101, 3'b101, 3'b010, 0); expect_s(5'b01010, "table mul");
    apply(6'b100100, 3'b011, 3'b011, 3'b001, 1); expect_ck(3'b011, "table div");
    apply(6'b111110, 3'b011, 3'b011, 3'b001, 1); expect_ck(3'b101, "table div");
    apply(6'b001101, 3'b011, 3'b011, 3'b001, 1); expect_ck(3'b001, "table div");
    apply(6'b000000, 3'b001, 3'b001, 3'b100, 0); expect_s(5'b00001, "table sqr");
    apply(6'b000000, 3'b010, 3'b010, 3'b010, 0); expect_s(5'b00100, "table sqr");
    apply(6'b000000, 3'b000, 3'b000, 3'b000, 0); expect_s(5'b00000, "table sqr");
    apply(6'b100100, 3'b001, 3'b010, 3'b001, 1); expect_ck(3'b110, "table sqrt");

    // multiply: every B and every multiplier P1P2
    for (int bb = 0; bb < 8; bb++)
      for (int m = 0; m < 4; m++) begin
        logic [2:0] pv;
        pv = {m[0], m[1], 1'b0};          // P2 = LSB, P1 = MSB, P0 = 0
        apply(6'($urandom), 3'(bb), 3'(bb), pv, 0);
        apply(6'b0, 3'(bb), 3'(bb), pv, 0);
        expect_s(5'(bb * m), "mul");
      end

    // square: B = C = 0 P1 P2
    for (int m = 0; m < 4; m++) begin
      apply(6'b0, {1'b0, m[1], m[0]}, {1'b0, m[1], m[0]}, {m[0], m[1], 1'b0}, 0);
      expect_s(5'(m * m), "square");
    end

    // divide: A5..A2 / B with the quotient below 8, A1 A0 random
    for (int bb = 1; bb < 8; bb++)
      for (int n = 0; n < 16; n++)
        if (n / bb < 8) begin
          apply({4'(n), 2'($urandom)}, 3'(bb), 3'(bb), {2'($urandom), 1'b1}, 1);
          expect_ck(3'(n / bb), "divide");
          checks++;
          if (s[4:2] !== 3'(n % bb)) begin
            failures++;
            $display("FAIL remainder %0d/%0d: %0d", n, bb, s[4:2]);
          end
        end

    // square root of every 6-bit value
    for (int n = 0; n < 64; n++) begin
      int r;
      r = 0;
      while ((r + 1) * (r + 1) <= n) r++;
      apply(6'(n), 3'b001, 3'b010, {2'($urandom), 1'b1}, 1);
      expect_ck(3'(r), "sqrt");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
