// tb_ffp_stage: tests one 5-cell row against integer arithmetic. With X=0 the
// row must give A + B when P=1 and A when P=0; with X=1 it must give A - B
// (carry in 1) when A >= B and A otherwise, with ck = (A >= B). Random and
// corner operands; B = C so the bypass lines must copy B.
module tb_ffp_stage;
  localparam int unsigned N = 5;
  logic x, p, ci_lsb, ck, x_lsb;
  logic [N-1:0] a, b, c, s, d, e;
  int checks = 0, failures = 0;

  ffp_stage #(.NCELL(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int unsigned av, bv, want;
      logic wck;
      av = (i < 4) ? ((i[0]) ? 31 : 0) : $urandom_range(31);
      bv = (i < 4) ? ((i[1]) ? 31 : 0) : $urandom_range(31);
      x = i[2];
      p = $urandom_range(1);
      a = N'(av); b = N'(bv); c = N'(bv);
      ci_lsb = x;                     // +1 of the two's complement when subtracting
      #1;
      if (!x) begin
        want = p ? (av + bv) % 32 : av;
        wck  = (av + bv) >= 32;
      end else begin
        want = (av >= bv) ? av - bv : av;
        wck  = av >= bv;
      end
      checks += 4;
      if (s !== N'(want)) begin failures++; $display("FAIL s: x=%b p=%b a=%0d b=%0d s=%0d want %0d", x, p, av, bv, s, want); end
      if (ck !== wck)     begin failures++; $display("FAIL ck: x=%b a=%0d b=%0d", x, av, bv); end
      if (d !== b || e !== b) begin failures++; $display("FAIL bypass"); end
      if (x_lsb !== x)    begin failures++; $display("FAIL x_lsb"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
