// tb_lift_sub: compares the SUB unit with a 64-bit subtraction for corner and
// random signed operands; the result must never wrap.
module tb_lift_sub;
  localparam int unsigned A_W = 16, B_W = 20;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic signed [B_W:0] y;
  int checks = 0, failures = 0;

  lift_sub #(.A_W(A_W), .B_W(B_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin a = 16'sh7fff; b = 20'sh80000; end
        1: begin a = 16'sh8000; b = 20'sh7ffff; end
        default: begin a = A_W'($urandom); b = B_W'($urandom); end
      endcase
      #1;
      checks++;
      if (longint'(y) !== longint'(a) - longint'(b)) begin
        failures++; $display("FAIL %0d - %0d = %0d", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
