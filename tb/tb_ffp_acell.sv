// tb_ffp_acell: exhaustive test of the A cell. For all 64 input combinations
// the sum and carry are compared with an integer addition A + (B^X) + Ci,
// S with A when F=0, and the D/E bypass lines with their intended meaning
// (plain copy of B when B=C, root bit F for the (0,1) marker, marker (0,1)
// for the (1,0) trailing one, zero for (0,0)).
module tb_ffp_acell;
  logic a, b, c, x_in, f_in, ci;
  logic s, co, d, e, x_out, f_out;
  int checks = 0, failures = 0;

  ffp_acell dut (.*);

  task automatic chk(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b x=%b f=%b ci=%b got %b want %b", what, a, b, c, x_in, f_in, ci, got, want);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int sum;
      logic wd, we;
      {a, b, c, x_in, f_in, ci} = 6'(v);
      #1;
      sum = int'(a) + int'(b ^ x_in) + int'(ci);
      chk(co, sum >= 2, "co");
      chk(s, f_in ? sum[0] : a, "s");
      chk(x_out, x_in, "x_out");
      chk(f_out, f_in, "f_out");
      case ({b, c})
        2'b00: begin wd = 0;    we = 0;    end
        2'b11: begin wd = 1;    we = 1;    end
        2'b01: begin wd = f_in; we = f_in; end
        default: begin wd = 0;  we = 1;    end
      endcase
      chk(d, wd, "d");
      chk(e, we, "e");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
