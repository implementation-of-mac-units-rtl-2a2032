// tb_ffp_kcell: exhaustive test of the K cell: F is the multiplier bit P in
// add mode (X=0) and the row's carry in subtract mode (X=1); Co repeats the
// carry as the row's result bit; X passes through.
module tb_ffp_kcell;
  logic x_in, p, ci, x_out, f, co;
  int checks = 0, failures = 0;

  ffp_kcell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x_in, p, ci} = 3'(v);
      #1;
      checks += 3;
      if (f !== (x_in ? ci : p)) begin failures++; $display("FAIL f for %b", 3'(v)); end
      if (co !== ci)            begin failures++; $display("FAIL co for %b", 3'(v)); end
      if (x_out !== x_in)       begin failures++; $display("FAIL x for %b", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
