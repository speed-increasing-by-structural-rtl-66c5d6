// tb_ge_compare: exhaustive check of the >= chain for 8-bit operands.
module tb_ge_compare;
  logic [7:0] m, l; logic ge;
  int checks = 0, failures = 0;
  ge_compare #(.W(8)) dut (.tcm(m), .tcl(l), .ge);
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        m = 8'(i); l = 8'(j); #1;
        checks++;
        if (ge != (i >= j)) begin
          failures++;
          if (failures < 10) $display("ge mismatch %0d >= %0d gave %0d", i, j, ge);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
