// tb_work_regs: ACC and SR load from BUS Q only on their own strobe.
module tb_work_regs;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0, acc_we = 0, sr_we = 0;
  data_t busq = 0, acc, sr, ea = 0, es = 0;
  int checks = 0, failures = 0;
  work_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      acc_we = 1'($urandom); sr_we = 1'($urandom); busq = data_t'($urandom);
      @(posedge clk); #1;
      if (acc_we) ea = busq;
      if (sr_we) es = busq;
      checks++;
      if (acc != ea || sr != es) begin failures++; $display("acc %h/%h sr %h/%h", acc, ea, sr, es); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
