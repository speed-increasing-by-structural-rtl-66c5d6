// tb_status_reg: flag update by data lines, direct write as destination,
// hold on empty lines, MI passed through.
module tb_status_reg;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, we = 0, mi = 0;
  flags_t flags = '0; data_t busq = 0; logic [5:0] status;
  logic [4:0] ef = 0;
  int checks = 0, failures = 0;
  status_reg dut (.*);
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
      upd = 1'($urandom); we = ($urandom_range(0, 3) == 0);
      flags = flags_t'($urandom); busq = data_t'($urandom); mi = 1'($urandom);
      @(posedge clk); #1;
      if (we) ef = busq[4:0];
      else if (upd) ef = {flags.p, flags.v, flags.n, flags.z, flags.c};
      checks++;
      if (status != {mi, ef}) begin failures++; $display("status %b exp %b", status, {mi, ef}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
