// tb_ports: each port latch loads BUS Q only on its own strobe.
module tb_ports;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0, pa_we = 0, pb_we = 0, pc_we = 0;
  data_t busq = 0, pa_out, pb_out, pc_out, ea = 0, eb = 0, ec = 0;
  int checks = 0, failures = 0;
  ports dut (.*);
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
      pa_we = 1'($urandom); pb_we = 1'($urandom); pc_we = 1'($urandom);
      busq = data_t'($urandom);
      @(posedge clk); #1;
      if (pa_we) ea = busq;
      if (pb_we) eb = busq;
      if (pc_we) ec = busq;
      checks++;
      if (pa_out != ea || pb_out != eb || pc_out != ec) begin failures++; $display("port mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
