// tb_program_memory: download-port writes of random 60-bit words, read back
// combinationally through the PC port.
module tb_program_memory;
  logic clk = 0, we = 0;
  logic [15:0] raddr = 0, waddr = 0;
  logic [59:0] rdata, wdata = 0;
  logic [59:0] model [logic [15:0]];
  int checks = 0, failures = 0;
  program_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1; waddr = 16'($urandom); wdata = {28'($urandom), 32'($urandom)};
      if (i < 2) waddr = (i == 0) ? 16'h0000 : 16'hFFFF;
      model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[a]) begin
      raddr = a; #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("pm %h: %h exp %h", a, rdata, model[a]); end
    end
    raddr = 16'h1234; #1;
    checks++;
    if (!model.exists(16'h1234) && rdata != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
