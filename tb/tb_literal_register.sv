// tb_literal_register: the literal register takes the low address byte only
// on #LWR and holds it otherwise.
module tb_literal_register;
  logic clk = 0, rst_n = 0, lwr = 0;
  logic [15:0] abus = 0; logic [7:0] lit, exp_l = 0;
  int checks = 0, failures = 0;
  literal_register dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      lwr = 1'($urandom); abus = 16'($urandom);
      @(posedge clk); #1;
      if (lwr) exp_l = abus[7:0];
      checks++;
      if (lit != exp_l) begin failures++; $display("lit %h exp %h", lit, exp_l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
