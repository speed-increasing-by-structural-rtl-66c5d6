// tb_stack_memory: random pushes and pops against a queue model, including
// overflow (top replaced) and underflow (ignored).
module tb_stack_memory;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [15:0] din = 0, dout;
  logic [15:0] q[$];
  int checks = 0, failures = 0;
  stack_memory #(.DEPTH(4), .WIDTH(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4) ||
          (q.size() > 0 && dout != q[$])) begin
        failures++;
        if (failures < 10) $display("stack mismatch size=%0d dout=%h", q.size(), dout);
      end
      push = 1'($urandom); pop = !push && 1'($urandom); din = 16'($urandom);
      @(posedge clk); #1;
      if (push) begin if (q.size() == 4) q[3] = din; else q.push_back(din); end
      else if (pop && q.size() > 0) void'(q.pop_back());
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
