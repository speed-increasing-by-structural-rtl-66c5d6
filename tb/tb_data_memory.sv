// tb_data_memory: immediate writes, reads completing after exactly LATENCY
// clock edges with MI, restart of a read by a newer #MRD.
module tb_data_memory;
  import mcu_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0, mwr = 0, mrd = 0, mi;
  addr_t addr = 0; data_t wdata = 0, mrr;
  data_t model [logic [15:0]];
  int checks = 0, failures = 0;
  data_memory #(.DEPTH(65536), .LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); mwr = 1; addr = addr_t'($urandom); wdata = data_t'($urandom);
      model[addr] = wdata;
    end
    @(negedge clk); mwr = 0;
    foreach (model[a]) begin
      int n;
      @(negedge clk); mrd = 1; addr = a;
      @(negedge clk); mrd = 0; addr = addr_t'($urandom);
      n = 0;
      chk(!mi, "MI drops after #MRD");
      while (!mi && n < 20) begin @(negedge clk); n++; end
      chk(n == LAT, $sformatf("latency %0d", n));
      chk(mrr == model[a], $sformatf("read %h: %h exp %h", a, mrr, model[a]));
    end
    // a newer read request replaces a pending one
    @(negedge clk); mrd = 1; addr = 16'h0001;
    @(negedge clk); addr = 16'h0002;
    @(negedge clk); mrd = 0;
    repeat (LAT) @(negedge clk);
    chk(mi && mrr == (model.exists(16'h0002) ? model[16'h0002] : 8'h00), "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
