// tb_timer_counter: timing mode counts every clock, counting mode counts
// rising edges of the selected bit, count load, limit write and the >=
// overload flag, all against a cycle model.
module tb_timer_counter;
  logic clk = 0, rst_n = 0, mode = 0, tcl_we = 0, cnt_we = 0, toi, tick;
  logic [2:0] sel = 0; logic [7:0] bits = 0, busq = 0, tcm, tcl;
  int em = 0, el = 255, prev = 0, ticks = 0;
  int checks = 0, failures = 0;
  timer_counter #(.W(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int b;
      if (i % 1500 == 0) begin mode = ~mode; sel = 3'($urandom); end
      bits   = 8'($urandom);
      tcl_we = ($urandom_range(0, 40) == 0);
      cnt_we = ($urandom_range(0, 60) == 0);
      busq   = 8'($urandom);
      @(posedge clk); #1;
      b = bits[sel];
      if (tcl_we) el = busq;
      if (cnt_we) em = busq;
      else if (!mode || (b == 1 && prev == 0)) begin em = (em + 1) % 256; ticks++; end
      prev = b;
      checks++;
      if (tcm != 8'(em) || tcl != 8'(el) || toi != (em >= el)) begin
        failures++;
        if (failures < 10) $display("timer %0d: tcm %0d/%0d tcl %0d/%0d toi %0d", i, tcm, em, tcl, el, toi);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
