// tb_timer_block: CCT bits route Timer1 to a BUS Q bit and Timer2 to a
// port C pin; both overload flags rise at their limits.
module tb_timer_block;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0;
  data_t busq = 0, portc = 0;
  logic cct_we = 0, tcl1_we = 0, tcl2_we = 0, t1_we = 0, t2_we = 0;
  data_t cct, tcm1, tcm2, tcl1, tcl2; logic t0i, t1i, tick1, tick2;
  int checks = 0, failures = 0;
  timer_block dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input int which, input data_t v);
    @(negedge clk); busq = v;
    case (which) 0: cct_we = 1; 1: tcl1_we = 1; 2: tcl2_we = 1; 3: t1_we = 1; 4: t2_we = 1; endcase
    @(negedge clk); {cct_we, tcl1_we, tcl2_we, t1_we, t2_we} = '0; busq = 0;
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n1, n2;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Timer1 counts BUS Q bit 5, Timer2 counts port C pin 6.
    wr(1, 8'd10); wr(2, 8'd7);
    wr(3, 8'd0);  wr(4, 8'd0);
    wr(0, {3'd6, 3'd5, 1'b1, 1'b1});
    chk(cct == 8'b110_101_11, "CCT readback");
    // load with cnt_we sets the count; check them cleared (busq bit5 was 0 during writes)
    wr(3, 8'd0); wr(4, 8'd0);
    chk(tcm1 == 0 && tcm2 == 0, "counts cleared");
    n1 = 0; n2 = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      busq  = (i % 2 == 0) ? 8'h20 : 8'hDF;   // bit 5 toggles, others opposite
      portc = (i % 4 == 0) ? 8'h40 : 8'h00;   // pin 6 high once every 4 cycles
      if (i % 2 == 0) n1++;
      if (i % 4 == 0) n2++;
    end
    @(negedge clk); busq = 0; portc = 0;
    chk(int'(tcm1) == n1, $sformatf("timer1 counted %0d exp %0d", tcm1, n1));
    chk(int'(tcm2) == n2, $sformatf("timer2 counted %0d exp %0d", tcm2, n2));
    chk(t0i == (n1 >= 10) && t1i == (n2 >= 7), "overload flags");
    // Timer2 in timing mode counts clocks
    wr(0, 8'b000_000_01);
    wr(4, 8'd0);
    repeat (5) @(negedge clk);
    chk(tcm2 == 8'd5 + 8'd0, $sformatf("timing mode %0d", tcm2));
    chk(!t1i, "timer2 below limit");
    repeat (2) @(negedge clk);
    chk(t1i, "timer2 reached limit 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
