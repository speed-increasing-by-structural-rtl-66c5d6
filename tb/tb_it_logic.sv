// tb_it_logic: configuration registers written over BUS Q, then random pin,
// status and timer inputs against the interrupt equation.
module tb_it_logic;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0, ie1_we = 0, ie2_we = 0, il_we = 0, t0i = 0, t1i = 0, ite;
  data_t busq = 0, pb = 0, ie1, ie2, il; logic [5:0] status = 0;
  int checks = 0, failures = 0, hits = 0;
  it_logic dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    data_t e1, e2, el;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      e1 = data_t'($urandom) & data_t'($urandom);
      e2 = data_t'($urandom) & data_t'($urandom);
      el = data_t'($urandom);
      @(negedge clk); busq = e1; ie1_we = 1; @(negedge clk); ie1_we = 0;
      busq = el; il_we = 1; @(negedge clk); il_we = 0;
      busq = e2; ie2_we = 1; @(negedge clk); ie2_we = 0;
      checks++;
      if (ie1 != e1 || ie2 != e2 || il != el) failures++;
      for (int i = 0; i < 100; i++) begin
        logic exp_ite;
        pb = data_t'($urandom); status = 6'($urandom) & 6'($urandom) & 6'($urandom);
        t0i = ($urandom_range(0, 7) == 0); t1i = ($urandom_range(0, 7) == 0);
        #1;
        exp_ite = 0;
        for (int k = 0; k < 8; k++) if (e1[k] && (el[k] != pb[k])) exp_ite = 1;
        for (int k = 0; k < 6; k++) if (e2[k] && status[k]) exp_ite = 1;
        if ((e2[6] && t0i) || (e2[7] && t1i)) exp_ite = 1;
        checks++;
        hits += int'(exp_ite);
        if (ite != exp_ite) begin failures++; if (failures < 10) $display("ite %0d exp %0d", ite, exp_ite); end
      end
    end
    checks++;
    if (hits == 0 || hits == 5000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
