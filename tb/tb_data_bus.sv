// tb_data_bus: source selection onto BUS1/BUS2 and one-hot destination
// strobes, with random device codes.
module tb_data_bus;
  import mcu_pkg::*;
  data_t src_vals [NDEV]; dev_e sel1, sel2, dst; logic active;
  data_t bus1, bus2; logic [NDEV-1:0] dst_we;
  int checks = 0, failures = 0;
  data_bus dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [NDEV-1:0] ew;
      data_t e1, e2;
      foreach (src_vals[k]) src_vals[k] = data_t'($urandom);
      sel1 = dev_e'($urandom_range(0, NDEV - 1));
      sel2 = dev_e'($urandom_range(0, NDEV - 1));
      dst  = dev_e'($urandom_range(0, NDEV - 1));
      active = 1'($urandom);
      #1;
      e1 = (sel1 == D_NONE) ? 8'h00 : src_vals[int'(sel1)];
      e2 = (sel2 == D_NONE) ? 8'h00 : src_vals[int'(sel2)];
      ew = (active && dst != D_NONE) ? (NDEV'(1) << int'(dst)) : '0;
      checks++;
      if (bus1 != e1 || bus2 != e2 || dst_we != ew) begin
        failures++;
        if (failures < 10) $display("bus mismatch s1=%0d s2=%0d d=%0d a=%0d: %h/%h %h/%h %h/%h", sel1, sel2, dst, active, bus1, e1, bus2, e2, dst_we, ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
