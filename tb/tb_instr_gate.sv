// tb_instr_gate: field split of random program words, blanking during
// download, and removal of address operation and jump in SCLK lines.
module tb_instr_gate;
  import mcu_pkg::*;
  word_t word; logic dl_active; instr_t ins;
  int checks = 0, failures = 0;
  instr_gate dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic ok;
      word = {28'($urandom), 32'($urandom)};
      dl_active = ($urandom_range(0, 3) == 0);
      #1;
      if (dl_active) ok = (ins == '0);
      else begin
        ok = (ins.op == op_e'(word[4:0])) && (ins.src1 == dev_e'(word[9:5])) &&
             (ins.src2 == dev_e'(word[14:10])) && (ins.dst == dev_e'(word[19:15])) &&
             (ins.shift == shift_e'(word[21:20])) && (ins.csel == word[26:24]) &&
             (ins.cinv == word[27]) && (ins.sclk == word[28]) &&
             (ins.addr == word[56:41]);
        if (word[28]) ok = ok && ins.aop == A_NOADR && ins.jctl == J_NONE;
        else ok = ok && ins.aop == aop_e'(word[59:57]) && ins.jctl == jctl_e'(word[23:22]);
      end
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("gate mismatch %h", word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
