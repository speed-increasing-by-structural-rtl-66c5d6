// tb_example_program: the short memory-read routine that illustrates the
// instruction format, run on the full-size controller.
//
// Routine (five lines, placed at consecutive addresses 0x29..0x2D):
//   ADD  SR,PC,ACC   #MRD 20h      ACC = SR + port C pins, start a read
//   AND  ACC,PA,PC   #LWR 94h      port C latch = ACC & port A pins
//   ADD  ACC,L,PA    #JWR 2Eh      port A latch = ACC + 94h
//   JMPIF /MI        #JWR 2Ch      wait until the memory is ready
//   JMP              #JWR 2Eh
// followed by MOV MEM -> PB at 0x2E. A prologue stores the byte to be read
// at address 20h. Three lines run between the read request and the ready
// flag, so the wait line loops exactly once. Random port inputs, several
// runs; expected values are computed here from the pin values.
module tb_example_program;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dl_active = 0, dl_we = 0; addr_t dl_addr = 0; word_t dl_data = 0;
  data_t pa_in = 0, pb_in = 0, pc_in = 0, pa_out, pb_out, pc_out;
  addr_t pc; logic ite, sleeping;
  int checks = 0, failures = 0;

  mcu_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t w(op_e op, dev_e s1 = D_NONE, dev_e s2 = D_NONE,
                              dev_e d = D_NONE, aop_e a = A_NOADR, int ad = 0,
                              jctl_e j = J_NONE, int cs = 0, bit ci = 0);
    instr_t i = '0;
    i.op = op; i.src1 = s1; i.src2 = s2; i.dst = d; i.aop = a;
    i.addr = addr_t'(ad); i.jctl = j; i.csel = 3'(cs); i.cinv = ci;
    return word_t'(i);
  endfunction

  task automatic load(input int a, input word_t x);
    dl_we = 1; dl_addr = addr_t'(a); dl_data = x;
    @(negedge clk);
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int run = 0; run < 4; run++) begin
      data_t mval, acc1, exp_pc, exp_pa;
      int waits, cyc;
      mval = data_t'($urandom);
      rst_n = 0; dl_active = 1;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1;
      load(0,    w(OP_NOP, .a(A_LWR), .ad(int'(mval))));
      load(1,    w(OP_MOV1, D_L, D_NONE, D_NONE, A_MWR, 'h20));
      load(2,    w(OP_NOP, .a(A_JWR), .ad('h29), .j(J_JMP)));
      load('h29, w(OP_ADD, D_SR, D_PC, D_ACC, A_MRD, 'h20));
      load('h2A, w(OP_AND, D_ACC, D_PA, D_PC, A_LWR, 'h94));
      load('h2B, w(OP_ADD, D_ACC, D_L, D_PA, A_JWR, 'h2E));
      load('h2C, w(OP_NOP, .a(A_JWR), .ad('h2C), .j(J_JMPIF), .cs(S_MI), .ci(1)));
      load('h2D, w(OP_NOP, .a(A_JWR), .ad('h2E), .j(J_JMP)));
      load('h2E, w(OP_MOV1, D_MEM, D_NONE, D_PB));
      load('h2F, w(OP_NOP, .a(A_JWR), .ad('h2F), .j(J_JMP)));
      dl_we = 0;
      pa_in = data_t'($urandom); pc_in = data_t'($urandom);
      @(negedge clk) dl_active = 0;
      waits = 0; cyc = 0;
      while (pc != 'h2F && cyc < 100) begin
        if (pc == 'h2C) waits++;
        @(negedge clk); cyc++;
      end
      // reference: SR is 0 after reset; L is 94h from line 2A on
      acc1   = 8'h00 + pc_in;
      exp_pc = acc1 & pa_in;
      exp_pa = acc1 + 8'h94;
      chk(pc_out == exp_pc, $sformatf("port C %h exp %h", pc_out, exp_pc));
      chk(pa_out == exp_pa, $sformatf("port A %h exp %h", pa_out, exp_pa));
      chk(dut.acc == acc1, "ACC keeps the first sum (PA was the destination)");
      chk(dut.lit == 8'h94, "literal 94h loaded");
      chk(pb_out == mval, $sformatf("memory byte %h exp %h", pb_out, mval));
      chk(waits == 2, $sformatf("wait line ran %0d times, expected 2", waits));
      chk(cyc == 3 + 5 + 1 + 1, $sformatf("%0d cycles to the end loop, expected 10", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
