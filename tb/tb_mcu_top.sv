// tb_mcu_top: end-to-end run of the microcontroller at its default sizes.
//
// A short program is assembled in the testbench, loaded through the download
// port (the core is halted meanwhile), and run. It exercises: literal loads,
// arithmetic and logic lines, a memory write, a memory read used exactly
// three lines later, an MI polling loop with JMPIF, a shift through carry,
// the interrupt configuration sequence (L -> IE1, L -> IL, ...), SCLK sleep
// with a direct operation (port A follows port C every clock), a port B
// interrupt waking the core, a Timer1 overload interrupt, Timer2 counting a
// port C pin, a status (carry) interrupt and RET. Every write to port A is
// logged with the line that made it and compared with values worked out by
// hand below; the number of cycles to a given line checks one line per
// clock and the memory latency. Each mechanism is counted and must occur.
module tb_mcu_top;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dl_active = 0, dl_we = 0; addr_t dl_addr = 0; word_t dl_data = 0;
  data_t pa_in = 0, pb_in = 0, pc_in = 8'h21, pa_out, pb_out, pc_out;
  addr_t pc; logic ite, sleeping;
  int checks = 0, failures = 0;

  mcu_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------- assembler
  function automatic word_t w(op_e op, dev_e s1 = D_NONE, dev_e s2 = D_NONE,
                              dev_e d = D_NONE, aop_e a = A_NOADR, int ad = 0,
                              jctl_e j = J_NONE, int cs = 0, bit ci = 0,
                              bit sc = 0, shift_e sh = SH_NONE);
    instr_t i = '0;
    i.op = op; i.src1 = s1; i.src2 = s2; i.dst = d; i.aop = a;
    i.addr = addr_t'(ad); i.jctl = j; i.csel = 3'(cs); i.cinv = ci;
    i.sclk = sc; i.shift = sh;
    return word_t'(i);
  endfunction

  word_t prog [int];
  initial begin
    prog[0]  = w(OP_NOP, .a(A_LWR), .ad('h5A));
    prog[1]  = w(OP_MOV1, D_L, D_NONE, D_ACC, A_LWR, 'h33);
    prog[2]  = w(OP_ADD, D_ACC, D_L, D_PA);                 // 5A+33 = 8D
    prog[3]  = w(OP_SUB, D_ACC, D_L, D_SR);                 // 5A-33 = 27
    prog[4]  = w(OP_XOR, D_SR, D_ACC, D_PA);                // 27^5A = 7D
    prog[5]  = w(OP_ADD, D_PC, D_L, D_PA);                  // 21+33 = 54
    prog[6]  = w(OP_MOV1, D_ACC, D_NONE, D_NONE, A_MWR, 'h1234);
    prog[7]  = w(OP_NOP, .a(A_MRD), .ad('h1234));
    prog[8]  = w(OP_FF, .d(D_SR));
    prog[9]  = w(OP_CLR, .d(D_ACC));
    prog[10] = w(OP_ADD, D_SR, D_SR, D_SR);                 // FE, C = 1
    prog[11] = w(OP_MOV1, D_MEM, D_NONE, D_PA);             // 5A
    prog[12] = w(OP_NOP, .a(A_MRD), .ad('h1234));
    prog[13] = w(OP_NOP, .a(A_JWR), .ad(13), .j(J_JMPIF), .cs(S_MI), .ci(1));
    prog[14] = w(OP_MOV1, D_MEM, D_NONE, D_ACC);
    prog[15] = w(OP_MOV1, D_ACC, D_NONE, D_PA, .sh(SH_LC)); // 5A<<1|C = B5
    prog[16] = w(OP_NOP, .a(A_LWR), .ad('h01));
    prog[17] = w(OP_MOV1, D_L, D_NONE, D_IE1, A_LWR, 'h00);
    prog[18] = w(OP_MOV1, D_L, D_NONE, D_IL, A_IWR, 'h100);
    prog[19] = w(OP_CLR, .d(D_IE2));
    prog[20] = w(OP_NOP, .a(A_LWR), .ad('h0F));
    prog[21] = w(OP_MOV1, D_PC, D_NONE, D_PA, A_LWR, 'hEE, .sc(1));
    prog[22] = w(OP_MOV1, D_L, D_NONE, D_PA);               // 0F (EE suppressed)
    prog[23] = w(OP_NOP, .a(A_LWR), .ad(5));
    prog[24] = w(OP_MOV1, D_L, D_NONE, D_TCL1, A_LWR, 'h40);
    prog[25] = w(OP_CLR, .d(D_T1));
    prog[26] = w(OP_MOV1, D_L, D_NONE, D_IE2, A_IWR, 'h200);
    prog[27] = w(OP_NOP, .a(A_JWR), .ad(27), .j(J_JMPIF), .cs(S_Z), .ci(1));
    prog[28] = w(OP_NOP, .a(A_LWR), .ad('hC2));             // Timer2: count PC6
    prog[29] = w(OP_MOV1, D_L, D_NONE, D_CCT);
    prog[30] = w(OP_CLR, .d(D_T2));
    for (int k = 31; k <= 38; k++) prog[k] = '0;
    prog[39] = w(OP_MOV1, D_T2, D_NONE, D_PA);              // 4 edges
    prog[40] = w(OP_NOP, .a(A_LWR), .ad('h01));
    prog[41] = w(OP_MOV1, D_L, D_NONE, D_IE2, A_IWR, 'h300);
    prog[42] = w(OP_FF, .d(D_ACC));
    prog[43] = w(OP_ADD, D_ACC, D_ACC, D_ACC);              // FE, C = 1
    prog[44] = w(OP_MOV1, D_ACC, D_NONE, D_SR);
    prog[45] = w(OP_NOP, .a(A_JWR), .ad(45), .j(J_JMP));
    prog['h100] = w(OP_CLR, .d(D_IE1));
    prog['h101] = w(OP_NOP, .j(J_RET));
    prog['h200] = w(OP_MOV1, D_T1, D_NONE, D_PA);
    prog['h201] = w(OP_CLR, .d(D_IE2), .j(J_RET));
    prog['h300] = w(OP_CLR, .d(D_IE2));
    prog['h301] = w(OP_MOV1, D_ACC, D_NONE, D_PA);
    prog['h302] = w(OP_NOP, .j(J_RET));
  end

  // Expected port A writes (line, value), sleep line 21 excluded.
  int exp_line [10] = '{2, 4, 5, 11, 15, 22, 'h200, 39, 'h301, -1};
  int exp_val  [10] = '{'h8D, 'h7D, 'h54, 'h5A, 'hB5, 'h0F, 6, 4, 'hFE, -1};
  int nlog = 0;

  // --------------------------------------------------- mechanism counters
  int n_cycles = 0, n_sleep = 0, n_sleep_ok = 0, n_it = 0, n_ret = 0;
  int n_jump = 0, n_jmpif_not = 0, n_mi_poll = 0, n_mrd = 0, n_mwr = 0;
  int n_t0i = 0, n_tick2 = 0, n_dl = 0, n_pb_it = 0, n_st_it = 0, n_shift = 0;
  int cyc_at_16 = -1, line13 = 0;
  bit seen_302 = 0, done = 0;

  // monitor in mid-cycle, when the current line is stable
  always @(negedge clk) if (rst_n && !dl_active) begin
    n_cycles++;
    if (pc == 16 && cyc_at_16 < 0) cyc_at_16 = n_cycles - 1;
    if (pc == 13) line13++;
    if (sleeping) n_sleep++;
    if (dut.u_jump.it_taken) begin
      n_it++;
      if (pb_in[0]) n_pb_it++;
      if (dut.status[S_C] && dut.ie2[0]) n_st_it++;
    end
    if (dut.ins.jctl == J_RET) n_ret++;
    if (dut.u_jump.jump_taken) n_jump++;
    if (dut.ins.jctl == J_JMPIF && !dut.u_jump.jump_taken) n_jmpif_not++;
    if (dut.ins.jctl == J_JMPIF && dut.ins.csel == S_MI && dut.u_jump.jump_taken) n_mi_poll++;
    if (dut.ins.aop == A_MRD) n_mrd++;
    if (dut.ins.aop == A_MWR) n_mwr++;
    if (dut.t0i && dut.ie2[6]) n_t0i++;
    if (dut.tick2 && dut.cct[1]) n_tick2++;
    if (dut.ins.shift != SH_NONE) n_shift++;
    if (pc == 'h302) seen_302 = 1;
    if (dut.dst_we[D_PA]) begin
      if (pc == 21) begin
        chk(dut.busq == pc_in, "direct operation in SCLK: PA follows PC pins");
        n_sleep_ok++;
      end else begin
        chk(nlog < 9 && pc == addr_t'(exp_line[nlog]) && dut.busq == data_t'(exp_val[nlog]),
            $sformatf("PA write #%0d at line %h value %h, expected line %h value %h",
                      nlog, pc, dut.busq, exp_line[nlog], exp_val[nlog]));
        nlog++;
      end
    end
  end

  // drive the pins just after each clock edge
  int slept = 0;
  always @(posedge clk) if (rst_n && !dl_active) begin
    #1;
    if (pc == 21 && sleeping) begin
      slept++;
      if (slept < 8) pc_in <= 8'($urandom) & 8'hBF;
      if (slept == 8) pb_in <= 8'h01;
    end else if (slept > 0) begin
      pb_in <= 8'h00;
      if (pc == 22) pc_in <= 8'h21;
    end
    if (pc >= 31 && pc <= 38) pc_in[6] <= ~pc_in[6];
    if (pc == 39) pc_in[6] <= 1'b0;
  end

  initial begin
    #200000; failures++;
    $display("watchdog expired at pc %h ite=%0d insvc=%0d ie2=%h tcm1=%0d tcl1=%0d z=%0d nit=%0d nlog=%0d", pc, ite, dut.in_service, dut.ie2, dut.tcm1, dut.tcl1, dut.status[S_Z], n_it, nlog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // download the program with the core held
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; dl_active = 1;
    foreach (prog[a]) begin
      dl_we = 1; dl_addr = addr_t'(a); dl_data = prog[a];
      @(negedge clk);
      n_dl++;
      chk(pc == 0, "PC held during download");
    end
    dl_we = 0;
    @(negedge clk) dl_active = 0;
    // run until the final loop is reached after the status interrupt
    wait (seen_302 && pc == 45);
    repeat (3) @(negedge clk);
    chk(cyc_at_16 == 16 + 3, $sformatf("one line per clock, 3 MI polls: line 16 at cycle %0d", cyc_at_16));
    chk(line13 == 4, $sformatf("MI poll line ran %0d times, expected 4", line13));
    chk(nlog == 9, $sformatf("%0d port A writes logged, expected 9", nlog));
    chk(dut.sr == 8'hFE && pa_out == 8'hFE, "final SR and port A");
    chk(dut.lit == 8'h01, "literal register");
    chk(!ite && !dut.in_service, "no interrupt pending or in service at the end");
    chk(dut.u_dm.mem[16'h1234] == 8'h5A, "data memory content");
    // every mechanism happened
    chk(n_dl > 0, "download");
    chk(n_sleep > 3 && n_sleep_ok > 3, "SCLK sleep with direct operation");
    chk(n_it == 3, $sformatf("%0d interrupt entries, expected 3", n_it));
    chk(n_pb_it == 1, "port B interrupt");
    chk(n_st_it == 1, "status interrupt");
    chk(n_t0i > 0, "timer overload interrupt");
    chk(n_tick2 == 4, $sformatf("Timer2 counted %0d port C edges", n_tick2));
    chk(n_ret == 3, "RET");
    chk(n_jump > 0 && n_jmpif_not > 0 && n_mi_poll == 3, "jumps");
    chk(n_mrd == 2 && n_mwr == 1, "memory requests");
    chk(n_shift == 1, "shift through carry");
    $display("cycles=%0d sleep=%0d it=%0d ret=%0d jumps=%0d mi_polls=%0d t2_edges=%0d",
             n_cycles, n_sleep, n_it, n_ret, n_jump, n_mi_poll, n_tick2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
