// tb_jump_it_ctrl: sequential flow, JMP with same-line and stored #JWR
// address, JMPIF true/false and inverted, SCLK hold, download hold,
// interrupt entry (also from SCLK), no re-entry while in service, RET.
module tb_jump_it_ctrl;
  import mcu_pkg::*;
  logic clk = 0, rst_n = 0, dl_active = 0, ite = 0;
  instr_t ins = '0; logic [7:0] cond_vec = 0;
  addr_t pc, jar, iar; logic in_service, it_taken, jump_taken;
  int checks = 0, failures = 0;
  jump_it_ctrl #(.STACK_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (pc=%h)", what, pc); end
  endtask
  // apply one line for one clock edge, then return to an empty line
  task automatic line(input instr_t i);
    @(negedge clk); ins = i;
    @(posedge clk); #1 ins = '0;
  endtask
  task automatic edges(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask
  function automatic instr_t mk(aop_e a, addr_t ad, jctl_e j, int cs, logic ci, logic sc);
    instr_t i = '0;
    i.aop = a; i.addr = ad; i.jctl = j; i.csel = 3'(cs); i.cinv = ci; i.sclk = sc;
    return i;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    addr_t p0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(pc == 0, "reset pc");
    edges(2);
    chk(pc == 2, "sequential");
    line(mk(A_JWR, 16'h0100, J_JMP, 0, 0, 0));
    chk(pc == 16'h0100, "JMP with same-line JWR");
    line(mk(A_JWR, 16'h0200, J_NONE, 0, 0, 0));
    chk(jar == 16'h0200 && pc == 16'h0101, "JWR stores only");
    line(mk(A_NOADR, 0, J_JMP, 0, 0, 0));
    chk(pc == 16'h0200, "JMP via jump register");
    cond_vec = 8'b0010_0000;                       // MI set
    line(mk(A_JWR, 16'h0300, J_JMPIF, S_MI, 0, 0));
    chk(pc == 16'h0300, "JMPIF MI taken");
    line(mk(A_JWR, 16'h0400, J_JMPIF, S_Z, 0, 0));
    chk(pc == 16'h0301, "JMPIF Z not taken");
    line(mk(A_JWR, 16'h0500, J_JMPIF, S_MI, 1, 0));
    chk(pc == 16'h0302, "JMPIF not-MI not taken");
    cond_vec = 8'b1000_0000;                       // T1I
    line(mk(A_JWR, 16'h0600, J_JMPIF, 7, 0, 0));
    chk(pc == 16'h0600, "JMPIF T1I taken");
    line(mk(A_IWR, 16'h0800, J_NONE, 0, 0, 0));
    chk(pc == 16'h0601 && iar == 16'h0800, "IWR");
    // SCLK: the PC stops
    @(negedge clk); ins = mk(A_NOADR, 0, J_NONE, 0, 0, 1); p0 = pc;
    edges(3);
    chk(pc == p0, "SCLK holds PC");
    // an interrupt wakes it
    @(negedge clk); ite = 1;
    @(posedge clk); #1 ins = '0;
    chk(pc == 16'h0800 && in_service, "interrupt entry from SCLK");
    edges(3);
    chk(pc == 16'h0803, "no re-entry while in service");
    line(mk(A_NOADR, 0, J_RET, 0, 0, 0));
    chk(pc == p0 + 1 && !in_service, "RET to the line after SCLK");
    // entry from normal flow returns to the next line
    p0 = pc;
    @(posedge clk); #1 ite = 0;
    chk(pc == 16'h0800, "second entry");
    line(mk(A_NOADR, 0, J_RET, 0, 0, 0));
    chk(pc == p0 + 1, "RET from normal flow");
    // interrupt on a jump line: return to the jump target
    @(negedge clk); ins = mk(A_JWR, 16'h0A00, J_JMP, 0, 0, 0); ite = 1;
    @(posedge clk); #1 ins = '0; ite = 0;
    chk(pc == 16'h0800, "entry on jump line");
    line(mk(A_NOADR, 0, J_RET, 0, 0, 0));
    chk(pc == 16'h0A00, "return to jump target");
    // download holds the PC and blocks interrupts
    p0 = pc; dl_active = 1; ite = 1;
    edges(3);
    chk(pc == p0 && !in_service, "download hold");
    dl_active = 0; ite = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
