// jump_it_ctrl: program counter, jump and interrupt control.
//
// Holds the program counter (PC), the jump address register written by
// #JWR and the interrupt address register written by #IWR, and drives the
// return-address stack. Each rising clock edge loads the PC with:
//   - PC + 1 for an ordinary line;
//   - PC itself for a line carrying SCLK (program counting stopped) and
//     while a download is in progress;
//   - the jump target for JMP, and for JMPIF when the selected condition
//     (cond_vec[csel], inverted if cinv) holds. The target is the address
//     field when the same line carries #JWR, else the jump address register;
//   - the top of the stack for RET, which pops it and ends interrupt service;
//   - the interrupt address register when ite is high and no interrupt is in
//     service: the PC the line would have gone to is pushed and the
//     in-service flag is set. This also wakes a core stopped by SCLK, which
//     returns to the line after the SCLK line.
// JWR/IWR, JMP/JMPIF, SCLK and an interrupt address follow the original design; the
// same-line bypass of #JWR, the RET operation, the in-service flag (the
// interrupt inputs are level-sensitive) and the condition invert bit are
// this design's own choices.
module jump_it_ctrl
  import mcu_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  instr_t     ins,          // gated instruction of the current line
  input  logic       dl_active,    // download: hold the PC
  input  logic [7:0] cond_vec,     // {T1I, T0I, MI, P, V, N, Z, C}
  input  logic       ite,          // interrupt request from the IT logic
  output addr_t      pc,
  output addr_t      jar,          // jump address register
  output addr_t      iar,          // interrupt address register
  output logic       in_service,
  output logic       it_taken,     // interrupt entry in this cycle
  output logic       jump_taken    // JMP/JMPIF/RET changes the flow this cycle
);
  addr_t pc_seq, target, ret_addr, pc_next, flow_next;
  logic  cond, push, pop, stk_empty, stk_full;

  assign pc_seq = ins.sclk ? pc : pc + 1'b1;
  assign target = (ins.aop == A_JWR) ? ins.addr : jar;
  assign cond   = cond_vec[ins.csel] ^ ins.cinv;

  always_comb begin
    flow_next  = pc_seq;
    jump_taken = 1'b0;
    pop        = 1'b0;
    unique case (ins.jctl)
      J_JMP:   begin flow_next = target; jump_taken = 1'b1; end
      J_JMPIF: if (cond) begin flow_next = target; jump_taken = 1'b1; end
      J_RET:   begin flow_next = ret_addr; jump_taken = 1'b1; pop = 1'b1; end
      default: ;
    endcase
  end

  assign it_taken = ite && !in_service && !dl_active;
  // A stopped core returns to the line after its SCLK line.
  assign push     = it_taken;

  always_comb begin
    if (dl_active)     pc_next = pc;
    else if (it_taken) pc_next = iar;
    else               pc_next = flow_next;
  end

  addr_t push_addr;
  assign push_addr = ins.sclk ? pc + 1'b1 : flow_next;

  stack_memory #(.DEPTH(STACK_DEPTH), .WIDTH(AW)) u_stack (
    .clk, .rst_n,
    .push (push),
    .pop  (pop && !push && !dl_active),
    .din  (push_addr),
    .dout (ret_addr),
    .empty(stk_empty),
    .full (stk_full)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      jar        <= '0;
      iar        <= '0;
      in_service <= 1'b0;
    end else begin
      pc <= pc_next;
      if (ins.aop == A_JWR) jar <= ins.addr;
      if (ins.aop == A_IWR) iar <= ins.addr;
      if (it_taken)                                   in_service <= 1'b1;
      else if (ins.jctl == J_RET && !dl_active)       in_service <= 1'b0;
    end
  end
endmodule
