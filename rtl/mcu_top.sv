// mcu_top: a single-cycle 8-bit microcontroller built around three data
// buses and a separate address bus.
//
// Every clock executes one 60-bit program word (layout in mcu_pkg). The
// word names two sources, which the data_bus multiplexers place on BUS1
// and BUS2, an operation of the parallel ALU, whose result travels on BUS Q,
// and a destination, written at the rising edge that ends the line. In the
// same line an address instruction uses the 16-bit address bus: a data
// memory write (#MWR) or read request (#MRD), a jump address (#JWR), an
// interrupt address (#IWR) or a literal (#LWR). There is no pipeline: the
// program memory is read combinationally from the PC, and the ALU sets the
// longest path.
//
// Around the core: an intelligent data memory that completes reads on its
// own and flags them with MI, two timer/counters with >= limit checks, an
// interrupt logic combining port B pins, status bits and timer flags, three
// 8-bit ports, and the SCLK line, which stops the PC and keeps executing the
// data operation of that line every clock until an interrupt arrives.
//
// The download interface (dl_*) writes the program memory; while dl_active
// is high the core executes nothing and the PC holds. The link that would
// drive it is outside this design. Structure and blocks follow the
// original design's block diagram; encodings and the details listed in each
// module's header are this design's choices.
module mcu_top
  import mcu_pkg::*;
#(
  parameter int unsigned PM_DEPTH    = 65536,
  parameter int unsigned DM_DEPTH    = 65536,
  parameter int unsigned MEM_LATENCY = 3,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // program download
  input  logic  dl_active,
  input  logic  dl_we,
  input  addr_t dl_addr,
  input  word_t dl_data,
  // ports
  input  data_t pa_in,
  input  data_t pb_in,
  input  data_t pc_in,
  output data_t pa_out,
  output data_t pb_out,
  output data_t pc_out,
  // observation
  output addr_t pc,
  output logic  ite,
  output logic  sleeping
);
  localparam int unsigned PMA = (PM_DEPTH > 1) ? $clog2(PM_DEPTH) : 1;

  word_t  word;
  instr_t ins;
  data_t  bus1, bus2, busq, lit, acc, sr, mrr, cct, tcm1, tcm2, tcl1, tcl2;
  data_t  ie1, ie2, il;
  data_t  src_vals [NDEV];
  logic [NDEV-1:0] dst_we;
  logic [5:0] status;
  flags_t flags;
  logic   mi, t0i, t1i, active;
  logic   in_service, it_taken, jump_taken, tick1, tick2;
  addr_t  jar, iar;

  // ---------------------------------------------------------------- fetch
  program_memory #(.DEPTH(PM_DEPTH), .WIDTH(IW), .AW(PMA)) u_pm (
    .clk,
    .raddr(pc[PMA-1:0]), .rdata(word),
    .we(dl_we), .waddr(dl_addr[PMA-1:0]), .wdata(dl_data)
  );

  instr_gate u_gate (.word, .dl_active, .ins);

  assign sleeping = ins.sclk;
  assign active   = (ins.op != OP_NOP);

  // ------------------------------------------------------ control / flow
  jump_it_ctrl #(.STACK_DEPTH(STACK_DEPTH)) u_jump (
    .clk, .rst_n, .ins, .dl_active,
    .cond_vec({t1i, t0i, status}),
    .ite, .pc, .jar, .iar, .in_service, .it_taken, .jump_taken
  );

  literal_register u_lit (
    .clk, .rst_n, .lwr(ins.aop == A_LWR), .abus(ins.addr), .lit
  );

  // ------------------------------------------------------------ data path
  always_comb begin
    for (int i = 0; i < int'(NDEV); i++) src_vals[i] = '0;
    src_vals[D_ACC]  = acc;
    src_vals[D_SR]   = sr;
    src_vals[D_L]    = lit;
    src_vals[D_PA]   = pa_in;
    src_vals[D_PB]   = pb_in;
    src_vals[D_PC]   = pc_in;
    src_vals[D_MEM]  = mrr;
    src_vals[D_ST]   = {2'b00, status};
    src_vals[D_T1]   = tcm1;
    src_vals[D_T2]   = tcm2;
    src_vals[D_IE1]  = ie1;
    src_vals[D_IE2]  = ie2;
    src_vals[D_IL]   = il;
    src_vals[D_TCL1] = tcl1;
    src_vals[D_TCL2] = tcl2;
    src_vals[D_CCT]  = cct;
  end

  data_bus u_bus (
    .src_vals, .sel1(ins.src1), .sel2(ins.src2), .dst(ins.dst), .active,
    .bus1, .bus2, .dst_we
  );

  parallel_alu u_alu (
    .op(ins.op), .shift(ins.shift), .a(bus1), .b(bus2),
    .cin(status[S_C]), .q(busq), .flags
  );

  status_reg u_status (
    .clk, .rst_n, .upd(active), .we(dst_we[D_ST]), .flags, .busq, .mi,
    .status
  );

  work_regs u_regs (
    .clk, .rst_n, .acc_we(dst_we[D_ACC]), .sr_we(dst_we[D_SR]), .busq,
    .acc, .sr
  );

  data_memory #(.DEPTH(DM_DEPTH), .LATENCY(MEM_LATENCY)) u_dm (
    .clk, .rst_n,
    .mwr(ins.aop == A_MWR), .mrd(ins.aop == A_MRD), .addr(ins.addr),
    .wdata(busq), .mrr, .mi
  );

  // ------------------------------------------------------------ peripherals
  timer_block u_timers (
    .clk, .rst_n, .busq, .portc(pc_in),
    .cct_we(dst_we[D_CCT]), .tcl1_we(dst_we[D_TCL1]),
    .tcl2_we(dst_we[D_TCL2]), .t1_we(dst_we[D_T1]), .t2_we(dst_we[D_T2]),
    .cct, .tcm1, .tcm2, .tcl1, .tcl2, .t0i, .t1i, .tick1, .tick2
  );

  it_logic u_it (
    .clk, .rst_n, .busq,
    .ie1_we(dst_we[D_IE1]), .ie2_we(dst_we[D_IE2]), .il_we(dst_we[D_IL]),
    .pb(pb_in), .status, .t0i, .t1i, .ie1, .ie2, .il, .ite
  );

  ports u_ports (
    .clk, .rst_n, .busq,
    .pa_we(dst_we[D_PA]), .pb_we(dst_we[D_PB]), .pc_we(dst_we[D_PC]),
    .pa_out, .pb_out, .pc_out
  );
endmodule
