// timer_block: the two timers and their shared configuration register.
//
// The CCT register is written from BUS Q (WRCC). Its bits:
//   CC0 (X0)  Timer1 mode, CC1 (X1)  Timer2 mode (0 timing, 1 counting)
//   CC2..CC4  which BUS Q bit Timer1 counts
//   CC5..CC7  which port C pin Timer2 counts
// Timer1 counts a bit of BUS Q, i.e. a bit of the results the program
// produces; Timer2 counts a port C pin directly, without program time.
// Each timer has its own limit register (TSR0/TSR1 strobes here tcl1_we and
// tcl2_we) and raises T0I / T1I while its count is at or above its limit.
// Register bits and the two count sources follow the original design; the meaning
// of a 0 in X0/X1 and the reset values (CCT = 0, limits all ones, counts 0)
// are this design's choices.
module timer_block
  import mcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t busq,
  input  data_t portc,
  input  logic  cct_we,
  input  logic  tcl1_we,
  input  logic  tcl2_we,
  input  logic  t1_we,
  input  logic  t2_we,
  output data_t cct,
  output data_t tcm1,
  output data_t tcm2,
  output data_t tcl1,
  output data_t tcl2,
  output logic  t0i,
  output logic  t1i,
  output logic  tick1,
  output logic  tick2
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      cct <= '0;
    else if (cct_we) cct <= busq;

  timer_counter #(.W(DW)) u_timer1 (
    .clk, .rst_n,
    .mode(cct[0]), .sel(cct[4:2]), .bits(busq),
    .tcl_we(tcl1_we), .cnt_we(t1_we), .busq,
    .tcm(tcm1), .tcl(tcl1), .toi(t0i), .tick(tick1)
  );

  timer_counter #(.W(DW)) u_timer2 (
    .clk, .rst_n,
    .mode(cct[1]), .sel(cct[7:5]), .bits(portc),
    .tcl_we(tcl2_we), .cnt_we(t2_we), .busq,
    .tcm(tcm2), .tcl(tcl2), .toi(t1i), .tick(tick2)
  );
endmodule
