// work_regs: the accumulator ACC and the shift register SR.
//
// Both are 8-bit registers written from BUS Q at the rising clock edge when
// the line names them as destination, and read as sources on BUS1/BUS2.
// The block diagram names them ("ACC, Shift regs."); one shift register,
// the reset value zero and having shifts done by the ALU on the way to it
// are this design's choices.
module work_regs
  import mcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  acc_we,
  input  logic  sr_we,
  input  data_t busq,
  output data_t acc,
  output data_t sr
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0;
      sr  <= '0;
    end else begin
      if (acc_we) acc <= busq;
      if (sr_we)  sr  <= busq;
    end
endmodule
