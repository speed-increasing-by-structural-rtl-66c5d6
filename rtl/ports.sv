// ports: the three 8-bit I/O ports PA, PB and PC.
//
// Each port has an output latch, written from BUS Q at the rising clock
// edge when the line names the port as destination, and input pins, which
// a line naming the port as source reads directly. Separate input and
// output pins per port (no direction register) and reset of the latches to
// zero are this design's choices; the original design only names the ports and
// uses port B pins as interrupt inputs and port C pins as a count source.
module ports
  import mcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  data_t busq,
  input  logic  pa_we,
  input  logic  pb_we,
  input  logic  pc_we,
  output data_t pa_out,
  output data_t pb_out,
  output data_t pc_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pa_out <= '0;
      pb_out <= '0;
      pc_out <= '0;
    end else begin
      if (pa_we) pa_out <= busq;
      if (pb_we) pb_out <= busq;
      if (pc_we) pc_out <= busq;
    end
endmodule
