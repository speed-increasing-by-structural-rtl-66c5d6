// literal_register: 8-bit constant register fed from the address bus.
//
// The address instruction #LWR writes the low byte of the address field into
// the register at the rising clock edge; the data instructions read it as
// source L. Taking the low byte of the 16-bit address bus and resetting to
// zero are this design's choices.
module literal_register
  import mcu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lwr,
  input  addr_t abus,
  output data_t lit
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   lit <= '0;
    else if (lwr) lit <= abus[DW-1:0];
endmodule
