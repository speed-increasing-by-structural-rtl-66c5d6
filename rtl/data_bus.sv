// data_bus: the three-bus data path ("data guiding").
//
// Every device that can be a source presents its value in src_vals, indexed
// by its device code (mcu_pkg::dev_e). The two source fields of the line
// select one value each onto BUS1 and BUS2, which feed the parallel ALU; the
// ALU result travels on BUS Q. The destination field is decoded into one
// write strobe per device (dst_we), active only when the line carries a data
// operation, so a destination is written at the rising edge that ends the
// line: reading the sources and writing the destination are the two steps
// of an instruction. The two sources and one destination per line, and the
// 3 x 8-bit buses, follow the original design; modelling the buses as multiplexers
// and the device codes are this design's choices. Code D_NONE reads as zero.
module data_bus
  import mcu_pkg::*;
(
  input  data_t            src_vals [NDEV],
  input  dev_e             sel1,
  input  dev_e             sel2,
  input  dev_e             dst,
  input  logic             active,      // line carries a data operation
  output data_t            bus1,
  output data_t            bus2,
  output logic [NDEV-1:0]  dst_we
);
  always_comb begin
    bus1 = '0;
    bus2 = '0;
    if (sel1 != D_NONE && int'(sel1) < NDEV) bus1 = src_vals[sel1];
    if (sel2 != D_NONE && int'(sel2) < NDEV) bus2 = src_vals[sel2];
    dst_we = '0;
    if (active && dst != D_NONE && int'(dst) < NDEV) dst_we[dst] = 1'b1;
  end
endmodule
