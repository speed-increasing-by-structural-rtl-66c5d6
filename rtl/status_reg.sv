// status_reg: the six status bits of the core.
//
// Bits (mcu_pkg): C, Z, N, V, P and MI ("memory is ready"). At the rising
// clock edge a line with a data operation loads C..P from the ALU flags,
// unless the line names the status register as its destination, in which
// case C..P are loaded from BUS Q bits 4:0. MI is not writable: it copies
// the ready bit of the data memory. The status bits feed the jump conditions
// and the status interrupt enables. The original design names the status register
// and the MI bit; the bit set and write rules are this design's choice.
module status_reg
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,      // line carries a data operation
  input  logic       we,       // destination is the status register
  input  flags_t     flags,
  input  data_t      busq,
  input  logic       mi,
  output logic [5:0] status
);
  logic [4:0] f;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      f <= '0;
    else if (we)     f <= busq[4:0];
    else if (upd)    f <= {flags.p, flags.v, flags.n, flags.z, flags.c};

  assign status = {mi, f};
endmodule
