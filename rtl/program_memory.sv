// program_memory: the wide program store of the microcontroller.
//
// DEPTH words of WIDTH bits (65536 x 60 bits, 480 kByte, as the design
// specifies). The program counter reads it combinationally, so the fetched
// word is valid in the same clock cycle and one instruction completes per
// clock. The address decoder shown next to the memory in the block diagram
// is the array index here. The write port is the download line: a word is
// written at the rising clock edge while we is high. The download protocol
// itself is not part of this design. Asynchronous read is this design's
// choice to keep execution to one cycle; the memory starts at all-zero words
// (NOP, NOADR), which is also this design's choice.
module program_memory #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 60,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
