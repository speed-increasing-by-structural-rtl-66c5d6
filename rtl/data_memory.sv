// data_memory: the "intelligent" data memory on the separate address bus.
//
// DEPTH bytes (64 kByte by default; the original design also names a 32 kByte
// option). The core never waits for it:
//  - #MWR: the byte on BUS Q of the same line is written at the address of
//    the address field at the rising edge that ends the line;
//  - #MRD: the address is latched and MI (memory is ready) drops; the memory
//    completes the read by itself and, LATENCY clock edges later, loads the
//    memory read register (MRR) and raises MI. With LATENCY = 3 the program
//    can run three other lines before it reads the result, as in the
//    original design's example. A new #MRD restarts the sequence.
// MRR is read as a source; MI is a status bit and a jump condition. The
// latency, the write data taken from BUS Q and the restart rule are this
// design's choices where the original design gives no detail.
module data_memory
  import mcu_pkg::*;
#(
  parameter int unsigned DEPTH   = 65536,
  parameter int unsigned LATENCY = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mwr,
  input  logic  mrd,
  input  addr_t addr,
  input  data_t wdata,
  output data_t mrr,
  output logic  mi
);
  localparam int unsigned MA = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CB = $clog2(LATENCY + 1);

  data_t         mem [DEPTH];
  logic [MA-1:0] rd_addr;
  logic [CB-1:0] cnt;

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk)
    if (mwr) mem[addr[MA-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      cnt     <= '0;
      mrr     <= '0;
      mi      <= 1'b0;
    end else if (mrd) begin
      rd_addr <= addr[MA-1:0];
      cnt     <= CB'(LATENCY);
      mi      <= 1'b0;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
      if (cnt == CB'(1)) begin
        mrr <= mem[rd_addr];
        mi  <= 1'b1;
      end
    end
  end
endmodule
