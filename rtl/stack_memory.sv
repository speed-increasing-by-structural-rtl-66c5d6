// stack_memory: return-address stack (LIFO) of the program counter.
//
// DEPTH entries of WIDTH bits. push writes din on top at the rising clock
// edge, pop removes the top entry; dout always shows the current top. A push
// on a full stack overwrites the top entry; a pop of an empty stack leaves
// it empty. The block diagram only names this memory: depth and overflow
// behaviour are this design's choices.
module stack_memory #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  logic [WIDTH-1:0] mem [DEPTH];
  localparam int unsigned XW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [PW-1:0]    cnt;
  logic [XW-1:0]    top_i, next_i;

  assign top_i  = XW'(cnt - 1'b1);
  assign next_i = XW'(cnt);

  assign empty = (cnt == '0);
  assign full  = (cnt == PW'(DEPTH));
  assign dout  = empty ? '0 : mem[top_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (push) begin
      if (full) mem[top_i] <= din;
      else begin
        mem[next_i] <= din;
        cnt      <= cnt + 1'b1;
      end
    end else if (pop && !empty) begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
