// ge_compare: the ">=" condition check of a timer/counter.
//
// ge is high when the counter value tcm is greater than or equal to the
// limit tcl. It is built as the original design's bit-serial chain, starting at
// the least significant bit with g(-1) = 1:
//     g(n) = g(n-1) & (tcm[n] | ~tcl[n])  |  tcm[n] & ~tcl[n]
// A higher bit where tcm is 1 and tcl is 0 decides "greater", a bit where
// tcm is 0 and tcl is 1 decides "less", equal bits pass the lower result on.
// Combinational.
module ge_compare #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] tcm,
  input  logic [W-1:0] tcl,
  output logic         ge
);
  logic [W:0] g;

  assign g[0] = 1'b1;
  for (genvar n = 0; n < W; n++) begin : g_chain
    assign g[n+1] = (g[n] & (tcm[n] | ~tcl[n])) | (tcm[n] & ~tcl[n]);
  end
  assign ge = g[W];
endmodule
