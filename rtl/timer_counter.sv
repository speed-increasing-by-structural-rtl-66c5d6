// timer_counter: one programmable timer/counter module.
//
// Holds the limit register (TCL), written from BUS Q when tcl_we is high,
// and the W-bit count (TCM). In timing mode (mode = 0) the count advances
// on every clock; in counting mode (mode = 1) it advances on each rising
// edge of the input bit bits[sel], sampled once per clock. The count wraps
// at its maximum and can be loaded from BUS Q (cnt_we). The condition check
// raises toi, the "overload" interrupt, while TCM >= TCL (ge_compare).
// The limit register, the >= check and the bit-select multiplexer follow
// the original design. Which mode value means timing, edge counting rather than
// level counting, the wrap and the count load are this design's choices.
module timer_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mode,
  input  logic [2:0]   sel,
  input  logic [7:0]   bits,
  input  logic         tcl_we,
  input  logic         cnt_we,
  input  logic [W-1:0] busq,
  output logic [W-1:0] tcm,
  output logic [W-1:0] tcl,
  output logic         toi,
  output logic         tick      // the count advanced in this cycle
);
  logic bit_now, bit_prev;

  assign bit_now = bits[sel];
  assign tick    = mode ? (bit_now && !bit_prev) : 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tcm      <= '0;
      tcl      <= '1;
      bit_prev <= 1'b0;
    end else begin
      bit_prev <= bit_now;
      if (tcl_we) tcl <= busq;
      if (cnt_we)    tcm <= busq;
      else if (tick) tcm <= tcm + 1'b1;
    end

  ge_compare #(.W(W)) u_check (.tcm(tcm), .tcl(tcl), .ge(toi));
endmodule
