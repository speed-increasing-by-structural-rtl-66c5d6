// instr_gate: the "disable instructions" stage between program memory and
// the rest of the core.
//
// It splits the 60-bit program word into the control field and the address
// field (mcu_pkg gives the layout) and disables what must not act:
//  - while dl_active is high (program download) the whole word is replaced
//    by an empty line: no data operation, no address operation, no jump;
//  - in a line carrying SCLK the address operation and the jump field are
//    removed, because stopping the program counter forbids address
//    operations; the data operation of that line still runs every cycle.
// Purely combinational. Blanking during download is this design's reading of
// the block's name; the SCLK rule follows the description of SCLK.
module instr_gate
  import mcu_pkg::*;
(
  input  word_t  word,
  input  logic   dl_active,
  output instr_t ins
);
  instr_t raw;
  assign raw = instr_t'(word);

  always_comb begin
    ins = raw;
    if (dl_active) begin
      ins = '0;
    end else if (raw.sclk) begin
      ins.aop  = A_NOADR;
      ins.jctl = J_NONE;
    end
  end
endmodule
