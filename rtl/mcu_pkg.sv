// mcu_pkg: shared types and codes of the three-bus microcontroller.
//
// The core executes one 60-bit program word per clock. A word carries a data
// instruction (operation, two sources, one destination) and, in the same line,
// an address instruction acting on the separate 16-bit address bus. The 60-bit
// width, the 16-bit address field and the 41 control bits follow the block
// diagram (41 control lines plus a 16-bit address bus); the 3-bit address
// opcode fills the remaining bits. The order of the fields and every code
// value below are this design's own choice.
//
// Word layout, bit 59 down to bit 0:
//   [59:57] aop     address instruction (NOADR, MWR, MRD, JWR, IWR, LWR)
//   [56:41] addr    16-bit address / literal (literal uses addr[7:0])
//   [40:29] spare   reserved control bits, ignored
//   [28]    sclk    stop program counting (sleep with direct operation)
//   [27]    cinv    invert the jump condition
//   [26:24] csel    jump condition select
//   [23:22] jctl    NONE, JMP, JMPIF, RET
//   [21:20] shift   post-shift of the result through carry (none, right, left)
//   [19:15] dst     destination device on BUS Q
//   [14:10] src2    source device on BUS2
//   [9:5]   src1    source device on BUS1
//   [4:0]   op      data operation of the parallel ALU
package mcu_pkg;

  localparam int unsigned DW = 8;    // data bus width
  localparam int unsigned AW = 16;   // address bus width
  localparam int unsigned IW = 60;   // program word width
  localparam int unsigned CW = 41;   // control field width

  typedef logic [DW-1:0] data_t;
  typedef logic [AW-1:0] addr_t;
  typedef logic [IW-1:0] word_t;

  // Data operations (table of data instructions). Shift3/Shift4 of the table
  // are any operation combined with a post-shift, see shift_e.
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,   // no data instruction in this line
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,   // S1 - S2
    OP_AND   = 5'd3,
    OP_OR    = 5'd4,
    OP_XOR   = 5'd5,
    OP_NOR   = 5'd6,
    OP_NAND  = 5'd7,
    OP_NXOR  = 5'd8,
    OP_NAND1 = 5'd9,   // -AND : ~S1 &  S2
    OP_ANDN2 = 5'd10,  // AND- :  S1 & ~S2
    OP_NOR1  = 5'd11,  // -OR  : ~S1 |  S2
    OP_ORN2  = 5'd12,  // OR-  :  S1 | ~S2
    OP_INV1  = 5'd13,
    OP_INV2  = 5'd14,
    OP_MOV1  = 5'd15,
    OP_MOV2  = 5'd16,
    OP_FF    = 5'd17,
    OP_CLR   = 5'd18,
    OP_SR1   = 5'd19,  // S1 shifted right, zero in, no carry
    OP_SL2   = 5'd20   // S2 shifted left, zero in, no carry
  } op_e;

  typedef enum logic [1:0] {
    SH_NONE = 2'd0,
    SH_RC   = 2'd1,    // result shifted right through carry
    SH_LC   = 2'd2     // result shifted left through carry
  } shift_e;

  // Source devices (BUS1 / BUS2) and destination devices (BUS Q) share codes.
  typedef enum logic [4:0] {
    D_NONE = 5'd0,     // as a source: reads 0
    D_ACC  = 5'd1,
    D_SR   = 5'd2,     // shift register
    D_L    = 5'd3,     // literal register (source only)
    D_PA   = 5'd4,
    D_PB   = 5'd5,
    D_PC   = 5'd6,
    D_MEM  = 5'd7,     // memory read register (source only)
    D_ST   = 5'd8,     // status register
    D_T1   = 5'd9,     // Timer1 count
    D_T2   = 5'd10,    // Timer2 count
    D_IE1  = 5'd11,
    D_IE2  = 5'd12,
    D_IL   = 5'd13,
    D_TCL1 = 5'd14,
    D_TCL2 = 5'd15,
    D_CCT  = 5'd16
  } dev_e;

  localparam int unsigned NDEV = 17;

  typedef enum logic [2:0] {
    A_NOADR = 3'd0,
    A_MWR   = 3'd1,
    A_MRD   = 3'd2,
    A_JWR   = 3'd3,
    A_IWR   = 3'd4,
    A_LWR   = 3'd5
  } aop_e;

  typedef enum logic [1:0] {
    J_NONE  = 2'd0,
    J_JMP   = 2'd1,
    J_JMPIF = 2'd2,
    J_RET   = 2'd3
  } jctl_e;

  // Status bit positions (also the status interrupt enables IE2[5:0]).
  localparam int unsigned S_C  = 0;
  localparam int unsigned S_Z  = 1;
  localparam int unsigned S_N  = 2;
  localparam int unsigned S_V  = 3;
  localparam int unsigned S_P  = 4;
  localparam int unsigned S_MI = 5;

  // Condition vector for JMPIF: status bits 0..5, T0I at 6, T1I at 7.
  typedef struct packed {
    logic       c, z, n, v, p;
  } flags_t;

  typedef struct packed {
    aop_e       aop;
    addr_t      addr;
    logic [11:0] spare;
    logic       sclk;
    logic       cinv;
    logic [2:0] csel;
    jctl_e      jctl;
    shift_e     shift;
    dev_e       dst;
    dev_e       src2;
    dev_e       src1;
    op_e        op;
  } instr_t;

endpackage
