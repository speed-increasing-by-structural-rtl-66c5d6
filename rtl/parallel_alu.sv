// parallel_alu: the data-operation unit between BUS1/BUS2 and BUS Q.
//
// All operations of the data-instruction table are formed side by side from
// the two operands (a = BUS1 = S1, b = BUS2 = S2) and the operation code
// selects one result: ADD, SUB (S1 - S2), AND, OR, XOR, NOR, NAND, NXOR,
// the four mixed forms ~S1&S2, S1&~S2, ~S1|S2, S1|~S2, INV S1, INV S2,
// MOV S1, MOV S2, FF (all ones), CLR (all zeros), SR S1 and SL S2 (zero
// shifted in, carry untouched). The shift field then optionally shifts the
// result right or left through the carry flag (Shift3/Shift4 of the table).
// Purely combinational; the ALU is the longest path of the one-cycle line.
// Flags: C is the carry of ADD, the borrow of SUB and the bit shifted out by
// a shift through carry, otherwise cin is kept; V is the two's complement
// overflow of ADD/SUB, otherwise 0; Z, N and P (the XOR of all result
// bits, high for an odd number of ones) describe the final result. The operation set
// follows the original design; the flag definitions are this design's choice.
module parallel_alu
  import mcu_pkg::*;
(
  input  op_e    op,
  input  shift_e shift,
  input  data_t  a,
  input  data_t  b,
  input  logic   cin,
  output data_t  q,
  output flags_t flags
);
  logic [DW:0] sum, dif;
  data_t       r;
  logic        c1, v1;

  assign sum = {1'b0, a} + {1'b0, b};
  assign dif = {1'b0, a} - {1'b0, b};

  always_comb begin
    c1 = cin;
    v1 = 1'b0;
    unique case (op)
      OP_ADD:   begin r = sum[DW-1:0]; c1 = sum[DW];
                      v1 = (a[DW-1] == b[DW-1]) && (r[DW-1] != a[DW-1]); end
      OP_SUB:   begin r = dif[DW-1:0]; c1 = dif[DW];
                      v1 = (a[DW-1] != b[DW-1]) && (r[DW-1] != a[DW-1]); end
      OP_AND:   r = a & b;
      OP_OR:    r = a | b;
      OP_XOR:   r = a ^ b;
      OP_NOR:   r = ~(a | b);
      OP_NAND:  r = ~(a & b);
      OP_NXOR:  r = ~(a ^ b);
      OP_NAND1: r = ~a & b;
      OP_ANDN2: r = a & ~b;
      OP_NOR1:  r = ~a | b;
      OP_ORN2:  r = a | ~b;
      OP_INV1:  r = ~a;
      OP_INV2:  r = ~b;
      OP_MOV1:  r = a;
      OP_MOV2:  r = b;
      OP_FF:    r = '1;
      OP_CLR:   r = '0;
      OP_SR1:   r = {1'b0, a[DW-1:1]};
      OP_SL2:   r = {b[DW-2:0], 1'b0};
      default:  r = '0;
    endcase

    q       = r;
    flags.c = c1;
    unique case (shift)
      SH_RC:   begin q = {c1, r[DW-1:1]}; flags.c = r[0];    end
      SH_LC:   begin q = {r[DW-2:0], c1}; flags.c = r[DW-1]; end
      default: ;
    endcase
    flags.v = v1;
    flags.z = (q == '0);
    flags.n = q[DW-1];
    flags.p = ^q;
  end
endmodule
