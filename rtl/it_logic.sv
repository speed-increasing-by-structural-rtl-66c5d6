// it_logic: the configurable interrupt logic.
//
// Three configuration registers are written from BUS Q:
//   IE1  enables of the eight port B pins as interrupts
//   IL   active level of each port B interrupt (IL = 1: pin low requests)
//   IE2  bits 0..5 enable the status bits S0..S5, bit 6 T0I, bit 7 T1I
// The request is the sum of products of the original design's equation:
//   ITE = OR_i IE1[i] & (IL[i] ^ B[i])  |  OR_j IE2[j] & S[j]
//         | IE2[6] & T0I | IE2[7] & T1I
// It is combinational and level-sensitive. The registers, their widths and
// the equation follow the original design; reset to zero (all disabled) is this
// design's choice.
module it_logic
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  data_t      busq,
  input  logic       ie1_we,
  input  logic       ie2_we,
  input  logic       il_we,
  input  data_t      pb,
  input  logic [5:0] status,
  input  logic       t0i,
  input  logic       t1i,
  output data_t      ie1,
  output data_t      ie2,
  output data_t      il,
  output logic       ite
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ie1 <= '0;
      ie2 <= '0;
      il  <= '0;
    end else begin
      if (ie1_we) ie1 <= busq;
      if (ie2_we) ie2 <= busq;
      if (il_we)  il  <= busq;
    end

  assign ite = |(ie1 & (il ^ pb))
             | |(ie2[5:0] & status)
             | (ie2[6] & t0i)
             | (ie2[7] & t1i);
endmodule
