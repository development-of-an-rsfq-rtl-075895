// alu_1bit: the 1-bit ALU block, one half adder and three dc switches.
//
// Operands x and y are added by a half adder whose SUM and CARRY are
// registered on the rising clock edge (the cell is clocked in the original
// technology). The switch block then routes the registered SUM and CARRY to
// data_out and carry_out under control of the switches a, b, c:
//   OR  (a,b on)  data_out = x|y, carry_out = 0
//   AND (b on)    data_out = x&y, carry_out = 0
//   ADD (a,c on)  data_out = x^y, carry_out = x&y
//   XOR (a on)    data_out = x^y, carry_out = 0
// Timing: one clock from operands to outputs, a new operand pair every
// clock. The switches act after the register, so a switch change shows at
// the outputs at once, on the pair already held. Reset (asynchronous,
// active low, clears the register) is this design's addition.
// This block is both the stand-alone 1-bit ALU and the first pipeline column
// of the 4-bit ALU, which uses one per bit.
module alu_1bit
  import rsfq_alu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  alu_switches_t sw,
  input  logic          x,
  input  logic          y,
  output logic          data_out,
  output logic          carry_out
);

  logic ha_sum, ha_carry;
  logic [1:0] ha_q;

  half_adder u_ha (.x(x), .y(y), .sum(ha_sum), .carry(ha_carry));

  // Clocking of the half adder cell.
  sfq_dff #(.WIDTH(2)) u_ha_reg (
    .clk(clk), .rst_n(rst_n), .d({ha_carry, ha_sum}), .q(ha_q)
  );

  switch_block u_sw (
    .sw(sw), .sum_in(ha_q[0]), .carry_in(ha_q[1]),
    .data_out(data_out), .carry_out(carry_out)
  );

endmodule
