// half_adder: the half adder cell, the only arithmetic cell of the ALU.
//
// sum = x xor y, carry = x and y. The ALU uses ten of these: four in the
// input row (one per bit, inside alu_1bit) and two in each of the three
// ripple columns (carry_column). In the superconducting original the cell
// is clocked; here it is pure combinational logic and the clocking is done
// by the flip-flops of the module that contains it, which gives the same
// one-clock step per pipeline column.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = x ^ y;
    carry = x & y;
  end

endmodule
