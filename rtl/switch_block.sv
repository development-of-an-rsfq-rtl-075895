// switch_block: the three dc switches of one ALU bit ("S/W").
//
// It takes the SUM and CARRY of that bit's half adder and routes them:
//   switch a : SUM   -> data output
//   switch b : CARRY -> data output (merged with the SUM path)
//   switch c : CARRY -> carry output
// so data_out = (a & SUM) | (b & CARRY) and carry_out = c & CARRY.
// Over the four settings of the switch table this gives A|B, A&B, A^B and
// the (sum, carry) pair of an addition. In the logic operations switch c is
// off, so the carry output is always 0. The routing of the three switches
// follows the 1-bit block schematic; that the two paths into the data
// output combine as an OR follows from the OR row of the switch table
// (SUM | CARRY = A | B). Purely combinational.
module switch_block
  import rsfq_alu_pkg::*;
(
  input  alu_switches_t sw,
  input  logic          sum_in,
  input  logic          carry_in,
  output logic          data_out,
  output logic          carry_out
);

  logic sum_path;
  logic carry_path;

  dc_switch u_sw_a (.on(sw.a), .d(sum_in),   .q(sum_path));
  dc_switch u_sw_b (.on(sw.b), .d(carry_in), .q(carry_path));
  dc_switch u_sw_c (.on(sw.c), .d(carry_in), .q(carry_out));

  // Merge of the two paths into the data output.
  always_comb data_out = sum_path | carry_path;

endmodule
