// carry_column: one ripple column of the 4-bit ALU (an "HA" block after the
// switch blocks), built from two half adder cells and registered.
//
// Inputs are bit k's switched data output p (= A^B during ADD), its switched
// carry output g (= A&B during ADD) and the carry cin coming from bit k-1.
//   half adder 1:  o    = p ^ cin,   k = p & cin
//   half adder 2:  cout = g ^ k      (its own carry output is not used)
// During ADD, g and k are never 1 together (g=1 needs A=B=1, k=1 needs
// A^B=1), so the xor of half adder 2 equals the or that a full adder's carry
// needs, and its carry output is always 0. In the logic operations switch
// c is off, g and cin are 0, and p passes through unchanged as o, with
// cout = 0. For switch settings outside the switch table half adder 2 can
// produce a carry that is dropped; that is the hardware's behaviour too, so
// its unused carry output stands.
// o and cout are registered: one clock through the column.
module carry_column (
  input  logic clk,
  input  logic rst_n,
  input  logic p,
  input  logic g,
  input  logic cin,
  output logic o,
  output logic cout
);

  logic sum1, k;
  logic sum2;
  logic carry2_unused;

  half_adder u_ha_sum   (.x(p), .y(cin), .sum(sum1), .carry(k));
  half_adder u_ha_carry (.x(g), .y(k),   .sum(sum2), .carry(carry2_unused));

  sfq_dff #(.WIDTH(2)) u_reg (
    .clk(clk), .rst_n(rst_n), .d({sum2, sum1}), .q({cout, o})
  );

endmodule
