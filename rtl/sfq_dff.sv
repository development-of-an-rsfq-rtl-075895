// sfq_dff: a row of WIDTH clocked D flip-flops.
//
// Delays WIDTH bits by exactly one clock. The 4-bit ALU uses rows of these
// to carry finished result bits, and bits still waiting for their carry,
// alongside the ripple columns so that all five outputs leave on the same
// clock. Asynchronous active-low reset to 0 (the superconducting original
// has no reset; this one exists so that the outputs are defined from the
// first clock).
module sfq_dff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
