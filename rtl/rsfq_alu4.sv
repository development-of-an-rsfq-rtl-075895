// rsfq_alu4: pipelined 4-bit ALU (OR, AND, XOR, ADD) built only from half
// adder cells, dc switches and D flip-flops.
//
// Structure (one pipeline column per clock, clock travelling with the data):
//   column 0  : one alu_1bit per bit. Each half adder forms A^B and A&B,
//               and its three dc switches turn them into the bit's data
//               output p[i] and carry output g[i]. For OR, AND and XOR
//               p[i] already is the result bit and g[i] = 0; for ADD
//               p[i] = A^B and g[i] = A&B.
//   column k  : (k = 1 .. WIDTH-1) a carry_column adds the carry out of
//               bit k-1 to p[k], giving result bit k and the carry out of
//               bit k. Rows of flip-flops carry the finished lower result
//               bits and the still-waiting upper p/g bits beside it.
// The carry out of the last column is the CARRY output. In the logic
// operations every carry is 0, so the same ripple path just delays p.
// With WIDTH = 4 this uses 10 half adders (4 + 2*3) and 12 dc switches.
//
// Interface: operands a, b; switch setting sw (rsfq_alu_pkg::op_switches
// gives the four valid settings); result and carry. Reset is asynchronous,
// active low, and clears every flip-flop (this design's addition).
// Timing: WIDTH clocks (4) from a and b to result and carry, a new operand
// pair accepted every clock. sw is not pipelined: it acts between column 0
// and column 1, so it must be held for the WIDTH-1 clocks in which an
// operand pair passes that point and the following columns, i.e. change it
// only after the pipeline has drained if mixed results are not wanted.
//
// Following the source design: the operations and switch table, the half
// adder / switch / ripple-column structure, the number of columns and the
// DFF rows beside the columns. This implementation's choices: the exact
// two-half-adder make-up of each ripple column, which flip-flops delay the
// waiting bits, and the reset. The assertion at the end uses rst_n in its
// disable condition, so lint reports rst_n as used both synchronously and
// asynchronously; that use is in verification code only.
module rsfq_alu4
  import rsfq_alu_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_switches_t    sw,
  output logic [WIDTH-1:0] result,
  output logic             carry
);

  // Per column s: result bits done so far, waiting p/g bits, carry out of
  // bit s. Bits a column does not use are tied to 0.
  logic [WIDTH-1:0] res_s [WIDTH];
  logic [WIDTH-1:0] p_s   [WIDTH];
  logic [WIDTH-1:0] g_s   [WIDTH];
  logic             cy_s  [WIDTH];

  // ---- column 0: half adder row and switch blocks ----
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    alu_1bit u_alu1 (
      .clk(clk), .rst_n(rst_n), .sw(sw), .x(a[i]), .y(b[i]),
      .data_out(p_s[0][i]), .carry_out(g_s[0][i])
    );
  end

  always_comb begin
    res_s[0]    = '0;
    res_s[0][0] = p_s[0][0];
    cy_s[0]     = g_s[0][0];
  end

  // ---- columns 1 .. WIDTH-1: ripple carry ----
  for (genvar s = 1; s < WIDTH; s++) begin : g_col
    logic [WIDTH-1:0] res_q;
    logic [WIDTH-1:0] p_q, g_q;

    carry_column u_col (
      .clk(clk), .rst_n(rst_n),
      .p(p_s[s-1][s]), .g(g_s[s-1][s]), .cin(cy_s[s-1]),
      .o(res_q[s]), .cout(cy_s[s])
    );

    // Finished lower result bits.
    sfq_dff #(.WIDTH(s)) u_res_row (
      .clk(clk), .rst_n(rst_n), .d(res_s[s-1][s-1:0]), .q(res_q[s-1:0])
    );

    if (s < WIDTH-1) begin : g_wait
      // Upper bits still waiting for their carry.
      sfq_dff #(.WIDTH(2*(WIDTH-1-s))) u_wait_row (
        .clk(clk), .rst_n(rst_n),
        .d({p_s[s-1][WIDTH-1:s+1], g_s[s-1][WIDTH-1:s+1]}),
        .q({p_q[WIDTH-1:s+1],      g_q[WIDTH-1:s+1]})
      );
      assign res_q[WIDTH-1:s+1] = '0;
    end
    assign p_q[s:0] = '0;
    assign g_q[s:0] = '0;

    assign res_s[s] = res_q;
    assign p_s[s]   = p_q;
    assign g_s[s]   = g_q;
  end

  assign result = res_s[WIDTH-1];
  assign carry  = cy_s[WIDTH-1];

  // Logic operations never carry: with switch c held off for the whole
  // passage of the operands, CARRY must read 0.
  a_logic_no_carry : assert property (
    @(posedge clk) disable iff (!rst_n) (!sw.c) [*WIDTH] |-> !carry
  ) else $error("CARRY set although switch c was off");

endmodule
