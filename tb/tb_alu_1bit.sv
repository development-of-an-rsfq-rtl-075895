// tb_alu_1bit: runs the 1-bit ALU through the operations in the order
// AND, ADD, XOR, OR with all four operand pairs each, then random operands
// and random operations. Results are computed directly from the operands
// (x|y, x&y, x^y, x+y) and checked exactly one clock after the operands
// are applied, and not earlier. Also checks that a switch change takes
// effect on the operand pair already held, and reset.
module tb_alu_1bit;
  import rsfq_alu_pkg::*;
  logic clk = 0, rst_n;
  alu_switches_t sw;
  logic x, y, data_out, carry_out;
  int checks = 0, failures = 0;

  alu_1bit dut (.clk(clk), .rst_n(rst_n), .sw(sw), .x(x), .y(y),
                .data_out(data_out), .carry_out(carry_out));

  always #5 clk = ~clk;

  function automatic logic [1:0] ref_op(alu_op_e op, logic xa, logic ya);
    case (op)
      OP_OR:   return {1'b0, xa | ya};
      OP_AND:  return {1'b0, xa & ya};
      OP_XOR:  return {1'b0, xa ^ ya};
      default: return 2'(xa) + 2'(ya);
    endcase
  endfunction

  task automatic apply_and_check(alu_op_e op, logic xa, logic ya);
    logic [1:0] exp;
    sw = op_switches(op);
    x = xa; y = ya;
    @(posedge clk);
    #1;
    exp = ref_op(op, xa, ya);
    checks++;
    if ({carry_out, data_out} !== exp) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d -> c=%0d d=%0d", op.name(), xa, ya, carry_out, data_out);
    end
    @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e seq [4] = '{OP_AND, OP_ADD, OP_XOR, OP_OR};
    sw = op_switches(OP_ADD);
    x = 1; y = 1;
    rst_n = 0;
    @(negedge clk);
    checks++;
    if ({carry_out, data_out} !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst_n = 1;

    foreach (seq[k])
      for (int v = 0; v < 4; v++) apply_and_check(seq[k], v[1], v[0]);

    // Latency: the output must not follow new operands before the edge.
    sw = op_switches(OP_OR);
    x = 0; y = 0;
    @(posedge clk); @(negedge clk);
    x = 1; y = 1;
    #1;
    checks++;
    if (data_out !== 1'b0) begin failures++; $display("FAIL output changed before clock"); end
    @(posedge clk); #1;
    checks++;
    if (data_out !== 1'b1) begin failures++; $display("FAIL output missing after clock"); end
    // Switch change acts at once on the held pair (1,1): ADD gives carry 1.
    sw = op_switches(OP_ADD);
    #1;
    checks++;
    if ({carry_out, data_out} !== 2'b10) begin failures++; $display("FAIL switch change"); end
    @(negedge clk);

    for (int i = 0; i < 400; i++)
      apply_and_check(alu_op_e'($urandom_range(0, 3)), 1'($urandom), 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
