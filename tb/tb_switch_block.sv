// tb_switch_block: checks the three-switch routing.
// Part 1: every switch setting against every SUM/CARRY pair, compared with
// the routing a: SUM->data, b: CARRY->data, c: CARRY->carry.
// Part 2: for the four operations of the switch table, feeds the SUM and
// CARRY of every operand pair and compares with OR, AND, XOR and 1-bit ADD
// computed directly from the operands.
module tb_switch_block;
  import rsfq_alu_pkg::*;
  alu_switches_t sw;
  logic sum_in, carry_in, data_out, carry_out;
  int checks = 0, failures = 0;

  switch_block dut (.sw(sw), .sum_in(sum_in), .carry_in(carry_in),
                    .data_out(data_out), .carry_out(carry_out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 4; v++) begin
        logic exp_d, exp_c;
        sw = alu_switches_t'(s[2:0]);
        {sum_in, carry_in} = v[1:0];
        #1;
        exp_d = 1'b0;
        if (sw.a && sum_in)   exp_d = 1'b1;
        if (sw.b && carry_in) exp_d = 1'b1;
        exp_c = (sw.c && carry_in) ? 1'b1 : 1'b0;
        checks++;
        if (data_out !== exp_d || carry_out !== exp_c) begin
          failures++;
          $display("FAIL sw=%b sum=%0d carry=%0d -> d=%0d c=%0d", sw, sum_in, carry_in,
                   data_out, carry_out);
        end
      end
    end
    for (int o = 0; o < 4; o++) begin
      alu_op_e op;
      op = alu_op_e'(o[1:0]);
      for (int v = 0; v < 4; v++) begin
        logic x, y;
        logic [1:0] exp;
        {x, y} = v[1:0];
        sw = op_switches(op);
        sum_in = x ^ y;
        carry_in = x & y;
        #1;
        case (op)
          OP_OR:  exp = {1'b0, x | y};
          OP_AND: exp = {1'b0, x & y};
          OP_XOR: exp = {1'b0, x ^ y};
          default: exp = 2'(x) + 2'(y);
        endcase
        checks++;
        if ({carry_out, data_out} !== exp) begin
          failures++;
          $display("FAIL op=%s x=%0d y=%0d -> %b%b", op.name(), x, y, carry_out, data_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
