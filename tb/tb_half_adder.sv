// tb_half_adder: exhaustive check of the half adder cell against the
// binary sum of its two inputs (sum bit and carry bit of x + y).
module tb_half_adder;
  logic x, y, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] total;
      {x, y} = i[1:0];
      #1;
      total = 2'(x) + 2'(y);
      checks++;
      if ({carry, sum} !== total) begin
        failures++;
        $display("FAIL x=%0d y=%0d got carry=%0d sum=%0d", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
