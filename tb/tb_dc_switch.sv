// tb_dc_switch: exhaustive check that the switch passes its input when ON
// and holds its output at 0 when OFF.
module tb_dc_switch;
  logic on, d, q;
  int checks = 0, failures = 0;

  dc_switch dut (.on(on), .d(d), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {on, d} = i[1:0];
      #1;
      checks++;
      if (q !== (on ? d : 1'b0)) begin
        failures++;
        $display("FAIL on=%0d d=%0d q=%0d", on, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
