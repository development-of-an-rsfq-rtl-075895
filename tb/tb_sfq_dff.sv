// tb_sfq_dff: random data through a 5-bit row; checks the one-clock delay
// and that reset clears the row.
module tb_sfq_dff;
  localparam int unsigned W = 5;
  logic clk = 0, rst_n;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  sfq_dff #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    rst_n = 0;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      prev = W'($urandom);
      d = prev;
      @(posedge clk);
      #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL i=%0d q=%b exp=%b", i, q, prev); end
      d = ~prev;
      #1;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q changed between edges"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
