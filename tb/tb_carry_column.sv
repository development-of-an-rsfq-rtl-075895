// tb_carry_column: all eight (p, g, cin) inputs. Expected values come from
// the column's arithmetic meaning: o is the low bit of p + cin; cout is the
// carry of bit k for the pairs that can occur in an addition (g = A&B,
// p = A^B, so p and g never both 1), i.e. g | (p & cin); for p = g = 1,
// which the ALU never produces, cout = g ^ (p & cin). Checks the one-clock
// latency and reset.
module tb_carry_column;
  logic clk = 0, rst_n;
  logic p, g, cin, o, cout;
  int checks = 0, failures = 0;

  carry_column dut (.clk(clk), .rst_n(rst_n), .p(p), .g(g), .cin(cin), .o(o), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {p, g, cin} = 3'b111;
    rst_n = 0;
    @(negedge clk);
    checks++;
    if ({o, cout} !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 8; i++) begin
        logic eo, ec;
        {p, g, cin} = i[2:0];
        eo = (p + cin) % 2 == 1;
        if (p && g) ec = g ^ (p & cin);
        else        ec = g | (p & cin);
        @(posedge clk);
        #1;
        checks++;
        if (o !== eo || cout !== ec) begin
          failures++;
          $display("FAIL p=%0d g=%0d cin=%0d -> o=%0d cout=%0d", p, g, cin, o, cout);
        end
        // Outputs must hold until the next edge.
        {p, g, cin} = ~i[2:0];
        #1;
        checks++;
        if (o !== eo || cout !== ec) begin failures++; $display("FAIL not registered"); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
