// tb_rsfq_alu4: end-to-end test of the 4-bit ALU at its default size.
//
// Streams operand pairs into the ALU, one per clock, with the switches held
// for each stream, and compares every result and carry with a reference
// computed from the operands ({carry,result} = a+b for ADD, a|b, a&b, a^b
// with carry 0 otherwise) exactly ALU4_LATENCY clocks after the pair
// entered. Streams: the six ADD pairs and the six OR/XOR/AND pairs of the
// published measurements, then every one of the 256 operand pairs for each
// operation, then random operations. A separate step checks that a single
// pair appears at the outputs after exactly four clocks and not before.
// Mechanisms counted (each must occur at least once): each of the four
// operations, a back-to-back result (new pair every clock), an ADD with
// CARRY = 1, a carry rippling from bit 0 through all four bits to CARRY,
// a logic operation on operands whose ADD would carry (CARRY must stay 0),
// and reset.
module tb_rsfq_alu4;
  import rsfq_alu_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned LAT = ALU4_LATENCY;

  logic clk = 0, rst_n;
  logic [W-1:0] a_in, b_in, result;
  logic carry;
  alu_switches_t sw;
  int checks = 0, failures = 0;
  int n_op [4];
  int n_back_to_back = 0, n_carry_out = 0, n_full_ripple = 0, n_logic_no_carry = 0;
  int n_reset = 0;

  rsfq_alu4 dut (.clk(clk), .rst_n(rst_n), .a(a_in), .b(b_in), .sw(sw),
                 .result(result), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] ref_alu(alu_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    case (op)
      OP_OR:   return {1'b0, x | y};
      OP_AND:  return {1'b0, x & y};
      OP_XOR:  return {1'b0, x ^ y};
      default: return (W+1)'(x) + (W+1)'(y);
    endcase
  endfunction

  // Stream n pairs with the switches of op held; check each result LAT
  // clocks later.
  task automatic run_stream(alu_op_e op, logic [W-1:0] av[$], logic [W-1:0] bv[$]);
    int n = av.size();
    logic [W:0] exp [$];
    sw = op_switches(op);
    for (int k = 0; k < n + LAT - 1; k++) begin
      if (k < n) begin
        a_in = av[k]; b_in = bv[k];
        exp.push_back(ref_alu(op, av[k], bv[k]));
      end else begin
        a_in = '0; b_in = '0;
      end
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        int j = k - (LAT - 1);
        checks++;
        if ({carry, result} !== exp[j]) begin
          failures++;
          $display("FAIL %s %b op %b: got carry=%0d result=%b, expected %b",
                   op.name(), av[j], bv[j], carry, result, exp[j]);
        end else begin
          n_op[op]++;
          if (j > 0) n_back_to_back++;
          if (op == OP_ADD && carry) n_carry_out++;
          // Generate in bit 0 and propagate in bits 1..3.
          if (op == OP_ADD && (av[j][0] & bv[j][0]) && ((av[j] ^ bv[j]) >> 1) == '1 >> 1)
            n_full_ripple++;
          if (op != OP_ADD && (((W+1)'(av[j]) + (W+1)'(bv[j])) >> W) != 0 && !carry)
            n_logic_no_carry++;
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [W-1:0] av[$], bv[$];
    alu_op_e ops [4] = '{OP_ADD, OP_OR, OP_XOR, OP_AND};

    sw = op_switches(OP_ADD);
    a_in = '1; b_in = '1;
    rst_n = 0;
    repeat (2) @(negedge clk);
    checks++;
    if ({carry, result} !== '0) begin failures++; $display("FAIL reset"); end
    else n_reset++;
    rst_n = 1;

    // Published ADD cases: 1001+0000, 1001+1001, 1011+1001, 0010+1001,
    // 0010+0000, 0000+0000.
    av = '{4'b1001, 4'b1001, 4'b1011, 4'b0010, 4'b0010, 4'b0000};
    bv = '{4'b0000, 4'b1001, 4'b1001, 4'b1001, 4'b0000, 4'b0000};
    run_stream(OP_ADD, av, bv);
    // Published OR / XOR / AND cases.
    av = '{4'b1101, 4'b1011, 4'b0110, 4'b1001, 4'b0011, 4'b0110};
    bv = '{4'b1001, 4'b0010, 4'b0100, 4'b1011, 4'b0110, 4'b1101};
    run_stream(OP_OR,  av, bv);
    run_stream(OP_XOR, av, bv);
    run_stream(OP_AND, av, bv);

    // Every operand pair, every operation.
    foreach (ops[o]) begin
      av = {}; bv = {};
      for (int i = 0; i < (1 << (2*W)); i++) begin
        av.push_back(W'(i >> W));
        bv.push_back(W'(i));
      end
      run_stream(ops[o], av, bv);
    end

    // Exact latency: one pair between zeros.
    sw = op_switches(OP_ADD);
    a_in = 4'b1111; b_in = 4'b0001;
    @(posedge clk); @(negedge clk);
    a_in = '0; b_in = '0;
    for (int c = 1; c < LAT; c++) begin
      checks++;
      if ({carry, result} !== '0) begin
        failures++; $display("FAIL result after %0d clocks, expected %0d", c, LAT);
      end
      @(posedge clk); @(negedge clk);
    end
    checks++;
    if ({carry, result} !== 5'b10000) begin
      failures++; $display("FAIL latency: got %b%b", carry, result);
    end

    // Random operations.
    for (int r = 0; r < 40; r++) begin
      av = {}; bv = {};
      for (int i = 0; i < 1 + $urandom_range(0, 15); i++) begin
        av.push_back(W'($urandom));
        bv.push_back(W'($urandom));
      end
      run_stream(alu_op_e'($urandom_range(0, 3)), av, bv);
    end

    $display("mechanisms: OR=%0d AND=%0d ADD=%0d XOR=%0d back_to_back=%0d carry_out=%0d full_ripple=%0d logic_carry_zero=%0d reset=%0d",
             n_op[OP_OR], n_op[OP_AND], n_op[OP_ADD], n_op[OP_XOR], n_back_to_back,
             n_carry_out, n_full_ripple, n_logic_no_carry, n_reset);
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never exercised", i); end
    end
    checks++; if (n_back_to_back == 0)   begin failures++; $display("FAIL no back-to-back"); end
    checks++; if (n_carry_out == 0)      begin failures++; $display("FAIL no carry out"); end
    checks++; if (n_full_ripple == 0)    begin failures++; $display("FAIL no full ripple"); end
    checks++; if (n_logic_no_carry == 0) begin failures++; $display("FAIL no logic op with carry-free check"); end
    checks++; if (n_reset == 0)          begin failures++; $display("FAIL no reset"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
