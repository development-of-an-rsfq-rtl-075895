// rsfq_alu_pkg: types and constants shared by the 4-bit ALU and its parts.
//
// The ALU has no opcode register. Its operation is chosen by three static
// "dc switches" a, b and c that gate the outputs of each half adder cell.
// alu_switches_t bundles the three switch levels. alu_op_e names the four
// operations the switch table defines, and op_switches() gives the switch
// setting for each one:
//
//          OR  AND  ADD  XOR
//     a     1   0    1    1
//     b     1   1    0    0
//     c     0   0    1    0
//
// The table is the source design's. The two-bit encoding of alu_op_e is a
// choice of this implementation; the hardware itself only sees the switches.
package rsfq_alu_pkg;

  // Switch levels; 1 = ON (passes pulses), 0 = OFF (blocks them).
  typedef struct packed {
    logic a;  // SUM  -> data output
    logic b;  // CARRY -> data output
    logic c;  // CARRY -> carry output
  } alu_switches_t;

  typedef enum logic [1:0] {
    OP_OR  = 2'd0,
    OP_AND = 2'd1,
    OP_ADD = 2'd2,
    OP_XOR = 2'd3
  } alu_op_e;

  // Clocks from operands at the inputs to result at the outputs (4-bit ALU
  // at its default width; in general its latency equals its width).
  localparam int unsigned ALU1_LATENCY = 1;  // one clocked half adder
  localparam int unsigned ALU4_LATENCY = 4;  // half adder row + three ripple columns

  // Switch setting for each operation (the switch table above).
  function automatic alu_switches_t op_switches(alu_op_e op);
    alu_switches_t s;
    unique case (op)
      OP_OR:   s = '{a: 1'b1, b: 1'b1, c: 1'b0};
      OP_AND:  s = '{a: 1'b0, b: 1'b1, c: 1'b0};
      OP_ADD:  s = '{a: 1'b1, b: 1'b0, c: 1'b1};
      OP_XOR:  s = '{a: 1'b1, b: 1'b0, c: 1'b0};
      default: s = '0;
    endcase
    return s;
  endfunction

endpackage
