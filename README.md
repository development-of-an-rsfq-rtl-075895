# A 4-bit ALU from half adders and switches

This is the register-transfer model of a small pipelined arithmetic logic
unit. It was designed for superconducting single-flux-quantum (RSFQ) logic.
It offers four operations (OR, AND, XOR and ADD) and builds all of them
from one kind of arithmetic cell, the half adder.

There is no opcode and no multiplexer. Each bit's half adder always
computes both `A xor B` and `A and B`. Three static on/off switches then
decide which of the two reach the bit's data output and its carry output.
The ripple-carry chain behind the switches performs the addition. In the
logic operations it simply passes the data through, because no carry
enters it.

## The switch trick

One bit of the ALU (`alu_1bit`) is a half adder followed by three switches:

```
  switch a : SUM   -> OUTPUT
  switch b : CARRY -> OUTPUT      (merged with the SUM path, i.e. OR-ed)
  switch c : CARRY -> CARRY out
```

So `OUTPUT = (a & (A^B)) | (b & (A&B))` and `CARRY = c & (A&B)`. The four
useful settings are:

| operation | a | b | c | OUTPUT          | CARRY |
|-----------|---|---|---|-----------------|-------|
| OR        | 1 | 1 | 0 | (A^B)\|(A&B) = A\|B | 0 |
| AND       | 0 | 1 | 0 | A&B             | 0     |
| ADD       | 1 | 0 | 1 | A^B             | A&B   |
| XOR       | 1 | 0 | 0 | A^B             | 0     |

`rsfq_alu_pkg::op_switches()` returns this table. The 2-bit `alu_op_e`
encoding belongs to this model only; the hardware sees only the three
switch levels. The other four settings are legal inputs but have no named
meaning. For example, `b` and `c` together put `A&B` on both outputs.

In the superconducting circuit a "dc switch" is a gate held open or closed
by a dc bias current. Here `dc_switch` is the AND of its control level with
the data. A logic 1 means "a flux pulse arrived in this clock period".

## From four 1-bit slices to a 4-bit adder

`rsfq_alu4` puts four slices side by side and follows them with three
ripple columns, one pipeline stage each:

```
 clock:     1                 2                 3                 4
          +-------+ p0,g0   +------+          +------+          +------+
 A0,B0 -->| HA+SW |-------->| DFF  |--------->| DFF  |--------->| DFF  |--> result[0]
          +-------+   g0 -->+------+          +------+          +------+
          +-------+ p1,g1 ->| col1 |-- res1 ->| DFF  |--------->| DFF  |--> result[1]
 A1,B1 -->| HA+SW |         |      |-- C1 --->+------+          +------+
          +-------+ p2,g2 ->| DFF  |--------->| col2 |-- res2 -->| DFF  |--> result[2]
 A2,B2 -->| HA+SW |         +------+          |      |-- C2 ---->+------+
          +-------+ p3,g3 ->| DFF  |--------->| DFF  |---------->| col3 |--> result[3]
 A3,B3 -->| HA+SW |         +------+          +------+           |      |--> carry
          +-------+                                              +------+
```

(The arrow into col1 from bit 0 carries `g0`, the carry out of bit 0.)

Each ripple column (`carry_column`) takes three inputs for its bit k:

- `p`: the switched data output, which is `A^B` during ADD;
- `g`: the switched carry output, which is `A&B` during ADD;
- `cin`: the carry out of bit k-1.

It uses two half adders:

```
  HA1(p, cin):  result bit = p ^ cin,  k = p & cin
  HA2(g, k):    carry out  = g ^ k
```

A full adder needs `g | k` for its carry out. Here the second half adder's
XOR gives the same value, because `g` and `k` are never 1 together:
- `g = 1` needs A = B = 1;
- `k = 1` needs A ≠ B.

The second half adder's own carry output is therefore always 0 and is left
unconnected.

In OR, AND and XOR, switch c is off. Then every `g` is 0, every carry is 0,
and each column copies `p` to its result bit. The same hardware does both
jobs, and CARRY reads 0 for every logic operation. An assertion in
`rsfq_alu4` checks this rule: if switch c has been off for `WIDTH` clocks,
`carry` must be 0.

In total, four slices plus three columns give 4 + 3×2 = 10 half adders.
Four slices with three switches each give 12 dc switches.

## Timing

- **Latency.** An operand pair applied before clock edge 1 shows at
  `result`/`carry` after edge 4. In general the latency equals `WIDTH`
  (`ALU4_LATENCY` = 4).
- **Throughput.** A new pair can enter on every clock.
- **Switches.** The switches are not registered. They act between the
  slice registers and the first ripple column. Changing them therefore
  affects the pairs already in flight. To get clean results, hold the
  switches for the whole time a pair is in the pipeline, or drain the
  pipeline before changing them.
- **Reset.** `rst_n` is an asynchronous, active-low reset that clears every
  flip-flop. It is an addition of this model: the superconducting circuit
  has no reset.

In the original circuit the clock pulses travel along the pipeline in the
same direction as the data ("forward clocking"). This keeps each stage's
clock just behind its data. In this RTL that becomes one ordinary clock
shared by all flip-flops.

## Interface of `rsfq_alu4`

| port     | dir | width   | meaning |
|----------|-----|---------|---------|
| `clk`    | in  | 1       | clock |
| `rst_n`  | in  | 1       | asynchronous reset, active low |
| `a`, `b` | in  | `WIDTH` | operands, bit 0 = least significant |
| `sw`     | in  | 3       | `alu_switches_t` {a, b, c} |
| `result` | out | `WIDTH` | result bits |
| `carry`  | out | 1       | carry out of the top bit (ADD only) |

`WIDTH` defaults to 4. Other widths build the same structure: `WIDTH`
slices and `WIDTH-1` ripple columns.

## Files

| file | content |
|------|---------|
| `rtl/rsfq_alu_pkg.sv` | switch struct, operation enum, switch table, latencies |
| `rtl/half_adder.sv` | half adder cell |
| `rtl/dc_switch.sv` | one switch |
| `rtl/switch_block.sv` | the three switches of one bit, with the OUTPUT merge |
| `rtl/sfq_dff.sv` | a row of D flip-flops with reset |
| `rtl/alu_1bit.sv` | 1-bit ALU: clocked half adder plus switch block |
| `rtl/carry_column.sv` | one registered ripple column (two half adders) |
| `rtl/rsfq_alu4.sv` | the 4-bit ALU (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
It also has a watchdog. Example for the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rsfq_alu_pkg.sv tb/tb_rsfq_alu4.sv --top-module tb_rsfq_alu4
./obj_dir/Vtb_rsfq_alu4
```

Use the same command with another `tb_<module>` for each block.

`tb_rsfq_alu4` runs the ALU at its default width and checks it in these
ways:

- It streams operand pairs back to back and checks each result exactly
  four clocks after its pair entered.
- It runs the six ADD examples 1001+0000, 1001+1001, 1011+1001, 0010+1001,
  0010+0000 and 0000+0000.
- It runs six operand pairs through OR, XOR and AND each.
- It runs all 256 operand pairs for every operation.
- It checks the exact latency.
- It ends with random streams.

It counts how often each behaviour occurs: each operation, back-to-back
results, carry out, a carry rippling from bit 0 through all bits, logic
operations on pairs that would carry, and reset. The test fails if any of
these never happens. `tb_alu_1bit` runs the 1-bit slice through AND, ADD,
XOR and OR in that order, then through random operations.

## How far this model goes

The model is logically exact for the four operations. These points are
choices of this model, not taken from the source design:

- **Ripple-column insides.** The published block diagram shows the ripple
  columns only as half adder blocks. The two-half-adder make-up above is
  the simplest one that matches the cell counts.
- **Waiting bits.** The upper-bit signals that wait for their carry are
  carried here in flip-flops. The source diagram draws plain lines into the
  later half adder blocks.
- **Other parts.** The superconducting circuit's interface and transport
  parts are not modelled: the DC-to-SFQ input converters, the SFQ-to-DC
  output converters, the transmission lines and the pulse splitters. At the
  level of logic values per clock they are wires. Nor are its bias currents
  or its pulse timing.
- **Clock rate.** The measured clock rates (5 GHz for the 4-bit ALU, 20 GHz
  for the 1-bit slice) belong to that technology. A CMOS build of this RTL
  has its own timing.
