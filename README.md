# Multi-operand BCD adder trees

This RTL adds many decimal numbers at once: M operands, each P BCD digits
wide, reduced to one BCD sum. At the defaults that is 16 operands of 16 digits,
which is the coefficient length of an IEEE 754-2008 Decimal64 number. Wide
decimal sums of this kind are the core of a decimal multiplier, where the
partial products must all be added.

The design is aimed at FPGAs, where a plain binary carry-ripple adder on the
dedicated carry chain is hard to beat. Most decimal adders either correct
every digit after a binary addition, or compute decimal carries with extra
logic. This design does neither. It keeps a binary carry-ripple adder and
makes two changes:

1. **Conditional pre-correction.** Before adding, it adds +6 to a digit
   position only when the digits' upper three bits show that the position may
   overflow past 9. That +6 is folded into the functions that drive the carry
   chain, so it costs no extra adder.
2. **A redundant code for 8 and 9.** Sometimes the +6 turns out not to be
   needed: the digits sum to exactly 8 or 9 and no carry leaves the position.
   The result digit is then `1110` or `1111`. Instead of fixing this, the
   design accepts `1110` as a second spelling of 8 and `1111` as a second
   spelling of 9, and every adder accepts both spellings at its inputs.

Because of (2), partial sums pass from one tree level to the next with no
decimal correction between them. A single row of gates at the very end turns
`1110`/`1111` back into `1000`/`1001`.

Two versions of the tree are provided. One is fully combinational. The other
is deeply pipelined: every tree level is a pipeline stage, and every adder is
cut into K-bit chunks with a register between chunks.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/bcd_pkg.sv` | package | Width, level-count and latency arithmetic shared by the trees |
| `rtl/bcd_digit_adder.sv` | `bcd_digit_adder` | One-digit adder cell: propagate/generate functions plus a 4-bit carry chain |
| `rtl/bcd_cr_adder.sv` | `bcd_cr_adder` | NDIG-digit two-operand carry-ripple adder, a row of cells |
| `rtl/bcd_correction.sv` | `bcd_correction` | Final row of gates that turns extended BCD into plain BCD |
| `rtl/bcd_delay_line.sv` | `bcd_delay_line` | Register chain used to skew and realign chunks in the pipeline |
| `rtl/bcd_adder_tree_comb.sv` | `bcd_adder_tree_comb` | Combinational M-operand tree |
| `rtl/bcd_adder_tree_pipe.sv` | `bcd_adder_tree_pipe` | Pipelined M-operand tree |
| `rtl/bcd_multiop_adder_top.sv` | `bcd_multiop_adder_top` | Top: both trees on the same operand inputs |
| `tb/bcd_tb_pkg.sv` | package | Reference decimal arithmetic for the testbenches |
| `tb/tb_*.sv` | | One self-checking testbench per module, plus a 34 x 34-digit workload test |

## Number format

A digit `i` of an operand occupies bits `4i+3 .. 4i`. Operand `k` of the
tree is `z[k]`, a packed `[M-1:0][4*P-1:0]` array. The operands must be plain
BCD (`0000`..`1001`).

Inside the trees, digits use the **extended BCD** code:

| Value | Codes accepted |
|---|---|
| 0..7 | `0000`..`0111`, as in BCD |
| 8 | `1000` or `1110` |
| 9 | `1001` or `1111` |

The codes `1010`..`1101` never occur. Only the final correction removes the
second spellings. So the outputs of the trees (`s`, `s_comb`, `s_pipe`) are
plain BCD, while the raw output of `bcd_cr_adder` is extended BCD.

## The one-digit cell

This is the part that needs the most care.

`bcd_digit_adder` adds digits `x` and `y` and a carry `ci`. It produces a
digit `z` and a decimal carry `co`, so that `value(z) + 10*co = value(x) +
value(y) + ci`. The cell is laid out like one 4-bit slice of an FPGA
carry-ripple adder:

```
          x[3:1], y[3:1] (all four upper functions see all six bits)   x[0], y[0]
             |             |             |                                |
          p3,g3          p2,0          p1,0                            p0,g0
             |             |             |                                |
 co <-- [mux]  <------- [mux] <------- [mux] <------------------------ [mux] <-- ci
          |  xor -> z3    |  xor -> z2   |  xor -> z1                     |  xor -> z0
```

Each carry multiplexer passes the incoming carry when `p` is 1. Otherwise it
passes `g`, which is a constant 0 at bits 1 and 2. Each sum bit is `p` XOR
the incoming carry.

**Bit 0** is an ordinary binary full adder: `p0 = x0^y0` and `g0 = x0&y0`.

**Bits 3..1** form a small 3-bit function of the six upper bits. The upper
three bits of a digit, read as an even number `X^U = 8*x3 + 4*x2 + 2*x1`,
decide the pre-correction:

```
a_u = (X^U + Y^U >= 8) = x3 | y3 | x2&y2 | (x2|y2)&x1&y1
```

When `a_u` is 1, the functions below yield the upper bits of `x + y + 6`;
otherwise they yield the upper bits of `x + y`. In both cases the low bit's
carry is added through the chain. A digit spelled `1110`/`1111` is first
read as `1000`/`1001`. That is why `x2` and `x1` appear below only as
`~x3&x2` and `~x3&x1`.

```
p1 = (~y3&y1) ^ (~x3&x1) ^ a_u
p2 = (~y3&y2) ^ (~x3&x2) ^ ( x1&y1&~a_u | (x3|~x1)&(y3|~y1)&a_u )
p3 = (x3^y3)&~x2&~y2&~x1&~y1
   | ~x3&~y3&( x2&y2&~x1&~y1 | (x2^y2)&x1&y1 )
   | x3&~y3&~y2&~y1
   | y3&~x3&~x2&~x1
g3 = x3&y3 | x3&(y2|y1) | y3&(x2|x1) | x2&y2&(x1|y1)
```

Why this is enough:

- If `X^U + Y^U < 8`, the digit sum is at most 7 + 1 = 8 (with the carry
  in), so it is a valid digit and there is no carry out. No +6 is needed.
- If `X^U + Y^U > 8`, the digit sum is at least 10, so a decimal carry
  leaves the position. Adding 6 makes the 4-bit binary sum wrap at exactly
  the right point.
- If `X^U + Y^U = 8`, the digit sum is 8, 9, 10 or 11, depending on the two
  low bits and the carry in. For 10 and 11 the +6 was right. For 8 and 9 it
  was in excess, and the cell leaves `1110`/`1111`, which is legal in the
  extended code.

Some examples:

| x | y | ci | a_u | z | co | meaning |
|---|---|---|---|---|---|---|
| `0111` (7) | `1000` (8) | 0 | 1 | `0101` | 1 | 7+8 = 15 |
| `0100` (4) | `0011` (3) | 1 | 0 | `1000` | 0 | 4+3+1 = 8 |
| `0100` (4) | `0100` (4) | 0 | 1 | `1110` | 0 | 4+4 = 8, second spelling |
| `1110` (8) | `0101` (5) | 0 | 1 | `0011` | 1 | 8+5 = 13 |
| `1111` (9) | `1111` (9) | 1 | 1 | `1001` | 1 | 9+9+1 = 19 |

`tb_bcd_digit_adder` checks all 288 combinations of two extended-BCD digits
and a carry exhaustively.

## Tree widths

A sum of n operands of P digits is below n * 10^P. Above the 4P operand bits
it therefore needs room for the value n-1. That room is a number of whole
BCD digits plus a partial top digit of just enough bits. For the whole tree
this extension is

```
l = 4*floor(log10 m) + ceil(log2(m / 10^floor(log10 m)))
```

which gives l = 1, 2, 3, 4, 5 and 6 for m = 2, 4, 8, 10, 16 and 34. The
function `bcd_pkg::ext_bits` computes it exactly by counting the digits of
n-1.

Every tree level uses the same rule, with n set to the number of operands
that level has summed. For M = 16 the levels are 65, 66, 67 and 69 bits wide,
and the output S is W = 69 bits. At each level, operands `2i` and `2i+1` go to
one adder. If M is not a power of two, an operand left without a partner
moves down a level unchanged (M = 34 gives six levels).

The adders work in whole digits. Any bits above a level's width are zero by
construction, and a synthesis tool removes the logic behind them as
constants. In the combinational tree, the carry chains of successive levels
overlap: a level can start on its low digits while the level above is still
rippling through its high digits. The delay therefore grows roughly as
(4P + l) chain steps plus one sum delay per level, not as their product.

## Pipelined tree

`bcd_adder_tree_pipe` cuts every adder into NC = ceil(4P / K) chunks of K/4
digits. The leftmost chunk also carries the extension bits. Each chunk has a
result register and a carry register. Chunk j of a level therefore works one
cycle after chunk j-1 of the same level, which supplies its carry, and one
cycle after chunk j of the level above, which supplies its operands.

To line the data up with this schedule:

- All operands pass one common input register. Chunk j then waits j more
  cycles in the synchronization registers (`bcd_delay_line`). Chunk 0 reaches
  level 1 after 1 cycle, chunk 1 after 2 cycles, and so on.
- At the output, chunk j of the last level waits NC-1-j more cycles, so that
  all chunks of one sum leave together. The final correction gates sit after
  this last register.

Every path from input to output passes NC + ceil(log2 M) registers. The
pipeline accepts a new operand set every cycle, and the latency is

| K (bits) | 32 | 24 | 16 (default) | 12 |
|---|---|---|---|---|
| latency for P = M = 16 (cycles) | 6 | 7 | 8 | 10 |

Latency counts clock edges: operands sampled on edge N appear on `s` with
`out_valid` high, ready to be sampled on edge N + latency. K must be a
multiple of 4, so that chunk boundaries fall between digits. An elaboration
assertion enforces this.

`in_valid` travels beside the data in a shift register, which becomes
`out_valid`. Only that shift register is reset (`rst_n`, active low,
synchronous). The data registers need no reset, because they only carry data
that `out_valid` qualifies.

## Top level

`bcd_multiop_adder_top` has parameters P, M and K (defaults 16, 16 and 16).
It places both trees on the same inputs:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of the pipelined tree |
| `rst_n` | in | 1 | synchronous active-low reset of the valid pipeline |
| `in_valid` | in | 1 | `z` holds an operand set for the pipelined tree |
| `z` | in | M x 4P | operands, plain BCD |
| `s_comb` | out | W | combinational sum, plain BCD, same cycle |
| `out_valid` | out | 1 | `s_pipe` is valid |
| `s_pipe` | out | W | pipelined sum, plain BCD |

W = 4P + l (69 at the defaults). In a real system you would normally use one
of the two trees alone, instantiating `bcd_adder_tree_comb` or
`bcd_adder_tree_pipe` directly.

## Where this RTL departs from the original design, and what is its own

- The original targets Xilinx Virtex-5/6 and maps each digit cell onto one
  slice (four 6-input LUTs and a 4-bit carry chain) plus one extra LUT for
  `a_u`. The final correction uses slice storage elements configured as
  AND gates, and the skew registers are packed into 16-bit shift-register
  LUTs. This RTL is generic: the same logic functions and chain structure,
  but no vendor primitives. Whether a synthesis tool reproduces the
  one-slice-per-digit mapping depends on the tool. No FPGA timing or area
  figures have been measured for this code.
- The source gives the stage count of the pipelined tree in two ways. One is
  a formula that includes the extension bits, ceil((4P + l)/K) + ceil(log2
  M). The other is a table of stage counts, which matches ceil(4P/K) +
  ceil(log2 M). This design follows the table: the extension bits ride in
  the leftmost chunk.
- The output realignment registers, the valid/reset handling, the carry
  input of `bcd_cr_adder`, the handling of M that is not a power of two, and
  the side-by-side top level are choices of this design.
- The equations of the digit cell are the original's. They are read with
  every overbar covering a single literal, which is the reading that gives
  correct results for all inputs.
- Only addition is implemented. Subtraction by nine's complement is
  mentioned in the source as background for other adders and is not part of
  this design.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each also has a watchdog that counts a failure if the test hangs.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcd_pkg.sv tb/bcd_tb_pkg.sv tb/tb_bcd_multiop_adder_top.sv \
    --top-module tb_bcd_multiop_adder_top -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_bcd_digit_adder` | all extended-BCD digit pairs and carries; at least one `1110`/`1111` result |
| `tb_bcd_cr_adder` | 16- and 34-digit adders, random, all-nines and extended-coded operands, carry in/out |
| `tb_bcd_correction` | random extended numbers back to plain BCD |
| `tb_bcd_delay_line` | delay of 3 cycles and of 0 |
| `tb_bcd_adder_tree_comb` | 16 x 16 digits and an odd 5 x 3-digit tree; all-nines fills the extension |
| `tb_bcd_adder_tree_pipe` | 16 x 16 digits at K = 32, 24, 16, 12 and a 5 x 3 tree; exact latency per K; random gaps and back-to-back sets |
| `tb_bcd_multiop_adder_top` | the top at its default parameters, end to end. It also counts pre-corrections, corrected `1110`/`1111` digits, carries across chunk registers, use of the extension bits, back-to-back and idle cycles, and fails if any of these never happens |
| `tb_bcd_workload_p34` | 34 operands of 34 digits (Decimal128 coefficient length), both trees, latency 15 at K = 16 |

All testbenches compare against `bcd_tb_pkg::ref_add`. That reference adds
digit by digit with a decimal carry and shares no logic with the design.

## Changing the size

- **P (digits per operand)** and **M (number of operands)** may be any values
  of at least 2. Widths, level count and latency follow automatically from
  `bcd_pkg`.
- **K** must be a multiple of 4. Smaller K gives shorter carry chains per
  stage, and so a faster clock, at the cost of more stages and more skew
  registers.
- The output width W is a localparam of each tree. Read it from there, or
  compute it with `bcd_pkg::level_width(P, M, bcd_pkg::tree_levels(M))`.
