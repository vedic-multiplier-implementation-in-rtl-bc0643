# 4x4 Vedic multiplier (Urdhva Tiryakbhyam)

A combinational unsigned multiplier for two 4-bit operands. It is built
the "Vedic" way. The product is never formed as a full grid of partial
products. Instead, the operands are split into 2-bit halves. Each pair of
halves is multiplied by a tiny 2x2 multiplier. The four 4-bit results are then
added at their weights. The 2x2 multiplier is itself the rule in its smallest
form: AND gates for the bit products and two half adders.

The rule behind it is *Urdhva Tiryakbhyam*, "vertically and crosswise". Write
the two numbers one above the other. Result digit k is the sum of all products
a_i * b_j with i + j = k, plus the carry left over from digit k-1. For two
4-bit numbers that takes seven steps, k = 0 to 6. Step 0 is the single
"vertical" product of the two least significant digits. The middle steps are
"crosswise" products. Step 6 is again one vertical product, of the two most
significant digits. The low digit of each column sum becomes a result digit,
and the rest carries into the next column. The hardware below applies the same
idea twice. In the 2x2 cell the digits are bits. In the 4x4 block the "digits"
are 2-bit halves in base 4.

## The 2x2 cell (`vedic_2x2`)

For `a = a1 a0` and `b = b1 b0`:

| product bit | formed by | meaning |
|---|---|---|
| q0 | `a0 & b0` | vertical product of the low bits |
| q1 | sum of half adder 1 on `a1&b0`, `a0&b1` | the two crosswise products |
| q2 | sum of half adder 2 on `a1&b1` and the carry of half adder 1 | vertical product of the high bits plus carry |
| q3 | carry of half adder 2 | set only for 3 x 3 = 9 |

There are four AND gates and two `half_adder` instances. The longest path is
one AND gate followed by two half adders.

## Composing the 4x4 block (`vm4b`)

Write `a = {aH, aL}` and `b = {bH, bL}`, each half 2 bits wide. Then

    a*b = 16*(aH*bH) + 4*(aL*bH + aH*bL) + (aL*bL)

This is the vertical/crosswise rule again, in base 4. The four 2x2 cells
produce

| cell instance | operands | result | weight |
|---|---|---|---|
| `u_mul_hh` | a[3:2], b[3:2] | q3 | 16 |
| `u_mul_lh` | a[1:0], b[3:2] | q2 | 4 |
| `u_mul_hl` | a[3:2], b[1:0] | q1 | 4 |
| `u_mul_ll` | a[1:0], b[1:0] | q0 | 1 |

The two low bits of `q0` are final product bits `y[1:0]`: nothing else has
weight 1 or 2. Everything else is added with weight 4 as the unit, so the adders
produce `y[7:2]` directly:

| adder | width | inputs | largest sum |
|---|---|---|---|
| `u_add_hi` | 6 | `{q3, 2'b00}` and `{2'b00, q2}` | 36 + 9 = 45 |
| `u_add_lo` | 4 | `q1` and `{2'b00, q0[3:2]}` | 9 + 2 = 11 |
| `u_add_top` | 6 | `u_add_hi` sum and zero-extended `u_add_lo` sum | 45 + 11 = 56 |

The `{q3, 2'b00}` shift gives q3 its extra factor of 4 (16 = 4 * 4). The
`q0[3:2]` term is the "carry" of the low cell into the weight-4 column, just
like the carry between steps of the rule. None of the sums can exceed its
width, so the adders have no carry output and none is lost. Only this
alignment is subtle in the design; if you change it, run the exhaustive
testbench.

The adders are plain `x + y` (module `adder`, parameter `W`). Synthesis is
free to map them onto whatever carry structure the target offers. The adder
type is a choice of this implementation: the reference architecture only
shows boxes labelled "Adder".

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 4 | multiplicand, unsigned |
| `b` | in | 4 | multiplier, unsigned |
| `y` | out | 8 | product `a*b` |

There are no clock, reset or handshake signals, and no registers. The product
settles one propagation delay after an operand changes. That delay is one AND
gate, two half-adder levels and two adder levels. Register the inputs or the
outputs outside the block if it sits on a clocked path.

The published gate-level schematic of this block, `VM4B`, shows one-bit
pins `a0..a3`, `b0..b3` and `Y0..Y7`. They map to the bits of `a`, `b` and `y`
with the same index. The schematic also has an input `OFF` and an output `Y8`.
Their function is not defined anywhere, so they are not modelled. An 8-bit
output already holds every product (15 x 15 = 225).

The reference implementation reported a 15.1 ns pad-to-pad path (input `b0` to
output `Y7`) through 10 logic levels on an older Xilinx FPGA. Most of that is
I/O buffer delay. The RTL makes no timing claim of its own.

## Where this RTL departs from, or adds to, the reference design

- **Four AND gates in the 2x2 cell.** One description of the cell speaks of
  three AND gates and another of four. A 2x2 product needs all four bit
  products, so four are used. This matches the gate diagram.
- **Adder widths and type** (6/4/6 bits, behavioural `+`) are chosen here. The
  architecture gives only the operand alignment.
- **Vector ports** instead of one-bit pins. `OFF` and `Y8` are left out (see
  above).
- **Unsigned operands.** Signed multiplication is not addressed by the
  architecture.
- The reference also mentions a second Vedic method, the *Nikhilam* sutra
  (multiplying via the operands' distance from a power of the base). It is
  given no structure, so it is not implemented.

## Files

| file | content |
|---|---|
| `rtl/half_adder.sv` | XOR/AND half adder |
| `rtl/vedic_2x2.sv` | 2x2 cell: 4 AND gates, 2 half adders |
| `rtl/adder.sv` | W-bit adder, default W = 6 |
| `rtl/vm4b.sv` | 4x4 multiplier, top level |
| `tb/tb_half_adder.sv` | all 4 input pairs |
| `tb/tb_vedic_2x2.sv` | all 16 operand pairs, per-bit checks, counts the q3 carry |
| `tb/tb_adder.sv` | W = 6 and W = 4 exhaustively, including wrapping sums |
| `tb/tb_vm4b.sv` | all 256 operand pairs plus a directed 3 x 5 = 0x0F |

Every testbench is self-checking. It compares against arithmetic done in the
testbench itself and prints `TB_RESULT checks=N failures=M`. A watchdog ends a
run that does not finish. `tb_vm4b` also counts how often each part of the
composition is exercised: the half-adder carry inside each of the four cells,
a non-zero `q0[3:2]` entering the second adder, a weight-4 sum wide enough to
carry past bit 5, and a product with bit 7 set. A mechanism that is never
exercised counts as a failure.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wall \
      rtl/half_adder.sv rtl/vedic_2x2.sv rtl/adder.sv rtl/vm4b.sv \
      tb/tb_vm4b.sv --top-module tb_vm4b
    ./obj_dir/Vtb_vm4b

For a single block, pass its file(s) and its testbench in the same way.
`vedic_2x2` needs `half_adder.sv`. Each run takes well under a second.

## Extending to wider operands

The same decomposition scales. An 8x8 multiplier is four `vm4b` instances on
4-bit halves plus three adders aligned to weight 16: a 12-bit, an 8-bit and a
12-bit adder, by the same reasoning as the table above. Only the 4x4 size is
implemented and verified here.
