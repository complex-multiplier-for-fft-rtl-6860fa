# Registered 4-bit complex multiplier for FFT butterflies

A radix-4 FFT splits a long transform (for example 16 points into four
4-point DFTs) and glues the pieces together with twiddle-factor
multiplications. Each such multiplication is a complex product

    (A + jB)(C + jD) = (AC - BD) + j(AD + BC)

which this design computes in hardware: four signed multipliers form AC, BD,
AD and BC in parallel, a subtractor forms the real part and an adder the
imaginary part. Registers on both sides make it a one-stage pipeline that
accepts a new operand set every clock cycle.

Everything is built from explicit bit-level cells (D flip-flops, half and full
adders, AND/NAND partial products), mirroring a full-custom implementation,
rather than from `*` and `+` operators.

## Numbers and formats

| item | width | format |
|---|---|---|
| operand parts A, B, C, D | N = 4 bits | two's complement, -8 .. 7 |
| products AC, BD, AD, BC | 2N = 8 bits | two's complement, exact |
| results re = AC-BD, im = AD+BC | 2N = 8 bits | two's complement, wraps modulo 256 |

The real part always fits: its range is -120 .. 120. The imaginary part ranges
from -112 to +128, and +128 does not fit in 8 bits. It occurs for exactly one
operand set, A = B = C = D = -8, and then reads -128. No saturation or overflow
flag is provided. If that case matters, keep one operand away from -8, as
twiddle factors normally do.

## Structure

```
 a,c ─► fifo ─► signed_multiplier (AC) ─┐
 b,d ─► fifo ─► signed_multiplier (BD) ─┴► ripple_carry_subtractor ─► fifo ─► re
 a,d ─► fifo ─► signed_multiplier (AD) ─┐
 b,c ─► fifo ─► signed_multiplier (BC) ─┴► ripple_carry_adder ──────► fifo ─► im
```

| module | role |
|---|---|
| `complex_multiplier` | top: six buffer registers, four multipliers, adder, subtractor |
| `fifo` | 2N-bit buffer register, one `dflipflop` per bit |
| `dflipflop` | rising-edge D flip-flop, active-low synchronous reset to 0 |
| `signed_multiplier` | N x N Baugh-Wooley array multiplier |
| `ripple_carry_adder` | 2N-bit adder: half adder in bit 0, then full adders |
| `ripple_carry_subtractor` | 2N-bit subtractor: a + ~b + 1 through full adders |
| `full_adder`, `half_adder` | one-bit cells |

The buffer component is called `fifo`, but it is a single register stage:
eight flip-flops with a shared clock and reset. It has no pointers, no depth
and no full or empty flags. Each input buffer holds the two 4-bit operands of
one multiplier, {A,C}, {B,D}, {A,D} and {B,C}. So A, B, C and D are each
registered twice, and a synthesis tool will usually merge the copies (32 flip-flops
remain of the 48 written). The two output buffers hold re and im.

The module count is 6 buffers, 4 multipliers, 1 adder and 1 subtractor. The
way the six buffers are split between operand pairs and results is this
design's own reading of the structure.

## The signed multiplier (Baugh-Wooley)

This is the least obvious part. An unsigned N x N array multiplier adds N
shifted rows of partial products `x[i] & y[j]`. For two's complement operands,
the sign bits carry negative weight. So every partial product that pairs one
sign bit with one non-sign bit has negative weight. The Baugh-Wooley method
removes those negative terms as follows:

* invert those terms. These are `x[N-1] & y[j]` and `x[i] & y[N-1]` for
  i, j < N-1: the AND gate becomes a NAND.
* keep `x[N-1] & y[N-1]` and all the non-sign terms as they are (AND).
* add a constant 1 in column N and in column 2N-1.

The unsigned sum of this bit matrix, taken modulo 2^(2N), is then exactly the
signed product. That includes -8 x -8 = 64, which fits in 8 signed bits. For
N = 4 there are 6 NAND and 10 AND partial products.

In `signed_multiplier`, row 0 of the matrix and the two constant ones (which
land in columns row 0 leaves empty) form the initial sum. Each further row j
is then added by a carry-ripple row of full adders, spanning columns j to 2N-1.
The columns below j pass straight through. The carry out of the top column is
dropped, which is the modulo 2^(2N) in the method. This row-by-row adder
arrangement is one choice among several (a carry-save array would also work).
It is the simplest one that stays parameterizable.

## Timing

* Operands applied before rising edge k are captured at edge k.
* The product appears on `re`/`im` just after edge k+1, a latency of two edges
  counted from when the operands are applied.
* A new operand set is accepted at every edge (full throughput).
* `rst_n` is active low and synchronous. An edge with `rst_n` low clears all
  six registers. `re`/`im` are 0 after that edge, and still 0 one edge later
  (the product of the cleared inputs).

There is one combinational stage between registers: input buffer, multiplier,
subtractor (or adder), output buffer. The clock period must cover that whole
path. The multiplier's carry-ripple rows dominate it. In the full-custom
implementation that this structure follows, the path measured about 6.5 ns
(about 1.5 ns register, 4.1 ns multiplier, 0.9 ns subtractor), or roughly
155 MHz in a 0.8 µm process. The RTL makes no claim about the speed in any
other technology.

## Parameters

`complex_multiplier #(N)`: operand width. The default is 4. Products, results,
adder, subtractor and buffers are all 2N bits wide, so N = 4 gives 8-bit
units. N must be at least 2. The leaf modules have their own width parameters
(`W` for `fifo` and the adder/subtractor, `N` for the multiplier), which the
top sets.

## Departures from a transistor-level cell library

* The flip-flop cell of a full-custom library also takes an inverted clock.
  That input has no logic function and is not modelled.
* The gate netlists inside the half adder, full adder and subtractor cells are
  textbook forms. Only their functions are fixed by the design.
* Layout, area, power and transistor counts are outside what RTL describes.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with the line
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dflipflop` | random d/reset over 200 cycles; value held between edges |
| `tb_fifo` | all 256 patterns through the register, then random data with resets |
| `tb_half_adder`, `tb_full_adder` | full truth tables |
| `tb_ripple_carry_adder` | all 65536 operand pairs, sum and carry |
| `tb_ripple_carry_subtractor` | all 65536 operand pairs, difference and borrow |
| `tb_signed_multiplier` | all 256 signed operand pairs against integer multiplication |
| `tb_complex_multiplier` | see below |

`tb_complex_multiplier` runs the top at its default size:

* It checks the two-edge latency.
* It streams all 65536 operand sets back to back in a scrambled order, with
  random reset pulses among them.
* A two-stage integer reference model predicts `re` and `im` after every edge.
* It counts the reset pulses, the wrapping operand set, and negative and
  positive results on both outputs. It fails if any of these never occurs.

To run it with Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_complex_multiplier \
    tb/tb_complex_multiplier.sv
./obj_dir/Vtb_complex_multiplier
```

Any other testbench runs the same way with its own name. It finishes in well
under a second.
