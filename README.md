# Vector length in FPGA logic: sqrt(X² + Y²) from squaring and square-root arrays

This RTL computes the length of a two-dimensional integer vector,
`len = floor(sqrt(X² + Y²))`, for 16-bit components. It was made to move
that step of an optical-flow image analysis out of workstation software and
into two small FPGAs. In that setting a new vector arrives every 2.5 µs.
The computation is split across two chips:

* **chip 1** squares both components and adds the squares (32-bit result);
* **chip 2** takes the 16-bit integer square root of that sum.

Both chips are plain combinational logic. The arithmetic is built from
regular cell arrays that map well onto 4-input-LUT FPGAs.

Besides the vector length unit, the design holds the arithmetic units that
were compared for it, and the timing frame used to measure their delay on
a board:

* three ways of building a 16-bit squarer: a cell array, a "sliced"
  squarer built from 4-bit tables, and a plain equation split into four pieces;
* a square-root cell array;
* a timing frame, which is an input register and an output register whose
  capture clock is delayed by a programmable amount.

```
                 vecl_top
  ┌───────────────────────────────────────────────────────────────┐
  │ vector_length                                                 │
  │  x,y ─►[in reg]─► sum_of_squares ─► saturate ─► sqrt_array ─►[out reg]─► len, ovf
  │                   (2× split4_squarer,           (CAS array,    │
  │                    ripple_adder 32)              32 → 16 bit)  │
  │                                                               │
  │ measurement board (three independent frames)                  │
  │  speed_harness ─► sliced_squarer16 ─► speed_harness           │
  │  speed_harness ─► sqrt_array (32)  ─► speed_harness           │
  │  speed_harness ─► array_squarer(16)─► speed_harness           │
  └───────────────────────────────────────────────────────────────┘
```

## The square root array (`sqrt_array`, `cas_cell`)

This is the least obvious part of the design. It is a non-restoring square
root, unrolled into a triangle of controlled adder-subtractor (CAS) cells.
An N-bit radicand (N = 32) gives an N/2-bit root. The triangle has
(N/2)² + N/2 cells, in rows of 2, 4, 6, … cells.

**The cell.** The operand bit B is XORed with the row control P, then a full
adder adds the result to A and the carry-in Ci. With P = 1 the row
subtracts: B is inverted, and the rightmost cell's carry-in is P = 1, which
gives the two's complement. With P = 0 the row adds. P and B are also passed
on to neighbouring cells.

**The rows.** The radicand is consumed two bits at a time, from the top.
Row r is a 2r-bit adder-subtractor:

* left operand: the previous row's remainder shifted up two places, with
  the next radicand bit pair below it;
* right operand: `{Q, ~q, 1}`, where Q is the root found so far and q is its
  last bit;
* after a non-negative remainder (q = 1) the row subtracts `4Q + 1`;
* after a negative remainder (q = 0) it adds `4Q + 3`. That is why the
  operand's bit 1 is the inverse of q;
* the first row always subtracts 1.

The carry out of each row's leftmost cell is the next root bit. It also
becomes the control P of the row below. The final remainder is discarded.

**Why the carry is the root bit.** When the row subtracts, a carry out means
no borrow, so the new remainder is ≥ 0. When the row adds to a negative
remainder, a carry out means the sum wrapped past zero, so it is again
≥ 0. The row widths are chosen so that positive remainders always fit in 2r
bits and negative ones never exceed 2^2r in magnitude, so this holds in
every row. This argument is this design's own reconstruction; the published
material gives the cell, the triangular shape and the edge constants, not
the derivation. The test checks every 16-bit radicand, and 32-bit radicands
on perfect squares, their neighbours and random values.

**Timing.** Each row waits for the carry chain of the row above. The delay
therefore grows roughly with (N/2)². The 32-bit array was estimated at
0.73–1.2 µs in the original FLEX 8000 implementation.

## The squaring units

All three squarers compute the same function, `p = x*x`. They differ in how
well they fit a LUT-based FPGA.

### CAF array (`array_squarer`, `caf_cell`)

A triangle of N² + N cells, in rows of 2, 4, …, 2N cells. The top row is
driven by the most significant input bit. Each cell is a full adder plus a
2:1 multiplexer: the row's input bit E selects the adder's sum (E = 1) or
passes the bit from above unchanged (E = 0).

The rows apply a recurrence. Let R be the value of the bits consumed so far
and S = R². Consuming the next bit q gives:

    R' = 2R + q,   S' = 4S + q·(4R + 1)      (because q·q = q)

So each row adds `4R + 1` to `4S` when its bit is 1:

* the constant low bits `01` enter at the right edge of every row;
* the bit just consumed enters at position 2;
* higher bits of R travel diagonally from row to row.

The carry out of the leftmost cell is unused. When a row adds, its sum
always fits in 2r bits. When it does not add, the multiplexers ignore the
carries. The cell, the row sizes and the top-row constants follow the
original array. The placement of the operand bits in the lower rows is
derived from the recurrence above. Output bit 1 is always 0, as it is for
any square.

### Sliced squarer (`sq4`, `mul2x2`, `sliced_mul4`, `sliced_squarer8`, `sliced_squarer16`)

This squarer splits the operand until every piece fits one level of 4-input
LUTs. A 4-bit square (`sq4`) and a 2×2 product (`mul2x2`) are such pieces.

    8 bit:  A² = A1² + 32·A1·A2 + 256·A2²          A = A1 + 16·A2
    4×4:    a·b = X1Y1 + 4(X1Y2 + X2Y1) + 16·X2Y2   a = X1 + 4X2, b = Y1 + 4Y2

In `sliced_squarer8`:

* bits 4..0 of A1² go straight to the output;
* one 11-bit adder adds `{A2², A1²[7:5]}` and the cross product A1·A2, giving
  output bits 15..5.

`sliced_mul4` has the same shape. The two low bits of X1Y1 pass through, a
small adder sums the two middle products, and a 6-bit adder produces bits
7..2.

The 16-bit unit (`sliced_squarer16`) uses the same scheme one level up:

* two 8-bit sliced squarers;
* an 8×8 multiplier (`sliced_mul8`) built from four `sliced_mul4`s;
* one 23-bit adder.

That composition is this design's own. Only the 16-bit result size of the
sliced method was published, not its structure. In the original comparison,
the sliced squarer was the fastest and smallest squarer on the FPGA, but it
used up the routing.

### Split-in-four equation (`split4_squarer`)

The input is split into four 4-bit pieces, and the square is written as four
squares plus six doubled cross products. The mapping is left to synthesis.
This is the squarer used in chip 1 of the vector length unit. It was slower
than the sliced design, but it fits three to a chip.

## Vector length unit (`vector_length`, `sum_of_squares`, `ripple_adder`)

Chip 1 (`sum_of_squares`) contains:

* two `split4_squarer`s;
* a 32-bit `ripple_adder`.

Chip 2 is `sqrt_array` with N = 32. Between them, the carry out of the adder
saturates the sum to 2³² − 1. This covers inputs that are both close to
65535, where X² + Y² needs 33 bits. The length then reads 65535, and `ovf`
is set.

Timing and handshake:

* An input register samples `x`, `y` and `in_valid` on a rising edge. The
  output register loads `len`, `ovf` and `out_valid` on the next rising edge.
* A new vector can be accepted on every clock.
* There is no back-pressure.
* The whole path through both chips must fit in one clock period. The
  original estimate for that path was about 1 µs (271 ns + 734 ns), well
  within the 2.5 µs per vector.
* `rst_n` is an active-low synchronous reset.

The components are unsigned. The register placement, the valid flags and
the saturation are choices of this RTL.

## Timing frame (`speed_harness`)

This frame measures the propagation delay of a combinational unit on a
board. It works as follows:

1. A start pulse loads a test word into the input register, which drives
   the unit.
2. The start pulse also starts a programmable delay generator.
3. When the delay has elapsed, the generator clocks the output register.
4. The host sweeps the delay and compares the captured words with expected
   values. This brackets the unit's delay.

Here the delay generator is a down-counter on the reference clock `clk`, so
the resolution is one clock period:

* `delay` counts clk periods from the start edge to the capture edge; 0 acts
  as 1;
* `done` pulses with the captured word in `dout`;
* starts that arrive while `busy` is high are ignored;
* two assertions check that `done` and `busy` are never high together and
  that the counter is never zero while busy.

In the top, three frames wrap the sliced 16-bit squarer, the 32-bit square
root array and the 16-bit CAF array squarer. The original board was driven
over a VME bus. That bus interface is not part of this RTL; the frames'
signals are top-level ports instead.

## Files and parameters

| module | role | parameters (default) |
|---|---|---|
| `vecl_top` | top: vector length unit + three timing frames | `W` = 16, `DLY_W` = 8 |
| `vector_length` | registered two-chip datapath | `W` = 16 |
| `sum_of_squares` | chip 1 | `W` = 16 |
| `split4_squarer` | squarer from the split-in-four equation | `W` = 16 |
| `ripple_adder` | ripple carry adder | `W` = 32 |
| `sqrt_array`, `cas_cell` | non-restoring square root array | `N` = 32 |
| `array_squarer`, `caf_cell` | CAF squaring array | `N` = 16 |
| `sliced_squarer16`, `sliced_squarer8`, `sliced_mul8`, `sliced_mul4`, `sq4`, `mul2x2` | sliced squarer | none |
| `speed_harness` | timing frame | `DIN_W` = 16, `DOUT_W` = 32, `DLY_W` = 8 |
| `vecl_pkg` | shared widths and types | |

Each file begins with a comment describing the module's function, interface
and timing, and which parts follow the original design and which are this
RTL's own.

## Simulating

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example, to run the end-to-end test of the whole design at default sizes:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vecl_pkg.sv tb/tb_pkg.sv tb/tb_vecl_top.sv --top-module tb_vecl_top
./obj_dir/Vtb_vecl_top
```

Replace `tb_vecl_top` with any other testbench: `tb_<module>` exists for
every module listed above except the cells, `sq4`, `mul2x2` and
`sliced_mul8`. Those are tested through their parents. `tb_pkg` holds the
reference integer square root, computed by bisection.

What the tests cover:

* **Exhaustive:** the squarers at 16 bits (and the CAF array at 4 bits), the 4×4 multiplier, the 8-bit
  sliced squarer, and the square root array at 16 bits.
* **Sampled:** the 32-bit square root array, on edge cases plus random
  values.
* **Vector length:** streams of vectors, back to back and with gaps,
  including overflowing sums. The test checks the one-edge register-to-register
  timing.
* **Timing frame:** a model device with a known delay, and a sweep of the
  programmed delay.
* **Workloads:** `tb_workload_vector_stream` pushes a full image's worth of
  75 million vectors through the top back to back. It checks every length
  and one vector per clock, and takes about 1.5 minutes.
  `tb_workload_speed_test` applies 10⁷ random words to both the sliced
  squarer and the square root frame, at two capture delays.
* **End to end (`tb_vecl_top`):** counts, and requires at least once, each
  of: vector results, back-to-back vectors, overflow saturation, captures in
  each frame, and starts ignored while busy.

## How far to trust it, and where it departs

* Every arithmetic unit is checked against independent integer arithmetic,
  exhaustively where the input space allows. Functionally, the units are
  exact.
* Nothing here models the original FPGA's delays or area. Two published
  variants, "optimised" and "direct", compiled the same cell array
  differently; in RTL they are one description. The measured delays
  therefore do not carry over: in simulation every unit settles at once.
  The timing frame's test uses a model device with an artificial delay.
* Choices made where the original was silent:
  * the unsigned component encoding;
  * saturation on overflow;
  * the register placement and valid handshake of the vector length unit;
  * the counter-based delay generator and its busy lock-out;
  * the internals of the 16-bit sliced squarer and of the 8×8 multiplier;
  * the reset.
* In the original drawing of the 8-bit sliced squarer, the squaring unit
  that feeds output bits 0..4 is labelled with input bits 4..7. This RTL
  follows the arithmetic instead: the low nibble's square gives the low
  output bits.
* Not included:
  * the VME bus slave interface and the FPGA configuration download logic,
    which were never specified;
  * the extra routing buffers added to the squarer on the original board,
    which have no logic function;
  * the pipelining suggested for a 25 ns-per-vector real-time rate, which
    was never worked out. The unpipelined unit here manages about one vector
    per microsecond on the original technology.
