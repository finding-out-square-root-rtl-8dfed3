# Restoring square-root array from single-electron logic gates

This design computes the integer square root of a binary number in one pass
through a triangular array of identical *subtract-multiplex* cells. It has no
clock and no state. Each row of the array settles one root bit, most
significant first. It does this the way square roots are worked by hand in
base 2: append the next two radicand bits to the running remainder, try to
subtract, and restore the remainder if the subtraction went negative.

The array is built hierarchically from the small gate set of single-electron
transistor (SET) logic: inverter, NAND, NOR, AND (NAND + inverter), OR
(NOR + inverter) and a one-device XOR. The RTL keeps that hierarchy: every
gate is its own module, and the cells and the array instantiate them. The
netlist therefore has the gate structure of the device-level circuit, while
each gate is modelled only by its Boolean function.

The default size is a 16-bit radicand and an 8-bit root (8 rows, 51 cells).
Setting `N = 16` gives the 32-bit / 16-row version. If the binary point is
placed in the middle of the radicand, that version returns a root with 8
fraction bits.

## The algorithm the rows implement

Let the radicand be `R`, with `2N` bits, and let `Q` be the root found so far
(it starts empty). For row `k = 1 .. N`:

1. The remainder from row `k-1` is shifted left by two bits, and radicand
   bits `R[2N-2k+1 : 2N-2k]` fill the space.
2. The row subtracts the trial value `{Q, 0, 1}`, that is `4Q + 1`. This
   works because `(2Q+1)^2 - (2Q)^2 = 4Q + 1`.
3. If the difference is not negative, root bit `k` is 1 and the difference
   becomes the new remainder.
4. Otherwise root bit `k` is 0 and the shifted remainder is kept unchanged.
   This is the "restore" step.

Example: `R = 1014 = 11_11_11_01_10` gives `Q = 11111` (31), remainder 53.

After row `k` the remainder is at most `2Q`. It therefore fits in `k+1` bits,
which fixes the width of every row.

## Array geometry

Cells in a row are numbered from the right (j = 0, least significant). Every
row is a ripple-borrow subtractor whose borrow enters at j = 0:

| cell j          | minuend X                         | subtrahend Y | borrow in       |
|-----------------|-----------------------------------|--------------|-----------------|
| 0               | radicand bit `2N-2k`              | 1            | 0               |
| 1               | radicand bit `2N-2k+1`            | 0            | borrow of j-1   |
| 2 .. k          | remainder bit `j-2` of row k-1    | `Q[j-2]`     | borrow of j-1   |
| k+1 (leftmost)  | remainder bit `k-1` of row k-1    | 0            | borrow of j-1   |

Row 1 has only cells 0 and 1, because no earlier remainder exists. Every
later row has `k+2` cells. For N = 8 that is
2+4+5+6+7+8+9+10 = 51 cells: 8 leftmost cells with an inverted borrow and 43
plain ones. The output of the leftmost cell of rows 2..N is always 0, so it
is not passed on. The row below uses only the lower `k+1` outputs.

```
 row 1   [L][ ]                         L = cell with inverted borrow
 row 2   [L][ ][ ][ ]                       (its output is the root bit)
 row 3   [L][ ][ ][ ][ ]
  ...
 row 8   [L][ ][ ][ ][ ][ ][ ][ ][ ][ ]
          ^  \______ previous remainder, root bits ___/ \_ 2 new radicand bits
```

**Root bit and select.** The leftmost cell of each row outputs the
complement of its borrow. This is 1 exactly when the trial subtraction did
not underflow, so it is the root bit of the row. The same signal drives the
select input of every cell in the row. When it is 1, a cell outputs its
difference bit. When it is 0, a cell outputs its minuend bit unchanged,
which is the restore step. This is not a real loop: a cell's borrow never
depends on its select, so each row's borrow chain settles first and the
multiplexers switch after it.

**Bit numbering.** `radicand[2N-1]` is the most significant bit and feeds
row 1. `root[N-1]` comes out of row 1. In the reference drawing the radicand
bits are labelled R(0)..R(15) starting from the *most* significant end
(R(i) = `radicand[15-i]`). The root bits are labelled SR(7)..SR(0) in the
usual order (SR(i) = `root[i]`).

**Critical path.** In the worst case a borrow ripples across every row, and
each row's select waits for that row's chain. The longest path therefore
grows roughly with N², measured in cells.

## Cells and gates

| module        | function                                   | built from |
|---------------|--------------------------------------------|------------|
| `set_sqrt`    | the array, parameter `N` (default 8)       | `sm_cell`, `sm_cell_nb` |
| `sm_cell_nb`  | SM cell with output `bo_n = ~borrow`       | `sm_cell` + `set_inv` |
| `sm_cell`     | `v0 = sel ? (x-y-bin) : x`, `bo = borrow`  | `set_sub` + `set_mux2` |
| `set_sub`     | full subtractor: `diff = x^y^bin`, `bout = (~x & y) or (~(x^y) & bin)` | 2×`set_xor2`, 2×`set_inv`, 2×`set_and2`, `set_or2` |
| `set_mux2`    | `vo = sel ? vin2 : vin1`                   | `set_inv`, 2×`set_and2`, `set_or2` |
| `set_and2`    | AND                                        | `set_nand2` + `set_inv` |
| `set_or2`     | OR                                         | `set_nor2` + `set_inv` |
| `set_nand2`, `set_nor2`, `set_xor2`, `set_inv` | leaf gates   | Boolean model |

At the device level, the NAND has two p-type SETs in parallel for the
pull-up and two n-type SETs in series for the pull-down. The NOR is the dual
circuit. The XOR is a single SET with two equal gate capacitors: its
conductance oscillates with gate charge, so it conducts only when exactly one
gate is high. Logic 1 is about 16 mV (0.1·e/C with C = 1 aF). None of this
analog behaviour is modelled; each leaf module is a single Boolean
assignment.

## Where this RTL departs from, or adds to, the reference circuit

- **Select polarity.** The reference text describes the SM cell as giving
  `X - Y - Bin` when S = 0 and `X` otherwise. The reference cell drawing does
  the opposite: X goes to the leg selected by S = 0 and the difference to the
  leg selected by S = 1. The array drives S with the inverted borrow (the
  root bit). Only the drawing's polarity restores correctly, so it is the
  one implemented.
- **`set_mux2` makes its own `~sel`.** The stand-alone multiplexer drawing
  takes `~sel` as a separate input. Here an inverter inside the module makes
  it, as the SM cell drawing does in front of its multiplexer.
- **No pipeline registers.** The source calls the rows "pipeline stages".
  Its timing (one result per full array delay) describes an unregistered
  combinational array, and that is what is built.
- **Timing and energy are not modelled.** The SET estimates are 4 ns per
  tunnelling event, about 48 ns per cell and 384 ns for 8 rows, with
  switching energy of order 1e-17 J. They are device properties, and the
  published figures are not fully consistent with each other.
- **No remainder output.** Only the root is brought out. The final remainder
  exists on the last row's `v0` outputs if you need it.
- The SET device itself (tunnel junctions, islands, capacitances) has no
  RTL counterpart.

## Fixed-point use

The array has no notion of a binary point. Give it a `2N`-bit radicand with
`2F` fraction bits and it returns the root with `F` fraction bits,
truncated. With `N = 16` and a 16.16 radicand the root is 8.8. For example:

| radicand (16.16)       | root (8.8)   | value         |
|------------------------|--------------|---------------|
| 43711.0                | `0xD112`     | 209.0703125   |
| 0xAF8E.399B (≈44942.23)| `0xD3FE`     | 211.9921875   |
| 10.000076 (`0x000A0005`)| `0x0329`    | 3.16015625    |
| 0.75 (`0x0000C000`)    | `0x00DD`     | 0.86328125    |
| 1014.0                 | `0x1FD7`     | 31.83984375   |

## Verification

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench           | what it checks |
|---------------------|----------------|
| `tb_set_inv`, `tb_set_nand2`, `tb_set_nor2`, `tb_set_and2`, `tb_set_or2`, `tb_set_xor2` | exhaustive, against constant truth tables |
| `tb_set_mux2`       | all 8 input combinations |
| `tb_set_sub`        | all 8 combinations, against the truth table and against `x-y-bin = diff-2·bout` |
| `tb_sm_cell`, `tb_sm_cell_nb` | all 16 combinations of x, y, bin, sel |
| `tb_set_sqrt`       | default size (N = 8): all 65536 radicands against an independent integer root; also counts, per row, how often the row kept its difference and how often it restored, and fails if either never happens |
| `tb_set_sqrt_frac`  | N = 16: the fixed-point and integer reference values above, corner cases, and 20000 random 32-bit radicands against a bit-by-bit reference root |

Each testbench was also run against a deliberately broken copy of its
module, for example with the multiplexer legs of `sm_cell` swapped, or with
rows of `set_sqrt` that never restore. Every broken copy was caught.

Because the default array is checked on every possible input, the
functional result at N = 8 can be trusted completely. At N = 16 the check is
a sample.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl tb/tb_set_sqrt.sv --top-module tb_set_sqrt -Mdir obj -o sim
obj/sim
```

Replace `tb_set_sqrt` with any other testbench name. `verilator --lint-only
-Wall -Irtl rtl/set_sqrt.sv` lints the array. It reports two unused
signals: the dropped leftmost output of each row and the unused final
remainder bits. Both are expected.

To change the size, override `N` on `set_sqrt`. The radicand is always `2N`
bits and the root `N` bits.
