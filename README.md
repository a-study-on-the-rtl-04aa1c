# 8x8 DCT/IDCT with distributed arithmetic

This is a two-dimensional 8x8 discrete cosine transform, and its inverse,
built without a single multiplier. Each 8-point 1D transform is computed by
**distributed arithmetic (DA)**. Small ROM tables hold precomputed sums of
cosine coefficients. The input words are fed to them one bit plane at a time,
and shift-and-add accumulators build up the inner products. The 2D transform
uses **row-column decomposition**:

1. One 1D unit transforms the eight rows of a block.
2. The results go into a transposition memory.
3. A second 1D unit transforms the columns.

The two units work on consecutive blocks at the same time. In steady state a
block finishes every 275 cycles, while one block takes 549 cycles from GO to
its last output. The DA accumulators use a carry-increment adder: eight 4-bit
ripple-carry blocks followed by a row of half-adder incrementers.

The structure follows a published design. It has two 8x1 DCT/IDCT units, a
transposition memory and a control signal generator, with an even/odd (Chen)
split of the 8-point DCT, 4-input ROM tables and a shared butterfly. Its
coefficient table and its adder organisation come from the same source.
Everything about timing, handshakes, scaling and memory organisation is this
implementation's own. Those choices are listed under
[Departures and own choices](#departures-and-own-choices).

## The 8-point transform, split in two halves

With `c(m) = cos(m*pi/16)`, the 8-point DCT `z = T x` (the 2/N factor left out)
splits into two 4x4 products:

```
a(n) = x(n) + x(7-n),  d(n) = x(n) - x(7-n),   n = 0..3

[z0]   [c4  c4  c4  c4] [a0]      [z1]   [c1  c3  c5  c7] [d0]
[z2] = [c2  c6 -c6 -c2] [a1]      [z3] = [c3 -c7 -c1 -c5] [d1]
[z4]   [c4 -c4 -c4  c4] [a2]      [z5]   [c5 -c1  c7  c3] [d2]
[z6]   [c6 -c2  c2 -c6] [a3]      [z7]   [c7 -c5  c3 -c1] [d3]
          E                                  O
```

The coefficients are integers: `c(m)` scaled by 2^11 and rounded down.

| c1   | c2   | c3   | c4   | c5   | c6  | c7  |
|------|------|------|------|------|-----|-----|
| 2008 | 1892 | 1702 | 1448 | 1137 | 783 | 399 |

For the inverse, `x = T' Z`. The even half uses the transpose of `E` on
`Z0, Z2, Z4, Z6`, which gives `e(n)`. The odd half uses `O`, which is
symmetric, on `Z1, Z3, Z5, Z7`, which gives `o(n)`. Then
`x(n) = e(n) + o(n)` and `x(7-n) = e(n) - o(n)`.

So one 1D unit needs:

- a **butterfly** (sums and differences of paired words), placed before the
  products for the DCT and after them for the IDCT;
- eight independent **4-term inner products with constant coefficients**. This
  is the part DA handles.

## Distributed arithmetic: ROM, shift, add, subtract the sign bit

Write each 16-bit two's-complement input word as
`w = -b15*2^15 + sum_{i<15} b_i*2^i`. One output is `y = sum_j c_j*w_j`,
which can be regrouped by bit plane:

```
y = sum_{i=0}^{14} 2^i * R(b_i of w0..w3)  -  2^15 * R(b_15 of w0..w3)
R(addr) = sum of the c_j whose address bit is 1
```

`R` has only 16 possible values, so it is a 16-word ROM addressed by one bit
from each of the four words. **Address bit 3 comes from word 0** and bit 0
from word 3.

`da_unit` computes one output:

- It walks the bit planes least significant first, one per cycle.
- It shifts the ROM word left by the bit position and adds it to the
  accumulator.
- In the sign-bit cycle it subtracts instead. This handles the negative
  weight of the sign bit without doubling the ROM.
- After 16 cycles the accumulator holds the exact integer `sum c_j*w_j`. It is
  32 bits wide, and the largest magnitude is below 2^29.

A 1D unit runs eight such units in parallel: four even tables and four odd
tables. All eight read the same bit plane of their four words in the same
cycle.

### The tables

`da_rom` computes its contents at elaboration from the coefficients above.
Entry `a` of table `k` is `sum_j W(k,j)*bit(3-j of a)`, where `W` is:

| table     | DCT direction                 | IDCT direction                  |
|-----------|-------------------------------|---------------------------------|
| even k    | row k of E (output z(2k))     | column k of E (output e(k))     |
| odd k     | row k of O (output z(2k+1))   | row k of O (output o(k))        |

The IDCT tables are exactly the published 16x8 coefficient table. For
example, even table 0 holds 783, 1448, 2231, 1892, ... and odd table 3 holds
-2008, 1702, -306, ...

The forward even tables (rows of E) are not in the published table. They come
from the same coefficients, and the `dct` input of each ROM chooses between
the two sets.

## The butterfly

`butterfly` is combinational: two 8-to-1 operand multiplexers feeding one
adder/subtractor (a `ci_adder`). The unit steps it through eight results, one
per cycle. Step bit 2 selects subtraction.

| step | before the ROMs (DCT)   | after the ROMs (IDCT)       |
|------|-------------------------|-----------------------------|
| 0..3 | `x(s) + x(7-s)` = a(s)  | `e(s) + o(s)` = x(s)        |
| 4..7 | `x(s-4) - x(11-s)` = d  | `e(7-s) - o(7-s)` = x(s)    |

For the IDCT the butterfly runs on the full 32-bit accumulator values. The
eight outputs therefore come out in natural order and are rounded only once.

## The carry-increment adder

`ci_adder` (32 bits) is built in two stages:

1. **Ripple-carry blocks.** Eight 4-bit ripple-carry blocks (`rca_block`)
   each add their slice of the operands in parallel. Block 0 gets the real
   carry-in; the other blocks get 0.
2. **Incrementers.** Seven rows of four half adders add the incoming carry to
   blocks 1..7. The carry into block i+1 is the carry-out of block i OR the
   carry-out of its incrementer; the two cannot both be 1.

The critical path is one 4-bit ripple plus a chain of AND-OR steps, and no
adder is duplicated as in a carry-select adder. For subtraction, `b` is
inverted and the carry-in is set to 1. Every DA unit and the butterfly use
this adder, so a 1D unit has nine of them.

## One 1D unit (`dpu_1d`)

```
start ─► latch x0..x7 ─► [DCT: 8 butterfly steps] ─► 16 DA bit steps ─► 8 output steps
                                                                     (IDCT: butterfly here)
```

| phase | cycles | what happens                                                                 |
|-------|--------|------------------------------------------------------------------------------|
| PRE   | 8      | DCT only: a0..a3 into the even shift registers, d0..d3 into the odd ones     |
| DA    | 16     | all eight accumulators take one bit plane per cycle; sign bit last           |
| OUT   | 8      | result i is scaled, saturated and sent with `out_valid`, `out_idx = i`       |

For the IDCT there is no PRE phase. `Z0, Z2, Z4, Z6` go straight into the
even shift registers and `Z1, Z3, Z5, Z7` into the odd ones.

Latency, counted from the clock edge that accepts `start`:

| transform | first result | last result |
|-----------|--------------|-------------|
| DCT       | 26 cycles    | 33 cycles   |
| IDCT      | 18 cycles    | 25 cycles   |

`ready` goes high again in the cycle after `out_last`.

**Scaling.** The forward result is `round(sum / 2^11)`, which removes the
coefficient scale and leaves out the 2/N factor. So the DC term of a row is
`(1/sqrt 2) * sum x`. The inverse result is `round(sum / 2^13)`: it includes
2/N = 1/4, so it undoes the forward transform. Both results saturate to
16 bits.

**Range.** In the forward direction the butterfly results a(n) and d(n) are
kept to 16 bits, because DA runs over 16 bit planes. Inputs therefore need
`|x(n) + x(7-n)| < 2^15`. For the 2D transform this holds in both passes for
samples of up to 12 bits (±2048). The results of the column pass may saturate
for such inputs, and saturation is handled correctly.

## The 2D engine (`dct2d_top`)

```
bus 1 ─► in_reg8 ─► dpu_1d (rows) ─► tmem bank 0/1 ─► in_reg8 ─► dpu_1d (columns) ─► bus 2
            ▲              ▲              ▲    ▲           ▲              ▲
            └──────────────┴───── ctrl_gen ────┴───────────┴──────────────┘
```

The **row sequencer** in `ctrl_gen` works block by block:

- It accepts `go` when the transposition bank it will fill is empty, and
  latches `dct_idct` for that block.
- For row r it reads addresses `r*8 + 0..7` over bus 1 into the row register,
  then starts the row unit once that unit is ready.
- Loading row r+1 overlaps the computation of row r.
- The row unit writes its result k for row r to address `{k, r}` of the
  current bank. This is the transposition.
- `stat_bus` counts finished rows. When it reaches 8 (`6'b001000`) the bank
  is marked full. That is the column start for the other unit, and the row
  sequencer moves on to the other bank.

The **column sequencer** drains the full bank:

- It reads column k as the consecutive addresses `{k, 0..7}` into the column
  register and starts the column unit.
- The column unit writes its result j for column k over bus 2 to address
  `j*8 + k`. The output block is row-major, with the vertical frequency as
  the row index.
- After the 64th word, `done` pulses and the bank is freed.

Because there are two banks, block n+1 goes through the row pass while block
n goes through the column pass:

| measure                                      | cycles |
|----------------------------------------------|--------|
| GO to done, one block                        | 549    |
| spacing of consecutive blocks (forward)      | 275    |

The pipelining therefore roughly halves the time per block. A third GO waits
(`go_ready = 0`) while both banks are occupied. Each bank carries the mode of
its own block, so DCT and IDCT blocks can be mixed freely.

### Interface

| port | dir | meaning |
|------|-----|---------|
| `clk`, `reset` | in | clock; asynchronous active-high reset |
| `go`, `dct_idct` | in | start a block; 1 = DCT, 0 = IDCT, taken with `go` |
| `go_ready` | out | `go` is accepted in this cycle |
| `addr_bus1[5:0]`, `bus1_rd`, `bus1_en` | out | read address and strobe; `bus1_en` is high while a block is being read |
| `data_bus1[15:0]` | in | read data, expected in the cycle **after** `bus1_rd` |
| `addr_bus2[5:0]`, `data_bus2[15:0]`, `bus2_wr`, `bus2_en` | out | write address, data and strobe; `bus2_en` is high while a block is being written |
| `done` | out | high in the cycle of the block's last write |
| `stat_bus[5:0]` | out | rows finished by the row unit in its current block (0..8) |

Bus 2 has no back-pressure: the sink must accept one word per cycle whenever
`bus2_wr` is high.

## Accuracy

The hardware is bit-exact against a straightforward matrix model. That model
uses the same truncated cosines, two passes, and the same rounding and
saturation per pass. A forward-then-inverse round trip of 8-bit pixel blocks
returns every pixel within ±2. The error comes from coefficients truncated to
11 fractional bits and from the intermediate rounding to 16-bit integers.

## Departures and own choices

- **Two 1D units and two memory banks.** The published top-level diagram shows
  two units around one transposition memory. A second published schematic
  shows one unit with an input register. This design follows the two-unit
  diagram, and adds the second memory bank so that the two units overlap.
- **Forward even ROMs.** The published table contains only the inverse even
  tables (see above). The forward ones are derived from the same coefficients.
- **Controller split.** The published controller is a state machine with
  counters, a register-select block and a ROM-control block that produce
  accumulator-reset and subtract strobes. Here the bit-level strobes are made
  inside each 1D unit, and `ctrl_gen` only sequences words and blocks.
- **Own choices:** scaling, rounding and saturation; the IDCT's 1/4 factor;
  the bus timing (one-cycle read latency, write strobe); `go_ready`; the
  output address order; the polarity of `dct_idct`; the reset style.
- **Not modelled:** the claimed area and speed figures of the adder, and the
  FPGA mapping. These are properties of a synthesised netlist, not of the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | widths, coefficients, table-content functions |
| `rtl/dct2d_top.sv` | 2D engine |
| `rtl/ctrl_gen.sv` | row and column sequencers, bank flags, bus strobes |
| `rtl/dpu_1d.sv` | 8-point 1D DCT/IDCT unit |
| `rtl/butterfly.sv` | serial butterfly |
| `rtl/da_unit.sv` | one DA inner-product unit (ROM + shifter + adder + accumulator) |
| `rtl/da_rom.sv` | one 16-word table |
| `rtl/ci_adder.sv`, `rtl/rca_block.sv` | carry-increment adder and its 4-bit ripple block |
| `rtl/in_reg8.sv` | 8-word input register of a 1D unit |
| `rtl/tmem.sv` | two-bank transposition memory |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb/tb_dct_ref.sv` holds the reference arithmetic |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dct_pkg.sv tb/tb_dct_ref.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
./obj_dir/Vtb_dct2d_top
```

Replace `dct2d_top` with any other module name to run its testbench.

`tb_dct2d_top` runs the design at its default sizes. It pushes seven blocks
back to back:

- 8- and 9-bit pixel blocks;
- a flat block;
- a block whose column pass saturates;
- a block of random coefficients through the IDCT;
- the IDCT of the first block's DCT (the round trip).

It checks all 448 output words. It also fails unless each of these happened
at least once: a forward block, an inverse block, saturation, both units busy
together, use of both banks, a held-off GO, and a mode change. It also checks
that the row count of 8 starts the column pass once per block, and that
blocks overlap (spacing at most 60% of the single-block time).

`tb_image_blocks` is an image-coding workload. It cuts a generated 32x32
8-bit image into sixteen blocks and streams them through the DCT, then
streams the coefficients back through the IDCT. It checks every word, checks
that the image is reconstructed within ±2, and checks the steady rate of one
block per 275 cycles.

The smaller testbenches cover the following:

- `tb_ci_adder`: carries through all blocks.
- `tb_da_rom`: every cell of the coefficient table, in both directions.
- `tb_da_unit`: exact inner products, including ±full-scale words.
- `tb_butterfly`: both butterfly positions.
- `tb_dpu_1d`: values, output order, latency and saturation.
- `tb_ctrl_gen`: the sequencer, with stand-in 1D units.
- `tb_in_reg8`, `tb_tmem`: the storage.
