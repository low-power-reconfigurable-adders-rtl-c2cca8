# Variable accuracy reconfigurable adders (VARA1–VARA7)

Error-tolerant workloads such as image processing can often accept a slightly
wrong sum in exchange for lower power. Approximate adders usually fix the
split between exact and approximate bits when the chip is built. These adders
let you choose the accuracy at run time, one bit at a time. A mode input sets
each dynamic bit to exact or approximate. With every mode bit at 1 the adder is
an ordinary exact 16-bit carry select adder (CSLA). Clearing mode bits lowers
the accuracy in steps. The same operand pair can therefore give up to 2^16
different results, from worst case to exact.

The RTL is combinational. There are no clocks, registers or handshakes.

## The reconfigurable full adder (`rcfa`)

Every dynamic bit is a reconfigurable full adder. It computes its carry
without an XOR:

    CARRY = A·(B+C) + Mode·(B·C)

Its sum comes from a 2:1 multiplexer that the carry steers:

    SUM = CARRY ? (A·B·C) : (A+B+C)

This sum is exact whenever the carry is right. If at most one input is 1, the
OR of the inputs is the sum. If two or more inputs are 1, the sum is 1 only
when all three are.

- **Mode = 1.** The carry is the exact majority function, and the cell is an
  exact full adder.
- **Mode = 0.** The `B·C` term is dropped. Only the input pattern A=0, B=1, C=1
  goes wrong. That case gives carry 0 and sum 1, so the bit yields 1 instead of
  2. The error distance is one and seven of the eight rows stay exact (87.5 %).

The carry that was lost is not propagated. So the error seen at the adder's
output is 2^i for a wrong bit i, minus any further effects on the bits above.

The static bits use a conventional full adder (`cfa`). It is two half adders,
with `SUM = A⊕B⊕C` and `CARRY = (A⊕B)·C + A·B`.

## The 16-bit carry select structure (`vara16`)

```
 bits 15:12         bits 11:8          bits 7:4          bits 3:0
 RCA6 (cin 0)       RCA4 (cin 0)       RCA2 (cin 0)      RCA1 (cin 0)
 RCA7 (cin 1)       RCA5 (cin 1)       RCA3 (cin 1)          |
   10:5 mux <--C12--  10:5 mux <--C8--  10:5 mux <--C4-------+
     |                  |                 |                  |
 cout, sum[15:12]    sum[11:8]         sum[7:4]           sum[3:0]
```

- **Block 0 (bits 3:0).** A single 4-bit ripple adder with carry in 0.
- **Blocks 1–3.** Each has two 4-bit ripple adders (`rca4`), one with carry
  in 0 and one with carry in 1. A 10:5 multiplexer (`mux10to5`, five 2:1
  multiplexers) picks one sum and carry pair. The carry out of the block below
  (C4, C8 or C12) steers it.

A nibble is either **static** or **dynamic**:

- A static nibble uses `cfa` cells and ignores its mode bits.
- A dynamic nibble uses `rcfa` cells. Mode bit *i* steers bit *i*, and both
  adders of a carry select pair get the same four mode bits.

Each carry select pair computes both possible results of its block, and the
real incoming carry picks one. The structure therefore gives exactly the same
result as a plain ripple of the same cells. This also holds when the cells are
approximate. The testbenches use that fact for their reference model.

The `VARIANT` parameter (1..7, default 4) chooses which nibbles are dynamic:

| Variant | bits 15:12 | 11:8    | 7:4     | 3:0     | mode bits used | results per operand pair |
|---------|------------|---------|---------|---------|----------------|--------------------------|
| VARA1   | static     | static  | static  | dynamic | M3–M0          | 16 |
| VARA2   | static     | static  | dynamic | dynamic | M7–M0          | 256 |
| VARA3   | static     | dynamic | dynamic | dynamic | M11–M0         | 4096 |
| VARA4   | dynamic    | dynamic | dynamic | dynamic | M15–M0         | 65536 |
| VARA5   | dynamic    | dynamic | dynamic | static  | M15–M4         | 4096 |
| VARA6   | dynamic    | dynamic | static  | static  | M15–M8         | 256 |
| VARA7   | dynamic    | static  | static  | static  | M15–M12        | 16 |

The `mode` port is always 16 bits wide. Each mode bit keeps the position of
the bit it controls, so VARA7 reads `mode[15:12]`. Bits of static nibbles are
ignored.

The variants trade accuracy range against delay and area:

- **VARA1–3.** Only the low bits can be approximate, so the worst case is
  mild.
- **VARA5–7.** The low bits are always exact, so even the best approximate
  setting has a large error. Their static CFA nibbles sit on the carry path
  and are faster than RCFA nibbles.
- **VARA4.** Covers the whole range.

Bit 0 has carry in 0, so the A=0, B=1, C=1 pattern cannot occur there. Mode
`FFFE` is therefore still exact.

## Window methods for VARA4 (`mode_window`)

Sixteen mode bits allow 65536 settings. The window expander lets fewer bits
control VARA4:

| `window`   | packed mode bits | each bit steers | settings |
|------------|------------------|-----------------|----------|
| `WIN_1BIT` | `mode_in[15:0]`  | 1 bit           | 65536 |
| `WIN_2BIT` | `mode_in[7:0]`   | bits 2j+1:2j    | 256 |
| `WIN_4BIT` | `mode_in[3:0]`   | bits 4j+3:4j    | 16 |

With the 4-bit window, `0011` makes the low byte exact, `0110` the middle
bits, `1100` the high byte and `1111` all bits. `window` is a run-time input,
and its encoding is this design's own choice.

## Top level (`vara_top`)

The seven adders sit side by side and share the operand pair `a`, `b`. Entry
*v* of the arrays belongs to VARA(*v*+1):

- `mode[v]` is that adder's mode.
- `sum[v]` and `cout[v]` are its result.

VARA4 takes its mode through the window expander. `mode[3]` holds the packed
bits, and `vara4_window` selects the window. No block inside the design sets
the mode. A controller that compares the output quality with a threshold and
adjusts the mode would connect to these ports. How that controller measures
quality is not specified, so it is not part of this RTL.

## Files

| file | content |
|------|---------|
| `rtl/vara_pkg.sv`    | widths, `window_e`, the variant-to-dynamic-nibble table |
| `rtl/rcfa.sv`        | reconfigurable full adder |
| `rtl/cfa.sv`         | conventional full adder |
| `rtl/rca4.sv`        | 4-bit ripple adder of `rcfa` (`RECONF=1`) or `cfa` (`RECONF=0`) cells |
| `rtl/mux10to5.sv`    | carry select multiplexer |
| `rtl/vara16.sv`      | 16-bit adder, `VARIANT` 1..7 |
| `rtl/mode_window.sv` | 1/2/4-bit window mode expander |
| `rtl/vara_top.sv`    | all seven adders, VARA4 behind the window expander |
| `tb/vara_ref_pkg.sv` | reference model: truth-table bits rippled from bit 0 |
| `tb/tb_*.sv`         | one self-checking testbench per module, plus the two workloads below |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, for the top:

```
verilator --binary --timing --assert -Irtl -Itb -yrtl -ytb \
    rtl/vara_pkg.sv tb/vara_ref_pkg.sv tb/tb_vara_top.sv --top-module tb_vara_top
./obj_dir/Vtb_vara_top
```

Use the same pattern for `tb_rcfa`, `tb_cfa`, `tb_rca4`, `tb_mux10to5`,
`tb_mode_window`, `tb_vara16`, `tb_error_metrics` and `tb_blend_psnr`.

- **Cells.** `tb_rcfa` checks the cell against its full truth table in both
  modes. `tb_rca4` checks all 8192 input and mode combinations.
- **Top.** `tb_vara_top` runs at the default sizes with 30000 random operand
  pairs. It drives all three window methods and checks that static mode bits
  have no effect. It also counts exact runs, approximate results, block
  carries C4/C8/C12 and carry out, and fails if any of them never occurred.

## Accuracy results

`tb_error_metrics` runs VARA4 through 29 mode settings. The first half makes
more and more low bits approximate (FFFF, FFFE, … 8000). The second half keeps
fewer and fewer high bits exact (7FFF, … 000F, 0000). Each setting gets 100000
random operand pairs, and the testbench reports:

- error rate
- MED, the mean error distance
- NMED, MED divided by 2·(2^16−1)
- MRED, the mean relative error distance
- CA, the computational accuracy, (1 − MRED)·100 %

The CA values agree with the published values for these settings within
0.25 percentage points, and the testbench checks that. For example, it gets
about 95.35 % for 8000, 94.58 % for 7FFF and 91.8 % for 0000.

The published MED and NMED columns are several orders of magnitude smaller
than what uniform random operands give here. They evidently use a different
normalisation or input distribution, so the testbench only prints them.

`tb_blend_psnr` blends two generated 64×64 images with
g = (1−α)·f1 + α·f2 for α = 0.25, 0.5 and 0.75:

- Pixels are weighted exactly in 16-bit fixed point (`pixel · weight · 256`).
- VARA4 adds the two weighted pixels.
- PSNR is computed with a 16-bit peak value (65535).

Modes FFFF down to FF80 stay exact for these images, because the weighted
pixels have zero low bits. PSNR then falls steadily as more high bits become
approximate, to roughly 19–29 dB with every bit approximate. The absolute
values depend on the images, so only exactness and agreement with the
reference model are checked.

## Departures and limits

- **Gate-level properties.** The cells are written as boolean equations. The
  published gate counts and logic depths (11 gates and 3 carry levels for the
  RCFA, 13 gates for the CFA) describe a particular gate netlist, which
  synthesis is free to restructure.
- **No carry in.** The least significant block always adds with carry in 0.
- **Window mapping.** The bit order of the packed 2-bit and 4-bit window
  modes (bit j steers the j-th group from the least significant end) is this
  design's choice.
- **Not built.**
  - The accuracy-threshold controller. Only its place in the system is
    defined.
  - The FPGA co-simulation setup used for the image experiments.
  - A separate conventional CSLA. Any variant with all mode bits at 1 is
    one.
- **Unused mode bits.** In static nibbles the mode bits are unused, and lint
  reports them as unused signals.
