# Efficient OMS LUT multiplier

A memory-based multiplier for DSP datapaths where one operand is a fixed
coefficient S (a filter tap, for instance). A plain memory-based multiplier
stores all 16 products S·Y of a 4-bit input Y and reads one per input. This
design stores only five of them, in a five-word memory. It produces the
result for the other inputs by shifting a stored word right.

The RTL is synthesizable SystemVerilog and purely combinational. It is
parameterised by the coefficient width `M` and the coefficient `COEFF`. The
defaults are M = 4 and S = 12, which give an 8-bit result.

## How it works: five groups of inputs

The fifteen non-zero 4-bit inputs are split into five groups. Read as a bit
string y0y1y2y3, with y0 the most significant bit, every member of a group is
a cyclic right rotation of one representative. The representatives are 1, 5,
9, 13 and 15. The memory holds S times each of them, as words P0 to P4:

| address d0d1d2 | word | stored | inputs (shift 0 / 1 / 2 / 3) |
|---|---|---|---|
| 000 | P0 | S·1  | 0001 / 1000 / 0100 / 0010 |
| 001 | P1 | S·5  | 0101 / 1010 |
| 010 | P2 | S·9  | 1001 / 1100 / 0110 / 0011 |
| 011 | P3 | S·13 | 1101 / 1110 / 0111 / 1011 |
| 100 | P4 | S·15 | 1111 |

For an input Y, the result is the group's word shifted right (zero-filled) by
the number of rotations shown, and 0 for Y = 0:

    out = (S · P[addr(Y)]) >> shift(Y)

**Read this before using the block as a general multiplier.** The rotation
grouping is built exactly as specified. It gives the true product S·Y only
for the stored inputs 1, 5, 9, 13 and 15, and for 0. For the other ten inputs
the output is the shifted stored word, which is not S·Y. For example, Y = 8
(1000) gives (S·1) >> 1, not 8·S. At the defaults (S = 12):

| Y | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| out | 0 | 12 | 1 | 13 | 3 | 60 | 27 | 39 | 6 | 108 | 30 | 19 | 54 | 156 | 78 | 180 |
| 12·Y | 0 | 12 | 24 | 36 | 48 | 60 | 72 | 84 | 96 | 108 | 120 | 132 | 144 | 156 | 168 | 180 |

This is a property of the scheme itself, not of the RTL. Right shifts of a
product can only divide it by a power of two. An exact shift-based scheme
therefore needs one word per odd value (1, 3, 5, ..., 15), which is eight
words. The testbenches check the outputs against the scheme, and check the
six stored inputs against true products.

## Datapath

```
 in[3:0] ─┬─> address_encoder ──addr[2:0]──> memory_module ──word──> nor_cell ──> log_shifter ──> out
          │                                  (line_decoder +           ^              ^
          │                                   5-word array)            │ reset        │ sel[1:0]
          └─> control ─────────────────────────────────────────────────┴──────────────┘
```

- **address_encoder** (4:3 encoder). A case table maps Y to its group's
  address d0d1d2, with d0 the MSB. Y = 0 maps to 000; that word is then
  zeroed by the reset cell.
- **control**. The same table gives the shift count 0..3 as two control
  bits. It also gives `reset`, which is high only for Y = 0.
- **memory_module**. A **line_decoder** (3:5) turns the address into five
  one-hot word lines, and each line gates one word onto a wired-OR read bus.
  Addresses 5..7 select nothing and read 0. The words are constants, computed
  at elaboration as `COEFF * {1,5,9,13,15}` at M+4 bits. To change the
  coefficient, set the parameter; there is no write port.
- **nor_cell** (reset cell). It has one NOR gate per bit, out = NOR(~word,
  reset). The word passes while reset is low and reads as zero while it is
  high.
- **log_shifter**. A two-stage logarithmic right shifter: stage 1 shifts by
  one place when sel[0] is set, and stage 2 by two places when sel[1] is set.

Timing: the path from `in` to `out` has no registers. It gives one result per
clock at whatever clock the surrounding design uses, with zero cycles of
latency. To pipeline it, register `out`, or register the memory word together
with `sel` and `reset`.

## Parameters and interface

`multiplier #(M, COEFF)`:

| name | default | meaning |
|---|---|---|
| `M` | 4 | coefficient width; the result is M+4 bits |
| `COEFF` | 12 | fixed coefficient S, unsigned, M bits |

Ports: `in` (4 bits, unsigned Y, in[3] the MSB) and `out` (M+4 bits).

The input width is fixed at 4. The encoder table, the 3:5 decoder and the
five stored multiples exist only for 4-bit inputs, so they are constants in
`oms_pkg`, not parameters.

## Design choices not fixed by the scheme

- Bit order: y0 is the MSB of the input, and d0 the MSB of the address. This
  is the only reading in which the stored strings are the values 1, 5, 9,
  13, 15.
- The shift fills zeros at the top. The output is shifted, not rotated.
- The reset and shift signals come from a separate control block, not from
  the encoder. The decoder is placed inside the memory block, so the memory
  keeps a 3-bit address port.
- The reset is active-high and drives the NOR cell directly, with no
  inverter in between.
- Don't-care cases use fixed values: address 000 and shift 0 for Y = 0, and
  no word selected for addresses 5..7.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT
checks=N failures=F` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_address_encoder`, `tb_control` | all 16 inputs against a reference that finds the group and rotation by searching rotations of the representatives (`tb/oms_ref_pkg.sv`) |
| `tb_line_decoder` | all 8 addresses |
| `tb_memory_module` | every address, at S = 12 (M = 4) and at S = 201 (M = 8) |
| `tb_nor_cell` | all 256 words, reset low and high |
| `tb_log_shifter` | all 8-bit words and random 12-bit words, each shift 0..3 |
| `tb_multiplier` | default-size top, one input per clock in shuffled order, all 16 inputs twice; checks same-cycle results, true products for stored inputs (including 5 × 12 = 60), and that reset, every shift count and every stored word were each used |
| `tb_multiplier_coeffs` | all 4-bit coefficients 0..15, and 8-bit coefficients 1, 133, 255, each with all 16 inputs |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/oms_pkg.sv tb/oms_ref_pkg.sv tb/tb_multiplier.sv --top-module tb_multiplier
./obj_dir/Vtb_multiplier
```

Every test finishes in well under a second.

## Files

- `rtl/oms_pkg.sv`: sizes, types, and the table of stored odd multiples.
- `rtl/address_encoder.sv`, `rtl/control.sv`, `rtl/line_decoder.sv`,
  `rtl/memory_module.sv`, `rtl/nor_cell.sv`, `rtl/log_shifter.sv`: the
  blocks.
- `rtl/multiplier.sv`: the top level.
- `tb/`: the testbenches and the reference-model package.
