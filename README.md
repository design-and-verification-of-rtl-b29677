# Pipelined binary16 floating-point divider

This is a small divider for IEEE-754 half-precision (binary16) numbers. It
takes one operand pair per clock and returns one quotient per clock, four
clock edges after the operands were sampled. It is the division unit of a
16-bit floating-point ALU whose other units (add/subtract and multiply) are
not part of this code. Its main idea is a fully combinational restoring
divider for the 11-bit mantissas, cut into four pipeline layers together with
the sign and exponent logic. Every result carries a 3-bit status that says
whether it is normal, zero, clamped by overflow or underflow, or a divide by
zero.

The unit does not aim for full IEEE-754 behaviour. The quotient is truncated,
not rounded. There are no subnormals, infinities or NaNs. The special values
come from a fixed status priority (below). Read "Number model and deviations
from IEEE-754" before using it where exact IEEE results matter.

## Interface

| port              | dir | width | meaning |
|-------------------|-----|-------|---------|
| `clk`             | in  | 1     | rising-edge clock |
| `rst`             | in  | 1     | active-high, synchronous; clears every register |
| `enable`          | in  | 1     | operands present: one division starts at each rising edge where it is high |
| `operand_a`       | in  | 16    | dividend, binary16 |
| `operand_b`       | in  | 16    | divisor, binary16 |
| `division_result` | out | 16    | quotient, binary16 |
| `status`          | out | 3     | status code of `division_result` |
| `valid`           | out | 1     | high for one cycle per finished division |

Status codes, listed from highest to lowest priority:

| code  | meaning | `division_result` |
|-------|---------|-------------------|
| `100` | divisor is zero | `16'hFFFF` (all ones), whatever the dividend |
| `000` | dividend is zero | `{sign, 15'b0}` |
| `001` | overflow | `{sign, 15'h7BFF}`, i.e. ±65504, the largest finite magnitude |
| `010` | underflow | `{sign, 15'b0}` |
| `011` | normal | the truncated quotient |

The sign is always the XOR of the operand signs. A zero dividend and an
underflow therefore give a signed zero.

## Timing

```
edge:        E0          E1           E2             E3
             |           |            |              |
operands --> unpack ---> [R1] sign ---> [R2] normal- --> [R3] pack ---> [OUT]
                               exponent      ise                    valid=1
                               mantissa
```

Operands and `enable` are sampled at a rising edge E0. The result is
registered at the fourth rising edge, E3, counting E0 as the first. It is on
the outputs with `valid = 1` during the cycle after E3.

Each operation carries a valid bit through the layers. A register set loads
only when its incoming valid bit is set. With `enable` low, nothing new
enters, and layers that have no work keep their old contents. `valid` is
that bit leaving the last register. `division_result` and `status` hold the
last result while `valid` is low.

Every edge with `enable` high starts a division. A driver that holds the same
operands and `enable` high for four cycles therefore gets four identical
results on four consecutive cycles. That is harmless, and a monitor that
collects one item per rising edge of `valid` sees it as one result. To get
exactly one result per operand pair, raise `enable` for one cycle.

Up to four divisions can be in flight at once. There is no backpressure: the
outputs must be consumed in the cycle when `valid` is high.

## The four layers

### Layer 1: unpacking

Each operand is split into sign, 5-bit exponent and 10-bit fraction. A hidden
1 is placed in front of the fraction, giving an 11-bit mantissa `1.fff…`. The
hidden bit is 1 for every exponent, exponent 0 included (see the number model
below). This layer is pure wiring, so it sits inline in
`floating_point_division` rather than in a module of its own. Its outputs
form register set R1.

### Layer 2: sign, exponent and mantissa in parallel

* `sign_calculator`: the quotient sign is `s1 ^ s2`.
* `exponent_subtractor`: computes `e = e1 - e2 + 15` in a 7-bit signed
  intermediate. Above 30 it reports overflow and below 0 underflow. The check
  happens **before** normalisation (see deviations).
* `mantissa_divider`: an array of 11 identical `mantissa_divider_cell`s does
  restoring division. Each cell compares the partial dividend with the
  divisor. If the partial dividend is larger or equal, the cell emits quotient
  bit 1 and subtracts the divisor; otherwise it emits 0 and keeps the value.
  It then doubles the remainder for the next cell. The partial dividend is
  12 bits wide, because it stays below twice the divisor. The first cell
  gives bit 10 of `Q`, the integer bit, so
  `Q = floor(MA * 1024 / MB)`. Both mantissas lie in [1024, 2047], so
  0.5 < Q/1024 < 2 and bit 10 or bit 9 of `Q` is always set. The block also
  detects zero operands (exponent and fraction both 0). A zero dividend
  forces `Q = 0` and reports "zero". A zero divisor reports "divide by zero"
  and takes precedence.

Their outputs, with the exception codes, form register set R2.

### Layer 3: normaliser

`normalizer` finds the leading 1 of `Q` and shifts it up to bit 10, with
zeros entering at the bottom. It then subtracts the shift count from the
exponent. A result below 0 is an underflow; exponent 0 itself is accepted.
An all-zero quotient gives zero outputs. For a quotient of two normalised
mantissas the shift is only ever 0 or 1, but the shifter handles any
position. The layer-2 exceptions and the sign travel alongside into register
set R3.

### Layer 4: packer

`packer` gathers the three exception codes and resolves them in the priority
of the status table. It drops the hidden bit and assembles
`{sign, exponent, fraction}` for a normal result, or substitutes the special
value. The output registers hold its result.

## Number model and deviations from IEEE-754

These follow the reference design on purpose:

* **Truncation.** The 11 quotient bits are cut off, with no guard bits and
  no rounding. When `Q` needs the one-place normalising shift, the lowest
  fraction bit is always 0. A result can therefore be up to 2 ulp below the
  exact quotient. For example, 1/3 gives `16'h3554`, where round-to-nearest
  gives `16'h3555`.
* **No subnormals.** Exponent 0 is treated as a normal exponent with a
  hidden 1: `16'h0001` is read as 2^-15 × 1.0000000001, not as a subnormal.
  Only `16'h0000` and `16'h8000` are zero.
* **No infinities or NaNs.** Operands with exponent 31 are divided as
  ordinary numbers. Results never carry exponent 31, except the
  divide-by-zero pattern `16'hFFFF`.
* **Overflow is decided before normalisation.** When `e1 - e2 + 15 = 31`,
  the result is reported as overflow, even when the mantissa quotient is
  below 1 and the normalised exponent would have been 30. Example:
  `16'h7800 / 16'h3A00` (32768 / 0.75) gives ±65504 with status `001`.
* **Underflow** flushes to a signed zero. It is caught either by the
  exponent subtractor (`e1 - e2 + 15 < 0`) or by the normaliser (exponent 0
  needing a shift).
* **Divide by zero** returns `16'hFFFF` regardless of the operand signs.
  0/0 is a divide by zero.

These are this design's own choices, where the reference design leaves the
point open:

* the valid-bit scheme and the way `enable` gates the registers;
* the synchronous reset;
* the extra register stage that carries the layer-2 exceptions next to the
  normaliser output, so that every operation's exceptions meet its own
  mantissa at the packer;
* the output register after the packer, which sets the latency to four
  edges;
* holding the last output while `valid` is low, where the reference
  simulation shows unknown values;
* keeping the sign on zero and underflow results;
* the status code the normaliser reports for an all-zero quotient;
* a single generic division cell in place of separate first, middle and last
  cell variants.

## Files

RTL (`rtl/`):

* `fp16_div_pkg.sv`: widths, bias, status enum `status_e`, the `fp16_t`
  struct and the structs of the three inter-layer register sets.
* `floating_point_division.sv`: top level; unpacking, pipeline registers and
  valid bits.
* `sign_calculator.sv`, `exponent_subtractor.sv`, `mantissa_divider.sv`,
  `mantissa_divider_cell.sv`, `normalizer.sv`, `packer.sv`: the
  combinational layers.

Testbenches (`tb/`), all self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

* `fp16_div_ref_pkg.sv`: reference model. It uses one integer division for
  the mantissa instead of the cell array, plus the same exponent and
  special-case rules. It also offers a real-valued decoder used for an
  arithmetic cross-check.
* `tb_floating_point_division.sv`: end to end, at default parameters. It
  runs directed cases for every status code and for normaliser underflow,
  then 4000 random operations, mostly back to back with random idle cycles,
  and a reset with work in flight. It checks result, status and the
  four-edge latency, and checks every normal result against
  `q <= a/b < q + 2 ulp` in real arithmetic. It counts each mechanism and
  fails if one never occurs.
* `tb_fp16_div_workloads.sv`: two runs. One holds each operand pair for four
  cycles and expects four identical results. The other applies ten random
  pairs back to back and expects ten results on consecutive cycles.
* `tb_mantissa_divider.sv`: all 2^20 mantissa pairs, plus the zero cases.
* `tb_normalizer.sv`: all 32 × 2048 exponent/quotient combinations.
* `tb_exponent_subtractor.sv`: all 32 × 32 exponent pairs.
* `tb_packer.sv`: every combination of incoming exception codes, with random
  fields.
* `tb_sign_calculator.sv`: the four sign combinations.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/fp16_div_pkg.sv tb/fp16_div_ref_pkg.sv \
    rtl/sign_calculator.sv rtl/exponent_subtractor.sv \
    rtl/mantissa_divider_cell.sv rtl/mantissa_divider.sv \
    rtl/normalizer.sv rtl/packer.sv rtl/floating_point_division.sv \
    tb/tb_floating_point_division.sv --top-module tb_floating_point_division
./obj_dir/Vtb_floating_point_division
```

For another testbench, swap the last file and `--top-module`. The unit
testbenches do not need `fp16_div_ref_pkg.sv`. Every testbench finishes in
well under a second.

## Changing it

The format constants live in `fp16_div_pkg`. The special values
`MAX_MAGNITUDE` and `DIV_BY_ZERO_RESULT` and the explicit 16-bit ports are
written for binary16. The datapath widths follow `EXP_W`, `FRAC_W` and
`BIAS`, but a wider format also needs those two values and the port widths
changed. To add rounding, extend the cell array by guard bits in
`mantissa_divider` and round in the normaliser before packing. The
`LATENCY` parameter of the top level only documents the pipeline depth; the
depth is fixed by the four layers.
