# Multiplier-free 8-point DCT using distributed arithmetic

This RTL computes the 8-point one-dimensional discrete cosine transform.
That is the transform that JPEG and MPEG apply to the rows and columns of
8x8 pixel blocks. It contains no multiplier. Every product of a sample by
a cosine constant comes from a small bit-serial unit that is only a
shift register, a 2:1 multiplexer, one adder and an accumulator. This is
a simple form of distributed arithmetic (DA). Twenty-two of these units
run in parallel. A fixed network of adders in front of them cuts the 64
products of the direct formula down to 22.

## The transform and how it is factored

For samples X(0..7), the transform is

    F(u) = 1/2 C(u) sum_{i=0..7} X(i) cos((2i+1) u pi / 16),
    C(0) = 1/sqrt(2), C(u) = 1 for u > 0.

The cosines are symmetric and periodic, so only seven distinct constants
are needed, each one `1/2 cos(k pi/16)`:

| name | k | value  | Q1.12 integer (`dct_pkg`) |
|------|---|--------|---------------------------|
| A    | 1 | 0.4904 | 2009 |
| M    | 2 | 0.4619 | 1892 |
| B    | 3 | 0.4157 | 1703 |
| P    | 4 | 0.3536 | 1448 |
| C    | 5 | 0.2778 | 1138 |
| N    | 6 | 0.1913 | 784  |
| D    | 7 | 0.0975 | 400  |

Each integer is `round(4096 * cos(k pi/16) / 2)`. The butterfly first
forms eight partial sums:

    a1 = X0+X1+X2+X3+X4+X5+X6+X7      b1 = X0-X7
    a2 = X0-X1-X2+X3+X4-X5-X6+X7      b2 = X1-X6
    c1 = X0-X3-X4+X7                  b3 = X2-X5
    c2 = X1-X2-X5+X6                  b4 = X3-X4

Each output is then a short sum of constant products:

    F(0) = a1 P                  F(4) = a2 P
    F(2) = c1 M + c2 N           F(6) = c1 N - c2 M
    F(1) = b1 A + b2 B + b3 C + b4 D
    F(3) = b1 B - b2 D - b3 A - b4 C
    F(5) = b1 C - b2 A + b3 D + b4 B
    F(7) = b1 D - b2 C + b3 B - b4 A

That makes 1 + 1 + 2 + 2 + 4 x 4 = 22 products. Each product gets its own
DA unit, numbered Z0..Z21:

| units    | output | operands x coefficients        |
|----------|--------|--------------------------------|
| Z0       | F(0)   | a1 x P                         |
| Z1       | F(4)   | a2 x P                         |
| Z2, Z3   | F(2)   | c1 x M, c2 x N                 |
| Z4, Z5   | F(6)   | c1 x N, c2 x (-M)              |
| Z6..Z9   | F(7)   | b1..b4 x D, -C, B, -A          |
| Z10..Z13 | F(5)   | b1..b4 x C, -A, D, B           |
| Z14..Z17 | F(1)   | b1..b4 x A, B, C, D            |
| Z18..Z21 | F(3)   | b1..b4 x B, -D, -A, -C         |

A minus sign is handled by giving that unit the negated coefficient. The
output adders therefore only ever add.

## The butterfly (`dct_butterfly`)

This block is combinational and has three ranks:

* Rank 1 adds and subtracts mirrored samples:
  S11 = X0+X7, S12 = X3+X4, S13 = X2+X5, S14 = X1+X6.
  The differences D11..D14 are b1, b2, b4 and b3.
* Rank 2 gives S21 = S11+S12, D21 = S11-S12 = c1, S22 = S13+S14 and
  D22 = S14-S13 = c2.
* Rank 3 gives S31 = S21+S22 = a1 and D31 = S21-S22 = a2.

Each rank grows the word by one bit, so 8-bit samples become at most
11-bit sums. All outputs are sign-extended to the 13-bit operand width of
the DA units.

## The DA unit (`da_unit`): multiplying one bit per clock

This is the part that replaces the multiplier. A 13-bit operand `data`
(B) is multiplied by a 13-bit constant `coef` (A):

1. **Start.** `start` loads `data` into a parallel-to-serial shift
   register. It also clears the accumulator and sets the bit counter to 13.
2. **Each step.** On each of the next 13 clocks, the most significant
   remaining operand bit selects either `coef` or zero through the mux.
   The accumulator becomes `2*acc + selection`.
3. **Sign bit.** The first bit shifted out is the two's-complement sign
   bit, which has weight -2^12. On that step the selection is
   *subtracted*. This way negative operands need no separate complementer.
4. **Result.** After 13 steps the accumulator holds the exact 26-bit
   product `coef * data`. `done` pulses for one clock, and `prod` holds
   its value until the next start.

`coef` is read on every step, so it must not change while `busy` is high.
In the DCT every coefficient is a constant. For a single constant, the
look-up table of classic DA shrinks to this "coefficient or zero" mux.

## Output adders (`dct_out_adder`)

Each output adds its products (four, two or one of them). The products
are Q.12 numbers. The sum is rounded to the nearest integer, with halves
going toward +infinity, and saturated to the signed 8-bit range. `sat`
flags a clipped result. Clipping matters because 8-bit outputs cannot
hold every DCT of 8-bit inputs. F(0) alone ranges over ±362 when all
eight samples are at full scale. Blocks of natural images use a small
part of that range.

## Top level (`da_dct8`): interface and timing

| port        | dir | width        | meaning |
|-------------|-----|--------------|---------|
| `clk`       | in  | 1            | clock |
| `rst_n`     | in  | 1            | asynchronous reset, active low |
| `in_valid`  | in  | 1            | `x` holds a block |
| `in_ready`  | out | 1            | the DA units are idle |
| `x[0:7]`    | in  | 8 each, signed | samples X(0)..X(7) |
| `out_valid` | out | 1            | one-cycle pulse: new result on `y` |
| `y[0:7]`    | out | 8 each, signed | F(0)..F(7), rounded and saturated |
| `y_sat`     | out | 8            | bit u set when F(u) was clipped |

* **Accepting a block.** A block is accepted on a rising edge where
  `in_valid` and `in_ready` are both high. `x` is sampled on that edge
  only, so it may change freely afterwards.
* **Latency.** The 22 units shift for 13 clocks. On the next edge the
  rounded sums are registered and `out_valid` pulses. The latency is
  therefore **14 clocks** from the accepting edge to `out_valid`.
* **Throughput.** `in_ready` comes back in time to accept the next block
  on that same 14th edge. That gives one block every 14 clocks, or 8
  outputs per 14 clocks.
* **Stalls.** While a block is in flight `in_ready` is low. A source that
  holds `in_valid` high simply waits.

Parameters: `XW` (sample width, 8), `DW` (serialised operand width, 13;
at least `XW+3`) and `OW` (output width, 8). The coefficient width (13)
and the fractional bits (12) are fixed in `dct_pkg`, together with the
coefficient values. If you change them, recompute the table above with
the formula given.

An assertion in `da_dct8` checks that all 22 units stay in lock step.

## Accuracy

Each coefficient is rounded to 12 fractional bits. The products and sums
are exact, and only the final result is rounded. An unclipped output is
within one unit of the real-valued DCT. For the sample block
12, 16, 19, 12, 11, 27, 51, 47 the design gives
69, -34, 21, -7, -11, 7, -3, 2. The exact transform is
68.94, -33.84, 20.65, -7.49, -10.96, 7.08, -2.81, 2.49.

## Where this design departs from, or adds to, the architecture it implements

The butterfly, the DA unit structure and widths, the numbering and
grouping of the 22 units, and the equations come from the architecture
this RTL implements. The following are this design's own choices:

* **Coefficient format.** Q1.12 two's complement, filling the 13-bit
  coefficient word.
* **Serial order.** MSB first, with subtraction on the sign bit.
* **Output scaling.** Round-to-nearest and 8-bit saturation, plus the
  `y_sat` flag.
* **Handshake.** The valid/ready input, the output register and the
  `out_valid` pulse.
* **Control.** One shared start for all units, while each unit keeps its
  own bit counter.
* **Reset.** Asynchronous and active low.
* **Coefficient assignment.** Signs and constants follow the equations
  above, which are checked against the transform formula. They do not
  follow the coefficient labels of the block diagram.

Not included: the 8x8 two-dimensional transform. It would be built from
this 1-D unit by row-column decomposition (rows, a transpose memory, then
columns), but no transpose buffer is specified here.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | widths and the seven Q1.12 coefficients |
| `rtl/dct_butterfly.sv` | pre-adder network |
| `rtl/da_unit.sv` | bit-serial DA multiplier |
| `rtl/dct_out_adder.sv` | product adder, rounding, saturation |
| `rtl/da_dct8.sv` | top level |
| `tb/tb_da_unit.sv` | extremes and random operands; 13-clock timing; start while busy is ignored |
| `tb/tb_dct_butterfly.sv` | every partial sum against its definition |
| `tb/tb_dct_out_adder.sv` | rounding halves, both saturation limits, random sums |
| `tb/tb_da_dct8.sv` | end to end at default parameters, described below |

`tb_da_dct8` sends 406 blocks: the two sample blocks, full-scale
extremes, and random full-range and small-range blocks. The reference is
the transform formula evaluated directly over the samples with the same
Q1.12 constants, and the design must match it exactly. The test also
checks against the real-valued transform, and it checks the latency,
the 14-clock spacing, and that `x` is ignored outside the accepting
edge. It counts and requires back-to-back blocks, stalled inputs, idle
gaps and saturated outputs.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl \
        rtl/dct_pkg.sv tb/tb_da_dct8.sv --top-module tb_da_dct8 -o sim
    ./obj_dir/sim

Replace `tb_da_dct8` with any other testbench in `tb/`. Lint a module
with

    verilator --lint-only -Wall -Irtl -y rtl rtl/dct_pkg.sv rtl/da_dct8.sv \
        --top-module da_dct8
