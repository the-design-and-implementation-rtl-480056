# 16-tap low-pass FIR filter with 4-bits-at-a-time distributed arithmetic

A 16-tap, linear-phase, low-pass FIR filter for 8-bit samples. It is specified
for a 10 MHz sample rate with a 1 MHz cut-off and 8-bit quantised
coefficients. It computes

    y(n) = sum_{k=0}^{15} h(k) x(n-k)
    h = 0, -1, -2, 4, 21, 49, 80, 100, 100, 80, 49, 21, 4, -2, -1, 0

without a single multiplier. Three ideas do the work:

1. **Pre-addition.** The response is symmetric, h(k) = h(15-k). The two samples
   that meet the same coefficient are added first: s[k] = x(n-k) + x(n-15+k).
   That leaves eight products, s[k]·h(k) for k = 0..7.
2. **Shift and sign inversion for the simple coefficients.** h(0..3) = 0, -1,
   -2, 4 are zero or a signed power of two. Their products are a left shift
   and, for negative coefficients, a two's-complement negation (invert, add one).
3. **Distributed arithmetic (DA), four bits at a time, for the general
   coefficients.** h(4..7) = 21, 49, 80, 100 are handled with look-up tables
   (LUTs). The bits of the pre-added samples address the tables, and the
   table words are shifted and added. Four bit positions are looked up in
   parallel in each clock ("4-BAAT", 4 bits at a time), so a sample takes two
   clocks instead of eight (bit-serial) or one clock with eight table copies
   (fully parallel).

The filter's DC gain is sum h = 502. At 0.8 MHz the response is about -3.8 dB
relative to DC, at 1 MHz about -6 dB, and at 2 MHz about -40 dB. At 5 MHz,
half the sample rate, it has an exact zero. This holds for any even-length
symmetric filter.

## The distributed-arithmetic stage

This is the least obvious part of the design.

A pre-added sample is 9 bits in two's complement (the sum of two 8-bit
samples):

    s = -2^8·b8 + sum_{b=0}^{7} 2^b·b_b

For the four general coefficients c[0..3] = 21, 49, 80, 100 and their samples
s[0..3]:

    sum_i c[i]·s[i] = sum_{b=0}^{7} 2^b·LUT(col_b) - 2^8·LUT(col_8)

Here col_b is the 4-bit word made of bit b of each of the four samples. The
table word LUT(a) is the sum of the coefficients whose address bit is set. The
16-word table is:

| a    | 0 | 1  | 2  | 3  | 4  | 5   | 6   | 7   | 8   | 9   | 10  | 11  | 12  | 13  | 14  | 15  |
|------|---|----|----|----|----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| word | 0 | 21 | 49 | 70 | 80 | 101 | 129 | 150 | 100 | 121 | 149 | 170 | 180 | 201 | 229 | 250 |

The table is not stored as a data file. `fir_da_rom` computes it at
elaboration from its `COEF` parameter, so changing the coefficients changes
the table.

`fir_da_lut` loads the four samples into a shift register (the SRL). It splits
them like this:

- The eight magnitude bits b0..b7 go into the SRL. In the first clock its low
  four columns, b0..b3, address four table copies at once. The SRL then shifts
  right by four, and in the second clock the copies read b4..b7.
- The sign bits b8 stay out of the nibble passes. A fifth table copy reads the
  sign column. Its word carries the negative weight -2^8.

`fir_shift_sum` weights the four words of a pass by 1, 2, 4 and 8. It adds the
pass result to the accumulator with weight 2^(4·pass). After the second pass
it subtracts the sign word shifted left by 8. The DA sum is an 18-bit result.

## Pipeline and timing

| stage | module | registered result |
|---|---|---|
| delay line | `fir_input` | 16 × 8-bit taps, `taps_valid` |
| pre-addition | `fir_preadd` | 8 × 9-bit sums |
| simple taps | `fir_simple_taps` | 4 × 12-bit products (ready with the LUT load) |
| LUT, pass 0 / pass 1 | `fir_da_lut` | SRL and sign register; column words are combinational |
| shift summation | `fir_shift_sum` | 18-bit DA sum, after pass 1 |
| adder tree | `fir_adder_tree` | level 1: p0+p1, p2+p3, DA sum; level 2: y |

- **Latency.** `out_valid` comes 7 clocks after the clock edge that accepts a
  sample.
- **Throughput.** The LUT stage is busy for two clocks per sample. `in_ready`
  therefore drops for the one clock after each accepted sample, so the filter
  takes at most one sample every two clocks.
- **Intended operating point.** With a 100 MHz clock and 10 MHz samples, there
  are ten clocks per sample and `in_ready` is never low when a sample arrives.
- **Product alignment.** The simple-tap products are ready before the DA sum.
  In `fir_da_top` they wait in a hold register, loaded in the last LUT pass,
  so the next sample cannot overwrite them before the adder tree uses them.

## Interface of `fir_da_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears the delay line and the pipeline |
| `in_valid` | in | 1 | `in_data` holds a sample |
| `in_ready` | out | 1 | the sample is taken on this edge if `in_valid` is high |
| `in_data` | in | 8 | signed sample |
| `out_valid` | out | 1 | one-clock pulse per output |
| `out_data` | out | 18 | signed y(n), full precision (|y| ≤ 128·514 = 65792) |

The output is not rounded or truncated. To get an 8-bit output, take the top
bits after your own scaling. The DC gain is 502, so dividing by 512 (a shift
right by 9) is close to unity gain.

## Files

`rtl/`:

- `fir_pkg.sv`: sizes and the coefficient sets, `COEF_SIMPLE` and `COEF_GEN`.
- One module per file: `fir_input`, `fir_preadd`, `fir_simple_taps`,
  `fir_da_rom`, `fir_da_lut`, `fir_shift_sum`, `fir_adder_tree` and the top,
  `fir_da_top`.

Every module's parameters default to the package values.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_fir_da_top` runs the whole filter at its default sizes.
  - It compares every output with a direct 16-tap convolution and checks the
    7-clock latency.
  - It runs the application test signal: a 0.8 MHz tone plus a 5 MHz
    interferer, one sample every ten clocks. It checks that, once the delay
    line is full, the interferer disappears completely from the output.
  - It then drives back-to-back and full-scale samples, which exercises
    back-pressure and the largest outputs, followed by samples with random
    gaps.
- The unit testbenches work out their expected values independently.
  - `tb_fir_da_lut` computes every column word from the sample bits.
  - `tb_fir_shift_sum` computes the weighted sum.

Simulating with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/tb_fir_da_top.sv \
        --top-module tb_fir_da_top -o sim
    ./obj_dir/sim

Use the same command for the other testbenches; swap the testbench file and
top module. Each one finishes in well under a second.

## Changing the design

- **Coefficients.** Edit `COEF_SIMPLE` and `COEF_GEN` in `fir_pkg`.
  - Every simple coefficient must be zero or ±2^m. Otherwise elaboration
    stops with an error.
  - The general coefficients can be any values that fit the LUT width
    (`LUT_W`, 10 bits). Their tables are computed from them.
  - Check `PROD_W` (simple-tap products, shift up to 2), `ACC_W` and `OUT_W`
    against your worst-case sums.
- **Bits per pass.** `BAAT` sets how many bit columns are looked up per clock.
  `MAG_W` must be a multiple of it. `PASSES` (clocks per sample) and the
  `in_ready` cool-down follow from it.
- **Fixed parts.** The adder tree is written for four simple-tap products. The
  split of the eight coefficients into four simple and four general ones is
  fixed by the package.

## How far to trust it, and where it departs from the original description

What was tested:

- Every module is checked on its own and end to end against a bit-exact
  integer model, with random, full-scale and application-like input.
- Assertions check the LUT stage: no new load while it is busy, and the
  simple-tap products are ready when the DA sum starts.

Not tested:

- Nothing here was synthesised for an FPGA or timed. The original design
  reported about 157 MHz and about 1750 logic elements on a mid-size FPGA.
  Those figures are not reproduced here.

Where this design makes its own choices:

- **Handshake and reset.** The valid/ready handshake, the 2-clock minimum
  sample spacing and the asynchronous active-low reset are choices of this
  design. The original description says nothing about them.
- **Widths and registers.** Internal widths, full-precision 18-bit output, one
  register per stage and a two-level registered adder tree: the description
  names the stages but gives none of these.
- **Sign column.** The original says only that the sign bits do not take part
  in the 4-bit look-up and are treated as the sign of the result. Here this is
  built as a separate sign-column look-up, weighted by -2^8, with its own table
  copy.
- **Simple taps as a unit.** The original lists five modules: input,
  pre-addition, LUT, shift summation and adder tree. The shift/sign-inversion
  products are a separate module here, plus a hold register that aligns them
  with the DA sum.
- **Filter length.** The filter is described as "order 16", but its
  coefficient list has 16 entries, h(0)..h(15). This design has 16 taps.
