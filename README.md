# MX-SC: a stochastic-computing systolic array for microscaled DNN operands

This is synthesizable SystemVerilog for a matrix-multiply array that keeps its
operands in a microscaling (MX) format but does the mantissa arithmetic with
stochastic computing (SC).

- **MX storage.** Each block of values shares an 8-bit exponent and an 8-bit linear
  scale. Every element carries only a 6-bit signed mantissa. This keeps memory
  small.
- **SC arithmetic.** Inside the array each mantissa becomes a random bitstream. A
  multiplication is then a single AND gate per bit. The exponents and scales are
  combined once per block in ordinary binary arithmetic.
- **Lower latency.** Two measures cut the usual SC latency:
  - a short bitstream (L = 32), which is enough because of a better random
    source;
  - P bits per clock instead of one.
- **Shared generators.** The array shares one random generator per row and one
  per column rather than one per multiplier.

The default build is a 32 x 32 array with P = 8. Each multiply-accumulate
takes 32 / 8 = 4 cycles.

## Number format and what a result means

| field | width | encoding |
|---|---|---|
| mantissa | 6 | sign-magnitude: bit 5 = sign, bits 4:0 = magnitude m |
| exponent | 8 | two's complement, shared by a block |
| scale | 8 | unsigned integer, shared by a block |

An element is worth `(m/32) * scale * 2^exponent`, with the sign applied.

The magnitude is kept apart from the sign for a reason. An unsigned (unipolar)
bitstream of length 32 can then hold every magnitude 0..31 exactly in
expectation: bit probability = m/32. A bipolar encoding would need 64 bits for the
same resolution. It would also be least accurate near zero, where most DNN
weights lie.

One operation multiplies N row blocks A_0..A_{N-1} by N column blocks
B_0..B_{N-1}. Each block has k <= 32 elements. The operation produces the
N x N matrix `C[i][j] = sum_e A_i[e] * B_j[e]`. Each output row C[i][*] is
returned as one MX block: N mantissas with one shared exponent and one
shared scale.

## Stochastic multiplication

**Random source (`mx_rng`).** Two 16-bit Galois LFSRs with different
maximal-length polynomials are used:

- LFSR A: x^16+x^14+x^13+x^11+1
- LFSR B: x^16+x^15+x^13+x^4+1

Each state is cut into two 8-bit words. A gives its upper and lower halves. B
gives its even bits and its odd bits. The four words are XORed together into
one 8-bit value. Mixing two unrelated LFSRs removes most of the step-to-step
correlation of a single LFSR. That is what lets a 32-bit stream be accurate. In
simulation, a 32-bit stream is on average 1.7 counts (out of 32) away from its
magnitude.

**SNG (`sng`).** One SNG serves a whole row or column. It holds P random
sources with distinct seeds. Bit p is `rnd_p[4:0] < m`. So the SNG emits P
stochastic bits per cycle, and one element's 32-bit stream takes 32/P cycles.
Sign, exponent, scale and three stream flags travel next to the bits:

- `vld`: the cycle carries data;
- `clr`: first cycle of a block;
- `fin`: last cycle of a block.

**PE (`pe`).** Each cycle the PE does the following:

1. ANDs its P row bits with its P column bits.
2. Counts the ones with an adder tree.
3. Negates the count when the two signs differ (XOR of the signs).
4. Adds the result into a 12-bit accumulator.

Over one element the accumulator gains about `m_a*m_b/32`. Over a block it
holds the signed mantissa dot product in units of 1/32. A block of 32
elements needs at most 32*32 = 1024 counts, which fits in 12 bits.

On the `clr` cycle the PE also:

- adds the two block exponents (9-bit result);
- multiplies the two scales (16-bit result);
- restarts the accumulator.

## The array and its timing

`pe_array` has SNGs on its left edge (rows) and top edge (columns). Row
streams move one PE to the right per cycle and column streams one PE down.
The array is output-stationary: PE (i,j) keeps C[i][j].

For matching elements to meet, row i and column j are fed i and j cycles
late. `skew_line` in `mxsc_top` adds this delay.

`mxsc_ctrl` sequences one operation:

| phase | cycles | what happens |
|---|---|---|
| STREAM | k * 32/P | element e of every lane is read and held for 32/P cycles |
| WAIT | 2N | the skewed wave drains out; the bottom-right PE finishes last |
| LOAD | 1 | every accumulator is copied into the PE's drain register |
| DRAIN | N | drain registers shift down; the bottom edge feeds one result row per cycle (row N-1 first) to the Format Converter |
| LAST | 1 | the last converted row is written |

`done` pulses exactly `k*32/P + 3N + 3` cycles after `start` is sampled. With
the defaults and k = 32 that is 128 + 99 = 227 cycles. The drain registers are
separate from the accumulators, but the sequencer does not overlap the drain
with the next operation.

## Format Converter (the least obvious part)

PE (i,j) ends with:

- an accumulator a, a count in units of 1/32;
- an exponent sum e;
- a scale product s.

Its value is `(a/32) * s * 2^e`. The N results of one row have different
exponents and scales, and a has 12 bits. `format_converter` must squeeze them
back into 5-bit magnitudes with one shared exponent and one shared 8-bit scale.
It does this in one combinational pass followed by an output register:

1. **Multipliers.** `p_i = |a_i| * s_i`, up to 28 bits. The sign is kept apart.
2. **Exponent alignment.** `emax = max e_i`.
3. **Shifters.** `v_i = p_i >> (emax - e_i)`, truncating. All lanes now share
   exponent emax.
4. **Scale finder.**
   - It first picks the smallest right shift k for which `max v >> k <= 31*255`.
     This is needed because an 8-bit scale alone cannot span a 28-bit range.
   - It then sets `scale = max(1, ceil((max v >> k) / 31))`.
5. **Dividers.** `m_i = min(31, round((v_i >> k) / scale))`. The sign is put back,
   and a zero magnitude is never negative.
6. **Exponent.** The output exponent is `emax + k`.
   - Below -128, the block is flushed to zero.
   - Above 127, it saturates at 127 and `rd_ovf` is set for that row.

The reconstruction error per element is at most `(scale/2 + 2)/32 * 2^exp`.
That is half an output step plus the shifter truncation.

## Host interface (`mxsc_top`)

| ports | use |
|---|---|
| `a_wr_en, a_wr_lane, a_wr_idx, a_wr_mant` | write one mantissa of row block `a_wr_lane` |
| `a_hdr_en, a_wr_exp, a_wr_scale` | write exponent and scale of row block `a_wr_lane` |
| `b_*` | the same for the column blocks |
| `start, k_len` | start an operation on k_len elements (0 is ignored, values above DEPTH are clamped) |
| `busy, done` | busy from start to done; done is a one-cycle pulse |
| `rd_row` -> `rd_mant[N], rd_scale, rd_exp, rd_ovf` | combinational read of result row C[rd_row][*] |

The buffers are written only by the host. Do not write them while `busy` is
high.

Parameters of the top, with their defaults:

- `N = 32`: array size;
- `P = 8`: stochastic bits per cycle; it must divide 32, so 1, 2, 4, 8, 16 and
  32 are valid;
- `DEPTH = 32`: the longest block.

The bitstream length 32 and the field widths are in `rtl/mxsc_pkg.sv`.

## What accuracy to expect

The bitstreams are random, so every product carries noise. For one product
with probability p = m_a*m_b/1024, the count has a standard deviation of
about sqrt(32 p (1-p)). That is at most 2.8 counts on an expected value of up
to 30.

Measured on the first convolution of a CIFAR-style ResNet18 (synthetic,
normally distributed image and weights; 27-element dot products):

| source of error | relative RMS error |
|---|---|
| MX quantisation of the operands alone | 4.3 % |
| after the L = 32 stochastic multiply | 42 % |

The error variance of the array is 0.99 times that of ideal independent
binomial streams. So the mixed-LFSR generators of a row and a column behave
as independent sources. The large per-output error is the nature of
32-bit stochastic arithmetic. Reported classification accuracy for this
kind of arithmetic drops by only a few percent, but check accuracy on the
real network before relying on it.

## How far to trust it

These come from the architecture:

- MX format widths, L = 32, unipolar sign-magnitude encoding;
- shared row/column SNGs;
- P parallel generators with AND gates and an adder tree;
- two XOR-mixed 16-bit LFSRs giving 8-bit values of which 5 bits are used;
- the PE structure (exponent adder, scale multiplier, sign XOR, two's
  complement, 12-bit accumulator);
- the Format Converter stages (multiplier, exponent alignment, shifter, scale
  finder, divider);
- the 32 x 32 array size and P = 8.

These are this implementation's own choices:

- LFSR polynomials and seeds, and which bits form the four 8-bit words;
- the `<` comparator of the SNG;
- the value convention above;
- the extra shift k, the rounding and the exponent saturation/flush in the
  converter;
- the block depth of 32;
- the stream flags, skew, drain chain and sequencer;
- the buffer organisation and the host interface.

Known limits:

- One operation covers one MX block per row and column. Longer dot products
  (most DNN layers) must be split into blocks, with the per-block results
  combined outside the array.
- Results are stochastic. The testbenches allow six standard deviations of the
  stream count plus the output rounding.
- The binary-MX baseline array used for comparison in the original work is not
  included.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mxsc_pkg.sv \
          tb/mxsc_top_tb.sv --top-module mxsc_top_tb -Mdir obj
./obj/Vmxsc_top_tb
```

- `mxsc_top_tb`: 8 x 8 array, end to end.
- `mxsc_top_full_tb`: the default 32 x 32 array. Verilator builds it in
  about half a minute.
- `mxsc_top_psweep_tb`: P = 1, 2, 4, 16 and 32 on 4 x 4 arrays.
- `resnet18_conv1_tb`: the ResNet18 first convolution described above, as
  64 operations on the default array.

The first three use `mxsc_top_driver`. It runs four operations:

- a full 32-element block;
- a short block with spread exponents;
- a block forced into exponent overflow;
- a block forced into underflow.

For every operation it checks the cycle count and every result against the
exact real-valued product.

The unit testbenches are stricter than the end-to-end ones. They check exact
bits, not statistical bounds:

- `sng_tb` and `mx_rng_tb` compare against their own LFSR model.
- `pe_array_tb` recomputes every accumulator from the recorded SNG outputs.
- `format_converter_tb` compares against a 64-bit integer model.

## Files

| file | content |
|---|---|
| `rtl/mxsc_pkg.sv` | widths, stream side-information and PE result structs, seed function |
| `rtl/lfsr16.sv`, `rtl/mx_rng.sv` | random source |
| `rtl/sng.sv` | stochastic number generator |
| `rtl/pe.sv`, `rtl/pe_array.sv` | processing element and array |
| `rtl/format_converter.sv` | conversion of result rows to MX blocks |
| `rtl/mx_buffer.sv`, `rtl/result_buffer.sv` | operand and result buffers |
| `rtl/mxsc_ctrl.sv`, `rtl/skew_line.sv` | sequencer and input skew |
| `rtl/mxsc_top.sv` | top level |
| `tb/*_tb.sv`, `tb/mxsc_top_driver.sv` | testbenches |
