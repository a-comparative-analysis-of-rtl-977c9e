# Multiplier-free one-level Daubechies wavelet transform: distributed arithmetic and residue arithmetic

One level of a discrete wavelet transform (DWT) splits a sample stream into two
half-rate streams. The approximation is `a[n] = sum_k h[k] x[2n-k]` and the
detail is `d[n] = sum_k g[k] x[2n-k]`. Here `h` is a Daubechies low-pass filter
and `g` the matching high-pass filter. On an FPGA each output would normally
need one multiplier per tap. This RTL offers two ways to compute the filters
with no multipliers. Both trade multipliers for small ROMs and adders:

* **Distributed arithmetic (DAA).** The products are never formed. Instead,
  each bit column of the recent samples addresses a ROM that holds every
  possible sum of the taps. The ROM outputs are weighted by powers of two and
  added together.
* **Residue number system (RNS).** Arithmetic runs in three small, carry-free
  channels, modulo `2^n - 1`, `2^n` and `2^(n+1) - 1`. Each product
  `tap * sample` is read from 4-bit-sliced ROMs. The channel sums are then
  converted back to a binary integer.

The two datapaths are independent. `dwt_top` places them side by side, each
with its own stream ports. Both default to DB2 (4 taps) and can be switched to
DB4 (8 taps) or DB5 (10 taps) by a parameter. The DAA datapath can also
cascade further levels on its approximation output.

## The filters

DB2 low-pass taps: `h = [(1+sqrt3), (3+sqrt3), (3-sqrt3), (1-sqrt3)] / (4 sqrt2)`
= `[0.48296, 0.83652, 0.22414, -0.12941]`. The high-pass taps are
`g[k] = (-1)^k h[NT-1-k]`. `dwt_pkg` holds the taps rounded to integers in two
scalings:

| datapath | scaling | DB2 low-pass taps |
|---|---|---|
| DAA | `round(h * 2^16)` (Q5.16) | 31651, 54822, 14689, -8481 |
| RNS | `round(h * 2^11)` | 989, 1713, 459, -265 |

DB4 and DB5 use the standard Daubechies values, rounded in the same way. The
function `dwt_pkg::taps(wavelet, branch, frac16)` returns the tap array of a
branch. Arrays are zero-padded to 10 entries.

Down-sampling keeps the filter outputs of the even input indices 0, 2, 4, …,
counted from reset (`dwt_downsample`). As a result, one approximation/detail
pair comes out for every two accepted samples.

## Distributed-arithmetic datapath (`daa_dwt`, `daa_fir`, `daa_rom`)

Samples are 22-bit two's complement Q5.16 numbers: bit 21 is the sign,
bits 20..16 are the integer part and bits 15..0 the fraction. With
`x[k] = -b21*2^5 + sum_{l<21} b_l 2^(l-16)`, the filter output becomes

    y = sum_{l=0}^{21} w_l * R(b_l of x[n], b_l of x[n-1], ..., b_l of x[n-NT+1])
    w_l = 2^(l-16) for l < 21,  w_21 = -2^5

`R(a) = sum_k a_k * tap[k]` is a table of `2^NT` words. For DB2 that is
16 words × 22 bits.

`daa_fir` builds this directly:

1. A delay line holds the last NT samples. It advances only on `in_valid`.
2. There is one `daa_rom` per bit column (22 of them). Each is addressed by
   bit `l` of every tap. Address bit `k` comes from `x[n-k]`. The read is
   registered.
3. Each ROM word is scaled by `2^(l-16)`. Columns below 16 use an arithmetic
   right shift by `16-l`, which truncates. Columns above 16 use a left shift.
   The sign column is negated. The results are registered.
4. A pipelined tree of 21 adders in 5 levels sums the 22 partials at 33 bits.
   The low 22 bits are the Q5.16 result.

**Precision.** Each of the 16 fraction columns truncates on its own. Against
the exact sum of the rounded taps times the samples, the result is less
than 16 LSB (2^-16 each) too low. Against the real-valued filter, the tap rounding
adds up to `0.5 * 2^-16 * sum|x|`. The testbenches allow a total of 2^-10 for
their inputs, which stay below ±13.

**Overflow.** The result wraps at 22 bits. With DB2 (`sum|h| = 1.67`) this
cannot happen while `|x| < 19`.

**Memory.** There are 22 ROMs of `2^NT × 22` bits per filter: 16, 256 and 1024
words for DB2, DB4 and DB5. `daa_dwt` has a low-pass and a high-pass filter,
so it has 44 ROMs.

## Residue-number-system datapath (`rns_dwt` and below)

### Moduli and ranges

`P_n = {m1, m2, m3} = {2^n - 1, 2^n, 2^(n+1) - 1}` with `M = m1*m2*m3`. The
default is `N = 7`, giving `{127, 128, 255}` and `M = 4145280`. `N = 10` gives
`{1023, 1024, 2047}` and `M ≈ 2.1e9`. Signed results use the usual split:
values in `[0, M/2)` are non-negative, and values in `[M/2, M)` stand for
`value - M`. All arithmetic is exact, so the outputs are exactly
`sum_k H[k] x[2n-k]`, with `H = round(h * 2^11)`, as long as the true result
lies in `[-M/2, M/2)`:

| moduli | DB2 (`sum|H|` = 3426) | DB4 (3820) | DB5 (4099) |
|---|---|---|---|
| P7 | `|x| <= 604` | `|x| <= 542` | `|x| <= 505` |
| P10 | any 16-bit x | any 16-bit x | any 16-bit x |

Outside this range the result silently aliases. The caller must scale the
input. With P7, a sample in [-2.5, 2.5] can carry at most 7 fraction bits
(`2.5 * 2^8 = 640` already exceeds the DB2 limit). The output is an integer
whose binary point sits 11 places (plus the input's own fraction bits) from
the right.

### Forward conversion with built-in multiplication (`rns_brc`, `rns_rom`)

One `rns_brc` per tap computes the residues of `C * x` for a 16-bit sample
`x`:

* `x` is cut into four nibbles, `x[3:0]` to `x[15:12]`. Each nibble addresses
  its own 16-word ROM.
* Each ROM word packs all three residues of `C * j`, so no logic is needed to
  separate them: `word = |Cj|_m1 << (2n+1) | |Cj|_m2 << (n+1) | |Cj|_m3`. For
  `n = 7` that is bits 21..15, 14..8 and 7..0.
* The top nibble is read as signed: entries 8..15 hold the residues of
  `C*(j-16)`. This is how negative samples enter.
* The nibble at bit position `s` must still be multiplied by `2^s`:
  * Modulo `2^n - 1`, this is a left rotation by `s mod n`, because
    `2^n ≡ 1`.
  * Modulo `2^(n+1) - 1`, it is a rotation by `s mod (n+1)`.
  * Modulo `2^n`, it is a plain left shift, and bits beyond `n` are lost.

  All three are pure wiring.
* Each channel adds its four terms in a two-level tree of modulo adders.

### Modulo adders (`mod_adder_mersenne`, `mod_adder_pow2`)

The `2^K - 1` adder computes `s = a + b + 1` with carry-out `c`, then
subtracts `!c`:

* If `a + b >= 2^K - 1`, the `+1` carries out. `s` is then already
  `a + b - (2^K - 1)`, and nothing is subtracted.
* Otherwise the extra 1 is taken back.

The result is canonical in `[0, 2^K - 2]` whenever at least one input is
canonical. An input of `2^K - 1` counts as zero, which the reverse converter
uses for one's-complement negation. The `2^K` adder simply drops the carry.
Both register their output (one clock), which keeps the three channels
aligned.

`rns_mod_adder_tree` chains these adders into a pipelined tree for any number
of operands. It uses `NIN-1` adders and `$clog2(NIN)` levels. An odd leftover
operand passes through a plain register.

### Filter (`rns_fcma`)

The sample is scaled by `2^XSHIFT` (default 0) and registered. It then enters
a delay line of NT taps. Tap `k` feeds an `rns_brc` holding `H[k]`. The NT
residue triples are summed per channel by modulo adder trees, using `NT-1`
adders per channel.

### Reverse conversion (`rns_rbc`)

The converter uses no ROM and works by mixed-radix reconstruction:

    X = x2 + 2^n * Y,            Y in [0, m1*m3)
    a = Y mod m1 = |x1 - x2|_m1          since 2^n ≡ 1 (mod m1)
    b = Y mod m3 = |2 (x3 - x2)|_m3      since 2^-n ≡ 2 (mod m3)
    Y = a + m1 * t,  t = |2 (a - b)|_m3  since m1^-1 ≡ -2 (mod m3)

Each step maps to simple hardware:

* Subtraction is a modulo adder fed with the one's complement.
* Multiplication by 2 is a one-bit rotation.
* `m1 * t` is `(t << n) - t`.
* Because `x2 < 2^n`, `X` is the concatenation `{Y, x2}`.

The converter uses three modulo adders and one add/subtract, in three pipeline
stages. Its output is the unsigned `(3n+1)`-bit `X`. `rns_dwt` then maps
`[M/2, M)` to negative numbers in one more register stage.

**Memory.** There are 4 ROMs of 16 × `(3n+1)` bits per tap: 16 ROMs per DB2
filter, 32 for DB4 and 40 for DB5. `rns_dwt` has two filters.

## Interfaces and timing

All blocks share `clk` and a synchronous active-low reset `rst_n`. Streams use
`in_valid` / `out_valid` without back-pressure. A sample is accepted on each
rising edge with `in_valid` high. While `in_valid` is low the delay lines hold
their contents. The pipelines always run.

`dwt_top` ports:

| port | width | meaning |
|---|---|---|
| `daa_in_valid`, `daa_x` | 1, 22 | DAA sample, signed Q5.16 |
| `daa_out_valid`, `daa_a` | 1, 22 | approximation of the last level, Q5.16 |
| `daa_d_valid[j]`, `daa_d[j]` | arrays of `DAA_LEVELS` × 1, 22 | detail of level j+1, Q5.16 |
| `rns_in_valid`, `rns_x` | 1, 16 | RNS sample, signed integer |
| `rns_out_valid`, `rns_a`, `rns_d` | 1, 3N+1, 3N+1 | exact signed integer results (taps × 2^11) |

Latency is counted in clock edges, from the edge that accepts `x[2n]` to the
edge that raises `out_valid` with the pair for `x[2n]`. Latency does not
depend on gaps in `in_valid`. Throughput is one sample per clock,
which gives one output pair per two clocks.

| block | latency |
|---|---|
| `daa_fir` | 8 (ROM 1, shift 1, tree 5, output 1) |
| `daa_dwt` | 9, so the pair is available in the 10th cycle counting the one in which the sample is presented |
| `rns_brc` | 3 |
| `rns_fcma` | 3 + $clog2(NT): 5 for DB2 |
| `rns_rbc` | 3 |
| `rns_dwt` | 8 + $clog2(NT): 10 for DB2, 11 for DB4, 12 for DB5 |

Parameters:

* `dwt_top` takes `DAA_LEVELS` (1), `DAA_WAVELET` and `RNS_WAVELET` (`DB2`,
  `DB4`, `DB5`), `RNS_N` (7) and `RNS_XSHIFT` (0).
* The lower blocks take `NT`, `W`, `FRAC`, `N`, `XSHIFT` and the tap array
  `COEF`/`C`.

## Where this RTL makes its own choices

* **Separate high-pass filter.** Each datapath has a complete second filter
  for the high-pass branch, which doubles the ROM count. A tighter design
  could store the low- and high-pass sums in one wider ROM word.
* **Signed inputs to the RNS filter.** Negative samples enter through the
  signed top-nibble ROM, and negative results are decoded by the `M/2` split.
* **Reverse converter.** The mixed-radix converter above is a derivation of
  this design. It is not the four-adder, two-multiplexer converter usually
  cited for this moduli set, but it has the same interface and result.
* **Pipeline registers.** The placement of pipeline registers, the valid
  signals, the registered ROM reads, the reset, the even-phase down-sampling
  and the 22-bit wrap of the DAA result are all choices of this design.
* **Input scaling.** The RNS input scaling (`XSHIFT`) defaults to 0, meaning
  the sample is already an integer.
* **Multilevel cascade on the DAA side only.** `daa_dwt_multilevel` chains
  `DAA_LEVELS` copies of `daa_dwt`. Each level filters the approximation of
  the one before, which is already in the Q5.16 input format. The default is
  one level. Each level adds 9 edges of latency and 44 ROMs, and level j
  gives one output per 2^j samples. The RNS datapath stays one level: its
  output is a 2^11-scaled integer of up to 3N+1 bits, so cascading it would
  need a rescaling and rounding step back into the 16-bit input range.

## Verification

Every block has a self-checking testbench in `tb/`. The reference models in
`tb/dwt_ref_pkg.sv` rebuild the taps from their closed form or their literal
real values. They compute the filters as plain sums of products, or as a
bit-column sum for the DAA rounding. Each testbench prints
`TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_mod_adder_mersenne` | all operand pairs, K = 7 and 8 |
| `tb_mod_adder_pow2` | all pairs for K = 7, random pairs for K = 10 |
| `tb_daa_rom` | every word, low and high pass |
| `tb_daa_fir` | random stream with gaps and full-scale samples; bit-exact, accuracy, latency |
| `tb_daa_dwt` | down-sampling, bit-exact and real-valued accuracy, latency |
| `tb_rns_brc` | P7 and P10, random and extreme samples |
| `tb_rns_fcma` | residues of the exact filter sum, latency |
| `tb_rns_rbc` | P7 and P10, random values and range ends |
| `tb_rns_dwt` | P7 (at its range limit) and P10 (full 16-bit), exact results, latency |
| `tb_daa_dwt_multilevel` | three cascaded levels against a software cascade of the model; all details, last approximation, output counts |
| `tb_dwt_downsample` | phase and count with random gaps |
| `tb_dwt_top` | both datapaths at default parameters, end to end; counts stalls, dropped odd samples, and negative DAA and RNS results |
| `tb_dwt_wavelets` | DB4 and DB5 on both datapaths, exact results and latencies |

To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
    ./obj_dir/Vtb_dwt_top

Each run takes well under a second. Every ROM is filled at elaboration from
the tap parameters, so there are no data files.

## Files

* `rtl/dwt_pkg.sv`: tap tables, `wavelet_e`, `taps()`, `ntaps()`.
* `rtl/dwt_top.sv`: both datapaths.
* DAA datapath: `rtl/daa_dwt_multilevel.sv`, `rtl/daa_dwt.sv`, `rtl/daa_fir.sv`, `rtl/daa_rom.sv`,
  `rtl/adder_tree.sv`.
* RNS datapath: `rtl/rns_dwt.sv`, `rtl/rns_fcma.sv`, `rtl/rns_brc.sv`,
  `rtl/rns_rom.sv`, `rtl/rns_mod_adder_tree.sv`, `rtl/mod_adder_mersenne.sv`,
  `rtl/mod_adder_pow2.sv`, `rtl/rns_rbc.sv`.
* Shared: `rtl/dwt_downsample.sv`.
* `tb/`: the testbenches and `dwt_ref_pkg.sv`.
