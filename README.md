# Dithered MASH 1-1-1 sigma-delta modulator

A fractional-N frequency synthesizer reaches a non-integer division ratio
N + X/2^8 by switching its divider between neighbouring integers, driven by a
digital sigma-delta modulator. The third-order MASH 1-1-1 modulator is the
cheapest way to do that (three accumulators and a small adder network), but
with a constant input word it is periodic, and the periods show up as spur
tones in the synthesizer's phase noise. The usual remedies are a long LFSR
added at the modulator input, or heavier structures with extra adders and
output filters.

This design removes the periodicity almost for free. A small 8-bit LFSR,
as wide as the accumulators, supplies one pseudorandom bit per clock, and that
bit **replaces the least significant bit of the inputs of the second and third
accumulators**. Nothing is added to the datapath apart from two 1-bit
multiplexers; the input word X reaches the output unchanged on average; and the
dither appears at the output only through high-pass terms that the
synthesizer's loop filter removes.

## How the modulator works

```
            +-----------+  e1   +-----------+  e2   +-----------+
 x[7:0] --->| stage 1   |------>| stage 2   |------>| stage 3   |
            | 8-bit acc |  LSB<-| 8-bit acc |  LSB<-| 8-bit acc |
            +-----+-----+   d   +-----+-----+   d   +-----+-----+
                  | c1              | c2              | c3
                  v                 v                 v
            +-------------------------------------------------+
            | noise cancellation: c1 + (1-z^-1)c2 + (1-z^-1)^2 c3 |--> y (-3..+4)
            +-------------------------------------------------+
   d  <-- 8-bit LFSR (x^8+x^6+x^5+x^4+1), runs while dither_en = 1
```

**Accumulator stage** (`mash_accumulator`). Each stage adds its 8-bit input
to its stored residue. The carry out of the 8-bit adder is the stage's
one-bit quantizer output c_i; the low 8 bits are the new residue e_i, which is
stored and also handed, in the same clock, to the next stage as its input.
Over 256 clocks a constant input X gives exactly X carries, so the mean of c1
is X/256. The residue e_i is (minus) the stage's quantization error.

**Noise cancellation** (`mash_ncl`). Stage 2 quantizes the error of stage 1,
stage 3 the error of stage 2. Differencing their carries and adding them back,

    y[n] = c1[n] + (c2[n] - c2[n-1]) + (c3[n] - 2 c3[n-1] + c3[n-2]),

cancels the first two errors and leaves only the third stage's error shaped by
(1 - z^-1)^3. The network is built as two cascaded differences: c3 is
differenced and added to c2, that sum is differenced and added to c1. The
result ranges over -3..+4 and is registered into a 4-bit two's-complement
word.

## Why the dither goes into stages 2 and 3

This is the part of the design that is easy to get wrong, and the reason for
its shape.

Treat the substituted LSB as adding d[n]/M (M = 256) at a stage input. With
a constant input X, the error of stage 3 evolves as

    e3[n] = ( n(n+1)(n+2)/6 * X + (dither terms) + initial state ) mod M

and the output repeats when the bracket returns to its start after N clocks.

* **Dither at the modulator input** changes the input word and raises the
  low-frequency noise; it is the traditional scheme and not used here.
* **Dither at stage 3 only.** The dither term is (1/M) * sum of d[k] over the
  period. A balanced LFSR contributes about N/2 ones per N clocks; with
  N = K*M the term is K/2, an integer whenever K is even, and the bracket
  is still divisible by M for many X. The periodicity survives no matter how
  long the LFSR is; the output still carries its tones.
* **Dither at stages 2 and 3 (this design).** Stage 3 now also sees the
  running sum of the dither injected in stage 2, so its error contains the
  double sum (1/M) * sum_k sum_{j<=k} d[j]. The partial sums of a
  pseudorandom sequence are not evenly distributed, so this term does not
  reduce to a multiple of M, and the period no longer depends on X. Even
  an 8-bit LFSR is enough to break the short cycles.

The dither reaches the output as

    Y(z) = X(z) + (1/M) D(z) [ (1 - z^-1) + (1 - z^-1)^2 ] + (1 - z^-1)^3 E3(z),

so it has no DC content (the output mean stays exactly X/256) and its extra
low-frequency noise is first-order shaped, below the loop bandwidth of the
synthesizer where the PLL filters it.

Substituting rather than adding matters for hardware: no adder, no carry-in,
just a multiplexer on one input bit of two adders. To first order the effect
is an addition of d/M (the analysis above), but the actual change to the stage
input is d - (old LSB), i.e. -1, 0 or +1 LSB.

## Dither generator

`dither_lfsr` is an 8-bit Fibonacci LFSR, polynomial x^8 + x^6 + x^5 + x^4 + 1,
seeded with 1, output bit = register MSB. Its width follows the accumulator
width; `mash_pkg::lfsr_taps(n)` holds maximal-length tap sets for 3 to 16 bits. The sequence is maximal: period
255, with 128 ones and 127 zeros, which is the near-equal balance the analysis
assumes. The same bit d[n] feeds both stages. When `dither_en` is low the
LFSR holds its state and both stages take their inputs unmodified, so the
block behaves as a plain MASH 1-1-1; this gives the undithered reference
without a second design.

## Interface and timing

`mash111_dithered` (parameter `W = 8`):

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | sample clock = synthesizer reference clock (25 MHz in the measured chip) |
| `rst_n`     | in  | 1     | synchronous, active low: residues 0, LFSR seed, output 0 |
| `dither_en` | in  | 1     | 1 = dither stages 2 and 3; 0 = plain MASH |
| `x`         | in  | W     | unsigned fractional word; output mean = x / 2^W |
| `y`         | out | 4     | signed modulator output, -3..+4, to be added to the integer division ratio |

One sample per clock. The three accumulators chain combinationally within a
clock (three 9-bit adders in series), and y is registered: y at a rising edge
is the result of the x and d presented in the clock before it. There are no
valid/ready signals; y is valid every clock after reset.

The package `mash_pkg` holds the widths (`ACC_BITS = 8`, `LFSR_BITS = 8`,
`OUT_BITS = 4`), the LFSR taps and seed, and the output type `mash_out_t`.

Size after coarse synthesis: three 9-bit adders, two 1-bit muxes, an 8-input
XOR, the small cancellation adders, and 40 flip-flops (24 residue, 8 LFSR,
4 in the cancellation delays, 4 output). The dither
costs the 8 LFSR flip-flops, the XOR and the two muxes, roughly a tenth of the
modulator, in line with the published gate counts (about 420 gates plain,
460 dithered).

## Where this RTL makes its own choices

The published design fixes the structure (three 8-bit accumulators, an
8-bit LFSR, LSB substitution at stages 2 and 3, the cancellation network and a
4-bit output). These details are not given and were chosen here:

* LFSR polynomial, seed, Fibonacci form and the bit taken as d.
* The `dither_en` control and freezing the LFSR while it is low.
* Synchronous active-low reset, with all residues reset to zero.
* The output register (one clock of latency) and two's-complement coding.
* Output width: the block diagrams of the modulator label its output "3-bit",
  while the synthesizer's specification lists 4 output bits. The value range
  -3..+4 needs 4 bits in two's complement, so 4 bits are used.
* Block diagrams draw the dither as an adder at the stage input; the RTL
  substitutes the LSB, which is what the hardware is described as doing (the
  adder is the analysis model).

Changing `W` in the top changes the accumulators and the LFSR together; the
LFSR taps are maximal for any `W` from 3 to 16 (extend `lfsr_taps` for wider
words).

## Not included

The fractional-N PLL the modulator drives (phase detector, charge pump, loop
filter, VCO, multimodulus divider) is analog and outside this RTL; `y` is the
port where the divider control would connect. The test chip's pad ring is not
included either.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_dither_lfsr` | seed at reset; output obeys o[t+8] = o[t]^o[t+2]^o[t+3]^o[t+4]; period exactly 255; 128 ones per period; holds while disabled; every width 3..16 has period 2^n - 1 with 2^(n-1) ones |
| `tb_mash_accumulator` | 4000 random inputs with random LSB substitution against an integer model; X carries per 256 clocks for constant X |
| `tb_mash_ncl` | random carry triples against the expanded cancellation formula, one-clock latency, both range ends -3 and +4 |
| `tb_mash111_dithered` | whole modulator at default size against an integer model, X = 128 with and without dither, X = 37 dithered, random words with dither switched on/off and a reset in the middle; output average X/256 checked; counts dither on/off clocks and switches, LSB substitutions that changed the stage-2 and stage-3 inputs, carries of each stage, and both output extremes |
| `tb_mash_x128_periodicity` | the critical input X = 128 for 2^13 samples. Undithered: the output repeats every 4 samples and its autocorrelation reaches 1. Dithered: no period up to 2048 in the last 4096 samples, largest normalized autocorrelation over lags 1..64 about 0.33, and the average is still 0.5. Repeated for X = 64, 1 and 85: undithered periods 8, 512 and 512, dithered none up to 2048, averages X/256 in all cases |

The models in the testbenches are written from the equations (modulo
arithmetic on integers and the LFSR recurrence), not by reusing the RTL.

Run any of them with Verilator 5, listing the package first, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mash111_dithered \
  rtl/mash_pkg.sv rtl/dither_lfsr.sv rtl/mash_accumulator.sv rtl/mash_ncl.sv \
  rtl/mash111_dithered.sv tb/tb_mash111_dithered.sv
./obj_dir/Vtb_mash111_dithered
```

All testbenches run at the default parameters and finish in well under a
second. The spectral results of the published measurements (spur levels in
dB, phase noise of the full synthesizer) are not reproduced: they need the
analog PLL and spectral estimation outside this RTL. The periodicity and
autocorrelation checks above are the digital counterpart.
