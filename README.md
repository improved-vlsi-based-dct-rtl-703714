# Fixed-point DCT and DWT front end for audio-band biosignals

Heart, lung and bowel sounds are analysed by looking at how their energy is
spread over frequency bands and how it changes from one short window to the
next. This design is a small, all-integer hardware front end for that job:
an 8-bit sample stream is split by a one-level discrete wavelet transform
(DWT) into a low band and a high band, and each band is then cut into
blocks of four samples and transformed by a 4-point discrete cosine
transform (DCT).

The arithmetic is where the design saves area. Every multiplication is done
by a *fixed-width truncated multiplier*, which builds only the upper half of
the partial-product array and replaces the missing lower half by a constant,
and every addition and subtraction uses a ripple adder made of XOR-MUX full
adders. Both choices trade a few units in the last place for a smaller and
shallower circuit. A carry-select adder with a binary-to-excess-1 converter
(RCA-BEC) is available as an alternative through one parameter.

The arrangement follows a published DCT/DWT design for audio biological
signals: 8-bit data, the five Q1.7 cosine constants, the port names of the
DCT, the direct-form DCT (all products formed in parallel, then summed by
adders and subtractors), truncated multipliers with constant correction, FIR
filters for the DWT, and XOR-MUX adders as the preferred adder. Everything
that publication leaves open (the wavelet, the scaling, the handshake, the
reset polarity's meaning, how DWT and DCT are joined) is a choice of this
design and is marked as such below and in each file's header.

## Signal flow

```
             +--------------------- audio_bio_top ----------------------+
 audio_in -->| dwt_fir (Haar)  approx --> lane re +-------------+        |
 in_valid -->|  x2 decimation  detail --> lane im | dct4_stream |--> dct_approx
             |                 dwt_valid -------->|  2 x        |--> dct_detail
             |                                    |  dct4_core  |--> out_k, out_valid
             +------------------------------------+-------------+--------+
```

Eight input samples give four low-band and four high-band samples, which
give one block of four DCT coefficients per band. The band samples are also
brought out (`approx`, `detail`, `dwt_valid`).

## Number formats and scaling

This is the part to understand before using the outputs.

* Samples are 8-bit two's complement integers (`dsp_pkg::sample_t`).
* Coefficients are 8-bit Q1.7: `|cos(m*pi/8)| * 128`, truncated toward
  zero. The set is

  | constant | m | value | cos(m*pi/8) |
  |---|---|---|---|
  | W1N | 1 (and 7) | 118 | 0.9239 |
  | W2N | 2 | 90 | 0.7071 |
  | W3N | 3 (and 5) | 48 | 0.3827 |
  | W4N | 4 | 0 | 0 |
  | W6N | 6 | 90 | -0.7071 (magnitude) |

  Signs are never stored; a negative cosine turns the corresponding
  addition into a subtraction.
* A truncated product keeps the upper 8 bits of the 16-bit product, so with
  a Q1.7 coefficient it is `x * c / 2` (plus the truncation error below).
* DCT output: `y[k] = X[k] / 4`, where
  `X[k] = c_k * sum_n x[n] cos((2n+1) k pi / 8)`, `c_0 = 1/sqrt(2)`,
  `c_k = 1` otherwise. That is 0.354 times the orthonormal DCT. The row sums
  are kept in 10 bits and halved at the end; no row can overflow for any
  8-bit input, which the testbenches confirm at the corners of the range.
* DWT output: with the default Haar filter, `approx = (x[2i] + x[2i+1]) * 0.707 / 2`
  and `detail = (x[2i+1] - x[2i]) * 0.707 / 2`, i.e. half the orthonormal
  Haar bands. Any other Q1.7 low-pass filter `H` can be given; the
  high-pass is derived as `G[k] = (-1)^k H[TAPS-1-k]`. The 8-bit outputs
  cannot overflow as long as `sum |H|` stays at or below 2.0 (256 in Q1.7).

## The truncated multiplier (`trunc_mult`)

Operands are signed, so the partial products use the Baugh-Wooley form:
`a_i & b_j` for the magnitude bits, the inverted AND where exactly one of
the two bits is a sign bit, and the two constants `2^N` and `2^(2N-1)`.
The `DROP` least significant columns are never built. Their expected value
(each AND bit is one with probability 1/4, each inverted AND with 3/4) is
rounded to a whole number `K` of units `2^DROP` and added as a constant.
The kept rows are summed one after another by a chain of N adders of the
selected style (a ripple array multiplier on XOR-MUX cells by default), so
the multipliers use the same cells as the rest of the datapath:

| N | DROP | K | error against floor(a*b/256), all 65 536 pairs |
|---|---|---|---|
| 8 | 8 (default) | 2 | -5 .. +2 LSB, mean +0.24 |
| 8 | 6 | 1 | -1 .. +1 LSB |

The default builds only the columns that reach the 8 output bits. It is the
smallest array, but its error is larger than one unit in the last place.
FIR filters are often specified with faithful rounding (error below 1 LSB),
and `DROP = N-2` comes close to that, so use it where accuracy matters
more than area. In the DCT the default error shows up as at most about six
LSB against the ideal `X[k]/4`; the testbench reports the worst case it saw.

## The adders

* `xor_mux_adder`: each bit computes `p = a ^ b`, `sum = p ^ cin`, and
  picks its carry with a multiplexer, `cout = p ? cin : a`. The carry ripples
  through one mux per bit.
* `rca_bec_adder`: the low half is a ripple-carry adder. The high half is
  added once with carry-in 0; a binary-to-excess-1 converter forms that sum
  plus one, and the low half's carry selects between them.
* `add_sub`: `a + (b ^ {W{sub}}) + sub` on either adder, with carry out and
  signed overflow. `STYLE = ADDER_XOR_MUX` (default) or `ADDER_RCA_BEC`; the
  same parameter is passed down from `audio_bio_top`, `dct4_stream`,
  `dct4_core` and `dwt_fir`.

The XOR-MUX adder is the default because the published comparison reports
the XOR-MUX configuration as the smaller and faster one, although the same
publication's section heading names the RCA-BEC adder for its DCT. Both are
built and tested, so either can be chosen.

## The 4-point DCT (`dct4_core`)

Direct form: each of the four inputs is multiplied by each of the sixteen
coefficient magnitudes at the same time, and each output row adds or
subtracts its four products in a chain of three `add_sub` units.

| k | n = 0 | n = 1 | n = 2 | n = 3 |
|---|---|---|---|---|
| 0 | +W2N | +W2N | +W2N | +W2N |
| 1 | +W1N | +W3N | -W3N | -W1N |
| 2 | +W2N | -W6N | -W6N | +W2N |
| 3 | +W3N | -W1N | +W1N | -W3N |

The table is generated at elaboration time from `dsp_pkg::cos_mag` and
`cos_neg`, so the RTL holds no hand-written matrix. The core is purely
combinational: 16 multipliers and 12 adder/subtractors.

## Streaming and timing

`dct4_stream` takes one sample pair (`data_re`, `data_im`) per cycle when
`in_valid` is high; idle cycles are allowed anywhere. It holds three samples
per lane, and when the fourth arrives both lanes are transformed in the same
cycle and loaded into a 4-entry output shift register.

```
cycle        t0   t1   t2   t3   t4   t5   t6   t7
in_valid      1    1    1    1    .    .    .    .
sample       x0   x1   x2   x3
block_done                   1
out_valid                         1    1    1    1
out_k                             0    1    2    3
```

Since a block needs four input cycles and drains in four output cycles, the
unit runs at one sample pair per cycle without ever stalling; there is no
back-pressure signal. The lanes are two independent real streams (for
example a sine and a cosine, or the two DWT bands); a DCT of a complex input
is simply the DCT of its real and imaginary parts.

`dwt_fir` accepts one sample per `in_valid`. After every second accepted
sample (the 2nd, 4th, ...) it registers `approx` and `detail` and pulses
`out_valid` on the next cycle. At the top level a band sample therefore
appears one cycle after its input pair, and a block's first coefficient one
cycle after its fourth band sample. With a gapless input the top produces
4 coefficient pairs per 8 input samples.

`reset` is active low and asynchronous in all clocked blocks. It clears the
block counter, the DWT delay line and phase, and the output registers.

## Interfaces

`audio_bio_top #(STYLE)`:

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| reset | in | 1 | active-low reset |
| in_valid | in | 1 | `audio_in` holds a sample |
| audio_in | in | 8 | signed sample |
| dwt_valid | out | 1 | `approx`/`detail` hold a band sample |
| approx, detail | out | 8 | low and high band |
| out_valid | out | 1 | `dct_approx`/`dct_detail` hold a coefficient |
| out_k | out | 2 | coefficient index 0..3 |
| dct_approx, dct_detail | out | 8 | DCT of the low and high band |
| block_done | out | 1 | a block of four band samples was just transformed |

The published DCT unit had only clock, reset and the four 8-bit data
buses; the valid strobes, `out_k` and `block_done` are additions of this
design that make block boundaries and idle cycles explicit.

`dct4_stream` has the same clock, reset and valid signals with `data_re`,
`data_im` in and `data_out_re`, `data_out_im`, `out_k`, `block_done` out.
`dwt_fir #(TAPS, H, STYLE)` has `x_in` in and `approx`, `detail`,
`out_valid` out.

## What is not here

* An analog DCT (analog multipliers, a cross-point switch and integrators)
  was the other half of the published comparison. It is a transistor-level
  circuit and has no RTL counterpart.
* Gate-diffusion-input (GDI) cells were used for the transistor-level
  realisation; they change how gates are built, not what they compute.
* The computation-sharing multiplier used in an earlier FIR design is only a
  baseline and is not included. The transistor-level FIR was built with a
  "modified carry-save adder" that is not described further; the digital
  FIR here sums its taps with the same adder/subtractor chain as the DCT.
* Whatever classifies the DCT coefficients into symptom patterns is not
  described in enough detail to build and is left to the user.
* Only one DWT level is built; more levels can be had by chaining
  `dwt_fir` instances on the `approx` output.

## Files

| file | content |
|---|---|
| rtl/dsp_pkg.sv | widths, sample and coefficient types, W1N..W6N, adder-style enum, cosine table functions |
| rtl/xor_mux_adder.sv, rtl/rca_bec_adder.sv | the two adders |
| rtl/add_sub.sv | adder/subtractor on either adder |
| rtl/trunc_mult.sv | truncated multiplier |
| rtl/dct4_core.sv | combinational 4-point DCT |
| rtl/dct4_stream.sv | clocked two-lane DCT |
| rtl/dwt_fir.sv | one-level DWT filter bank |
| rtl/audio_bio_top.sv | DWT + DCT top |
| tb/tb_ref_pkg.sv | integer and real reference models |
| tb/tb_*.sv | one self-checking testbench per module, plus tb_dct4_sine and tb_audio_bio_top_bec (the whole chain on RCA-BEC adders) |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself;
each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/dsp_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_audio_bio_top.sv --top-module tb_audio_bio_top
./obj_dir/Vtb_audio_bio_top
```

Replace the testbench name to run another one. What they check:

* `tb_xor_mux_adder`, `tb_rca_bec_adder`: every 8-bit operand pair and
  carry; random 10-bit sums with an uneven split for the carry-select adder.
* `tb_add_sub`: both adder styles, edge and random operands, result, carry
  and overflow.
* `tb_trunc_mult`: every 8-bit operand pair, bit-exact against the model
  (full product minus the dropped bits plus K) and within the error bounds
  of the table above, for DROP = 8 and 6.
* `tb_dct4_core`: both styles, range corners and 5000 random blocks,
  bit-exact and within 8 LSB of the real-valued DCT.
* `tb_dct4_stream`: random streams with gaps and without; values, order of
  `out_k`, and the exact cycle of every coefficient.
* `tb_dwt_fir`: Haar and a 4-tap Daubechies filter, random input with gaps,
  exact values and output cycle; a constant input must give a zero detail.
* `tb_audio_bio_top`: the whole chain at default parameters on a synthetic
  heart-sound signal (two decaying bursts per beat, a murmur, noise), every
  band sample and coefficient checked with its cycle; it also confirms that
  gaps, negative high-band samples and gapless running all occurred.
* `tb_dct4_sine`: a sine on `data_re` and a cosine on `data_im`, as in the
  published DCT simulation, checked against the model and the ideal DCT.

## Changing it

* Adder: `STYLE` on `audio_bio_top` (or any block below it).
* Wavelet: `dwt_fir #(.TAPS(4), .H('{62, 107, 29, -17}))` gives a
  Daubechies-4 filter bank; the top instantiates `dwt_fir` with its
  defaults, so change it there.
* Multiplier accuracy: `DROP` on `trunc_mult`; the DCT and DWT instantiate it
  with the default `DROP` and pass their `STYLE` down to it.
* Widths: `DATA_W`/`COEF_W` live in `dsp_pkg`. The coefficient values are
  fixed 8-bit Q1.7 constants and the DCT row width assumes 8-bit samples, so
  changing the width means revisiting both.
