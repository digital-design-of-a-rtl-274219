# DVB-T transposing repeater: digital frequency conversion and rate change

A transposing repeater picks up a DVB-T channel, moves it to another
frequency and sends it out again. This RTL is the digital core of one. A
6 MHz channel arrives sampled at 90 MS/s on an intermediate frequency fc
between 35 and 37 MHz. The core does three things:

1. It shifts the channel down to 3 MHz and lowers the rate to 12 MS/s (the
   **input stage**). At that rate an automatic frequency control (AFC)
   block can work on the channel.
2. It carries the 12 MS/s stream from the input clock to the output clock.
3. It raises the rate to 96 MS/s and puts the channel back on fc (the
   **output stage**), ready for a DAC.

Both rate changes use polyphase filters, so each multiplier runs at the
low rate of its filter and not at the high rate. The structure, the rate
factors, the filter lengths and the carrier plan follow the design
described in *Digital Design of a Broadcast DVB-T Repeater*. The clocking,
the word widths, the fixed-point format, the interfaces and the
clock-domain crossing are this implementation's own.

```
            clk_in = 180 MHz                                            clk_out = 96 MHz
 x 90 MS/s                                                    12 MS/s
 ──► MIX ──► LPF 128 ──► INT ×2 (51) ──► DEC ÷15 (256) ──┬──► FIFO ──► INT ×8 (972) ──► MIX ──► BPF 1068 ──► GAIN ──► y 96 MS/s
      ▲ DDS fi=fc-3 MHz      180 MS/s                     │  ▲ (16 words)                 ▲ DDS fi=fc-3 MHz
                                                          └──┘ AFC ports (afc_o / afc_i, afc_bypass)
```

## Frequency plan

The input mixer is a real multiplier. It multiplies the IF signal by
cos(2π·fi·t), with fi = fc − 3 MHz. For fc = 35 MHz that gives:

| product | frequency | where it goes |
|---|---|---|
| difference fc − fi | 3 MHz | wanted channel, 0–6 MHz |
| sum fc + fi = 67 MHz | aliases to 90 − 67 = 23 MHz | removed by the 128-tap low-pass (pass 6 MHz, stop 7 MHz) |

The sum product falls lowest for fc = 37 MHz, at 19 MHz, which is still
far inside the stop band. After the low-pass the signal is interpolated
by 2, to 180 MS/s, then decimated by 15, to 12 MS/s.

In the output stage, the interpolator by 8 leaves images of the 0–6 MHz
channel around every multiple of 12 MHz. It suppresses them with a long
filter: 972 taps, with only 0.14 MHz of transition band. The output mixer
again multiplies by cos(2π·fi·t). That produces the wanted channel at
fi + 3 = fc and an unwanted copy at fi − 3 MHz. The 1068-tap band-pass
keeps only fc. That band-pass is a 3.07 MHz low-pass prototype multiplied
by 2·cos(2π·fc·(n − (N−1)/2)/fs). The cosine is centred on the middle
tap, so the filter stays symmetric. Retuning to a different fc therefore
only means loading new coefficients and new DDS words.

Each mixer halves the amplitude of the product it keeps. With unit-gain
filters, the whole chain therefore has a gain of 1/4. The final gain
stage (`gain`, unsigned Q8.8) puts that back: set it to 4.0 = `16'd1024`.

## The polyphase rate changers

This is the part that takes the most care. The conventions below are
exactly what the RTL computes.

### Interpolator by L (`polyphase_interpolator`)

The prototype h[0..N−1] is designed at the output rate with pass-band gain
L. It is split into L components, e_p[j] = h[j·L + p], each K = ⌈N/L⌉ long
(missing taps are zero). All components look at the same delay line of
input samples:

    y[n·L + p] = Σ_j e_p[j] · x[n − j],   p = 0 … L−1, phase 0 first.

Only one component is needed per output sample. One set of K multipliers
is therefore shared: in the p-th clock after an input, coefficient bank p
is applied to the delay line. Sizes: K = 26 for the 51-tap input filter
(L = 2), K = 122 for the 972-tap output filter (L = 8).

Handshake: an input is taken on `in_valid && in_ready`. `in_ready` is high
when the block is idle, and also in the clock that computes the last
phase. Inputs can therefore arrive every L clocks and give a gap-free
output. Output phase p of an input taken in clock c appears in clock
c + 2 + p, and `out_phase` tells which phase it is.

### Decimator by M (`polyphase_decimator`)

Components are e_k[j] = h[j·M + k], with K = ⌈N/M⌉. For 256 taps and
M = 15 that gives K = 18. A commutator deals the input samples to the
components, running from component M−1 down to 0. Component k sees
x[m·M − k], and each component has its own K−1-deep delay line, so

    y[m] = Σ_k Σ_j e_k[j] · x[(m−j)·M − k] = Σ_n h[n] · x[m·M − n].

This is the prototype filter followed by keeping every M-th sample.

Only the component that receives the sample has work to do. One set of
K multipliers forms that component's partial sum, and the partial sums
build up in an accumulator. When component 0 has been served, the sum is
rounded and output, one clock later. Counting input samples from 0 after
reset, output m is

    y[m] = Σ_n h[n] · x[m·M + M − 1 − n].

The first output comes after M samples. The block accepts one sample per
clock.

### Multiplier count

| block | multipliers in this RTL | operations in the reference design |
|---|---|---|
| input mixer + low-pass | 1 + 64 (folded 128 taps), plus CORDIC adders | 76 |
| interpolator ×2 | 26 | 26 |
| decimator ÷15 | 18 | 17 |
| interpolator ×8 | 122 | 122 |
| output mixer + band-pass + gain | 1 + 534 (folded 1068 taps) + 1, plus CORDIC adders | 546 |

The decimator needs 18 per component because 15 × 17 = 255 < 256. The
reference figures also count a gain and phase correction for the DDS,
which is not built here (see *Departures*).

## Carrier generation (`cordic_dds`)

The DDS has a 32-bit phase accumulator that advances by `ftw` on each
sample strobe, so fi = ftw / 2³² · fs. For fc = 35 MHz the tuning words
are:

- input: `1527099483`, which is 32 MHz at 90 MS/s;
- output: `1431655765`, which is 32 MHz at 96 MS/s.

Both words are in `dvbt_pkg`. The phase goes through a pipelined CORDIC
with 16 rotation-mode stages. Before the CORDIC, the phase is folded into
[−π/2, π/2) by a rotation of π, which is undone at the output. The
starting vector (32767/K, 0) cancels the CORDIC gain K. The x and y words
carry 4 extra fraction bits.

The output is within 2 LSB of 32767·cos over all tested tuning words.
The latency is ITER + 2 = 18 strobes. Every register advances only on
`en`, so the carrier stays locked to the sample stream even when the
stream has gaps.

## Number format and coefficients

- Samples are 16-bit two's complement. Coefficients are 18-bit.
- Coefficient format: Q1.17 for all filters except the interpolator by 8,
  which is Q2.16 because its prototype carries a gain of 8.
- Every accumulator is full precision. Each block ends with
  round-half-up, an arithmetic shift and saturation (`dvbt_pkg::round_shift`).
- The filter designs are not fixed in hardware. All coefficients sit in
  registers, are written over a small bus, and reset to zero.

| stage | bus | bank | addresses | contents |
|---|---|---|---|---|
| input | `in_coef_*` (clk_in) | 0 `BANK_LPF` | 0–63 | h[0..63] of the 128-tap symmetric low-pass |
| input | `in_coef_*` (clk_in) | 1 `BANK_INT2` | 0–50 | h[0..50], gain 2 |
| input | `in_coef_*` (clk_in) | 2 `BANK_DEC15` | 0–255 | h[0..255] |
| output | `out_coef_*` (clk_out) | 0 `BANK_INT8` | 0–971 | h[0..971], gain 8 |
| output | `out_coef_*` (clk_out) | 1 `BANK_BPF` | 0–533 | h[0..533] of the 1068-tap symmetric band-pass |

The band edges the filters are meant to meet:

| filter | rate | pass / stop edge | stop-band attenuation |
|---|---|---|---|
| low-pass | 90 MS/s | 6 / 7 MHz | 40 dB |
| interpolator ×2 | 180 MS/s | 22.5 / 25 MHz | 40 dB |
| decimator ÷15 | 180 MS/s | 12 / 13 MHz | 40 dB |
| interpolator ×8 | 96 MS/s | 6 / 6.14 MHz | 40 dB |
| band-pass prototype | 96 MS/s | 3 / 3.14 MHz | 45 dB |

The reference design uses equiripple filters with 1 dB of pass-band
ripple. The testbenches use Hamming-windowed sinc designs instead,
computed at run time in `tb/tb_util_pkg.sv`:

    h[n] = g · sin(π·c·t)/(π·t) · (0.54 − 0.46·cos(2πn/(N−1))),
    t = n − (N−1)/2,  c = 2·f_cut/fs,  f_cut = middle of the pass and stop edges,

and for the band-pass, additionally multiplied by 2·cos(2π·fc·t/fs). Any
equiripple set of the same length can be loaded in their place.

## Clocks, FIFO and AFC ports

The input stage runs on `clk_in` = 180 MHz. Input samples come with
`x_valid` on every second clock. The mixer, DDS and low-pass work on that
strobe. The interpolator then delivers one sample per clock, and the
decimator emits one sample every 15 clocks. If samples come faster than
one every two clocks, the interpolator would drop them, and the sticky
`in_overrun` flag says so.

The output stage runs on `clk_out` = 96 MHz. The interpolator pulls one
12 MS/s sample every 8 clocks through a valid/ready handshake. Everything
after it produces one sample per clock (`y_valid`).

Between the two stages is `async_fifo`, a 16-word dual-clock FIFO:

- Gray-coded pointers with two-flop synchronisers;
- first-word-fall-through reads;
- a fill level (`rlevel`) as seen from the read side.

The output stage starts reading once the FIFO holds 8 words. That
absorbs the phase between the two clocks and a small frequency error.
Two sticky flags, `fifo_overflow` and `fifo_underrun`, report the cases
where that margin runs out.

The AFC block is not part of this core. The 12 MS/s stream goes out on
`afc_o_valid`/`afc_o`. With `afc_bypass` low, the FIFO is fed from
`afc_i_valid`/`afc_i` instead of directly from the input stage. Both
streams are in the `clk_in` domain.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mixer`, `tb_gain_correction` | bit-exact rounded products, including saturation corners; 1-clock latency |
| `tb_cordic_dds` | cos/sin against floating point within 3 LSB for 8 tuning words; exact 18-strobe latency; hold while `en` is low |
| `tb_fir_symmetric` | bit-exact against direct convolution at 128, 1068 and 11 (odd) taps; 2-clock latency |
| `tb_polyphase_interpolator` | bit-exact at ×2/51 and ×8/972; phase order; first-output timing; hold-off; gap-free output at full rate |
| `tb_polyphase_decimator` | bit-exact at ÷15/256 and ÷4/10; output exactly one clock after every M-th sample and never otherwise |
| `tb_async_fifo` | order and loss over unrelated clocks; full, overflow and fill level |
| `tb_input_stage` | tone tests at fc = 35, 36, 37 MHz, described below |
| `tb_output_stage` | tone tests at fc = 35, 36, 37 MHz, described below |
| `tb_dvbt_repeater_top` | the whole core at full size with 16-QAM, described below |

**Input stage.** A tone at fc + 0.4 MHz must leave at 3.4 MHz with half
the input amplitude. The measured amplitude is 5990 against 6000
expected, with everything else 81 dB down. The mixer's sum product must
be at least 40 dB down after the low-pass; it is 65–72 dB down.

**Output stage.** A 3.4 MHz input tone must leave at fc + 0.4 MHz. The
amplitude is within 0.01 %, everything else is about 70 dB down, and the
difference product is more than 70 dB down.

**Whole core.** `tb_dvbt_repeater_top` runs at full size with every
parameter at its default, using the evaluation signal of the reference
design: 16-QAM at 3 Msym/s, raised cosine with roll-off 1 (6 MHz wide),
on fc = 35, 36 and 37 MHz. The 36 MHz run goes through the AFC ports. A
floating-point receiver model does the following:

- mixes the output down;
- finds the delay and the best sampling phase by correlating with the
  sent symbols;
- removes the complex gain;
- measures the MER.

| fc | MER (this RTL, windowed-sinc filters) | MER reported for the floating-point reference |
|---|---|---|
| 35 MHz | 44.0 dB | 36.5 dB |
| 36 MHz | 44.8 dB | 36.4 dB |
| 37 MHz | 44.8 dB | 36.5 dB |

The end-to-end gain is 1.00 with `gain` = 4.0. The delay is 1209 output
samples, about 12.6 µs. Every 12 MS/s sample becomes exactly 8 output
samples. The same test also provokes each fault case once:

- FIFO overflow, with the output side held in reset;
- underrun, with the input stopped;
- input overrun, with a sample on every clock.

The whole run takes a few seconds.

To simulate a block with Verilator, for example the whole core:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dvbt_pkg.sv tb/tb_util_pkg.sv \
  tb/tb_dvbt_repeater_top.sv --top-module tb_dvbt_repeater_top -Mdir obj
./obj/Vtb_dvbt_repeater_top
```

## Departures from the reference design and limits

- **Output interpolator factor.** The output interpolator is by 8, which
  is what the 12 to 96 MS/s rate change and its eight components I0 to I7
  require. One overview drawing of the reference labels this block
  "interpolation by 2".
- **Decimator component length.** Each decimator component has 18 taps,
  not 17, because that is what 256 taps over 15 components need.
- **Decimator decomposition.** The decimator uses the standard
  decomposition, which reproduces the prototype filter exactly. The
  reference model's own commutator indexing pairs component k with
  samples x[mM + k].
- **DDS correction.** The gain and phase correction that the reference
  counts with the CORDIC DDS is not described there and is not built.
  Only the CORDIC gain is cancelled.
- **Output gain.** The gain correction factor is programmable. The
  reference model's factor 1/0.0045543 ≈ 219.6 belongs to its
  floating-point scaling; with the fixed-point scaling here the right
  value is 4.0.
- **Coefficients.** They are not built in. The equiripple sets of the
  reference are not published, and the windowed-sinc sets used in the
  tests stand in for them.
- **Timing closure.** Each folded FIR forms its whole sum in one clock,
  and so does each polyphase component. A 1068-tap band-pass at 96 MHz
  needs a pipelined adder tree to close timing in silicon. The latencies
  documented above would then grow.
- **Outside this core.** The AFC block, the ADC and DAC and the analog RF
  parts are outside the core.

## Files

| file | contents |
|---|---|
| `rtl/dvbt_pkg.sv` | widths, rates, factors, tap counts, tuning words, CORDIC table, bank enums, rounding helpers |
| `rtl/dvbt_repeater_top.sv` | the core: both stages, FIFO, AFC ports, status |
| `rtl/input_stage.sv`, `rtl/output_stage.sv` | the two stages |
| `rtl/cordic_dds.sv` | carrier generator |
| `rtl/mixer.sv` | real mixer |
| `rtl/gain_correction.sv` | output gain |
| `rtl/fir_symmetric.sv` | folded symmetric FIR |
| `rtl/polyphase_interpolator.sv`, `rtl/polyphase_decimator.sv` | polyphase rate changers |
| `rtl/async_fifo.sv` | clock-domain crossing |
| `tb/tb_util_pkg.sv` | reference arithmetic, filter design, tone measurement |
| `tb/tb_*.sv` | the testbenches above |
