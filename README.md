# Digital image rejection for a low-IF receiver

A low-IF receiver mixes the wanted channel down to a small intermediate
frequency. The channel on the other side of the local oscillator, the *image*,
lands on the same IF and cannot be told apart after mixing. Analog
image-reject filters and mixers manage only about 20-30 dB of rejection. A
receiver needs about 60 dB.

This design moves the problem into the digital domain. The I and Q mixer
outputs are digitised together by a **complex** band-pass delta-sigma
modulator. The modulator treats I + jQ as one complex signal, so positive
and negative frequencies stay distinct. The desired channel sits at +1 MHz
and its image at −1 MHz. The digital back end then works in three steps:

1. It shifts the spectrum down by 1 MHz. The desired channel moves to 0 Hz
   and the image moves to about −2 MHz.
2. A pair of ordinary real low-pass filters removes everything away from
   0 Hz: the image, the modulator's DC offset and its shaped quantization
   noise. The same filters are the anti-alias filters for a 4:1 down
   sampler, so no separate decimation filter is needed.
3. It shifts the result up by 500 kHz at the 2-MHz output rate, so the
   channel ends up centred at +500 kHz.

Simulated end to end, the RTL gives 67-69 dB of image rejection. The
original chip was reported at 60 dB.

## Signal path and frequency plan

```
 i_in,q_in ──► dsm_cbp ──► fshift_1m ──► lpf_fir (I) ─┐
 (8 MHz,        1-bit I/Q   ×e^(-j2πn/8)  lpf_fir (Q) ─┴► down_sampler ──► fshift_500k ──► out_i,out_q
  12 bit)       8 MHz       9 bit, 8 MHz  16 bit, 8 MHz    ÷4, 2 MHz       ×jᵐ, 2 MHz      16 bit, out_valid
                            └──────────────── image_rejection_block ─────────────────┘
                                              (decimator = 2×lpf_fir + down_sampler)
```

To follow the design, follow where each frequency goes. The total shift is
−1 MHz + 0.5 MHz = −500 kHz.

| input tone (complex) | after 1-MHz shift | LPF (8 MHz)      | output (2 MHz)                  |
|----------------------|-------------------|------------------|---------------------------------|
| desired +1.125 MHz   | +125 kHz          | passes           | +625 kHz                        |
| image −1.125 MHz     | −2.125 MHz        | −78 dB           | would alias to +375 kHz         |
| desired +900 kHz     | −100 kHz          | passes           | +400 kHz                        |
| interferer +100 kHz  | −900 kHz          | ≥ 60 dB down     | would appear at −400 kHz        |
| modulator DC offset  | −1 MHz            | −73 dB           | would appear at −500 kHz        |

The low-pass filter must be good at 2 MHz in particular. After the ÷4 down
sampler, 2 MHz folds onto 0 Hz, right on top of the channel.

## Blocks

### `dsm_cbp`: complex band-pass delta-sigma modulator (behavioural model)

In silicon this block is a switched-capacitor circuit. Here it is modelled as
its discrete-time loop in fixed-point arithmetic. The model is written in
synthesizable style so that the whole chain simulates as RTL. All quantities
are complex:

```
u   = Vin − DA(Vout)
r1 ← u + POLE1·r1                     resonator 1
r2 ← a·r1 + b·u + POLE2·r2            resonator 2 (gain a, feed-forward b)
Vout = sign(Re r2) + j·sign(Im r2)    1-bit quantizer per rail
```

With this loop the noise transfer function is
NTF = (1 − POLE1 z⁻¹)(1 − POLE2 z⁻¹) / D(z), so the resonator poles are the
NTF zeros. The coefficient values are this design's own:

- POLE1 = POLE2 = e^{jπ/4}. This puts both zeros at +1 MHz, the desired band.
- a = 0.25j and b = e^{jπ/4}. This puts both NTF poles at 0.5·e^{jπ/4}.

The coefficients are Q2.14 integers and are parameters of the module. The D/A
level is ±2¹¹ for the 12-bit input. A floating-point analysis of the same loop
stayed bounded up to a complex input amplitude of 0.7 of full scale. The
testbenches use 0.4 and 0.6.

### `fshift_1m`: 1-MHz frequency shifter

The input is 1 bit per rail, so multiplying by e^{−j2πn/8} needs no
multipliers. A 3-bit phase counter addresses an 8-entry sine table and an
8-entry cosine table, each of the form round(127·sin/cos(2πk/8)). Four
switches, steered by the I and Q bits, each pick a table word or its
negation. Two adders then form the outputs:

```
I_out = I·cos + Q·sin      Q_out = Q·cos − I·sin
```

The output is 9 bits, because |cos| + |sin| ≤ 180.

### `lpf_fir`, `down_sampler`, `decimator`: LPFs and decimation

Each rail has a 64-tap linear-phase FIR that computes a full output on every
8-MHz clock. The taps are in `irf_pkg::LPF_COEF`:

```
h[n] = I0(6·√(1−(2n/63−1)²))/I0(6) · sinc((n−31.5)/8),   n = 0..63
LPF_COEF[n] = round(2^15 · h[n] / Σh)
```

The response is within 0.1 dB up to 300 kHz, −6 dB at 500 kHz, and at least
60 dB down from 750 kHz to 4 MHz.

- **Output scaling.** The output keeps 4 fraction bits below the input LSB:
  `dout = floor(Σ / 2^11)`. This gives a DC gain of 16, so a full-scale
  complex tone becomes 127·16 ≈ 2032 LSB.
- **Down sampler.** It keeps every 4th output, using a modulo-4 counter
  cleared by reset, and pulses `out_valid` for one clock.
- **`decimator`.** This module wires the two filters and the down sampler
  together.

### `fshift_500k`: 500-kHz frequency shifter

At 2 MHz, a shift of +500 kHz means multiplying successive samples by
1, j, −1, −j. The block needs no table. Two routing switches choose between
passing I/Q straight and swapping them. Two sign switches choose between
keeping and negating each rail. Three period-4 sequences drive the switches:

| sequence | drives                         | 1 means     | 0 means |
|----------|--------------------------------|-------------|---------|
| 1 0 1 0  | routing switches               | straight    | swapped |
| 1 0 0 1  | I sign switch                  | keep sign   | negate  |
| 1 1 0 0  | Q sign switch                  | keep sign   | negate  |

Over one cycle the output is (I,Q), (−Q,I), (−I,−Q), (Q,−I). The phase
counter advances only on `in_valid`.

### `irf_top`

`irf_top` is `dsm_cbp` followed by `image_rejection_block`. The analog front
end is not modelled: the LNA, the I/Q mixers, the 432.87-MHz LO and the
analog filters ahead of the modulator. Its sampled output enters as
`i_in`/`q_in`.

## Interface and timing

All blocks share one clock, the 8-MHz sample clock, and a synchronous
active-low reset `rst_n`. The 2-MHz part is a clock enable, not a second
clock.

| port                  | dir | width | meaning                                                          |
|-----------------------|-----|-------|------------------------------------------------------------------|
| `clk`, `rst_n`        | in  | 1     | 8-MHz clock, synchronous active-low reset                        |
| `i_in`, `q_in`        | in  | 12    | sampled I/Q, two's complement, full scale ±2048, one per clock   |
| `dsm_i`, `dsm_q`      | out | 1     | modulator bits, 1 = +1, 0 = −1                                   |
| `out_i`, `out_q`      | out | 16    | output channel centred at +500 kHz, 4 fraction bits              |
| `out_valid`           | out | 1     | high for one clock on every 4th clock                            |

Latency is counted in clock edges after the input bit pair is taken:

| stage                                            | edges |
|--------------------------------------------------|-------|
| `fshift_1m` output register                      | 1     |
| FIR delay line and output register               | 2     |
| down sampler, waiting for its strobe             | 0-3   |
| `fshift_500k` output register                    | 1     |

The bit pair taken at edge *n* contributes to the filter sum that is strobed
out at edge *k*, with *k* ≡ 0 mod 4 and *k* ≥ *n* + 4. The FIR's group delay
adds 31.5 input samples.

## What the source defines and what this design chooses

The published design defines the following, and this RTL follows it:

- The chain: complex 2nd-order band-pass ΔΣ, then a 1-MHz shift, real LPFs,
  down sampling, and a 500-kHz shift.
- The rates: 8 MHz, and 2 MHz after 4:1 decimation.
- The modulator's loop structure: two resonators with POLE1/POLE2, gains
  a and b, a 1-bit quantizer and a 1-bit D/A.
- The table-and-switch structure of the 1-MHz shifter.
- The three control sequences of the 500-kHz shifter.

This design chooses the following, because the source does not give them:

- All word widths.
- The modulator coefficients.
- The LPF type, length and coefficients.
- The direction of the 1-MHz shift: downward, so that a channel at +1 MHz
  reaches 0 Hz.
- The sign wiring of the 1-MHz shifter's switches.
- The sampling phase of the down sampler, the valid strobe and the reset
  behaviour.

Points to be aware of:

- **Which IF?** The frequency plan here assumes the desired band is at
  +1 MHz at the modulator output. That is what the 1-MHz shift to 0 Hz
  requires. The original chip was specified with a 500-kHz IF and a carrier
  range of 433.67-434.17 MHz against a 432.87-MHz LO. Its reported
  measurement (desired at 900 kHz, interferer at 100 kHz, coming out at
  ±400 kHz) matches the −500-kHz net shift built here. `tb_irf_measurement`
  reproduces that case.
- **Modulator.** `dsm_cbp` models the loop of an analog circuit. It has none
  of that circuit's non-idealities: no capacitor mismatch, no finite
  op-amp gain, no thermal noise. Any I/Q mismatch ahead of the modulator is
  outside this design, as it was in the original.
- **FIR timing.** The FIR forms 64 constant-coefficient products and their
  sum in one 125-ns cycle. No timing analysis for a target library has been
  done. If timing fails, a polyphase or multiply-accumulate FIR that computes
  only every 4th output would give identical results.

## Verification

Every testbench is self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench                   | what it checks                                                                                                                                                                                                            |
|-----------------------------|----------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_fshift_1m`              | every output against the shift formula, with table values recomputed from `$cos`/`$sin`                                                                                                                                    |
| `tb_lpf_fir`                | taps recomputed from the Kaiser formula; the impulse response and its latency; 3000 random samples against a convolution; a 2-MHz tone at least 60 dB below DC                                                             |
| `tb_down_sampler`           | strobe on every 4th clock; the sample picked; the hold between strobes                                                                                                                                                     |
| `tb_decimator`              | random I/Q against a reference of convolution plus decimation, bit-exact                                                                                                                                                   |
| `tb_fshift_500k`            | random valid pattern, output = input·jᵐ, all four phases used                                                                                                                                                              |
| `tb_image_rejection_block`  | random bit streams against a bit-exact reference of the whole digital path                                                                                                                                                 |
| `tb_dsm_cbp`                | DFT of the modulator output: tone gain about 1; mirror frequency only noise; in-band noise more than 20 dB below out-of-band noise                                                                                         |
| `tb_irf_top`                | full design at default sizes. Desired-only, image-only and desired-plus-DC runs give IRR ≥ 60 dB (67.6 dB measured) and DC suppression ≥ 50 dB (70 dB measured). Also checks the output rate and that every mechanism occurs |
| `tb_irf_measurement`        | desired 900 kHz, interferer 100 kHz and a DC offset applied together: 69 dB rejection, 72 dB DC suppression                                                                                                                 |

To run one with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/irf_pkg.sv tb/tb_irf_top.sv --top-module tb_irf_top -Mdir obj_tb
./obj_tb/Vtb_irf_top
```

Each testbench finishes in a few seconds.

## Changing the design

- **Channel position.** To move the channel, change the modulator's
  POLE1/POLE2 parameters, which set the NTF zeros, and the shifter tables
  together.
- **Channel width.** To widen or narrow the channel, regenerate
  `LPF_COEF` from the formula above with a different cutoff. Check the
  stopband at the down sampler's alias frequencies, which are multiples of
  2 MHz.
- **Word widths.** The widths are `irf_pkg` constants. `LPF_W` must hold
  Σ|LPF_COEF| · 180 / 2¹¹.
