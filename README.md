# Self-testing audio ΔΣ ADC with in-phase/quadrature wave fitting

An oversampled audio ADC is hard to test. Its SNDR is around 90 dB, so a
production tester needs a very clean analog sine source and a large FFT over
the captured output. This design moves the whole single-tone test onto the
chip and keeps it digital:

* **Stimulus.** A digital sine-wave generator (DSG) produces a sine as a 1-bit
  pulse-density stream. That stream enters the analog modulator through a
  small digital-to-charge input stage (the *D3T* stage), so no analog signal
  source is needed.
* **Analysis.** The ADC's decimated output is fitted, sample by sample and in
  real time, to a sine and a cosine at the stimulus frequency. Two more DSGs
  provide those references, so the tone frequency and phase are known exactly.
* **Results.** Four passes of N = 2048 samples give the offset, the in-phase
  and quadrature amplitudes, and the power of everything else (THD+N). From
  these follow the SNDR, the gain, the frequency response and the offset.
* **Cost.** No sample memory is needed. The whole analysis runs on one 24×24
  sequential Booth multiplier and one accumulator.

The RTL here covers the complete digital part:

* the three DSGs, the 5-cycle delayed copy of the stimulus, and the
  switch-control decoder of the D3T input stage;
* the decimation filter (12.288 MHz 1-bit stream to 24-bit words at 48 kHz);
* the reference down-samplers, the output response analyser (ORA), the BIST
  controller, and an I2S transmitter.

The analog second-order switched-capacitor modulator is a behavioural model
with a `real` input.

## Signal chain

```
            D_S(m) ─────────────────────────► D_i0 ┐
   SDSG ────┤                                      ├─ D3T 2nd-order ΔΣ modulator ── D_o(m)
            └──► z^-5 ──────────────────────► D_i1 ┘   (vin used in normal mode)      │
                                                                                      ▼
                                                          CIC /128 ─► 63-tap FIR /2 ─► y_ADC(n), 48 kHz
   IDSG ── y_S(m) ──► ↓256 ──► y_I(n) ─┐                                              │
   QDSG ── y_S(m) ──► ↓256 ──► y_Q(n) ─┴──────────────────► ORA ◄─────────────────────┘
                                                              ▲ │
                                              BIST controller ┘ └─► I2S: left y_ADC(n), right THD+N(n)
```

One clock is one oversampling period (f_OS = 12.288 MHz, OSR = 256, 48 kHz
output). `test_mode` is the modulator's T pin. With `test_mode = 1` both
digital inputs come from the SDSG. The second input is 5 clocks late, so the
modulator sees (D_S(m) + D_S(m−5))/2. With `test_mode = 0` both digital
inputs are held at 1 and the modulator converts `vin`.

## The wave-fitting procedure

Let ỹ(n) = y_ADC(n) − a0 be the offset-free output. The references are
y_I(n) = 0.5·sin(ω n) and y_Q(n) = 0.5·cos(ω n). They have amplitude 0.5 so
that the scale factors become shifts. With N = 2^11 the controller runs four
steps, each over N new samples of the same continuous tone:

| step | ORA work per sample | result after N samples |
|---|---|---|
| 1 offset | acc += y_ADC(n) | a0 = acc / N |
| 2 in-phase | acc += y_I(n)·ỹ(n) | A_I = 4·acc / N |
| 3 quadrature | acc += y_Q(n)·ỹ(n) | A_Q = 4·acc / N |
| 4 THD+N | x1 = ỹ − 2A_I·y_I; x2 = x1 − 2A_Q·y_Q; acc += x2² | P = acc / N |
| power | acc = A_I² + A_Q² | a1² |

From these:

* SNDR = (A_I² + A_Q²) / (2P);
* gain = a1 / A_T, where A_T is the stimulus amplitude;
* the offset is a0.

The sample x2(n) is the THD+N signal: the output with the offset and the
fitted tone removed. It goes out on the I2S right channel, so its spectrum
can be inspected. The fit is exact only for a coherent test, meaning the
tone completes a whole number of cycles in N samples. The frequency should
therefore be f_T = k·48 kHz/2048.

**Number formats.** Words are Q1.23 (24 bits, full scale ±1). Products are
Q2.46, and the 59-bit accumulator keeps the Q2.46 LSB. Every division by N
is therefore a shift:

* a0 = acc >>> 34;
* A_I and A_Q = acc >>> 32 (this includes the factor 4);
* P = acc >>> 11;
* 2A·y is the product shifted by 22.

Results come out as `a0`, `a_i`, `a_q` (Q1.23) and as `p_thdn` and
`sig_pow2` (Q2.46). SNDR in dB is then 10·log10(sig_pow2 / (2·p_thdn)).

**ORA schedule.** A THD+N sample uses three multiplies (2A_I·y_I, 2A_Q·y_Q
and x2²). Each takes 24 clocks on the radix-2 Booth multiplier, plus one
issue clock, so a sample needs 76 of the 256 clocks between decimated samples.
The offset subtractor, the A/DSG operand multiplexers and the x(n,p) register
follow the original ORA. The final A_I² + A_Q² reuses the same multiplier;
that step is this design's addition.

## The digital sine generators

Each DSG is a two-integrator digital resonator running at f_OS with an
embedded third-order 1-bit ΔΣ modulator:

```
n1      = x1 − K·x2 + (D_S ? K − a21 : a21 − K)
x1     <= n1
x2     <= x2 + 2^-10 · n1            y_S = x2,  D_S = modulator(y_S)
```

With a12 = 2^-10 the oscillation satisfies 2 − a12·a21 = 2cos ω, so
**a21 = 4096·sin²(ω/2)** alone sets the frequency. The amplitude and phase
come from the initial values:

* sine: x2(0) = 0 and x1(0) = A·sin ω / a12;
* cosine: x2(0) = A and x1(0) = A·a21/2.

The QDSG computes its cosine initial values itself from a21.

**Why K matters.** The D_S-selected term is how the modulator's bitstream
closes the loop. Its noise enters the resonator scaled by (K − a21). The
references reach the ORA by simply taking every 256th y_S value, with no
filter, so any high-frequency noise in y_S aliases into the band. K is
therefore a setup value chosen as close to a21 as three signed powers of two
allow (`k_cfg`), which keeps the DSG free of multipliers. With a fixed K of
2^-4 the references had only ~78 dB SNDR and limited the test. With K ≈ a21
(error < 0.3 %) the end-to-end test reads ~99 dB on the ideal modulator
model.

**Embedded modulator.** Its three delaying integrators are fed by
(y − v)·{1/16, 1/2, 79/64}, and the quantiser sees y plus the last
integrator, which gives a unity signal transfer. The published schematic
prints the third gain as ±1.234375 on one multiplexer input and 1.234275 on
the other. Both are taken as 79/64 = 1.234375. The multiplexer polarity
follows the negative-feedback convention of the other two paths. The stable
input range reaches at least −3 dBFS (0.708); an amplitude of 0.9 overloads
it.

All DSG state uses 40 fractional bits (x1 is Q6.40, x2 is Q2.40); this is
this design's choice.

## Setup values

For a tone of amplitude A_T at f_T:

| input | value |
|---|---|
| `a21` | round(4096·sin²(π f_T / f_OS) · 2^32), unsigned 0.32 |
| `k_cfg` | up to three terms {en, neg, shift} with Σ ±2^-shift ≈ a21 (e.g. greedy: nearest power of two of the remainder) |
| `s_x1_init` | A_T · sin ω · 2^10 · 2^40 (46-bit signed) |
| `i_x1_init` | 0.5 · sin ω · 2^10 · 2^40 |

Example values:

* **960.9375 Hz (41 bins).** `a21 = 0x001033B3`;
  K = 2^-12 + 2^-18 − 2^-20; `i_x1_init = 276607261812`.
* **20 kHz.** `a21 = 0x1B6A52FD`; K = 2^-3 − 2^-6 − 2^-9.

Pulse `start` for one clock. `busy` then stays high for the run. The run is
64 settling samples, then 4 × 2048 samples, then a few clocks: about 2.1 M
clocks, or 172 ms. `done` then holds the results until the next `start`.
`step` shows the current step.

## D3T input stage and modulator model

`d3t_switch_ctrl` decodes the clock phases Φ1, Φ1′, Φ2 and Φ2′, together
with T, D_i0, D_i1 and D_o, into the enable of every input and reference
switch. It uses the Boolean labels of the published switch network:

* Normal mode: SA, SB and SE sample the analog input, and S1, S2 and S5 stay
  open.
* Test mode: S1, S2 and S5 sample V_REF, and the polarity of the charge
  transfer (S3/S4 crossed or SC/SD straight) follows D_ij.

`d3t_mut` (behavioural, not synthesizable) evaluates these enables for one
sampling and one transfer half-period per clock and turns them into charge.
It then runs an ideal second-order loop: two delaying integrators with gain
1/2 each, and a comparator. Capacitor ratios, OPAMP gain and noise are not
modelled. The clock-phase generator, the reference generator and the
transistor-level amplifiers are not part of this RTL.

## Decimation filter

* **Comb stage.** A third-order CIC decimates by 128 (23-bit Hogenauer
  structure).
* **Compensation stage.** A 63-tap linear-phase FIR with 18-bit
  coefficients flattens the CIC droop and decimates by 2. It computes one
  output per 256 clocks with a single serial MAC. Its coefficients are a
  least-squares fit to the inverse CIC response over 0–20 kHz, with a
  stopband from 28 kHz. Their sum is 2^17 (+2 from rounding).
* **Measured response.** Both tones come out at amplitude 0.5 within 0.0004
  dB: 937.5 Hz gives 0.500008 and 15 kHz gives 0.500025.

The original design states only the structure and the ±0.05 dB ripple
target; the tap count and coefficients here are this design's own.

## Outputs

* `y_adc` / `y_adc_valid` carry the 48 kHz ADC words.
* The I2S transmitter uses Philips framing: 64 bit clocks per 48 kHz frame,
  so sck = f_OS/4. Each word is 24 bits, MSB first, starting one bit clock
  after the ws edge. ws low is the left channel, which carries the ADC
  sample; the right channel carries the THD+N sample.
* `obs` is a monitoring bundle: sample strobes, the ORA handshakes and
  substep, the reference words and the THD+N sample.

## Files

| file | content |
|---|---|
| `rtl/bist_pkg.sv` | shared types: word/product formats, ORA operations, K terms, switch structs, monitoring bundle |
| `rtl/bist_adc_top.sv` | complete design |
| `rtl/dsg.sv`, `rtl/dsg_dsm3.sv` | sine generator and its 3rd-order modulator |
| `rtl/pdm_delay.sv` | z^-5 stimulus delay |
| `rtl/d3t_switch_ctrl.sv`, `rtl/d3t_mut.sv` | switch decoder; behavioural modulator |
| `rtl/comb_filter.sv`, `rtl/comp_filter.sv`, `rtl/decimation_filter.sv` | decimation filter |
| `rtl/downsampler.sv` | ↓256 reference word picker |
| `rtl/booth_mul.sv`, `rtl/ora.sv` | multiplier and output response analyser |
| `rtl/bist_ctrl.sv` | run sequencing and result conversion |
| `rtl/i2s_tx.sv` | I2S transmitter |

## Verification

Every module has a self-checking bench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=… failures=…`. What each bench checks:

* `tb_booth_mul`: products and the 24-cycle latency.
* `tb_dsg_dsm3`: bit-exact agreement with an integer model.
* `tb_dsg`: sine and cosine accuracy below 3e-5 at 0.96, 5 and 20 kHz.
* `tb_comb_filter` and `tb_comp_filter`: bit-exact agreement with
  convolution models.
* `tb_decimation_filter`: the DC and passband gain.
* `tb_ora`: bit-exact agreement with the fitting equations, and the
  substep/product counts.
* `tb_bist_ctrl`: the step order, the sample counts and the conversions.
* `tb_i2s_tx`: a receiver-side decode of the stream.
* `tb_d3t_switch_ctrl`: the switch decoder exhaustively.
* `tb_d3t_mut`: tracking in both modes.

`tb_bist_adc_top` runs the full-size design with default parameters. It does
two complete runs at −6 dBFS and 960.9 Hz, one in digital test mode and one
with the same tone applied to `vin` in normal mode. For each run it:

* recomputes a0, A_I, A_Q and P from the observed words and compares them
  bit-exactly;
* checks the amplitude (±3 %) and SNDR (> 90 dB);
* checks the ORA cycle budget;
* decodes the I2S stream.

It also counts every step, substep, power step, I2S frame and mode. The run
takes a few seconds of simulation time:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv tb/tb_bist_adc_top.sv \
          --top-module tb_bist_adc_top -Mdir obj && ./obj/Vtb_bist_adc_top
```

The same command works for any other bench after changing the file name and
the top module.

`tb_bist_workloads` runs the two sweeps the self test exists for, seven full
runs in digital test mode in about 12 s of simulation time:

| tone | level | gain a1/A_T | SNDR |
|---|---|---|---|
| 960.9 Hz | −60 dBFS | 1.00008 | 45.1 dB |
| 960.9 Hz | −40 dBFS | 1.00003 | 68.1 dB |
| 960.9 Hz | −20 dBFS | 1.00002 | 88.5 dB |
| 960.9 Hz | −3 dBFS | 1.00002 | 97.6 dB |
| 4992.2 Hz | −6 dBFS | 0.99999 | 93.2 dB |
| 10007.8 Hz | −6 dBFS | 0.99997 | 95.6 dB |
| 19992.2 Hz | −6 dBFS | 0.99974 | 97.7 dB |

Gain is checked against |cos(5ω/2)|, the response of the (1 + z^-5)/2 stimulus
average, which is 0.99967 at 20 kHz. SNDR must rise by about 20 dB per 20 dB of
level and stay above 85 dB at −6 dBFS across the band. These numbers describe the
ideal modulator model and the limits of the test itself, not a silicon
converter. A real converter's noise and distortion would dominate them.

## Departures and limits

* **Analog parts.** The modulator is an ideal behavioural model, so the
  measured SNDR (~99 dB at −6 dBFS) reflects the ideal loop, not silicon.
  Because of its `real` port, the top synthesises only without `d3t_mut`.
* **K.** K is a three-term shift-and-add setup value rather than a fixed
  constant, because the reference quality depends on K ≈ a21.
* **ORA timing.** The ORA takes 76 clocks per THD+N sample instead of 72,
  because of one issue clock per multiply.
* **Power step.** The final A_I² + A_Q² step and the settling period (64
  samples) are additions. SNDR itself is left as the ratio of two outputs;
  there is no divider.
* **Go/no-go.** The production go/no-go mode, with thresholds stored
  on-chip, is not implemented. Its memory contents and decision rule are not
  specified in the source.
