# Low-power decimation filter and continuous-time sigma-delta modulator model

A sigma-delta audio converter delivers a coarse, fast stream of samples: here
3-bit codes at 1.6 MS/s from a third-order modulator with a 25 kHz band
(oversampling ratio 32). To get 16-bit-class audio words at 50 kS/s, that
stream has to be low-pass filtered and decimated by 32. The filter must not
add noise of its own. Most of all, it must use little power: the budget is
well under the roughly 15 uW of the modulator itself.

This repository holds synthesizable SystemVerilog for such a decimation filter.
The filter gets its low power from three ideas used together:

- **Cheap stages at the high rate.** Three short stages are used instead of
  one long filter, and the cheapest stage runs at the highest rate.
- **Half-rate work in every section.** Each decimate-by-2 section is split
  into polyphase form. Every adder and register in it then works at the
  section's *output* rate.
- **No multipliers.** Each coefficient is a short sum of signed powers of two
  (canonical signed digit, CSD). Shifted partial sums are shared between
  coefficients.

Next to the filter sits a behavioural (non-synthesizable) model of a second
design: a second-order, 1-bit continuous-time (CT) sigma-delta modulator for
the same audio band, with an oversampling ratio of 128 at 6.4 MHz. The two are
independent designs. The top level places them side by side and does not
connect them.

## The decimation chain

```
 3 bit           15 bit           18 bit           17 bit
1.6 MS/s ─► CIC ───► 200 kS/s ─► half-band ─► 100 kS/s ─► FIR ─► 50 kS/s
           ÷8                    ÷2 (11 taps)              ÷2 (27 taps)
   (3 sections of ÷2)
```

| stage | job | structure | width in → out |
|---|---|---|---|
| `cic_filter` | coarse low-pass, ÷8 | order-4 CIC as three (1+z⁻¹)⁴ sections, each ÷2 | 3 → 7 → 11 → 15 |
| `hb_filter` | removes the band that would alias at 100 kS/s, ÷2 | 11-tap half-band, 4 non-zero distinct coefficients | 15 → 18 |
| `fir_filter` | final band edge, ÷2 | 27-tap symmetric FIR, 14 distinct coefficients | 18 → 17 |

All five decimate-by-2 sections (three in the CIC, then the half-band and the
FIR) share one interface and one timing scheme:

- a clock, an asynchronous active-low reset, and `in_valid`/`in_data`;
- `out_valid` pulses for one clock with each registered `out_data`.

`in_valid` may be high on every clock or only on some. So the chain runs from
any clock of at least 1.6 MHz: drive `in_valid` at the sample rate.

**Latency.** `decimation_filter` outputs one 17-bit word per 32 input samples.
Its `out_valid` rises 5 clocks after the clock on which the last sample of a
group of 32 is captured: one register in each section.

**Alignment.** After reset, the first sample is the first of a group of 32.

## One decimate-by-2 section: polyphase, transposed, half-rate

This is the part that takes most thought, and every stage is built the same
way.

A filter H(z) followed by "keep every second sample" wastes half its work. Write
H(z) = E0(z²) + z⁻¹·E1(z²), where:

- E0 holds the even-indexed coefficients;
- E1 holds the odd-indexed coefficients.

Split the input into even samples x0[m] = x[2m] and odd samples
x1[m] = x[2m−1]. Then every output is

    y[m] = Σ_k h_2k · x0[m−k]  +  Σ_k h_2k+1 · x1[m−k]

Both sums run at the output rate.

**Transposed direct form.** Each phase is built this way: the current input
sample is multiplied by all coefficients at once. The products then enter a
chain of adders and registers (the "delay line"), and that chain carries the
partial sums toward the output. Products for equal (symmetric) coefficients are
computed once and fed to two places in the line. The even and odd phases
share one delay line. At delay k it adds the even product of h_2k and the odd
product of h_2k+1.

**Where the odd sample waits.** The odd sample arrives one input period before
its even partner. It waits in a one-sample register (`x1_q`), and everything
else moves when the even sample arrives:

```
input:       x[-1]    x[0]      x[1]     x[2]   ...
phase:       odd      even      odd      even
action:      park     advance   park     advance
             in x1_q  delay     in x1_q  delay
                      line,                line,
                      register             register
                      y[0]                 y[1]
out_valid:            ........ 1 clock later ^ ...
```

- A `phase` bit toggles on each valid input. The first sample after reset is
  treated as odd, i.e. as x[−1].
- The unit delay `x1_q` is enabled on odd samples.
- The delay line and the output register are enabled on even samples.

So every register toggles at most once per two inputs, which is where the
power saving comes from.

The original design gets the same effect in another way. It clocks the unit
delay on the falling edge of a second clock at half the input rate. Here one
rising-edge clock with enables is used instead, so that the whole filter is a
single clock domain.

## CIC without integrators

The order-4, ÷8 CIC is H(z) = (1 + z⁻¹ + … + z⁻⁷)⁴. Built in the usual way,
with integrators running at 1.6 MS/s, it would be the most power-hungry part.

Instead, it is factored into three identical ÷2 sections of
(1 + z⁻¹)⁴ = 1 + 4z⁻¹ + 6z⁻² + 4z⁻³ + z⁻⁴. Each section has two phases:

- the even phase is E0 = 1 + 6z⁻¹ + z⁻²;
- the odd phase is E1 = 4 + 4z⁻¹.

In hardware:

- 4·x1 is one shift, used by both taps of E1.
- 6·x0 is 2·x0 + 4·x0.
- A section has two delay-line registers, plus the unit delay and the output
  register.

Each section adds 4 bits of gain (×16), so the widths are 3 → 7 → 11 → 15.
With no integrators there is no wrap-around: every node is exact at its width.
The CIC's DC gain is 4096, and for codes −4..+3 its output spans
−16384..+12288.

## Multiplierless coefficients

Coefficients have 12 fractional bits.

**Half-band** (×4096): 53, 0, −262, 0, 1235, 2048, 1235, 0, −262, 0, 53. Every
second tap is zero, apart from the centre tap.

- The odd phase is a single shift: h5·x1 = x1>>1.
- The even phase uses three shared sub-expressions of x0:

      a1 = x0 + x0>>2     a2 = x0 − x0>>2     a3 = x0 + a2>>2
      h0·x0 = a2>>6 + a1>>10
      h2·x0 = −x0>>4 − a2>>9
      h4·x0 = a3>>2 + a3>>8

**FIR** (×4096, h0..h13, with h26−k = hk): 12, 16, −20, −32, 44, 54, −88,
−74, 184, 100, −384, −118, 1284, 2168.

- The even phase shares five sub-expressions (a1..a5).
- The odd phase shares eight (b1..b8).
- Every product is one or two shifts of these. The full list is in the header
  of `rtl/fir_filter.sv`.

Each product is formed exactly, by scaling the input by 2¹² so that shifts
lose nothing. Then 6 LSBs are dropped (floor) before the delay line. That is
the only rounding inside the filters apart from the output scaling.

## Word lengths and binary points

| node | width | binary point |
|---|---|---|
| CIC output | 15 | integer (CIC LSB) |
| half-band products / delay-line sums | 22 / 24 | 6 fractional bits |
| half-band output | 18 | 2 fractional bits |
| FIR products / delay-line sums | 26 / 28 | 6 fractional bits |
| FIR output = filter output | 17 | 1 fractional bit |

**Units.** The output is in units of the CIC LSB, with one fractional bit. A DC
input of code c gives about 4096·1.008·c, i.e. 8256·c in output LSBs.

**Half-band output.** The half-band's gain is at most 1.257 for any input. Its
18-bit output therefore keeps one spare integer bit and cannot overflow.

**FIR output.** The FIR's Σ|h| is 1.71. A worst-case sign pattern near full
scale could therefore exceed 17 bits, so the output saturates. Ordinary
signals never reach the limit.

**Noise.** Measured with sine inputs, the filter's own arithmetic noise is
about 97 dB below a full-scale sine. That is below the 85–95 dB SNR of the
modulators it is meant for.

## Frequency response

These figures are computed from the coefficients above. `tb_decim_response`
measures six frequencies on the RTL; every one agrees with the calculation to
within 0.1 dB.

| frequency | whole chain |
|---|---|
| 1 kHz | +0.05 dB |
| 20 kHz | −0.5 dB |
| 22 kHz | −0.74 dB |
| 25 kHz | −3.7 dB |
| 32 kHz | −48.6 dB |
| 34 kHz | −65.8 dB |
| 40 kHz | −83.5 dB |
| 90 kHz (aliases onto 10 kHz after the half-band) | −67.8 dB |

- **Pass band.** The pass band is flat to 22 kHz. It is 3.7 dB down at 25 kHz.
  That is accepted, because audio content hardly reaches 25 kHz, and the
  early roll-off keeps noise from aliasing into the band.
- **Half-band.** On its own it loses 0.01 dB at 25 kHz. It gives 55.5–57 dB
  over 75–90 kHz.
- **Stop band.** The design target was 60 dB from 32 kHz. With these
  coefficients the chain reaches 60 dB only at about 34 kHz. Between 32 and
  34 kHz, attenuation rises from 48.6 dB. The coefficients are kept as
  published and not redesigned.

## The continuous-time modulator model

`ct_sdm_model` models the loop of a second-order, single-bit CT modulator.
In the circuit:

- two gm-C integrators (fs/s each) are built from source-degenerated
  telescopic OTAs with common-mode feedback;
- a clocked latch comparator makes the decisions;
- switched current sources form a non-return-to-zero (NRZ) feedback DAC,
  which feeds back into both integrators.

**Loop coefficients.** As first designed, the feedback coefficients are
k1 = 1 and k2 = 3/2. These are the continuous-time equivalents of a
discrete-time loop with two delaying integrators. The circuit realises the same
loop with integrator coefficients C1 = 0.33 and C2 = 1, and feedback currents
in the ratio 1 : 0.5 (A1 = 1, A2 = 0.5). A2/C1 stays close to 3/2, so the
comparator sees the same loop up to a gain factor, which a sign decision
ignores. The first integrator, however, swings only a third as far. Those
values are the model's defaults; `C1 = C2 = 1, A2 = 1.5` gives the unscaled
loop.

**How the model is solved.** The model reads the input once per period. The
DAC output is constant over the period. So the two integrators can be solved
exactly from one rising clock edge to the next:

    u   = C1·(x − A1·y)
    v1' = v1 + u
    v2' = v2 + C2·(v1 + u/2 − A2·y)
    dout = (v2' ≥ 0),   y = dout ? +1 : −1

Here x and y are normalised to the DAC reference.

**What is not modelled.** The model uses `real` ports. It reproduces the
loop's noise shaping and signal tracking, but not the transistor-level circuit:

- no OTA gain or bandwidth limits;
- no comparator delay;
- no current mismatch or absolute current values.

It is stable for inputs up to about 0.7 of the reference. For a sine of half the
reference, its in-band SNR over 25 kHz is 85.5 dB. That is what an ideal
second-order single-bit loop at OSR 128 gives; the circuit's own
non-idealities would lower it.

## Where this RTL departs from the original design

- **Clocking.** It uses clock enables on a single rising-edge clock instead of
  a falling-edge, half-rate clock for the unit delay of each section.
- **Phase convention.** The first sample after reset is treated as odd. The
  original design does not fix this.
- **Binary points.** The binary points of the 18-bit half-band output and the
  17-bit filter output are this design's choice. The original gives only the
  widths.
- **FIR saturation.** The saturation at the FIR output is an addition.
- **Centre-side half-band tap.** The tap h4 = h6 is 1235/4096
  (= 2⁻² + 2⁻⁴ − 2⁻⁶ + 2⁻⁸ + 2⁻¹⁰ − 2⁻¹²). This is the value its CSD digits,
  its sub-expressions and a DC gain of 1 all require.
- **Stop band.** With the published coefficients the stop band is 48.6 dB at
  32 kHz, short of the 60 dB target (see above).
- **Modulator.** The CT modulator is a behavioural loop model, not a circuit.
- **Not included:**
  - the 3-bit, third-order discrete-time modulator that feeds the filter;
    its structure is not given. Testbenches use a simple second-order 3-bit
    model as a stand-in source.
  - the single-stage CIC that the three-section CIC was compared against.
  - any power measurement.

## Files

| file | contents |
|---|---|
| `rtl/decim_pkg.sv` | widths and shared constants |
| `rtl/cic_stage.sv` | one (1+z⁻¹)⁴ ÷2 section |
| `rtl/cic_filter.sv` | three sections in cascade (÷8) |
| `rtl/hb_filter.sv` | 11-tap half-band, ÷2 |
| `rtl/fir_filter.sv` | 27-tap FIR, ÷2, with saturation |
| `rtl/decimation_filter.sv` | CIC → half-band → FIR |
| `rtl/ct_sdm_model.sv` | behavioural CT modulator loop |
| `rtl/sigma_delta_top.sv` | top: filter and modulator side by side |
| `tb/decim_ref_pkg.sv` | reference models shared by the testbenches (direct-form filters, 3-bit stand-in modulator) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_decim_snr`, `tb_decim_response`, `tb_cic_response` and `tb_ct_sdm_snr` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run if it hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    tb/decim_ref_pkg.sv rtl/decim_pkg.sv tb/tb_decimation_filter.sv \
    --top-module tb_decimation_filter
./obj_dir/Vtb_decimation_filter
```

For another testbench, replace `tb_decimation_filter`. `tb_ct_sdm_model` needs
no packages but accepts them.

## Verification, and how far to trust it

Every filter testbench compares the RTL **bit for bit** with an independent
direct-form model. The model convolves the input with the full coefficient
list and applies the same floor operations in the same places. The testbenches
also check:

- the number of outputs at each rate;
- the latency in clocks.

Inputs are:

- full-scale steps and impulses;
- random codes with random gaps in `in_valid`;
- sine waves passed through the stand-in modulator.

| testbench | what it shows |
|---|---|
| `tb_cic_stage`, `tb_cic_filter` | exact CIC outputs, ÷2/÷8 rates, 1- and 3-clock latency |
| `tb_hb_filter`, `tb_fir_filter` | exact outputs including truncation; worst-case sign patterns drive the half-band to its largest output and the FIR into saturation |
| `tb_decimation_filter` | whole chain exact at every stage, 5-clock latency. It counts odd-sample parking in all five sections, truncation events, input gaps and CIC full scale; each must occur. |
| `tb_decim_snr` | SNR at four sine amplitudes (42–73 dB input streams) within 0.2 dB of a floating-point filter; gain within 1 % |
| `tb_decim_response` | measured gain within 0.05 dB of the computed response at 2, 10 and 20 kHz; at least 60 dB attenuation at 34, 40, 60 and 90 kHz |
| `tb_cic_response` | CIC droop 0.884 dB at 25 kHz (sections 0.04, 0.17, 0.67 dB) and 68 / 86 dB attenuation of tones aliasing onto 25 / 15 kHz |
| `tb_ct_sdm_model` | DC inputs reproduced by the bit-stream mean for both the circuit scaling and the unscaled loop, smaller first-integrator swing when scaled, bounded integrators, sine tracking |
| `tb_ct_sdm_snr` | in-band SNR of the modulator model: 85.5 dB for a sine of half the reference in the 25 kHz band (65536 periods) |
| `tb_sigma_delta_top` | everything above at default parameters: the full chain on 19200 samples, and the modulator model on a 1 kHz sine at 6.4 MHz |

The filter RTL is plain, synthesizable SystemVerilog with no vendor
primitives. The CT model is simulation-only, because it uses `real`.

None of the testbenches has seen real modulator output from a circuit. The
SNR figures depend on the stand-in modulator. They show that the filter adds
almost no noise of its own, not what a particular converter achieves.
