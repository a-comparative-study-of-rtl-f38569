# Carrier synchronisation in fixed point: a two-stage DPLL and a Costas loop

A receiver can only demodulate a phase-modulated carrier once its local
oscillator has the carrier's frequency and phase. Doppler shift and oscillator
mismatch leave a frequency offset, and the propagation delay leaves a phase
offset. Either one rotates the received constellation until symbols fall into
the wrong decision region. This RTL holds two synthesizable carrier-recovery
loops that solve that problem in different ways:

* **A two-stage DPLL.** A *frequency estimator* (a frequency-locked loop)
  first pulls a numerically controlled oscillator (NCO) onto the input
  frequency. It works for offsets anywhere up to half the sample rate. Its
  frequency word then drives a *low-noise phase estimator*, a PLL that only
  has to pull in the phase. The output is the estimated frequency, the
  estimated phase and a locked replica of the carrier.
* **A Costas loop.** It mixes the received carrier down with a local sine and
  cosine and filters the two arms. Limiters decide the symbols, and the
  cross-product error steers the NCO. It recovers the carrier and the symbols
  together, but only for small frequency offsets.

The two loops come from a comparative study of Costas-loop and DPLL carrier
recovery. They are built side by side and share only the clock and the reset.
Each is evaluated at the operating point of that study:

* the DPLL at a 6 kHz centre frequency, sampled at 20 kHz, with a −1 kHz and
  π/8 offset;
* the Costas loop at 500 kHz, sampled at 20 MHz.

Both loops work sample by sample in discrete time: one sample per clock edge
at most, gated by a sample strobe.

## Number formats

| quantity | format |
|---|---|
| input samples, NCO sine/cosine | signed 16-bit Q1.14 (1.0 = 16384, range just under ±2) |
| mixer and arm signals | signed 18-bit Q3.14 |
| phase word | 32-bit unsigned, 2^32 = one turn |
| frequency control word (FCW) | phase step per sample; f = FCW / 2^32 · fs |
| DPLL frequency error `freq_err` | signed 32-bit Q7.24, radians per sample |
| step size μ | unsigned 16-bit fraction, μ = `mu_q16` / 65536 (0 ≤ μ < 1) |

`cs_pkg::hz_to_fcw(f, fs)` turns a frequency into an FCW at elaboration time.
The NCO's 4096-entry sine table is computed at elaboration from `$sin`. It
needs no data file, and `LUT_AW` in `cs_pkg` changes its size.

## The frequency estimator

This is the part of the design that is hardest to see from the block diagram.
It is a PLL with three parts replaced: the phase detector becomes a
*frequency* detector, the loop filter becomes an accumulator, and the VCO
becomes a quadrature NCO.

**Mixing (`freq_detector`).** The complex input is x = cos(a) + j·sin(a), and
the NCO is at phase b. Two products give the difference signal:

    rx_i = xi·cos b + xq·sin b =  cos(a − b)
    rx_q = xi·sin b − xq·cos b = −sin(a − b)

When the two frequencies differ, ψ = a − b advances by δ radians every sample.

**Discriminator.** Both signals are differentiated by a first difference, and
two cross products are subtracted:

    D = rx_q·(rx_i − rx_i') − rx_i·(rx_q − rx_q')
      = sin ψ·cos ψ' − cos ψ·sin ψ' = sin δ      (' = previous sample)

For a unit tone this is exactly sin δ. It has the sign of the frequency
offset for every |δ| < π, which is why the loop acquires any offset below
fs/2.

**Normalisation (`fx_divider`).** The power S = rx_i² + rx_q² is also
computed, and d = D / S removes the input amplitude. A zero power (no signal)
gives d = 0, so the loop holds its frequency instead of wandering.

**Accumulator and μ (`freq_accumulator`).** The NCO frequency word is:

    c(n) = c(n−1) + μ · d(n) · 2^32/(2π)

The constant converts radians per sample to phase-word units and is held as
round(2^24/2π). After reset c holds the centre word, and at lock it holds the
input frequency. The NCO then accumulates c into its phase.

**Loop dynamics.** D measures the phase step made with the previous word, so
the error obeys e(n+1) = e(n) − μ·e(n−1):

* For μ ≤ 0.25 both poles are real and the loop settles without overshoot,
  faster as μ grows. Simulated with a 1 kHz offset: 254 samples at μ = 0.02,
  95 at μ = 0.05 and 12 at μ = 0.2.
* Above 0.25 the poles are complex. The loop rings but stays stable for every
  μ < 1.

The residual jitter at lock comes from the 12-bit phase table. It is a few
tenths of a hertz at fs = 20 kHz and grows with μ.

## The phase estimator

`phase_estimator` runs its own NCO with the frequency estimator's word, plus
a phase correction θ̂. `phase_detector` computes:

    s_d = k_d · (x − sin p) · cos p,    x = sin(ω n + θ),  p = NCO phase

A plain product x·cos p would carry a full-size term at twice the carrier
frequency. Here the NCO's own sine is subtracted first, which cancels most of
that term. What is left is (k_d/2)·sin(θ − θ̂) plus a residual that shrinks
as the loop locks. A first-order low-pass filter (`lowpass_iir`, coefficient
2^−3) removes that residual.

The filtered error updates the correction every sample:

    θ̂ += s_i · 2^PHASE_GAIN_SHIFT

This is a first-order loop: about 1.2 % of the remaining phase error per
sample at unit amplitude. It converges to θ̂ = θ from any start except
exactly 180°, which is an unstable equilibrium.

The reported phase has two parts:

* `est_phase` is θ̂, the part of the replica phase that the phase loop
  contributed.
* `rep_phase`, `rep_sin` and `rep_cos` are the locked replica itself.

After a frequency acquisition, θ̂ also absorbs the phase that the NCO ran
ahead or behind during acquisition. So θ̂ is an absolute phase estimate only
when the frequency word was right from reset. `tb_phase_estimator` checks
that case directly.

## The Costas loop

`costas_loop` multiplies the real input x = I·sin(ωn + θ) + Q·cos(ωn + θ) by
the NCO sine (I arm) and cosine (Q arm). The products are doubled and passed
through one-pole arm filters (2^−3), which leaves

    z_i = I·cos φ − Q·sin φ,    z_q = I·sin φ + Q·cos φ,    φ = θ − θ_LO

`costas_error_detector` takes the signs as decisions (l_i, l_q = ±1) and forms
the error:

    err = z_q·l_i − z_i·l_q = 2·sin φ    (for |φ| < 45° and unit symbols)

The limiter outputs are ±1, so the two "multiplications" are only sign
changes.

A proportional-plus-integral filter sets the NCO frequency word:

    fcw = CENTER_FCW + err·2^7 + (Σ err)/2^2

The integral path lets the loop track a frequency offset as well as a phase.

**Four-phase and BPSK modes.** With `bpsk = 0` the error is the four-phase one
above, for I and Q both ±1. It locks at φ = 0 modulo 90°, and a BPSK input
would pull it to 45°. With `bpsk = 1` the Q decision is held at 0, so
err = z_q·l_i, the two-phase error, which locks at φ = 0 modulo 180°. The
mode can change while the loop runs.

As in any Costas loop, the recovered symbols carry the 90° (or 180°)
ambiguity. Resolving it, for instance with differential coding, is outside
this design.

## How the two loops compare

`tb_offset_range` runs both loops at the top's default parameters against
growing carrier offsets.

* **DPLL (μ = 0.05).** It acquires offsets of −1, +2, +3.5 and −5.5 kHz from
  its 6 kHz start, up to 0.275 of the sample rate. Each settles in 99 to 137
  samples, to within 0.05 Hz and 0.04°.
* **Costas loop (with its PI gains).** It locks at offsets of 2 kHz and
  20 kHz from 500 kHz (about 0.001 of the sample rate), settling in about 800
  and 3600 samples. It no longer locks at 60 kHz or 100 kHz.

This matches the motivation for the two-stage structure. The frequency
discriminator's range is set by the sample rate. A Costas loop's range is set
by its loop bandwidth, and widening that bandwidth adds noise and ripple to
the locked loop.

## Module hierarchy

    carrier_sync_top
    ├── dpll
    │   ├── freq_estimator
    │   │   ├── quad_nco
    │   │   ├── freq_detector
    │   │   ├── fx_divider
    │   │   └── freq_accumulator
    │   └── phase_estimator
    │       ├── quad_nco
    │       ├── phase_detector
    │       └── lowpass_iir
    └── costas_loop
        ├── lowpass_iir  (I arm)
        ├── lowpass_iir  (Q arm)
        ├── costas_error_detector
        └── quad_nco

`cs_pkg` holds the formats, `hz_to_fcw` and the sine-table function. Every
file opens with a description of its module, its interface and its timing.

## Interfaces and timing

All state uses a synchronous, active-low reset `rst_n`.

**DPLL side of the top** (`dpll_*` ports):

* Inputs: a strobe `dpll_valid` with the complex sample `dpll_xi` (cosine)
  and `dpll_xq` (sine), and the step size `dpll_mu_q16`.
* When the strobe is high, the frequency word and θ̂ update on that clock
  edge.
* The detector, the divider and the replica outputs are combinational from
  the registers and the current sample. The whole loop therefore closes
  within one sample period, which is the behaviour of the discrete-time
  model.
* At a high sample rate, the critical path is mixer → differentiator →
  64-by-40-bit divider → μ multiplier → accumulator.

**Costas side** (`costas_*` ports):

* Inputs: a strobe `costas_valid` with the real sample `costas_x`, and the
  mode `costas_bpsk`.
* The arm filters, the integrator and the NCO update on the strobe. The
  decisions `costas_l_i` and `costas_l_q` follow the arm filters
  combinationally.
* 20 MHz sampling needs a clock of at least 20 MHz. The longest path is
  16×16 multiplier → filter → error → NCO adder.

Gaps in either strobe simply pause that loop.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| top, `dpll`, `freq_estimator`, `freq_accumulator` | `(DPLL_)CENTER_FCW` | `hz_to_fcw(6000, 20000)` | NCO start frequency |
| top, `costas_loop` | `(COSTAS_)CENTER_FCW` | `hz_to_fcw(500000, 20000000)` | Costas centre frequency |
| `dpll`, `phase_estimator` | `LPF_SHIFT` | 3 | phase-loop filter coefficient 2^−3 |
| `dpll`, `phase_estimator` | `PHASE_GAIN_SHIFT` | 10 | phase-loop gain |
| `dpll`, `phase_estimator`, `phase_detector` | `KD_SHIFT` | 0 | detector gain k_d = 2^KD_SHIFT |
| `costas_loop` | `ARM_SHIFT` | 3 | arm-filter coefficient |
| `costas_loop` | `KP_SHIFT`, `KI_SHIFT` | 7, 2 | PI loop-filter gains |
| `cs_pkg` | `LUT_AW`, `PW`, `SW`, `SFRAC` | 12, 32, 16, 14 | table size, word and sample formats |

The gains assume inputs of about unit amplitude. The phase loop and the
Costas loop scale with the input amplitude; the frequency estimator does not,
because of the division.

## What comes from the source study and what is this design's

**Taken from the study:**

* the two-stage DPLL structure;
* the frequency detector built from mixing, differentiation, cross products
  and squaring, followed by division by the power;
* the μ-scaled accumulator, centred on f_c, with 0 ≤ μ < 1;
* the quadrature NCO;
* the subtract-then-multiply low-noise phase detector with a first-order
  low-pass filter;
* the Costas loop's mixers, arm filters, limiters and error
  z_q·l_i − z_i·l_q;
* both operating points.

**Chosen here, because the study gives no values or insides:**

* every word width and fixed-point format;
* the sine-table NCO;
* the divider's rounding, saturation and zero guard;
* the one-pole filters and their coefficients;
* the proportional phase update and its gain;
* the Costas PI loop filter and its gains (the study only says the error
  adjusts the VCO);
* the BPSK mode (the study's signal model carries both I and Q symbols, and
  its error is the four-phase one);
* the synchronous reset.

The frequency discriminator is written as the difference of the two cross
products. That is the combination of the listed operations that yields the
stated result, 2πΔf·(sin² + cos²). The differentiator drops the 1/t factor,
so frequencies are in radians per sample.

**Not covered:** timing (symbol) recovery, the second synchronisation task
the study mentions; automatic gain control; and resolving the Costas phase
ambiguity.

## Simulation

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5 (the package
first):

    verilator --binary --timing --assert rtl/cs_pkg.sv \
        $(ls rtl/*.sv | grep -v cs_pkg) tb/tb_carrier_sync_top.sv \
        --top-module tb_carrier_sync_top -Mdir obj -o sim && ./obj/sim

| testbench | what it shows |
|---|---|
| `tb_carrier_sync_top` | Both loops at their default parameters on one clock, with gaps in the strobes. The DPLL acquires 5 kHz + π/8, follows a step to 7.5 kHz, and holds its word on a zero input. The Costas loop locks four-phase symbols, then BPSK after a mode switch, with every decision correct. Each mechanism is counted. |
| `tb_dpll` | The DPLL operating point (−1 kHz, π/8) for μ = 0.02, 0.05 and 0.2: frequency within 2 Hz (about 0.1 Hz reached), replica phase within 1° (0.04° reached), power estimate 1.0, and settling time falling as μ rises. |
| `tb_costas_loop` | 500 kHz / 20 MHz, 100-sample symbols, 2 kHz and 30° offset. Four-phase and BPSK runs, every decision after acquisition checked; LO phase within 10° checked (about 1° reached). |
| `tb_offset_range` | The comparison above. Every DPLL offset must lock. The Costas loop must lock at 2 and 20 kHz and must fail at 100 kHz. |
| `tb_freq_estimator` | Acquisition of 100 Hz … 9.8 kHz tones from a 6 kHz centre, a half-amplitude tone, and the zero-input hold. |
| `tb_phase_estimator` | θ̂ converges to offsets of 22.5°, −60°, 150° and 3°. |
| `tb_freq_detector`, `tb_fx_divider`, `tb_freq_accumulator`, `tb_quad_nco`, `tb_phase_detector`, `tb_lowpass_iir`, `tb_costas_error_detector` | Bit-exact or tolerance checks against models computed inside the testbench. |

The offsets used for the Costas test (2 kHz and 30°) and the μ values are
this design's choices. The source gives the DPLL offsets but not the Costas
ones or the μ values.
