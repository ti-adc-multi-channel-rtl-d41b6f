# Background offset/gain calibration for a time-interleaved ADC

A time-interleaved ADC (TI-ADC) reaches a high sample rate by letting M
slower sub-ADCs take turns: sub-ADC *i* converts samples *i*, *i*+M,
*i*+2M, ... Each sub-ADC has its own offset and gain. Because the channels take
turns, these differences repeat with period M. They show up as spurs: offset
mismatch puts spurs at k·f_s/M, and gain mismatch puts spurs at ±f_in + k·f_s/M.

This RTL removes offset and gain mismatch digitally, behind the ADC. It is
sized for a 16-channel, 8-bit, 40 GS/s converter calibrated with a 1.2 GHz
test tone. The main ideas are:

* **An ideal reference channel.** Every real channel is compared with an
  *ideal* channel that has offset 0 and gain 1. The reference is never one of
  the real sub-ADCs. So all M channels are calibrated, and no channel's own
  error is left behind as the common error.
* **Estimate by sine fitting, correct by equalisation.** Each iteration fits
  a sine `A·cos(ωn) + B·sin(ωn) + C` to every channel's *already corrected*
  samples. This gives each channel's residual offset error `D_o` and gain
  error `D_g`. A fraction μ of each error is added to that channel's
  calibration register:

      O_cal,t = O_cal,t-1 + μ_o · D_o        G_cal,t = G_cal,t-1 + μ_g · D_g

  Each record has fresh quantisation noise, so the loop averages the noisy
  estimates over the iterations.
* **Background operation.** The sample stream is corrected on every frame
  and is never stalled. Once the errors are within tolerance, the registers
  freeze and go on correcting without further iterations.
* **Skew is measured, not corrected.** The phase of each channel's fit
  gives its sampling-time skew relative to channel 0. The engine reports it,
  but leaves the sampling instants alone.

## The correction

Each channel's raw code `s` is corrected as

    y = (s − O_cal) · (1 − G_cal)

The offset is subtracted first and the gain is then scaled. The loop drives
the measured gain of `y` to exactly 1. If a channel has gain `g`, `G_cal`
therefore settles at `1 − 1/g`. For the ±10 % gains of interest this is close
to `g − 1`: a channel with gain 1.1 ends with `G_cal ≈ 0.09`. `O_cal` settles
at the channel's offset in codes.

`y` keeps 4 fractional bits, so correcting the 8-bit codes does not
re-quantise them. It is rounded half up and saturated to 13 bits.

## Estimating the mismatch

This part is the least obvious, and it constrains how the engine is used.

**Coherent records.** The tone frequency is given to the hardware as an exact
ratio `f_in/f_s = F_NUM/F_DEN`. For 1.2 GHz at 40 GS/s this is 3/100. The
phase of sample *n* is then the integer `k = F_NUM·n mod F_DEN`. cos and sin
are read from a table of `round(2^14·cos(2πk/F_DEN))`, which is computed at
elaboration. sin is the same table, shifted by three quarters of a turn, so
F_DEN must be a multiple of 4.

A record is `K_REC` frames, which is `K_REC` samples per channel. If every
channel's record spans a whole number of tone periods, then cos, sin and 1
are orthogonal over the record. The least-squares fit then collapses to three
running sums per channel (`lse_acc`):

    A = 2·Σ y·cos / K      B = 2·Σ y·sin / K      C = Σ y / K

Channel *i* sees phase steps of `F_NUM·M/F_DEN` of a turn. With the defaults
(3·16/100 = 12/25), any `K_REC` that is a multiple of 25 is coherent. The
default is 400. **If you change NCH, F_NUM/F_DEN or K_REC, keep
`K_REC·F_NUM·NCH` a multiple of `F_DEN`.** If you do not, the fit leaks between
terms, and the estimates are biased by the tone itself.

**From the fit to the errors** (`mismatch_solver`). Against the ideal
channel, whose tone amplitude is `a_ref` and DC level is `c_ref`:

    os_i = C − c_ref                    D_o = os_i − 0
    g_i  = sqrt(A² + B²) / a_ref        D_g = g_i − 1

The solver uses the amplitude ratio for `g_i`. The mismatch model is a
rotation scaled by `g_i` (a skew rotates the phase; gain scales the length).
So the amplitude ratio equals the more general quotient, but it needs no
arctangent and no reference phase.

The solver also reports each channel's **timing skew**. The phase of the
fit is `phi_i = atan2(−B, A)`, and a skew of `dt` sample periods moves it by
`2π·dt·F_NUM/F_DEN`. The tone's phase at the start of a record is
arbitrary, so channel 0 serves as the phase reference:

    dt_i = (phi_i − phi_0) / (2π) · F_DEN / F_NUM     (sample periods)

`est_dt` carries `dt_i` with 12 fractional bits, and it is 0 for channel 0.
It is unambiguous while `|dt_i| < F_DEN/(2·F_NUM)`, which is 16.7 sample
periods at the defaults. The arctangent is a 16-bit CORDIC (`seq_atan2`),
accurate to 2⁻¹⁶ of a turn, or 0.0005 sample periods at the defaults.
Skew is only reported. Nothing in the datapath corrects it, so the offset and
gain calibration assumes channels that are aligned in time.

The solver handles the channels one after another, with one square root,
one arctangent and two dividers. The arctangent and one division run beside
the square root. This takes about 100 cycles per channel, or about 1,600
cycles for 16 channels.

`a_ref` and `c_ref` are the register inputs `ref_amp` and `ref_dc`, in codes
with 8 fractional bits. They describe the test tone as an ideal ADC would
convert it. **The gain calibration is only as accurate as `ref_amp`:** all
channels are scaled to that amplitude.

**The older estimator, for comparison** (`EST_ACCAVG = 1`). The earlier
equalisation method estimates without a fit. Its offset is the channel mean
minus the tone's DC level, the same as `C − c_ref` here. Its gain compares
each channel's power with the average channel:

    g_i = NCH · P_i / Σ_j P_j,    P_i = Σ y²  over the record

Setting the parameter adds a power sum to each `lse_acc` and a first pass of
NCH cycles to the solver, which adds up the powers. Everything else is
shared. This estimator has no absolute reference, so the loop equalises the
channels to their average rather than to the ideal channel. Because `g_i` is
a power ratio, it also reads about twice the relative gain error. It exists
to compare the two estimators on the same hardware.

## Running a calibration

Inputs that configure the engine are static during a calibration.

| input | meaning | format |
|---|---|---|
| `off_en`, `gain_en` | enable the offset and gain loops | |
| `mu_o`, `mu_g` | step sizes | unsigned Q2.8 (0 … 3.996) |
| `ref_amp`, `ref_dc` | ideal channel's tone amplitude (non-zero) and DC level | codes, Q.8 |
| `tol_o`, `tol_g` | stop when every channel has \|D_o\| ≤ tol_o and \|D_g\| ≤ tol_g | Q.8 codes / Q.16 |
| `max_iter` | stop after this many iterations anyway | 8 bits |

1. Apply the test tone and pulse `start`. The registers of the *enabled*
   loops are zeroed. The registers of a disabled loop keep their value, so
   offset and gain can be calibrated one after the other (offset first,
   then gain), or together.
2. `cal_ctrl` cycles through ACQ and SOLVE. ACQ collects `K_REC` valid frames
   into the sums. SOLVE estimates all channels and applies the updates.
   Frames that arrive during SOLVE are corrected and output, but not
   accumulated.
3. The engine stops in DONE, with `converged` set if all channels met the
   tolerance, or `limit_hit` set if `max_iter` ran out. `iter` gives the
   number of iterations. The estimates of every iteration appear on
   `est_valid`, `est_ch`, `est_os` (O_i), `est_g` (G_i), `est_d_o`,
   `est_d_g` and `est_dt` (skew).

**Choosing μ.** The error left after each iteration shrinks by a factor of
about `|1 − μ·g|`. μ near 1 converges fastest. Small μ is slow. As μ
approaches 2, the loop first amplifies the estimation noise and then becomes
unstable. In simulation with ±10 % gain and ±8 code offset mismatch, the
joint loops needed the following, over three random mismatch draws:

| μ | 0.05 | 0.1 | 0.25 | 0.5 | 1.0 | 1.5 | 1.75 |
|---|---|---|---|---|---|---|---|
| iterations | 99–111 | 51–53 | 20–22 | 11–12 | 4–8 | 55 to >250 | >250 |

Above μ = 1 the noise in the registers grows by about μ/(2 − μ). Whether all
16 channels then meet the tolerance together becomes a matter of chance.

**Tolerance.** Each estimate is noisy. With 400 samples per channel, 8-bit
quantisation and ±0.5 code noise, one estimate has a standard deviation of
about 0.02 codes (offset) and 3·10⁻⁴ (gain). `converged` requires *every*
channel to be within tolerance in the *same* iteration. So set the
tolerances at a few standard deviations, and wider for many channels. The
tests use 0.05 codes and 0.001 for 16 channels, and double those for 128.

**Timing.** One iteration takes `K_REC` valid frames plus about
`NCH·(2·ACC_W + 22)` cycles of solving: about 2,050 cycles per iteration at
the defaults.
The corrected output follows the input by one cycle.

## Blocks

| module | role |
|---|---|
| `tiadc_cal_top` | top: wires the blocks below, NCH channels per frame |
| `tiadc_cal_pkg` | widths, number formats, ideal reference (O_REF = 0, G_REF = 1), state type |
| `chan_comp` | per-channel correction `(s − O_cal)(1 − G_cal)`, one register stage |
| `tone_ref_gen` | cos/sin of every channel's sample phase, from the elaborated table |
| `lse_acc` | per-channel Σy·cos, Σy·sin, Σy (and Σy² for the comparison estimator) |
| `mismatch_solver` | per-channel `os_i`, `g_i`, `D_o`, `D_g`, tolerance flags |
| `seq_isqrt`, `seq_udiv`, `seq_atan2` | bit-serial square root, divider and CORDIC arctangent used by the solver |
| `cal_update` | the NCH offset and NCH gain registers, with the μ update |
| `cal_ctrl` | ACQ / SOLVE / DONE sequencing, iteration count, stop rules |

Samples enter as frames of NCH signed two's-complement codes, one frame per
clock. Channel *i* of frame *f* is sample `f·NCH + i`. How the ADC's
serial links are deserialised into such frames is outside this RTL. Reset is
asynchronous and active low.

Top-level parameters are `NCH` (16), `K_REC` (400), `F_NUM`/`F_DEN` (3/100),
`ACC_W` (40, accumulator width), `ITER_W` (8) and `EST_ACCAVG` (0, selects
the comparison estimator). The package holds the
8-bit sample width and the fixed-point formats.

## Where this departs from, or goes beyond, the method it implements

* **Timing skew is estimated but not corrected.** Skew is measured against
  channel 0, not against an ideal channel. An ideal channel's phase would
  have to be aligned to each captured record, and the tone's phase at the
  start of a record is not known. The method's ideal sequence is itself
  interpolated from the first channel, so channel 0 is the natural
  reference. The method corrects only offset and gain, and so does this
  design.
* **The ideal reference is two numbers.** The method obtains the ideal
  channel's fit offline, by interpolating an ideal sequence and fitting it.
  Here only its result enters the hardware: `ref_amp` and `ref_dc`.
* **Gain correction sign.** The correction is `s·(1 − G_cal)`, following the
  block diagram of the method, in which `s·G_cal` is subtracted from `s`. The
  written formula `s·(G_cal − 1)` would null the signal at `G_cal = 1` and is
  read as a sign slip.
* **Channel count.** The default is 16 channels, as the converter is
  specified. The converter is built from 128 sub-ADCs, 8 per channel, and
  calibrating all 128 separately means setting `NCH = 128`. This is
  simulated in the workload testbench.
* These are this design's own choices: the least-squares fit reduced to three
  sums by coherent records, the amplitude-ratio gain estimate, the fixed-point
  formats, rounding and saturation, the tolerance and iteration-limit stop
  rule, per-loop enables and clearing, the bit-serial solver, and the CORDIC
  arctangent for the skew.
* The analog parts (track-and-hold, sub-ADCs, multi-phase clock) and the
  transceiver link have no RTL. Testbenches use a behavioural converter model
  instead (`tb/tiadc_model.sv`).

## Verification

Every block has a self-checking testbench. Each ends by printing
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_chan_comp` | correction against real arithmetic, rounding, saturation, latency |
| `tb_tone_ref_gen` | cos/sin of 60 frames against `$cos`/`$sin` within 1 LSB, hold, clear |
| `tb_lse_acc` | sums, including the power sum, against a reference over random data with gaps, clear priority; a copy without the power sum |
| `tb_mismatch_solver` | offset, gain and skew estimates from sums built from known sines (amplitude, phase, DC), error terms, tolerance flags, pass time; the accumulate-and-average estimator from power sums |
| `tb_cal_update` | register update against a model, enables, per-loop clear, saturation |
| `tb_cal_ctrl` | K_REC frames per record, clears, convergence stop, limit stop, freeze, restart |
| `tb_seq_arith` | divider and square root against integer arithmetic, arctangent against `$atan2` (within 2 LSB), with their cycle counts |
| `tb_tiadc_cal_top` | whole engine at default size against the behavioural 16-channel converter (random ±10 % gain, ±8 code offset, ±0.2 sample skew, noise): offset-only loop, gain-only loop with offsets kept, frozen correction, joint loop, skew estimates, stop on limit, output during solve, one-cycle latency |
| `tb_tiadc_cal_workloads` | 16 channels at 1.2 GHz (offset then gain, and the μ sweep above); 128 sub-ADCs; 4 channels at 12 GHz and at 1.2 GHz (the latter with ±0.25 sample skew); both estimators on the same 16-channel mismatch. Checks registers, residual error, skew estimates, first-estimate accuracy and the largest mismatch spur from a DFT of the corrected stream |

Typical results:

* The RMS error of the corrected stream falls from about 6 codes to 0.4
  codes. This is the quantisation and noise floor of the model.
* The largest mismatch spur drops from −26 dBc to −67 dBc (16 channels),
  from −35 dBc to −74 dBc (128 sub-ADCs), and from −21 dBc to −60 dBc
  (4 channels at 12 GHz).
* The registers end within 0.06 codes and 0.0012 of the exact values.
* The skew estimates fall within 0.01 sample periods of the model's skew
  relative to channel 0.
* On the same mismatch, the first gain estimate has a mean relative error
  of 0.03 % with the fit and 5.1 % with the accumulate-and-average
  estimator. The loops converge in 11 and 18 iterations at μ = 0.5. Both
  bring the spurs below −65 dBc. The average-based loop leaves the common
  gain off the ideal value.

## Simulating

The files need SystemVerilog-2017 and plain Verilator 5. Run from the
directory that holds `rtl/` and `tb/`. For example, for the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/tiadc_cal_pkg.sv tb/tb_tiadc_cal_top.sv \
        --top-module tb_tiadc_cal_top -o sim
    ./obj_dir/sim

Replace the testbench file and top-module name for the other tests. The
end-to-end test runs at the default parameters in well under a second. The
workload test takes about 10 seconds.
