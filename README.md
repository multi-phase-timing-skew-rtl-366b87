# Zero-crossing timing-skew calibration for a time-interleaved flash ADC

A time-interleaved ADC reaches a high sample rate by letting M slower A/D
channels take turns. With M = 8 channels clocked at f_c = 2 GHz, channel j
samples at phase phi_j = (j-1)·Ts of the clock period Tc = 8·Ts, for an overall
rate of 16 GS/s. This only works if the eight sampling instants are evenly
spaced. Every mismatch between the clock buffers shifts one instant, and the
output then contains spurious tones. For a 6-bit converter at 16 GS/s, the
spacing must be correct to a fraction of a picosecond.

This RTL is the digital core of such a converter: 8 channels, 6 bits, 64
comparators per channel. It holds two background calibrations, and neither
one interrupts conversion.

* **Timing skew.** Each channel also samples a slow reference sinewave x(t)
  and reduces it to one bit with a comparator. If x(t) is asynchronous to the
  clock, the chance that it crosses zero between two consecutive sampling
  instants is proportional to the length of that interval. A digital
  processor counts zero crossings per interval and compares each count with
  the average. It then nudges the delay of each channel's clock buffer until
  all counts, and therefore all intervals, are equal. Apart from one
  comparator per channel, everything is plain logic.
* **Comparator offsets.** Each flash comparator has its inputs swapped by a
  pseudo-random bit q[k] before the latch, and the decision is swapped back
  afterwards. A static offset thus becomes a signal correlated with q[k].
  Correlating each comparator's contribution to the output code with q[k]
  gives the offset's sign, and a trim code walks it to zero.

The analog parts (samplers, latches, DLL, delay lines, reference oscillator)
are not RTL. They connect through the ports of `ti_adc_top`. A behavioural
model of them in `tb/ti_afe_model.sv` closes both loops in simulation.

## Block structure

```
 latch_raw[8][64] --> flash_channel x8 --------------------> s_frame[8] --> output_decimator --> dout
  (chopped latch      (de-chop, TCED, ROM,                                   (1 sample in 513)
   outputs)            64 offset loops) --> trim_ca/cb/fa/fb --> analog comparators
                             ^
 prbs_gen --- q[k] ----------+------------- q_chop (q[k+1]) --> analog input choppers

 xcmp[8] --> zc_sample_capture --> tscp --> t_code[8] (T_1..T_8) --> analog clock-buffer delays
  (1-bit x(t)   (1 frame in 64)      (ZC detectors, ZC recorder,
   samples)                           7 calibration channels)
```

| module | role |
|---|---|
| `ti_adc_top` | wires everything; all analog signals are ports |
| `tscp` | timing-skew calibration processor |
| `zcd1`, `zcd2` | zero-crossing detectors: a plain one and an offset-tolerant one |
| `zc_recorder` | produces the average crossing rate m[k] |
| `cal_channel` | ACC1, peak detector and ACC2 of one adjusted phase |
| `zc_sample_capture` | takes one reference frame every 64 clocks for the TSCP |
| `flash_channel` | de-chopping, edge detector, encoder and 64 offset processors |
| `tced` | thermometer-code edge detector (3-input AND array) |
| `encoder_rom` | one-hot edge lines to 6-bit code |
| `bcc_cp` | offset calibration processor of one comparator |
| `offset_pair_decoder` | signed trim code to three-state switch pairs |
| `prbs_gen` | the two chopping sequences q1, q2 |
| `output_decimator` | interleaves the channels and keeps 1 sample in 513 |
| `tsadc_pkg` | shared types: three-valued `trit_t`, scheme and detector selections |

## Timing-skew calibration

### Why counting zero crossings measures time

Let c_j[k] be the one-bit sample of x(t) taken by channel j in frame k.
A zero-crossing flag z_j[k] = 1 says that x(t) changed sign between
instant j and instant j+1. For the last channel, that is between phi_8 and
the next frame's phi_1.

If x(t) is narrow-band and asynchronous to f_c, its zero crossings fall
uniformly in time. The probability of a flag is then Z_R × (interval),
where Z_R is the crossing density; a sinewave of frequency f_i gives
Z_R = 2·f_i. An interval that is too long by Δτ raises its flag rate by
Z_R·Δτ.

No absolute reference is needed. The average flag rate over all M intervals
belongs to the ideal spacing Ts, because the intervals always add up to Tc.

### The processor (`tscp`)

* **ZC detectors**, one per interval.
  * `zcd1` is an XOR of neighbouring comparator bits. It is sensitive to
    comparator offsets when x(t) is slow.
  * `zcd2` first passes each comparator bit through a 1 − z⁻¹ filter,
    giving r ∈ {−1, 0, +1}. It flags a crossing unless both neighbours moved
    the same way (r_j = r_{j+1} ≠ 0). This makes it much less sensitive to
    comparator offsets. It is the default (`ZCD_KIND = ZCD2`).
* **ZC recorder.** An accumulator a adds all M flags each step. Whenever
  a ≥ M it outputs m[k] = 1 and subtracts M at the next step. The mean of
  m[k] is therefore the average flag rate per interval.
* **Calibration channels** (one per adjusted phase, j = 2..8):
  * ACC1 integrates U[k] = m[k] − z[k].
  * A bilateral peak detector (BPD) outputs S = +1 when ACC1 reaches +N_C,
    S = −1 at −N_C, and clears ACC1 whenever it fires.
  * ACC2 integrates S into the signed delay code T_j. On chip, one code step
    is the delay-line resolution μ_t.
* **T_1 is fixed at 0.** Phase phi_1 is the reference; the other seven
  phases move around it.

The dead zone of ±N_C (default 1024) makes the loop hold still unless an
interval error has persisted for many crossings. The two design knobs trade
against each other:

* A smaller μ_t or a larger N_C lowers the residual timing jitter of the
  calibration.
* Both also slow the convergence, whose time constant is N_C / (μ_t·Z_R).

The defaults N_C = 2¹⁰ with μ_t = Ts/2⁸ aim at about 0.26 T_LSB of residual
timing fluctuation (T_LSB = Ts/64).

### Linear and circular referencing

Each adjusted phase needs an interval to watch. The choice is set by
`REF_SCHEME`.

* **`REF_LINEAR`.** Phase j+1 watches the interval from phase j to j+1.
  Moving phi_{j+1} later lengthens that interval, so U = m − z works
  directly. Corrections then have to ripple down a chain of seven phases.
* **`REF_CIRCULAR`** (default) splits the ring in two.
  * Phases 2..5 are adjusted forward from phi_1 as in the linear scheme,
    each watching the interval before it.
  * Phases 6..8 are adjusted backward from the next frame's phi_1. Each
    watches the interval *after* it, with the sign inverted (U = z − m),
    because moving that phase later shortens its interval.
  * The interval from phi_5 to phi_6 has no channel of its own; its
    detector only contributes to the average m[k].

  The longest chain is four phases instead of seven, which lowers the
  accumulated jitter. `tscp` stops elaboration with an error if circular
  referencing is chosen with an odd M.

### Decimation

The processor does not need every frame. `zc_sample_capture` keeps one
frame of comparator bits every `TSCP_DECIM` = 64 clocks. One cycle later it
also takes c_1 of the following frame, which closes the last interval. It
then pulses `step`, and the whole TSCP advances by one update per step. All
of this runs on the f_c clock with an enable; there is no second clock
domain.

## Flash channel and offset calibration

Each channel has 64 comparators with thresholds at 0.5 … 63.5 LSB.

1. **Chopping.** The analog choppers (CHP1) swap the comparator inputs when
   q = 1. `q_chop` brings out q[k+1] so that the analog side can apply it to
   the next sample. Odd comparators use q1 and even ones use q2. These are
   two independent LFSRs, 15 and 23 bits long. Independent sequences stop
   neighbouring loops from locking together.
2. **De-chopping** (CHP2) XORs each raw latch bit with the same q[k] again,
   which gives the thermometer code D_c.
3. **Edge detection.** `tced` marks the top of the thermometer code with
   3-input ANDs, d[n] = t(n−1)·t(n)·¬t(n+1). An isolated 1 above the real
   edge cannot fire a line. Line 0 marks an input below every threshold.
4. **Encoding.** `encoder_rom` turns the one-hot lines into the 6-bit code:
   line n gives n − 1. Several active lines OR their words, as a NOR ROM
   would. The code is registered as s_j[k].
5. **Offset loop**, per comparator (`bcc_cp`):
   * D_e = +1 when this comparator is the top "1" of the code (edge line n
     active), and −1 when it is the lowest "0" (line n−1 active).
     Otherwise D_e = 0, and the comparator was not near the input.
   * The AAR accumulator adds ±1 for D_e·q. At ±16 it issues B = ±1 and
     clears itself.
   * B steps the trim code. During the power-on phase (`coarse_phase = 1`)
     B moves the coarse code: ±4 current switches of 32 mV, 9 levels.
     Afterwards B moves only the fine code: ±16 capacitor pairs of 3.2 mV,
     33 levels.
   * `offset_pair_decoder` drives each switch pair to (0,0), (1,0) or (0,1).
     A positive code turns on the "a" side of the lowest pairs; a negative
     code turns on the "b" side.

Why this works: a comparator whose offset makes it trip early is the top
"1" more often when it is not swapped (q = 0) than when it is swapped. The
correlation of D_e with q therefore carries the offset's sign. The input
signal, which does not depend on q, averages out.

## Output

`s_frame` carries all eight codes of a frame every clock. `output_decimator`
treats them as the interleaved stream s[l] at 8·f_c and keeps every 513th
sample, which is f_c/64.125 for a slow off-chip port. Because 513 is not a
multiple of 8, the kept samples walk through all channels in turn. The
output consists of `dout`, `dout_ch` (the channel it came from) and
`dout_valid`.

## Interface and timing of `ti_adc_top`

One clock is one frame of M samples.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | f_c clock; asynchronous active-low reset (clears all accumulators and codes) |
| `tscp_en` | in | run the skew calibration |
| `ofs_cal_en`, `coarse_phase` | in | run the offset calibration; power-on (coarse) phase |
| `latch_raw[M][64]` | in | raw chopped latch outputs of the frame sampled one clock earlier |
| `xcmp[M]` | in | one-bit reference samples c_j[k] of the present frame |
| `q_chop[2]` | out | q1, q2 for the analog choppers of the samples taken this clock |
| `trim_ca/cb[M][64][4]`, `trim_fa/fb[M][64][16]` | out | offset trim switch pairs |
| `t_code[M]` | out | signed delay codes T_1..T_8 (8 bits, T_1 = 0) |
| `s_frame[M]` | out | output codes; the frame sampled at clock k appears after clock k+1 |
| `dout`, `dout_ch`, `dout_valid` | out | decimated output |
| `tscp_step`, `tscp_bpd_up/dn[M]`, `ofs_b_any[M]` | out | monitoring of the loops |

Because phi_1 is the reference, `t_code[0]` and `tscp_bpd_up/dn[0]` are
constant 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | channels (even for circular referencing) |
| `NCOMP`, `NBITS` | 64, 6 | comparators per channel, code width |
| `NC` | 1024 | BPD threshold N_C |
| `TW` | 8 | width of T_j (±127 steps; saturating) |
| `TSCP_DECIM` | 64 | clocks per TSCP step |
| `REF_SCHEME` | `REF_CIRCULAR` | or `REF_LINEAR` |
| `ZCD_KIND` | `ZCD2` | or `ZCD1` |
| `OUT_DECIM_NUM` | 513 | output keeps 1 sample in this many |
| `AAR_TH`, `FINE_MAX`, `COARSE_MAX` | 16, 16, 4 | offset-loop threshold and trim ranges |

Synthesised with yosys at the defaults, the core is about 148 k generic
cells with 8 988 flip-flop bits. Almost all of that is the 512 comparator
offset processors.

## Where this design makes its own choices

The overall architecture and the loop laws follow the source design. The
following details were not specified there and are this implementation's
choices:

* **T_j width.** T_j is 8 bits signed and saturates at its ends. At
  μ_t = Ts/256 that is ±0.5 Ts of range.
* **Peak-detector rule.** The BPD fires on R ≥ +N_C and R ≤ −N_C, and it
  judges R before the present U is added. One of the source's analyses
  phrases the reset as R reaching exactly ±N_C. Since R never passes ±N_C,
  both descriptions give the same behaviour.
* **`zcd2` filters.** They work on the decimated samples, the same ones the
  rest of the TSCP sees, and reset to 0.
* **Backward-channel sign.** The source gives the circular map (phases
  2..5 forward, 6..8 backward). It does not state that the backward
  channels need the inverted error U = z − m; that follows from the
  geometry and is implemented here.
* **D_e per comparator.** How D_e is derived for each comparator from the
  edge-detector lines is spelled out above; the source gives only its
  purpose.
* **Trim signs.** The sign convention of the trim switches (a B of +1 raises
  the comparator's effective threshold) is assumed. The analog side must
  match it.
* **Chopping sequences.** The LFSR polynomials (x¹⁵+x¹⁴+1 and x²³+x¹⁸+1)
  and their seeds are assumed.
* **Output decimation.** Keeping exactly every 513th sample is one way to
  obtain the f_c/64.125 rate.
* **Latencies.** The latch outputs arrive one clock after sampling, and the
  output code is registered once more.
* **Control inputs.** The calibration enables and the coarse/fine switch
  are plain inputs. On the chip a test register set them, and its contents
  are not described.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/tsadc_pkg.sv tb/tb_tscp.sv --top-module tb_tscp
./obj_dir/Vtb_tscp
```

* **Unit benches.** They check each block against an independent model in
  the testbench: exhaustive or random stimulus for the detectors, the
  encoder, the pair decoder and the PRBS taps, and cycle-exact checks of
  the recorder, the calibration channel and the decimators.
* **`tb_tscp`** closes the skew loop around a simple timing model at
  N_C = 16. It runs circular+ZCD2 and linear+ZCD1 side by side. The interval
  spread falls from 8.6 to 0.64 T_LSB and from 4.9 to 0.60 T_LSB.
* **`tb_flash_channel`** and **`tb_bcc_cp`** close the offset loop around a
  model comparator bank. In `tb_flash_channel` the code errors fall from
  1591 to 103 of 2000 samples, and the worst residual offset ends at
  0.16 LSB.
* **`tb_ti_adc_top`** runs the whole core end to end with the behavioural
  front end in `tb/ti_afe_model.sv`, for 600 000 clocks. To fit the run
  time, the skew loop uses N_C = 16 and decimation 2. The front end has
  static skews of up to ±0.1 Ts and comparator offsets of up to ±3 LSB.
  * The interval spread falls from 4.0 to 0.6 T_LSB.
  * Every comparator ends within 0.3 LSB.
  * All output codes of a 0.1·f_s sinewave lie within 1 LSB of ideal
    uniform sampling (mean error 0.09 LSB, against 1.3 LSB before
    calibration).
  * It also counts each mechanism and fails if any never occurred: TSCP
    steps, recorder pulses, peak detections both ways, offset decisions
    both ways, coarse and fine trims, and decimated outputs.
* **`tb_ti_adc_full`** runs the core with every parameter at its default
  for 3 million clocks, about 5 minutes in Verilator.
  * Full settling at N_C = 1024 takes some 2.5–4 × 10⁷ clocks, so this run
    checks the start of convergence: every adjusted phase gets peak
    detections, and each one goes in the direction that shrinks its
    interval error. 19 of 19 did.
  * Its reference tone is 0.3/Ts rather than a slow one near 0.25·f_c, to
    get enough crossings within the run.
  * It also checks the offset loops and the 1-in-513 output.

Each testbench was also run against a deliberately broken copy of its
block, and each one reported failures.

Not verified: full skew settling at the default N_C and decimation; the
behaviour of the real analog blocks.
