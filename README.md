# Time-domain beam position calculation for a button BPM

A button beam position monitor (BPM) has four electrodes, A, B, C and D, around
the beam pipe. Each one picks up an RF signal whose strength grows as the beam
gets closer to it. This RTL turns the four sampled electrode signals into a beam
position (x, y), entirely in the FPGA and in IEEE-754 single precision. The
result is ready about 106 clocks (0.42 µs at 250 MHz) after the measurement
window closes, so a host CPU does not have to do the arithmetic.

The position comes from the usual difference-over-sum formula:

    SUM = VA + VB + VC + VD
    x   = Kx * ((VA + VD) - (VB + VC)) / SUM + Xoff
    y   = Ky * ((VA + VB) - (VC + VD)) / SUM + Yoff

Kx and Ky are geometry factors of the pick-up (19.5 mm for the pick-ups this
was built for). Each electrode amplitude V is found by *time-domain
processing*: the filtered samples x(n) of a window of N samples are squared and
summed, and V = sqrt(Σ x(n)²). No down-conversion or CORDIC is needed. The
result is the RMS amplitude times √N. N cancels in the ratio, so the position
does not depend on the window length.

## Signal chain

```
             16 bit          16 bit            47 bit             32 bit float           32 bit float
 ADC ch A ──► fir_hp ──────► tdp_mac ────────► fix2float ───────► fp_sqrt ──► VA ─┐
 ADC ch B ──► (same chain) ───────────────────────────────────────────────► VB ─┤
 ADC ch C ──► (same chain) ───────────────────────────────────────────────► VC ─┼─► xy_calc ──► x, y, SUM
 ADC ch D ──► (same chain) ───────────────────────────────────────────────► VD ─┘
             DC removal     Σ x(n)² after     unsigned → float   amplitude
             (reloadable)   the trigger
```

* `fir_hp`: a direct-form FIR that removes the ADC's DC offset. Its
  coefficients can be replaced at run time, so that one filter can also correct
  the gain and phase of its channel.
* `tdp_mac`: after a trigger pulse, it sums `D*D` over the next N filtered
  samples (`A(n) = D(n)² + A(n-1)`) into a 47-bit unsigned accumulator.
* `fix2float`: converts the 47-bit sum to single precision.
* `fp_sqrt`: gives the amplitude.
* `xy_calc`: evaluates the formula above with floating-point adders, dividers
  and multipliers.

`bpm_channel` is one electrode's chain and `bpm_top` is the whole processor.
`bpm_top` holds `4 × N_BPM` channels and `N_BPM` position units. `N_BPM = 1`
(the default) serves one pick-up. `N_BPM = 2` serves two pick-ups from one
processor, as when a second ADC card is fitted.

## Timing: where the 106 clocks go

The latencies are fixed, so the time from trigger to position is fully
predictable. Clock counts are in sample clocks (250 MHz):

| step | unit | clocks |
|---|---|---|
| last windowed sample summed → sum registered | `tdp_mac` | 1 |
| sum → float | `fix2float` | 1 |
| float → amplitude | `fp_sqrt` | 29 |
| amplitudes → (x, y) | `xy_calc` | 75 |
| **window end → position** | | **106** |

Inside `xy_calc` the 75 clocks are spread over five arithmetic stages and one
output register:

| stage | operations | units | clocks |
|---|---|---|---|
| 1 | VA+VD, VB+VC, VA+VB, VC+VD | 4 × `fp_addsub` | 12 |
| 2 | the two differences and SUM | 3 × `fp_addsub` | 12 |
| 3 | difference / SUM, for x and y | 2 × `fp_div` | 29 |
| 4 | × Kx, × Ky | 2 × `fp_mul` | 9 |
| 5 | + Xoff, + Yoff | 2 × `fp_addsub` | 12 |
| 6 | output register | | 1 |

The square-root latency of 29 clocks and the x/y total of 75 clocks are the
figures measured on the reference FPGA implementation. There they add up to
104 clocks. How the 75 clocks divide among the stages is this design's own
choice. So are the two extra clocks ahead of the square root. Change
`ADD_LAT`, `MUL_LAT` and `DIV_LAT` to rebalance the stages. `fp_div` and
`fp_sqrt` need at least 29 clocks.

Every floating-point unit, the square root and the x/y unit included, takes
a new operand set on every clock. The only limit on the trigger rate is
therefore the window itself: a trigger that arrives while a window is still
open is ignored. At a 2 MHz repetition rate there are 125 clocks between
triggers, so the window N must be shorter than roughly 120 samples.

## Amplitude by sum of squares (`tdp_mac`)

* **Window.** `trig` is a one-clock pulse, synchronous to the sample clock.
  `win_len` (N) is sampled with it. The first valid filtered sample after the
  trigger clock is the first one summed.
* **Output.** After N samples, `sum` and `out_valid` appear for one clock.
* **Retriggering.** A trigger that arrives while the window is open is
  ignored and reported on `trig_lost`. N = 0 counts as 1.
* **Width.** A 16-bit sample squares to at most 2³⁰. The 47-bit accumulator
  therefore holds 2¹⁷ − 1 full-scale samples (0.52 ms at 250 MS/s) without
  overflow, so `win_len` is 17 bits wide.

The filter delays the samples by 3 clocks and the trigger is not delayed to
match. The window therefore starts with the filtered samples of the raw
samples that arrived 2 clocks before the trigger.

## DC-removing, reloadable FIR (`fir_hp`)

The filter equation, with `h[0]` weighting the newest sample:

    dout(n) = sat16( round( Σ_k h[k] · din(n−k) / 2¹⁵ ) )

* **Coefficients.** `NTAPS = 63` signed Q1.15 coefficients.
* **Rate and latency.** It takes one sample per clock. The output follows its
  sample by 3 clocks (delay line, product register, adder-tree register).
* **Reset coefficients.** At reset it holds a DC blocker built from a formula:
  `h[k] = −c` for every tap except the middle one `M = (NTAPS−1)/2`, where
  `h[M] = (NTAPS−1)·c` and `c = round(2¹⁵/NTAPS)`. The taps sum to exactly
  zero, so a constant input gives exactly zero output. Well above
  fs/NTAPS ≈ 4 MHz the gain is close to 1. The 476 MHz bunch signal aliases to
  5–34 MHz at 250 MS/s, so it passes through.

The target response is a 1 MHz high-pass with 50 dB stop-band rejection and
0.1 dB pass-band ripple. The host loads that response, together with any gain
and phase correction, through the reload port. Reload works as follows:

* **Writing a set.** Write the words `h[0]` first, each with `coef_valid`, and
  set `coef_last` on the final one.
* **Switching sets.** One clock after `coef_last` the whole new set replaces
  the old one, and `reload_done` pulses. Filtering never sees a half-written
  set.
* **Short and long sets.** A short set (early `coef_last`) changes only the
  taps written. Words beyond `NTAPS` are dropped.
* **Channel select.** In `bpm_top`, `coef_sel = 4·pickup + electrode` picks the
  channel.

## Floating-point units

All units share `fp32_pkg`:

* **Rounding.** Every result is rounded to nearest, ties to even, by one
  function, `fp_round_pack`.
* **Subnormals.** Subnormal inputs and results are flushed to signed zero, as
  FPGA floating-point cores commonly do.
* **Specials.** NaN and infinity follow IEEE-754. 0/0, ∞/∞, ∞−∞, ∞·0 and the
  square root of a negative number give a quiet NaN.

Each unit works as follows:

* `fp_addsub` forms the exact sum on a 50-bit field. That field holds the two
  24-bit significands, 25 bits below the point and a sticky bit. A
  leading-zero count then normalises the sum. The unit is fully pipelined: the
  result is computed in front of a `pipe_delay` line, and register retiming in
  synthesis can move those stages into the logic.
* `fp_mul` is a 24×24-bit significand product, shifted by at most one bit. It
  is fully pipelined in the same way.
* `fp_div` is a restoring divider laid out as a pipeline. The first stage
  finds the integer quotient bit and each of the next 27 stages adds one
  more, 28 bits in all. The final remainder gives the sticky bit.
* `fp_sqrt` is a digit-by-digit square root laid out the same way, one
  result bit per stage, 27 bits in all. An odd exponent is first made even by
  doubling the significand.

Like the vendor cores of the reference implementation, both take a new
operand set every clock.

Because every operation is correctly rounded, the result in the testbenches is
bit-exact against a software model that rounds each step to single precision.
At positions around 1 mm, one unit in the last place is about 0.12 nm.

## `bpm_top` interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | sample clock, asynchronous active-low reset |
| `adc_valid`, `adc_data[b][c]` | in | signed 16-bit samples; `c` = 0..3 is electrode A..D of pick-up `b` |
| `trig`, `win_len` | in | window start (one-clock pulse) and length N (17 bits) |
| `kx[b]`, `ky[b]`, `xoff[b]`, `yoff[b]` | in | single-precision scale factors and offsets, captured with each set of amplitudes |
| `coef_valid`, `coef_sel`, `coef_data`, `coef_last` | in | FIR coefficient reload |
| `reload_done[4b+c]` | out | new coefficient set active in that channel |
| `trig_lost` | out | a trigger was ignored because a window was open |
| `amp_valid[b]`, `amp[b][c]` | out | the four amplitudes of pick-up `b` |
| `xy_valid[b]`, `x[b]`, `y[b]`, `sum[b]` | out | the position and SUM, one set per trigger |

`bpm_top` does not include the parts that surround the logic:

* the ADC LVDS receivers;
* the analog RF front end and its step-attenuator control;
* the clock synthesiser;
* raw-data storage in DDR3 and its SFP+ link;
* the Ethernet/EPICS host;
* the trigger and beam-flag optocouplers.

The samples and the trigger must therefore already be parallel and synchronous
to `clk`.

## Departures and choices

These are the points where the RTL departs from the reference design or fills
in something the reference design does not specify:

* The FIR's tap count, coefficient format, rounding, reload protocol and reset
  coefficients are this design's own. The reset coefficients are a simple DC
  blocker, not the 1 MHz / 50 dB response. That response has to be loaded.
* The split of the 75-clock x/y latency among the operators, and the 1-clock
  fixed-to-float stage, are this design's own.
* The offsets `Xoff` and `Yoff` are included. Set them to zero for the plain
  difference-over-sum form.
* The mapping of electrodes to ADC channels (A..D = 0..3) and the trigger
  behaviour (window starts right after the trigger; retriggers ignored) are
  assumptions.
* The measurement-window length N is a run-time input. The reference design
  does not state its value.

## Testbenches

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_ref_pkg` holds the
reference arithmetic: double-precision operations rounded once to single,
which equals correct single rounding for +, −, ×, ÷ and √. It also holds the
FIR equation and the reset-coefficient formula, written independently of the
RTL.

| testbench | what it checks |
|---|---|
| `tb_fp_addsub`, `tb_fp_mul` | 20 000 random and special operands each, one per clock, bit-exact, exact latency |
| `tb_fp_div`, `tb_fp_sqrt` | 20 000 random operands each (plus 5 000 integer amplitudes for the square root) and the special cases, back to back, bit-exact, latency 29 |
| `tb_fix2float` | 20 000 values over all magnitudes, rounding ties |
| `tb_fir_hp` | DC input gives exactly 0; random data with the reset, a full reloaded, a short and an over-long coefficient set; saturation; latency 3 |
| `tb_tdp_mac` | 64 windows with gaps in the sample stream, full-scale samples, ignored retriggers |
| `tb_xy_calc` | centred beam gives 0, signal on A alone gives Kx, 4 000 random cases back to back with changing Kx, Ky and offsets, latency 75 |
| `tb_bpm_channel` | sum and amplitude per window against the model, with a coefficient reload; latencies 1 and 31 |
| `tb_bpm_top` | two pick-ups, tones with DC offsets and noise on eight channels, three windows, a reload, an ignored retrigger; every amplitude and (x, y, SUM) bit-exact; latencies 75 and 106 |
| `tb_bpm_top_full` | the same at the default parameters (one pick-up, 63 taps), windows of 2000, 777 and 4096 samples |
| `tb_bpm_top_rate` | default parameters at a 2 MHz trigger rate: 40 windows of 100 samples, one trigger every 125 clocks, a sample on every clock; all results bit-exact, one position every 125 clocks, no trigger lost |

The end-to-end testbenches also count the mechanisms that must each happen at
least once: a coefficient reload, an ignored trigger, DC removal (the
amplitude² of every channel must match the tone power alone, within 5 %) and a
position from every pick-up.

Run one with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fp32_pkg.sv tb/tb_ref_pkg.sv tb/tb_bpm_top.sv --top-module tb_bpm_top
./obj_dir/Vtb_bpm_top
```

Substitute any other testbench name. Each finishes in well under a minute.

## Changing the design

* `N_BPM` sets the number of pick-ups per processor.
* `NTAPS` sets the FIR length. The reset coefficients follow the formula above
  for any length.
* `ACC_W` sets the accumulator width. `WIN_W` follows from it, so the window
  can never overflow the sum.
* `SQRT_LAT`, `ADD_LAT`, `MUL_LAT` and `DIV_LAT` set the operator latencies.

The end-to-end testbenches model every latency. If you change one, update the
expected counts (31, 75 and 106 clocks) in `tb_bpm_channel` and the
`tb_bpm_top*` files.
