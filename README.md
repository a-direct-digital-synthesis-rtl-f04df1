# Amplitude-sequencing direct digital synthesizer

A classical direct digital synthesizer (DDS) keeps a phase accumulator and
turns the phase into a sample with a sine table. The table grows
exponentially with the sample width. This design has no phase-to-amplitude
table. It walks a point around a circle in unit steps and outputs the two
coordinates as the cosine and sine samples. The logic grows linearly with
the word length. Each step costs one comparison and two additions.

The walk alone gives samples that are spaced evenly along the path but not
evenly in phase. A *sample timing delay* holds each sample for a time
proportional to the angle the next step turns the vector by. That restores
an even phase rate.

The top level, `ddfs_tri`, packs three of these generators on one clock. It
is meant for a multi-frequency coil driver, for example in magnetic
induction tomography. Each channel has an amplitude word and a frequency
word, and its outputs can be levelled down by dropping low bits.

## The circle walk (`ddfs_step_sel`)

The point `(x, y)` moves counter-clockwise around the circle
`x² + y² = r²`, where `r` is the amplitude tuning word AT. At each step
exactly one coordinate changes, by one:

* **x step**: `x' = x − sgn(y)`. This moves x towards the y axis.
* **y step**: `y' = y + sgn(x)`. This moves y away from the x axis.

A register holds the error `f = x² + y² − r²` of the present point. The
error after each candidate step follows by addition alone:

    fx = f + 1 − 2·x·sgn(y)        fy = f + 1 + 2·y·sgn(x)

The step with the smaller `|f|` is taken. A tie goes to the x step. On an
axis only one move is possible: `y = 0` forces a y step and `x = 0` forces
an x step. The walk starts at `(r, 0)` and never strays far from the
circle: `|f| ≤ |x| + |y| + 1` always holds, and `ddfs_core` asserts this.
One revolution has exactly `8·r` steps (r x steps and r y steps per
quadrant). During an x step the sine output does not change, and during a
y step the cosine output does not change.

## Phase timing compensation (`ddfs_phase_comp`)

Moving from `(x, y)` by one unit in y turns the vector by `|x|/r²` radians.
An x step turns it by `|y|/r²`. So the angle of a step is proportional to
the coordinate the step leaves unchanged. `ddfs_step_sel` outputs that
coordinate as `perp_mag`.

The compensation counter counts timing ticks and fires the pending step
once it has counted `perp_mag` ticks. The samples therefore advance at a
constant `1/r²` radians per tick. No division is needed, because the delay
is the coordinate itself.

The parameter `TRUNC` drops low bits of the delay (`delay = perp_mag >>
TRUNC`). This shortens a revolution by about `2^TRUNC` and so raises the
highest output frequency. The cost is timing noise: the rounding loss is
no longer negligible. Delays of 0 and 1 both take one tick, so at most one
step is taken per tick. When the delays become that short, the revolution
comes out shorter than `2πr²/2^TRUNC`. At r = 1000 with 8 bits dropped, a
revolution measured 20 000 ticks against the ideal 24 544.

## Frequency and amplitude

`ddfs_rate_gen` turns the frequency word FT into timing ticks. It is an
M-bit accumulator, and its carry is the tick, so ticks come at
`f_clk·FT/2^M`. One revolution takes `Σ max(1, delay)` ticks, which is about
`2πr²/2^TRUNC`. This gives:

    f_out ≈ f_clk · (FT / 2^M) · 2^TRUNC / (2π · AT²)

The frequency is linear in FT and falls with the square of the amplitude.
The three-channel application uses this: with one FT for every channel,
radii 31, 63 and 127 give three frequencies in the ratio of about
16.8 : 4.1 : 1. Levelling by 0, 1 and 2 bits then brings all three outputs
to a peak of 31.

Limits:

* AT can be any value of its N−1 bit port, at most `2^(N−1)−1`.
* A revolution has `8·AT` steps, and at most one step is taken per clock,
  so `f_out ≤ f_clk/(8·AT)` whatever FT and TRUNC are. For example, at
  AT = 127 and a 50 MHz clock this is 49 kHz. At full delay resolution it
  is `f_clk/(2π·AT²)`, which is 493 Hz.
* High frequencies need small radii, which means coarse samples, or heavy
  delay truncation.

## Spectral purity

The timing compensation is what makes the output clean. An 8-bit generator
at AT = 127 was measured with a DFT over one revolution of the sine
output:

| delay timing | 3rd harmonic | 5th harmonic |
|---|---|---|
| full compensation (`TRUNC = 0`) | −63.5 dBc | −86.5 dBc |
| 4 delay bits truncated (`TRUNC = 4`) | −52.6 dBc | −53.2 dBc |
| uniform, one tick per step (`TRUNC = 7`) | −35.6 dBc | −35.7 dBc |

Without compensation the walk's own phase distortion leaves the low odd
harmonics at about −35 dBc. Compensation removes most of it. Truncating
the delay trades that purity back for speed.

## Tuning at cycle start (`ddfs_core`)

AT and FT are sampled only at cycle start. Cycle start is the step that
lands on the positive x axis, and the first clock after reset. There the
point is reset to `(AT_new, 0)` and `f` to 0. As a result:

* A frequency change (FSK) is phase continuous and always takes effect at
  phase zero.
* An amplitude change takes effect at phase zero too.

`cycle_o` pulses at each cycle start and `sample_o` pulses with each new
sample. The samples `cos_o`/`sin_o` are registered and change on the same
clock as the strobe. AT = 0 parks the outputs at (0, 0), and the core then
re-reads the tuning words every other clock until AT becomes non-zero.

## Blocks

| module | role |
|---|---|
| `ddfs_pkg` | `step_e` step type |
| `ddfs_step_sel` | step decision, next coordinates and error, raw delay (combinational) |
| `ddfs_phase_comp` | sample timing delay counter with optional truncation |
| `ddfs_rate_gen` | FT accumulator making the timing ticks |
| `ddfs_core` | one generator: x, y and f registers, tuning loaded at cycle start |
| `ddfs_level` | arithmetic right shift for amplitude levelling |
| `ddfs_tri` | top: `CH` cores on one clock, each output pair levelled |

Default parameters:

* `N = 8`: the sample width, so the radius is at most 127.
* `M = 16`: the FT width.
* `TRUNC = 0`: no delay truncation.
* `CH = 3`: the number of channels.
* `SW = 2`: the width of the levelling control.

`N = 16` gives the double-byte version. A full revolution at large radii
then takes around 2π·r² ticks, which is billions of clocks.

The clock source and the DACs are outside the RTL. `ddfs_tri` expects a
clean clock, such as one from an FPGA clock manager, and brings the
levelled samples out as ports.

## What is fixed and what was chosen

The following come from the architecture:

* the circle walk with single-axis steps and one comparison per step;
* holding the sample that does not move on an opposite-axis step;
* a delay per sample set by the angle of the step;
* optional delay truncation;
* tuning loaded at cycle start;
* three generators on a common clock with amplitudes levelled by dropping
  two bits.

The following are this design's own choices:

* the exact step rule (min |f|, ties to x);
* counter-clockwise motion from (AT, 0) over all four quadrants;
* one shared compensation counter instead of separate x and y counters;
* the FT accumulator as the tick source, and the default M = 16;
* loading AT at cycle start as well as FT;
* a run-time 0–3 bit level shift per channel;
* the asynchronous active-low reset;
* the handling of AT = 0.

The following are not built:

* loading, modulation and mirroring stages, which are only named as
  possible additions;
* the clock manager and the DACs.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_ddfs_step_sel`: for radii 1, 2, 5, 37, 100 and 127, every reachable
  point of the 8-bit plane is applied. The result is compared with a model
  that squares the candidate points directly.
* `tb_ddfs_phase_comp`: random delays and tick patterns, with TRUNC 0
  and 2.
* `tb_ddfs_rate_gen`: exact tick sequence against an independent
  accumulator, and the tick rate for six FT values.
* `tb_ddfs_level`: exhaustive over all samples and shifts.
* `tb_ddfs_core`: TRUNC 0 and 2 side by side. Checks every sample and
  every inter-sample tick count against a model, `8·AT` samples per
  revolution, and revolution length within 2% (TRUNC 0) or −7%/+2%
  (TRUNC 2) of `2πr²/2^TRUNC`. Also checks that tuning changed in
  mid-cycle waits for cycle start, and that AT = 0 parks the output.
* `tb_ddfs_word16`: the 16-bit version at AT = 600 and at the full
  radius 32767, with TRUNC 0 and 4.
* `tb_ddfs_spectrum`: harmonic levels and revolution length in clocks for
  TRUNC 0, 4 and 7 at AT = 127. This produces the table above.
* `tb_ddfs_tri`: end to end at default parameters. It sets up the
  three-frequency, levelled configuration. It checks every sample, period
  ratios against `(AT_a/AT_b)²`, equal levelled peaks, FSK halving the
  frequency from the next cycle start, an amplitude reload and parking. It
  counts each mechanism (x step, y step, held sample, cycle start, FSK
  reload, AT reload, levelling by 0/1/2 bits, parking) and fails if one
  never happens. It runs in under a second.

To run a testbench with Verilator (version 5):

    verilator --binary --timing --assert -Irtl rtl/ddfs_pkg.sv tb/tb_ddfs_tri.sv --top-module tb_ddfs_tri
    ./obj_dir/Vtb_ddfs_tri

Substitute any other testbench name. The other RTL files are found through
`-Irtl`.

## How far to trust it

* The step rule, timing rule and frequency formula have been checked by
  simulation for 8-bit and 16-bit words.
* Spectral purity has been measured only for the sine output at AT = 127,
  as harmonic levels over one revolution. The noise floor has not been
  measured.
* The design has been compiled and coarsely synthesised. The three-channel
  top comes to about 210 flip-flops. It has not been placed on an FPGA or
  timed.
* The combinational path is one comparison of two (N+3)-bit magnitudes
  feeding the coordinate registers. It should close easily at typical FPGA
  clock rates for N = 8 or 16, but this has not been measured.
