# Stop-band management for a pulse-skipping DC-DC converter

At light load, a peak-current-mode DC-DC converter stops switching on every
clock cycle. Instead it runs in *pulse-skip mode* (PSM): a burst of K switching
cycles, then M idle cycles, then the next burst. The burst repetition rate
F_SKIP depends on input voltage, output voltage, load and components. It can
settle anywhere from a few kHz to a few hundred kHz. Some systems forbid
certain bands in that range. An AMOLED display supply, for example, must not
beat with the panel's own frequencies, and neighbouring circuits may be
sensitive to EMI in given bands.

The stop-band management system (SBMS) in this repository enforces such a
band without forcing the converter into continuous conduction, which would
cost efficiency. It works in two steps:

1. **Detect.** It watches the skip comparator output COMP_SKIP, which rises at
   the start of each burst. It decides whether the converter is sitting
   *steadily* inside the programmed band F_SB_MIN..F_SB_MAX.
2. **Correct.** If so, it adds a small offset to the skip reference
   REF_SKIP. REF_SKIP sets the coil peak current of a burst, so the offset
   changes how much energy each burst delivers. That changes K and/or M, and
   so F_SKIP. The same offset is added to the error-amplifier output, which
   produces the control voltage V_C. V_C therefore moves together with
   REF_SKIP, and the output voltage sees no step. The offset is advanced one
   notch per detection until the converter leaves the band.

The detector and the iteration counter are synthesizable RTL. The two offset
generators are analog circuits, so they are written as behavioural models
with real-valued ports.

## Detection: two checks that must agree

The detector runs on an auxiliary clock CLOCK_AUX: 3 MHz by default, a few
times the highest stop-band frequency. It needs no fast clock because it
combines two checks:

* **Condition (1): every burst period.** The number of CLOCK_AUX periods
  between two consecutive COMP_SKIP rising edges must lie in
  `ceil(F_AUX/F_SB_MAX) .. ceil(F_AUX/F_SB_MIN)`. For 40-60 kHz at 3 MHz, that
  is 50..75. This check shows the instantaneous rate, but its resolution is
  coarse. On its own it cannot tell a converter that is settled in the band
  from one that is only passing through it.
* **Condition (2): the average over a sampling window.** The number of
  COMP_SKIP rising edges in a window of length t_SW must lie in
  `t_SW*F_SB_MIN .. t_SW*F_SB_MAX`. For 40-60 kHz and a 0.5 ms window, that
  is 20..30. This check is fine-grained but blind to how the edges are spread
  out. A converter that runs fast and then slows down after a transient can
  still give an in-band average.

The window is restarted every time a single burst period fails condition (1).
A window therefore only completes if every period inside it passed. The
average is then judged at the end of that window. Transients keep pushing
the window forward in time, and no correction is made until the converter
has been steady and in the band for a whole t_SW.

Both conditions are widened by a margin of one count on each side
(`MARGIN1`, `MARGIN2`). This covers the ±1 uncertainty of sampling an
unrelated clock. The widening errs on the side of treating a rate just
outside the band as inside it. The reference design applies margins but
does not state their size, so one count is this implementation's choice.

## The two state machines

Both machines are synchronous to CLOCK_AUX. COMP_SKIP first passes through a
two-flop synchroniser (`skip_sync`), which also produces one-cycle
rising-edge and falling-edge pulses. The states and their numbers follow the
reference design, which built the same machines as asynchronous FSMs
reacting directly to edges of COMP_SKIP and CLOCK_AUX.

### AFSM1: burst-period check (`afsm1`)

COUNTER1 is loaded with 1 on a COMP_SKIP rising edge and counts every
CLOCK_AUX cycle. At the next rising edge, it holds exactly the period in
CLOCK_AUX cycles.

| # | state        | meaning                                                   | OK1 |
|---|--------------|-----------------------------------------------------------|-----|
| 1 | INITIAL      | previous period passed; new period being measured          | 1   |
| 2 | EN_COUNTER   | COMP_SKIP still high (burst in progress)                   | 1   |
| 3 | WAIT         | COMP_SKIP low, waiting for the next burst                  | 1   |
| 4 | NOT_IN_SB    | previous period failed (1); new period being measured      | 0   |
| 5 | WAIT_SKIP0   | period already longer than the band allows, COMP_SKIP high | 0   |
| 6 | WAIT_SKIP1   | same, COMP_SKIP low; waiting for a rising edge             | 0   |

The transitions are:

* 1→2 and 4→2 happen on the next clock.
* 2→3 happens when COMP_SKIP is low.
* From WAIT, a rising edge goes to 1 if condition (1) holds and to 4 if it
  does not.
* Once COUNTER1 exceeds the upper bound, no later edge can pass. The machine
  then leaves early: 2→5 or 3→6, which happens when the converter is far
  below the band.
* 5→6 happens when COMP_SKIP is low, and 6→1 on a rising edge.

Reset and reprogramming enter state 6, so the first period is measured from
the first edge seen. OK1 is high in states 1-3 and low in states 4-6. Only
its *falling* edge matters to AFSM2.

### AFSM2: sampling-window check (`afsm2`)

| # | state         | action                                                      |
|---|---------------|-------------------------------------------------------------|
| 1 | INITIAL       | timer and COUNTER2 cleared; a COMP_SKIP rising edge opens a window |
| 2 | EN_COUNTING   | timer counts CLOCK_AUX cycles, COUNTER2 counts rising edges (the opening edge counts as 1) |
| 3 | SB_DETECTED   | SB = 1                                                      |
| 4 | NOT_IN_SB     | window rejected                                             |

From state 2 the machine leaves as follows:

* It goes to 4 at once if OK1 falls, or if COUNTER2 exceeds the upper bound.
  In both cases there is no point waiting for the window to end.
* Otherwise, when the timer reaches t_SW·F_AUX cycles, it goes to 3 if
  condition (2) holds and to 4 if it does not.

States 3 and 4 return to 1 once COMP_SKIP is low, and the next rising edge
opens a fresh window.

**Timing.** The window covers exactly `t_SW·F_AUX` CLOCK_AUX cycles from the
opening edge. An edge on the timeout cycle is not counted. SB rises one
cycle after the timeout, which is t_SW plus 1 cycle after the opening edge,
plus the 2-3 cycles of the synchroniser. SB stays high until COMP_SKIP is
low. Consecutive corrections are at least one window apart.

### Controller wrapper (`sb_digital_controller`)

The wrapper holds the synchroniser, the bound calculator `sb_limits` and the
two machines. It puts both machines back into their initial state in these
cases:

* EN is low.
* The band or t_SW changes. Each input is compared with its value in the
  previous cycle.
* The programming is invalid: a zero frequency, F_SB_MIN ≥ F_SB_MAX, or
  t_SW = 0.

`sb_limits` is combinational. It computes the bounds with integer dividers.
Frequencies are given in kHz and t_SW in µs.

## Corrective action

`counter_ref` (COUNTER_REF) starts at 0, meaning no offset, and advances on
each rising edge of SB. It counts 1…7 and then rolls over to 1, never back
to 0. A converter that wanders back into a band later therefore goes through
the whole set of offsets again. The code selects the offset:

| code   | 0 | 1   | 2   | 3   | 4    | 5   | 6   | 7   |
|--------|---|-----|-----|-----|------|-----|-----|-----|
| offset | 0 | +25 | +50 | +75 | +100 | −25 | −50 | −75 mV |

The analog offset generator is a source follower followed by a programmable
resistor R_OFFSET carrying a constant current I_OFFSET. Its output is
`OUT = IN − V_GS + R_OFFSET·I_OFFSET`, so it can only add a positive offset.
A 75 mV baseline is therefore added to every entry. `dcog_decoder` turns the
code into a count of unit resistor segments (offset + 3, range 0..7) and into
a thermometer code of segment enables. `dcog` is the behavioural model of the
whole generator. Its defaults are V_GS = 0.6 V, 2.5 kΩ per segment and
10 µA, which gives the 25 mV step. Two identical instances shift V_FIXED into
REF_SKIP and V_EA into V_C. The baseline and V_GS are the same in both, so
they cancel, and only the offset sequence matters to the converter.

For a code width other than N = 3, the pattern is generalised: +1…+2^(N−1)
steps, then −1, −2, … steps, with a baseline of 2^N − 1 − 2^(N−1) steps.

## Top level (`sbms_top`)

| port                         | dir | meaning |
|------------------------------|-----|---------|
| `clk_aux`, `rst_n`           | in  | CLOCK_AUX; asynchronous active-low reset |
| `en`                         | in  | SBMS enable |
| `comp_skip`                  | in  | skip comparator output, asynchronous to `clk_aux` |
| `f_sb_min_khz`, `f_sb_max_khz` | in | stop band edges, kHz, 16 bits |
| `t_sw_us`                    | in  | sampling window, µs, 11 bits (up to 2047 µs) |
| `v_fixed`, `v_ea` (real)     | in  | fixed skip reference; error-amplifier output (V) |
| `sb`, `ok1`                  | out | detection flag; AFSM1 period flag |
| `code`                       | out | COUNTER_REF |
| `ref_skip`, `v_c` (real)     | out | shifted skip reference and control voltage (V) |

Parameters: `F_AUX_KHZ` (3000), `N` (3), `MARGIN1` and `MARGIN2` (1). The
counters are 16 bits and saturate. The package `sbms_pkg` holds the field
widths and state types. With the 3 MHz clock, they cover bands from about
1 kHz up to a few hundred kHz, where a burst period is still many
CLOCK_AUX cycles long.

The rest of the converter is outside this RTL: skip and PWM comparators,
error amplifier and compensator, converter clock and ramp, set/reset latch,
and power stage. Because of the real-valued ports of the two offset-generator
models, `sbms_top` is a simulation model. For a netlist, synthesize
`sb_digital_controller`, `counter_ref` and `dcog_decoder`, and build the
offset generators as analog circuits.

## Where this implementation departs from the reference design

* **Synchronous instead of asynchronous state machines.** The reference
  design's machines react directly to edges of COMP_SKIP and CLOCK_AUX.
  Here, COMP_SKIP is synchronised and both machines are ordinary clocked
  FSMs. This adds 2-3 CLOCK_AUX cycles of latency and measures periods to
  ±1 cycle. The margins absorb that uncertainty.
* **COUNTER1 counts in states 1 and 4 too.** It is loaded at the edge, so its
  value is the exact period. In the reference, it is reset in states 1 and 4
  and runs in states 2 and 3.
* **AFSM1's early exit.** It is taken when COUNTER1 *exceeds* the upper bound
  of condition (1). This follows the inequality ≤ in condition (1), where
  the state diagram writes ≥.
* **AFSM2's idle loop.** The reference design's INITIAL↔EN loop follows the
  CLOCK_AUX level. Here it is replaced by waiting for a rising edge. The
  timer and COUNTER2 are cleared in states 1, 3 and 4. This follows the
  state diagram; a passage of the description could be read as clearing
  them in state 2.
* **Window opening.** A window opens at any rising edge in INITIAL, as in the
  state diagram. It is not gated by OK1. If the first period of a window
  fails condition (1), the falling OK1 rejects the window.
* **COUNTER_REF roll-over.** The counter rolls over 7→1, as in the offset
  table, and is clocked by CLOCK_AUX with an edge detector on SB.
* **Choices of this implementation where the reference design gives no
  value:** the programming format (kHz and µs integers), the reset of both
  machines on any change of t_SW, the handling of EN (EN low holds the
  machines idle and keeps the present offset), the margin sizes, the 75 mV
  baseline, the thermometer-coded resistor string, and the analog model
  values.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_afsm1`: sweeps burst periods around both bounds (49/50/51, 74/75/76),
  runs far-too-slow bursts with short and long high times, and adds random
  periods. It checks COUNTER1 at each edge, OK1 after each edge, and the
  exact cycle at which OK1 drops for slow periods.
* `tb_afsm2`: sends steady trains of 12 periods. It checks SB at exactly
  t_SW + 1 cycle, the early rejection on the edge that overflows COUNTER2,
  rejection at the timeout, and the effect of OK1 falling mid-window.
* `tb_sb_limits`: checks the bounds for the four example bands
  (15-35, 40-60, 90-110, 135-155 kHz) with 0.5 ms and 1 ms windows, with
  and without margins, plus the rounding and invalid cases.
* `tb_sb_digital_controller`: drives COMP_SKIP from a drifting 666 ns
  converter clock with bursts of three cycles. It checks:
  * detection in each example band, one window after the first burst;
  * silence at 15 % below and above each band;
  * no detection when the average is in the band but the individual
    periods are not;
  * no detection when an in-band train is disturbed by periodic gaps;
  * EN gating, and the window restart on reprogramming.
* `tb_counter_ref`, `tb_dcog_decoder`, `tb_dcog`: check the code sequence,
  the offset table and the generator equation.
* `tb_sbms_top`: closes the loop with `psm_converter_model`, a behavioural
  PSM converter whose burst period scales with (REF_SKIP/REF_nominal)². It
  runs at the top's default parameters:
  * disabled operation;
  * detection and stepping out of the band;
  * a line transient back into the band;
  * transient filtering;
  * a converter stuck in the band, which walks COUNTER_REF through its
    roll-over;
  * on-the-fly reprogramming.

  It also checks REF_SKIP and V_C − REF_SKIP after every step.

The converter model only reproduces how the converter behaves, not the
electrical values of a real converter. Nothing here checks the analog
blocks beyond their ideal equation.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sbms_pkg.sv tb/tb_sbms_top.sv --top-module tb_sbms_top
./obj_dir/Vtb_sbms_top
```

Replace `tb_sbms_top` with any other testbench name. The testbenches set
their own time unit (1 ns); the RTL has no delays and declares no time
unit, hence the `--timescale` option, and the full end-to-end run simulates about
30 ms of operation in well under a second. They use `$urandom` and have
watchdogs that end the run with a failure if it hangs.
