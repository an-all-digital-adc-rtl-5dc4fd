# VCO-based ECG converter with dynamic sampling

This design converts ECG voltages to digital codes by measuring time rather than voltage.
Each input drives a ring oscillator whose frequency depends on the input, and a counter counts
the oscillator's edges over a sampling interval. The count is the conversion result. A
differential input uses two oscillators, and the output is the difference of their counts.
Nearly everything is digital: the only analog parts are the oscillators themselves, a delay
line and the input multiplexer.

On top of the converter, a *dynamic sampling* controller saves power on the flat parts of an
ECG. At the start of each output period it estimates how fast the signal is moving. If the
signal is nearly flat, it switches the oscillators off for the rest of the period and reports
a coarser result scaled up to the same range.

A second mode runs the same converter at 10 kHz and multiplexes 8 ECG leads through it: eight
1 kHz channels, then two idle slots with the oscillators off.

The SystemVerilog here is synthesizable RTL for all the digital logic. It also contains
behavioural (simulation-only) models of the oscillator, the delay line and the multiplexer, so
the whole converter can be simulated end to end with Verilator.

## Converting voltage to counts

Each ring oscillator (`ring_vco`) is modelled on a 16-stage ground-controlled inverter ring
with a NAND start stage. Its frequency falls linearly from **39.52 MHz at 0 V to 26.99 MHz at
100 mV** of control voltage. The `en` input stops the ring. In this design the oscillators do
not count continuously: they are stopped briefly around every sampling edge, and they stay off
whenever the controllers decide to save power.

A count over an interval of length T is about `f(v) · T`. The quantisation error is a fraction
of an oscillator period. That fraction is not lost: the oscillator keeps its phase, including
across stops, so the leftover phase counts toward the next interval. The error is therefore
first-order noise-shaped, as in a first-order delta-sigma modulator. Over many intervals the
total count stays within about one edge of the ideal value. The testbenches check this.

The counters (`async_counter`, 17 bits) are ripple counters. Only the LSB is clocked by the
oscillator, and every higher bit toggles on the falling edge of the bit below it. Ripple
counters need no adder and their upper bits rarely switch, so they use little power. The cost
is that the value is briefly wrong while a carry ripples upward. For example, 3 → 4 passes
through 2 and 0. The sampling scheme below exists to deal with this.

Results are **signed counts, not volts**. A count grows with `vin_p − vin_n`. Over an interval
T, the expected difference is

    diff ≈ (f(vin_n) − f(vin_p)) · (T − 5·Td),   f(v) = 39.52 MHz − 125.3 kHz/mV · v

where `5·Td` (14.2 ns) is the time the oscillators are stopped around each sampling edge. At
the 8 kHz interval rate, full scale on one side is 1566 counts per interval. Over a 1 ms
output period it is 12530 counts.

## The sampling event

The fiddliest part of the design is what happens at each rising edge of the sampling clock. A
delay line (`delay_line`) produces copies d1…d5 of the clock. Each stage delays a rising edge
by 2.84 ns and a falling edge by 3.03 ns, the typical-corner values of the delay cell.
`window_gen` combines these copies into pulses. Each pulse is the AND of an earlier copy with
the inverse of a later one:

| time after edge | event |
|---|---|
| 0 | **DISABLE** rises: both oscillators stop, so the counters freeze |
| d1 (2.84 ns) | first sample **FF_SP**, inside EN window 0…d2 |
| d2 (5.68 ns) | second sample **FF_SP_D**, inside EN window d1…d3 |
| d3 (8.52 ns) | value determination settled; `out_cal` registers `cnt_n − cnt_p`; counters cleared until d4 |
| d4 (11.36 ns) | control clock: sequencer / dynamic-sampling controller act on the new count |
| d5 (14.2 ns) | DISABLE falls: the oscillators restart, if the controller allows |

There are three protection mechanisms:

* **Counters are stopped before they are read.** Because of DISABLE, no oscillator edge can
  arrive close to a sampling edge. This prevents metastability in the sampling flip-flops.
* **Input-gated flip-flops** (`gated_ff`) have an AND gate in front of each D input, enabled
  only by a short window around their clock edge. The counter's constant toggling therefore
  does not reach the flip-flops, and does not cost power in them, for the rest of the
  interval. Each window spans three consecutive clock copies, and the flip-flop is clocked by
  the middle one.
* **Double sampling with value determination** (`value_determination`). A carry ripple can
  still be in flight from an oscillator edge just before DISABLE. Any value caught mid-ripple
  is *smaller* than the settled value. The rule is: if `FF_SP_D < FF_SP`, the later sample was
  caught rippling, so take `FF_SP`. Otherwise take `FF_SP_D − 1`. This rule is implemented
  exactly as specified. In this arrangement, where the counter is already frozen, both samples
  are usually settled and equal, so the rule returns the count minus one. Both sides of the
  differential converter take the same branch, so the −1 cancels in the subtraction.
  `cnt_p`/`cnt_n` therefore read one less than the number of edges (−1 for an idle counter).

The counters are cleared at d3 while the oscillators are stopped, so each interval counts from
zero. The oscillator phase is not cleared, so the noise shaping is kept.

In zero-delay RTL simulation the counter never shows a mid-ripple value. The branch that
selects `FF_SP` is therefore exercised only by the unit test of `value_determination`, which
uses the three cases of the original timing diagram: 3/4 → 3, 3/2 → 3 and 0/2 → 1.

## Dynamic sampling (PDS, low-distortion mode)

`pds_controller` handles single-channel mode. The sampling clock is the *DEL-SP* clock at
2·N times the output rate, with N = 4: an 8 kHz clock for 1 kHz ECG samples. One output period
is therefore 8 intervals:

1. **Estimation region.** Intervals 0 and 1 (1/N of the period) give counts OUT1 and OUT2.
   These are the input integrated over two adjacent, equal windows, so `|OUT2 − OUT1|`
   measures the slope.
2. **Decision**, at the end of interval 1. If the slope is above the user threshold
   (`ds_threshold`), the period is *high-information*: the oscillators keep running and the
   output is the sum of all 8 interval counts, which is a full-resolution 1 ms count.
   Otherwise the period is *low-information*: the oscillators are switched off for intervals
   2–7 and the output is `(OUT1 + OUT2) · N`. This result has the same scale, its low bits
   carry no information, and the oscillators use about 1/N of the power.
3. `dout_low_info` tells which case produced each result. With `ds_en = 0` every period is
   full resolution.

A slope exactly equal to the threshold counts as low-information. The published evaluation of
this mode gives about 53 % lower converter power at a distortion (PRD) under 5 % for N = 4.
Power cannot be measured in RTL simulation. The nearest stand-in is the fraction of time the
oscillators run, and `tb_ecg_workload` reports it together with the PRD for a synthetic beat
(see Simulating).

## Multi-channel mode

`channel_sequencer` is used with `multi_ch = 1` and a 10 kHz sampling clock. A frame has 10
slots. In slot k < 8, the input multiplexers (`analog_mux`) select channel k and the
oscillators run. Slots 8 and 9 are idle with the oscillators off. Each channel result is one
100 µs count (swing about 1253 counts per side), tagged with `dout_ch`. Each channel is
sampled at 1 kHz. Dynamic sampling is not used in this mode.

The select changes at d4, while the oscillators are still stopped, so each interval converts
a single channel. The oscillator phase carries over from one channel to the next. This adds
at most about one count of error per result.

## Top level: `ecg_adc_top`

| port | dir | meaning |
|---|---|---|
| `clk_sp` | in | sampling clock: 8 kHz (single-channel) or 10 kHz (multi-channel) |
| `rst_n` | in | active-low asynchronous reset of counters, samplers and controllers |
| `multi_ch` | in | 0 = single channel (channel 0) with dynamic sampling, 1 = 8-channel mode |
| `ds_en`, `ds_threshold[16:0]` | in | dynamic sampling enable and slope threshold (counts) |
| `vin_p_uv[8]`, `vin_n_uv[8]` | in | per-channel input voltages in µV, 0…100000 (higher values clip) |
| `dout[21:0]` | out | signed result |
| `dout_valid` | out | high for one `clk_out` period per result |
| `dout_ch[2:0]` | out | channel of `dout` (0 in single-channel mode) |
| `dout_low_info` | out | `dout` is a reduced-resolution (low-information) result |
| `clk_out` | out | sampling clock delayed by 4 stages; outputs change on its rising edge |

Latency: a single-channel result appears at d4 of the sampling edge that ends its 8th
interval. A multi-channel result appears at d4 of the edge that ends its slot.

Parameters: `NCH` (8), `CNT_W` (17), `DS_N` (4), `VIN_W` (17). The shared defaults live in
`adc_pkg`. The delay-line stage delays are parameters of `vco_adc` (`TDR_PS`, `TDF_PS`).

## Files

| file | role |
|---|---|
| `rtl/adc_pkg.sv` | shared constants |
| `rtl/ring_vco.sv` | oscillator, behavioural model |
| `rtl/delay_line.sv` | tapped delay line, behavioural model |
| `rtl/analog_mux.sv` | input multiplexer, behavioural model |
| `rtl/async_counter.sv` | ripple counter |
| `rtl/gated_ff.sv` | input-gated sampling flip-flops |
| `rtl/value_determination.sv` | choice between the two samples |
| `rtl/window_gen.sv` | DISABLE / EN / clear / control pulses |
| `rtl/out_cal.sv` | registered differential subtraction |
| `rtl/vco_adc.sv` | the differential converter (all of the above) |
| `rtl/pds_controller.sv` | dynamic sampling |
| `rtl/channel_sequencer.sv` | multi-channel frame |
| `rtl/ecg_adc_top.sv` | top level |

Every module has a testbench `tb/tb_<module>.sv`. The testbench ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

Everything uses 1 ps time units. Testbenches need `--timing`. The oscillator model produces
one event per half period, so 1 ms of simulated time takes roughly 30 ms of wall time.

    verilator --binary --timing --assert -Irtl rtl/adc_pkg.sv tb/tb_ecg_adc_top.sv \
              --top-module tb_ecg_adc_top -Mdir obj -o sim && ./obj/sim

`tb_ecg_adc_top` runs the top at its default parameters. It covers constant input (which gives
low-information periods), a triangle input (high-information periods), dynamic sampling
switched off, and a switch to 8-channel mode. That last phase checks every channel value, the
channel order and the two idle slots per frame. Expected values come from the oscillator
formula above, with tolerances of ±2 counts for a single interval, ±4 for an 8-interval sum
and ±12 for a ×4-scaled low-information result. `tb_vco_adc` checks each count against the
formula, the noise-shaped running sum, the 3-stage result latency and the idle case.

`tb_ecg_workload` (about 25 s of wall time) runs three workloads through the top level:

* a 150 Hz full-scale sine with the two inputs in opposite phase, at 1 kHz output;
* the same sine on all 8 channels in multi-channel mode;
* one synthetic 0.8 s ECG beat with 3 mV of 60 Hz interference, with dynamic sampling on
  (threshold 4).

Every result is checked against the ideal count. For the ECG beat the testbench reports a PRD
of about 3 % against the full-resolution output, with the oscillators running about 28 % of
the time. The beat shape and the threshold are a typical case chosen for the test. They are
not a recorded ECG.

`tb_ecg_pds_rows` (about 2 minutes) converts the same beat with `DS_N = 8` (16 kHz sampling
clock) and `DS_N = 2` (4 kHz), both at 1 kHz output. The count difference between adjacent
intervals grows with the square of the interval length. The thresholds are therefore scaled
to 1 and 16 counts, which correspond to the same signal slope as threshold 4 at `DS_N = 4`.

| DS_N | sampling clock | PRD | oscillators on |
|---|---|---|---|
| 8 | 16 kHz | 3.7 % | 23 % |
| 4 | 8 kHz | 3.0 % | 28 % |
| 2 | 4 kHz | 1.9 % | 52 % |

A shorter estimation region saves more power at the cost of more distortion, the same
trade-off as the published evaluation. To run the design at another N, set `DS_N` on the top
and run the sampling clock at 2·N kHz.

`tb_vco_adc_corners` runs the converter core with the delay-line values of all five
process/temperature corners, from FF (1.85 ns per stage) to SS (5.10 ns rise, 5.84 ns fall).
It checks the counts, the difference and the 3-stage result latency at each corner.

The synthesizable modules are `async_counter`, `gated_ff`, `value_determination`,
`window_gen`, `out_cal`, `pds_controller` and `channel_sequencer`. `vco_adc` and
`ecg_adc_top` are structural but include the behavioural models. For silicon, those models
are replaced by the real oscillator, delay line and switches, and the windows need
glitch-free layout.

## How far to trust it, and where it departs from the original

The following follow the original design: the block structure, the counter width, the
oscillator range, the delay values, the double sampling and its decision rule, the gated
flip-flops, DISABLE, the PDS estimation/decision/scaling, the 8 + 2 multi-channel frame and
N = 4.

The following are this implementation's own choices:

* **The exact tap sequence** of the sampling event, the counter clear at d3 and all resets.
* **The DEL-SP rate.** It is set to 2·N times the output rate (8 kHz for N = 4). This matches
  the chosen operating point of the original (F_DEL = 8 kHz at 1 kHz output, 53 % power
  saving), although one description of the mode quotes 16×.
* **Interval-based sampling.** The converter always samples at the DEL-SP clock, and the
  controller adds up eight interval counts. The original samples the full-period count
  directly. Both give the same count, apart from 7 extra 14 ns stops per period (0.08 % of
  the count, a gain error common to both inputs).
* **Microvolt codes stand in for analog voltages** on the ports.
* The oscillator model is ideal: linear, with no jitter, no phase noise and no PVT variation.
  It also rounds each half period to a whole picosecond, so its rate can be off by up to
  4·10⁻⁵, about 0.2 counts per 125 µs interval. The delay line defaults to the typical corner.
  So no ENOB, SNDR or power figures can be derived from these simulations.

Not included: the instrumentation amplifier and anti-aliasing filter in front of the
converter, and the alternative dynamic-sampling schemes (data-compression PDS, fixed-rate and
variable-rate schemes), which were only compared against this one.
