# Digitizer with on-line pulse analysis for nuclear detector signals

Each channel of a detector array (scintillators, silicon or gas detectors) is
sampled continuously at 125 MSamples/s with 12 bits. Instead of shipping
whole waveforms to the acquisition computer, every channel analyses its own
pulse: it takes a baseline from the samples just before the trigger,
reproduces a classic analog semi-Gaussian shaper digitally, and reports a
few numbers per event. For CsI(Tl) detectors these are a "slow" amplitude
(shaper peaking after a few µs) and a "fast" amplitude (700 ns shaper),
whose correlation separates hydrogen and helium isotopes
(pulse-shape discrimination). Once every 256 events the complete waveform is
kept as well, to monitor the system.

The original instrument is a VME mother-board with up to eight plug-in
channel boards. Each channel has an ADC, a FIFO and a DSP processor running
the analysis in software. This RTL does the same work in dedicated logic.
The sequencing, the filter equation and the published filter coefficients
come from the original. The DSP program becomes a state machine plus a fixed
filter pipeline.

```
             per channel (x N_CH)                                   board
 ADC ──► pretrigger_fifo ──► channel_sequencer ──► boxcar_decimator ─┬► iir_shaper (slow) ─► peak_finder ─┐
 (clk_adc)   ▲   (dual clock)   │   ▲        (samples - baseline)   └► iir_shaper (fast) ─► peak_finder ─┤
             │                  │   └───────── amplitudes ◄──────────────────────────────────────────────┘
 comparators, triggers ─► trigger_logic         ▼
                  ▲ arm              event_memory ◄─── readout_controller ◄──► host port (VME / FAIR)
                  └──── sequencer                            │
                                                    multi_event_fifo (FAIR mode)
```

## Files

| file | content |
|---|---|
| `rtl/digitizer_pkg.sv` | shared sizes, status enum, register map, settings struct and reset values |
| `rtl/digitizer_board.sv` | top level: N_CH channels, readout controller, multi-event FIFO |
| `rtl/digitizer_channel.sv` | one channel: wiring of everything below |
| `rtl/trigger_logic.sv` | trigger source selection, arming |
| `rtl/pretrigger_fifo.sv` | 8192-sample dual-clock FIFO with circular pre-trigger buffer |
| `rtl/channel_sequencer.sv` | event flow state machine, baseline, event record |
| `rtl/boxcar_decimator.sv` | moving average and decimation by 16 |
| `rtl/iir_shaper.sv` | 3-pole, 1-zero shaping filter |
| `rtl/peak_finder.sv` | amplitude (maximum) and its position |
| `rtl/event_memory.sv` | per-channel record memory, 16384 x 32 bit |
| `rtl/channel_regs.sv` | slow-control settings |
| `rtl/readout_controller.sv` | host port, status, VME-style access and FAIR event builder |
| `rtl/multi_event_fifo.sv` | 32-bit board FIFO for FAIR mode |
| `rtl/sync_bit.sv` | two-flop synchronizer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_shaper_workload.sv` | one channel on rise-time-sweep and scintillator pulses |

## The pre-trigger FIFO

This is the subtle part of a channel. The ADC writes one sample every
8 ns whether or not anything happens. While the channel waits, the FIFO
keeps only the newest `pre_len` samples (default 512, about 4 µs). It does
so with two pointers in the ADC clock domain. `wptr` advances on every
sample. `base` marks the oldest sample still kept, and it advances together
with `wptr` once `pre_len` samples are held. The oldest sample is therefore
dropped on each write, and the FIFO's first locations behave as a ring.

A trigger is accepted only while the ring is full (`accepting`). The trigger
logic uses this signal, so the first `pre_len` samples of every event
always come from before the trigger. On acceptance `base` freezes and
writing continues until the FIFO holds 8192 samples counted from `base`. It
then stops. The trigger sample itself is sample number `pre_len`.

The reader (processing clock, nominally 80 MHz) learns of the event through
a toggle flag passed through a two-flop synchronizer. It then copies `base`
into its read pointer. This is safe because `base` cannot change after the
toggle. The write pointer crosses to the reader in Gray code, so "empty" is
correct across the clocks, and the reader can start while the FIFO is
still filling. The reader's `restart` pulse crosses back as a toggle. It puts
the write side into ring mode with an empty ring. A new trigger is therefore
possible only after `pre_len` fresh samples.

## Event flow

`channel_sequencer` follows the flow of the original DSP program. All
counts are in samples.

1. **INIT**: arm the trigger, then go to **IDLE**.
2. **IDLE**: the status is *idle*. Wait for `event_ready` from the FIFO.
3. **BASE**: read `2**base_log2` samples (default 256, 2 µs) and sum them.
   The default takes the oldest half of the 512-sample ring, so a pulse
   whose start is a few samples ahead of its trigger does not bias the
   baseline.
4. **VALID**: the baseline is the rounded mean. The external `validation`
   input is sampled once. If it is low, go to **REJECT**: restart the FIFO,
   wait until the event has gone, re-arm, and return to IDLE (`reject_no`
   counts these events).
5. **SIGNAL**: read `n_sig` more samples (default 7936, the rest of the
   FIFO). Each sample minus the baseline goes to the shaping chain. After
   `tr_start` signal samples (0 = never), `tr_select` moves the ADC input
   switch to the common time-reference signal. The reference then follows
   the pulse in the same record.
6. **RESTART**: restart baseline sampling (the FIFO goes back to ring mode).
   **ANALYSIS**: wait 4 clocks for the pipeline. **OUTPUT**: write the
   record header.
7. **WAIT_RO**: the status is *waiting for readout*. An IRQ1 from the board
   re-arms the trigger and returns to IDLE. The trigger stays disarmed
   until then, so no event can overwrite a record that has not been read.

FIFO reads are issued back to back. An 8192-sample event is read in about
8200 processing clocks (about 100 µs at 80 MHz). `lev2_trig` is high from
validation to the end of OUTPUT.

### Event record (32-bit words in `event_memory`)

| word | content |
|---|---|
| 0 | `{event number[15:0], record length in words[15:0]}` |
| 1 | `{trigger sources[3:0], 3'b0, raw flag, 12'b0, baseline[11:0]}` |
| 2 | slow-shaper amplitude, signed, 12 fraction bits |
| 3 | fast-shaper amplitude, signed, 12 fraction bits |
| 4 | `{slow peak index[15:0], fast peak index[15:0]}` (in 128 ns steps after the baseline) |
| 5.. | raw event only: every sample read (baseline first), one 12-bit sample per word |

Only validated events get numbers. Events 0, 256, 512, … are raw events.
An amplitude is in units of the 16-sample sum. Divide it by 16 × 4096 to get
ADC counts times the shaper gain. The trigger-source bits are
{comp2, comp1, mother-board ECL, front}.

## Shaping chain

**Decimation.** `boxcar_decimator` adds 16 consecutive baseline-subtracted
samples and emits their sum every 16th sample. The result is a 17-bit
signal with a 128 ns period, equal to the mean with four extra bits. A
moving average that is read only every 16th sample is the same thing as
this block sum. That equivalence is the basis of this implementation.

**Filter.** `iir_shaper` evaluates

```
y[n] = b0·x[n] + b1·x[n-1] + a1·y[n-1] + a2·y[n-2] + a3·y[n-3]
H(z) = (b0 + b1 z^-1) / (1 - a1 z^-1 - a2 z^-2 - a3 z^-3)
```

The coefficients are 16-bit signed integers with fixed binary points. The
`b`s have 21 fraction bits (`B_FRAC`). The `a`s have 13 fraction bits
(`A_FRAC`, range ±4). The state and output are 32-bit with 12 fraction
bits. All five products are summed exactly in 64 bits, rounded once and
saturated. This gives one result per clock, far below the 128 ns input
period.

| coefficient | value | integer | source |
|---|---|---|---|
| b0 | 7.86560e-3 | 16495 / 2^21 | original design |
| b1 | -7.86920e-3 | -16503 / 2^21 | original design |
| a1 | 2.88372 | 23623 / 2^13 | original design |
| a2 | -2.77450 | -22729 / 2^13 | original design |
| a3 | 0.890625 | 7296 / 2^13 | **chosen here** |

The value of a3 is this design's own. A stable filter needs
`a3 < 1 - a1 - a2 = 0.89078`. The chosen 0.890625 puts a real pole near 0.94
and a complex pair near 0.975. b0 + b1 is almost zero, so the zero sits
practically at z = 1. That zero acts as the differentiating (CR) stage, and
the three poles integrate. With these values the step response peaks 31
samples (about 4 µs) after the step, with a gain of 0.91. The original
shaper is quoted with a peaking time of about 6 µs for real detector
pulses. Treat amplitudes and peak times from this filter as close to the
original, not identical to it. The poles lie close to the unit circle, so
the response is sensitive to the coefficients. Rounding a1 and a2 to
16 bits alone changes the step gain by about 7 %. For a better match,
change the parameters `A1`…`A3`, `B0`, `B1` and `B_FRAC`/`A_FRAC`.

On preamplifier-like pulses the slow shaper peaks 3.9 µs after the pulse
starts for a 50 ns rise, and 6.7 µs after it for a 5 µs rise. Its amplitude
stays within 0.2 % up to a 1 µs rise and is 14 % lower at 5 µs
(`tb_shaper_workload`).

**Fast shaper.** It is a second `iir_shaper` on the same decimated stream.
Its coefficients are this design's own, because the original gives only
the time constant, 700 ns. It has three equal poles at `exp(-128/700)`
(a1 = 20469, a2 = -17048, a3 = 4733 with 13 fraction bits), the same
zero ratio as the slow shaper, and a step gain of about 1
(b0 = 24760, b1 = -24771 with 18 fraction bits). It peaks about 1.2 µs
after a step.

**Fast/slow discrimination.** A CsI(Tl) pulse is the sum of a fast and a
slow light component. Their mixture depends on the particle type, so the
ratio A_f/A_s of the two amplitudes separates particles. With scintillator-like
test pulses (0.7 µs and 3.2 µs components) the ratio is 0.827 for 35 % fast
light and 0.894 for 60 %. It does not depend on the pulse height. The
amplitudes are kept as they are, and any combination such as
A_s − f·A_f is left to the analysis program.

**Amplitudes.** `peak_finder` keeps the maximum of each shaper output and
the index of its first occurrence.

## Mother-board and readout

`readout_controller` turns a simple synchronous host port into the
channels' local bus. A request is `host_req`, `host_we`, `host_addr` and
`host_wdata`. The answer is `host_ack`/`host_rdata` one clock later.
Addresses are 32-bit word addresses: `{board bit, channel[2:0], offset[13:0]}`.

| space | access | offset | meaning |
|---|---|---|---|
| channel | read | 0 … 16383 | event memory word (VME mode; reads return 0 in FAIR mode) |
| channel | write | 0 … 7 | slow-control register (below) |
| channel | write | 256 | IRQ1: record read, re-arm the channel |
| board | read | 0 | status of all channels, 2 bits each, channel 0 lowest (0 idle, 1 analyzing, 2 waiting for readout) |
| board | read | 1 | pop one word from the multi-event FIFO |
| board | read | 2 | multi-event FIFO word count |
| board | read | 3 | `{mode_fair, 15'b0, slow-control pending bits}` |

**VME mode** (`mode_fair = 0`, a jumper on the real board). The host polls
the status word, reads the records of the waiting channels and writes IRQ1
to each channel.

**FAIR mode** (`mode_fair = 1`). A builder scans the channels in turn. For
each channel waiting for readout it reads the record length, pushes a board
header `{4'hE, channel[3:0], 8'h00, length[15:0]}` and then the whole
record into `multi_event_fifo` (32 bit, 4096 words). It then sends IRQ1
itself. A raw record (8197 words) is larger than the FIFO. The builder then
stalls word by word until the host drains the FIFO, and nothing is lost.
The host only pops the FIFO.

The VME and FAIR bus protocols are not implemented. The host port is where
either bus interface would attach.

### Slow-control registers (per channel)

| addr | name | reset | meaning |
|---|---|---|---|
| 0 | GAIN | 128 | input amplifier gain code (1…255) |
| 1 | THR_LOW | 32 | low-threshold comparator DAC code |
| 2 | THR_HIGH | 255 | high-threshold comparator DAC code |
| 3 | TRIG_MASK | 4'b1111 | enabled trigger sources {comp2, comp1, ECL, front} |
| 4 | PRE_LEN | 512 | ring length in samples (must be < 8192) |
| 5 | BASE_LOG2 | 8 | baseline length = 2^value samples |
| 6 | N_SIG | 7936 | samples read after the baseline (total clipped to 8192) |
| 7 | TR_START | 0 | signal samples before switching to the time reference (0 = never) |

A write is parked in the channel and takes effect when the channel is idle
or waiting for readout, never in the middle of an event. Bit
`slow-control pending` shows a parked write. A channel holds one parked
write. Writes to an idle channel, or to one waiting for readout, are
applied one per clock and may come back to back. During an event a second
write replaces the first, so the host should wait until the pending bit
clears. Change PRE_LEN only while the channel is not armed, for example while
it waits for readout.

## Clocks, resets, interfaces

* `clk_adc[c]`: one ADC clock per channel (125 MHz nominal). It clocks the
  trigger logic and the FIFO write side.
* `clk_sys`: one clock for all processing logic and the board (80 MHz
  nominal). The original local bus is asynchronous to the processors. Here
  it is synchronous to `clk_sys`.
* Resets are active low and asynchronous: `rst_adc_n[c]` per ADC domain,
  `rst_sys_n` for the rest.
* Asynchronous inputs (trigger lines, comparators, validation) pass through
  two-flop synchronizers. A trigger reaches the FIFO 3 ADC clocks after the
  input edge.
* The analog parts stay outside the logic: the programmable-gain amplifier,
  the anti-aliasing filter, the input switch, the CR-RC shaping, the
  comparators, the DACs and the ADC. Their digital interfaces are ports:
  `adc_data`, `comp1`, `comp2`, `gain_code`, `thr_*_code` and `tr_select`.

## How far to trust it, and where it departs

Verified by simulation:
* FIFO ordering and ring length across two unrelated clocks.
* Trigger acceptance and arming.
* The decimator sums.
* Both shapers against floating-point references, for step-like pulses
  with rise times from 50 ns to 5 µs and for scintillator-like pulses.
* Baseline, raw records and headers.
* Reject handling and slow-control timing.
* Readout in both modes, including a full multi-event FIFO.
* An eight-channel board at full size.

Not verified:
* Timing closure at 125 MHz and 80 MHz. The filter forms five 32 × 16-bit
  products and a 64-bit sum in one clock. It may need a pipeline stage on
  a slow device, and its 128 ns input period leaves room for one.
* Clock crossings under real jitter. Simulation uses fixed clock ratios
  only.
* Agreement with the analog shaper of the real set-up. Only the filter
  equation and coefficients are shared with it.

Departures from the original, and choices made here:
* The DSP program is replaced by fixed logic. The analysis is exactly the
  baseline, decimation, two shapers and two maxima. Other routines of the
  original (constant-fraction timing, gated integration, time extraction
  against the time reference) are not included.
* The a3 coefficient, the fast-shaper coefficients and the coefficient
  binary points are chosen here (see above). The slow shaper peaks at about
  4 µs against the original's roughly 6 µs.
* The original computes the filter in software. Decimation lets it finish in
  about 50 µs. Here the filter runs as the samples are read, so an event is
  done once the FIFO has been read (about 100 µs for 8192 samples at
  80 MHz, limited by one read per clock).
* The moving average before decimation is taken as 16 samples long, the
  same as the decimation factor.
* The validation signal is sampled once, right after the baseline.
* The time-reference switch is driven by a count of samples read, not by
  a time.
* The meaning of `lev2_trig` is this design's.
* The record layout, the register map, the board address map, the FAIR
  header word, the multi-event FIFO depth and the event memory size are
  this design's.
* VME and FAIR protocols are not modelled. The board is synchronous to one
  processing clock.
* The trigger is accepted only when the ring is full. The FIFO does not
  stream: an event is at most 8192 samples.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/digitizer_pkg.sv tb/tb_digitizer_board.sv --top-module tb_digitizer_board
./obj_dir/Vtb_digitizer_board
```

Swap in any other `tb_<module>` for a unit test. `-y rtl` lets Verilator
find the modules by file name.

| testbench | what it does |
|---|---|
| `tb_digitizer_board` | 8 channels at full size. Phase 1 (FAIR mode): a raw event on every channel, with each channel triggered by a different source and the comparators modelled from the pulse; the multi-event FIFO fills and stalls the builder. Phase 2 (VME mode): one event per channel, read over the host port; a pulse during wait-for-readout is ignored; an event without validation is dropped; the time-reference switch operates. It checks that amplitude/pulse-height ratios agree within 2 % and counts every mechanism. It runs in a few seconds. |
| `tb_digitizer_channel` | One channel at full size. It recomputes baseline, decimation and both shapers in floating point from the raw record and compares them with the hardware amplitudes, checks the pre-trigger position, amplitude linearity, the reject path, slow-control timing, the TR switch and a longer circular buffer. |
| `tb_shaper_workload` | One channel driven with detector-like pulses of 50 ns to 5 µs rise time, then with CsI(Tl)-like pulses of two different fast/slow light mixtures. It checks the peaking times, the amplitude loss for slow rise, and that the fast/slow amplitude ratio separates the two pulse types. |
| `tb_pretrigger_fifo`, `tb_trigger_logic`, `tb_channel_sequencer`, `tb_boxcar_decimator`, `tb_iir_shaper`, `tb_peak_finder`, `tb_event_memory`, `tb_channel_regs`, `tb_multi_event_fifo`, `tb_readout_controller` | Unit tests with independent reference models. Some use reduced depths to reach corner cases quickly. |

## Changing it

* **Number of channels and FAIR buffer.** Set the `N_CH` (up to 8 with the
  3-bit channel field) and `MEF_DEPTH` parameters of `digitizer_board`.
* **Shaper response.** The slow shaper uses the defaults of `iir_shaper`.
  The fast one overrides them where `digitizer_channel` instantiates
  `u_fast`. A new filter needs the five integer coefficients and their
  binary points (`B_FRAC`, `A_FRAC`). Keep |a| < 4 for 13 fraction bits.
  Check stability before use: all roots of z³ − a1 z² − a2 z − a3 must lie
  inside the unit circle. `tb_iir_shaper` and the float models in the
  channel testbenches hold copies of the coefficients, so update them too.
* **FIFO and record sizes.** `FIFO_DEPTH`, `EVM_DEPTH`, `DECIM` and
  `RAW_EVERY` are in `digitizer_pkg`. The record must fit its memory:
  `EVM_DEPTH ≥ FIFO_DEPTH + 5`.
* **Per-run settings** (no rebuild): the circular-buffer length, baseline
  length, signal length, trigger sources, time-reference switch point,
  gain and thresholds are slow-control registers (see the table above).
