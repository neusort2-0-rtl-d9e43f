# A 16-channel spike-sorting front end that shares one processor between channels

Implantable neural recorders digitise many electrodes through one shared ADC:
the converter delivers one sample per clock, channel 1, 2, ..., 16, 1, 2, ...
A spike-sorting processor for one channel needs a sliding window of recent
samples of that channel, plus per-spike state that lives for many sample
periods. Putting 16 such processors side by side costs 16 times the
arithmetic. Running one processor on one channel at a time needs a large
memory to regroup the samples, and it loses cycles every time the
processor switches channel.

This design keeps one set of arithmetic units (detector, filter, feature
extractor) and moves all per-channel state into **systolic register
structures that rotate in step with the ADC's channel order**. In every clock
cycle the units therefore see exactly the data of the channel whose sample is
arriving, and switching channel costs nothing. Only the storage grows with the
number of channels; the arithmetic is shared.

At 40 kHz per channel and 16 channels the clock runs at 640 kHz, with one
sample per clock.

## Processing per sample

For the channel locked in the current cycle (the channel whose sample is on
`in_sample`), all of the following happens within one clock:

| step | unit | what it does |
|---|---|---|
| 1 | `systolic_input_buffer` | delivers the 39-sample window `w[0]` (arriving sample) .. `w[38]` (38 periods old) |
| 2 | `spike_detector` | computes the nonlinear energy psi(k) = w[k]^2 - w[k-1]·w[k+1] for k = 1..5 (newest 7 samples) and fires if psi(3) >= threshold and psi(3) is the peak of the five |
| 3 | `noise_shaping_filter` | 32-tap FIR: y = (Σ c[k]·w[7+k]) >>> 7, 16-bit result (band-pass; trained coefficients make it approximate the spike derivative) |
| 4 | `maxmin_detector` | updates the channel's feature record, which has just rotated out of `feature_buffer` |
| 5 | `feature_buffer` | takes the updated record back in at the top of its ring |
| 6 | `coder_packer` | if the record finished, registers the 68-bit spike word |

`coef_reg_array` holds the 32 coefficients and the threshold.
`system_control_unit` sequences the design and keeps the channel pointer.

## The two systolic buffers

**Input buffer.** The buffer has 16 rows and 38 columns of 9-bit registers,
wired as one 608-stage shift chain. Each column is 16 registers long. The
bottom register of column *j* feeds two places: the top of column *j+1*, and
the processing units. After a shift, the bottom of column *j* holds the sample
that entered 16·*j* shifts ago. That is the same channel as the arriving
sample, *j* sample periods earlier.

The window is therefore:
- `w[0]`: the sample arriving on the input;
- `w[1]`..`w[38]`: the 38 column bottoms.

Nothing is addressed and nothing is reloaded. In the next cycle the same
wires carry the next channel's window.

**Feature buffer.** The feature buffer is a ring of 16 one-channel records.
Each cycle the record of the channel just served is written at the top, and
every record moves down one place. The bottom record, written 16 cycles
earlier, is the record of the channel served now. It goes to the max/min
extractor, and the updated record goes back in at the top.

A record holds:
- an active flag;
- the sample count;
- the maximum and minimum and their positions;
- the timestamp.

The extractor therefore works on 16 overlapping spikes (one per channel)
with a single comparator pair.

Both buffers advance only on accepted samples (`run && in_valid`), so the
rotation never loses step with the channel order.

## Control sequence

- **CONFIG.** The design is in CONFIG after reset and whenever `run` is low.
  In this state:
  - the cfg port can program coefficients and threshold (it accepts writes at
    any time);
  - all feature records are cleared;
  - the channel pointer returns to channel 1.
- **PRELOAD.** When `run` is high, the first 39 × 16 = 624 accepted samples
  fill the input buffer. No detection happens yet.
- **RUN.** Every accepted sample is processed. There are no bubbles.

The `ts` timestamp counts completed rounds of 16 samples, which is the
per-channel sample index. It restarts at 0 with each run.

## Spike record life cycle and timing (per channel, in sample periods)

Take a spike whose peak sample arrives in round *n*:

1. **Round *n*+3: detection.** The peak sample is now at the centre of the
   7-sample NEO window. The record resets and stores timestamp *n*+3.
2. **Rounds *n*+4 .. *n*+35: tracking.** Each round, the next filtered sample
   of the channel updates the maximum and minimum. Ties keep the earlier
   position. Detections on this channel are ignored while it is being
   tracked.
3. **Round *n*+35: packing.** With the 32nd sample the record is finished.
   `out_valid` is high in the next clock, for one cycle.

At full rate, the output word appears **35 × 16 + 1 = 561 clocks** after the
peak sample (0.877 ms at 640 kHz). Stalls on `in_valid` stretch this
proportionally. At most one record finishes per clock, because only one
channel is served per clock, so the output needs no queue.

### Output word (68 bits, `spike_word_t`, MSB first)

| bits | field | meaning |
|---|---|---|
| 67:64 | `ch` | channel index, 0 = first channel after `run` |
| 63:48 | `ts` | timestamp of the detection (round counter) |
| 47:32 | `f3` | position of the minimum minus position of the maximum, in samples |
| 31:16 | `fmin` | minimum of the 32 filtered samples |
| 15:0 | `fmax` | maximum of the 32 filtered samples |

## Top-level ports (`neusort2_top`)

| port | dir | width | function |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `run` | in | 1 | 1 = process, 0 = stop / configure |
| `in_valid`, `in_sample` | in | 1, 9 | next sample (two's complement) in channel order |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 6, 16 | address 0..31: coefficient (low 9 bits, signed); address 32: threshold |
| `out_valid`, `out_word` | out | 1, 68 | spike word, valid for one clock |
| `state` | out | 2 | CONFIG / PRELOAD / RUN |
| `cur_ch` | out | 4 | channel served in this cycle |

The reset values are coefficients 0 and threshold 0xFFFF, so nothing is
detected until the threshold has been programmed.

## What is taken as given and what is a design choice

These parts follow the published architecture:
- 16 channels, 9-bit samples, the 39-sample window (7 detector samples, 32
  filter samples);
- 32 programmable 9-bit coefficients and a 16-bit threshold;
- the NEO detector, and max/min features over the 32 samples after a
  detection;
- the column-chained input buffer and the rotating 16-entry feature buffer;
- the 39 × 16-cycle preload, one channel per clock, the 68-bit output word.

These are this design's own choices, where the architecture leaves them open:
- **The NEO formula and the peak test.** The formula is the standard
  nonlinear energy operator. The peak test, tie rule and threshold
  comparison (unsigned 16-bit threshold against the signed 19-bit energy) are
  choices.
- **Filter arithmetic.** Tap order (coefficient 0 multiplies the newest of
  the filter's 32 samples), two's-complement arithmetic, and the >>> 7,
  16-bit output scaling. The scaling cannot overflow.
- **The third feature** (maximum-to-minimum distance), the 16-bit feature and
  timestamp widths, and the field order of the output word.
- **Overlapping spikes.** A detection that arrives while the channel is still
  being tracked is dropped.
- **Control and interfaces.** The `run`/`in_valid` handshake, the
  configuration address map, the reset values and the clearing of records on
  stop.

Known departures:
- **Latency.** The reference design quotes 41 sample periods (41 × 16 clocks,
  1.025 ms) from the peak to the last output. The split between stages is not
  published. This implementation's fixed alignment gives 561 clocks, about 35
  periods, which is within that budget but not equal to it.
- **Coefficient sharing.** One coefficient set and one threshold serve all
  channels. The reference block diagram labels the filter
  "channel-specified", but the accompanying description says the processing
  units are unchanged from the one-channel version. Per-channel coefficient
  sets would need a 16-entry coefficient store indexed by `cur_ch`.
- **Not included.** The shared analog front end (preamplifier, filter, ADC)
  and the host bus are not part of this RTL. They appear only as the sample
  and configuration ports.

## Files

The `rtl/` directory holds one unit per file:
- `neusort_pkg.sv`: constants, `feat_rec_t`, `spike_word_t`, `ctrl_state_t`;
- `neusort2_top.sv`: the top level;
- `systolic_input_buffer.sv`, `spike_detector.sv`, `noise_shaping_filter.sv`,
  `coef_reg_array.sv`, `maxmin_detector.sv`, `feature_buffer.sv`,
  `coder_packer.sv`, `system_control_unit.sv`: one file per unit.

Every module's parameters default to the sizes above. The structs are fixed by
the package constants.

The `tb/` directory holds one self-checking testbench per module,
`tb_<module>.sv`. Each one prints `TB_RESULT checks=N failures=M`.

`tb_neusort2_top` runs the whole design at full size (about 66 000 clocks,
under a second of simulation time):
- a 16-channel stimulus of noise plus injected spikes;
- full-rate operation, operation with random input stalls, then a stop,
  reprogramming and restart.

It compares every output cycle against an integer reference model. It checks
the 561-clock latency wherever no stall intervenes. It counts every mechanism:
preload, detection, sub-threshold peak, ignored overlapping detection, stall,
restart, configuration write, and an output from each channel.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/neusort_pkg.sv tb/tb_neusort2_top.sv --top-module tb_neusort2_top -o sim
./obj_dir/sim
```

Replace `tb_neusort2_top` with any other `tb_<module>` to test a single unit.
The package must come first on the command line. The RTL is synthesizable.
Multiplications are written as plain `*`, so a synthesis tool will build the
32-tap filter as 32 parallel multipliers and an adder tree.
