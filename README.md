# Three-channel interpolating time-interval counter: on-chip data processing

A time-interval counter timestamps input events, here the edges of up to three
clock signals under test, on one common time scale. The coarse part of each
timestamp comes from a period counter that counts periods of a 500 MHz
reference clock (T0 = 2 ns). The fine part comes from a per-channel
interpolator, which reports where in the current period the event fell as an
8-bit code number. The interpolator is very non-linear. Its 256 codes have
very different widths, and many codes are never produced. A raw code is
therefore useless until it goes through the interpolator's measured transfer
characteristic. Each input also adds its own delay (offset) of 1 to 1.6 ns.
That offset must be removed before timestamps from different inputs can be
compared.

This RTL does all of that processing in hardware, for three channels in
parallel:

* **Level 1**: timestamp = (period count) x T0 + Tfine, with Tfine looked up in
  a per-channel transfer table.
* **Level 2**: timestamp* = timestamp + per-channel offset word. The word is
  chosen by an environmental sensor reading.
* **Calibration**: a statistical code density test, run by a per-channel state
  machine. It builds the transfer table on chip.
* **Sorting**: the three streams are merged into one stream in time order. It
  is written, with the channel number, to an output RAM that a host empties.

Timestamps have 11 fraction bits per reference period, so one unit is
2000/2048 = 0.977 ps.

## Blocks and data flow

```
 ref clk --> period_counter --count--+------------------+------------------+
                                     |                  |                  |
 ip_hit/ip_code[0] --> tic_channel 0 |  tic_channel 1   |  tic_channel 2   |
                       (channel_register -> code_processor:                |
                        level 1: dpu1 + transfer_mem  <- cal_fsm + bin_width_mem
                        level 2: dpu2 + offset_mem    <- sensor_idx, ofs_*)
                                     |                  |                  |
                                   wr3/ts3            wr3/ts3            wr3/ts3
                                     +-------> ts_sorter (3 queues, merge) <+
                                                   |
                                        sync_fifo (output RAM) --> out_* (host)
```

| File | Role |
|---|---|
| `rtl/tic_pkg.sv` | Shared constants (3 channels, 8-bit codes, 11 fraction bits) and the calibration state type. |
| `rtl/period_counter.sv` | The common time scale. It is 32 bits wide, which covers 8.6 s at 2 ns per count. |
| `rtl/channel_register.sv` | Latches the period count and the code when a channel reports an event. |
| `rtl/dpu1.sv` | Level 1. Looks up the code in the transfer table and adds the result to count x 2048. |
| `rtl/transfer_mem.sv` | Per-channel transfer table: 256 words x 12 bits. |
| `rtl/cal_fsm.sv` | Code density calibration controller. |
| `rtl/bin_width_mem.sv` | Per-channel code histogram: 256 words x 22 bits. |
| `rtl/dpu2.sv` | Level 2. Adds the signed offset word. |
| `rtl/offset_mem.sv` | Per-channel offset table: 16 words x 16 bits, addressed by the sensor reading. |
| `rtl/code_processor.sv` | One channel's two processing levels with their memories and the calibration controller. |
| `rtl/tic_channel.sv` | The channel register plus the code processor. |
| `rtl/ts_sorter.sv` | Merges the three streams in chronological order. |
| `rtl/sync_fifo.sv` | First-word-fall-through buffer. It is used as the output RAM and as the sorter queues. |
| `rtl/tic_top.sv` | Top level. |

## Timestamp format

A timestamp is a `PCNT_W + 11` bit unsigned number, 43 bits by default:
`{period_count, fraction}`. Everything wraps modulo 2^43, as the period
counter does. Differences between timestamps must be taken modulo 2^43 and
read as signed. The sorter does this, so its ordering is correct across the
counter wrap as long as the timestamps being compared are less than half the
range (4.3 s) apart.

A transfer table word can equal a whole period, 2048. This happens for the
last occupied code. Level 1 therefore adds the 12-bit word to `{count, 11'b0}`
instead of concatenating it, and the carry moves the timestamp into the next
period.

## Calibration: the code density test

The interpolator's characteristic is measured with a calibrator: pulses that
are uncorrelated with the reference clock, so their fine times are uniformly
spread over the period. The number of hits each code receives is then
proportional to that code's width. `cal_fsm` runs three phases after
`cal_start`:

1. **Clear.** It writes zero to all 256 histogram words, one per cycle.
2. **Bin width evaluation.** For every hit it reads the histogram word of the
   code, adds one and writes it back in the same cycle. The histogram memory
   has a combinational read port for this reason. The phase ends after exactly
   2^`CAL_LOG2` hits, 2^21 = 2,097,152 by default. Word k divided by 2^21 is
   the width of bin k as a fraction of T0.
3. **Transfer function evaluation.** It steps through all 256 codes, keeps a
   running sum of the histogram words, and writes
   `TF[k] = round( sum_{j<=k} BW[j] / 2^(CAL_LOG2-11) )` into the transfer
   table.

Using a power-of-two hit count turns the normalisation into a shift. TF[k] is
the delay at the *end* of bin k, so the last populated code maps to a full
period. Using the bin centre instead would remove a systematic bias of half a
bin from each timestamp. That bias is common to START and STOP and mostly
cancels in intervals. Rounding is half up.

While a channel calibrates, its events feed the histogram and it produces no
timestamps. The other channels keep measuring. Calibration takes
256 + (number of cycles needed to collect 2^CAL_LOG2 hits) + 256 + 1 cycles.
Hits arriving during the clear and sum phases are ignored. Until its first
calibration, a channel uses a linear table, TF[k] = 8(k+1).

## Offset compensation and its sign

Each input delays its events by its own offset k_i. For example, 1.571, 1.175
and 0.939 ns were measured on one board. An interval from START on input a to
STOP on input b is therefore read as `t = t_true + k_b - k_a`. It is corrected
as `t* = t + k_a - k_b`. Level 2 does this per timestamp by adding the word in
the offset table, so **the table must hold -k_i** in units of T0/2048. For the
offsets above that is -1609, -1203 and -962.

The table has 16 words per channel, selected by `sensor_idx`. The idea is
that a temperature or voltage reading picks the matching set of offsets:
offsets move by up to about 200 ps between -10 and 60 °C. A new reading or a
newly written word applies to timestamps that reach level 2 two cycles later.

This design does not compute the offsets. They come from measuring a stable
reference interval in all six START/STOP input pairs, and are written through
the `ofs_*` port. A pair measurement fixes only the *differences* between the
offsets. Any common constant added to all three words shifts every timestamp
equally and leaves all intervals unchanged.

## Chronological sorting

Each channel's output is in time order, but the three channels are
independent. A later event on one channel can be reported before an earlier
event on another channel, for example when the earlier one came through an
input with a larger offset. `ts_sorter` gives each channel a 16-word queue.
Each cycle it releases the head of at most one queue. The head h of channel c
goes out when every other channel j satisfies one of two conditions:

* j's queue is not empty and h is earlier than j's head (equal timestamps go
  to the lower channel number), or
* j's queue is empty and h is earlier than the **watermark**
  `(now - GUARD) x T0`.

The watermark is the key to correctness. Any timestamp that has not yet
reached a queue comes from a period at most `PIPE_LAT` = 4 cycles old, and
its offset is at least -2^15 units (16 periods). Nothing still in flight can
therefore be earlier than the watermark, with
`GUARD = PIPE_LAT + 2^(OFS_W-1-11) + 1 = 21` periods. As a result, a lone
event on one channel is released about 21 cycles after it was hit.

An assertion in `ts_sorter` checks in simulation that the released stream
never goes back in time.

Two limitations:

* If a channel's offset word changes by more than the gap between two of its
  events, that channel's own stream can go out of order. Change `sensor_idx`
  between events.
* A queue that is full when a timestamp arrives loses that timestamp. The
  `overflow[c]` bit sticks. A queue can only fill when the output RAM is full.
  The sorter stalls then, because the host is not reading.

## Interface of `tic_top`

All signals are synchronous to `clk`, the reference clock. `rst_n` is an
asynchronous active-low reset.

| Port | Dir | Meaning |
|---|---|---|
| `tc_clear` | in | Restart the period counter at 0. |
| `period_count`, `pc_wrap` | out | Current count, and a pulse when it wraps. |
| `ip_hit[c]`, `ip_code[c]` | in | Event strobe and code of interpolator c. Assert `ip_hit` in the cycle whose count is the period that contains the event. |
| `cal_start[c]` | in | Start calibration of channel c. |
| `cal_busy[c]`, `cal_done[c]`, `cal_state[c]` | out | Calibration status. |
| `ofs_we`, `ofs_ch`, `ofs_addr`, `ofs_wdata` | in | Write word `ofs_addr` of channel `ofs_ch`'s offset table. |
| `sensor_idx` | in | Sensor reading: selects the offset word in use. |
| `out_valid`, `out_ch`, `out_ts` | out | Head of the output RAM: channel and timestamp*. |
| `out_pop` | in | Remove the head. |
| `out_level` | out | Words in the output RAM. |
| `overflow[c]` | out | Sticky: a timestamp of channel c was lost. |

**Latency.** An event reaches the sorter 4 cycles after `ip_hit`: 1 cycle in
the channel register, 2 in level 1 and 1 in level 2. Each channel accepts one
event per cycle. The sorter releases at most one timestamp per cycle in total.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `PCNT_W` | 32 | Period counter width. The range must exceed 1 s, which needs at least 29 bits. |
| `CAL_LOG2` | 21 | log2 of the number of calibration hits. It must exceed 11. |
| `OFS_AW`, `OFS_W` | 4, 16 | Offset table address and word width. |
| `QDEPTH` | 16 | Sorter queue depth per channel. |
| `OUT_DEPTH` | 1024 | Output RAM depth. |

The number of channels, the code width and the number of fraction bits are
package constants.

## What is outside this RTL

These parts have no RTL here. Their signals are ports of the top:

* **The interpolators.** They are delay-line time-to-digital converters,
  which depend on placement in the FPGA fabric.
* **The calibrator**, the stable reference-interval generator, and the
  temperature/voltage sensors and their read-out.
* **The link to the host computer.**
* **The calculation of the offsets** from the pair measurements.

The testbenches contain a behavioural interpolator model,
`tb/tb_interp_pkg.sv`. Each channel gets its own non-uniform bins, with
clusters of codes and gaps.

## Departures and design choices

These widths and mechanisms are this design's choices:

* period counter width;
* offset table size, and indexing it directly by the sensor reading;
* histogram word width;
* 12-bit transfer words;
* pipeline depths;
* queue and RAM depths;
* the watermark merge;
* dropping on overflow;
* one clock for everything.

In a real implementation at 2 ns per count, the processing would probably run
at a lower clock, with the count carried along. The channel register assumes
that the interpolator reports an event in the period it occurred. Any fixed
interpolator latency is the same on all channels and cancels in intervals.

The published offset equation is written as TS* = F(TS) + k, with the offset
added. The worked examples subtract each input's offset. This design adds a
stored word, and that word must be -k.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against values the testbench computes itself and has a cycle watchdog.
Each also prints `TB_RESULT checks=N failures=M`.

End to end, `tb_tic_top` runs the design at reduced size: a 16-bit counter,
2^12 calibration hits and a 32-word output RAM. `tb_tic_full` runs it at the
default parameters: 2^21 calibration hits per channel, about 2.1 M cycles, and
about 5 s in Verilator. Both tests:

* write the offset tables;
* calibrate all three channels with a common calibrator;
* measure a 4.8 ns interval 16 times in each of the six input pairs, with and
  without compensation;
* send random traffic, including event pairs whose hit order differs from
  their true order;
* hold the output RAM unread until the queues overflow.

Every delivered timestamp is checked bit-exactly against count x 2048 +
TF[code] + offset, where TF is computed from the testbench's own histograms.
The testbenches also check the following:

* The output is in time order.
* It contains every event except those reported dropped.
* Each mechanism happened at least once: calibration, counter wrap (reduced
  size only), sensor switch, reordering, watermark release, RAM-full stall
  and overflow.

Mean intervals from the full-size run, with input offsets of 1.571, 1.175 and
0.939 ns:

| START -> STOP | compensated t* | uncompensated t | expected t |
|---|---|---|---|
| 1 -> 2 | 4798.0 ps | 4400.4 ps | 4404 ps |
| 1 -> 3 | 4801.8 ps | 4169.2 ps | 4168 ps |
| 2 -> 1 | 4803.8 ps | 5196.9 ps | 5196 ps |
| 2 -> 3 | 4798.1 ps | 4565.6 ps | 4564 ps |
| 3 -> 1 | 4801.3 ps | 5429.7 ps | 5432 ps |
| 3 -> 2 | 4795.7 ps | 5041.7 ps | 5036 ps |

The remaining scatter of a few ps comes from the model's bin widths, which
are 10 to 30 ps, and from 16 samples per pair.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/tic_pkg.sv tb/tb_interp_pkg.sv rtl/*.sv tb/tb_tic_full.sv \
  --top-module tb_tic_full -Mdir obj_full
./obj_full/Vtb_tic_full
```

Use `tb/tb_tic_top.sv` with `--top-module tb_tic_top` for the quick reduced
run. The same pattern works for any block testbench, for example
`tb_cal_fsm` or `tb_ts_sorter`. Block testbenches that do not use the
interpolator model can leave out `tb/tb_interp_pkg.sv`.
