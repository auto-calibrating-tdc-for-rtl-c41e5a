# Auto-calibrating tapped-delay-line TDC

A time-to-digital converter (TDC) for FPGAs. It gives each rising input edge a
timestamp in steps of a few tens of picoseconds. The reference clock is 400 MHz
(2.5 ns period). A 32-bit counter provides the coarse time. Within one clock
period, the edge's position is measured by how far it has rippled along a
128-cell carry chain when the clock samples the chain.

Carry-chain cells have uneven delays, and those delays drift with temperature
and supply voltage. So each channel converts its raw cell count through its own
look-up table (LUT). The table is rebuilt from time to time by a *code density
test*:

- The inputs are switched to a free-running on-chip oscillator that is not
  locked to the clock.
- The processor histograms the raw codes.
- Each bin's share of the hits is that cell's share of the 2.5 ns period.

The histogram, the table arithmetic and the recalibration timer run as software
on the processor of a SoC-FPGA. A behavioural model of that software,
`tb/cpu_model.sv`, is included for simulation. The table uses 10 bits, so the
timestamp LSB is 2.5 ns / 1024 ≈ 2.44 ps. Real precision is set by the cell
delay, about 25 ps.

The default build has 64 channels, one event stream to the processor, and a
pipeline that accepts one hit per clock per channel.

## Block map

```
             hit_in[N_CH] ──┐
 free_oscillator ── osc ───►│ input_select ── cal_mode (2-FF synchronised cal_req)
                            │   line_in[i] = cal_mode ? osc : hit_in[i]
                            ▼
   ┌──────────────── tdc_channel (one per input) ────────────────────┐
   │ delay_line ─ therm[126:0] ─► wallace_encoder ─ code ─► calib_lut │
   │ (carry chain + snapshot        (ones counter,          (127x10)  │
   │  register + edge detect)        6 stages)                │       │
   │                                         coarse_timestamp ◄┘      │
   └────────────────────────────────── out_event {cal, code, ts} ─────┘
                            │          ▲ count (coarse_counter, shared)
                            ▼
                 daq: holding register per channel, round-robin arbiter,
                      FIFO, drop and reject counters ──► ev_valid/ev_word
```

| file | role |
|---|---|
| `rtl/tdc_pkg.sv` | widths, `tdc_event_t`, `daq_word_t` |
| `rtl/carry_chain.sv` | synthesizable 128-bit ripple adder with simulation delays per cell |
| `rtl/carry_chain_model.sv` | behavioural timing model of the same chain (fast simulation) |
| `rtl/delay_line.sv` | chain + sampling register + new-hit / overflow detection |
| `rtl/wallace_encoder.sv` | pipelined ones counter, 127 inputs to 7 bits |
| `rtl/calib_lut.sv` | 127 × 10-bit table, processor write port, registered read |
| `rtl/coarse_counter.sv` | 32-bit free-running counter |
| `rtl/coarse_timestamp.sv` | joins the coarse count and the fine time into a 42-bit timestamp |
| `rtl/tdc_channel.sv` | one channel: the four blocks above in a pipeline |
| `rtl/free_oscillator.sv` | behavioural model of the ring oscillator used for calibration |
| `rtl/input_select.sv` | calibration/acquisition input multiplexer |
| `rtl/sync_fifo.sv`, `rtl/daq.sv` | event collection into one stream |
| `rtl/tdc_top.sv` | top level |

## The delay line

The chain is the carry path of an adder computing `A + B + cin`, where
A = all ones, B = all zeros and the carry-in is the hit. At rest every sum bit is
1. When the hit rises, the carry ripples upward, and each cell's sum bit falls
to 0 as the carry passes it. Every clock edge, the 128 sum bits are registered.
After inverting, cells 0..k read 1, where k is the last cell reached before the
edge: a thermometer code.

Mean cell delay is about 25 ps, so one 2.5 ns period spans about 100 cells. The
128-cell chain leaves margin.

- **Overflow.** Cell 127 is not encoded. If a snapshot shows it already
  traversed, the edge arrived more than the chain length before the clock edge.
  The hit is discarded and counted (`reject_count`).
- **New-hit detection.** A hit is reported when cell 0 is traversed in this
  snapshot but was not in the previous one.
  - This is this design's rule. It makes a long input level produce one event,
    not one per clock.
  - Consequences for the input signal:
    - it must still be high at the sampling edge that measures it;
    - it must be low at one sampling edge before the next hit;
    - the low time must be at least about 3.4 ns (the time for the chain to
      empty), or the next snapshot still shows part of the previous carry.
  - So a channel takes one hit per two clock periods at most. The fully
    pipelined back end itself accepts one per clock.

**Cell delay model (simulation only).** Cell i delays the carry by
`d + p_i`, and its sum output has an extra skew `c_i`:

- `d` = `D_PS` = 24 ps.
- `p_i` = `LAB_PS` = 25 ps after every 20th cell. It models the slower hop
  between logic blocks, which makes periodic wide bins.
- `c_i` = 0..`SKEW_PS` ps, pseudo-random per cell from a hash of the cell index
  and `SEED`. It stands for unequal clock and routing skew to the sampling
  flip-flops.

The mean is about 25.25 ps, so about 99 codes are active. Each channel gets a
different `SEED`. These numbers are this design's choice, made to reproduce a
chain of about 100 active cells with periodic wide bins. Temperature drift is not
modelled.

**Two chain models.**

- `carry_chain` is the synthesizable adder. Its `#` delays sit on continuous
  assignments and are ignored by synthesis.
- `carry_chain_model` produces the same sum waveform. It precomputes each cell's
  switching time and updates the bits from a single process. This simulates
  about two orders of magnitude faster.
- `delay_line` picks the model with `TIMING_MODEL`: 1 (the default) for
  simulation, 0 for the adder.

**For synthesis, set `TIMING_MODEL = 0`** (a parameter of the top, passed down
through each channel to its delay line). On a real device, the adder must also be placed as
one contiguous carry chain, with each sum bit registered in its own logic
element. That takes vendor placement constraints, which are not part of this
RTL. `tb_delay_line` runs both models side by side and compares them cycle by
cycle.

## The encoder

The thermometer code (bits 0..126) is converted to a count of ones, not to the
position of the highest one. A counter tolerates "bubbles": isolated wrong bits
caused by skew between cells.

The counter is a tree built recursively:

- Ones in 2^m − 1 bits = ones(left 2^(m−1) − 1 bits) + ones(right 2^(m−1) − 1
  bits) + one spare bit used as the carry-in.
- For 127 inputs this is six levels of ripple adders:
  - level 1: 32 adders of 1 bit;
  - level 2: 16 of 2 bits;
  - …
  - level 6: one adder of 6 bits.
- Level 1 takes input bits 0..63 in pairs. Level j takes its carry-in bits from
  offset 2^7 − 2^(7−j).

Every level is registered: 6 cycles of latency, one new code per cycle. A
sideband (`in_side`/`out_side`) carries the mode tag alongside the code. Code 0
never leaves the encoder with a valid hit, because cell 0 is always traversed for
a reported hit.

## Calibration and the table convention

The table converts code n (1..127) into the fine time F(n) in units of
T/1024, T = 2.5 ns. F(n) is the time between the edge's arrival and the sampling
clock edge.

The processor builds the table from a code histogram h taken with the oscillator
as input:

```
F(n) = round(1024 * (h[1] + ... + h[n]) / (h[1] + ... + h[127]))   (saturated to 1023)
```

This is the running sum of the bin widths, each width being that bin's share of
the hits times T. So F(n) is the *upper* edge of bin n, not its centre. Errors
therefore come out slightly negative on average: about −12 ps, half a bin.
Adding half of bin n's width would centre them; the included processor model
does not. Before the first calibration, the table holds the nominal value
`n * 1024 / 128`.

Table writes use the `lut_we / lut_ch / lut_addr / lut_wdata` port, one entry per
clock. `lut_addr` = n − 1.

Calibration sequence, as in `tb/cpu_model.sv`:

1. Raise `cal_req`. After two clock edges `cal_mode` is 1 and every channel
   sees the oscillator.
2. Collect raw codes. Events with `cal = 1` carry the code.
3. When each channel has enough codes, drop `cal_req`. Wait for the pipeline to
   drain, compute the tables and write them.

Channels are unavailable for acquisition while calibrating.

**Oscillator period rule.** The histogram is only unbiased if every oscillator
edge that gets sampled also reaches the processor. All channels see the same
edge in the same clock cycle. The DAQ drains one word per cycle, so N_CH words
need N_CH cycles.

If the next edge arrives sooner, whether a channel's word is dropped depends on
where in the cycle the edge landed, and that skews the histogram. Hence:

- The oscillator period must be longer than N_CH clock periods.
- The fractional part of period/T should be irrational-looking, so edges sweep
  the clock phase evenly.

The default is 171.545 ns = 68.618 T, with up to 400 ps of random jitter per half
period, for 64 channels. With 2500 codes per channel, a calibration takes about
0.43 ms.

## Timestamps

Channel pipeline for a hit sampled at clock edge k:

| edge | stage |
|---|---|
| k | chain snapshot |
| k+1 | new-hit / overflow flags, thermometer |
| k+2 … k+7 | encoder |
| k+8 | table read |
| k+9 | timestamp out |

The timestamp is

```
ts[41:0] = {count_at_edge_k, 10'b0} - F(code)
count_at_edge_k = count_now - 8      (recomputed from the shared counter, not carried)
```

It is in units of T/1024, counted from counter reset, and wraps with the 32-bit
counter (about 10.7 s). Each event also carries the raw code and the mode bit
(`tdc_event_t`). In calibration mode, the code is what matters.

The document concatenates coarse and fine parts. Here the fine part is
subtracted instead, because it measures time *before* the sampling edge. The two
are equivalent up to the sign convention of the table.

## DAQ

Each channel has a one-entry holding register. A round-robin arbiter moves one
pending entry per cycle into a FIFO (default 256 words) of `daq_word_t`:

| field | bits |
|---|---|
| `cal` | 1 |
| `ch` | 6 |
| `code` | 7 |
| `ts` | 42 |

The arbiter starts its search after the last channel granted.

- **Output.** The FIFO is first-word-fall-through, with a valid/ready handshake
  (`ev_valid`, `ev_ready`, `ev_word`).
- **Back-pressure.** When the FIFO is full, nothing is granted.
- **Drops.** If a channel's holding register is still occupied when its next
  event arrives, the new event is lost and `drop_count` increments.
- **Rejects.** Overflowed hits are counted in `reject_count`.

Latency: a channel event leaves the channel after edge k+9 and is in the FIFO
after edge k+11 if granted at once.

The DAQ's structure is this design's own. The document only says that events are
passed to the processor.

## What follows the document and what does not

Follows the document:

- 400 MHz clock and 32-bit coarse counter.
- 128-cell adder-based delay line, with the last cell used for rejection.
- Registered adder outputs.
- Pipelined full-adder ones counter (127 → 7 bits).
- 10-bit calibrated fine time.
- One 1270-bit table per channel.
- Calibration by code density with a free oscillator, inputs redirected during
  calibration, processor-computed running sums.
- 64 channels with a shared oscillator and coarse clock.
- One clock of pipeline initiation interval.

This design's choices:

- Hit detection by edge, with the input rules above. The minimum spacing of two
  hits on one channel is therefore two clock periods, not the 2.5 ns dead time
  the document states.
- Cell delay numbers and the simulation timing model.
- The oscillator's period, jitter and the period rule.
- Mode synchroniser, table port, reset values and the initial table.
- Timestamp formed by subtraction; coarse count recovered from the counter and
  the fixed latency.
- The whole DAQ: holding registers, arbiter, FIFO, word format and counters.

Not included:

- The PLL.
- Input pads.
- The processor software. Only its behavioural model in `tb/` is included.
- Calibration from acquisition data without leaving acquisition mode. It is
  possible when the hit rate is high enough, and would be processor software
  only: every acquisition word already carries its raw code.
- Placement constraints.
- Temperature effects.
- The document's test-bench hardware: the phase-shifted clock and the detector
  front end.

## Accuracy in simulation

These results use the modelled chain. They are not measurements of a device.

- **`tb_tdc_top`** (4 channels): 14 input phases 182.482 ps apart over one
  period, 20 hits each, after a calibration with 2500 codes per channel.
  - Mean error per phase: within about 36 ps, typically −10 to −30 ps. Errors
    are negative because of the upper-bin-edge convention.
  - Individual errors: within −60 … +25 ps.
  - A 730 ps gap between two channels is measured within ±60 ps.
- **`tb_tdc_top_full`** (all 64 channels, defaults): 100 active codes per channel
  and a worst single error of about 56 ps.
- The document reports mean errors below 15 ps on hardware. Here the 8 ps
  per-cell skew and the bin-edge convention give a larger offset.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_tdc_top \
    -y rtl -y tb +libext+.sv rtl/tdc_pkg.sv tb/tb_tdc_top.sv
./obj_dir/Vtb_tdc_top
```

Replace `tb_tdc_top` with any testbench in `tb/`.

| testbench | what it covers | run time |
|---|---|---|
| `tb_tdc_top` | 4 channels end to end; counts every mechanism (mode switch, table load, FIFO full, drop, several channels pending, reject) and fails if one never happened | ~1 s |
| `tb_tdc_top_full` | the top with every parameter at its default: calibration of 64 channels, then 8 rounds of hits on all of them | ~30 s |
| `tb_tdc_channel` | one channel: latency of 9 cycles, timestamps against a random table, counter wrap | |
| `tb_delay_line` | code vs. arrival time, edge rules, overflow, both chain models agree | |
| `tb_wallace_encoder` | thermometer codes with bubbles and random vectors into a 127- and a 15-input encoder, 6-cycle latency | |
| `tb_daq` | 2-cycle latency, round-robin order, back-pressure, drops, rejects, random scoreboard | |
| others | one per block | |

A testbench that shortens the simulation does so through the top's parameters:

- fewer channels;
- a shorter oscillator period, still above N_CH clocks;
- a faster chain to force overflows.
