# Clockless data recovery and retransmission with a calibrated delay line

A serial receiver normally recovers a clock from the incoming data with a PLL
and samples the data with it. That PLL has to trade acquisition speed against
noise, loses the first bits while it locks, and adds its own jitter. This
design recovers the data **without recovering a clock**. The incoming bit
stream runs through a delay line ten bit periods long. On every rising edge of
the data itself, the whole line is read at once. Each tap is then in the
middle of one of the ten bits that came before that edge. Line codes such as
8B/10B (Fibre Channel) never send more than five equal bits in a row. So two
rising edges are never more than ten bits apart, and each read sees every bit
since the previous one. A small logic block drops the bits that the previous
read already saw. The new bits go into an elastic FIFO. A local oscillator
clocks them out again, and it is trimmed so the FIFO neither drains nor fills.

The delay line has to be accurate. Each of its cells is locked to a quarter
of the reference-clock period by a DLL. The DLL is calibrated in the
foreground and then put to sleep.

The defaults are those of 1.0625 Gbaud Fibre Channel: a bit period T of
941 ps, a 10 T line with T/4 taps (40 cells), and a ±100 ppm far-end clock.

```
 data_in ─┬─► vcdl: 40 cells of T/4 ─► tap[39:0] ─► sample_latch ─► purge_logic ─┬─► fifo_ram ─► retimer ─► retimed_data
          │   (all cells biased by the DLL code)   (10 mid-bit taps) (bits,count) │       ▲            ▲
          └─► read_pulse_gen: T/4 cell + gate ─► read_pulse ──────────────┐       └─► load_pointer     │
                                                                          latch / rd_done            │
 ref_clk ──► dll: 4 replica cells, phase detector, code counter, sleep ─► code, calibrated           │
 vco (trimmed) ──► retx_clk ──► retransmit_pointer, timing_sync (fill, trim, start/fault) ────────────┘
```

## One read, step by step

`tap[k]` is the input delayed by (k+1)·T/4. A read takes place at the instant
the data rises. At that instant the taps with delays (m+½)·T, m = 0…9, sit in
the centres of the ten preceding bits. These are `tap[4m+1]`. `sample_latch`
captures exactly those ten taps, so `smp[0]` is the bit just before the edge
and `smp[9]` the oldest. This is the same as sampling every stage half a bit
after the transition. Every bit is sampled in its centre, so a bit-boundary
error of up to ±T/2 is tolerated. This margin is relative to the edge that
triggered the read: only the jitter difference between two transitions at
most ten bits apart counts, never jitter accumulated over time.

`read_pulse_gen` passes the data through one more matched T/4 cell. It forms
`read_pulse = data AND NOT delayed(data)`, which is high for T/4 after each
rising edge and gives no pulse on falling edges. The samples are latched on
the pulse's rising edge. The pointer and memory are updated on its falling
edge, `rd_done`, so the purge logic has T/4 to settle.

### Purging redundant samples

Reads happen only on rising edges, so from oldest to newest a read looks like
`… 0 | 1…1 0…0`. The `0 | 1` boundary is the previous rising edge, and the
previous read has already stored everything before it. `purge_logic` searches
for the newest boundary: the smallest k with `smp[k]=1` and `smp[k+1]=0`. The
bits `smp[k] … smp[0]` are new, so count = k+1, between 2 and 10. If no
boundary is visible, all ten samples are new. This happens when the previous
edge has left the line, and also at the very first edge. In that case the ten
bits *before* the first transition are recovered too: there is no loss during
acquisition. Example, newest bit on the right:

```
samples (oldest→newest): 1 1 0 0 0 | 1 1 0 0 0     → count 5, bits 1 1 0 0 0
```

`bits[j]` is the j-th new bit in order of arrival. `load_pointer` adds
`count`, and `fifo_ram` stores `bits[0..count-1]` at
`load_ptr … load_ptr+count-1`. The FIFO is a 128 × 1-bit ring with a
10-bit-wide write port and a 1-bit read port.

## Crossing into the retransmit clock

The load side has no clock of its own: it is clocked by the data edges. The
retransmit side runs on the oscillator clock `retx_clk`. A pointer that can
jump by up to 10 cannot go through an ordinary Gray-code synchroniser.
`load_pointer` therefore also outputs `ptr / 16` in Gray code. That value
changes by at most one per read, because 10 ≤ 16, so it is safe to
synchronise. `timing_sync` passes it through two flip-flops and estimates the
fill as

```
fill = 16·coarse_load − retransmit_pointer   (signed, modulo 256)
```

This estimate is never above the true fill: it is low by less than 16 plus
the synchroniser delay. Every bit the retransmit side reads has therefore
already been written. The write takes place on the same `rd_done` edge as the
pointer update, two synchroniser stages earlier.

`timing_sync` states:

| state | behaviour |
|-------|-----------|
| `TX_IDLE`  | output off until the DLL has calibrated and fill ≥ 64 (half the FIFO) |
| `TX_RUN`   | one bit per clock; the fill estimate is averaged over `ADJ_PERIOD` (64) clocks, and at the end of each period the trim code is set to `average + 8 − 64`, clamped to −16…+15 |
| `TX_FAULT` | one clock, then `TX_IDLE`; entered when fill ≤ 0 (underflow: output stops until 64 bits are buffered again) or fill > 96 (overflow: the retransmit pointer is moved to 64 behind the load pointer, skipping bits) |

The trim is a signed 5-bit code. The oscillator model speeds up by 25 ppm per
step, ±400 ppm in all. That covers two ±100 ppm clocks with room to spare.

The trim law is proportional: one 25 ppm step per bit of fill error. The
average also smooths out the 16-bit steps of the coarse estimate. Adding 8,
half a coarse step, cancels the estimate's mean under-read. The loop is first
order and settles without overshoot, with a time constant of about
1/(25 ppm) = 40,000 clocks. A constant frequency offset leaves the buffer one
bit from its centre per step. For the largest offset allowed, 200 ppm, that
is 8 steps and 8 bits, well inside the overflow limit. An integrating law
would null the offset, but with a plant that itself integrates it
limit-cycles between the trim limits.
`retimer` registers the FIFO output on `retx_clk`, so the retransmitted data
carries only the oscillator's jitter. `retimed_valid` marks real data.

## Delay calibration (DLL) and sleep

`dll` delays the reference clock through four cells that match the signal
path. On each reference edge, a bang-bang phase detector samples the delayed
clock, through a second flip-flop against metastability:

* If it samples 1, the four-cell delay is shorter than one period, so the
  code is lowered (more delay).
* If it samples 0, the delay is too long, so the code is raised.

The code moves by one every 4 reference cycles. When the decision has
reversed 8 times in a row, the loop is considered locked:

* the code is frozen;
* the replica clock is gated off (sleep);
* `locked` and `calibrated` go high.

A `recal` pulse wakes the loop, for example after a temperature change.
Traffic continues during recalibration, because the code only dithers by one
step around the lock point. Until the first lock, `read_pulse_gen` suppresses
all read pulses, so nothing enters the FIFO while the delays are still wrong.
`calibrated` should therefore rise while the line is idle, which is the case
with foreground calibration. Otherwise the first read pulse can come out
short. The starting code (128) must give a line delay between T/2 and 3T/2,
which it does for the default cell model. The loop locks in about 300
reference cycles, at code 198 (4 × 234.7 ps, against 941 ps).

## Analog parts: behavioural models

| module | stands for | model |
|--------|-----------|-------|
| `delay_cell` | differential delay cell (source-coupled pair, cross-coupled PMOS load, bias-controlled tail) | transport delay falling linearly from 390 ps at code 0 to 190 ps at code 255; same delay on both edges; valid for pulses wider than the delay (every pulse here is ≥ T/2) |
| `vcdl` | the voltage-controlled delay line | 40 `delay_cell`s sharing one code |
| `vco` | the retransmit oscillator | period 941 ps / (1 + code·25 ppm) |

The control voltage of the analog design is represented by the 8-bit DLL
code. These models need `--timing` in Verilator; they lint and elaborate, but
they are not for synthesis. Everything else (`sample_latch`, `purge_logic`,
`load_pointer`, `fifo_ram`, `dll` apart from its replica cells,
`timing_sync`, `retransmit_pointer`, `retimer`, and the gate in
`read_pulse_gen`) is synthesizable.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `T_BIT_PS` | 941.0 | `adr_pkg` | bit period, 1.0625 Gbaud |
| `N_BITS` / `NBITS` | 10 | `adr_pkg`, modules | delay-line length in bits (≥ longest gap between rising edges) |
| `TAPS_PER_BIT` | 4 | `adr_pkg` | T/4 resolution |
| `FIFO_DEPTH` / `DEPTH` | 128 | `adr_pkg`, modules | elastic buffer size in bits (power of two) |
| `CODE_W` | 8 | `adr_pkg` | DLL code width |
| `VCO_CODE_W`, `VCO_STEP_PPM` | 5, 25.0 | `adr_pkg`, `adr_top.VCO_STEP` | oscillator trim |
| `ADJ_PERIOD` | 64 | `timing_sync`, `adr_top` | clocks between trim decisions |
| `START`, `HIGH` | 64, 96 | `timing_sync` | start level (trim target), overflow level |
| `GAIN_SH` | 0 | `timing_sync` | trim gain: one code step per 2**GAIN_SH bits of fill error |
| `UPD_PERIOD`, `LOCK_REV` | 4, 8 | `dll` | DLL update interval, lock criterion |

## What follows the original technique and what is this design's own

Taken from the technique:

* the 10 T line with T/4 resolution and a 941 ps bit period;
* reads on rising data edges, reset T/4 later;
* purge logic, then a FIFO with a load pointer advanced by an adder;
* a retransmit pointer and a retransmit clock whose frequency follows the two
  pointers;
* a reference-locked DLL driving matched cells, with sleep after calibration.

This design's own choices, where the technique gives only the function:

* the purge rule (the newest 0→1 boundary);
* the coarse Gray-code crossing;
* FIFO depth, start level, trim law, and underflow/overflow handling;
* the digital code in place of analog bias voltages;
* the bang-bang DLL and its lock rule;
* the register used as the retiming element;
* suppressing reads until the first lock;
* the load pointer addressing the next free location rather than the last
  bit written.

An illustration of the principle shows reads on both data edges. This design
reads on rising edges only, as the implementation description says. A 10 T
line is long enough for that only with a run limit of 5.

Not built:

* the doubled (20 T) line, suggested as a way to exploit the correlation of
  consecutive pulse widths;
* any transistor-level behaviour of the delay cell (supply sensitivity, data
  dependency).

The reference crystal is outside the design: it is the `ref_clk` port.

## Limits worth knowing

* **Jitter margin.** A bit is read correctly only while the jitter
  difference between the triggering edge and that bit's boundaries stays
  below T/2, minus the residual line error. The line error is about 2 ps per
  T from code quantisation, so at most about 20 ps over the line. The Fibre
  Channel receiver budget of 0.70 UI peak-to-peak total jitter can exceed
  this in the worst case; errors then depend on the jitter statistics. With
  independent uniform jitter on each transition, `tb_adr_jitter` sees no
  errors up to ±0.22 UI (0.44 UI p-p). At ±0.35 UI, the whole budget spent
  as uniform jitter, about 8 % of bit boundaries move by more than T/2
  against their reading edge, and errors are frequent. Real link jitter is
  kinder: successive transitions are displaced in strongly anti-correlated
  ways, so the relative displacement that matters here is smaller than the
  sum of the two. After heavy jitter the link recovers by itself: a
  miscounted read only shifts the buffer level by a bit or two.
* **Run length.** The line must be at least as long as the longest gap between
  rising edges: a run of ones plus a run of zeros. With a longer gap, the
  bits in between are lost. After the line goes idle, only the last ten idle
  bits are recovered when data resumes.
* **Timing of the read path.** The purge logic, adder and FIFO write must
  settle within T/4 (235 ps) of the read. The sample flip-flops are clocked
  by the data, so the design is a multi-clock design. Constraints must treat
  `read_pulse`, `rd_done`, `ref_clk` and `retx_clk` as separate clocks.
* Verilator reports `SYNCASYNCNET` for `rst_n`: it is both an asynchronous
  reset and the oscillator enable / assertion disable. This is intended.
* `ZERODLY` comes from the behavioural models and testbenches, whose delays
  are computed at run time. `UNUSEDPARAM` is for package constants that only
  document the sizes. `UNUSEDSIGNAL` is for the top bit of the load pointer:
  the FIFO address uses only the low 7 bits, and the wrap bit matters only
  in the fill arithmetic of the other clock domain.

## Simulating

All files have `timescale 1ps/1fs`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/adr_pkg.sv tb/tb_adr_top.sv --top-module tb_adr_top
obj_dir/Vtb_adr_top
```

Replace `tb_adr_top` with any testbench below. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_delay_cell` | delay vs. code on both edges, pulse width preserved |
| `tb_vcdl` | every tap equals the input (k+1)·T/4 earlier, with a random stream |
| `tb_read_pulse_gen` | one T/4 pulse per rising edge, none on falling edges, for three codes |
| `tb_sample_latch` | mid-bit taps captured at the pulse edge only |
| `tb_purge_logic` | 5,000 reads of a run-limited stream against the bits since the previous rising edge |
| `tb_load_pointer` | pointer sum, Gray coding, one-bit Gray steps |
| `tb_fifo_ram` | burst writes and reads against a reference copy |
| `tb_dll` | lock point, sleep (code frozen, replica gated), relock after a reference change |
| `tb_timing_sync` | start rule, read safety every cycle, trim up and down, underflow, overflow and re-centring |
| `tb_vco`, `tb_retransmit_pointer`, `tb_retimer` | period vs. code; counting and loading; registering and gating |
| `tb_adr_top` | whole system with trim step 400 ppm, so that each mechanism occurs in a short run (DLL lock, sleep and recalibration on live data, purged and full reads, bits before the first edge, start, trim up and down, underflow, overflow). About 22,000 bits are compared one by one. |
| `tb_adr_ppm` | default parameters, far end +200 ppm then −200 ppm (two ±100 ppm clocks at opposite limits) for 120,000 bits each: the trim settles near ±8 steps, with no underflow or overflow, and all 240,000 bits are compared (about 40 s) |
| `tb_adr_jitter` | default parameters, far end +50 ppm, 20,000 bits each at ±0.10, ±0.20, ±0.22 UI jitter per transition (no errors), then ±0.35 UI (errors must appear, and are counted), then ±0.10 UI again (no errors once the checker has found its place) |
| `tb_adr_top_full` | whole system at default parameters: calibration, then 6,000 bits at +50 ppm with jitter, all compared; no faults; one bit per 941 ps retransmit clock |

`tb/adr_link_model.sv` is the far-end transmitter and checker used by the two
system testbenches. It sends run-limited random data with a settable
frequency offset, jitter and idle periods. It checks that the retransmitted
stream is the sent stream. After a fault it allows a realignment, because the
design legitimately loses or skips bits there.
