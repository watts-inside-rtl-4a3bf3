# Code-sequence power profiling hardware for multicore processors

A multicore chip can hide large power differences between threads that are
perfectly balanced in time. This hardware lets software find out *which
stretch of code* draws the power and *which functional unit* is behind it.
It watches every core's stream of retired basic blocks, cuts it into short
**code sequences** of five blocks, estimates the average power of each
sequence from weighted activity counters, keeps only the sequences near the
highest power seen so far, names the hottest of fourteen functional units for
those, and writes a compact profile record for every sequence to a log in
memory. A small extra unit counts how often a user-chosen basic block occurs
in high-power sequences and computes bounds on the probability that this
block *causes* the high power.

The design follows the Watts-inside framework for multicore power debugging
(Chen, Yao and Venkataramani): its split into a per-core power estimator and
adaptive filter, a shared power analyzer, a shared causation-probability unit
with a watch register and a 4 KB log buffer; the five-block sequence; the
96-bit record layout; the capture-ratio filter rule; periodic sampling; and
the probability bounds. The circuits inside each unit, the handshakes, number
formats, register map and flow control are this implementation's own; the
sections below say where.

## How a sequence travels

```
 core c: retired basic blocks + 14 activity counts per clock
   |
   v
 power_estimator (per core) --- code_seq_tracker: cut, name, time, sample, watch
   |  seq_rec_t: ID, power, core, time, per-unit energies, watch flag
   v
 adaptive_filter (per core) --- report (high?, watched?) --> causation_prob (shared)
   | high-power                 \ low-power: short record
   v                             \
 rr_stream_arbiter (cores -> 1)   \
   v                               \
 power_analyzer (shared)            \
   | full 96-bit record              v
   +------------> rr_stream_arbiter (cores + analyzer -> 1)
                        v
                 csppv_log_buffer (4 KB) --(only while bus_idle)--> memory
```

### Code sequences and their names (`code_seq_tracker`)

The core reports at most one retired basic block per clock: its start address
and whether it ends in a call, a return or an exception. Five consecutive
blocks form a sequence; a block ending in a call, return or exception closes
the sequence early so that no sequence crosses a function boundary or an
exception.

A sequence is named by a 64-bit ID:

| bits    | content |
|---------|---------|
| 63:48   | first block's address, upper half XOR lower half |
| 47:36   | address bits 11:0 of block 2 |
| 35:24   | address bits 11:0 of block 3 |
| 23:12   | address bits 11:0 of block 4 |
| 11:0    | address bits 11:0 of block 5 |

Slots of blocks that a short sequence does not have are zero. The exact fold
and the 12-bit slices are this design's choice of "fold the first address and
append low bits of the others"; the ID is a good hash, not a guaranteed
unique name.

The sequence's length in clocks runs from the clock after the previous
sequence ended through the clock its last block retired, so idle clocks
between sequences are charged to the next one.

**Sampling.** With sampling period P, only the first sequence of every P is
estimated and can reach the filter, analyzer, log and causation counts
(P = 2, 4, 100 give 50 %, 25 %, 1 % sampling). Unsampled sequences are still
counted in `seq_count`.

### Estimating power (`power_estimator`)

Each functional unit has an activity sense point that reports a 4-bit event
count every clock. The estimator adds `activity[u] * weight[u]` (8-bit
programmable weight) into a 32-bit saturating energy accumulator per unit.
When a sampled sequence ends, the accumulators, including that last clock,
are copied out and cleared, and the sequence power is

```
power = min(127, floor( sum_u energy[u] / (cycles * 2^PWR_SHIFT) ))
```

formed in 7 clocks by a restoring divider that only produces the 7 quotient
bits it needs (`bounded_divider`). Power has no fixed unit: the weights set
the scale, and the same scale is used for the hottest unit's power. The
execution time field is the clock count saturated to 9 bits; the full 16-bit
count travels along for the analyzer's division.

The fourteen units and their 4-bit IDs (order as listed by the method):

| ID | unit | ID | unit |
|----|------|----|------|
| 0 | instruction TLB | 7 | register file |
| 1 | data TLB | 8 | scheduler |
| 2 | L1 instruction cache | 9 | integer ALU |
| 3 | L1 data cache | 10 | floating-point ALU |
| 4 | branch predictor | 11 | L2 cache |
| 5 | rename logic | 12 | L3 cache |
| 6 | reorder buffer | 13 | load/store queue |
|   |   | 15 | none (record of a low-power sequence) |

### The adaptive filter (`adaptive_filter`)

The filter holds two registers: the capture ratio C (percent, programmable,
10 after reset) and the highest sequence power seen since reset. A sequence
is **high-power** when

```
power >= max - floor(max * C / 100)
```

(C = 10 and a maximum of 50 give a threshold of 45). A sequence above the
maximum is high-power and becomes the new maximum, so the threshold rises
with it and stops moving once the hottest sequence has run. The very first
sequence after reset is therefore always high-power. High-power sequences go
on, with their per-unit energies, to the analyzer; all others are logged
straight away as short records. Every classified sequence is also reported
to the causation unit.

### The shared power analyzer (`power_analyzer`)

For a high-power sequence the analyzer picks the unit with the largest
energy (all units share the sequence length, so this is also the largest
power; the lower ID wins a tie) and divides that energy by
`cycles * 2^PWR_SHIFT`, saturating at 127, to complete the record.

### The profile record and the log (`csppv_log_buffer`)

The record (CSPPV, code sequence power profile vector), most significant bit
first:

| field | bits | filled by |
|-------|------|-----------|
| sequence ID | 64 | estimator |
| sequence power | 7 | estimator |
| core ID | 5 | estimator |
| execution time (clocks, saturated) | 9 | estimator |
| hottest unit ID | 4 | analyzer (15 for a low-power sequence) |
| hottest unit power | 7 | analyzer (0 for a low-power sequence) |

The log buffer is a 4 KB FIFO of 96-bit slots (341 records). It offers its
oldest record to memory only while `bus_idle` is high. A full record is
written as 12 bytes; a low-power record as its upper 10 bytes (`mem_bytes`
says which), since the unit fields carry nothing. Records follow each other
without gaps from a programmable log base address.

### Online causation probability (`causation_prob`)

This is the least obvious part. The user writes a basic-block address B into
the watch register (which also clears the counts). From then on the unit
counts, over all sampled sequences of all cores:

* S: sequences, H: high-power sequences,
* SB: sequences that contain B, HB: high-power sequences that contain B.

Writing `start` freezes the counts and evaluates, with
HB' = H-HB, SB' = S-SB, LB = SB-HB, LB' = SB'-HB':

```
P(h)    = H/S        P(b,h)   = HB/S       P(b',h') = LB'/S
P(h_b)  = HB/SB      P(h_b')  = HB'/SB'    P(h'_b') = LB'/SB'
P(b,h') = LB/S       P(b',h)  = HB'/S

max{0, (P(h_b)-P(h))/P(b',h')}  <= PS  <= min{1, (P(h_b)-P(b,h))/P(b',h')}
max{0, (P(h)-P(h_b'))/P(b,h)}   <= PN  <= min{1, (P(h'_b')-P(b',h'))/P(b,h)}
max{0, P(h_b)-P(h_b'), P(h)-P(h_b'), P(h_b)-P(h)} <= PNS
PNS <= min{P(h_b), P(h'_b'), P(b,h)+P(b',h'), P(h_b)-P(h_b')+P(b,h')+P(b',h)}
```

PS (sufficiency) high means sequences with B are nearly always hot; PN
(necessity) high means hot sequences would not be hot without B; PNS combines
both and ranks blocks for optimisation. These are Pearl's bounds on the
probabilities of causation, treating "B occurs" as the cause and "the
sequence is high-power" as the effect.

All values are Q0.16 fixed point (1.0 = 65536, outputs 17 bits wide). One
sequential divider forms the twelve quotients (eight probabilities, then the
four PS/PN quotients) one after another, 17 clocks each; a quotient with a
non-positive numerator is 0 without dividing, and one with a zero divisor is
0 and sets `ps_undef` or `pn_undef`. The PNS bounds are formed from the
stored probabilities with signed arithmetic and clamped to [0, 1]. Because
the PS and PN bounds divide already-rounded fractions, they are accurate to
about 2^-9 when P(b,h) or P(b',h') is small; the PNS bounds to about 2^-14.
A whole evaluation takes about 230 clocks.

Worked example (1000 sequences, 200 high): a block found in 35 high and 20
low sequences gives 0.462 <= PNS <= 0.636; one found in 40 high and 200 low
gives 0 <= PNS <= 0.167, so the first is the better target although the
second appears in more hot sequences. The testbench checks these numbers.

## Flow control: who waits, what is lost

* Core side: never stalled. If a sampled sequence ends while the estimator's
  previous result is still being divided, or is waiting at its output and not
  taken in that clock, the new sequence is **dropped** and counted in
  `dropped[c]`. Software can lower the sampling rate when drops appear.
* Estimator -> filter -> arbiters -> analyzer/buffer: valid-ready handshakes;
  each stage holds one item and waits.
* Both interconnects are round-robin arbiters that hold a grant until it is
  taken; every asking source is served within N transfers.
* The log buffer lowers its ready when full (`log_full_stalls` counts the
  clocks a record waited), which backs up through the filters to the
  estimators and finally causes drops.
* Causation reports are never refused.

## Timing

| step | clocks |
|------|--------|
| last block retires -> estimated sequence offered to the filter | 9 (2 if the power saturates) |
| filter takes a sequence -> offered on hi or lo | 1 |
| analyzer takes a sequence -> full record offered | 9 (2 if the unit power saturates) |
| record enters buffer -> can be written to memory | 1 |
| causation evaluation | about 12 x 19 |

The published design estimates 24, 38 and 26 processor cycles for the
estimator, analyzer and causation unit, from instruction latencies of a
desktop processor rather than from RTL; these figures do not apply to this
implementation. All units are off the processor's critical path.

## Configuration registers

Word writes on `cfg_we` / `cfg_addr` / `cfg_wdata` (map in `wi_pkg`):

| address | register | reset |
|---------|----------|-------|
| 0x00 + c | capture ratio of core c, percent (values above 100 act as 100) | 10 |
| 0x20 + c | sampling period of core c (0 and 1: every sequence) | 1 |
| 0x40 + u | activity weight of unit u, all cores | 1 |
| 0x50 | watched basic-block address; clears the causation counts | 0 |
| 0x51 | byte address of the start of the log; restarts the log there | 0 |
| 0x52 | any write starts a causation evaluation | - |

## Top-level ports (`watts_inside_top`)

| port | dir | meaning |
|------|-----|---------|
| `bb_valid[c]`, `bb_addr[c]`, `bb_boundary[c]` | in | retired basic block of core c, its start address, ends in call/return/exception |
| `activity[c]` | in | 14 x 4-bit event counts of core c this clock |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | register writes |
| `bus_idle` | in | the memory bus is free for log writes |
| `mem_valid`, `mem_ready`, `mem_addr`, `mem_data`, `mem_bytes` | out/in/out/out/out | log write: 12 or 10 bytes from the top of `mem_data` at byte address `mem_addr` |
| `caus_busy`, `caus_done`, `ps_lo` ... `pns_hi`, `ps_undef`, `pn_undef` | out | causation evaluation |
| `seq_count[c]`, `dropped[c]`, `max_power[c]`, `analyzed`, `log_full_stalls`, `log_level`, `caus_seq`, `caus_high` | out | status |

Parameters: `NUM_CORES` (4; the 5-bit core ID allows up to 32), `SEQ_LEN` (5),
`PWR_SHIFT` (8), `BUF_BYTES` (4096), `CNT_W` (32-bit causation counters),
`F` (16 fraction bits). Reset is active-low and asynchronous in every unit.

## Files

| file | content |
|------|---------|
| `rtl/wi_pkg.sv` | record and stream types, unit IDs, register map |
| `rtl/watts_inside_top.sv` | top level, configuration registers |
| `rtl/code_seq_tracker.sv` | sequence cutting, ID, timing, sampling, watch flag |
| `rtl/power_estimator.sv` | weighted activity accumulation, sequence power |
| `rtl/adaptive_filter.sv` | capture-ratio filter |
| `rtl/power_analyzer.sv` | hottest unit and its power |
| `rtl/causation_prob.sv` | watch register, counts, PS/PN/PNS bounds |
| `rtl/csppv_log_buffer.sv` | 4 KB log buffer with bus-idle drain |
| `rtl/rr_stream_arbiter.sv` | round-robin interconnect |
| `rtl/bounded_divider.sv` | short-quotient sequential divider |
| `tb/tb_<module>.sv` | one self-checking testbench per unit and for the top |
| `tb/tb_capture_sampling.sv` | capture-ratio and sampling-rate sweep on six cores |
| `tb/tb_scaling_32core.sv` | the top level built for 32 cores |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl rtl/wi_pkg.sv tb/tb_watts_inside_top.sv \
  -y rtl +libext+.sv --top-module tb_watts_inside_top -o sim
./obj_dir/sim
```

The same works for every testbench in `tb/` with its `--top-module`. Lint
alone (it reports unused bits of the shared record types): `verilator --lint-only -Wall -Irtl rtl/wi_pkg.sv
rtl/watts_inside_top.sv -y rtl`.

## What the tests establish

* `tb_code_seq_tracker`: IDs, lengths, early ends, watch flag and sampling
  against an independent model over about 1500 sequences.
* `tb_power_estimator`: sequence power, energies, time fields, the 9-clock
  latency, saturation, drops and sampling.
* `tb_adaptive_filter`: threshold arithmetic, the 45-of-50 example, routing,
  records, reports, capture-ratio change.
* `tb_power_analyzer`: hottest unit with ties, unit power, latency, stalls.
* `tb_causation_prob`: counts and all six bounds for four example
  populations against floating point and the published example values.
* `tb_csppv_log_buffer`: order, 12/10-byte addressing, bus-idle rule,
  341-record capacity, full stalls.
* `tb_rr_stream_arbiter`: delivery once and in order, stable offers,
  round-robin rotation.
* `tb_watts_inside_top` (all defaults): four cores running a shared program
  with hot blocks. With light traffic every record in memory matches the
  testbench's own model of the whole chain, all predicted records arrive, and
  the causation counts and bounds match. With heavy traffic and a busy bus the
  buffer fills and sequences are dropped, and written + dropped equals the
  sampled sequences. Early ends, sampling, both filter routes, maximum updates,
  contention at both interconnects, bus hold-off, a full buffer, drops and a
  causation evaluation each occur.
* `tb_capture_sampling`: six cores see one identical stream. Capture ratios
  of 25, 10 and 5 % give shrinking high-power sets; sampling one sequence in
  2, 4 and 100 writes exactly that share of records, each equal in ID, power
  and time to the full profile. It also prints the mean power each sampling
  rate sees.
* `tb_scaling_32core`: the top level at 32 cores under random load and a
  busy bus; per core, written + dropped equals sampled, every core reaches
  the log, and the log length matches the record sizes.

## Where this departs from or adds to the published design

* The causation unit receives a report for *every* sampled sequence, not
  only those containing the watched block, because the bounds need the
  totals S and H as well.
* The bounds on PNS are implemented in the standard form given above; with
  them the example block found in 100 of 200 high and no low sequences gets
  0.889 <= PN <= 0.889, a little tighter than the "0.9 .. 1" quoted for that
  example, while all other quoted example values are reproduced.
* The low-power record stores ID, power and core ID in 10 bytes as intended;
  those three fields take 76 bits, and the remaining 4 bits carry the top of
  the execution time.
* Power estimation uses a simple weighted-count proxy; the real
  per-unit power models and calibration of a product power proxy are outside
  this design, as are the sense points themselves and the cores.
* Dropping on overload, the drop counters, the register map, reset values and
  every latency are this implementation's choices.
* Not hardware, so not included: the kernel-mode profiler that reads the log,
  compresses it and computes causation offline, clustering of sequences by
  power variation, and hotspot prediction.
