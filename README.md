# Ring-CAM timestamp resequencer

In a triggerless readout, detector hits reach the processing FPGA out of time
order. Every lane has its own delay, and fan-in concentrates hits into short
bursts. Online reconstruction, however, wants complete time slices in
timestamp order. This RTL sorts such a stream back into order. It assumes the
skew between lanes is bounded.

The core idea is the **Ring-CAM**:

- **Write by arrival.** Every hit goes into the next slot of a ring buffer,
  whatever its timestamp. Storage is never tied to a timestamp bin, so a burst
  on one timestamp can use any free slot. A calendar queue, by contrast, gives
  each bin a fixed capacity, and a single hot bin overflows while memory sits
  idle elsewhere.
- **Read by timestamp.** Next to the ring, a content-addressable memory (CAM)
  holds the search key (a coarse timestamp) of every occupied slot. Once a key
  is older than the skew window, all slots holding that key are looked up,
  emitted and freed. Then the same is done for the next key.

The output is therefore sorted by key even though the storage is in arrival
order. The ring only needs to hold the hits that can pile up during the skew
window: depth ≥ peak input rate × skew window, plus margin.

The design comes in two levels:

- `ring_buffer_cam` is one resequencer IP. It has a CSR window, run control,
  counters and a fill-level output.
- `rbcam_system` is the top level. It stacks four resequencers behind a
  splitter and an order-preserving merger, so that throughput scales with the
  stack count.

## Block map

```
                 rbcam_system
 hit_type1 ──► rbcam_splitter ──(key mod 4)──► ring_buffer_cam ×4 ──► rbcam_merge ──► hit_type2
 run_control ─────────────────────────────────►     (each)       ──done_key──►
 csr[i] ◄────────────────────────────────────►

                 ring_buffer_cam
   hit_type1 ─► rbcam_push_engine ─┬─► rbcam_cam (key + valid per slot)
                                   └─► rbcam_side_ram (hit word per slot)
   run_control ─► rbcam_timebase ── pop commands ─► rbcam_pop_engine ─► hit_type2
                                                      ├ rbcam_cam lookup / clear
                                                      ├ rbcam_prio_enc (per partition)
                                                      └ rbcam_side_ram read
   csr ◄─► rbcam_csr (identity, CTRL, EXPECTED_LATENCY, FILL_LEVEL, counters)
```

Shared types live in `rbcam_pkg`:

- `hit_t = {err, ts[7:0], side[30:0]}`, 40 bits in total;
- `run_state_e`;
- the CSR addresses and the counter indices.

`rbcam_fifo` is a small first-word-fall-through FIFO. It serves as the
pop-command FIFO and as the merger input FIFOs.

## Time, keys and the read delay

This is the part that needs the most care.

**Keys and the run clock.** A hit carries an 8-bit key, `ts`. Each key stands
for 2^`FINE_BITS` = 16 clock cycles of the run clock. The run clock, `now`
in `rbcam_timebase`, starts at zero when a run is prepared and counts while
the run is RUNNING or TERMINATING. Key τ covers the cycles
[16τ, 16τ+15], counted modulo 256 keys. Whoever stamps the hits must use the
same time base.

**Ready rule.** Key τ is ready once its last cycle is at least
`EXPECTED_LATENCY` cycles old:

    now − EXPECTED_LATENCY ≥ 16·τ + 15

`EXPECTED_LATENCY` is a CSR and resets to 2000 cycles. The timebase keeps an
issue pointer counted over the whole run. When the key under the pointer is
ready, it pushes a pop command for that key and advances the pointer. If the
16-entry pop-command FIFO is full, the command waits: no key is ever skipped.
Each cycle of waiting is counted (POP_CMD_FULL).

**Late hits.** A hit whose key has already been handed to the pop engine
would never be read. The push engine therefore classifies such a hit as a
timestamp error. Keys wrap at 256, so "already handed over" is decided
against the current key:

- a key is on time when it lies in (last issued key, current key], both
  taken modulo 256;
- anything outside that interval is late.

This stays correct however far the pop engine lags, provided that the read
delay plus the lag is under 256 keys. The ring needs that condition anyway to
tell keys apart. With the defaults the read delay is 125 keys, which leaves
131 keys of headroom.

A simpler half-range comparison would fail here. Under bursty load at the
default delay, the pop engine can fall a few keys behind. A valid hit can
then look "behind" by more than 128 keys, and the half-range test would throw
it away.

**Overrun guard.** Under sustained overload the read pointer may fall a full
256 keys behind the current key. A new hit's key could then equal the key of
an unserved hit one lap older, and the two would come out together, out of
order. To prevent this, the timebase raises `overrun` while the lag is 256
keys or more. During that time the push engine treats every new hit as late,
so overload costs counted hits but never order.

**Error hits.** A hit is an error hit if its `err` bit is set or if it is
late:

- with CTRL.filter_inerr = 1 (the reset value), it is dropped and counted
  (INERR);
- with filter_inerr = 0, it is stored with `err` set. It then comes out when
  its key value is next served, so it may appear out of order. The merger and
  the testbenches treat such hits as stragglers.

## Storage: partitions, slots and order among equal keys

The 1024 slots form four partitions of 256. Each partition has its own write
pointer and its own 256-bit priority encoder ("encoder slice"). Two key bits
select the partition:

- standalone, the two bits are `ts[1:0]`;
- in the stack of four, they are `ts[3:2]`, because `ts[1:0]` already chose
  the instance.

All hits of one key therefore share a partition. A lookup compares only
256 keys, and the encoder searches only 256 bits.

| Storage | Contents | Size |
|---|---|---|
| CAM (`rbcam_cam`) | one 8-bit key and one valid bit per slot | 8192 key bits |
| Side RAM (`rbcam_side_ram`) | the full 40-bit hit word per slot | 40960 bits |

The side RAM is a plain registered-read memory.

**Order among equal keys.** Hits with the same key leave oldest first. The
encoder starts its search at the partition's write pointer, which marks the
oldest slot, and wraps around.

**When the ring is full.** Writing never stalls. If a partition's next slot
still holds an unread hit, that hit is overwritten, and OVERWRITE counts it.
So the oldest hit is the one lost.

## The pop engine and its races with the write side

The engine serves one hit per five cycles, which is 25 Mhit/s at 125 MHz.
For each command it runs these steps:

| Step | What happens |
|---|---|
| MATCH | register the CAM match bitmap for the key |
| ENC | priority-encode the bitmap from the oldest slot |
| RDA | send the slot address to the side RAM |
| RDD | register the side-RAM word |
| EMIT | output the hit and clear the slot |

After EMIT the engine goes back to MATCH for the next hit of the same key.
When ENC finds nothing, the key is finished in that same cycle:
`done_key`/`done_seen` record it, and the next command is taken at once.

A key with n hits therefore costs 5n + 2 cycles, and an empty key costs 2. At
the default 16 cycles per key and 0.125 hit/cycle, one engine is about 75%
busy on average. The per-key cost matters under bursts: a version with 4
cycles of overhead per key lost hits at burstiness B = 0.84.

If a command finds no hit at all, it counts as a cache miss (CACHE_MISS).

The write side runs concurrently, which creates two races:

- **A slot written during MATCH** is masked out of the bitmap. If it holds
  the same key, the next MATCH finds it.
- **A slot overwritten between ENC and RDD** is not emitted. The push engine
  has already counted the old hit as overwritten, so no hit is both lost and
  delivered.

If a write and a clear hit the same slot in the same cycle, the write wins.

**Egress.** Standalone (`EGRESS_BACKPRESSURE = 0`), a hit is shown for one
cycle. If `hit_type2_ready` is low in that cycle, the hit is lost and counted
(EGRESS_NOT_READY). Inside the stack, `EGRESS_BACKPRESSURE = 1` holds the hit
until ready. The DONE step then also waits until the last hit has left, so
`done_key` never runs ahead of the data.

## Run control

`run_control` is a valid plus a 2-bit state: IDLE, RUN_PREPARE, RUNNING or
TERMINATING.

- **RUN_PREPARE.** Entering it produces a one-cycle flush. The flush clears
  every CAM valid bit, the write pointers, the pop-command FIFO and the pop
  engine. It also restarts the run clock and zeroes the fill level. A
  CTRL.soft_reset does the same and also clears the counters.
- **RUNNING and TERMINATING.** Hits are accepted and keys are served, both
  gated by CTRL.go. TERMINATING keeps the clock running, so hits still stored
  drain out.
- **IDLE.** Nothing is accepted and nothing is emitted.

## Register map (`rbcam_csr`)

The CSR port is an Avalon-MM slave with 32-bit words. Read data appears one
cycle after `read`, and there is no waitrequest.

| Word | Name | Access | Contents |
|---|---|---|---|
| 0x00 | UID | RO | 0x5242434D ("RBCM") |
| 0x01 | META | W selects, R reads | a write of 0/1/2/3 selects what reads return: VERSION (MAJOR[31:24] MINOR[23:16] PATCH[15:12] BUILD[11:0] = 26.2.13 build 516), DATE (0x20260516), GIT (0x23CE513F) or INSTANCE_ID |
| 0x02 | CTRL | RW | bit 0 go, bit 1 soft_reset (self-clearing), bit 4 filter_inerr, bit 5 counter_freeze; resets to 0x11 |
| 0x03 | EXPECTED_LATENCY | RW | read delay in cycles, reset 2000 |
| 0x04 | FILL_LEVEL | RO | stored hits: +1 per push, −1 per pop, −1 per overwrite, 0 after a flush |
| 0x05–0x09 / 0x0A–0x0E | counters, LO / HI words | RO | INERR, PUSH, POP, OVERWRITE, CACHE_MISS |
| 0x0F/0x10, 0x11/0x12, 0x13/0x14 | counters, LO/HI pairs | RO | DEASM_FULL, POP_CMD_FULL, EGRESS_NOT_READY |

All counters are 64 bits wide. Writing counter_freeze = 1 copies all of them
into a snapshot in one cycle. Counter reads then return the snapshot until
the bit is cleared, while counting goes on underneath.

DEASM_FULL always reads 0. This design has no ingress frame deassembly: it
takes hit words directly, and its write path has no FIFO that could fill.

## Stacking (`rbcam_system`)

**Splitter.** `rbcam_splitter` routes each hit to instance `ts mod 4`.

**Instances.** Instance i issues only keys congruent to i, so its issue
pointer starts at i and steps by 4. Every instance keeps the full 1024
slots.

**Merger.** `rbcam_merge` rebuilds the global order:

- Each instance output feeds a 32-entry FIFO.
- The merger holds a current key `cur` and forwards hits of key `cur` from
  FIFO `cur mod 4`, one per cycle.
- It advances once that FIFO has nothing more for `cur` and the instance's
  `done_key` shows that `cur` (or a later key) is finished.

An instance registers `done_key` only after its last hit for that key has
entered the FIFO, so the merger never advances past a hit. Empty keys cost a
single cycle.

When a merger FIFO is full, its instance waits, using egress backpressure.
Service capacity is 4 × 0.2 = 0.8 hit/cycle, and the ingress can carry at most
1 hit/cycle.

Each instance keeps its own CSR window and fill-level output. The top brings
them out as arrays indexed by instance.

## Parameters and defaults

| Parameter | Default | Where set | Meaning |
|---|---|---|---|
| `TS_W` / `SIDE_W` | 8 / 31 | `rbcam_pkg` | key and side-data widths |
| `DEPTH` | 1024 | | slots per instance |
| `N_PART` | 4 | | partitions (encoder slices) of 256 slots |
| `N_STACK` | 4 | `rbcam_system` | stacked instances |
| `FINE_BITS` | 4 | | log2 of the cycles per key |
| `CMD_FIFO_DEPTH` | 16 | | pop-command FIFO entries |
| `FIFO_DEPTH` | 32 | `rbcam_merge` | merger FIFO entries per instance |
| `EGRESS_BACKPRESSURE` | 0 | standalone; 1 in the stack | hold the output hit until ready instead of dropping it |

`DEPTH`, the key and side widths, the partitioning, the four-instance stack,
the 2000-cycle reset delay and the 25 Mhit/s service rate all follow the
original design. `FINE_BITS`, the FIFO depths, the CTRL reset value, the DATE
word and the bit layout of the 40-bit slot word are this implementation's
choices.

## Departures and limits

- **Splitter routes, not broadcasts.** The original integration uses an
  Avalon-ST splitter. Here each hit goes only to the instance that owns its
  key.
- **The merger is this design's own.** Only its purpose, keeping timestamp
  order across the stack, is given. This version walks keys using each
  instance's progress report, so it never stalls waiting for a head-of-line
  hit that may never arrive.
- **Pop-command backlog holds instead of dropping.** When the command FIFO is
  full, the command waits, and the counter counts cycles of waiting.
  Dropping a command would leave its hits stranded in the ring.
- **No ingress frame deassembly.** Front-end frames are not parsed: hits enter
  as 40-bit words.
- **Not modelled:** the downstream frame assembly, the clock source, the
  DEBUG build option and automatic pipeline insertion.
- **No FPGA results.** The five-step pop engine is written for clarity, not
  for a particular FPGA's timing. The CAM is registers plus a 256-way
  comparator per lookup. No FPGA fit has been made, so resource use and Fmax
  are unknown.

## Simulation

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each has a cycle watchdog. With
Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_rbcam_system \
    rtl/rbcam_pkg.sv $(ls rtl/*.sv | grep -v rbcam_pkg) tb/tb_rbcam_system.sv -o sim
obj_dir/sim +verilator+rand+reset+2
```

To run another test, replace `tb_rbcam_system` with its name.

The top-level and full-size tests are:

| Testbench | What it runs |
|---|---|
| `tb_rbcam_system` | The full stack at its default parameters: skewed, bursty traffic with a slow and stalling sink. It checks no loss, no ghosts, global key order and the read delay. It also counts each mechanism: routing to every instance, backpressure stalls, bursts, late-hit filtering, cache misses, empty-key advances, overwrites, pop-command backlog and flush. |
| `tb_ring_buffer_cam` | One instance at full size. It covers identity and reset values, ordered output with exactly 5 cycles between hits of one key, late filtering and error tagging, egress drops, counter freeze, overwrite of the oldest hits, command backlog and flush. |
| `tb_rbcam_workloads` | Burstiness workloads at full size and the default 2000-cycle delay. One Ring-CAM runs at 0.125 hit/cycle with B = −1, 0, 0.5 and 0.84. The four-instance stack runs at 0.5 hit/cycle with B = 0.84. Each point has 8192 hits, where B = (σ−μ)/(σ+μ) of the inter-arrival gaps. The test checks zero loss, order and the read delay, and prints the largest fill level reached. |
| `tb_rbcam_signoff` | One instance at full size with the default 2000-cycle delay. It runs the sequences GOOD(2048) → ERROR(64) → FLUSH → GOOD(2048) and GOOD(2048) → TERMINATING → IDLE → RUN_PREPARE → RUNNING → GOOD(2048), at 0.125 hit/cycle with bursts. |

Every submodule also has its own testbench: `tb_rbcam_cam`,
`tb_rbcam_prio_enc`, `tb_rbcam_side_ram`, `tb_rbcam_push_engine`,
`tb_rbcam_timebase`, `tb_rbcam_pop_engine`, `tb_rbcam_csr`,
`tb_rbcam_splitter` and `tb_rbcam_merge`.

The simulator has only two states, so every register is reset.
`+verilator+rand+reset+2` randomises whatever is not, which helps catch a
missing reset.
