# An L1 data cache built on 3T1D dynamic cells

Under strong process variation a 6T SRAM array gets slower (its slowest cell
sets the clock) and less stable. A 3T1D cell (three transistors and a gated
diode that boosts a stored 1) reads as fast as a 6T cell, or faster, but only
for a limited *retention time* after it was written; after that its charge has
leaked and the read is too slow. Variation does not slow the clock of such an
array: it only shortens or lengthens the retention time of each cell. So the
whole effect of variation can be handled by architecture, by knowing how long
each line keeps its data and refreshing, evicting or placing blocks
accordingly.

This RTL is a 64 KB, 4-way set-associative L1 data cache with 64-byte
(512-bit) lines, 256 sets, whose data array is assumed to be 3T1D, plus all
the bookkeeping that keeps its contents correct:

* a **global refresh scheme**, for chips with moderate variation, that sweeps
  the whole array at a fixed rate set by the weakest cell of the chip;
* **line-level schemes**, for severe variation, where every line has its own
  retention time and counter, combined with one of three **refresh policies**
  and one of four **replacement policies**.

The scheme and both policies are run-time inputs, so one netlist covers all
the combinations. The suggested setting for a chip with severe variation is
line-level, partial refresh, dead-sensitive placement.

## Retention time as the only variable

A line's retention time is the shortest retention of its 512 cells, measured
after manufacture. It is stored in ticks of a slow global clock, one tick
every N chip cycles (`cfg_tick_div`), rounded down. A line stored with fewer
than 2 ticks is **dead** (see below why 1 tick is not enough). At 4.3 GHz a nominal cell keeps its
data about 5.8 µs, roughly 25,000 cycles; with N = 32 that is about 780 ticks,
well inside the 10-bit counters.

Nothing in the array itself loses data in this model: `l1d_data_array` is a
plain synchronous memory. The retention time is enforced by
`line_counter_bank`: a line whose age has reached its retention is treated as
empty, and the controller raises `ev_lost` if such a line was dirty. In a
correct configuration `ev_lost` never fires, and the testbench checks this.

## The global refresh scheme

`refresh_pulse_gen` divides the clock into a pulse every `cfg_gref_period`
cycles. On each pulse `refresh_row_gen` walks the 256 rows, issuing one row
every 8 cycles, so a sweep takes 2,048 cycles (476 ns at 4.3 GHz). A refresh
of a row is a read and a write-back of all four ways on consecutive cycles.
While a sweep is running, `block_port` is high: on a core with several cache
ports this is the signal that one read and one write port are taken. The
same pulse goes out as `sched_pulse` for the instruction scheduler.

A pulse that arrives during a sweep is remembered, so each row is refreshed
once every max(period, 2,048) cycles, plus a few cycles of port contention.
That interval must stay below the retention of the chip's weakest cell, in
cycles. For a chip with a 714 ns retention at 4.3 GHz (3,070 cycles), any
period up to about 2,900 cycles works. The line
counters keep running in this scheme, so a period that is too long shows up as
lines expiring (`ev_lost` if dirty).

## Line counters and the one-tick guard

This is the part to read carefully when you change timing.

Each line has:

* `retention` — its retention time in ticks (written through the `rt_*` port);
* `age` — ticks since the line was last written (cleared by a fill, a refresh
  or a move between ways);
* `life` — ticks since the block was loaded (cleared only by a fill or a
  move), used by partial refresh.

Ticks are global, so a line whose age reads A was written less than
(A + 1)·N cycles ago. Hence:

* **usable** while `age < retention` (its true age is then below
  retention·N cycles);
* **due** once `age + 1 >= retention`. The tick that would make the age equal
  the retention is then at least N cycles away, and the controller must
  refresh or evict the line within those cycles;
* **dead** when `retention < 2`. A tick can come one cycle after a line is
  written, so a 1-tick line could expire almost at once, and a refresh would
  not make it last longer. The counter cannot promise such a line any usable
  time, so it is never used. (The strict rule would be "dead below one tick";
  the tick granularity moves the limit to two.)

The controller serves due lines ahead of processor accesses, two cycles per
refresh. So N must be larger than the longest processor access that can be in
flight (miss latency to L2), plus two cycles for each line that can fall due
on the same tick. The testbench uses N = 32 with an L2 latency of 4–7 cycles.

## Refresh policies (`cfg_refresh`)

* **No refresh** — a due line is evicted. A clean line is just invalidated; a
  dirty one is read and pushed into the write buffer.
* **Partial refresh** — a due line whose retention is below `cfg_threshold`
  is refreshed for as long as its block has lived less than the threshold;
  after that it is evicted. Lines whose retention is at or above the
  threshold are never refreshed. Every block therefore lives at least the
  threshold time (or until replaced). Most accesses to a line come within its
  first ~6,000 cycles, which makes a threshold of that order a natural choice
  (about 190 ticks at N = 32).
* **Full refresh** — every due line that is not dead is refreshed.

**Write-buffer back-pressure.** If a dirty line must be evicted while the
write buffer is full (L2 is not draining it), the line is refreshed in place
instead, so its data survive until the buffer has room. To make this always
possible, the processor port takes no new access while the write buffer is
full: an access pushes at most one line (its victim or a bypassed store), so
it never waits on the buffer, and maintenance is never stuck behind it.

## Replacement policies (`cfg_repl`)

`repl_unit` works on one set at a time.

* **LRU** — plain true LRU over the four ways, blind to retention. If the
  least recent way is dead, the block cannot be kept: the access is served
  from L2, the dead way is marked most recent so the next miss uses another
  way, and a store is written to L2 as a full line.
* **DSP (dead-sensitive placement)** — the same LRU, but dead ways are never
  chosen (an empty live way first, else the least recent live way). A set
  whose four ways are all dead caches nothing; its accesses all go to L2.
* **RSP-FIFO (retention-sensitive placement)** — the live ways of a set are
  ranked by descending retention (ties to the lower way number). A new block
  goes into the longest-retention way; every block moves one rank down; the
  block in the shortest live way is evicted (written back if dirty). Moving a
  block rewrites it, which refreshes it, so its counters restart.
* **RSP-LRU** — like RSP-FIFO on a miss. On a hit, the hit block moves to the
  longest-retention way and the blocks ranked above it move down one rank,
  so the most recently used data always sit in the best lines.

The moves are done in one row write through `way_switch`, one multiplexer per
way that takes either the incoming block or any way of the same set. The
controller moves tag, valid and dirty bits with the data.

## The controller and its timing

`l1d_ctrl` owns the tags, valid, dirty and LRU bits, the data array, the
replacement unit and the way switch. One operation runs at a time, chosen in
idle in this order: a global refresh row, then the first due line, then a
processor access.

| operation | cycles on the array port |
|---|---|
| load or store hit | 2 (set read, then response; a store also writes the line back) |
| global or line refresh | 2 (read, write-back) |
| clean expiry | 1 (invalidate, no array access) |
| dirty expiry | 2 (read, push to the write buffer) |
| miss | 2 + victim push (1) + L2 handshake + 1 fill write |

A hit returns `resp_valid` exactly two cycles after the cycle in which
`req_valid && req_ready` was seen. Stores are 64-bit words; they mark the line
dirty and do not restart its counter (only whole-line writes do).

## Top-level interface (`l1d_3t1d_cache`)

| group | signals | notes |
|---|---|---|
| configuration | `cfg_scheme`, `cfg_refresh`, `cfg_repl`, `cfg_tick_div`, `cfg_threshold`, `cfg_gref_period` | change only while idle, then reset |
| retention table | `rt_we`, `rt_set`, `rt_way`, `rt_value` | one line per cycle, value in ticks, 0 = dead; all lines reset to the maximum |
| processor | `req_valid/ready`, `req_we`, `req_addr[31:0]`, `req_wdata[63:0]`, `resp_valid`, `resp_hit`, `resp_rdata` | one access outstanding; address bits 31:14 tag, 13:6 set, 5:3 word |
| refresh | `block_port`, `sched_pulse` | global scheme only |
| L2 read | `l2_req_valid/ready`, `l2_req_addr[25:0]`, `l2_resp_valid`, `l2_resp_data[511:0]` | one line per request, response any time later |
| L2 write | `l2_wr_valid/ready`, `l2_wr_addr`, `l2_wr_data` | from the 8-entry write buffer |
| events | `ev_hit`, `ev_miss`, `ev_gref`, `ev_sweep_done`, `ev_line_refresh`, `ev_expire_evict`, `ev_expire_wb`, `ev_stall_refresh`, `ev_victim_wb`, `ev_bypass`, `ev_shuffle`, `ev_lost`, `wb_count` | one-cycle pulses for statistics |

Bring-up: reset, set the configuration, write all 1,024 retention values,
then start accesses.

## Simulating

All sources are SystemVerilog-2017; the package must be read first. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl --top-module tb_l1d_3t1d_cache \
    rtl/l1d_pkg.sv $(ls rtl/*.sv | grep -v l1d_pkg) tb/tb_l1d_3t1d_cache.sv -o sim
./obj_dir/sim
```

Every testbench ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_l1d_ctrl` | the controller alone, with the line-counter status driven by the test: store miss and fill, 2-cycle hit, refresh of a due line, refresh instead of eviction while the write buffer is full, write-back of a dirty due line, DSP with three dead ways, a global row refresh. |
| `tb_l1d_3t1d_cache` | full-size cache, six phases: partial refresh + DSP with an L2 write stall, full refresh + LRU, no refresh + RSP-FIFO, no refresh + RSP-LRU, global refresh, and global refresh with a period longer than the retention. Every load is compared with a reference memory; every mechanism in the event list must occur; no dirty line may expire in phases 1-5 and some must in phase 6; hit latency is 2 cycles. About 20 s. |
| `tb_retention_schemes` | the eight line-level strategies on three synthetic chips with one trace; checks data, no dirty expiry, and that DSP/RSP never use a dead way; prints misses and refresh traffic. About 25 s. |
| `tb_line_counter_bank` | due after R−1 ticks, expired after R, dead below 2; random ticks, row operations and policies against a cycle model |
| `tb_repl_unit` | all four policies against a reference (victim, moves, LRU update) |
| `tb_refresh_row_gen` | 256 rows in order, 8 cycles apart, a 2,048-cycle sweep, block signal, back-pressure |
| `tb_refresh_pulse_gen`, `tb_line_tick_gen` | exact pulse spacing |
| `tb_way_switch`, `tb_l1d_data_array`, `tb_write_buffer` | against direct models |

The controller is tested through the end-to-end testbench.

## How the strategies compare

`tb_retention_schemes` gives a feel for the trade-offs. One trace of 3,000
accesses (70% re-use of the last 16 addresses, 30% stores) runs on three
synthetic chips with N = 32 and a partial-refresh threshold of 188 ticks.
Misses and line refreshes on the "bad" chip (30% dead lines, the rest 2–100
ticks):

| strategy | misses | line refreshes |
|---|---|---|
| LRU, no / partial / full refresh | 1165 / 942 / 877 | 0 / 5548 / 9397 |
| DSP, no / partial / full refresh | 1073 / 788 / 738 | 0 / 6420 / 9706 |
| RSP-FIFO, RSP-LRU (no refresh) | 886 / 872 | 0 / 0 |

On the "good" chip (150–600 ticks, nothing dead) all eight lie within 5% of
each other. These numbers depend on the synthetic retention spread and the
trace; they illustrate the mechanisms and are not a performance model.

## What is specified and what is chosen here

Taken from the architecture: the cache geometry; the global scheme with its
pulse generator, row-ID generator, block signal, read-then-write refresh and
8 cycles per row (2,048 per sweep); per-line counters on a 1/N clock; the
dead-line rule; the three refresh policies including refresh-on-stall; the
four replacement policies and the per-way multiplexers.

Chosen here, where the architecture leaves it open:

* a single-ported, blocking controller with one access outstanding, 64-bit
  words and a 32-bit address; real cores would pipeline and use several ports;
* one 512-bit-per-way row read/write per cycle in the array;
* 10-bit counters, 16-bit N, 24-bit global period, an 8-entry write buffer;
* the due point (`age + 1 >= retention`), dead lines below 2 ticks, and the separate life
  counter for partial refresh;
* partial refresh acting only on lines whose retention is below the threshold;
* LRU placing blocks in dead ways (and then serving them from L2), DSP
  preferring empty live ways;
* RSP ranking only live ways, ties to the lower way, and moved blocks
  restarting both counters;
* stores not restarting the line counter;
* the processor port held off while the write buffer is full.

Not modelled: the 3T1D cell itself (an analog circuit: the array is an
ordinary memory and retention is enforced by the counters), the processor
core and the L2 cache. There is no power model, so the dynamic-energy cost of
refresh that motivates the line-level schemes is visible only as event counts.

## Files

`rtl/l1d_pkg.sv` (geometry, policy enums), `rtl/l1d_3t1d_cache.sv` (top),
`rtl/l1d_ctrl.sv`, `rtl/l1d_data_array.sv`, `rtl/line_counter_bank.sv`,
`rtl/line_tick_gen.sv`, `rtl/repl_unit.sv`, `rtl/way_switch.sv`,
`rtl/write_buffer.sv`, `rtl/refresh_pulse_gen.sv`, `rtl/refresh_row_gen.sv`;
one testbench per block in `tb/`.
