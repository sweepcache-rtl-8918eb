# SweepCache: a crash-consistent volatile data cache for intermittently powered processors

Energy-harvesting processors lose power often and without warning. They keep their
main memory in nonvolatile memory (NVM), so committed stores survive. A volatile SRAM
data cache in front of that memory would speed them up greatly, but a power loss wipes
out its dirty lines, and NVM is left holding half of a computation. The usual remedy
is just-in-time checkpointing: a voltage monitor detects the coming power loss and
backs up the cache and registers in time. That remedy costs hardware, and it costs
the energy reserve the backup needs.

SweepCache needs no backup at power loss. Instead:

* The compiler cuts the program into **regions**. It stores a region's live-out
  registers and its recovery PC to fixed NVM slots with ordinary store instructions.
  No region holds more stores than a persist buffer has entries (64).
* The cache never writes NVM directly. Everything a region writes back goes first
  into that region's **persist buffer**, a redo log kept in NVM. That covers lines
  evicted while the region runs and, at the region end, every line the region left
  dirty. Only when the whole region is in the buffer is the buffer copied to NVM. A
  power loss at any moment finds either the buffer or the NVM home locations intact.
* At each region end the cache is **swept**: its dirty lines are written to the
  buffer and marked clean, but they stay in the cache. The next region therefore
  starts with no dirty lines, and an interrupted region can simply be run again.
* Two persist buffers give **region-level parallelism**. The next region starts at
  once, while the region just ended is still being persisted.

This repository holds synthesizable SystemVerilog for the hardware side. That is
the cache, its controller, the two persist buffers, the tables and engines that move
data between them, the persistent status register, and the power-up recovery logic.
The compiler and the recovery runtime are software, and they are not included.

## Persisting a region: the two phases

A region's data moves in two steps. Each step has a status bit per buffer, and both
bits live in one persistent register (`persist_status_reg`).

| step | what moves | done when | bit set |
|------|------------|-----------|---------|
| s-phase1 | during the region: dirty victims, cache → buffer; at the region end: all remaining dirty lines, cache → buffer | the region's write-back-instructive table is empty | `phase1Complete` |
| s-phase2 | buffer → NVM home lines, oldest entry first | all entries copied | `phase2Complete` |

Seen in time, s-phase1 itself splits in two. Write-backs of evicted lines happen
while the region runs. The sweep of the remaining dirty lines happens at its end. The
copy to NVM then comes third.

A region's status therefore goes (0,0) → (1,0) → (1,1). The buffer is emptied when
the status reaches (1,1), and from then on it is free for the region after next.

**Finding the dirty lines at a region end.** Scanning the cache for dirty lines would
be slow. A scan would also be wrong: once the next region is running, its own stores
create new dirty lines that belong to the next region. So each buffer has a
**write-back-instructive table** (`wb_table`), with one bit per cache line (64 bits
by default). A store sets the bit of its line in the running region's table. An early
eviction clears the bit, because that line is already in the buffer. At the region
end, `flush_engine` walks the set bits of that table. For each one it pushes the line
into the buffer, clears the line's dirty bit in the cache and clears the table bit.

**Copying to NVM.** `dma_engine` copies the entries in the order they were pushed.
Where a line was pushed twice, the younger copy therefore lands last. Running the copy
a second time gives the same result, and recovery relies on that.

## Two buffers, T_wait and the write-after-write rule

`region_ctrl` assigns the buffers. A bit, `cur`, names the buffer of the running
region. The other buffer, `prev`, belongs to the region before it. A region end is
accepted (`re_ack`) only when `prev` is (1,1). Then `cur` and `prev` swap roles, the
new running buffer is reset to (0,0), and the flush of the region that just ended
starts. If the region before has not finished its s-phase2, the region end waits.
That wait is **T_wait**, and `events.region_wait` counts it in cycles. This design
persists only one region at a time. As a result the s-phase2 copies always happen in
region order.

While the previous region is still flushing (`prev` has `phase1Complete` = 0), a
store from the new region must not change a line the previous region still has to
flush. The rule is: a store that hits a **dirty** line waits until `phase1Complete`
becomes 1. The cache cannot tell which region dirtied a line, so the rule sometimes
waits when it need not. That case is rare. This design applies the same rule to a
miss whose victim line is dirty: the miss waits, because that victim may also still
belong to the previous region.

## Misses and the empty-bit

On a miss, the newest copy of the line may still sit in a persist buffer instead of
in NVM. Two cases lead there: the line was evicted earlier in this region, or it
belongs to the previous region, which is still persisting. `buffer_search` therefore
checks the buffers first:

1. the running region's buffer, youngest entry first;
2. then the previous region's buffer, youngest entry first;
3. then NVM, if neither buffer holds the line.

The search is sequential, one NVM read per entry, because associative search in NVM
would cost too much. It is usually skipped. The buffers are nearly always empty:
flushed lines stay in the cache, and evictions are rare. Each buffer therefore has an
**empty-bit**, and an empty buffer is skipped at no cost (`EMPTY_BIT = 1`, the
default). With `EMPTY_BIT = 0`, the search first reads each buffer's fill pointer
from NVM, as the variant without empty-bits does.

## Power loss and recovery

Power loss is modelled by the two resets:

* `rst_n` is the power-up reset. Everything volatile loses its state: the cache's
  valid and dirty bits, the tables and the controller state.
* `por_n` is asserted only when the device is first powered. It initialises the
  NVM-resident state: the status register and the buffers' fill counts and
  empty-bits. That state is never touched by `rst_n`.

After every power-up, `region_ctrl` checks the previous region's buffer before it
raises `ready`:

| prev status | meaning | action | software resumes at |
|-------------|---------|--------|---------------------|
| (0,0) | the previous region's flush was cut short | discard both buffers | start of the previous region |
| (1,0) | the previous region is complete in its buffer | re-run its s-phase2, then discard the running region's buffer | start of the running region |
| (1,1) | nothing pending | discard the running region's buffer | start of the running region |

`rec_action` reports which case was found. Software always resumes at the PC saved
last in NVM, which is correct in all three cases. That PC was written by the last
region whose s-phase2 completed. The software then reloads the checkpointed
registers. The hardware only has to leave NVM in the right state first.

## Blocks and files

| file | block |
|------|-------|
| `rtl/sweepcache_pkg.sv` | sizes, types (`phase_t`, `rec_action_t`, `sc_events_t`) |
| `rtl/sweepcache_top.sv` | top level: wires everything below |
| `rtl/dcache_array.sv` | 2-way cache storage, tags/valid/dirty/LRU, two read ports |
| `rtl/cache_ctrl.sv` | hits, write-allocate misses, dirty evictions, write-after-write stall |
| `rtl/wb_table.sv` | write-back-instructive table (two instances) |
| `rtl/persist_buffer.sv` | NVM-resident FIFO with empty-bit (two instances) |
| `rtl/buffer_search.sv` | sequential miss search with empty-bit bypass |
| `rtl/flush_engine.sv` | region-end flush, s-phase1 |
| `rtl/dma_engine.sv` | buffer → NVM copy, s-phase2 |
| `rtl/region_ctrl.sv` | region ends, buffer hand-over, T_wait, recovery; holds `persist_status_reg` |
| `rtl/persist_status_reg.sv` | phase bits and `cur` bit, persistent |
| `rtl/nvm_arbiter.sv` | one NVM port for miss reads and DMA writes (reads first) |
| `tb/nvm_model.sv`, `tb/workload_rig.sv` | behavioural NVM; a cache, NVM and processor model running a synthetic workload |

Default parameters follow the evaluated configuration:

* a 4 KB cache, 2-way, with 64-byte lines (`N_SETS = 32`), which gives 64-bit tables;
* 64-entry persist buffers (`DEPTH = 64`);
* a 16 MB NVM (24-bit byte address);
* NVM latencies of 20 ns per read and 120 ns per write. They appear as `RD_LAT = 2`
  and `WR_LAT = 12` cycles, assuming a 100 MHz clock.

Not included:

* the processor;
* the NVM array itself;
* the voltage comparator that decides when to reboot;
* the compiler and the recovery runtime.

The top brings out the ports where these connect.

### Interface of `sweepcache_top`

* **Processor.** `cpu_req`, `cpu_we`, `cpu_addr` (byte address), `cpu_wdata` and
  `cpu_be` are held until `cpu_ack`. A hit is acknowledged in the same cycle. Load
  data in `cpu_rdata` is valid with `cpu_ack`.
* **Region end.** `re_req` is held until `re_ack`, and it must not overlap an
  access. An assertion checks this.
* **NVM.** Whole 512-bit lines move over `nvm_req`, `nvm_we`, `nvm_laddr`,
  `nvm_wdata`, `nvm_ack` and `nvm_rdata`. A request is held until `nvm_ack`. Write
  data commits with the ack, and read data is valid with it.
* **Status.** `ready`, `rec_action`, `cur_buf`, `status[2]` and `pb_empty` report
  the recovery and buffer state.
* **Events.** `events` carries one-cycle pulses: hit, miss, dirty eviction,
  empty-bit bypass, buffer probe, buffer hit, NVM fill, WAW stall, region end, T_wait
  cycle, flush line, DMA line, recovery replay and recovery discard.

## Simulating

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sweepcache_pkg.sv \
    tb/tb_sweepcache_top.sv --top-module tb_sweepcache_top -o sim
./obj_dir/sim
```

`tb_sweepcache_top` runs the top at its default size against `tb/nvm_model.sv`, a
behavioural NVM with the same latencies. The testbench plays the processor:

* It runs 400 generated regions of loads and stores. The addresses span 16 KB and
  include a hot group of conflicting lines.
* Each region ends with a checkpoint store of the next region's number, which stands
  in for the PC checkpoint.
* A reference memory checks every load.
* It injects power losses while the previous buffer is in each of the three states.
  After each one it reads the checkpoint through the cache, checks the resume point
  against the recovery case and re-runs from there.
* At the end it compares the NVM contents with the reference.
* It fails if any mechanism listed under Events never occurs.

`tb_region_workload` runs a longer, failure-free workload on ten configurations:

* the default 4 KB cache;
* the same cache without empty-bits (`EMPTY_BIT = 0`);
* caches of 512 B, 1 KB, 2 KB, 8 KB and 16 KB (`N_SETS` = 4 … 128), all 2-way with
  empty-bits.
* persist buffers of 32, 128 and 256 entries (`DEPTH`) with the 4 KB cache.

All ten configurations run the same workload: 2000 synthetic regions of 4 to 35 instructions, 19.5 on average.
About 20 % of the instructions are stores, which gives 3.9 stores per region. Each
configuration checks every load and the final NVM contents. The testbench reports:

| cache | search | cycles | miss rate | buffer consultations skipped | parallelism efficiency |
|-------|--------|--------|-----------|------------------------------|------------------------|
| 4 KB | empty-bits | 245 237 | 5.8 % | 64.5 % | 61 % |
| 4 KB | NVM pointers | 246 317 | 5.8 % | 0 % | 62 % |
| 512 B | empty-bits | 327 233 | 49.7 % | 56.3 % | 87 % |
| 1 KB | empty-bits | 261 016 | 20.3 % | 59.0 % | 72 % |
| 2 KB | empty-bits | 245 895 | 6.8 % | 63.2 % | 61 % |
| 8 KB | empty-bits | 244 832 | 5.3 % | 64.7 % | 61 % |
| 16 KB | empty-bits | 244 468 | 4.8 % | 64.8 % | 61 % |

The three other buffer sizes give exactly the 4 KB empty-bit row. No region comes
near 32 stores, so the buffer size, and with it the compiler's store threshold, does
not change a cycle of this workload.

Parallelism efficiency is (ΣT_p − ΣT_wait) / ΣT_p. T_p is a region's persistence
latency, from its end until its buffer reaches (1,1).

The address mix is invented and heavy on stores, so these figures describe this
testbench, not real programs. With fewer dirty evictions the buffers are empty more
often and more consultations are skipped. Efficiency is higher for the small caches
only because their many misses make the regions themselves longer.

The other testbenches each test one block, with models around it.

## Departures from the described design and open points

* **Cycle timing is this design's own.** That includes the 100 MHz clock behind the
  latency parameters, the same-cycle hit, the one-line-at-a-time flush and the
  one-cycle arbitration.
* **The persist buffers are register arrays.** They are not reset by power loss,
  which stands in for their NVM residence. They are not a region of the NVM model.
  Their write latency is charged per push, and their read latency per entry read.
* **One extra persistent bit.** Besides the four phase bits and the two
  empty-bits, the persistent status register holds `cur`, which names the running
  region's buffer. Recovery needs it to tell the two buffers apart.
* **One region is persisted at a time.** A region end waits for the previous
  buffer to be free. The described scheme needs this anyway with two buffers.
* **The write-after-write rule also covers evictions.** A miss with a dirty victim
  waits while the previous flush runs. The described rule only covers stores.
* **The cache policy details are chosen here.** These are LRU replacement,
  write-allocate, 32-bit words with byte enables, and reads winning NVM arbitration.
* **Power loss is abrupt.** A line write to NVM or to a buffer is taken to be atomic.
  Writes in flight when `rst_n` falls are dropped.
* **A buffer overflow is only flagged.** The compiler bounds a region's stores by
  the buffer size, so a push into a full buffer is a software error. An assertion
  reports it, and nothing else handles it.
