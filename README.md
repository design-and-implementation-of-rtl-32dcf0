# Four-core CMP with private two-level MESI caches

Four processors share one bus to main memory, and each has its own
two-level data cache. The hard part is keeping the copies consistent. Other
cores may read or change a word at any time, and each core may hold that
word at two levels. The design rests on one rule:

> **The L1 writes through to the L2 in the same clock, with no buffer. The
> L2 writes back to memory and is the only level that snoops the bus.**

The L2 therefore always holds the newest value of every word its processor
has written. Snooping the L2 alone is then enough for coherence. The L1 never
talks to the bus. It only learns state changes from its own L2.

The SystemVerilog here is synthesizable and follows a published design: a
four-core CMP of pipelined MIPS processors with this cache system. That
design was built in VHDL on an FPGA and not released. This RTL does not
contain the processors or the main memory. Their ports are brought out of
the top, `cmp_top`.

## Block structure

```
 processor k ── cpu_addr/wdata/read/write, cpu_rdata, inhibit
      │
 ┌────┴──────────────── multilevel_cache (one per core) ─────────────┐
 │ l1_cache: cache_array (16 blocks) + tag_comparator x2 + controller │
 │     │ DataReq, Writethrough, EndInclusion, Aknow   (l1_to_l2_t)    │
 │     │ DataRdy + word + Newstate, StateChange        (l2_to_l1_t)   │
 │ l2_cache: cache_array (64 blocks) + tag_comparator x2 + controller │
 │           + one-entry write-back buffer + "in L1" bit per block    │
 └────┬───────────────────────────────────────────────────────────────┘
      │ BusReq, Cmd, Address, DataAvailable, WBRequest, data   (l2_bus_out_t)
      │ Grant, StrSend, CmdReceive, MDataRdy, StrRec, bus cmd/addr/data
 snoopy_bus (32-bit data, 8-bit address, 3-bit command)  ── bus_arbiter ── main memory port
```

| File | What it is |
|---|---|
| `rtl/cmp_pkg.sv` | Widths, depths, the MESI enum, the bus command enum, and the three signal bundles as packed structs |
| `rtl/tag_comparator.sv` | Tag equality plus valid, giving hit |
| `rtl/cache_array.sv` | Tags, data and MESI state of one level. Two asynchronous read ports; line, data and state-only write ports |
| `rtl/l1_cache.sv` | Write-through L1 and its miss controller |
| `rtl/l2_cache.sv` | Write-back, snooping L2: L1 service, bus requester, snooper, write-back buffer |
| `rtl/multilevel_cache.sv` | One L1 joined to one L2 |
| `rtl/snoopy_bus.sv` | The shared bus, built as a multiplexer |
| `rtl/bus_arbiter.sv` | Central arbitration, cache-to-cache routing, main memory sequencing |
| `rtl/cmp_top.sv` | Four `multilevel_cache`, the bus and the arbiter |

Addresses are 8-bit **word** addresses, so there are 256 words of 32 bits.
One cache block is one word. Both caches are direct-mapped. The L1 index
(the low 4 bits) is part of the L2 index (the low 6 bits). Two addresses that
clash in the L2 therefore also clash in the L1.

## How the L1 and L2 cooperate

This is the least obvious part of the design.

**Processor handshake.** A core holds `cpu_read` or `cpu_write`, with its
address and data, until it sees a clock with `inhibit` low. That clock
completes the request, and `cpu_rdata` is valid in it.

**L1 hits.** A read hits on S, E or M. A write hits only on E or M. A write
hit updates the L1 word and sets the block to M. In the same clock it raises
`Writethrough`, which carries the same address and data. The L2 writes the
word on the same clock edge and marks its block M. A write therefore reaches
both levels in one clock. No write-through buffer exists, so a later L1 miss
can never reach the L2 ahead of an earlier write.

**L1 misses.** `inhibit` is raised at once. If the replaced L1 block is in M
and belongs to another address, `EndInclusion` sends its address to the L2 in
the same clock. From the next clock `DataReq` asks the L2 for the missing
word, and a flag says whether the miss is for a write. A write needs E or M,
so a write to an S block also counts as a miss. The L2 answers with
`DataRdy`, the word and its state (`Newstate`). The L1 fills the block in
that clock and raises `Aknow`. The held request then hits on the next clock.

**State changes pushed down.** The L2 may change a block's state because of a
snoop, or drop a block on replacement. The L1 may hold a copy of that block.
So the L2 sends `StateChange` with the address (`StateChAdd`) and the new
state. The L1 compares the address with its own tag and updates its copy only
if they match. The L2 keeps one "in L1" bit per block and sends `StateChange`
only when that bit is set:

* `Aknow` sets the bit.
* `EndInclusion`, an invalidation or a replacement clears it.

`EndInclusion` is sent only for M blocks. A clean block the L1 has dropped
can therefore still have its bit set. The worst this causes is a
`StateChange` that the L1 ignores.

**The one race, and how it is closed.** A snoop could change the state of a
block in the very clock its own processor writes it. The write would then
miss the data just handed to another cache. The L1 prevents this: a hit to a
block whose `StateChange` arrives in the same clock waits one clock. For the
same reason, the L2 does not start a new `DataReq` in a clock in which a
snoop changes a state.

## Bus transactions

An L2 miss goes through five steps:

1. raise `BusReq`;
2. wait for `Grant`;
3. drive `Cmd` and `Address`;
4. wait for the acknowledgement;
5. take the word from the bus and pass it to the L1 in the same clock.

The command is chosen in the clock `Grant` arrives, from the state at that
moment. Suppose another core's exclusive read removed an S copy while this
cache waited for the bus. The planned invalidate then becomes a read for
exclusive.

| Request | `Cmd` | Acknowledgement | New state |
|---|---|---|---|
| write to a block held in S | `011` invalidate other copies | CmdReceive | M |
| write miss | `010` read for exclusive | CmdReceive + MDataRdy, or CmdReceive + StrRec | M |
| read miss, no other copy | `001` read for shared | CmdReceive + MDataRdy | E |
| read miss, another copy exists | `001` read for shared | CmdReceive + StrRec | S |
| dirty block leaving the write-back buffer | `111` write back | none | – |
| end of tenure | `000` release | – | – |

**Snooping.** Every L2 compares each read and invalidate on the bus with its
tag array, through the second read port and second comparator. It also
compares them with its write-back buffer. It reports what it holds:

* `DataAvailable` when it holds a clean copy (S or E);
* `WBRequest` when it holds a dirty copy (M, or the word in its write-back
  buffer).

It also offers the word on its snoop-data lines. The new states are applied in
the clock the bus shows `CmdReceive`:

| Snooped | Held | Action | New state |
|---|---|---|---|
| read for exclusive | S, E | DataAvailable | I |
| read for exclusive | M | WBRequest (the word is also written to memory) | I |
| read for shared | M | WBRequest (the word is also written to memory) | S |
| read for shared | S, E | DataAvailable | S |
| invalidate | S | – | I |

**Arbitration** (`bus_arbiter`). Grants rotate round-robin, and `Grant`
follows `BusReq` by one clock. When a read appears on the bus, the arbiter
looks at the other caches' `DataAvailable` and `WBRequest` lines in that same
clock. If any cache holds a copy, the arbiter chooses one supplier:

* a cache raising `WBRequest` first;
* otherwise the lowest-numbered cache raising `DataAvailable`.

The chosen cache gets `StrSend`, and the requester gets `StrRec` and
`CmdReceive`. The word moves cache-to-cache in that clock. A dirty word is
also copied into the arbiter's one-word write-back register and written to
memory before the next grant. If no cache holds a copy, the arbiter reads
main memory. It raises `MDataRdy` and `CmdReceive` in the clock the memory
answers. `CmdReceive` is a shared line: the snoopers use it as their commit
strobe.

**Write-back buffer.** When an L2 miss replaces an M block, the block moves
into a one-entry buffer. The miss is served first. The buffer then goes out
with command `111`, right after the miss or before the next miss. A snoop that
hits the buffer in the meantime is served from it with `WBRequest`. Because
`WBRequest` also writes the word to memory, the buffer is then empty and the
pending write-back is dropped.

## Latencies

Latency is counted in clocks from the first clock of a request to its
completing clock, both included.

| Case | This RTL | Published figure |
|---|---|---|
| L1 hit | 1 | – |
| L1 miss, L2 hit | 3 | 3 |
| miss served by another cache | 6 | 8 |
| miss served by main memory | 6 + memory read latency (9 with a 3-clock memory) | 9 |
| write to both levels | 1 | 1 |

The L2-hit and write figures match the published ones. The bus paths are
2 clocks shorter here, because the arbiter decides and transfers in the
command's first clock. The published design's bus timing is not known in
enough detail to copy. Dirty write-backs and bus contention add to these
figures.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `ADDR_W`, `DATA_W` | 8, 32 | `cmp_pkg` (from the published design) |
| `N_CPU` / `N` | 4 | `cmp_pkg`, `cmp_top`, `bus_arbiter`, `snoopy_bus` (from the published design) |
| `L1_BLOCKS` / `L1_DEPTH` | 16 | own choice |
| `L2_BLOCKS` / `L2_DEPTH` | 64 | own choice |

The depths must be powers of two, with the L2 larger than the L1.

## Departures from the published design and own choices

* **Cache sizes and block size** were not published. This design uses
  one-word blocks, a 16-block L1 and a 64-block L2. With these sizes,
  addresses 255 and 127 share an L1 block, which is the conflict case the
  published tests use.
* **Same clock edge.** In the original, the L2 takes a write half a clock
  before the L1 does. Here both levels are written on the same edge.
* **Own additions:**
  * the write flag on `DataReq`;
  * the per-block "in L1" bit;
  * the one-clock hold-off described above;
  * choosing the bus command at grant time;
  * the one-entry write-back buffer;
  * round-robin grants and the supplier priority;
  * a shared `CmdReceive` as the snoop commit strobe;
  * the memory handshake.
* **Clean S copies supply data.** The published snoop table leaves the action
  of an S copy under "read for shared" blank. Here S copies raise
  `DataAvailable`, like E copies.
* **The `Delay` line** drawn between the arbiter and the L2 has no described
  function. It is not built.
* **The bus is a multiplexer** rather than tri-state wiring.
* **Reset** is asynchronous and active low. It clears the state bits (every
  block to I) and the controllers. Tags and data are not reset.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. For example, the end-to-end test at
default parameters:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmp_pkg.sv tb/tb_cmp_top.sv --top-module tb_cmp_top
./obj_dir/Vtb_cmp_top
```

| Testbench | Covers |
|---|---|
| `tb_cmp_top` | All four cores at default sizes. Directed latency checks and the 255/127 conflict case, then 20 000 random reads and writes over a small address set, every read checked against a reference memory. Counts each mechanism and fails if one never occurred: L2 hit, write-through, EndInclusion, StateChange, hold-off, E and S fills, read for exclusive, cache-to-cache (clean and dirty), invalidate, write-back, snoop served from the write-back buffer |
| `tb_cmp_top_stress` | The same random test with a 4-block L1, an 8-block L2 and a 1-clock memory, so replacements, write-backs and bus contention are far more frequent |
| `tb_multilevel_cache` | One core on its own bus: the 255/127 case, latencies, write-back of an evicted dirty block, random traffic |
| `tb_l1_cache` | The L1 against a behavioural L2 with variable answer delay and injected state changes |
| `tb_l2_cache` | The L2 with the L1 side and the bus driven clock by clock: every command, acknowledgement and snoop action above |
| `tb_bus_arbiter` | Grant timing, round-robin, supplier choice, memory read and write paths, a requester giving the bus back |
| `tb_cache_array`, `tb_tag_comparator`, `tb_snoopy_bus` | The storage, the comparator and the bus multiplexer |

`tb/main_memory_model.sv` is a behavioural 256-word memory with adjustable
read and write latency. Word `a` starts as
`{8'hA5, a, ~a, a ^ 8'h3C}`.

## How far to trust it

All testbenches pass. Each was also run against a copy of its module with one
deliberate bug, and caught it. The random test covers many interleavings of
four cores, but it is simulation, not a proof. The design has not been
synthesized for a device or timed. In a real chip, the combinational path
from the bus command through the snoop lookups and the arbiter's supplier
choice to the data lines would be the longest path.
