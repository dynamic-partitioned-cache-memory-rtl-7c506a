# Dynamic partitioned cache for mixed-criticality multi-core systems

When a safety-critical task and an ordinary task run on two cores that share
a cache, the ordinary task can evict the critical task's lines at any time,
and the critical task's worst-case execution time becomes hard to bound. This
design removes that interference by partitioning the shared cache by **whole
ways**. At any moment each way belongs to at most one core. A core looks up,
and replaces lines in, only the ways it owns. Ownership can be changed at run
time, and only the critical core can change it:

* before a critical task starts, the critical core takes some ways away from
  the non-critical core and gives them to itself;
* while the task runs, the task has a private cache of a known size. The
  non-critical core cannot touch it, so the task's hit/miss behaviour does
  not depend on what the other core does;
* when the task ends, the ways go back to the non-critical core, which uses
  the whole cache again until the next critical task.

Because a way is owned as a whole, giving it back is cheap. There are no
lines scattered over all sets to find and release, which is the problem with
priority-based cache schemes that lock individual lines.

The RTL is written in SystemVerilog (IEEE 1800-2017) and is synthesizable.
Its default configuration is the one the architecture was evaluated with:
a 16 KB cache with 8 ways, shared by one critical and one non-critical 32-bit
core. The system top places two such core groups on a shared memory bus.

## Structure

```
 dpc_system                                   (NUM_GROUPS core groups)
 ├─ dp_cache  (one per core group)            dynamic partitioned cache
 │   ├─ cwmu      ways management unit: ways masks, free pool, reconfiguration
 │   ├─ ccu       cache control unit
 │   │   ├─ cache_ctrl × NUM_CORES            one controller per core
 │   │   └─ mem_mux → rr_arbiter              controllers share the SDRAM path
 │   ├─ ccs       core-to-cache switch: controller i ↔ the ways in mask i
 │   └─ cwb       cache ways block: NUM_WAYS banks of valid/tag/data
 └─ mem_mux → rr_arbiter                      system bus to off-chip memory
```

Inside a group, core 0 is the **non-critical** core and cores 1..NUM_CORES-1
are **critical** cores. (The default is two cores, so there is one critical
core.) Only critical cores have a reconfiguration port. The processors and
the off-chip memory are outside the RTL, so their signals are ports of
`dpc_system`.

Arbitration is round-robin on two levels. Inside a group, the cores' memory
requests meet in one multiplexer. At system level, the groups meet on the
bus. In both places, a waiting requester is served before any other requester
is served twice, so memory delay is bounded by the number of requesters.

## Way ownership and reconfiguration (`cwmu`)

This is the heart of the design. The `cwmu` keeps one **ways mask** per core:
bit *w* set means that the core owns way *w*. The masks never overlap. Ways
that no core owns form the **free pool**. After reset, the non-critical core
owns every way.

A critical core sends one of four requests, each with a way count *n*. A
critical task is wrapped in all four, in this order:

| step | `cfg_op`      | effect |
|------|---------------|--------|
| 1    | `OP_FREE_NC`  | the non-critical core releases *n* ways to the pool |
| 2    | `OP_ALLOC_C`  | the requesting critical core takes *n* ways from the pool |
| –    | (task runs)   | the critical core works in its private ways |
| 3    | `OP_FREE_C`   | the critical core releases *n* of its ways |
| 4    | `OP_ALLOC_NC` | the non-critical core takes *n* ways from the pool |

A critical core can change only its own mask and the non-critical core's.
Besides the count, each request carries a way-select mask `cfg_sel`. Only
the ways set in it may be moved, so a core can ask for particular ways, for
example ways 2 and 5 (the select mask is then `8'b0010_0100` in all four
steps). All ones lets the unit choose. Among the eligible ways, allocation
takes the lowest-numbered free ones and release gives up the
highest-numbered owned ones. If a request asks for more ways than are
eligible, the unit moves what exists and reports the number in `cfg_moved`.

The number of ways a task needs is decided ahead of time, not by this
hardware. The intended method is a greedy offline search: start every
critical task with one way, then repeatedly give more ways to the task whose
worst-case time falls most per added way. Stop when the tasks' summed
worst-case times fit within their common deadline. The result is the *n* a
critical core uses in steps 2 and 3.

Changing a mask while an access is in flight would corrupt that access. The
unit therefore switches in three steps:

1. It takes the request (`cfg_valid` with `cfg_op`, `cfg_num` and
   `cfg_sel`, held until `cfg_done`) and raises
   `hold`. While `hold` is high, no cache controller starts a new access.
2. It waits until every controller reports `idle`. An access already under
   way finishes first; with write-through this includes its memory transfer.
3. It rewrites the masks and pulses `cfg_done` for one cycle. One cycle later
   it pulses `inval` for every way that was released. That clears all the
   way's valid bits at once, so the next owner starts with an empty way and no
   data passes from one core to the other.

When the controllers are idle, `cfg_done` rises two cycles after `cfg_valid`
is first seen. If several critical cores ask at once, they are served one at
a time, lowest port first.

## Cache controller (`cache_ctrl`)

Each core has its own controller. An access is a 32-bit word with byte
enables. The request is held until `core_ack`.

* **Lookup.** The set index goes to all ways at once through the switch. In
  the next cycle, the tags of the ways in the core's mask are compared. The
  switch returns other cores' ways as invalid, so they can never hit.
* **Read hit.** Acknowledged with the data in the cycle after the request is
  taken.
* **Read miss.** The 32-byte line is fetched from memory and written into a
  victim way. The victim is the lowest owned way that is invalid in that set.
  If all owned ways are valid, it is the owned way at or after that set's
  round-robin pointer (FIFO order within the set). Victims are chosen only
  from the core's own ways, so one core can never evict another's lines. A
  core that owns no way is served from memory without allocating a line.
* **Write.** Write-through without allocation. A hit also updates the cached
  word. The word always goes to memory as a line-wide write with byte strobes.
  Because memory always holds current data, a way can change owner without
  any write-back.
* `stat_hits` and `stat_misses` count lookups per core, for measuring how the
  partition affects each core.

Address split with the defaults: tag = bits 31..11, set = bits 10..5
(64 sets), byte in line = bits 4..0.

## Parameters

| parameter     | default | meaning |
|---------------|---------|---------|
| `NUM_GROUPS`  | 2       | core groups on the bus (`dpc_system` only). Set it to 1 for a single group, as in the FPGA prototype the architecture was measured on. |
| `NUM_CORES`   | 2       | cores per group; core 0 is non-critical |
| `CACHE_BYTES` | 16384   | capacity of each group's cache |
| `NUM_WAYS`    | 8       | ways, the unit of partitioning |
| `LINE_BYTES`  | 32      | line size (own choice) |
| `ADDR_W`, `DATA_W` | 32, 32 | byte address and core word width |

`SETS = CACHE_BYTES / (NUM_WAYS × LINE_BYTES)` must be a power of two. The
package `dpc_pkg` holds the defaults and the `cfg_op_e` encoding.

## Interfaces

All ports use one handshake rule: the requester raises `*_req` (or
`cfg_valid`) with its fields and keeps them stable until it sees the one-cycle
acknowledge (`core_ack`, `mem_ack`, `cfg_done`). It drops the request in the
next cycle. Memory transfers are whole lines: `mem_addr` is line-aligned,
`mem_wdata`/`mem_wstrb` carry a written word at its position in the line, and
`mem_rdata` returns the line together with `mem_ack`. Reset is active-low and
asynchronous (`rst_n`). Arrays of ports are indexed `[group][core]`.

## How far it can be trusted

The testbenches check every result against models written independently of
the RTL. Each block also has a deliberately broken copy, and its testbench
detects it.

| testbench        | what it shows |
|------------------|---------------|
| `tb_rr_arbiter`  | grant equals a reference rotation every cycle; a waiting requester is never passed over N times |
| `tb_mem_mux`     | three masters; data correct; every transfer done exactly once; the round-robin bound |
| `tb_cwb`         | random tag/byte writes, read-back after one cycle, whole-way invalidation |
| `tb_ccs`         | random disjoint masks; routing and hiding of foreign ways |
| `tb_cwmu`        | random requests from two critical cores, half of them naming random ways, against a reference partition; a critical core given exactly ways 2 and 5; nothing changes while a controller is busy; invalidation of released ways; done two cycles after the request |
| `tb_cache_ctrl`  | random reads and writes, one-cycle read-hit acknowledge, write-through count, lines outside the mask survive, empty mask, `hold` |
| `tb_ccu`         | two controllers with fixed masks; core 1 keeps all its lines while core 0 thrashes its own |
| `tb_dp_cache`    | one critical task through all four steps while the non-critical core runs; the second pass over the task's 8 KB hits every time and takes **the same number of cycles with and without the other core running** |
| `tb_taskset`     | task-set workload: five sets of 3–4 critical tasks, run frame by frame with the four-step wrapper, then again with a static partition (the critical core keeps its largest share all the time); every critical task's second pass hits in every access, and the non-critical core's miss rate is lower with the dynamic partition for every set |
| `tb_dpc_system`  | the whole system at default size: both groups run a critical task and a non-critical loop at once; group 1 names its ways (1, 2, 5, 6); all data, partitions and mechanisms (bus and SDRAM contention, drain wait, invalidation of exactly the released ways, all four operations, way selection) checked |

Each testbench ends with a line `TB_RESULT checks=N failures=M`.
`tb/mem_model.sv` is a behavioural fixed-latency memory used by the
testbenches. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          +libext+.sv rtl/dpc_pkg.sv tb/tb_dpc_system.sv --top-module tb_dpc_system
./obj_dir/Vtb_dpc_system
```

Assertions in the RTL check the bus and switch rules: a master holds its
request until acknowledged, no way has two owners, a hit is one-hot, and the
masks change only while the controllers are idle.

## What the partitioning buys

`tb_taskset` puts numbers on the trade-off. The non-critical core runs random
accesses over 14 KB without stopping. The critical core runs 2–8 KB tasks,
each given ceil(size / 2 KB) ways, inside 40 000-cycle frames. With a static
split, the critical core keeps its largest share for the whole run. With the
dynamic split, it holds ways only while a task runs. For the first task set,
the non-critical core misses 298 times per 1000 lookups with the static split
and 47 times with the dynamic one; the other sets are similar. In both modes,
the critical tasks see exactly the same hits. These sizes are invented for
the test, so only the direction of the result carries over to real programs,
not its size.

## Own choices and limits

The block structure and the four-step protocol come from the original
description of the architecture: CWMU, CCU with one controller per core, CCS,
CWB, reconfiguration only by critical cores, the free pool, and asking for
either a number of ways or particular ways. So does the
16 KB / 8-way, two-core configuration. The following are choices made for
this implementation, where the description gives no detail:

* 32-byte lines; write-through with no write allocation; the replacement
  rule; single-cycle tag lookup with synchronous-read arrays.
* Which of the eligible ways an allocation or release picks; the
  hold–drain–switch sequence; invalidating released ways; giving every way
  to the non-critical core at reset.
* The handshakes, the line-wide memory port, and round-robin sharing of the
  SDRAM path inside a group. Round-robin on the system bus follows the
  description.
* There is **no coherence** between cores. A line cached by one core is not
  updated when another core writes the same address. Cores are expected to
  work on separate data, as critical and non-critical tasks do here; shared
  data needs software care, for example keeping it out of the cache.
* The non-critical core uses only the ways in its mask. Ways sitting in the
  free pool between two requests are used by nobody until they are allocated.
* A request names ways with a select mask plus a count; the encoding is
  this design's.
* Each cache has exactly one non-critical core (core 0).
* The design supports several critical cores per group (`NUM_CORES > 2`). The
  reconfiguration rules were meant for one critical core per group, which is
  the tested configuration.
* The processors, the SDRAM controller and the offline way-count selection
  are not part of the RTL. The benchmark task sets the architecture was
  measured with are software, and cannot run without processors. The
  testbenches instead reproduce their structure: a critical task wrapped in
  the four calls, running against a non-critical loop.
