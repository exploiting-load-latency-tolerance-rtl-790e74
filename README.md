# Multi-lateral L1 data cache with a critical cache

A first-level data cache has to be large enough to hide memory latency and
small enough to answer in one clock cycle. This design stops asking one
cache to do both. Not every load slows the program when it waits longer.
Many loads tolerate several extra cycles. A few "critical" loads do not.

The design keeps a conventional DL1 data cache that may be large and
slow (16 KB, 2-cycle hits by default). Next to it sits a small, fast
**critical cache** (1 KB, 1-cycle hits). Loads found to be latency
intolerant read both caches. All other loads read only the DL1. Every store
writes both caches.

```
                 loads and stores (core_req, core_crit)
                               |
                        +------+------+      decode-time lookup
                        |  mlc_ctrl   |<---- crit_table (PCs of critical loads)
                        +--+-------+--+
          all loads,       |       |   critical loads,
          all stores       v       v   all stores
                  +---------+     +----------+
                  |  DL1    |     | critical |
                  | 16 KB   |     |  cache   |
                  | 2 cycle |     | 1 KB, 1c |
                  +----+----+     +----+-----+
                       |  ldd           |  ldc      (load results)
                  to level 2       to level 2
```

## Which loads are critical

Criticality is decided **offline and statically**, per load instruction
(per PC). To classify a load, a profiler raises the latency of that one load
and leaves every other load at one cycle. The load is critical if, at 12
cycles of latency, the program loses at least 0.2 % of its performance
against an ideal one-cycle memory. This is a threshold pair of
(99.8 %, 12 cycles). The class never changes while the program runs. In the
profiled integer benchmarks, 17 to 107 static loads came out critical. They
made up 12 % to 23 % of all dynamic loads.

The hardware has two ways to learn a load's class:

* a criticality bit in the instruction encoding, or
* a table looked up at decode time. `crit_table` is that table: 128 PC
  entries, fully associative, written by software before the program
  runs.

Either way, the bit travels with the load through the core and arrives at
the cache as `core_crit`. In `mlc_top` the table answers on
`dec_crit`, one cycle after `dec_pc` is presented. The core's pipeline from
decode to issue is not part of this RTL.

## Steering and the two results of a critical load

`mlc_ctrl` carries out the routing rule:

| operation          | DL1 | critical cache |
|--------------------|-----|----------------|
| non-critical load  | yes | no             |
| critical load      | yes | yes            |
| store              | yes | yes            |

A critical load is looked up in both caches, so it can come back twice.
The controller delivers the **first** copy and drops the later one. When both
arrive in the same cycle, it takes the critical cache's copy. Results come out on two
ports:

* `ldc_*`: results delivered by the critical cache.
* `ldd_*`: results delivered by the DL1.

Both ports can be valid in one cycle, for different loads. Each load is
delivered exactly once.

The controller keeps a small per-id state for each critical load: waiting
for the first copy, or waiting to drop the second copy. A new load with the
same id waits until the dropped copy has gone by. Apart from that, the core
must keep the ids (`mem_req_t.id`, 4 bits) of loads in flight unique.

An operation for both caches (a store or a critical load) is issued only
in a cycle where **both** caches accept it. A non-critical load needs only
the DL1, so it can proceed while the critical cache is busy with a miss.

### Why the two caches stay coherent

Every store is written into both caches in the same cycle, and both
allocate on a store miss. So after a store, each cache holds the newest data
of that line. A cache that later evicts the line writes it back first. A
cache that later refetches it therefore reads current data from level 2.
There is no snooping and no invalidation between the two caches. The price
is that stores bring lines into the small critical cache that critical loads
may never read.

## The caches (`wb_cache`)

Both caches are the same module with different parameters:

* 2-way set-associative, 32-byte lines, write-back, write-allocate.
* LRU replacement with one bit per set; an invalid way is filled first.
* Tags are compared in the cycle a request is accepted. A load hit returns
  exactly `HIT_LAT` cycles later. Hits are pipelined: one request per cycle.
* A store hit updates the line in its acceptance cycle. A load in the next
  cycle sees the new data.
* Misses block. `req_ready` falls; a dirty victim is written back; the
  line is read from level 2 and installed. A load that missed then answers
  `HIT_LAT` cycles after the line arrives, with `resp.miss` set. Results
  always leave in acceptance order.
* Each cache has its own level-2 port (`l2_req_*`, `l2_resp_*`). A line read
  or write-back is taken on `valid && ready`. The read data returns on
  `l2_resp_valid`.

## Configurations

`mlc_top` parameters and their defaults:

| parameter    | default | meaning                                          |
|--------------|---------|--------------------------------------------------|
| `DL1_SIZE`   | 16384   | DL1 capacity in bytes                            |
| `DL1_LAT`    | 2       | DL1 hit latency in cycles                        |
| `CC_SIZE`    | 1024    | critical cache capacity in bytes                 |
| `CC_LAT`     | 1       | critical cache hit latency in cycles             |
| `CT_ENTRIES` | 128     | entries of the criticality table                 |
| `PC_W`       | 32      | PC width                                         |

The configurations the design was evaluated with all map onto these
parameters:

| configuration | DL1 size / latency | critical cache |
|---|---|---|
| 8 KB DL1 + 1 KB or 2 KB critical | 8 KB / 2 cycles | 1 or 2 KB |
| 16 KB DL1 + 1 KB or 2 KB critical | 16 KB / 2 cycles | 1 or 2 KB |
| 32 KB DL1 + 1 KB or 2 KB critical | 32 KB / 3 cycles | 1 or 2 KB |

All critical caches have 1-cycle hits. The default is the 16 KB + 1 KB
configuration. Sizes must give a power-of-two number of sets.

With these settings, the evaluation reports the following for the slow
16 KB DL1: adding the 1 KB critical cache cut the 2-cycle DL1's penalty
against a 1-cycle DL1 from about 3.1 % to 0.6 % on bzip2. The critical cache
hit 84 % to 96 % of critical loads. This RTL has not been run on those
workloads, so these numbers are not reproduced here.

## Files

| file | contents |
|---|---|
| `rtl/mlc_pkg.sv` | widths (32-bit address, 64-bit word, 32-byte line) and request/response structs |
| `rtl/wb_cache.sv` | the 2-way write-back cache used for both caches |
| `rtl/crit_table.sv` | decode-time criticality table |
| `rtl/mlc_ctrl.sv` | steering, result selection, statistics counters |
| `rtl/mlc_top.sv` | the whole multi-lateral cache |
| `tb/tb_mem_pkg.sv` | initial memory contents as a function of address |
| `tb/dl2_model.sv` | behavioural two-port level-2 cache, 16-cycle reads |
| `tb/cache_check.sv` | randomized reference-model test of one cache |
| `tb/tb_dl1_cache.sv`, `tb/tb_critical_cache.sv` | that test at the two cache configurations |
| `tb/tb_crit_table.sv` | table test |
| `tb/tb_mlc_ctrl.sv` | controller test with the testbench playing both caches |
| `tb/tb_mlc_top.sv` | end-to-end test at the default sizes |
| `tb/mlc_run.sv`, `tb/tb_mlc_configs.sv` | the same test with sizes as parameters, run on 8 KB + 2 KB, 16 KB + 2 KB and 32 KB (3-cycle) + 1 KB |

## Simulating

Each testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and finishes. For example, the end-to-end
test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mlc_pkg.sv tb/tb_mem_pkg.sv rtl/wb_cache.sv rtl/crit_table.sv \
  rtl/mlc_ctrl.sv rtl/mlc_top.sv tb/dl2_model.sv tb/tb_mlc_top.sv \
  --top-module tb_mlc_top -o sim
./obj_dir/sim
```

`tb_mlc_top` programs the table with 16 of 48 load PCs. It then runs 20,000
random loads and stores against a reference memory. It checks:

* the data of every load;
* that each load is answered exactly once;
* the 1-cycle and 2-cycle hit latencies;
* all counters.

It also requires each behaviour to occur at least once:

* critical-cache hits;
* critical loads answered by the DL1 or by a critical-cache refill;
* DL1 misses;
* write-backs from both caches;
* stalls.

It runs in under a second. `tb_mlc_configs` repeats the test on three other
configurations side by side, with each configuration's own DL1 latency
checked. Build it the same way, adding `tb/mlc_run.sv` and
`tb/tb_mlc_configs.sv` in place of `tb/tb_mlc_top.sv`.

## Where this RTL goes beyond the published design

The design fixes these points:

* the routing rule;
* write-back caches;
* stores written into both caches;
* 2-way, 32-byte-line caches;
* the sizes and latencies;
* static classification delivered by an instruction bit or a decode-time table.

Everything below is a choice made here:

* the 64-bit word and 32-bit address;
* LRU replacement;
* blocking misses, and allocation on load misses;
* the valid/ready handshakes and the line-wide level-2 ports;
* a critical-cache miss refilling from level 2 rather than from the DL1;
* first-copy-wins result selection and the two result ports;
* the per-id tracking;
* the table's size, organisation and one-cycle lookup;
* the statistics counters.

The following are not included, because they belong to the processor around
the cache:

* the level-2 cache (1 MB, 2-way, 128-byte lines, 16 cycles);
* main memory;
* the out-of-order core;
* the offline profiler that produces the classification.

Two simplifications follow from the blocking misses. First, a miss in either
cache holds back every later store and critical load. Second, the DL1's
misses also hold back non-critical loads. A non-blocking cache would overlap
these. The evaluation's simulator may have done so.
