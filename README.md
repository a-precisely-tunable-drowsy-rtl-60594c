# Reuse-distance drowsy data caches

A drowsy cache cuts leakage by holding its data lines at a low supply voltage
that keeps their contents but does not let them be read. A line must be raised
back to full voltage before it can be accessed. The design question is which
lines to keep awake. Window-based policies put lines to sleep after a number of
clock cycles, so how many lines are awake depends on the clock, the memory
latency and the program.

This RTL uses the **reuse-distance (RD) policy** instead. Each cache keeps
exactly its *N* most recently used lines awake, and every other data line is
drowsy. The number of awake lines therefore never exceeds *N*, whatever the
program, the clock rate or the size of the next level. That gives a hard upper
bound on data-array leakage that can be set at design time. The policy needs
no cycle counters: its state changes only when the cache is accessed.

The RTL builds the mechanism into a two-level data-cache hierarchy in the
configuration the mechanism was evaluated with:

| level | size | ways | line | access | lines kept awake |
|-------|------|------|------|--------|------------------|
| L1 D-cache | 32 KB | 4 | 32 B | 1 cycle | 5 (RD5) |
| L2 | 512 KB | 4 | 32 B | 10 cycles | 1 (RD1) |

Main memory (97 cycles in the evaluation) and the processor are outside the
design. Their signals are ports of the top module, `drowsy_hierarchy`.

## The RD buffer (`rtl/rd_buffer.sv`)

The RD buffer is the whole policy. It has *N* entries. Each entry holds:

- the ID of one awake line (its frame number, `set * WAYS + way`), and
- an LRU age counter of log2(*N*) bits.

At every cache access the cache presents the accessed line's ID, and all *N*
IDs are compared with it at once.

* **The ID is held (the line is awake).** The entry's age is reset to 0. The
  entries that were younger than it age by one, and the rest keep their age.
* **The ID is not held (a drowsy miss: the line was asleep).** Every age
  advances by one, modulo *N*. The oldest entry, at age *N*-1, wraps to 0 and
  becomes the newest. Its old ID is sent out on `sleep_valid`/`sleep_id`,
  which puts that line to sleep, and the accessed line's ID takes its place.

The ages are always a permutation of 0..*N*-1, and an assertion checks this.
The buffer never wakes anything: the cache wakes the line it is accessing
itself. So the buffer only decides which line goes back to sleep, and it is
off the critical path of the access. It adds no latency.

Worked example with *N* = 8. This is the state the test rebuilds:

| entry | ID | age |
|-------|-----|-----|
| 0 | 124 | 3 |
| 1 | 11 | 4 |
| 2 | 325 | 7 |
| 3 | 804 | 0 |
| 4 | 806 | 2 |
| 5 | 125 | 6 |
| 6 | 803 | 5 |
| 7 | 805 | 1 |

Now an access to line 900 misses. Entry 2 (age 7) wraps to age 0, line 325 is
ordered to sleep, and entry 2 takes ID 900. Every other age goes up by one, so
the ages become 4, 5, 0, 1, 3, 7, 6, 2. If line 124 (now age 4) is accessed
next, entries 2, 3, 4 and 7 (ages 0 to 3) age by one and entry 0 drops to 0.

Storage is *N* × (ID width + log2 *N*) bits, plus one valid bit per entry.
That is 8 × (10 + 3) + 8 = 112 bits for *N* = 8 and a 1024-line cache. The
valid bits make an empty buffer fill up before it evicts anything. At reset
all entries are empty and the ages are *N*-1-*i*, so entry 0 fills first.

Interface timing: `hit`, `sleep_valid` and `sleep_id` are combinational from
`access_id` in the access cycle, and the entries update at the clock edge that
ends that cycle. `entry_valid`, `entry_id` and `entry_age` expose the state
for observation.

## One drowsy cache level (`rtl/drowsy_cache.sv`)

Each level is a blocking, write-back, write-allocate, set-associative cache
with the RD buffer attached:

* **Drowsy bits and the word-line gate (`rtl/drowsy_bits.sv`).** Each data
  line has one drowsy bit: 1 means the line is at low voltage. A wake order
  clears the bit and a sleep order sets it, each at the next clock edge. That
  edge stands for the one-cycle voltage transition. Data read from a drowsy
  line is blocked by the gate (it reads as zero) until the line is awake.
  After reset every line is drowsy. The analog supply switch that the bit
  would drive is not modelled.
* **Tags never sleep.** Tags, valid and dirty bits sit in a separate
  synchronous RAM per way. The way LRU order sits in one more RAM. So the
  lookup always completes at full speed, and only the data lines are drowsy.
* **What an access costs.** Take a request accepted in cycle *t*:

  | case | response in cycle |
  |------|-------------------|
  | hit, line awake | *t* + `HIT_LATENCY` |
  | hit, line drowsy | *t* + `HIT_LATENCY` + 1 (wake-up cycle) |
  | miss, clean victim | *t* + 3 + *M* |
  | miss, dirty victim | *t* + 5 + *M*<sub>wb</sub> + *M*<sub>fill</sub> |

  *M* is the time the next level takes to answer a request. A miss wakes the
  frame it refills, and that wake hides under the refill. So only hits to
  drowsy lines pay the extra cycle.
* **RD bookkeeping.** The frame used by every access, hit or refill, is
  reported to the RD buffer in the lookup cycle. The buffer's sleep order
  drives the drowsy bits directly. As a result, the awake lines are always
  exactly the lines the RD buffer holds. An assertion checks this on every
  access.

The cache reads the tags and data of all ways in the request cycle, from
synchronous RAMs (`rtl/sram_sp.sv`). If the hit way is drowsy, the data
already read is held at the RAM output. The gate releases it one cycle later,
once the drowsy bit is cleared. This is how a 1-cycle L1 pays exactly one extra
cycle for a drowsy hit.

Ports, with the same handshake on both sides:

* **Upstream.** `up_req_valid`/`up_req_ready` carry a word-wide load or store
  (`up_req_we`, `up_req_addr`, `up_req_wdata`, `up_req_wstrb`). Exactly one
  `up_resp_valid` pulse answers each request, and for a load it carries
  `up_resp_rdata`. `up_req_ready` is high only while the cache is idle.
* **Downstream.** `dn_req_*` sends whole lines at line-aligned addresses, as
  fills (`dn_req_we` = 0) or write-backs (`dn_req_we` = 1). Each downstream
  request is answered by exactly one `dn_resp_valid` pulse.
* **Event strobes.** `ev_access`, `ev_hit`, `ev_drowsy_hit`, `ev_miss`,
  `ev_sleep` and `ev_writeback` pulse once per event, for counting drowsy
  accesses.

After reset the controller clears the tag and LRU RAMs, one set per cycle,
before it takes its first request. That takes 256 cycles for the L1 and 4096
for the L2.

## The hierarchy (`rtl/drowsy_hierarchy.sv`)

`drowsy_hierarchy` chains two `drowsy_cache` instances:

* The L1 has a 64-bit word and `HIT_LATENCY` 1.
* The L1's downstream port is the L2's upstream port. The L2's "word" is a
  full 32-byte line, and its `HIT_LATENCY` is 10.
* The L2's downstream port is the memory port (`mem_*`).

Seen from the core:

* An L1 hit takes 1 cycle, or 2 if the line is drowsy.
* An L1 miss that hits an awake L2 line takes 3 + 10 cycles.
* An L1 miss that hits a drowsy L2 line takes 3 + 11 cycles.
* An L1 miss that also misses the L2 takes 3 + (3 + memory latency) cycles.

At most RD_L1 + RD_L2 = 6 data lines of the whole hierarchy are ever awake.
The event strobes are brought out per level: bit 0 is the L1, bit 1 the L2.

The hierarchy is not inclusive: evicting a line from the L2 leaves any copy in
the L1 alone. This does not affect correctness, because there is a single
core and the L1 writes back its dirty lines.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `drowsy_hierarchy` | `L1_SIZE`, `L1_ASSOC`, `L1_LAT`, `RD_L1` | 32768, 4, 1, 5 | L1 geometry, hit latency, lines kept awake |
| | `L2_SIZE`, `L2_ASSOC`, `L2_LAT`, `RD_L2` | 524288, 4, 10, 1 | L2 likewise |
| | `LINE_BYTES`, `WORD_BYTES`, `ADDR_W` | 32, 8, 32 | line, load/store word, address |
| `drowsy_cache` | `SIZE_BYTES`, `WAYS`, `LINE_BYTES`, `WORD_BYTES`, `HIT_LATENCY`, `RD_N`, `ADDR_W` | L1 values | one level |
| `rd_buffer` | `N`, `ID_W` | 8, 10 | entries, line-ID width |

Sizes must be powers of two. `RD_N` may be any value from 1 up to the number
of lines. The other evaluated configurations can be set through these
parameters:

* L2 sizes of 256 KB, 1 MB and 2 MB, with 4, 27 and 32 cycles;
* L1 RD values of 1, 15, 50 and 100.

`tb/tb_drowsy_configs.sv` runs all of them, with the same access stream in
each. Two results show what the policy promises:

* The L1's hits, drowsy hits and lines put to sleep are identical for every L2
  size and latency. The RD buffer counts accesses, not cycles, so a slower L2
  cannot change which L1 lines are awake.
* Drowsy hits fall as the RD grows. Of the L1 hits in that stream, 91.5 % are
  drowsy with RD1, 62.1 % with RD5, 19.3 % with RD15, 5.0 % with RD50 and
  none with RD100. These numbers describe that synthetic stream only, not any
  real program.

## Where this RTL goes beyond the published mechanism

The RD policy comes from the published description, as do these points:

* the entry structure with log2 *N*-bit LRU counters;
* the 8-entry example;
* the sizes and latencies;
* the one-cycle wake-up penalty paid only by hits to drowsy lines;
* tags that stay awake.

The description covers nothing else, so the following are choices made for
this RTL:

* the exact counter update on a hit (true LRU: younger entries age by one);
* the valid bits and the reset state of the RD buffer;
* the write-back/write-allocate policy, LRU way replacement and the blocking
  controller. A 1-cycle L1 therefore takes a new request every second cycle;
* all handshakes, the 32-bit address and the 64-bit word;
* the reset sweep of the tag RAMs;
* gated data of a drowsy line reading as zero.

Not built:

* the analog voltage switch;
* the processor;
* main memory, apart from a testbench model;
* the instruction cache, which is not drowsy;
* the cycle-window ("simple") and per-set RMRO policies that the RD policy
  was compared against.

No leakage or power figures come out of this RTL. The event strobes give the
drowsy-access counts that such an estimate would need.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each also has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_rd_buffer.sv` | Rebuilds the 8-entry example above and checks every ID and age. Then one drowsy miss (line 325 must sleep, all ages advance) and one hit. Finally, 3000 random accesses to buffers of 8, 5 and 1 entries, compared with a most-recently-used list in the testbench. |
| `tb/tb_drowsy_bits.sv` | Random wake and sleep orders, including both for one line, against a reference bit vector. Checks the drowsy flags and the gated data of every set before and after each edge. |
| `tb/tb_sram_sp.sv` | Random masked writes and reads against a reference array. Checks read-before-write and that `rdata` holds while idle. |
| `tb/tb_drowsy_cache.sv` | A 1 KB, 4-way, RD3, 2-cycle cache in front of a 4-cycle memory. 4000 random loads and stores. Checks the data, the exact latency of every access (awake hit, drowsy hit, clean and dirty miss), that the awake frames are exactly the RD list, and the event counts. |
| `tb/tb_drowsy_configs.sv` | Eight instances of `tb/hier_config_run.sv`, each a full hierarchy with its own memory model and reference models. The L2 is 256 KB/4, 512 KB/10, 1 MB/27 or 2 MB/32 cycles at RD5/1, and the L1 RD is 1, 15, 50 or 100 at 512 KB. Each instance makes 3008 accesses from a fixed-seed generator. Every access is checked as in the full-size test. Across instances, the test checks that the L1 counts do not depend on the L2, that drowsy hits never rise with the RD, and that the awake L1 lines reach exactly 1, 5 and 15 with RD1, RD5 and RD15. |
| `tb/tb_drowsy_hierarchy.sv` | The full-size hierarchy with default parameters and a 97-cycle memory. 30,008 accesses: a directed sequence and then random traffic built to collide in a few L1 and L2 sets. Two reference models (`tb/cache_ref_pkg.sv`) predict the exact latency of each access. Also checks the data, the awake L1 lines, the single awake L2 line and the event counts of both levels, and requires each mechanism to occur (awake and drowsy hits, misses, sleeps and write-backs at both levels, memory reads and writes). About 0.94 M cycles, a few seconds. |

`tb/mem_model.sv` is the behavioural main memory. It answers each line request
exactly `LATENCY` cycles after taking it. Lines never written read as a fixed
pattern built from their address.

Running a test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/drowsy_pkg.sv tb/cache_ref_pkg.sv tb/tb_drowsy_hierarchy.sv \
    --top-module tb_drowsy_hierarchy
./obj_dir/Vtb_drowsy_hierarchy
```

Replace the testbench name to run another one. `tb/cache_ref_pkg.sv` is only
needed by the two hierarchy tests. The testbenches read
`dut.u_l1.u_bits.drowsy_q` (and the same in the L2) hierarchically to count
awake lines, so keep those instance names if you change the RTL.
