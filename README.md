# Victim-cached L1 data cache with victim-cache bypass prediction

Small embedded cores, such as those in a network processor, usually have a
small direct-mapped L1 data cache to save area. Such a cache loses many
accesses to conflict misses. Each of those misses goes to the level-2 cache
over a shared bus, which is slow and costs much more energy than an L1
access. This design puts an 8-entry, fully associative **victim cache**
beside a 4 KB direct-mapped L1. The victim cache keeps the blocks the L1 has
just thrown out. An L1 miss that finds its block there swaps the two blocks
and never reaches level 2.

The victim cache can be looked up in two ways:

* **Serial (SVC)**: only after the L1 has missed. This costs one more cycle
  on a victim hit, but the victim cache is touched only when it might help.
* **Parallel (PVC)**: together with the L1, on every access. Victim hits are
  faster, but nearly every probe now misses: when the L1 hits, the block
  cannot also be in the victim cache. All those useless probes cost energy.

A **bypass predictor** solves this. It is a tiny structure that can say
early, and with certainty, "this block is not in the victim cache". When it
says so, the probe is skipped. A predictor may fail to recognise a miss (the
probe is then made and misses, as before). It must never claim a miss for a
block that is present, or that block would be fetched from level 2 a second
time and the copies would diverge. Four predictors are built. All four are
kept up to date side by side, and a run-time input selects the one that
gates probes. The recommended setting is PVC with the Sum predictor.

## Access timing

The cache is blocking: it handles one access at a time. It is write-back and
write-allocate. Cycle 0 is the cycle in which `req_valid && req_ready` is
seen.

| case                                | PVC (`cfg_parallel=1`) | SVC (`cfg_parallel=0`) |
|-------------------------------------|------------------------|------------------------|
| L1 hit                              | response in cycle 1    | response in cycle 1    |
| L1 miss, victim hit (swap)          | cycle 2                | cycle 3                |
| L1 miss, victim miss or bypassed    | cycle 2 + L2 latency   | cycle 3 + L2 latency   |

With the intended 12-cycle level-2 latency, a level-2 fill answers in cycle
14 (PVC) or 15 (SVC).

* **Cycle 0**: the L1 set is read. The L1 is an array read on the clock
  edge, which gives the one-cycle L1 latency.
* **Cycle 1**: the tag is compared. In PVC the selected predictor is
  consulted and, unless it says "miss", the victim cache is probed. In SVC
  this step happens in cycle 2, and only after an L1 miss.
* **Victim hit**: in the next cycle the victim block is written into the
  L1. The block the L1 held in that set takes over the victim cache entry
  that was hit, so each block lives in only one of the two caches.
* **Victim miss or bypass**: the block is requested on the `l2_*` port. In
  the cycle it arrives, it is written into the L1 (with the store merged in)
  and answered. The block it displaces is inserted into the victim cache: in
  a free entry, or else over the least recently used one. If the entry
  pushed out is dirty, it is written back to level 2 in the following
  cycle(s). New requests wait until that write-back has been accepted.

A store merges `req_wdata` under `req_be` into the word and sets the block's
dirty bit. The dirty bit goes with the block on swaps.

## The bypass predictors

All four predictors answer in the lookup cycle, from the block address of
the access. A block address is the byte address without its 5 offset bits:
27 bits here. In this design's terms that block address is the victim
cache's "tag". A high `bypass` output means "certain miss".

The three inclusive predictors (HighLow-Bits, Sum and Table) summarise
the blocks that *are* in the victim cache. A summary cannot be updated
one block at a time when a block leaves. For example, an OR cannot be
undone. So these predictors are reloaded from the victim cache's complete
contents on every clock edge that changes them. `victim_cache` shows its
contents as they will be after the edge (`nxt_valid`, `nxt_tag`), and says
when they change (`changed`). The predictor registers therefore change in
the same edge as the victim cache and are never stale.

**HighLow-Bits** (`bypass_highlow`): two tag-wide registers.
* One holds the inverse of the OR of all stored tags. A 1 in it marks a bit
  that is 0 in every stored tag.
* The other holds the AND of all stored tags. A 1 in it marks a bit that is
  1 in every stored tag.

An access tag with a 1 at a position of the first kind, or a 0 at a position
of the second kind, cannot match. This is the cheapest predictor and the
least selective one.

**Sum** (`bypass_sum`): each tag is hashed to a 10-bit sum. For each of the
1024 possible sums there is one flip-flop, set when a stored tag has that
sum. A clear flip-flop for the access's sum means a certain miss. The hash
works as follows:
1. Rotate the tag left by `k*SUM_WIDTH/2` bits, where `k` is the array.
2. Cut it into 10-bit pieces, from the least significant end.
3. Add the pieces modulo 1024.

There are two arrays. Array 1 uses a rotation of 5 bits, so the two arrays
hash differently. A miss reported by either array bypasses the probe. With 8
blocks among 2 × 1024 flip-flops, almost every miss is caught.

**Table** (`bypass_table`): a 256-bit table indexed by the low 8 tag bits.
Entries belonging to stored tags are 0 and all others are 1. Reading a 1
means a certain miss.

**Exclusive** (`bypass_exclusive`): the opposite approach. A 32-entry fully
associative table remembers block addresses that are known *not* to be in
the victim cache.
* **Recording**: every victim probe that misses records its address. In
  PVC this happens mostly on L1 hits, so repeated accesses to an L1-resident
  block stop probing after the first one.
* **Removal**: when a block is placed into the victim cache, by a swap or by
  an insertion after a fill, its address is searched for and removed in the
  same edge.
* **Replacement**: a new address goes to a free entry, or else to the entry
  under a round-robin pointer. An address is never stored twice.

The top module checks the safety rule with an assertion in every lookup
cycle: the selected predictor must never report a miss for a block the
victim cache holds. Its end-to-end testbench checks the same rule for all
four predictors.

## Parameters

Top module `vc_dcache`. Its defaults are the intended configuration.

| parameter      | default | meaning                                      |
|----------------|---------|----------------------------------------------|
| `ADDR_W`       | 32      | byte address width                           |
| `L1_BYTES`     | 4096    | L1 capacity (direct-mapped)                  |
| `BLOCK_BYTES`  | 32      | block size of the L1 and the victim cache    |
| `VC_ENTRIES`   | 8       | victim cache entries (fully associative)     |
| `SUM_WIDTH`    | 10      | Sum predictor: bits per sum                  |
| `SUM_ARRAYS`   | 2       | Sum predictor: number of arrays              |
| `TABLE_N`      | 8       | Table predictor: 2^N-bit table               |
| `EXCL_ENTRIES` | 32      | Exclusive predictor: table entries           |

The predictor modules on their own default to 32-bit tags. The top passes
the 27-bit block-address width.

## Ports of `vc_dcache`

* `cfg_parallel`: 1 selects PVC, 0 selects SVC.
* `cfg_bypass` (`vc_pkg::bypass_sel_e`): selects the predictor that gates
  probes. The choices are `BYP_NONE`, `BYP_HIGHLOW`, `BYP_SUM`, `BYP_TABLE`
  and `BYP_EXCL`. Both inputs may be changed between accesses.
* Processor port: `req_valid`/`req_ready`, `req_we`, `req_addr` (byte
  address), `req_wdata`, `req_be` (byte enables). The answer is a one-cycle
  `resp_valid` pulse with the load word on `resp_rdata`. Stores also get a
  `resp_valid` pulse.
* Level-2 port: a request is held until `l2_req_valid && l2_req_ready`.
  * Fetch: `l2_req_we=0` with block address `l2_req_blk`.
  * Write-back: `l2_req_we=1` with the block on `l2_req_wdata`. Write-backs
    are posted: no answer follows.
  * A fetched block returns with `l2_resp_valid`/`l2_resp_rdata`, any number
    of cycles later.
* `ev` (`vc_pkg::vc_events_t`): one-cycle pulses for each of the following.
  They are meant for counters that measure hit rates, probe counts and
  predictor coverage.
  * L1 hit or miss
  * a victim lookup that was due, a probe actually made, and its hit
  * a suppressed probe, and the true outcome of the lookup
  * all four predictor outputs
  * swap, fill, victim insertion, L2 read, L2 write-back

## Choices made in this RTL

The source design fixes the overall organisation and the sizes listed
above. It also fixes how the HighLow-Bits, Table and Exclusive predictors
work and what the Sum predictor must do. The following are choices of this
implementation:

* **Sum hash**: the exact hash (rotate, then add 10-bit pieces) and the rule
  that either array may declare a miss.
* **Handshakes and write policy**: the request/response and level-2
  handshakes, write-back with write-allocate, and the blocking, one-access
  organisation.
* **Swap timing**: the swap takes one extra cycle, so a PVC victim hit
  answers in cycle 2 rather than cycle 1.
* **Replacement**: LRU in the victim cache and round-robin in the Exclusive
  table.
* **Predictor maintenance**: inclusive predictors are rebuilt from the full
  victim cache contents on each change, rather than by some incremental
  scheme.
* **Predictor selection**: it is made at run time rather than fixed at
  build time.
* **Register-based storage**: the Table and Exclusive structures are
  register arrays. The intended design sizes them as small SRAMs, whose
  timing would differ.
* **Observation output**: `victim_cache` computes its tag match even when
  no probe is made, on its `match` output. That output serves only for
  statistics and assertions. An energy-minded implementation would gate the
  comparators with `probe`.

Not included: the processor core, the instruction cache, the level-2 cache
and the system bus. The level-2 port stands for the bus and level 2.
`tb/l2_model.sv` is a behavioural stand-in for testing: a flat block memory
with a fixed 12-cycle fetch latency. No energy, delay or area is modelled in
the RTL.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog that ends the run
with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vc_pkg.sv tb/tb_vc_dcache.sv --top-module tb_vc_dcache
./obj_dir/Vtb_vc_dcache
```

Replace `tb_vc_dcache` with any other testbench:

* `tb_l1_dcache`: L1 array against a reference array, including a read and
  a write to the same set in one cycle.
* `tb_victim_cache`: probe results, swaps, free-first and LRU eviction, and
  the next-contents outputs, against a reference with an explicit recency
  list.
* `tb_bypass_highlow`, `tb_bypass_sum`, `tb_bypass_table`: each output is
  compared with a reference written a different way: bit by bit, with the
  sum computed per bit, and by direct comparison of low bits. Stored tags
  must never be bypassed.
* `tb_bypass_exclusive`: training, removal, overflow and replacement,
  against a reference table.
* `tb_vc_dcache`: runs the whole design at its default sizes in both
  organisations and with every predictor selection, 3000 random loads and
  stores each. Most accesses go to 12 blocks that share two L1 sets, so the
  L1 thrashes and the victim cache earns its keep. The level-2 model holds
  back its ready signal in 20% of cycles, to exercise the request
  handshake. The test checks every load's data against a reference memory
  and every access's latency against the table above, counting any cycles
  of back-pressure. It also checks that no predictor ever claims a miss for a
  present block. Every mechanism must occur at least once: L1 hits and
  misses, probes, PVC and SVC swaps, fills, insertions, dirty write-backs,
  bypasses by each predictor, and level-2 back-pressure. The test prints
  each predictor's coverage per configuration. Coverage is the share of victim misses the predictor
  would have avoided. On this synthetic stream, in PVC, it comes out near
  99% for Sum, about 65% for Table and 20–30% for HighLow-Bits and
  Exclusive. Real programs will give other figures. The whole run takes
  well under a second.
* `tb_crc_workload`: a packet-checksum workload. The testbench acts as a
  processor running table-driven CRC-32 over 24 packets. It loads every
  packet word and one table word per byte through the cache. The 1 KB table
  and the packet buffers are 4 KB apart, so they fight over the same L1
  sets. The run is repeated in PVC, once with each predictor gating probes,
  and then in SVC. Each packet's CRC must match a directly computed one.
  The test prints cycles, level-2 traffic and the coverage of all four
  predictors. In PVC, most victim lookups are misses (about 15,300 of
  16,400), and about 1,100 are hits. The selected predictor suppresses
  about 99% of the misses with Sum, 91% with Exclusive, 83% with Table and
  30% with HighLow-Bits. A predictor that does not gate probes is still
  evaluated, but the Exclusive predictor only learns from probes that are
  actually made. Its coverage therefore means something only in the run
  where it is selected.
