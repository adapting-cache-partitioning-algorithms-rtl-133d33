# Way partitioning for a shared L2 with pseudo-LRU replacement

A shared last-level cache lets one core's data push out another's. Dynamic cache
partitioning stops this. At the end of every interval it decides how many ways of
each set every core may fill. It bases the decision on a per-core *stack distance
histogram* (SDH), which shows how many misses each core would suffer with any
number of ways. The usual partitioning machinery assumes true LRU replacement, for
two reasons:

* The histogram comes from LRU stack positions.
* Enforcement looks for "the LRU line among the lines I own".

Large, highly associative caches do not implement true LRU. They use cheaper
pseudo-LRU schemes. This RTL adapts the whole partitioning loop to the two common
ones:

* **NRU** (not recently used): one *used* bit per line plus one replacement pointer
  shared by the whole cache.
* **BT** (binary tree pseudo-LRU): A-1 tree bits per set.

For each policy it provides three things:

1. an **estimated SDH** (eSDH), which guesses stack distances from the pseudo-LRU
   state;
2. **partition enforcement** that uses only global per-core state, with no owner
   bits per line;
3. the common **MinMisses** selection of the partition, run every interval.

The scheme follows the published proposal "Adapting Cache Partitioning Algorithms
to Pseudo-LRU Replacement Policies" (Kędzierski, Moreto, Cazorla, Valero). The
last section lists every point where this RTL had to fill in detail.

The default configuration is the evaluated baseline:

* 2 cores sharing a 2 MB, 16-way L2 with 128-byte lines, which gives 1024 sets;
* 64-bit addresses, which gives 47-bit tags;
* auxiliary tag directories that sample 1 set in 32;
* a repartitioning interval of 1,000,000 cycles;
* an NRU scaling factor of 0.75.

## Structure

```
               req (core, address)                       cpa_cache (one per policy)
  ─────────────────────┬───────────────────────────────────────────────────────────
                       │
          ┌────────────┴─────────────┐
          │                          │  (owner core only, sampled sets only)
   ┌──────▼──────┐           ┌───────▼──────┐   est. distance   ┌──────┐
   │  tag_dir    │           │  atd  (core0)│ ────────────────▶ │ sdh  │──┐
   │  shared L2  │           │  atd  (core1)│ ────────────────▶ │ sdh  │──┤
   │  tags +     │           └──────────────┘                   └──────┘  │
   │  NRU / BT   │                                                 ▲halve  │ counters
   │  state      │◀── masks / up,down ──┐                          │       ▼
   └──────┬──────┘               ┌──────┴─────────────────────────┴──────────┐
          │ resp (hit, way,      │ partition_ctrl: interval timer,           │
          ▼  eviction)           │ minmisses, ways → masks → up/down vectors │
                                 └───────────────────────────────────────────┘
```

`cpa_top` holds two independent copies of `cpa_cache`: `nru_*` (POLICY = POL_NRU)
and `bt_*` (POLICY = POL_BT). Each has its own request and response ports. A real
cache would contain only one of them.

| module | role |
|---|---|
| `cpa_pkg` | defaults, the policy enum, BT node numbering |
| `nru_repl` | per-set NRU victim search, used-bit update, pointer update under a core's mask |
| `bt_repl` | per-set tree walk steered by up/down vectors; promotion to MRU |
| `nru_profiler` | NRU distance estimate from the used-bit count and the scaling factor |
| `bt_profiler` | BT position estimate: ID bits, XOR with the path, subtraction from A |
| `tag_dir` | tag store with valid bits and the replacement state of one policy; used for both the shared L2 and the ATDs |
| `atd` | per-core sampled auxiliary tag directory plus its profiler |
| `sdh` | A+1 saturating counters per core, halved at each boundary |
| `minmisses` | exact minimum-miss way allocation (sequential dynamic programme) |
| `partition_ctrl` | interval timer, runs MinMisses, builds the masks and up/down vectors |
| `cpa_cache` | one complete partitioned L2 for one policy |
| `cpa_top` | the NRU system and the BT system side by side |

The L2 data array, the cores with their L1 caches and main memory are outside the
RTL. `resp_way` names the way that hit or was filled. `resp_evict` and
`resp_evict_tag` describe the line that was pushed out.

## Timing and interface

* One request per cycle per system: `req_valid`, `req_core` and a byte address.
  The address is split into 7 offset bits, 10 set bits and 47 tag bits.
  Arbitration among cores is up to the surrounding logic.
* The L2 and the requesting core's ATD are looked up in the same cycle. At the next
  rising edge the tags, valid bits and replacement state are written, the SDH
  counters are incremented, and `resp_*` is presented for one cycle. A miss fills
  the victim way at once.
* `boundary` pulses at the end of every interval. At that edge MinMisses captures
  all SDH counters and every counter is halved. Computing the partition takes
  about (N-1)·A²/2 cycles, which is 130 cycles for 2 cores and 16 ways. One cycle
  after it finishes, `repartition` pulses and the new masks and vectors are loaded.
  `ways` shows the way counts in force.
* Reset is synchronous and active low. It clears the valid bits, used bits, tree
  bits, pointer and counters. The partition registers take the equal split in the
  first cycle after reset, so send the first request one cycle after `rst_n` rises.

## Estimating stack distances without an LRU stack

This is the part of the design that differs most from LRU-based partitioning.

Under LRU the ATD reports the exact stack position p of every hit, and SDH register
r_p is incremented. Misses go to r_(A+1). A core that owns k ways is then predicted
to suffer r_(k+1) + … + r_(A+1) misses. Pseudo-LRU state does not hold the stack
order, so each profiler produces an estimate instead.

### NRU: count the used bits

Let U be the number of used bits set in the set, including the accessed line's bit.
The profiler reads them before the access updates them.

* **Hit on a line whose used bit is 1.** The line was touched since the last reset
  of the used bits, so its distance lies between 1 and U. The estimate is
  d = ⌈S·U⌉, and registers r_1 … r_d are *all* incremented. With S = 1 the estimate
  is biased high. S = 0.75 is the default and gave the best results in the original
  evaluation. S = 0.5 is also supported. S is the parameter `SCALE_Q`, counted in
  quarters.
* **Hit on a line whose used bit is 0.** The distance lies between U+1 and A. No
  register is updated.
* **ATD miss.** r_(A+1) is incremented.

Example, 4 ways, lines A B C D in ways 0..3. After accesses to C and D only C and D
have their used bits set. The next access to D sees U = 2, so with S = 1 it
increments r_1 and r_2. After accesses to A and B, an access to C finds its used
bit clear, and nothing is recorded.

### BT: compare the path with the way's identifier

For a way w, its *identifier bits* are the tree bits that would make w the
pseudo-LRU victim. They are simply the bits of the way number, with the bit order
reversed by a fixed decoder: ID_k is way-number bit k counted from the least
significant end, and it pairs with the node at tree level log2(A)-1-k on w's path
(level 0 is the root). The profiler works in three steps:

1. XOR each ID bit with the path bit it pairs with.
2. Read the XOR results as a binary number x, with the ID_0 column (the leaf level)
   as the most significant bit.
3. Subtract: the estimated position is A - x.

If every path bit points at w, x = 0 and the line is at position A (LRU). If none
does, the line is at position 1 (MRU).

Worked 4-way example. The tree bits are: A/B node = 0, C/D node = 1, root = 0.
For line D (way 3) the ID bits are 11 and the path bits are 10. The XOR gives 01,
so x = 1 and the position is 4 - 1 = 3. The same rule gives A → 4, B → 2 and C → 1,
which is the true LRU order for that example. Tree bits cannot tell every order
apart: two stacks that differ only in B and D get the same estimates.

## Enforcing a partition

Hits are always allowed in any way. Only the choice of victim is restricted.

**NRU.** Each core has a global replacement mask of A bits. On a miss the search
starts at the shared pointer and moves forward one way at a time, with wrap-around.
It stops at the first way that is both in the core's mask and has a clear used bit.
After a miss the pointer moves on by one way. After every access, if all the used
bits of the requesting core's ways are set, every used bit in the set is cleared
except the accessed line's.

**BT.** Each core has an `up` and a `down` vector, with one bit per tree node. The
walk from the root works like this at each node:

* `up`=1 forces the walk into the upper sub-tree (the lower way numbers);
* `down`=1 forces it into the lower sub-tree;
* with both at 0, the stored bit decides;
* `up` and `down` are never both 1, and an assertion checks this.

Every access, hit or fill, then sets the path bits to point away from the accessed
way.

Nodes are numbered from the leaf level up to the root, left to right within a
level. In a 4-way set node 0 joins ways 0/1, node 1 joins ways 2/3 and node 2 is the
root. With 16 ways, nodes 0–7 are the leaf level and node 14 is the root.

**From way counts to masks and vectors** (`partition_ctrl`). Core c owns a
contiguous run of `ways[c]` ways that starts after the ways of cores 0..c-1. A tree
node gets `up`=1 when only its upper half contains owned ways, and `down`=1 when
only its lower half does. Otherwise both bits are 0. The walk therefore always ends
in an owned way, for any stored tree state. The testbench checks this for all tree
states.

## Choosing the partition

`sdh` keeps A+1 saturating counters per core (`CNT_W` = 24 bits). At every boundary
the counters are shifted right by one, so older behaviour fades out.

`minmisses` captures the counters and minimises the total predicted misses over all
allocations that give every core at least one way and use all A ways. It evaluates
the recurrence

  B(0,w) = m(0,w),  B(c,w) = min over k = 1..w-c of B(c-1,w-k) + m(c,k)

one candidate per cycle and stores the best k for each (c,w). It then traces back
from B(N-1, A). Ties keep the smaller way count for the later core. The eSDHs use
the same miss formula m(c,k) = r_(k+1)+…+r_(A+1) as an LRU SDH.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WAYS` | 16 | associativity A (power of two) |
| `CORES` | 2 | cores sharing the L2 (the evaluation also used 4 and 8) |
| `SETS` | 1024 | L2 sets (2 MB / 16 / 128 B; use 256 or 512 for 512 KB or 1 MB) |
| `ADDR_W`, `LINE_B` | 64, 128 | address width, line size; tag width follows |
| `SAMPLE` | 32 | ATD samples L2 sets whose index is a multiple of this |
| `INTERVAL` | 1,000,000 | cycles between repartitions |
| `CNT_W` | 24 | SDH counter width |
| `SCALE_Q` | 3 | NRU scaling factor S in quarters (4, 3, 2 = 1.0, 0.75, 0.5) |
| `POLICY` | `POL_NRU` | `cpa_cache` only: `POL_NRU` or `POL_BT` |

## Choices made beyond the published description

* **Up/down vector size.** These have one bit per tree node (A-1 bits). The prose
  of the source gives their size as log2(A), but its worked example shows one bit
  per node, and only per-node vectors can express arbitrary way counts. log2(A) is
  the number of vector bits read along one path.
* **BT profiler bit order.** The pairing of ID bits with path bits and the bit
  order of the XOR result are taken from the 4-way worked example and generalised
  (the leaf-level mismatch is the most significant bit). This reproduces the
  example's LRU order exactly.
* **NRU eSDH on a used-bit hit.** This increments r_1..r_d rather than one
  register, as the source's example does for d = 2. Clearing the used bits under
  partitioning clears *all* bits of the set, as described, not only the owner's.
* **Victim when all owned used bits are set.** This can happen after another core's
  hits. The first owned way from the pointer is replaced. Each NRU ATD has its own
  replacement pointer.
* **Sampled sets** are those whose index is a multiple of `SAMPLE`. ATDs keep full
  tags.
* **Not specified by the source:** SDH counter width and saturation, contiguous
  way runs, the derivation of up/down vectors from them, MinMisses tie-breaking,
  the equal split after reset, the one-cycle response, and the lack of victim
  priority for invalid ways.
* **Not built:**
  * the compared baselines: true LRU, and per-set owner counters;
  * the L2 data array;
  * the 11-cycle L2 access latency of the original simulation.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cpa_top \
          -y rtl -y tb -Irtl rtl/cpa_pkg.sv tb/tb_cpa_top.sv
./obj_dir/Vtb_cpa_top
```

* Unit tests: `tb_nru_repl`, `tb_bt_repl`, `tb_nru_profiler`, `tb_bt_profiler`,
  `tb_sdh`. These check the worked examples above and then tens of thousands of
  random cases against reference models written in the testbench.
* `tb_atd`: hand-derived fill and hit sequences under both policies.
* `tb_tag_dir`: a cycle-by-cycle reference model of tags, used bits, pointer and
  tree, with changing partitions.
* `tb_minmisses`: compares the chosen partition with an exhaustive search (3 cores)
  and checks the cycle budget.
* `tb_partition_ctrl`: interval length, mask contiguity, and that the up/down
  vectors confine every possible tree walk.
* `tb_cpa_cache`: both policies end to end at a reduced size (8 ways, 64 sets).
  It uses the scoreboard `tb/cpa_scoreboard.sv`.
* `tb_cpa_multicore`: six reduced-interval caches side by side: 4 cores at
  2 MB under both policies, 8 cores at 512 KB under both policies, and 4 cores at
  1 MB with NRU scaling factors 1.0 and 0.5. Core 0 loops over 6 lines per set,
  core 1 over 3, and the rest stream. The two looping cores must end up with at
  least 8 ways between them. Under S = 1.0 core 1 must get exactly 3 ways, and
  under S = 0.5 exactly 2, since ⌈S·3⌉ is its estimated stack distance.
* `tb_cpa_top`: both systems at the full default size for two intervals (2 M
  cycles, a few seconds). Core 0 loops over 12 lines per set and core 1 streams.
  The test requires every mechanism to occur: L2 hits, misses and evictions, ATD
  hits and misses, SDH halving, repartition, and a partition change. MinMisses
  must move core 0 from 8 to at least 12 ways. In the run described here it chose
  15/1 under both policies. Core 0's L2 hits in the second interval must exceed
  those in the first. Here they went from 100 k to 758 k under NRU, and from 0 to
  761 k under BT.

The end-to-end tests show a weakness of tree pseudo-LRU. When a streaming core
refills a set as often as another core touches it, the other core's loop of 10–15
lines gets no hits at all, even with 15 owned ways. An independent software model
of the tree policy shows the same. The full-size test therefore gives the streaming
core one access per five of core 0.

## Limitations

* There is one request per cycle and no pipelining beyond the one-cycle response.
  The tag and state arrays are written as flip-flop arrays with combinational
  read. A real implementation would map them to SRAM macros and pipeline the
  lookup.
* A request in the same cycle as the loading of a new partition still uses the old
  partition.
* The 4- and 8-core configurations build with `CORES=4`/`8`, and the 512 KB and
  1 MB caches with `SETS=256`/`512`. These configurations are simulated only with
  30,000-cycle intervals and synthetic access mixes, not with real programs.
