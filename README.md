# Hybrid mapped TLB

When a real-address data cache grows larger than page size × associativity, the cache can
no longer be indexed by the page offset alone. The TLB lookup then sits in series with the
cache access, on the critical path of the MEM stage. A fully-associative TLB makes this
worse: it must finish its tag search before it can read out the real page number.

The hybrid mapped TLB splits the TLB in two:

* a large **direct-mapped master TLB**. Only one entry can match, so its real page number can
  be read out and sent to the cache *before* the entry is known to be the right one. The
  virtual page compare then runs in parallel with the cache access. It either confirms the
  access or cancels it.
* a small **fully-associative slave TLB** (4 entries). It holds only the translations the
  master has displaced. It catches most of the conflict misses that direct mapping causes.
  It costs one stall cycle per master miss.

A master hit therefore costs nothing on the cycle. A master miss that hits in the slave costs one
stall cycle. A miss in both goes to the page table, as a conventional TLB would. Whether the
scheme pays off depends on how often the master misses. Let MPI_master be master misses per
instruction and n the base cycles per instruction. The hybrid TLB breaks even when its cycle
time is no more than `n / (n + MPI_master)` of a conventional TLB's cycle time. The design
targets a 128-entry master with a 4-entry slave and 8 KB pages.

## Access timing

One translation is in flight at a time. The cycle of the request is called cycle 0.

| outcome                | cycle 0                                   | cycle 1                                  | cycle 2 …                                  | stall cycles |
|------------------------|-------------------------------------------|------------------------------------------|--------------------------------------------|--------------|
| master hit             | cache access with master RPN, `resp_valid` | —                                        | —                                          | 0            |
| master miss, slave hit | cache access with master RPN, cancelled; `stall` | cache access with slave RPN, `resp_valid`; swap | —                                  | 1            |
| miss in both           | as above                                  | slave miss; `stall`                      | `walk_req` until `walk_ack`; in the ack cycle the cache access goes out with the reloaded RPN and `resp_valid` is set | 2 + reload latency |

`cache_req` means a cache access starts this cycle at `cache_pa`. `resp_valid` means that
address is correct. In cycle 0 `cache_req` is always high, because the master's real page
number goes out before the compare has finished. `cache_req` without `resp_valid` tells the
cache to drop that access. `stall` is high in every cycle of an access except the one that
completes it.

## How entries move between master and slave

The two tables are exclusive: a translation lives in the master or the slave, not both. This is
what lets four slave entries make up for most of the master's conflict misses.

* **Slave hit (swap).** The slave entry moves into the master slot at the current index. The
  entry it displaces moves into the slave way just vacated. If the master slot was empty, the
  slave way becomes empty. The way that receives a valid entry becomes most recently used.
* **Miss in both (reload).** The reloaded translation is written into the master. The displaced
  master entry, if valid, is inserted into the slave. Its way is chosen in this order:
  1. the way that already holds that page;
  2. otherwise the lowest empty way;
  3. otherwise the least recently used way, whose entry is dropped.

Rule 1, and a matching rule on the swap path, exist for the instruction-field index mode below.
In that mode one page can sit at two master indices, reached through two different base
registers. When both copies are displaced, the slave must still hold the page only once. On a
swap whose displaced page is already in the slave, the vacated way is simply emptied. An
assertion in `hmtlb_slave` checks that a lookup never matches more than one way.

## Two ways to index the master

`INDEX_MODE` selects how the master is indexed:

* `IDX_VPN` (default): the low `log2(MASTER_ENTRIES)` bits of the virtual page number.
* `IDX_LS`: a function of the load/store instruction's own fields: the base register identifier
  and the offset. This index is known before the address add, so the master read can start in an
  earlier stage. The virtual address is still computed as base + offset (`hmtlb_ea`) and compared
  with the stored page number. If the base register changed since the entry was loaded, the
  stored page number will not match, and the access takes the miss path. The hash here is an
  XOR fold of `{reg_id, offset}` into the index width. The index is only defined as some
  function of these fields, so this particular hash is this design's choice.

The master stores the full virtual page number in both modes, so the compare is the same.

## Modules

| file | role |
|------|------|
| `rtl/hmtlb_pkg.sv`    | default sizes, `index_mode_e`, `ctrl_state_e` |
| `rtl/hmtlb_top.sv`    | the TLB: request latch, address/entry multiplexing, wiring |
| `rtl/hmtlb_ea.sv`     | base + sign-extended offset |
| `rtl/hmtlb_index.sv`  | master index for either mode |
| `rtl/hmtlb_master.sv` | direct-mapped table, combinational read, page compare (`hit`) |
| `rtl/hmtlb_slave.sv`  | fully-associative table, lookup, insertion-way choice |
| `rtl/hmtlb_lru.sv`    | age-counter LRU for the slave |
| `rtl/hmtlb_ctrl.sv`   | IDLE / SLAVE / WALK sequencer, stall, write enables, outcome events |

Parameters of `hmtlb_top` and their defaults: `VA_W=32`, `PA_W=32`, `PAGE_BITS=13` (8 KB),
`MASTER_ENTRIES=128` (a power of two), `SLAVE_ENTRIES=4`, `REG_W=5`, `OFF_W=13`,
`INDEX_MODE=IDX_VPN`. At the defaults, synthesis gives about 5 k memory bits (the master's page
numbers) and about 180 flip-flops.

## Interface of `hmtlb_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset that clears all valid bits |
| `req_valid`, `req_reg_id`, `req_base`, `req_off` | in | load/store in the MEM stage: base register number, its value, signed offset. Sampled only while `req_ready` is high |
| `req_ready` | out | idle, a new access may be presented |
| `stall` | out | the access is not finished this cycle |
| `cache_req`, `cache_pa`, `resp_valid` | out | cache access, real address, address confirmed |
| `walk_req`, `walk_vpn` | out | page table reload request, held until acknowledged |
| `walk_ack`, `walk_rpn` | in | one-cycle acknowledge with the real page number |
| `ev_master_hit`, `ev_slave_hit`, `ev_miss` | out | one pulse per access with its outcome, for miss counting |

The page table walker, the data cache and the processor pipeline are outside this design. The
testbenches model the page table as a fixed scrambling of the virtual page number.

## What follows the original proposal and what is this design's own choice

From the proposal:

* the master/slave split;
* direct mapping of the master and full associativity of the slave;
* the 4-entry slave with LRU replacement;
* the 128-entry master with 8 KB pages;
* both index modes;
* the cache access started with the unconfirmed master entry;
* the compare that drives the stall;
* the one-cycle penalty for a slave hit and the reload on a double miss.

Chosen here:

* 32-bit virtual and real addresses;
* the 5-bit register field and 13-bit offset, taken from the SPARC format;
* the index hash;
* valid bits, and the reset behaviour;
* swapping entries between the tables, and the insertion-way rules;
* the reload handshake;
* one access in flight at a time.

In the `IDX_VPN` organisation the slave could be searched in cycle 0, in parallel with the
master. Here it is searched in the stall cycle in both modes. The slave-hit penalty is the same
one cycle either way.

The design point is stated as 128 entries with 8 KB pages and a break-even ratio of 0.9835 at
n = 1.2. Applying the break-even formula to the published master miss rates gives that ratio for
a 64-entry master: 1.2 / (1.2 + 0.02012). The 128-entry rate (0.00746) gives 0.9938. The RTL
keeps 128 as its default; `MASTER_ENTRIES=64` gives the other point.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_hmtlb_ea`, `tb_hmtlb_index`, `tb_hmtlb_master`, `tb_hmtlb_lru`, `tb_hmtlb_slave`,
  `tb_hmtlb_ctrl`: unit tests against shadow models. The index test computes the fold bit by bit.
  The controller test checks every output in every cycle of directed sequences, with reload
  latencies of 0–3.
* `tb_hmtlb_top`: default configuration, 20 000 accesses clustered on a few master indices.
  For each access it checks, against an independent model (`tb/hmtlb_tb_pkg.sv`):
  * the outcome;
  * the real address;
  * the stall count (0 / 1 / 2 + latency);
  * the cancelled speculative access.

  It also requires that master hits, slave hits, double misses, cancellations, slave insertions
  and LRU evictions each happened at least once.
* `tb_hmtlb_top_ls`: the same checks with `INDEX_MODE=IDX_LS`. Base registers are rewritten from
  time to time, so stale master entries and duplicate pages occur.
* `tb_hmtlb_sweep`: all 20 size points of the study (16–256 master entries × 4–32 KB pages, 4-entry
  slave) run the same synthetic trace side by side, 50 000 references each. It checks every
  translation. For each point it prints the master and hybrid MPI, taking one load/store per three
  instructions, and the break-even ratio for n = 0.5, 1 and 2. The trace has a hot stack, four
  streaming arrays and a random 8 MB heap. It is a stand-in for the SPEC traces the study used, so
  its miss rates are those of this trace and cannot be compared with the published tables.

To simulate with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hmtlb_pkg.sv tb/hmtlb_tb_pkg.sv tb/tb_hmtlb_top.sv --top-module tb_hmtlb_top
./obj_dir/Vtb_hmtlb_top
```

Replace `tb_hmtlb_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/hmtlb_pkg.sv rtl/<module>.sv`. The only lint warnings are
unused package constants, plus the unused upper page-number bits in `hmtlb_index`, which takes
the whole page number but uses only the index bits.
