# Adaptive load/store domain for an SMT core

An SMT core's data caches face very different demands depending on how many threads run and what
they do. A large, highly associative cache cuts misses, but it is slow on every access. A small one
is fast, but it misses more. This design puts the L1 data cache and the L2 cache in a clock domain
of their own, the load/store domain. The two caches can trade capacity in their fast part for clock
rate, and do so at run time. Every 15,000 committed instructions a small controller works out which
of four cache configurations would have served the threads best over the interval just finished,
and switches to it. The clock generator then moves the domain to the matching frequency.

The controller does not minimise the plain average access time. It minimises the *harmonic* mean of
the per-thread mean access times (HAMAT), which is the same as maximising the cache's access rate.
With one thread the two criteria are identical, so the controller upsizes when the capacity saves
enough misses. With several threads, the harmonic mean favours the threads that use the cache well.
Those threads gain from a small, fast configuration, while a miss-heavy thread can hide its misses
behind the others.

## The partitioned cache

Both caches are eight-way set associative. Each set keeps a full MRU stack, a ranking of its eight
lines from most to least recently used. The lines at MRU positions `0 .. A-1` form the fast **A
partition**. The rest form the slow **B partition**. A lookup that hits in B costs the B latency.
The line then moves to MRU position 0, i.e. into A, and the least recently used line of A slides
into B. All eight ways always hold data: a configuration only chooses `A`, and with it the
latencies and the clock.

| config | A/B ways | clock   | L1 A/B latency | L2 A/B latency | L1 A size | L2 A size |
|--------|----------|---------|----------------|----------------|-----------|-----------|
| D0     | 1/7      | 1.59 GHz| 2 / 7 cycles   | 12 / 42 cycles | 32 KB     | 256 KB    |
| D1     | 2/6      | 1.00 GHz| 2 / 5          | 12 / 27        | 64 KB     | 512 KB    |
| D2     | 4/4      | 0.76 GHz| 2 / 2          | 12 / 12        | 128 KB    | 1 MB      |
| D3     | 8/0      | 0.44 GHz| 2 / -          | 12 / -         | 256 KB    | 2 MB      |

Latencies are in load/store-domain cycles, so the same cycle count means a longer time at a lower
clock. The L1 has 32 KB per way and the L2 has 256 KB per way. The L1 and the L2 always switch
configuration together.

In this RTL the partition is *logical*: lines are never copied between ways. Instead, the
MRU position found at lookup decides the latency. A physical implementation would place the A
ways in a faster SRAM array and swap lines on a B hit. The hit/miss behaviour and the latencies seen
at the port are the same.

Because every configuration's A partition is a prefix of the same MRU stack, the MRU position of a
hit tells you, at once, whether the access would have hit A or B in *each* configuration. Misses
are the same in every configuration, because all eight ways always hold data. This is what makes
the accounting below possible.

## Accounting and the decision

`acct_counters` keeps, per thread and per cache level, one counter per MRU position (hits) plus one
miss counter: 2 × 4 × 9 counters of 16 bits. After an interval, thread *j*'s total access time
under configuration *c* is

```
T_j[c] = Σ_p L1hits_j[p] · cost(c, p)       + L1misses_j · cost(c, L1 miss)
       + Σ_p L2hits_j[p] · cost(c, 9+p)     + L2misses_j · cost(c, L2 miss)
```

Each `cost` is a latency in cycles times the clock period at *c*, in picoseconds:
`period_ps = 1_000_000 / f_MHz`. A hit at position *p* costs the A latency if `p < A`, and the B
latency otherwise. A miss is known once the last partition holding ways has been probed: at the B
latency, or at the A latency in D3. An L2 miss adds the 80 ns main-memory latency. The whole table
is computed by `cache_pkg::cost()` from the frequency and latency constants above. It is not stored
as data.

With `n_j` the thread's number of L1 references, its mean access time is `T_j[c] / n_j`. The
controller picks the *c* that maximises

```
AAR[c] = Σ_j n_j / AMAT_j[c] = Σ_j n_j² / T_j[c]
```

That is the configuration with the lowest harmonic-mean access time (the constant 1/N is dropped).
For a single thread this reduces to the lowest `T_0[c]`.

How the hardware computes it (`hamat_ctrl`):

1. **Totals.** There is one `amat_unit` per thread. It computes `T_j[c]` for all four
   configurations at once, as a bit-serial multiplication by the constant costs. It scans the
   32-bit cost constants from the MSB down. In each cycle every accumulator doubles and adds, through
   an adder tree, the counts whose cost has a 1 in that bit. One partial product per cycle gives
   32 cycles.
2. **Reciprocals.** There is one restoring divider per thread, 64 cycles per division. It forms
   `n_j² · 2^24 / T_j[c]` for one configuration after another, and the quotients are summed into
   `aar[c]`.
3. **Choice.** Pick the largest `aar[c]`; ties go to the smaller configuration. If no thread made a
   reference in the interval, keep the current configuration.

`cfg` changes, and `cfg_update` pulses, 299 cycles after the interval end. The totals take only
the first 32 of those cycles. The dividers take the rest, which is still negligible against an
interval of 15,000 instructions. An interval end that arrives while a decision is still running is
ignored. The counters are then not restarted, so that interval's counts roll into the next one.
`interval_counter` adds up the commit count (0..24 per cycle). It pulses at every multiple of
15,000, and carries the overshoot into the next interval.

### The older policy, for comparison

With `policy_amat = 1` the controller applies the single-thread policy instead. It picks the
configuration with the lowest total access time `Σ_j T_j[c]`, i.e. the lowest plain mean access
time over all references. With one thread the two policies choose the same configuration. With
several threads, AMAT serves the miss-prone thread, because its misses dominate the total. HAMAT
serves the threads that hit often, because they dominate the access rate. AMAT needs no
reciprocals, so the dividers are skipped and `cfg_update` comes 35 cycles after the interval end.
`policy_amat` is sampled together with the interval end.

## A consequence of the latency table

With the latencies above, D2's B partition is as fast as its A partition (2/2 and 12/12 cycles).
Every cost under D3 is therefore at least as high as under D2, so the controller never picks D3.
That is simply what this table implies. If other latencies are wanted, change the constants
`L1_LAT_B` / `L2_LAT_B` in `cache_pkg`. The cost function, the testbench reference models and
the hand-calculated check in `tb_ls_domain_top_full` are written against these values.

## Modules

| file | role |
|------|------|
| `rtl/cache_pkg.sv` | constants (ways, configurations, frequencies, latencies, interval), the `mem_req_t` request struct, the `cost()` function |
| `rtl/ls_domain_top.sv` | the load/store domain: LSQ → L1 → L2 → memory port, two counter banks, interval counter, controller |
| `rtl/load_store_queue.sv` | 32-entry in-order queue of loads/stores from the core |
| `rtl/l1_dcache.sv` | 64-bit word port with byte enables over an `adaptive_cache` |
| `rtl/adaptive_cache.sv` | the partitioned, MRU-ordered, write-back cache (used for the L2 and inside the L1) |
| `rtl/acct_counters.sv` | per-thread hits-per-MRU-position and miss counters |
| `rtl/interval_counter.sv` | 15,000-instruction interval |
| `rtl/amat_unit.sv` | per-thread total access time for all configurations, 32 cycles |
| `rtl/seq_divider.sv` | restoring divider used by the controller |
| `rtl/hamat_ctrl.sv` | the HAMAT decision (or the AMAT one) |

### Interfaces and timing

* **Core side** (`core_req_*`, `core_resp_*`): valid/ready into the LSQ. When `core_req_ready` is
  low the queue is full and the core must hold the request. Requests are served one at a time, in
  order. Each one gives exactly one `core_resp_valid` pulse, carrying the load data (or, for a
  store, the word after the store), the thread and whether the L1 hit. There is no back-pressure
  on responses.
* **Cache timing**, from acceptance by the cache to the response: an A hit takes the A latency and a
  B hit the B latency, exactly. A miss first waits for the miss-detect latency, then writes back a
  dirty victim if there is one, then refills from the next level.
* **Inter-cache and memory ports** (`dn_*`, `mem_*`): one line-wide request at a time, valid/ready,
  with exactly one response pulse per request, for reads and writes alike.
* **Reset**: `rst_n` is asynchronous, active low. After reset each cache sweeps its sets (512 cycles
  for the L1, 4096 for the L2) to clear the valid bits and set the MRU stacks. It accepts nothing
  until the sweep is done.
* **Clock**: `clk` is the load/store clock. An external PLL produces it from `cfg`, and the domain
  keeps running on the old clock while the PLL relocks. The commit count `retire_cnt` must already
  be synchronised into this domain. The clock generator and the clock-domain synchronisers are not
  part of this RTL.

## Where this RTL makes its own choices

* 64-byte lines and a 40-bit physical address, so the L1 has 512 sets and the L2 has 4096.
* Write-back, write-allocate. L1 write-backs go to the L2 but are not counted in the L2's
  accounting; only L1 refills are.
* Blocking caches that serve one request at a time. A pipelined implementation would overlap
  requests, but the latencies per request would be the same.
* Logical A/B partitions (see above).
* A simple in-order load/store queue. It needs no address comparison, because the cache behind it
  is blocking and in order.
* The AMAT policy is kept as a run-time choice on the `policy_amat` pin, so both policies can be
  compared on the same hardware. Tie it to 0 for the HAMAT policy.
* The cost model charges an L2 miss a flat 80 ns of main-memory time for the whole line. The
  faster follow-on beats of a burst are not counted separately.
* Reciprocals in hardware dividers. An alternative is to leave them to software running on the
  core's arithmetic units. The fixed point uses `FRAC = 24` fraction bits.
* 16-bit saturating counters. 15,000 instructions cannot overflow them when each thread makes at
  most one L1 reference per instruction.
* The sub-banking of the real SRAM macros (32 sub-banks per L1 way and 8 per L2 way) only affects
  their timing. It is represented only through the latencies.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/cache_pkg.sv tb/tb_ls_domain_top.sv \
    --top-module tb_ls_domain_top -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_adaptive_cache` | data against a byte image; hit/miss and MRU position against an independent LRU model; exact A/B hit latency in all four configurations; write-backs |
| `tb_l1_dcache` | word/byte-enable data path; a repeated access hits in A in exactly 2 cycles |
| `tb_acct_counters` | every counter against a model across intervals; saturation |
| `tb_amat_unit` | totals against costs recomputed from the frequency/latency table; 33-cycle completion |
| `tb_hamat_ctrl` | AAR values and choice against a 64-bit model; 299-cycle decision (35 for AMAT); shaped cases (deep-MRU single thread → D2 under both policies, MRU-0 threads → D0, mix → D0 under HAMAT but D2 under AMAT, empty interval → no change) |
| `tb_interval_counter` | interval pulses with carried overshoot |
| `tb_load_store_queue` | order, occupancy, full at 32 |
| `tb_ls_domain_top` | end to end at reduced size (4 L1 sets, 16 L2 sets, 3,000-instruction intervals), with the PLL model and a memory model: three workload phases, every response checked; it counts LSQ-full stalls, L1/L2 A hits, B hits and misses, write-backs at both levels, interval ends, decisions, upsizing, downsizing and clock changes, and fails if any never happened |
| `tb_smt_workloads` | synthetic one-, two- and four-thread mixes (one capacity-hungry thread plus cache-efficient ones) through the reduced-size top, under both policies: alone the hungry thread makes the domain upsize under either policy (average A associativity 4); with company HAMAT shrinks the A partition (about 1 to 1.4). With two threads AMAT keeps upsizing for the hungry thread (4 against HAMAT's 1). With four threads the hungry thread makes only a quarter of the references, and both policies stay small |
| `tb_ls_domain_top_full` | the top at its default sizes: reset sweeps, stores/loads through both caches to memory, and one full 15,000-instruction interval with a decision that matches a hand calculation |

`tb_pll_model.sv` (the clock generator, with a shortened lock time) and `tb_line_mem.sv` (main memory
with a fixed delay in clock cycles) are behavioural models used only by the testbenches.

## Changing it

* Sizes: the `L1_SETS`, `L2_SETS`, `LINE_BYTES`, `LSQ_DEPTH`, `INTERVAL_LEN` and `CNT_W`
  parameters of `ls_domain_top`.
* Timing of the configurations: `FREQ_MHZ`, `L1_LAT_*`, `L2_LAT_*` and `MEM_PS` in `cache_pkg`.
  Costs follow automatically. The reference models in `tb_amat_unit`, `tb_hamat_ctrl` and
  `tb_adaptive_cache` have their own copies of these numbers and must be updated with them.
* The number of ways is fixed at eight (`WAYS`, with a 3-bit MRU position). The four A sizes are
  in `A_WAYS`.
