# Memory-aware per-core DVFS for a quad-core CMP

An out-of-order core that is waiting for a miss in its last-level cache often has
nothing left to issue. It still burns full dynamic power while it waits. This
design detects those windows per core and drops that core, and only that core, to
half frequency and a lower supply voltage (1.0 V -> 0.85 V in the baseline). When
the miss returns and the core has work again, the core goes back to full speed.
The scheme is a multicore form of VSV (variable supply voltage) DVFS. The cores
share one L2 cache, so the main problem is telling which core a given L2 miss
belongs to.

The RTL here is the control logic only. The cores, caches, DRAM, PLL and voltage
regulators are outside it and connect through ports.

## Baseline configuration

| item | value |
|---|---|
| cores | 4, 4-way issue, out of order |
| chip clock | 3 GHz, halved in low-power mode |
| supplies | VDD 1.0 V, VDD_L 0.85 V |
| shared L2 | 4 MB 8-way, 12-cycle latency, 64 MSHRs |
| L1 | private 32 KB IL1 and DL1 per core, 2-cycle latency |
| DRAM | 1 GB, 100-cycle latency |
| DVFS transition | 12 ns = 36 chip cycles; 100 ns (300) and 8.9 µs (26700) also studied |
| VSV state machine | 10-cycle observation window, 3-cycle idle threshold |

## Block structure

```
                 issue_cnt[c]                       vdd_low[c] -> regulator c
                     |                                   ^
 L2 miss req --> l2_mshr_file --core_miss[c]--> vsv_fsm[c] --dvfs_req[c]--> dvfs_ctrl
 DRAM fill   -->   (64 entries)  core_ret[c]-->    ^ ce                 |      |
                                                   |          half_freq[c]  stall[c]
                                              core_clk_div[c] <---------+------+
                                                   |
                                                core_ce[c] -> core c
                                  cache_lat_sel[c] <- half_freq[c] -> l1/l2/mem latency
```

| module | role |
|---|---|
| `vsv_pkg` | shared constants, the FSM state and controller mode enums, the latency-scaling function |
| `l2_mshr_file` | L2 MSHRs with the pointer to the originating L1 cache; routes miss and return events to cores |
| `vsv_fsm` | per-core four-state decision machine |
| `dvfs_ctrl` | one controller for all cores; sequences voltage, clock and stall |
| `core_clk_div` | per-core divide-by-two clock enable |
| `cache_lat_sel` | latencies the core must assume for the unscaled caches |
| `vsv_cmp_top` | wires the above for `NUM_CORES` cores |

## The per-core decision machine (`vsv_fsm`)

An L2 miss alone is not a reason to slow down. An out-of-order core may have
enough independent work to hide most of the miss, and slowing it would cost
throughput. The machine therefore watches issue activity after the miss before
it decides. It also watches issue activity after the return before it speeds up
again. It uses one signal for this: the number of core cycles since the core last
issued an instruction (the *idle count*).

| state | DVFS | leaves on | to |
|---|---|---|---|
| A | off | own primary L2 miss | B |
| B | off | idle count > 3 | C (engage) |
| B | off | 10 core cycles without that | A |
| B | off | another own miss | B, window and idle count restart |
| C | on | own miss return | D |
| D | on | idle count > 3 | C |
| D | on | 10 core cycles without that | A (disengage) |

Points a user should know:

* **Everything counts core cycles, not chip cycles.** The machine sits inside the
  core, so at half frequency a 10-cycle window lasts 20 chip cycles. In RTL the
  machine runs on the chip clock gated by the core's clock enable `ce`. The miss
  and return events come from the L2 side at chip rate. They are held in pending
  flags until the core's next cycle, so none is lost when the core is slow or
  stalled.
* **Threshold.** "Low ILP" is *strictly more than* `THRESH` consecutive idle core
  cycles. With `THRESH = 3`, the 4th idle cycle in a row triggers it.
* **Counting restarts on entry to B and D.** Otherwise a core that sat idle in C
  would go straight back from D to C on the return.
* **Events that do nothing.** A miss in C or D has no effect. Neither has a return
  in A or B. A return that arrives while the machine is still deciding in B is
  therefore not remembered. The machine then waits in C for the return of a later
  miss.
* **Output.** `dvfs_req` is high in C and D. It is registered.

## Which core missed? (`l2_mshr_file`)

With a private L2, every L2 miss belongs to the one core. With a shared L2 it can
come from any core. The MSHR that a *primary* miss allocates therefore also stores
the index of the L1 cache that sent the request. L1 numbers are `2*core` for the
IL1 and `2*core+1` for the DL1, so the core is the L1 index without its lowest bit.

* Miss request (`miss_valid`, `miss_addr`, `miss_l1`): the block address is
  compared with all valid entries.
  * A match is a secondary miss. It is merged and no event is sent.
  * Otherwise the lowest free entry is allocated and `core_miss[core]` pulses on
    the next cycle.
  * `miss_ready` is low only when the file is full and the address is new. The
    requester must then hold the request (there is an assertion for this).
* Fill (`fill_valid`, `fill_idx`): main memory names the entry with the MSHR
  number that tagged the request (`miss_idx`). The entry is freed and
  `core_ret[core of the allocating L1]` pulses on the next cycle.
* Only the core whose miss allocated the entry sees the miss and its return.
  Another core that merges into the entry sees no event.

The block address is 24 bits: 1 GB of physical memory and 64-byte blocks. The
block size is this design's choice.

## Moving a core between operating points (`dvfs_ctrl`, `core_clk_div`)

The central controller keeps one sequencer per core, with modes FULL, TO_LOW, LOW
and TO_FULL. When a core's request differs from its settled mode, the sequencer
starts a transition. The transition lasts `TRANS_CYCLES` chip cycles, and the core
is stalled for all of it:

* **Going down.** The clock is halved and the regulator is switched to VDD_L at
  the start.
* **Going up.** The regulator is switched back to VDD at the start. The clock
  returns to full speed only at the end.

So a core never runs at full clock on the low supply (there is an assertion for
this). A request that changes during a transition is handled once that transition
has ended.

`core_clk_div` turns the chip clock into the core's clock enable:

| condition | `core_ce` |
|---|---|
| full speed | every chip cycle |
| half speed | every second chip cycle, counted from a free counter |
| stalled | never |

The core, its VSV machine and its pipeline all run on this enable. The chip PLL
is never re-locked.

The transition latency is a parameter because it depends on the regulator:

| regulator | latency | `TRANS_CYCLES` at 3 GHz |
|---|---|---|
| fast on-chip, dual rail | 12 ns | 36 |
| on-chip switching | 100 ns | 300 |
| off-chip | 8.9 µs | 26700 |

The counter width follows the parameter.

## Cache latencies under throttling (`cache_lat_sel`)

The L2 is shared, so it cannot slow down with one core. No cache is slowed. An
access takes the same time in nanoseconds, which is fewer cycles of a halved
core clock. `cache_lat_sel` gives the core the latency to plan with:

| level | full speed (core cycles) | half speed (core cycles) |
|---|---|---|
| L1 | 2 | 1 |
| L2 | 12 | 6 |
| DRAM | 100 | 50 |

The general rule is ceil(latency / 2). The latencies of the functional units do
not change in core cycles.

## Top-level interface (`vsv_cmp_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | chip clock, asynchronous active-low reset (all cores at full speed, FSMs in A, MSHRs empty) |
| `issue_cnt[c]` | in | instructions core `c` issued in its current core cycle (0..4) |
| `miss_valid/addr/l1`, `miss_ready/primary/idx` | in/out | shared-L2 miss port |
| `fill_valid/idx` | in | DRAM fill port |
| `mshr_busy` | out | MSHR entries in use |
| `core_ce[c]`, `stall[c]` | out | core clock enable, transition stall |
| `half_freq[c]`, `vdd_low[c]` | out | clock mode, regulator select |
| `vsv_state[c]`, `dvfs_mode[c]` | out | FSM state, controller mode |
| `l1_lat/l2_lat/mem_lat[c]` | out | latencies in core cycles |

The top accepts one miss request and one fill per chip cycle.

Parameters are `NUM_CORES` (4, a power of two, at least 2), `NUM_MSHR` (64),
`TRANS_CYCLES` (36), `WINDOW` (10) and `THRESH` (3).

Timing of one throttling episode at the defaults, all at full speed before the
transition:

1. Miss accepted at cycle 0; `core_miss` at cycle 1.
2. FSM in B from cycle 2.
3. After 4 idle core cycles, the FSM is in C and `dvfs_req` is high.
4. One cycle later `stall`, `half_freq` and `vdd_low` rise. The stall lasts 36
   chip cycles.
5. The core then runs at half rate until its return takes the FSM to D.
6. After 10 issuing core cycles in D (20 chip cycles), the FSM is back in A.
7. A 36-cycle stall follows, and then full speed.

## Departures and own choices

These behaviours follow the published scheme:

* the four states and their transitions
* the window of 10 and threshold of 3
* the per-core machines
* the consolidated controller driving per-core regulators
* MSHRs holding the originating L1
* halving the frequency
* stalling during transitions
* unscaled caches with a two-latency interface
* all sizes in the configuration table

These are choices made here:

* strict "greater than" for the threshold (the description uses both "crosses"
  and "exceeds")
* restarting the counts on entry to B and D
* ignoring events in states where the description gives none
* pending flags for events between core cycles
* the clock-enable form of the divider
* the order of the voltage and clock changes
* the fully associative MSHR compare, lowest-free allocation and fill by entry
  number
* the 64-byte block size
* rounding latencies up

The scheme's evaluation raises a known weakness of the machine itself. With
4-wide cores and these parameters it tends to engage DVFS more often than the
misses justify. Tuning `WINDOW` and `THRESH` is the intended knob. The RTL keeps
the published values as defaults.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_vsv_fsm` | every transition on the exact cycle, then 100k random cycles at full and half core rate against a reference model |
| `tb_l2_mshr_file` | primary/secondary decisions, entry numbers, full-file refusal and per-core event routing against a reference model |
| `tb_dvfs_ctrl` | stall length, the order of voltage and clock changes, deferred requests, for 4 cores at 36 and 1 cycles of latency |
| `tb_core_clk_div` | the enable pattern at full, half and third rate and during stalls |
| `tb_cache_lat_sel` | both latency sets, and rounding up |
| `tb_vsv_cmp_top` | the whole design at its default size (below) |
| `tb_vsv_workloads` | six four-program mixes at three latencies (below) |

`tb_vsv_cmp_top` runs the whole design at its default size for 260k chip cycles.
The testbench models four cores of different character, the L2 miss port and a
100-cycle DRAM. It checks that:

* each core leaves A on exactly the first core cycle after a miss of its own
* each core leaves C on exactly the first core cycle after a return of its own
* every stall is 36 cycles
* the clock-enable pattern matches the clock mode
* voltage never runs ahead of the clock
* the end state is clean

It also requires that each of these happened at least once:

* the six FSM transitions
* a window restart
* an event held between core cycles
* a secondary merge
* a full MSHR file
* transitions in both directions

`tb_vsv_workloads` runs the six four-program mixes (ammp-gcc-mesa-twolf,
applu-parser-swim-vortex, apsi-art-quake-wupwise, bzip2-quake-mesa-mgrid,
swim-gcc-apsi-vortex, vpr-art-mcf-wupwise). It uses three copies of the design,
with 36, 300 and 26700 cycles of transition latency. Each program is reduced to
two numbers:

* its measured L2 misses per 1000 cycles
* an assumed chance of having no work while its miss is pending (95 % for
  memory-bound programs, 60 % for balanced ones, 30 % for compute-bound ones)

Each mix runs for 300k chip cycles. The testbench prints each core's share of
time at half frequency. It checks:

* stall lengths
* the bound on transitions that each latency sets
* that every memory-bound program gets throttled

These are synthetic runs of the control logic. They are not performance or power
results.

Each block's testbench has also been run against a copy of the block with one
deliberate bug, and it failed each time.

## Simulating

Build and run the end-to-end test with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/vsv_pkg.sv tb/tb_vsv_cmp_top.sv --top-module tb_vsv_cmp_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. `tb_vsv_workloads` needs
`-y tb` for its environment module `cmp_env`. To try another regulator, set
`TRANS_CYCLES` on `vsv_cmp_top` to the latency times the clock frequency.

## Not included

* **Per-core voltage regulators and the PLL.** These are analog. The design
  drives `vdd_low[c]` to each regulator and takes `clk` from the PLL.
* **The cores.** The design takes each core's issue count as an input and gives
  it `core_ce`, `stall` and the latency outputs.
* **The L2 arrays, L1 caches and DRAM.** The design takes their miss requests and
  fills as inputs.
