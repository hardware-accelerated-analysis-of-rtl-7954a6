# Hardware end-to-end response time analysis for mesh NoCs, with a GA task mapper

A hard real-time application on a many-core chip is a set of periodic tasks,
each pinned to one processing core, that send packets to each other over a
wormhole-switched, priority-preemptive mesh network-on-chip. Whether such a
system is *schedulable*, meaning every task finishes and every packet arrives
before its deadline even in the worst case, is decided by end-to-end response
time analysis (E2ERTA). E2ERTA is a chain of fixed-point iterations. In
software it takes millions of cycles per mapping, which is too slow for
design-space exploration. A mapping search evaluates thousands of mappings.

This RTL computes that analysis in hardware. It then uses the analysis as the
fitness function of a genetic algorithm (GA) that searches for a task-to-core
mapping that makes the whole application schedulable:

* `e2erta_top` is the accelerator. It takes a task table, a flow table and a
  mapping, and returns every task's and flow's worst-case response time,
  whether it is schedulable, and how many are not. It supports four
  *assembly schemes*: plain exact analysis, a pre-check with an upper bound
  (PRE), exact analysis started from a lower bound (NLB), and both together
  (PRE+NLB).
* `ga_mapper` is the top of the design. It is a GA pipeline that keeps a
  population of mappings, breeds offspring by crossover and mutation, and
  evaluates them on several `e2erta_top` instances that run in lockstep. It
  keeps the best half of parents plus offspring, and stops after a set number
  of generations or when it finds a mapping with nothing unschedulable.

All RTL is synthesizable SystemVerilog-2017 in `rtl/`. The self-checking
testbenches and a software reference model are in `tb/`.

---

## 1. The analysis being computed

**Tasks.** Each task *i* has a core, a worst-case computation time `c`, a
period `t` and a deadline `d`. Priority is the row index: row 0 is the
highest. A task is delayed only by higher-priority tasks on its own core,
`hp(i)`. Its response time is the smallest fixed point of

    r = c_i + Σ_{j∈hp(i)} ⌈r / t_j⌉ · c_j

The iteration starts at `c_i`. It stops at the fixed point (schedulable) or
as soon as `r > d_i` (unschedulable).

**Flows.** Flow *i* carries a packet of `L` flits from an *initial task* to a
*destination task*. Flows also have priorities by row index. Flow *i* meets
flow *j* when their XY routes share at least one link. The higher-priority
flows that share a link with *i* form its **direct interference set**
`S_id(i)`. A higher-priority flow that does not touch *i* but does touch a
member of `S_id(i)` is in the **indirect interference set** `S_ii(i)`. Such a
flow cannot block *i* itself, but it can delay a flow that blocks *i* and so
bunch that flow's packets together. The flow response time is the fixed
point of

    R = C_i + Σ_{j∈S_id(i)} ⌈(R + r_j + J^I_j) / T_j⌉ · C_j

The terms are:

* `C_i` is the **basic latency**, the time through an empty network. This
  design uses `C_i = L_i + hops_i − 1`: the header crosses every link on the
  route, then the flits pipeline behind it. `C_i = 0` when both tasks sit on
  the same core, because the packet then never enters the network.
* `r_j` is the response time of flow *j*'s initial task. It is the flow's
  **release jitter**, so flows can only be analysed once all task results
  are known.
* `J^I_j` is the **interference jitter**. This design sets it to
  `R_j − C_j` when flow *j* itself meets a flow of `S_ii(i)`, and to 0
  otherwise.
* `T_j` is the period of flow *j*'s initial task.

A flow must deliver within the end-to-end deadline of its initial task, so
the iteration limit is `d_src − r_src`. A flow whose initial task already
misses its deadline is reported unschedulable without any iteration.

## 2. Routes as bit vectors

The hardware makes set operations cheap by coding every route as a
**link vector**: one bit per unidirectional link of the mesh. Each core has
an injection link (core → router) and an ejection link (router → core).
Routers are joined by up, down, left and right links. A `C×R` mesh therefore
has `2CR + 2C(R−1) + 2R(C−1)` links, which is 560 for 10×10. The link
numbering and the core numbering (`core id = column·R + row`) are given in
the header of `rtl/xy_routing.sv`. For a 3×3 mesh they give ejection links
1–9, injection 10–18, up 19–24, down 25–30, left 31–36 and right 37–42.

With routes as vectors, the interference sets are pure bit logic:

* `S_id(i)[j] = |(route_i & route_j)` for every `j < i`
  (`direct_interference`, one higher-priority flow per cycle).
* `S_ii(i) = OR over j∈S_id(i) of ((S_id(i) | S_id(j)) ^ S_id(i))`
  (`indirect_interference`, one member of `S_id(i)` per cycle). The XOR
  removes the flows that are already direct interferers.
* `hops_i = popcount(route_i)` (`flow_basic_latency`, combinational).

## 3. Bounds and assembly schemes

Removing the ceiling from the recurrences brackets the fixed point between
two closed forms. Both need only the utilisations `u_j = c_j/t_j`, or
`U_j = C_j/T_j` for flows, of the interference set (`rta_bounds`). Here
`J_j = r_j + J^I_j` for flows and 0 for tasks:

| bound | tasks | flows |
|---|---|---|
| lower (NLB) | `c_i / (1 − Σu_j)` | `(C_i + Σ J_j U_j) / (1 − ΣU_j)` |
| upper (PRE) | `(c_i + Σ c_j(1 − u_j)) / (1 − Σu_j)` | `(C_i + Σ (J_j U_j + C_j)) / (1 − ΣU_j)` |

Every utilisation is held twice in 1.16 fixed point, once rounded down and
once rounded up. The rounding of each term is chosen so that the lower bound
never exceeds the true response time and the upper bound never falls below
it. Neither bound exists once the summed utilisation reaches 1.

`scheme` selects how the bounds are used, for every task and flow of a run:

| scheme | value | behaviour |
|---|---|---|
| E2ERTA | 0 | exact iteration from `c_i` / `C_i` |
| PRE | 1 | if the upper bound meets the deadline, accept and store the bound; else exact iteration |
| NLB | 2 | exact iteration started at the lower bound |
| PRE+NLB | 3 | PRE; a lower bound above the deadline rejects; else exact iteration from the lower bound |

Verdicts are identical in every scheme. Response times are also identical,
except that an entry accepted by PRE stores its upper bound. That bound then
feeds the jitter of lower-priority flows, so under PRE a flow can come out
more pessimistic than under exact analysis. It is never more optimistic.

## 4. The accelerator (`e2erta_top`)

```
            task table ──► task_analysis ──(r_i)──► result_store ──► counts, readback
                 │           ├ task_interference      ▲   │ task_r (jitters)
                 │           ├ rta_bounds + seq_divider│   ▼
                 │           └ rta_engine             flow_analysis
 flow table ─────┴──────────────────────────────────► ├ xy_routing → flow_basic_latency
                                                      ├ direct_interference → indirect_interference
                                                      ├ rta_bounds + seq_divider
                                                      └ rta_engine
```

On `start`, `task_analysis` and the **front end** of `flow_analysis` run at
the same time. The front end covers routing, basic latency, `S_id` and
`S_ii` for every flow, and it needs no task results. The flow response
times are computed as soon as the last task result is in, because the task
results are the flows' release jitters.

Inside each analysis, the entries are processed one at a time in priority
order:

* `rta_engine` iterates the recurrence without a divider. For each
  interferer it keeps the next release time and advances it by the period
  whenever the current window passes it. `⌈x/T⌉` is thus counted, not
  divided.
* A pass over the interference set takes one cycle per member. It is
  abandoned as soon as the partial sum passes the limit.
* `seq_divider` (restoring, one bit per cycle) forms the utilisations
  (48 bits) and the two bounds (64 bits).

**Host interface.** While `busy` is low, write task rows
(`task_we/widx/wdata = {core, c, t, d}`) and flow rows
(`flow_we/widx/wdata = {src task, dst task, L}`). Then pulse `start` with
`scheme`, `num_tasks` and `num_flows`. `done` pulses when all results are
stored. After that:

* `cycles` holds the run's length in clock cycles.
* `unsched_tasks` and `unsched_flows` hold the failures.
* `*_n_pre`, `*_n_lbrej` and `*_n_exact` say how many entries were decided by
  each path.
* `rd_idx` reads back one task and one flow. The readback includes the
  flow's link vector, `C`, `S_id` and `S_ii`.

Times are 32-bit. Indices and core ids are 8-bit. Defaults:
`MESH_COLS = MESH_ROWS = 10` and `MAX_TASKS = MAX_FLOWS = 128`.

## 5. The GA mapper (`ga_mapper`, top)

A chromosome is a mapping: gene *g* is the core of task *g*. Fitness is the
number of unschedulable tasks plus unschedulable flows, and lower is better.
The pipeline:

1. **Init**: fill `pop_size` slots with random cores, one gene per cycle.
2. **Evaluate** (`ga_eval`): the chromosomes go out in batches of `num_inst`
   instances.
   * Each instance receives its mapping, one table row per cycle. All
     instances are loaded in parallel.
   * All instances start together. The next batch is loaded only when every
     instance is done, so a fast instance idles until the slowest finishes
     (**lockstep**).
   * `idle_cycles` counts those idle instance-cycles.
3. **Rank** (`ga_ranking`): sort all `2·pop_size` slots by fitness. The
   method is selection sort, one slot per cycle, and ties go to the lower
   slot. The best `pop_size` become the parents; the rest are free.
4. **Stop** if the best fitness is 0 or `num_gen` generations have been
   bred.
5. **Breed** (`ga_breeder`): write `pop_size` children into the free slots,
   then go back to 2 with the children. Each child is made this way:
   * Pick parents A and B by binary tournament. Each is the fitter of two
     random parents.
   * With probability `cx_rate/256`, take the first half of the genes from A
     and the second half from B. Otherwise copy A.
   * Replace each gene, with probability `mut_rate/256`, by a random core in
     `0..ncores−1`.

Parents survive as long as they rank in the top half, so the best fitness
never gets worse. The random source is a 32-bit xorshift generator. It
advances only while init or breeding use it. The search is therefore
determined by the seed alone, and `num_inst` changes only its speed.
`ops_cycles` and `eval_cycles` split the run time between GA operators and
fitness evaluation.

Defaults: `POP_SIZE = 16` (32 slots), `N_INST = 5` E2ERTA instances. The
number used per run, `num_inst`, is set at run time, so populations of
6/8/16 with 2 to 5 instances all run on one build.

## 6. How far to trust it, and where it departs from the original method

Checked against an independent software model (`tb/e2erta_ref_pkg.sv`):

* Routes, link sets, basic latencies and both interference sets match
  exactly on 10×10 meshes. The 3×3 example link sets listed in §2 also
  match.
* Task results match exactly in all schemes. Flow results match exactly when
  the reference is fed the same jitters.
* GA fitness values match the reference analysis for every evaluated
  mapping.

Choices of this design that the original method leaves open:

* The basic-latency formula and the definition of `J^I`.
* Taking the flow deadline and period from the initial task.
* Priority given by row index.
* The number formats and widths.
* The fitness counting flows as well as tasks.
* The GA operator details: tournament selection, the half-and-half cut,
  rates out of 256, and selection-sort ranking.

Departures you should know about:

* **Flow upper bound.** Bounding `⌈x⌉ ≤ x + 1` in the flow recurrence gives
  the flow PRE bound of §3. The formula published for it multiplies the
  jitter term by both `U_j` and `C_j`, which is dimensionally inconsistent.
  The derived form is used instead.
* **Speed of PRE and NLB.** In the original implementation, PRE+NLB was the
  fastest scheme and plain analysis the slowest. Here it is the other way
  round: mean log10 cycles over the full-size end-to-end test are 3.39
  (E2ERTA), 4.04 (PRE), 4.07 (NLB) and 4.22 (PRE+NLB). The divider-free
  exact engine needs only a few passes of one cycle per interferer, while
  every bound costs a 48-bit and one or two 64-bit serial divisions. A
  faster divider (radix-4 or pipelined) would change this balance. Plain
  exact analysis takes about 500 cycles for 16 tasks and 4,000 for 64 tasks
  on a 10×10 mesh (10^2.7 and 10^3.6). The original hardware reports
  10^3.2 and 10^4.1 for those sizes.
* **Lower bound.** NLB uses the single closed-form lower bound above, not
  the maximum over a series of bounds. The original method makes the same
  simplification.
* **Host platform.** The original system drove the accelerators from a soft
  CPU over an on-chip bus, timed them with a timer peripheral, and printed
  results over a serial port. None of that is here. The table and
  configuration ports stand in for the bus registers, and the `cycles`,
  `ops_cycles` and `eval_cycles` counters stand in for the timer.
* **GA timing.** GA operator time per generation is about 270–320 cycles
  for a population of 6 and 1150–1400 for 16, depending on the task count.
  The original reports 792 and 2115 for task sets of unstated size. The
  fitness time per generation shows the same lockstep effect: going from 2
  to 4 instances gives close to 2× for populations of 8 and 16. For a
  population of 6, 3, 4 or 5 instances all take about the same time.

## 7. Files

| file | role |
|---|---|
| `rtl/e2erta_pkg.sv` | widths, table row structs, scheme enum, link count |
| `rtl/ga_mapper.sv` | **top**: GA controller, host tables, population, cycle counters |
| `rtl/ga_eval.sv` | lockstep fitness function over `N_INST` accelerators |
| `rtl/ga_breeder.sv`, `rtl/ga_ranking.sv` | GA operators |
| `rtl/ga_population.sv`, `rtl/ga_lfsr.sv` | chromosome memory, random generator |
| `rtl/e2erta_top.sv` | one E2ERTA accelerator |
| `rtl/task_analysis.sv`, `rtl/flow_analysis.sv` | per-entry sequencers |
| `rtl/task_interference.sv`, `rtl/xy_routing.sv`, `rtl/flow_basic_latency.sv`, `rtl/direct_interference.sv`, `rtl/indirect_interference.sv` | set and route logic |
| `rtl/rta_bounds.sv`, `rtl/rta_engine.sv`, `rtl/seq_divider.sv` | bounds, exact iteration, divider |
| `rtl/result_store.sv` | results, unschedulable counters, jitter feedback |
| `tb/e2erta_ref_pkg.sv` | software reference model and random task-set generator |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ga_table3.sv` | the GA performance sweep (population × instances) |

Each file begins with a description of its algorithm, interface and cycle
timing.

## 8. Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each also has a watchdog. The end-to-end benches also count every
mechanism they are meant to exercise, and fail if one never happened:

* PRE acceptance, lower-bound rejection and exact fallback.
* Deadline misses, blocked flows and local flows.
* Indirect interference and jitter.
* Crossover, mutation, partial batches, lockstep waiting, improvement, and
  both stop reasons.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/e2erta_pkg.sv tb/e2erta_ref_pkg.sv \
          tb/tb_ga_mapper.sv --top-module tb_ga_mapper
./obj_dir/Vtb_ga_mapper
```

Use the same command with another `tb_*` name for the other benches. Run
times at the default sizes:

| bench | what it runs | time |
|---|---|---|
| `tb_e2erta_top` | 20 random sets, 16 to 128 tasks, loads 10–90 %, each in all four schemes | a few seconds |
| `tb_ga_mapper` | six GA searches (populations 6/8/16, 2–5 instances) | about 8 s |
| `tb_ga_table3` | the eight population/instance configurations | about 15 s |

The simulator is two-state, and the testbenches reset or initialise
everything they read. Lint is clean of errors. The remaining Verilator
warnings are index-width truncations, where 8-bit indices address
128-entry arrays, and intentionally unused read-back bits.
