# Configuration prefetching for an R+D reconfigurable coprocessor

A reconfigurable coprocessor runs parts of a program (here called RFUOPs)
in FPGA logic. Before an RFUOP can run, its configuration must be in the
device, and loading a configuration takes far longer than loading a cache
line. If the load only starts when the host calls the RFUOP, the host sits
idle for the whole load. That idle time is the reconfiguration penalty.

This RTL hides as much of the penalty as it can by **prefetching**. It
predicts which configurations will be needed next and loads them while the
host is still computing. The device is a partially reconfigurable FPGA with
**Relocation and Defragmentation (R+D)**:

* **Relocation.** The row where a configuration lands is chosen at run time.
* **Defragmentation.** Configurations can be slid together, so scattered
  free rows become one usable block.

Several configurations of different sizes can therefore share the device.
Prefetching then also means caching: deciding what to keep and what to evict.

Three prediction techniques are built in, selected by the `mode` input:

| mode | prediction comes from | extra hardware |
|---|---|---|
| `MODE_STATIC` | `PREFETCH id` and `TERMINATE` instructions placed in the host code by a compiler | none beyond the queue |
| `MODE_DYNAMIC` | a Markov table of RFUOP-to-RFUOP transitions, weighted toward recent history | Markov table |
| `MODE_HYBRID` | both; per-RFUOP flag bits decide when a static prediction overrides the dynamic one | Markov table + one flag bit per RFUOP |

The structure follows the published scheme "Configuration Prefetching
Techniques for Partial Reconfigurable Coprocessors with Relocation and
Defragmentation". That scheme fixes the algorithms and the Markov table
format. Sizes, interfaces and many mechanics are not fixed by it and were
chosen here. Every such choice is listed under
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## Block structure

```
            host CPU (outside)                     configuration store (outside)
   instr_*      call_* / ret_*     size_wr_*               cs_*
      |              |     |           |                     |
      v              |     v           v                     |
 +--------------------+  +-----------------+                 |
 | prefetch_controller|  |   size_table    |--- sizes ---+   |
 |  + markov_table    |  +-----------------+             |   |
 |  + flag bits       |                                  v   |
 +--------------------+   clear/push   +----------------+    |
          |  ------------------------->| prefetch_queue |    |
          |  pf_abort                  | (order + keep) |    |
          |                            +----------------+    |
          |                         req |   ^ drop   | keep  |
          v                             v   |        v       v
 +-----------------------------------------------------------------+
 |                          config_manager                          |
 |  residency table - placement - eviction - defragmentation - load |
 +-----------------------------------------------------------------+
                                  | cm_cmd / row / word
                                  v
 +-----------------------------------------------------------------+
 | rd_config_memory:  row_decoder -> SRAM array <-> staging_area    |
 +-----------------------------------------------------------------+
                                  | cfg_bits (to the logic fabric, outside)
```

`rd_prefetch_coprocessor` is the top. The package `rdp_pkg` holds the shared
enums (`pf_mode_e`, `pf_instr_e`, `cmem_cmd_e`), the event struct
`rdp_events_t` and the default sizes.

## The R+D configuration memory

`rd_config_memory` is an array of `ROWS` x `ROW_BITS` SRAM bits that is
addressed by whole rows. There is no column decoder. Its place is taken by
the **staging area**, a buffer exactly one row wide. Every row of
configuration data passes through the staging area:

* **Loading (relocation).** The row's words are written into the staging
  area (`CM_STAGE_WR`, one word per cycle). The staging area is then
  written to whichever array row the manager chooses (`CM_WRITE`). The
  configuration itself carries no address, so it can go anywhere.
* **Moving (defragmentation).** A row is read back into the staging area
  (`CM_READ`), then written to its new row (`CM_WRITE`). This takes 2
  cycles per row.

`cfg_bits` exposes the whole array, which in a real device drives the logic
fabric. The array is made of flip-flops, so it synthesizes anywhere. A
foundry SRAM would be a drop-in change inside this module.

## Configuration manager: where configurations go, and when they leave

`config_manager` keeps a residency table: for every RFUOP, whether it is
resident, its base row and its size. It serves two kinds of load:

* **Demand fetch.** The host calls an RFUOP that is not on chip.
  `call_ready` stays low until the load finishes.
* **Prefetch.** The next entry of the prefetch queue.

Every load goes through the same decision loop (state `CHECK`):

1. If at least `S` free rows lie above the highest occupied row, load there.
   New configurations are always placed right above what is already there.
2. Otherwise, if at least `S` rows are free in total but scattered, and the
   array has not been compacted since the last eviction, **defragment**.
   The manager walks the resident configurations in row order and slides
   each one down over the hole below it, row by row, lowest row first
   (read-back, then write). A row is never overwritten before it has been read. A
   configuration is never left half-moved, even if the load is abandoned.
   The RFUOP that is currently executing is stepped over, not moved.
3. Otherwise **evict** one configuration and go back to step 1. The victim
   is the lowest-ID resident RFUOP that the prefetcher does not want (not
   in `keep`) and that is not executing. A demand fetch may also evict
   wanted RFUOPs. If a prefetch finds nothing it may evict, it is
   **dropped**: it is reported on `pf_drop_*`, and the queue marks the
   entry failed so that it is not retried.

There is no separate replacement policy. What is evicted follows only from
what the predictor currently wants.

**Abandoning a load.** A prefetch load stops in two cases:

* `pf_abort` fires. This is the "terminate previous prefetches" action of
  a `TERMINATE` instruction, of a new dynamic prediction, or of a hybrid
  static override.
* The host calls an RFUOP that is neither on chip nor the one being loaded.
  This is the demand interrupt.

The abandon takes effect at the next safe point: no store read outstanding,
and no row move half done. If the host calls the RFUOP that is being
prefetched, the load continues and becomes a demand fetch.

**Load timing.** The store answers each word read after `LAT` cycles. A
configuration of `S` rows then takes `S * (WORDS * (LAT + 1) + 1)` cycles of
loading, plus one decision cycle. A demand fetch into free space stalls the
caller for `2 + S * (WORDS * (LAT + 1) + 1)` cycles. With the defaults
(`WORDS = 4`) and `LAT = 3`, that is 17 cycles per row.

## Prediction

### Static: prefetch and termination instructions

In static mode the host executes two instructions:

* `PREFETCH id` appends the RFUOP to the prefetch queue. It does nothing if
  the RFUOP is already queued. If the RFUOP is already resident, no load
  starts, but the entry protects it from eviction.
* `TERMINATE` empties the queue and stops the load in progress.
  Configurations that have already been loaded stay on chip.

A device that holds several configurations needs `TERMINATE`. When the
program takes a different path, prefetches queued earlier become useless.
Without a way to cancel them, they would delay the useful ones. The
compiler pass that decides where to put these instructions is software and
is not part of this RTL.

### Dynamic: the Markov table

`markov_table` has one row per RFUOP `u` and `K = 8` entries per row. Each
entry holds a successor `v` and an 8-bit register `P[u,v]`. When `u` is
followed by `v`, every register in row `u` shifts right by one bit and
`P[u,v]` also gets its MSB set. This is the weighted-probability update
`P = P/(1+C)`, `P[u,v] = (P[u,v]+C)/(1+C)` with weight `C = 1`.

Each register is therefore a bit history: its bit `7-i` says whether the
`i`-th most recent successor of `u` was `v`. Two properties follow:

* A successor not seen in the last 8 executions of `u` decays to 0, and its
  entry becomes free.
* At most 7 successors are non-zero after the shift, so a new successor
  always finds a free entry. This is why `K` equals the register width.

Self-transitions are not recorded. The read port presents a row sorted by
decreasing `P`, using a combinational rank network.

On every RFUOP completion `k` (`ret`), `prefetch_controller` does this:

1. Clear the queue and stop the current load.
2. Queue `k` itself first. The RFUOP just executed is assumed likely to run
   again, since it usually sits in a loop.
3. Append `k`'s successors one per cycle, highest `P` first. The queue
   refuses any that no longer fit the chip.
4. Record the transition from the previously completed RFUOP to `k`.

The pass takes `1 + max(n, 1)` cycles for `n` successors. During the pass
the controller does not accept host instructions.

### Hybrid: flag bits

Dynamic prediction learns loops well but mispredicts loop exits. The
compiler, looking at the whole program, often predicts the exit correctly.
In hybrid mode, `prefetch_controller` keeps one flag bit per RFUOP. All
flags are 1 after reset, and a flag is set again whenever its RFUOP
completes.

A static `PREFETCH id` is handled like this:

* If `id` is already in the dynamically selected set, it is a no-op.
* Otherwise, if `flag[id] = 1`, the static prediction wins. The current load
  is stopped, `flag[id]` is cleared, and `id` is inserted at the **head** of
  the queue. Lower-priority entries at the tail are dropped until the
  queue fits the chip again.
* Otherwise (`flag[id] = 0`) the instruction is ignored. The last static
  prediction of this RFUOP was never followed by its execution.

`TERMINATE` is ignored in hybrid mode.

### The prefetch queue is also the keep set

`prefetch_queue` holds up to `QDEPTH` IDs in priority order, and never more
than `CAPACITY` rows in total. Entries stay in the queue after their
configuration has loaded. So the queue contents are exactly "the
configurations the predictor wants on chip", and the configuration manager
uses them (`keep`) to decide what it may evict. The load request always
points at the first entry that is neither resident nor marked failed. An
aborted load is therefore picked up again later, unless a clear removed it.

## Interfaces

| port group | protocol |
|---|---|
| `size_wr_en/id/size` | write the size (in rows, 1..`ROWS`) of an RFUOP before it is used |
| `instr_valid/kind/id`, `instr_ready` | static instructions, valid/ready |
| `call_valid/id`, `call_ready`, `call_base_row` | hold `call_valid` until `call_ready`; `call_base_row` is where the RFUOP's rows are. The RFUOP is locked (not evicted, not moved) until `ret` |
| `ret_valid/id`, `ret_ready` | RFUOP finished; report it before the next call |
| `cs_rd_en/id/row/word` -> `cs_rd_valid/data` | store read: one response per request, any latency, one outstanding |
| `cfg_bits` | the configuration array |
| `resident`, `flags`, `events` | status; `events` (`rdp_events_t`) gives one-cycle pulses: stall, load_done, evict, move_row, load_abort, pf_drop, term, static_issue, static_ignore, dyn_prefetch |

Reset is asynchronous and active low, and empties everything: no RFUOP is
resident, the Markov table is empty, all flags are 1 and every size is 1 row.

## Parameters

| parameter | default | origin |
|---|---|---|
| `K` (successors per Markov row) | 8 | from the scheme (`K = N`) |
| `PROB_BITS` (N) | 8 | from the scheme |
| `NUM_RFUOPS` | 64 | chosen; 6-bit IDs cover RFUOP numbers up to 63 |
| `ROWS` | 64 | chosen |
| `ROW_BITS` | 128 | chosen |
| `WORD_BITS` | 32 | chosen (`ROW_BITS` must be a multiple) |
| `QDEPTH` | 16 | chosen ("a small FIFO") |

At the defaults, synthesis gives about 17,200 flip-flops. Of these, 8,192
are the configuration array and 7,168 are the Markov table.

## Where this design makes its own choices

The prediction algorithms, the Markov update, the flag rule, the staging
area and row-wise relocation and defragmentation come from the scheme. The
following points are this implementation's own:

* **Placement and compaction.** Configurations are placed above the highest
  occupied row. Compaction goes toward row 0 and only happens when it can
  help.
* **Victim order.** The victim is the lowest-ID unwanted RFUOP. Prefetches
  that cannot make room are dropped. The scheme's static technique was
  evaluated with an off-line replacement policy, which needs to know the
  future accesses. That cannot be built as run-time hardware. Here static
  mode uses the same keep-set rule as the other modes, so the compiler's
  `PREFETCH`/`TERMINATE` stream decides what stays on chip.
* **Queue as keep set.** The queue keeps its entries after loading and
  marks failed entries.
* **When a static prefetch counts as a conflict (hybrid).** A static
  prefetch overrides only when the RFUOP is not already selected
  dynamically. `TERMINATE` is ignored in hybrid mode.
* **Just-executed RFUOP first.** The just-executed RFUOP is the top dynamic
  candidate, as the algorithm states. A consequence: if the chip can hold
  only one configuration, dynamic mode prefetches nothing. The scheme's own
  illustration of the loop-exit problem assumes otherwise. The end-to-end
  test therefore uses sizes where two configurations fit.
* **Markov update in hardware.** The table is updated by dedicated logic in
  one cycle, not by host software. It trains in every mode.
* **Execution lock.** The executing RFUOP is locked, and the safe-point rule
  governs when an abandoned load stops.
* **All interfaces and sizes** listed above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it establishes |
|---|---|
| `tb_row_decoder` | exhaustive one-hot decode |
| `tb_staging_area` | word fill, row load, precedence |
| `tb_rd_config_memory` | random relocation and row moves against a reference array |
| `tb_size_table` | reset value, random writes |
| `tb_markov_table` | the access string A B C D C C C A B D E, plus 3000 random transitions over 12 RFUOPs, checked against an independent bit-history model (entry reuse, self-loops, sorted read-out) |
| `tb_prefetch_queue` | 4000 random cycles against a queue model, including capacity refusal and tail dropping |
| `tb_prefetch_controller` | exact queue operations in all three modes, the dynamic pass cycle count, and the flag rule |
| `tb_config_manager` | exact demand-fetch latency, eviction order with keep set, defragmentation with data intact, abort, demand interrupt, lock, and drop; then a random phase checking every granted RFUOP's rows and that no two configurations overlap |
| `tb_rd_prefetch_coprocessor` | end to end at the default parameters; see below |
| `tb_prefetch_termination` | whole coprocessor, static mode: prefetches made obsolete by a branch are cancelled by `TERMINATE` (RFUOP 1 stalls 345 cycles without it, 0 with it) |

The end-to-end testbench runs two host programs under demand-only fetching
(static mode without instructions) and under each technique:

* **Program A** is a nest of loops. An inner loop alternates RFUOPs 2 and 1;
  the loop exit leads to RFUOP 3.
* **Program B** is a set of loops over 12 RFUOPs of 4 to 20 rows. It also
  contains a static prefetch for a path that is never taken.

It checks:

* the configuration data of every call;
* that each technique beats demand fetching on A;
* that hybrid beats dynamic on A;
* that the static prefetch at the loop exit hides RFUOP 3 completely in
  hybrid mode, but not in dynamic mode;
* that every mechanism occurs at least once.

Measured penalties in stall cycles:

| technique | program A | of which RFUOP 3 | program B |
|---|---|---|---|
| demand only | 10339 | 514 | 9506 |
| static | 2484 | 0 | 26 |
| dynamic | 4817 | 2245 | 6016 |
| hybrid | 0 | 0 | 28 |

These are toy programs. They show the mechanisms working as intended and
should not be read as a benchmark.

Each testbench has also been run against a deliberately broken copy of its
module, to confirm that it can fail.

## Simulating

All files are SystemVerilog-2017. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rd_prefetch_coprocessor \
    -y rtl -y tb +libext+.sv rtl/rdp_pkg.sv tb/tb_rd_prefetch_coprocessor.sv -o sim
./obj_dir/sim
```

Replace the top module name to run another testbench. The end-to-end run
takes under a second of simulation time.

`tb/config_store_model.sv` is a behavioural stand-in for the external
configuration store. Its data word is a fixed function of
(RFUOP, row, word), so testbenches can check any row without storing
bitstreams. The testbenches assume the default widths: 6-bit IDs and rows,
2-bit word index.

## Not included

* The host processor.
* The external configuration store (only the behavioural model above).
* The logic fabric that the configuration bits program.
* The compile-time passes: choosing RFUOPs, and computing static prefetch
  placements by probability propagation over the control-flow graph. These
  are software. Their output is the instruction stream that the `instr_*`
  port accepts.
