# Store Vulnerability Window (SVW) re-execution filter

Several load/store-unit simplifications drop an expensive associative search and check loads a different way: each load is re-executed in order just before it retires. Examples are a load queue without an address CAM, a store queue split into a large retirement queue and a small forwarding queue, and redundant-load elimination. Re-execution is simple and safe, but it costs a lot. Re-executed loads compete with store retirement for the data-cache port, and a store cannot retire until every older load has re-executed. If many loads re-execute, these costs can outweigh what the simplification saves.

The Store Vulnerability Window is a filter that decides, just before the data-cache access, whether a load flagged for re-execution really needs it. It needs two pieces of state:

* **Store sequence numbers (SSNs).** Every dynamic store gets a 16-bit number that only grows (and eventually wraps). Each load carries an **SVW**: the SSN of the youngest older store that *cannot* have affected it. The load can only be hurt by stores with a larger SSN.
* **The store sequence Bloom filter (SSBF).** This is a 512-entry, tagless table indexed by low-order address bits. Each entry holds the SSN of the last store that wrote any address mapping to that entry.

A flagged load re-executes only if `SSBF[load.addr] > load.SVW`. Otherwise no store it is vulnerable to has touched its address, and it is marked complete without a cache access. Aliasing and stale entries can only make an entry's SSN look too large, never too small. So the filter can cause an unnecessary re-execution but never miss a needed one. The whole cost is a 1 KB table and a 2-byte field per load-queue entry.

This repository holds synthesizable SystemVerilog for the complete filter as one unit. It supports all the optimizations above at once. The re-execution pipeline it sits in is included. The processor around it is not (see *Outside this design*).

## A worked example

A load is dispatched when the last retired store is SSN 62, so its SVW is 62. It executes early, while stores 64 and 66 still have unknown addresses, so it is flagged. It takes its value by forwarding from store 65, which writes the same address A. It can therefore no longer be hurt by store 65 or anything older, and its SVW is raised to 65 ("update on forward").

* If store 66 also writes A, the SSBF entry for A holds 66 when the load reaches the SVW stage. Because 66 > 65, the load re-executes and catches the ordering violation.
* If store 66 writes a different address D, and the last store to A was 65, the entry holds 65. Because 65 > 65 is false, the load skips re-execution. Without the filter it would have re-executed.

`tb_svw_stage` replays both cases.

## Store sequence numbers

`ssn_counters` keeps two counters:

* `SSN_RENAME` is the SSN of the youngest renamed store. Stores renamed in one cycle take the next numbers in program order.
* `SSN_RETIRE` is the SSN of the last store written to the cache.

In-flight stores are numbered consecutively, so the store queue does not store SSNs. The store at position *p* from the queue head has SSN `SSN_RETIRE + 1 + p`. `svw_top` uses this rule for stores reaching the SVW stage (`rex_sq_pos`) and for forwarding stores (`fwd_sq_pos`).

**Wrap-around** is handled in two ways, because the filter is only an optimization:

* **Loads vulnerable only to stores that were in flight at dispatch.** This covers the load-queue and store-queue optimizations. Such a window can span at most `SVW_MAX` = 64 stores (the store-queue size). The filter is therefore switched off for any load with `SVW > 65535 - 64`, which is about 0.1 % of the time.
* **Eliminated loads.** Their window starts at the original load and has no bound. Instead, `rename_wrap` flash-clears the integration table whenever `SSN_RENAME` passes through zero, so no eliminated load's window spans the wrap point.

## Where a load's SVW comes from

`lq_svw` is the SVW field of the load queue (128 entries):

| event | SVW written |
|---|---|
| dispatch of a normally executed load | `SSN_RETIRE` |
| dispatch of an eliminated (redundant) load | `MIN(IT-entry SSN, SSN_RETIRE)` |
| the load forwards from an in-flight store | that store's SSN |

An eliminated load never executes, so it is vulnerable from its *original* load onwards. When the original load creates its integration-table entry (`integration_table`), the entry records `SSN_RENAME`, and a later load that matches the entry inherits that SSN. Taking the minimum with `SSN_RETIRE` also covers coherence invalidations that arrive after dispatch.

Each entry also has a `filt_ok` bit that forces re-execution. It is needed for squash reuse, meaning reuse of a result computed on a squashed path. A store on the squashed path that is missing on the correct path is a case the SSBF cannot capture. Detecting squash reuse is left to the integration logic, which drives `disp_filt_ok`.

## Coherence invalidations (SSBF_SM)

For another core's writes, a second table of the same kind, SSBF_SM, is indexed at cache-line granularity (64-byte lines). An invalidation is treated as a store from this thread that is younger than every renamed store: it writes `SSN_RENAME + 1` into SSBF_SM. A flagged load checks both tables and re-executes if `MAX(SSBF, SSBF_SM) > SVW`.

A load that was already in flight when the invalidation arrived must be flagged even if its own optimization would not flag it. `inv_shadow` does this. At each invalidation it records the load queue's tail pointer (`lq_tail`). Until the head pointer (`lq_head`) reaches that recorded position, any load whose queue index lies between head and recorded tail is flagged as it enters the SVW stage. A second invalidation during the shadow extends it to the new tail. Both pointers carry one extra wrap bit, so a full queue is told apart from an empty one.

## The re-execution pipeline

`rex_pipeline` takes up to two instructions per cycle (oldest in lane 0) from the re-execution head of the ROB:

1. **SVW stage** (`svw_stage`). Every load and store passes through it in program order, even though only loads ever re-execute.
   * A store does nothing except write its SSN into the SSBF.
   * A flagged load computes its decision in the same cycle.
   * A load in lane 1 sees a store in lane 0 of the same group through a bypass, so a group behaves exactly like two consecutive single instructions.
   * Stores update the SSBF speculatively, before older loads have re-executed. This is safe because SSNs only grow.
2. **Completion without access.** Everything that does not need to re-execute is reported on `cmp_*` in the next cycle. This includes other instructions, stores, unflagged loads and filtered loads.
3. **Reload.** Loads that must re-execute wait in a two-entry buffer and use the single data-cache port one at a time, oldest first. Two rules govern issue:
   * Store retirement has priority on the port (`ret_wr`).
   * A reload waits until `SSN_RETIRE` has reached the SSN of the youngest store that passed the stage ahead of it, so it reads memory with all older stores applied.

   The group stage stalls (`in_ready` low) while more than one load of the current group is still waiting.
4. **Compare.** The word returns `DC_LAT` = 2 cycles after the grant and is compared with the value the load originally got. A difference raises `rld_mismatch`, which `svw_top` brings out as `flush_req`. In the same cycle, the store PC table (`spct`) is read with the load's address. It returns (`mark_store_pc`) the PC of the last retired store to a matching address, for training a store-set style dependence predictor.

Store retirement in turn must not pass an older load that has not finished re-executing. That rule belongs to the ROB, which owns retirement, and is not checked inside this unit.

## Module map

| module | role |
|---|---|
| `svw_pkg` | widths, sizes, `rex_entry_t`, `it_sig_t`, implicit-SSN and wrap-test functions |
| `svw_top` | wires everything below; all ports are plain signals and arrays |
| `ssn_counters` | `SSN_RENAME`, `SSN_RETIRE`, wrap pulse, flush restore |
| `lq_svw` | per-load SVW field and filter-enable bit |
| `integration_table` | 512-entry 2-way table of load signatures with output register and SSN |
| `rex_pipeline` | SVW stage, reload buffer, port arbitration, value compare |
| `svw_stage` | SSBF and SSBF_SM lookups and the re-execution test |
| `ssbf` | the tagless SSN table (used twice) |
| `spct` | store PC table |
| `inv_shadow` | flags loads that were in the load queue when an invalidation arrived |

Default sizes are those of the baseline configuration:

* 16-bit SSNs and a 512-entry SSBF.
* A 128-entry load queue and a 64-entry store queue (the store queue sets `SVW_MAX`).
* Two loads and two stores per cycle through the SVW stage.
* A 2-cycle data cache.
* A 512-entry 2-way integration table.
* 448 physical registers (9-bit register numbers).

Addresses and data are 64 bits wide. `SSN_W`, the table sizes and the granularities are package constants. Lane and port counts are module parameters.

## Interface of `svw_top`

Inputs that change state (rename, dispatch, forwarding, retirement, invalidation, flush) take effect at the rising clock edge. Reset (`rst_n`, asynchronous, active low) clears every table and counter to 0.

* **Rename:** `ren_cnt` stores renamed this cycle. Integration-table lookup uses `it_lk_sig`, which returns `it_lk_hit/preg/ssn` combinationally. Insert uses `it_ins_*`; the SSN is attached inside. A freed register arrives on `preg_free_*`.
* **Dispatch:** `disp_*`, two ports: load-queue index, eliminated flag, the SSN from the integration-table hit, and `filt_ok`.
* **Forwarding:** `fwd_*`, two ports: load-queue index and the forwarding store's position in the store queue.
* **Retirement:** `ret_store/ret_addr/ret_pc`. One store per cycle; the store uses the shared data-cache port in that cycle.
* **Flush:** `flush` with `flush_ssn`, the SSN of the youngest surviving store.
* **Invalidation:** `inv_en/inv_addr`, plus the load queue's `lq_head/lq_tail` pointers (index plus wrap bit) for the invalidation shadow.
* **Re-execution head:** `rex_*`, two lanes, with handshake `rex_ready`. Each lane carries kind, flagged bit, 8-bit tag, address, original value, load-queue index and store-queue position.
* **Data cache:** `dc_rd_req/dc_rd_addr` out, and `dc_rd_data` in, `DC_LAT` cycles later.
* **Results:** `cmp_*`, `rld_valid/rld_tag`, `flush_req`, `mark_store_pc`.
* **Visibility:** `ssn_rename`, `ssn_retire`, `it_cleared`, and event strobes `ev_*`:
  * `ev_stall`: group stalled.
  * `ev_port_busy`: reload blocked by retirement.
  * `ev_st_wait`: reload waiting for an older store.
  * `ev_filtered`: flagged load skipped.
  * `ev_wrap_off`: filter disabled near wrap.
  * `ev_shadow`: invalidation shadow active.

## Simulating

Every module has a self-checking testbench in `tb/`. Each compares the module's outputs with a reference model written in the testbench and ends with a line `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_svw_top rtl/svw_pkg.sv tb/tb_svw_top.sv
./obj_dir/Vtb_svw_top
```

Replace `tb_svw_top` with `tb_ssbf`, `tb_spct`, `tb_ssn_counters`, `tb_lq_svw`, `tb_integration_table`, `tb_svw_stage`, `tb_rex_pipeline` or `tb_inv_shadow` to run the others. All of them finish in seconds.

`tb_svw_top` runs the whole unit at its default parameters. It plays a small processor that renames, executes and re-executes windows of ten instructions. Loads may forward correctly or wrongly, or read memory too early. They may be eliminated through the integration table. Another core occasionally writes memory. Every store retires on the shared port after all older loads have finished. The run covers more than 70,000 stores, which is more than one full SSN wrap-around. The testbench checks three things:

* Every load with a wrong value re-executes and raises a flush.
* Every load the filter lets through had the right value.
* The SPCT names the right store.

It also requires each mechanism to occur at least once:

* filtered loads;
* true and false-positive re-executions;
* update on forward;
* eliminations and false eliminations;
* invalidation hits;
* the wrap-region disable;
* the integration-table flash clear;
* SVW-stage stalls, port conflicts and reloads waiting for older stores;
* the invalidation shadow. The bench does not flag loads itself after an invalidation, so the design must flag them.

## Choices this design makes

The filter test, the SSN scheme, the three SVW definitions, SSBF_SM and its `SSN_RENAME + 1` rule, the wrap-around policies, the table sizes and the shared-port priority follow the published SVW proposal. The following are this implementation's own choices:

* **SSBF granularity.** The SSBF is indexed by 8-byte words and SSBF_SM by 64-byte lines. The proposal says only "low-order address bits", and no line size is given.
* **Conservative filter use.** Following the proposal's combined scheme, every flagged load checks both SSBF and SSBF_SM. The wrap test is also applied to every flagged load, including eliminated ones. Both choices can only add re-executions. The store-queue optimization could use a separate SSBF that tracks only the stores excluded from forwarding. This design does not build that table: those loads check the main SSBF, which holds every store and so can only add re-executions.
* **Handshakes.** The two-lane SVW stage with its same-group bypass, the stall rule, the completion interface and the 8-bit tags are not specified by the proposal.
* **Reload ordering.** The proposal requires loads to re-execute in order with store retirement. Here this is enforced by the SSN comparison described above.
* **Integration table details.** The table holds load entries only, with signature = 8-bit opcode, 16-bit immediate and one register input. It uses an XOR-folded set index and round-robin replacement. Entries are invalidated when their output register is freed.
* **Invalidation shadow.** The shadow is tracked with one recorded tail pointer rather than a flag bit in every load-queue entry. It can flag a few loads too many, never too few.
* **SPCT size.** The SPCT has 512 entries of 64-bit PCs; the proposal gives no size.
* **Flush recovery.** `SSN_RENAME` is restored from an SSN supplied by the store queue. A flush that moves it backwards across zero counts as a wrap.
* **Data-cache latency.** The data cache is modelled with a fixed hit latency; misses are not part of this unit.

In the published worked example, one step compares the SSBF entry 66 against an SVW of 64. This design follows the rule stated alongside it: after forwarding from store 65 the SVW is 65. That rule also gives the example's second outcome, where 65 is not greater than 65 and the load is filtered.

## Outside this design

The SVW unit attaches to structures it does not implement, and these appear only as ports:

* the load queue's address and value fields;
* the store queue, or its split into a retirement queue and a forwarding queue with forwarding buffers and steering predictor;
* the ROB with its retirement and re-execution head pointers;
* the data cache;
* the store-set dependence predictor.

Which loads are flagged is the job of each optimization's own natural filter, so `rex_flagged` is an input. For the store-queue optimization, every load is flagged.
