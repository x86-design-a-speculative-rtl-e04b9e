# Speculative memory access unit for an x86 superscalar core

x86 code touches memory often, and every load must first go through a long
effective-address calculation. A conventional load/store unit also holds a
load back while any older store still has an unknown address. Both delays sit
on the critical path of a wide superscalar core. This unit removes them by
guessing:

* **Address prediction.** A 2-stride predictor supplies the load's address
  before the real address has been calculated. The load can then read the
  data cache early.
* **Dependency/forwarding prediction.** A store-load pair predictor says
  whether the load depends on an older in-flight store, and if so on which
  one (by store PC) and whether that store can supply the whole value. An
  independent load may pass stores whose addresses are still unknown. A
  dependent load may take its value from the predicted store before any
  address is known.

Every guess is checked later against the real addresses. A wrong guess is
repaired in one of two ways, selected at build time. The aggressive way
recovers the core. The conservative way holds the value back until it has
been checked.

The predictions are made **after dispatch**, not at fetch. When a memory
operation enters the unified memory access buffer (UMAB), its PC looks up
both tables in the same cycle. The load itself then carries its prediction,
so no separate prediction-validation buffer is needed. Only loads use the
tables.

## Block structure

```
              disp_pc ─┬──────────────► apt  (2-stride address table) ──► predicted address ─┐
                       │                                                                     │
                       └──────────────► sdpt (store-load pair table) ──► dep / filtered / fwd │
                                               │ fwd store PC                   │             │
                                               ▼                                ▼             ▼
                                      umab pair search ── pair_hit ──► bypass_logic ── mode ─► umab entry
                                                                                               │
     agu_* (computed address), std_* (store data) ───────────────────────────────────────────► │
     dc_* (data cache)  ◄──────────────────────────────────────────────────────────────────────┤
     wb_* (values sent back), recover_*, head_ready/commit  ◄──────────────────────────────────┘
     training: umab ──► apt (computed load address), umab ──► sdpt (outcome at first validation)
```

| File | Module | Role |
|---|---|---|
| `rtl/smau_pkg.sv` | package | widths, policy/send-back/mode enums, event struct, byte-lane helpers |
| `rtl/apt.sv` | `apt` | address prediction table |
| `rtl/sdpt.sv` | `sdpt` | selective dependency/forwarding prediction table |
| `rtl/bypass_logic.sv` | `bypass_logic` | turns the prediction into a scheduling mode |
| `rtl/umab.sv` | `umab` | buffer, scheduler, validation, send-back, commit |
| `rtl/smau_top.sv` | `smau_top` | the unit: the four blocks wired together |

## Address prediction table (`apt`)

The table is set-associative: 4096 entries in 4 ways by default, indexed by
`PC[9:0]` and tagged with `PC[31:10]`. Each entry holds a valid bit, a tag,
the last address and two strides.

* Lookup: on a hit the prediction is `last + stride1`.
* Training, when the load's computed address `a` arrives:
  `s = a - last`, then `stride2 <= s`, then `stride1 <= s` only if
  `s == stride2`, then `last <= a`. So a stride must repeat once before the
  predictor uses it. A new entry starts with `last = a` and both strides
  zero, so its first prediction is "same address again". That case is
  common in x86 code, which reloads spilled values.
* Replacement picks an invalid way first, otherwise the set's round-robin
  pointer.

## Selective dependency/forwarding prediction table (`sdpt`)

This table has the same organisation as the APT and is indexed by the load
PC. Each entry holds:

| field | meaning |
|---|---|
| classify counter (2 b) | tendency to be independent: up when the load turned out independent, down when dependent |
| fwd (1 b) | the paired store covered every byte of the load, so it can forward |
| fwd store PC | PC of the store the load last depended on |
| filter counter (2 b) | tendency to be mispredicted: up on a dependence misprediction, down otherwise |

The `POLICY` parameter selects how far the predictor is refined:

| POLICY | dependent when | filtered when |
|---|---|---|
| `POL_PL` | never (pre-load: all loads bypass) | never |
| `POL_DP` | table hit | never |
| `POL_CDP` | hit and classify < 2 | never |
| `POL_SDP` (default) | hit and classify < 2 | hit and filter >= 2 |

A table miss means "independent". An entry is allocated only when a load is
found to be dependent, with classify = 1 and filter = 0. The filter counter is
trained against the unfiltered prediction. A filtered load can therefore
become trusted again once it stops being mispredicted.

Both tables keep all their state in memory arrays, valid bits included.
After reset a sweep clears one set per cycle. `ready` (`pred_ready` on the
top) rises after 1024 cycles at the default size. Until then every lookup
misses and training is dropped. The buffer works normally during the sweep;
it just sees no predictions.

## Bypass logic

The buffer searches itself for the youngest older store whose PC equals the
predicted fwd store PC. This search result is `pair_hit`. The bypass logic
then chooses the load's mode:

| condition | mode | what the load does |
|---|---|---|
| filtered | `MODE_CONS` | conventional load forwarding: waits until every older store address is known |
| not dependent, or pair not in the buffer | `MODE_BYPASS` | goes as soon as it has an address (computed or predicted), passing unsolved stores |
| dependent, pair present, fwd = 1 | `MODE_FORWARD` | takes the pair's store data as soon as it exists, with no address needed |
| dependent, pair present, fwd = 0 | `MODE_WAIT` | waits until the pair has committed, then behaves as BYPASS |

## The buffer (`umab`): scheduling and validation

This is the core of the design and the part that needs the most care.

**Entries.** The buffer is a circular queue of `DEPTH` (16) loads and stores
in program order. Besides the operation itself, each load keeps:

* its prediction: predicted address, mode, pair slot, and the raw dependence
  prediction with the pair PC, kept for training;
* a record of what it actually used: the address it read at, and whether the
  value came from the cache or from which store slot;
* the flags `busy`, `stale`, `verified`, `wb pending` and `sent`.

**Obtaining a value.** Each cycle the oldest eligible load obtains its value.
It either forwards from a store or issues a cache read. Reads return one
cycle later. Outside FORWARD mode, the load looks for the youngest older
store with a *known* address that overlaps its own address, where the
address used is the computed one if present, else the predicted one. If
that store covers every byte of the load and has its data, the load
forwards from it. If the store only partly overlaps, the load waits until
the store commits. If no such store exists, the load reads the cache.

**Validation.** A load is validated once three things hold: its own address
is known, every older store address is known, and it holds a value. The
buffer then works out where the value should have come from: the youngest
older overlapping store, or the cache if there is none. The value is right
only if all of these hold:

* for a store source: the load forwarded from that same slot, and the
  forwarded value equals the value recomputed from the real addresses;
* for a cache source: the load read the cache at its real address;
* the load is not stale. A load becomes stale when an overlapping older
  store commits after the load read the cache.

The first validation of a load instance also trains the SDPT with the real
dependence: dependent or not, the store's PC, and whether it covered the
load. If that store had a known address but only partly overlapped, the
value is wrong at once. If its data is missing, validation waits. The APT is
trained earlier, when the computed address arrives.

**Send-back.** With `SEND_BACK = SB_ASB` (aggressive, the default), a value
is sent on `wb_*` as soon as it is obtained. When a value that was already
sent fails validation, the buffer does four things:

1. It drops every younger entry.
2. It pulses `recover_valid` with the load's tag.
3. It blocks dispatch for that cycle.
4. It re-executes the load in conventional mode at its real address. The
   load's second write back then carries the correct value.

The core must squash everything younger than `recover_tag` and dispatch it
again. If the wrong value had not been sent yet, the load is only
re-executed. With `SB_CSB` (conservative), values are sent only after
validation, so a miss costs a re-execution but never a recovery.

**Commit.** The head entry may commit when it is ready: a store needs its
address and data, a load must be verified and sent. The core commits with
`commit`. Stores write the cache at commit, in program order. A store does
not commit while an unvalidated load still holds a value forwarded from it.
This rule keeps the forwarding record of that load valid.

## Interface and timing (`smau_top`)

All signals are synchronous to `clk`. The reset `rst_n` is asynchronous and
active low.

| group | signals | timing |
|---|---|---|
| dispatch | `disp_valid, disp_is_store, disp_pc, disp_tag, disp_size` → `disp_ready, disp_idx` | accepted when `disp_valid && disp_ready`; `disp_idx` is the slot the core must use for the address and data of this operation |
| address | `agu_valid, agu_idx, agu_addr` | any time after dispatch, once per entry |
| store data | `std_valid, std_idx, std_data` | any time after dispatch, once per store |
| cache read | `dc_rd_req, dc_rd_addr` → `dc_rd_data` | word-aligned address, data expected on the next cycle |
| cache write | `dc_wr_req, dc_wr_addr, dc_wr_data, dc_wr_mask` | at store commit, data already shifted to its byte lanes |
| send-back | `wb_valid, wb_tag, wb_data` | at most one per cycle, zero-extended load value |
| commit | `head_ready, head_tag`, `commit` | `commit` only while `head_ready` |
| recovery | `recover_valid, recover_tag` | one-cycle pulse; entries younger than the load are already gone |
| status | `pred_ready`, `ev` | `ev` carries one-cycle event pulses (see `umab_events_t`) |

Sizes are encoded as `disp_size` = bytes − 1 (0, 1 or 3). An access must not
cross an aligned 32-bit word. Data is little-endian.

Parameters: `APT_ENTRIES`, `APT_WAYS`, `DPT_ENTRIES`, `DPT_WAYS` (4096/4
each), `UMAB_DEPTH` (16, power of two), `POLICY` (`POL_SDP`), `USE_AP` (1),
`SEND_BACK` (`SB_ASB`).

## What is taken from the source and what was chosen here

These parts follow the published design:

* the 2-stride address predictor with its entry fields and update rule;
* the store-load pair predictor with the fwd bit, the fwd store PC, the
  classify counter and the filter counter, and the PL, DP, CDP and SDP
  policies;
* the AND of the fwd bit with the buffer hit that feeds the bypass logic;
* prediction after dispatch into the UMAB;
* aggressive and conservative send-back;
* 4K-entry 4-way tables;
* SDP with address prediction and aggressive send-back as the main
  configuration.

These were chosen here, because the source does not specify them:

* the counter thresholds and the allocation rule;
* the replacement policy and the PC index/tag split;
* the post-reset clearing sweep;
* the bypass logic's decision table;
* what a filtered load does (conventional scheduling);
* the buffer depth and the one-action-per-cycle structure;
* the byte-lane access model;
* the exact validation rules, including the stale flag and the commit
  interlock for forwarded values;
* recovery by squashing in the buffer;
* all port protocols.

Prediction at the fetch stage, and the prediction validation buffer it
needs, are not implemented. The rest of the core (fetch, decode, reorder
buffer, reservation stations, address generation) and the data cache are
outside the unit. They appear only as ports, and as models in the
testbenches.

The published evaluation is a performance study on SPECint95 traces. No
trace-driven performance model is included here, so the reported speedups
(up to 1.33 over conventional load forwarding) are neither reproduced nor
checked.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_apt`: hand-worked stride sequences, a random comparison against a
  stride model, and a replacement check.
* `tb_sdpt`: counter walks through every threshold under SDP, with DP and
  PL copies alongside, then a random comparison against a counter model.
* `tb_bypass_logic`: exhaustive check of all 16 input combinations.
* `tb_umab` (with `tb/umab_stim.sv`): the buffer alone, once with ASB and
  once with CSB, under random and often wrong predictions and random
  address/data delays. A golden in-order memory model gives the expected
  value of every load. The test checks the last value sent before each load
  commits, every CSB send-back, commit order, the final memory image, and
  that each mechanism occurred.
* `tb_smau_top`: the whole unit at its default parameters. It runs a loop
  program built so the tables learn: a constant store/load pair, a strided
  load, a byte store under a word load, random-address pairs, an independent
  load, and a pair across iterations. It uses the same golden checks and
  requires every mechanism to occur at least once: speculative issue past
  an unsolved store, speculative forwarding, predicted-address reads, normal
  forwarding, filtering, waiting for a pair, address and dependence
  mispredictions, and recovery.
* `tb_policies` (with `tb/smau_run.sv`): the same program under nine
  configurations. These are PL, DP, CDP and SDP, each with and without
  address prediction, all with aggressive send-back, plus SDP with address
  prediction under conservative send-back. Every run gets the full golden
  check, and the cycle count of each is printed. On this loop, address
  prediction under aggressive send-back costs cycles: wrong addresses on the
  random-address loads trigger recoveries. Conservative send-back is the
  fastest configuration. These numbers describe this synthetic program only.

To run one with plain Verilator, for example the full unit:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/smau_pkg.sv rtl/apt.sv rtl/sdpt.sv rtl/bypass_logic.sv rtl/umab.sv \
  rtl/smau_top.sv tb/tb_smau_top.sv --top-module tb_smau_top -o sim
./obj_dir/sim
```

For the buffer alone, use `rtl/smau_pkg.sv rtl/umab.sv tb/umab_stim.sv
tb/tb_umab.sv --top-module tb_umab`. All testbenches finish in seconds.

Synthesis note: the tables are written as plain arrays with asynchronous
reads. A generic synthesis flow keeps them as memories. A real
implementation would map them onto SRAM macros, which usually means
registering the lookup and adding a pipeline stage at dispatch.
