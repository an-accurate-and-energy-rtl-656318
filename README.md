# Way determination by early tag matching — an instruction fetch front end

A set-associative instruction cache usually reads every tag way and every
data way of a set in the same cycle and then throws all but one data way
away. For a 4-way cache that is three wasted data-array reads per fetch.
Way *prediction* tries to guess the way in advance, but a wrong guess costs
a second access of all ways and extra cycles.

This front end *determines* the way instead of predicting it. The fetch is
split into three pipeline stages:

| stage | what happens | arrays read |
|-------|--------------|-------------|
| **BP** – branch prediction | the gshare PHT and the BTB give the next fetch address | PHT, BTB |
| **TL** – tag lookup | all tag ways of the set are read and compared: the result is the one way holding the line, or a miss | all 4 tag ways |
| **F** – fetch | only the data sub-bank of the determined way is read; on a miss none is | 1 data way (or 0) |

Since the tag compare is done before the data access, the chosen way is
always right: there is no way misprediction and no re-access of all ways.
The price is one more pipeline stage between branch prediction and the data
array. The design hides that stage on a branch direction misprediction (the
correct address is already known, so its tag lookup overlaps the branch's
address generation) and pays one cycle only when a branch *target* was
mispredicted.

The RTL is written at the configuration the technique was evaluated with:
16 KB 4-way instruction cache, 32-byte lines, one 4 KB sub-bank per way, a
4K-entry gshare predictor, a 1024-entry 4-way BTB, four 32-bit instructions
per fetch.

## Files

| file | module | role |
|------|--------|------|
| `rtl/wd_pkg.sv` | package | widths, prediction record `bp_info_t` |
| `rtl/wd_frontend.sv` | `wd_frontend` (top) | the BP/TL/F pipeline, redirects, stalls |
| `rtl/gshare_pht.sv` | `gshare_pht` | direction predictor |
| `rtl/btb.sv` | `btb` | branch target buffer |
| `rtl/itag_array.sv` | `itag_array` | tag arrays + comparators (the way determination) |
| `rtl/idata_bank.sv` | `idata_bank` | one data way (4 KB sub-bank), four instantiated |
| `rtl/icache_refill.sv` | `icache_refill` | miss controller |
| `tb/l2_model.sv` | `l2_model` | behavioural next cache level, 12-cycle latency (testbench only) |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_wd_frontend_rate` |

## The pipeline in detail

Addresses are 32 bits. A *fetch block* is an aligned 16-byte group of four
instructions; a 32-byte line holds two. The fetch address may point into a
block (after a jump), in which case the slots before it are masked.

**BP.** The PC register holds the address being predicted. The PHT is
indexed by `pc[15:4] XOR history`; the BTB by `pc[11:4]` with tag
`pc[31:12]`. A BTB entry describes the taken branch of one fetch block: its
slot, its target and whether it is unconditional. If the entry's slot is at
or after the fetch address's slot and the branch is unconditional or the PHT
says taken, the next address is the BTB target; otherwise it is the next
block. The prediction (`bp_info_t`) travels with the block to the back end,
which returns the PHT index when it trains the predictor.

**TL.** `itag_array` reads the valid bit and the 20-bit tag of all four
ways of set `pc[11:5]` and compares them with `pc[31:12]` in the same cycle.
On a hit the one-hot way is registered into F and, at the same clock edge,
only that way's `idata_bank` is enabled (`data_way_en`). On a miss no data
bank is enabled; `icache_refill` takes the address and the victim way (first
invalid way, else a per-set round-robin pointer). The TL stage, and the BP
stage behind it, hold until the line has been written, and the lookup is
then repeated and hits. The lookup is only performed when F can take the
block, so a stalled block does not read the tags again and again.

**F.** The data bank read is synchronous: the bank enabled at the end of
TL presents the 16-byte block in F. If decode is not ready the F register
and the bank output both hold; the array is not read again.

Steady state: one block per cycle; a block predicted in cycle *c* is
looked up in *c+1* and offered on `fetch_valid` in *c+2*.

## Redirects: why the extra stage costs (almost) nothing

A deeper front end normally means a longer branch misprediction penalty.
Here the back end raises `redir_valid` with `redir_pc` in the cycle it
resolves a mispredicted branch, and says with `redir_target` what kind of
misprediction it was:

* **Direction misprediction** (`redir_target = 0`): the address of the other
  path is already known — the fall-through of a predicted-taken branch, or
  the BTB target of a predicted-not-taken one (every block carries its BTB
  target in `fetch_bp`). It enters BP in the redirect cycle, so its tag
  lookup runs in the next cycle, in parallel with the branch's
  effective-address generation, and its data read comes right after that —
  the cycle in which a cache without the TL stage would be read too. The
  first block is offered two cycles after the redirect.
* **Target misprediction** (`redir_target = 1`, including a taken branch that
  missed in the BTB): the correct address is the result of the address
  generation and is not available early. It is registered and enters BP one
  cycle later; the first block is offered three cycles after the redirect.
  This one cycle is the only penalty the TL stage adds.

In both cases the new path then streams at one block per cycle without
gaps, because each restart goes through BP first and keeps BP one stage
ahead of TL.

A redirect flushes everything younger, including a block being offered in
the same cycle (`fetch_valid` is gated by `redir_valid`). A refill already in
flight is completed (the line is useful anyway); lookups wait for it.

## Interfaces of `wd_frontend`

* fetch: `fetch_valid`/`fetch_ready`, `fetch_pc`, `fetch_insns[3:0]`,
  `fetch_mask` (slots from the fetch address to a predicted-taken branch),
  `fetch_bp`.
* redirect: `redir_valid`, `redir_target`, `redir_pc` (one cycle pulse).
* training: `upd_valid`, `upd_pc`, `upd_cond`, `upd_taken`, `upd_slot`,
  `upd_target`, `upd_pht_idx`. Conditional branches train the PHT and shift
  the global history; taken branches write the BTB.
* refill: `l2_req_valid`/`l2_req_ready`, `l2_req_addr` (line aligned), then
  `l2_resp_valid` with `l2_resp_line` (256 bits) for one cycle.
* activity: `tag_lookup_en` (all four tag ways read) and `data_way_en`
  (data ways read; never more than one). These are the signals an energy
  estimate needs. An assertion checks that at most one data way is read and
  never on a miss.

Reset (`rst_n`, asynchronous, active low) clears the valid bits of the tag
array and BTB, makes every PHT counter read as weakly not-taken (the
counters themselves are a plain memory; a per-entry flag records which have
been trained since reset) and starts fetching at `RESET_PC`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ICACHE_BYTES` | 16384 | instruction cache size |
| `WAYS` | 4 | cache associativity (one data sub-bank per way) |
| `LINE_BYTES` | 32 | line size |
| `PHT_ENTRIES` | 4096 | gshare counters (the history length is log2 of this); must equal 2^`PHT_IDX_W` of `wd_pkg` |
| `BTB_ENTRIES`, `BTB_WAYS` | 1024, 4 | BTB size and associativity |
| `RESET_PC` | `32'h1000` | first fetch address |

The fetch width (four 32-bit instructions) is fixed in `wd_pkg`.

## What is taken from the technique and what is this design's own

Taken from the published technique: the BP → TL → F stage order, all tag
ways read in TL, exactly one data way read in F, no data read on a miss, a
direction misprediction with no added penalty (its tag lookup overlaps the
branch's address generation), a target misprediction with one added cycle,
and all sizes above.

Choices made here, where the technique says nothing: 32-bit addresses and
instructions, the BTB entry format, gshare details (2-bit counters,
non-speculative history), round-robin replacement in the BTB and the cache,
one outstanding miss with a valid/ready refill port, the valid/ready fetch
port, the reset behaviour, the cycle-level timing of the redirect port,
and the synchronous data bank read. Address translation
(the instruction TLB of the evaluated processor) and the next cache level
are not part of the RTL; the refill port stands in for both.

The comparison designs (a conventional cache reading all ways, history-based
way prediction) are not included.

## Verification

Each module has a self-checking testbench; each prints
`TB_RESULT checks=N failures=M`. With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wd_pkg.sv rtl/*.sv \
    tb/l2_model.sv tb/tb_wd_frontend.sv --top-module tb_wd_frontend
./obj_dir/Vtb_wd_frontend
```

The unit testbenches compare against reference models written in the
testbench (counter table, BTB sets, tag sets with the replacement rule,
line contents, refill timing).

`tb_wd_frontend` runs the top at its default sizes. It acts as the back end
of a processor running a synthetic program of six copies of one code region,
16 KB apart, so that six lines compete for each four-way set. The program
has a counted loop, a jump into the middle of a block, an alternating
branch and a jump whose target alternates. The testbench follows the true
path, checks every delivered block (address, four instruction words, slot
mask), trains the predictors, and redirects fetch three cycles after each
wrong prediction. It checks that a direction redirect delivers two cycles
later and a target redirect three cycles later (when no refill is in
flight), that the following block is already in tag lookup by then,
that every tag lookup either reads exactly one data way or starts a refill,
and that hits, misses, evictions, both redirect kinds, back-pressure,
predicted-taken branches and mid-block entries all occur. It reports the
array energy with per-access energies of 28.10 pJ (4-way tag read),
14.51 pJ (1-way data read) and 35.55 pJ (4-way data read) against a cache
that reads all data ways on each access. On this program, with many
conflict misses, the ratio comes out at about 0.63. A miss costs only a tag
read here, but the lookup is repeated after the refill.

`tb_wd_frontend_rate` runs a 256-byte loop that fits in the cache. After
the cold misses and the first misprediction of the closing jump, it checks
over 2000 cycles that a block (four instructions) is delivered every cycle,
and that each cycle reads the four tag ways once and exactly one data way.
The array energy per block is then 42.61 pJ against 63.65 pJ for reading all
data ways, a ratio of 0.669. Published results for this technique report a
larger saving on whole programs (about 55 % against a cache that reads all
ways); those totals were accumulated by an architectural simulator with its
own accounting and are not reproduced by these per-access counts.

## Limits

* Only one miss can be outstanding, and a miss stalls the front end; there
  is no prefetch and no fetch buffer.
* The timing of the recovery after a misprediction is modelled at the
  interface: the back end says which kind of misprediction it was and when
  the correct address is available.
* The energy numbers are array-access counts times per-access energies; no
  circuit-level model is included.
