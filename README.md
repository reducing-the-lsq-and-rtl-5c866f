# Filtering load/store-queue searches and L1 data-cache reads

In an out-of-order core every issuing load normally searches the store queue
(SQ) associatively for an older store to the same address. Every issuing store
searches the load queue (LQ) for younger loads that already ran. Every load also
reads the L1 data cache (DL1), even when a store in flight will supply the data
anyway. Most of these searches and reads find nothing useful, and each one costs
dynamic energy.

This RTL adds small structures beside the queues and the cache that prove,
cheaply and ahead of time, that a search can be skipped. A second set of
structures predicts that a cache read will not be needed. There are two
independent mechanisms:

* **LSQ filtering.** A handful of age registers and counters decide whether each
  issuing memory instruction needs:
  * the full associative SQ search;
  * a cheaper SQ scan that compares no addresses;
  * no SQ search at all.

  The same registers decide whether the load-store alias predictor (LSAP) and
  the LQ are searched. This filtering is exact: a search is only skipped when it
  could not have found anything.
* **DL1 filtering.** A forwarding predictor marks loads that will probably get
  their data from an in-flight store. These loads skip the cache read. A wrong
  guess costs one cycle: the read is issued on the next cycle.

The target machine is an x86-64 core with 16 architectural registers. Register
spills make store-to-load forwarding common, so many cache reads can be skipped.

## Ages

Every instruction carries an 8-bit age. Ages are handed out consecutively in
program order and wrap around. `lsq_filter_pkg::age_older(a, b)` takes the sign
bit of `a - b`. This is correct while the two ages are less than 128 apart,
which holds for any two instructions inside a 128-entry reorder buffer.

An age register that still holds the age of a long-committed instruction can
compare the wrong way once the counter has wrapped. Every filter is built so
that such an error only causes an unneeded search, never a missed one.

## Store-queue filtering (the hybrid filter)

Four pieces of state feed the decision in `hybrid_sq_filter`:

| state | module | contents | updated |
|---|---|---|---|
| OFS | `ofs_reg` | age of the oldest in-flight store, plus a valid bit | at store commit, it takes the age of the store in the next SQ entry; a store dispatched into an empty SQ sets it |
| PAS | `pas_counter` | number of in-flight stores whose address is still unknown | +1 at store dispatch, −1 at store issue |
| SQ Bloom filter | `counting_bloom_filter` (128 × 6 bit, exact) | per address group: number of in-flight stores whose address is known | +1 at store issue, −1 at store commit |
| LSAP | `lsap` (16 entries) | load PCs that have aliased an older store before | written when the LQ reports an ordering violation |

The decision runs in two stages.

**Stage 1: timing.**
* A load older than OFS has no older store in flight.
* A store whose age equals OFS is itself the oldest store.
* If OFS is not valid, no store is in flight at all.

In any of these cases nothing is read: no Bloom filter, no LSAP, no SQ.
`timing_filtered` is raised. Reading OFS is only an 8-bit comparison, far
cheaper than a Bloom-filter read.

**Stage 2: address.** The Bloom-filter entry of the instruction's address
counts the resolved in-flight stores to that address group. PAS says whether any
store could still turn out to match.

| instruction | BF entry | pending stores | LSAP | SQ action |
|---|---|---|---|---|
| load | > 0 | any | any | `SQ_FULL`: associative search |
| load | 0 | none | not read | `SQ_SKIP` |
| load | 0 | some | no alias | `SQ_SKIP` |
| load | 0 | some | alias | `SQ_UNRESOLVED`: find the closest older unresolved store, no address compare |
| store | > 0 | any | – | `SQ_FULL` (store-store check) |
| store | 0 | none besides itself | – | `SQ_SKIP` |
| store | 0 | others | – | `SQ_UNRESOLVED` |

The LSAP is read only by loads that pass stage 1 while PAS is non-zero. When
every store is resolved there is nothing left to predict.

The Bloom filter alone cannot be trusted. It only knows about stores whose
address has been computed, and PAS covers the rest. That is why the two are
combined.

An issuing store is still counted in PAS during its own issue cycle. For stores,
"no pending stores" therefore means PAS ≤ 1. Without this reading the store rule
could never apply.

The Bloom filter is updated by every issuing store, including those whose lookup
stage 1 removed. Only its read is gated, because the counts must stay exact for
the filter to be safe.

## Load-queue filtering (`multi_yla`)

Sixteen registers each hold the age of the youngest load issued so far in one
address group. The group is word-address bits [6:3].

An issuing store compares its age with the register of its group. The store
searches the LQ only if that register is younger, meaning a younger load to a
possibly equal address has already executed. Otherwise `lq_search` stays low.
A group in which no load has issued since the last flush never searches.

## DL1 filtering

`fwd_predictor` combines two predictors and calls a load *predicted-dependent*
only if both agree.

* **Address half.** A 64-entry saturating counting Bloom filter. Every load and
  store increments its entry at issue and decrements it at commit. A load reads
  its entry before its own increment; a non-zero entry means some other
  in-flight memory instruction uses a nearby address.
* **PC half.** `bimodal_fwd_pred` is a 256-entry table of 2-bit counters indexed
  by PC[7:0]. Each load trains it with whether it was actually forwarded.

The two tables take 64×4 + 256×2 bits, which is 96 bytes.

`dl1_access_ctrl` turns the prediction into cache traffic:

* **Predicted-independent load.** `dl1_req` goes high in the issue cycle, in
  parallel with the SQ search. If the SQ forwards anyway, the read was wasted
  (`ev_dl1_wasted`).
* **Predicted-dependent, forwarded.** The load is served by the SQ or the cached
  LQ. The cache is never read (`ev_dl1_avoided`).
* **Predicted-dependent, not forwarded.** `dl1_late_req` goes high exactly one
  cycle later with the same address (`ev_dl1_late`). This late port is separate
  from `dl1_req`, so it can coincide with a new load's request.

The forwarding outcome is `ld_fwd_hit`. It is set by any of these sources, in
this priority order:

1. an in-flight store (from the full SQ search);
2. a committed store still held in the SQ (see below);
3. the `clq_fwd_hit` input from the cached load queue.

Every load searches the committed stores, whatever its prediction, just as
every load reads the cached load queue. This holds even when the LSQ filter
removed the load's search of in-flight stores, because that filter only proves
that no *in-flight* store matches. Because every load makes this search, the
predictor is trained with the load's true forwarding outcome.

## Store queue (`store_queue`)

This is a 32-entry circular buffer.

* A store takes the tail entry at dispatch and returns its index (`disp_sq_idx`).
* It becomes *resolved* when it issues with its address and data.
* It leaves from the head at commit.

The searches are combinational on the state before the clock edge. The youngest
older entry is found by the smallest age distance to the searcher.

* `SQ_FULL` returns the youngest older resolved store to the same 8-byte word,
  with its data and age. It also returns the youngest older unresolved store.
* `SQ_UNRESOLVED` returns only the youngest older unresolved store.

The head address feeds the Bloom-filter decrement. The head+1 entry feeds OFS.

**Committed stores are kept.** When a store commits, its entry is marked
*cached* and keeps its address and data until a new store is allocated into it.
The free part of the ring therefore always holds the most recently committed
stores, oldest at the tail and youngest just behind the head.

With `srch_cached` set, the queue also returns the youngest cached store to the
same word (`cached_hit`, `cached_data`). That is the matching entry closest
behind the head. Loads can then be forwarded from stores that already left the
pipeline, which raises the share of loads that need no DL1 read.

A flush moves the tail back to the head. That drops the in-flight entries and
keeps the cached ones.

The queue is otherwise deliberately plain: no partial-word overlap and no byte
merging.

## Top level (`lsq_dl1_filter_top`)

Each cycle the top accepts one store dispatch, one load or store issue and one
commit. Inputs:

* `disp_st_*`: a store is dispatched.
* `iss_*`: a load or store issues. It carries age, address, PC, store data and,
  for a store, the SQ index it got at dispatch.
* `cmt_*`: the oldest instruction commits. A load supplies its address; a
  store's address comes from the SQ.
* `lsap_train_*`: a load PC that violated memory ordering, reported by the LQ.
* `clq_fwd_*`: a forwarding result from the cached load queue.
* `flush`: every in-flight instruction is discarded. The in-flight SQ entries,
  PAS, OFS, YLA registers, both Bloom filters and a pending late DL1 request
  are cleared. Committed stores held in the SQ, the LSAP and the bimodal table
  are kept.

All outputs for the issuing instruction are combinational in its issue cycle:

* `lq_search`;
* `sq_action`, `sq_bf_access`, `lsap_access`, `timing_filtered`;
* the search results;
* `csq_fwd_hit`, raised when the load was forwarded from a committed store;
* `pred_dep`, `dl1_req`.

`dl1_late_req` is registered. State changes on the rising edge. Reset
(`rst_n`) is synchronous and active low.

Three structures are **not** part of this RTL; the top has ports in their place:

* **Load queue.** The top raises `lq_search` and accepts violation reports.
* **Cached load queue**, the committed-load half of the cached LSQ. The top
  accepts its hit and data. The committed-store half is in `store_queue`.
* **DL1 cache.** The top drives two request ports.

Default sizes:

| parameter | default | origin |
|---|---|---|
| `SQ_DEPTH` | 32 | target machine |
| `LSAP_ENTRIES` | 16 | target machine |
| `FWD_BF_ENTRIES` | 64 | evaluated configuration |
| `FWD_BIM_ENTRIES` | 256 | evaluated configuration |
| `YLA_GROUPS` | 16 | chosen |
| `SQ_BF_ENTRIES` | 128 | chosen |

The LSQ filter state (YLA registers, OFS, PAS, SQ Bloom filter) totals 927 bits.
That is within a 1 kbit budget. Larger bimodal tables (512 to 2048 entries) are
a parameter change.

## Choices made here, not by the method

* **Ages:** 8-bit wrapping ages.
* **Hashes:** low word-address bits, for both Bloom filters and the YLA groups.
* **Multi-YLA:** 16 registers.
* **SQ Bloom filter:** 128 entries.
* **Forwarding Bloom filter:** 4-bit saturating counters.
* **Bimodal table:** indexed by PC[7:0], counters reset to weakly "not
  forwarded", trained at issue.
* **LSAP:** full-PC tags, FIFO replacement, trained from LQ violation reports.
* **Bandwidth:** one issue, one dispatch and one commit per cycle. The target
  machine issues up to four instructions per cycle, with two load and two store
  units.
* **Recovery:** flushing everything is the only recovery. There is no partial
  squash.
* **Stores and PAS:** for stores, PAS ≤ 1 counts as "no pending stores", as
  explained above.
* **Committed stores:** they are kept in free SQ entries and reused oldest
  first. Every load searches them.
* **Bimodal timing:** the prediction is formed at issue for both halves, although
  the PC half could be read at decode.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares the module against an independent reference model in the testbench and
ends with one `TB_RESULT checks=N failures=M` line.

`tb_lsq_dl1_filter_top` runs the whole design at its default sizes for 30,000
cycles. The testbench acts as the core:
* it dispatches loads and stores in program order;
* it issues them partly out of order;
* it commits in order;
* it flushes every 997 cycles;
* it alternates busy phases with quiet phases in which the queues drain.

On every issue the testbench checks:

* A skipped search never hides a forwarding store or a premature load.
* A made search returns the right store, data and age.
* OFS and PAS match the in-flight stores.
* DL1 requests appear in the issue cycle, or exactly one cycle later.

It then counts every filter outcome and DL1 event and fails if any of them never
occurred. These include:
* each stage-1 and stage-2 outcome for loads and stores;
* LSAP reads, alias predictions and training;
* LQ searches made and filtered;
* forwarding from in-flight stores, from committed stores and from the cached
  LQ;
* avoided, late, wasted and parallel DL1 reads;
* flushes and a full SQ.

`tb_fwd_pred_sizes` runs four copies of the top side by side, with bimodal
tables of 256, 512, 1024 and 2048 entries, on one instruction stream of 1024
load PCs. A third of these PCs reload a recently stored word. The testbench
checks the DL1 request rules for every copy and prints the share of DL1 reads
avoided and delayed. In this synthetic stream:

| bimodal entries | DL1 reads avoided | reads delayed |
|---|---|---|
| 256 | 11% | 6% |
| 1024 | 31% | 0% |

The 256-entry table aliases four PCs per entry; the 1024-entry table has no
aliasing. These numbers describe the stream, not real programs.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/lsq_filter_pkg.sv tb/tb_lsq_dl1_filter_top.sv \
    --top-module tb_lsq_dl1_filter_top -o sim
./obj_dir/sim
```

The simulator has only two states, so every register that is read is reset.
Concurrent assertions check:
* no SQ overflow;
* a commit only from a resolved head entry;
* no PAS underflow;
* no over- or underflow of the exact Bloom filter.

## Limits

* The filters' safety has been checked only against the testbenches' reference
  models. It has not been checked against a real core.
* Energy savings and performance are not modelled.
* The load queue, the cached load queue and the DL1 are outside this RTL.
