# PHAST: a path-aware store-distance memory dependence predictor in SystemVerilog

An out-of-order core wants to run loads before older stores whose addresses
are still unknown. If such a load reads a location one of those stores
writes, the load got stale data and must be squashed. A memory dependence
predictor decides, for each load, whether to let it run ahead or make it
wait for a particular store.

This RTL implements PHAST (PatH-Aware STore distance), the predictor
proposed by S. S. Kim and A. Ros in "Effective Context-Sensitive Memory
Dependence Prediction". It rests on two ideas:

* **One store per load.** A load depends on at most one store: the
  youngest older store that writes its location. So a prediction is a
  single **store distance**: the number of stores between that store and
  the load (0 means the youngest older store).
* **Only the path from that store to the load.** Whether the dependence
  happens depends on the control-flow path. That path is given by the
  *divergent* branches (conditional and indirect) from the store to the
  load, plus the branch just before the store. Suppose N divergent branches
  lie between store and load. PHAST trains with exactly N+1 branches of
  history. Shorter histories give false dependences. Longer ones spread one
  dependence over many table entries.

The predictor looks like TAGE. It has eight tagged tables, one for each
history length (0, 2, 4, 6, 8, 12, 16 and 32 branches), and all eight are
searched for every load. The difference from TAGE is training. A
misprediction does not move the entry to ever longer histories. A
dependence is written straight into the table whose length fits its
store-to-load path.

## The path history

Each divergent branch leaves a 7-bit history entry
`{indirect, taken, dest[4:0]}` (`phast_pkg::hist_entry_t`). `dest` holds the
5 low bits of the address the branch actually went to. Two copies of the
history are kept:

* `branch_history` is the **decode-side** copy. It is a 1024-slot circular
  buffer, written at the slot given by a running divergent-branch counter.
  Every decoded load and store copies the counter (`br_count`). The
  difference between a load's copy and a store's copy is N, the number of
  divergent branches between them. After a branch misprediction the core
  rewinds the counter to that branch's slot (`rec_*`), optionally
  rewriting the slot with the correct outcome. Entries older than that
  slot are untouched, so no checkpoints are needed. This holds while fewer
  than 992 branches are in flight. The 10-bit counter covers the 512-entry
  ROB of the target core, plus a wrap bit.
* `commit_history` is the **commit-side** copy: a shift register of the 32
  most recently committed divergent branches. Loads commit in order. So
  when a load commits, this register holds exactly the branches that
  precede it. Training reads the history here.

### From history to index and tag (`phast_hash`)

The table of length L looks at the L youngest branches, slot 0 being the
youngest.

* A conditional branch contributes its type and taken bit. Its destination
  bits are zeroed.
* An indirect branch contributes its destination as well.
* The oldest branch of the L always contributes its destination, even if
  it is conditional. For a dependence whose length is exactly L, that
  branch is the one before the store. Its destination tells apart two
  paths that reach the load through the same branches but from different
  places.

The L 7-bit slots are concatenated and XOR-folded, 23 bits at a time, into
S+T = 7+16 bits. The load PC is hashed as `PC ^ PC>>2 ^ PC>>5` for the
index and `PC ^ PC>>3 ^ PC>>7` for the tag. The low 7 folded bits are XORed
into the index and the upper 16 into the tag. Lookup and training use the
same function, so a dependence learnt at commit is found at decode.

## Tables and prediction

`phast_table` is 128 sets x 4 ways. Each entry is
`{tag[15:0], sdist[6:0], conf[3:0], lru[1:0]}`, 29 bits.
Eight tables x 512 entries x 29 bits = 14.5 KB. An entry with zero
confidence does not predict and counts as empty. The tags and distances of
a set are one word of a memory. Lookups read it through a register;
updates do a read-modify-write within one cycle. Confidence and LRU bits
are kept in registers, so reset empties the table.

`phast_predictor` hashes the load for all eight lengths and reads the eight
tables in parallel. Among the tables that hold the tag with non-zero
confidence, the longest history wins. Its distance is the prediction, and
its table, set and tag are returned as the *provider*. If no table matches,
the load is predicted independent.

Timing: a request in cycle t (`lk_valid`, `lk_pc`, `lk_id`) is answered in
cycle t+2 (`pr_valid`, `pr_id`, `pr_hit`, `pr_dist`, `pr_provider`). One
request is accepted per cycle. The load does not need the answer before it
reaches the issue queue, so the two cycles cost nothing.

## Making the load wait (`dep_propagate`)

The prediction reaches the load queue (LQ) when the load is allocated
there. The store to wait for is then

    wait_sq_idx = (index of the youngest store in the SQ - distance) mod 114

That store-queue (SQ) index is the tag the load waits on in the scheduler.
If the distance is at least the number of stores still in the SQ, the
store has already left and the load does not wait.

## Detecting the real dependence (`lq_violation_tracker`)

When a store computes its address, it searches the LQ for younger loads
that have already executed and read overlapping bytes. Such a match is a
memory-order violation. Violations are squashed lazily, at commit, and two
rules decide what the load records:

1. **Forwarding filter.** A load that got its data forwarded from a store
   keeps that store's sequence number. A store older than the forwarder
   cannot have produced the load's value, so its match is ignored. Example:
   the load was forwarded by the younger of two same-address stores, and
   the older one resolves later. Without this filter the load would be
   squashed needlessly and PHAST would learn a wrong, older store.
2. **Youngest violator.** A load can be hit by several stores before it
   commits. Only the youngest conflicting store is kept, because that is
   the store it depends on.

Each entry holds only what PHAST needs:
* the load's sequence number, word address and byte mask;
* the forwarding store;
* the recorded violator: its sequence number, branch-counter copy and SQ
  index.

Two store searches per cycle are supported, one for each store execution
port. The `ev_*` outputs report new violations, filtered matches and
replaced violators.

## Training at commit (`phast_trainer`)

When a load commits, the trainer looks at its LQ record.

* **Violated.** The load is squashed (`cm_squash`) and PHAST allocates an
  entry for it:
  * history length `L = load_brcnt - store_brcnt + 1`. L is truncated to
    the longest table length not above it: 9 to 11 use the length-8 table,
    anything above 32 uses the length-32 table.
  * store distance `= (SQ index of the youngest store older than the load -
    SQ index of the violator) mod 114`.
  * index and tag from the load PC and the commit-side history.

  The allocation overwrites an entry with the same tag, if there is one.
  Otherwise it takes an empty way, or failing that the least recently used
  way. It sets the confidence to 15.
* **Not violated, but predicted.** The providing entry's confidence is
  updated. If the load was forwarded by the store it waited for, the
  confidence goes back to 15. Otherwise (a false dependence) it is
  decremented. An entry whose confidence reaches 0 stops predicting.

The command reaches the tables one cycle after the commit.

Training at commit rather than at detection matters for PHAST. By commit,
all older stores have executed. The recorded violator is then the right
store, and the path is one that actually executed.

## Connecting it to a core (`phast_top`)

`phast_top` contains no load or store queues of the core, and no
scheduler. Its ports are the core's side of each connection:

| group | direction | when |
|---|---|---|
| `br_*`, `rec_*`, `br_count` | in / out | a divergent branch is decoded; recovery from a mispredicted branch |
| `lk_*` → `pr_*` | in → out (+2 cycles) | a load is decoded |
| `la_*` | in → out (combinational) | the load is allocated in the LQ; the core supplies the prediction it kept |
| `al_*`, `ex_*`, `st_*`, `fl_*` | in | LQ allocation, load execution (with forwarding source), store address searches, flush of younger loads |
| `cb_*` | in | a divergent branch commits |
| `cm_*` → `cm_squash` | in → out (combinational) | a load commits, with its prediction, provider and SQ indices |
| `up_*` | out | the training command, for observation |

The core carries each load's prediction, provider and waited-on SQ index
from decode to commit. A divergent branch older than a load must reach
`cb_*` in an earlier cycle than the load reaches `cm_*`.

## What comes from the proposal and what is chosen here

These parts follow the proposal:
* the 8 tables with lengths 0 to 32 and their geometry (4-way, 128 sets,
  16/7/4/2-bit fields);
* the N+1 path length and the truncation rule;
* the history content (outcome bit, indirect destination, destination of
  the branch before the store, 5 destination bits);
* the PC hashes and the fold to S+T bits;
* the longest-match selection;
* the confidence policy;
* training at commit with lazy squash;
* the forwarding filter;
* the SQ-index arithmetic for distances.

These are this implementation's choices:

* **Fold function.** History is folded by XORing consecutive 23-bit
  chunks. Each branch takes a fixed 7-bit slot.
* **Truncated lengths.** When a path is truncated, the oldest branch kept
  (rather than the branch before the store) contributes its destination.
  This keeps lookup and training consistent.
* **Recovery.** The decode history recovers by rewinding a pointer into a
  1024-slot buffer.
* **Throughput.** One divergent branch is decoded per cycle, and there is
  one prediction and one update per cycle. One load and one branch commit
  per cycle, although the target core commits up to 12 instructions per
  cycle. A wider core would need more ports or a queue in front of the
  trainer.
* **Latency.** A prediction takes 2 cycles. An update is applied one cycle
  after commit.
* **Replacement and LRU.** A victim is chosen as: same tag, then an empty
  way, then LRU. LRU ages move only on updates, not on speculative
  lookups.
* **Confidence.** "Waited for the correct store" means "forwarded by the
  predicted store". A violated load allocates, but does not also decrement
  the entry that mispredicted it.
* **Widths.** PC is 64 bits, sequence numbers 16 bits, addresses are
  compared as 8-byte words with byte masks.
* **Reset.** All table entries and histories are cleared.

Not included:
* the core itself;
* the unlimited-storage variant of PHAST, which is an analysis model and
  not hardware;
* reading the training history at decode instead of commit, which the
  proposal mentions as an alternative.

The 7.25 KB budget point corresponds to `phast_top #(.SETS(64))`, and
`phast_top_half_tb` runs the end-to-end script on it. How the proposal
halves the budget is not stated.

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each
one prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/phast_pkg.sv rtl/phast_top.sv tb/phast_top_tb.sv \
        --top-module phast_top_tb
    ./obj_dir/Vphast_top_tb

The same pattern works for any block: put the package first, then the
module, then its testbench.

* `phast_top_tb` runs the whole subsystem at its default size. It replays
  a script of store / branch / load sequences through a small model of the
  core, and checks each prediction, the waited-on SQ slot, each squash and
  each training command. It counts that every mechanism happened:
  * violation squash, allocation and predicted wait;
  * confidence reset and decrement;
  * forwarding filter and youngest-violator replacement;
  * truncation, including a 41-branch path;
  * longest-history selection over a shorter match;
  * LRU eviction and history recovery.

  It runs in well under a second.
* The unit testbenches compare against independent reference models:
  * `phast_hash_tb`: a bit-string fold, plus path properties;
  * `phast_table_tb`: directed tests of allocation, confidence and LRU;
  * `phast_predictor_tb`: longest match, fallback and latency;
  * `phast_trainer_tb`: random commits against the training rules;
  * `lq_violation_tracker_tb`: the four two-store cases of a load, plus a
    random reference;
  * `dep_propagate_tb`, `branch_history_tb` and `commit_history_tb`:
    queue models.

## Changing it

* Table geometry and history lengths are in `rtl/phast_pkg.sv`. `HIST_LEN`
  must stay ascending, with at most `MAX_HIST` entries.
* The number of sets is the `SETS` parameter of `phast_top`.
* LQ and SQ sizes (`LQ_ENTRIES`, `SQ_ENTRIES`) and the number of store
  search ports (`ST_PORTS`) are parameters of `phast_top`.
* `BRCNT_BITS` must cover the divergent branches in flight plus a wrap
  bit.
