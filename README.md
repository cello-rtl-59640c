# CELLO load/store queue: cheaper load->load ordering in data-race-free code

An out-of-order core that implements TSO lets loads run ahead of older loads.
It must then catch any case where another thread could see the reordering.
The usual way is an associative search of the load queue (LQ):

- every invalidation and every eviction searches it;
- in an SMT core, every store write to L1 also searches it, because the
  thread running next to the writer gets no invalidation;
- every store searches it once more when it resolves its address, to find
  younger loads that read the same word too early.

These searches cost a lot of energy and contend for a few search ports. A
load must also stay in the LQ until it commits, in case a search hits it.
That is why LQs have grown to around 200 entries.

Most of a parallel program is data-race free (DRF): between synchronization
points, no other thread writes what a thread reads. A load in such a region
cannot expose a reordering, and a store in such a region cannot reveal one.
In this design, a compiler marks the program with a `setDRF 1` instruction
where a DRF region begins and `setDRF 0` where a synchronization ("sync")
region begins. The hardware uses the marks in two ways:

1. **It skips M-searches that cannot find anything.** M-searches are the
   searches from store writes and from the memory system.
2. **It lets a DRF load leave the LQ before it commits.** This happens once no
   older store of its thread is still unresolved.

Code with no marks runs entirely in sync mode and behaves as a plain TSO
core. The RTL here is the load/store queue of one 2-way SMT core with these
additions. It does not include the rest of the core, the caches or the
compiler.

## Regions, the region flag and the Mode bit

Each hardware thread has a one-bit **region flag** (`region_flags`). The flag
is 0 (sync) after reset. It changes when a `setDRF` is *allocated*, not when it
executes. Allocation is in program order, so every later load and store sees
the right region. Each load and store copies the flag into a **Mode** bit in
its LQ or SQ entry (1 = DRF, 0 = sync). DRF and sync operations of one thread
can sit in the queues at the same time.

Three other events change the flag:

- **Squash.** The flag takes the Mode of the oldest squashed instruction. That
  is the region in force when that instruction was allocated, so it undoes any
  squashed `setDRF`. The core supplies this Mode (`sq_mode_i`).
- **Context switch.** The OS saves the flag with the other thread flags
  (`region_flag_o`). It writes the flag back on restore (`ctx_wr_*`).
- **Debug mode.** With `drf_enable_i = 0`, every Mode is forced to sync. The
  core then behaves exactly like the baseline TSO design. This is meant for
  debugging racy code.

This design assumes that a `setDRF` can only start an allocation group, so one
group has one Mode. The group's Mode is visible on `al_mode_o` in the same
cycle.

## The num-sync counters

Each thread has an 8-bit counter of the sync loads it holds in the LQ
(`num_sync_counter`). Up to three loads can enter and several can leave in
one cycle, so the counter adds and subtracts counts rather than stepping
by 1. Loads leave in four ways: commit, early removal, and squash of one load
or of a whole range. The LQ partition works out how many sync loads enter
and leave each cycle. Assertions check that the counter never wraps.

## The two filters

`drf_filter` is combinational. It decides whether an M-search is needed.

| Event | Searched when | Threads searched |
|---|---|---|
| committed store writes to L1 | store Mode is sync **and** some *other* thread's num-sync is non-zero | all except the writer |
| invalidation or eviction | some thread's num-sync is non-zero | all |

- **Store-DRF filter.** A DRF store has no racing reader, so its write needs no
  search of this core's LQ.
- **Load-DRF filter.** A thread with no sync loads in the LQ holds only DRF
  loads, and those cannot be M-speculative.
- **Thread mask.** A store write is searched only against the other threads.
  The writer's own loads are ordered by the D-search.

Invalidations are not filtered by the Mode of the remote store that caused
them. A DRF store on another core may still leave this core unable to see a
later sync store to the same line. Only the load-DRF filter applies to them.

## Search ports

The LQ has two search ports, shared by three requesters
(`lq_search_arbiter`). The priority is fixed:

1. invalidation/eviction (M-search, memory)
2. store address resolution (D-search)
3. store write (M-search, core)

A requester that gets no port waits. It sees its ready signal low
(`ev_ready_o`, `st_ex_ready_o`, or no `wr_fire_o`). A filtered request needs
no port, so it is accepted at once. That is how the filters relieve port
contention as well as save energy.

A search goes to every thread partition named in its thread mask:

- **D-search:** only the storing thread. It hits performed loads to the same
  8-byte word that are younger than the store.
- **M-search:** performed loads to the same 64-byte line.

Each partition reports the oldest load it hit. The report appears one cycle
later on `viol_valid_o` / `viol_lq_ptr_o` / `viol_tag_o`. The core then
squashes from that load, using `sq_*`. The squash itself is the core's job.

## Early removal of loads

A load at the head of its thread's LQ partition leaves at once (`er_valid_o`)
when:

1. its Mode is DRF (and `drf_enable_i` is 1);
2. every store older than it has resolved its address;
3. it is not committing or being squashed in the same cycle.

Condition 2 is `nondspec_check`. Each SQ entry has an Execute bit that is set
when the store's address is known. At allocation, a load records the SQ tail
pointer. Every store between the SQ head and that pointer is older than the
load.

- A range decoder builds a mask with 0 for older stores and 1 for all others.
- The mask is ORed with the Execute bits.
- The result is AND-reduced to one bit.

This check reads one bit per entry, with no address compare. Only the head
can leave, because the LQ is circular and removing any other entry would not
free space.

Once a load has left, a later search cannot hit it. The ROB still commits it
by tag, and the LQ ignores a commit whose tag is not at its head
(`ld_cm_pop_o` stays low). A search can also hit the head load in the very
cycle it leaves. The squash that follows then points behind the new head, and
the LQ squashes the whole partition from its head. The core then re-executes
from that load in any case.

## Queue organisation

The LQ and SQ are statically split between the threads:

- per thread, an LQ of `LQ_ENTRIES/THREADS` = 96 entries and an SQ of 64;
- entries are circular buffers with pointers that count to twice the depth,
  so depths need not be powers of two;
- the top level gives per-thread pointers to the core on allocation
  (`al_ld_ptr_o`, `al_st_ptr_o`).

The queues hold what ordering needs, and nothing else:

- **LQ entry:** valid, performed, Mode, ROB tag, SQ position and address.
- **SQ entry:** valid, Execute, committed, Mode and address. It holds no data
  and does no store-to-load forwarding.
- Committed stores write in order, one per cycle over all threads. The two
  threads take turns when both are ready.

## Top-level interface and timing

`cello_lsq` is the top. All of its outputs that answer a request in the same
cycle are combinational: `al_ready_o`, `al_mode_o`, the pointers,
`st_ex_ready_o`, `wr_fire_o`, `ev_ready_o`, `ld_cm_pop_o` and `er_valid_o`.
The violation report is registered. Every state change happens at the rising
edge of `clk`. `rst_n` is an asynchronous active-low reset that empties the
queues, clears the counters and sets the flags to sync.

| Group | Meaning |
|---|---|
| `al_*` | one allocation group of one thread per cycle: optional leading `setDRF`, up to 3 loads and 2 stores; `al_ld_st_before_i` says how many of the group's stores precede each load |
| `ld_ex_*` | up to 2 loads performed per cycle (pointer, tag, address); a stale tag is ignored |
| `st_ex_*` | one store resolving its address per cycle (runs the D-search) |
| `ld_cm_*`, `st_cm_*` | in-order commit, one load and one store per thread per cycle |
| `wr_*` | committed store written to L1; `wr_ready_i` is L1's acceptance |
| `ev_*` | one invalidation or eviction per cycle |
| `sq_*` | squash one thread from an LQ and an SQ pointer, with the Mode to restore |
| `ctx_wr_*`, `region_flag_o` | context save/restore of the flags |
| `viol_*`, `er_*`, counts, `*_evt_o` | reports and per-cycle event pulses for counting |

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `THREADS` | 2 | source design (2-way SMT) |
| `LQ_ENTRIES` | 192 | source design |
| `SQ_ENTRIES` | 128 | source design |
| `LQ_ALLOC_W` / `SQ_ALLOC_W` | 3 / 2 | source design (LQ/SQ write ports) |
| `LQ_SPORTS` | 2 | source design (LQ search ports) |
| `NSYNC_W` | 8 | source design |
| `TAG_W` | 9 | 512-entry ROB of the source design |
| `LD_EX_W` | 2 | own choice |
| `ADDR_W` | 48 | own choice |
| line / word size for searches | 64 B / 8 B | own choice (`cello_pkg`) |

The source design also studies smaller LQs, down to 32 entries, and finds that
80 entries with early removal perform as well as 192 without it. Set
`LQ_ENTRIES` to try those sizes.

## What follows the source design and what is this design's own

These parts follow the source design:

- the region flag, its reset value, allocation-time update, squash restore
  and context save;
- the Mode bit in every LQ and SQ entry;
- the per-thread num-sync counters;
- the exact filter conditions;
- the three early-removal conditions, with the Execute-bit and
  range-decoder check;
- the debug mode;
- the queue sizes and port counts.

These are this design's own choices:

- every handshake and the signal timing;
- address, line and word widths;
- the fixed search priority;
- one store resolution, one store write and one memory event per cycle;
- the grouping rule for `setDRF`;
- registered violation reports;
- the handling of a search that hits a load as it leaves early.

Only the fully enabled design and the all-sync baseline can be selected. The
configurations in between (store filter only, both filters without early
removal) have no separate enables.

Not included: the core pipeline (rename, ROB, execution, memory dependence
prediction), store data and forwarding, the caches and the coherence
protocol, and the compiler pass that places `setDRF`.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench compares the
block with an independent model and ends with a `TB_RESULT checks=...
failures=...` line.

`tb_cello_lsq` runs the top at its default size with no overrides. A
core model there runs synthetic programs on both threads. The programs mix
long DRF regions on a few shared lines with short sync regions. The model
also:

- executes out of order;
- commits in order, with stalled phases that fill the queues;
- injects invalidations and evictions;
- switches the debug mode off and on;
- saves and restores flags;
- squashes on every reported violation.

Every cycle it checks Modes, flags, occupancies and counters. It checks every
filter decision and every early removal. Each mechanism must occur at least
once:

- both filters and all three search kinds;
- a store write waiting for a port;
- a full LQ and a full SQ;
- early removal;
- squash with flag restore;
- both `setDRF` values;
- debug mode and context restore.

It runs about 25,000 cycles in under a second.

`tb_cello_lsq_lq80` runs the same model and checks on an LQ of 80 entries in
total. That is the reduced size that early removal is meant to make
possible. With only 40 entries per thread the LQ usually fills before the SQ,
so this test does not require a full SQ. It reports how often the LQ was full
and how many cycles the programs took. The synthetic programs cannot show the
performance claim for real applications.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl +libext+.sv rtl/cello_pkg.sv tb/tb_cello_lsq.sv \
  --top-module tb_cello_lsq -o sim
./obj_dir/sim
```

Replace `tb_cello_lsq` with any other testbench name to run a single block.
The package must come first on the command line. The other modules are found
through `-y rtl`.
