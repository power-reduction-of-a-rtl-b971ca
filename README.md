# DETL: an instruction fetch front end with a Dynamic Early Tag Lookup

A set-associative instruction cache normally reads the tags and the data of
every way at once. Only one way's data is used, so for a 4-way cache three
quarters of the data-RAM reads are wasted. Reading the tags first and then
only the matching way would save that energy, but it adds a cycle to every
fetch.

The Dynamic Early Tag Lookup (DETL) gets the saving without the extra
cycle. It waits for a cycle in which the fetch unit has to stall anyway,
because the instruction queue (IQ) in front of the decoder is full. In that
bubble it looks up the tag of the *next* fetch block and keeps the matching
way in a register. From then on the cache runs one block ahead. In each fetch
cycle it reads the data RAM for the current block in the one known way. In
the same cycle it reads the tag RAM for the following block. This carries on
until a branch mis-prediction or an exception breaks the sequence. Then the
cache goes back to reading all ways at once.

For this to work, the cache must know the next fetch address before it
fetches the current block. The branch predictor is therefore decoupled from
the cache by a small *look-ahead PC queue*. Each queue entry is a pair: the
PC to fetch and the predicted next PC (NPC).

This repository holds synthesizable SystemVerilog for the whole fetch front
end:

- the branch predictor: gshare with a BTB, a history register and a return stack;
- the look-ahead PC queue;
- the 64 KB 4-way DETL instruction cache with its refill logic;
- the instruction queue.

It also holds a self-checking testbench for every module.

The scheme and its parts follow the published description of DETL ("Power
Reduction of a Set-Associative Instruction Cache Using a Dynamic Early Tag
Lookup"). That description covers:

- the three lookup modes;
- the Way register;
- the tag-address multiplexer, the distributor and the output multiplexer;
- the look-ahead queue;
- the processor configuration (8-byte fetch, 64 KB/4-way/32 B-line I-cache,
  gshare with an 8K PHT, a 4K BTB and a 16-entry RAS).

Cycle timing, miss handling, interfaces and the inside of the branch
predictor are this design's own choices. They are listed under
[Departures and choices](#departures-and-choices).

## The three lookup modes

The I-cache is always in one of three states (module `detl_ctrl`):

| State    | Tag RAM address | Data RAM                      | Leaves when                          |
|----------|-----------------|-------------------------------|--------------------------------------|
| Parallel | PC              | PC, all ways; mux takes the hit | the IQ becomes full → Tag            |
| Tag      | NPC             | off                           | the bubble ends → ETL; flush → Parallel |
| ETL      | NPC             | PC, only the way in the Way register | flush → Parallel               |

Reset starts in Parallel. A flush is a mis-prediction redirect or an
exception. ETL is kept across later stalls: when the IQ fills again in ETL
mode, the fetch simply waits. The Way register still holds the way of the
block that comes next.

In every mode a tag lookup reads all four ways of the tag RAM. The saving is
in the data RAM only. A Parallel access selects four data ways and an ETL
access selects one. The Tag state and idle cycles select none.

### What "NPC" means in each state

The cache keeps `la_npc`, the NPC of the block it fetched last.

- **Tag state.** The tag lookup uses `la_npc`. This is the block that will be
  fetched next.
- **ETL access.** The cache fetches the request at the head of the queue.
  Its PC equals `la_npc`, which an assertion checks. The data RAM is read at
  that PC in the stored way. At the same time the tag RAM is read with the
  request's own NPC, and the result replaces the Way register.

The Way register therefore always describes the block at the head of the
queue.

### Cycle-level timing of the switch

The hardest part is to enter the Tag state *in* the first bubble cycle.
Entering it one cycle later would lose every one-cycle bubble. The IQ exports
`full_next`, its fullness at the start of the next cycle, counting this
cycle's push and pop. The controller loads its state register from
`full_next`:

```
cycle  state     IQ      action
t      Parallel  7/8     fetch A: tag(A) + data(A, 4 ways); IQ becomes full  -> next: Tag
t+1    Tag       8/8     bubble: tag(NPC of A = B) -> Way register; data off
                         back end pops one entry                               -> next: ETL
t+2    ETL       7/8     data(B, Way) + tag(NPC of B = C) -> Way register
t+3    ETL       ...     data(C, Way) + tag(D) ...
t+k    (flush)           redirect: this cycle is already Parallel; the target
                         is fetched with all ways                             -> next: Parallel
```

Fetch throughput is exactly that of a cache that always reads all ways. The
only cycle used for the early lookup is one in which a full IQ blocks the
fetch anyway. Each bubble gets one Tag lookup, however long it lasts.

The lookup itself is modelled as a single cycle: arrays are read
combinationally and the results are registered at the clock edge. This
matches the access-time model of the scheme, max(tag, data) + multiplexer.
To map onto synchronous SRAM macros, move the address registers one stage
earlier. The mode logic does not change.

### Misses

- **Parallel mode.** The request stays at the head of the queue. The line is
  refilled, and then the lookup is repeated.
- **Tag state or ETL access.** A miss of the *early* (NPC) lookup is known
  before the block is due. The refill starts at once, and no data RAM is read
  for that block. When the line is in, the Way register is loaded with the
  way that was filled. The block is then fetched in ETL mode as usual.
- **During a refill.** No lookup is made, so the arrays have one user at a
  time. A redirect during a refill lets the refill finish and drops the link
  between the refill and the Way register.

The refill engine (`icache_refill`) works as follows:

- It picks the first invalid way of the set, or else a global round-robin
  way.
- It requests the 32-byte line with a valid/ready handshake.
- It writes the four 8-byte beats in address order.
- It writes the tag with the last beat.

## Redirects and the look-ahead PC queue

The back end reports a mis-prediction or an exception as `redirect_valid`
with the correct PC. In that same cycle:

- the multiplexer in front of the branch predictor uses the redirect PC, so
  the pair (target, predicted NPC) is produced at once;
- the look-ahead PC queue (`pc_queue`) and the IQ are flushed;
- the queue's fall-through path hands the new pair straight to the cache,
  which fetches it in Parallel mode;
- the fetched block is written into the emptied IQ.

A mis-prediction therefore costs no extra front-end cycle. This also means
the decoupling queue adds no latency.

## Branch predictor

`branch_pred` predicts one 8-byte fetch block per cycle. The PC may point
into the middle of a block after a jump.

- **BTB** (`bp_btb`): 4K entries, direct-mapped, indexed by block address.
  An entry holds the last taken control transfer of that block: its halfword
  slot, whether it is a 16-bit instruction, its kind (conditional, jump,
  call, return) and its target. The entry is used only if its slot is at or
  after the PC's slot.
- **PHT** (`bp_pht`): 8K two-bit counters, indexed by block address XOR
  global history (gshare). The table is not reset, like an SRAM.
- **BHR** (`bp_bhr`): 13 bits. It is shifted when the back end resolves a
  conditional branch, not at prediction time.
- **RAS** (`bp_ras`): 16 entries, circular. A predicted call pushes
  branch address + 2 or + 4, and a predicted return pops. It is not repaired
  after mis-predictions.

NPC is chosen in this order:

1. the BTB target for a taken conditional branch, jump or call;
2. the RAS top for a return when the RAS is not empty;
3. otherwise the next sequential block.

The back end trains the predictor through the `upd` port with the resolved
branch address, target, kind, direction and size.

## Module map

```
detl_frontend                 top: the front end
├── branch_pred               PC register, redirect mux, next-PC logic
│   ├── bp_btb                branch target buffer
│   ├── bp_pht                gshare pattern history table
│   ├── bp_bhr                branch history register
│   └── bp_ras                return address stack
├── pc_queue                  look-ahead (PC, NPC) queue with fall-through
├── icache_detl               DETL I-cache: Way register, la_npc, miss control
│   ├── detl_ctrl             Parallel / Tag / ETL control path
│   ├── icache_tag_array      PC/NPC address mux, tags, valid bits, comparators
│   ├── way_distributor       per-way data Select and output-mux select
│   ├── icache_data_array     one bank per way, output multiplexer
│   └── icache_refill         miss handler
└── inst_queue                circular IQ with full / full_next
detl_pkg                      shared types: addresses, fetch blocks, modes, queue entries
```

## Top-level interface (`detl_frontend`)

| Port group | Signals | Meaning |
|---|---|---|
| clock/reset | `clk`, `rst_n` | rising edge; asynchronous active-low reset |
| to decoder | `iq_valid`, `iq_ready`, `iq_data` | IQ head: `pc` (first valid byte), `npc` (prediction, for the back end to verify), 64-bit `data` of the block at `pc & ~7` |
| from back end | `redirect_valid`, `redirect_pc` | mis-prediction or exception; flushes and refetches in the same cycle |
| from back end | `upd_valid`, `upd` | resolved control transfer (`pc`, `target`, `kind`, `taken`, `rvc`) |
| refill | `mem_req_valid/ready`, `mem_req_addr` | line request (32-byte aligned) |
| refill | `mem_resp_valid`, `mem_resp_data` | four 8-byte beats, ascending, one per valid cycle |
| status | `mode`, `iq_count` | control-path state, IQ occupancy |
| activity | `tag_rd_en`, `data_way_en[3:0]` | per cycle: a 4-way tag read; which data ways are read |
| events | `ev_par_access`, `ev_tag_lookup`, `ev_etl_access`, `ev_miss`, `ev_early_miss`, `ev_iq_full`, `ev_pcq_bypass`, `ev_btb_hit`, `ev_ras_push`, `ev_ras_pop` | one-cycle strobes for counting |

The activity outputs exist so that a power model can weigh tag and data
reads. They play the role of the activity counts used in the original energy
evaluation.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `CACHE_BYTES`, `WAYS`, `LINE_BYTES` | 65536, 4, 32 | published processor configuration |
| fetch block | 8 bytes (package constant) | published configuration |
| `IQ_DEPTH` | 8 blocks | published 64-byte instruction stream buffer, read as 8 × 8 bytes |
| `BTB_ENTRIES`, `PHT_ENTRIES`, `RAS_DEPTH` | 4096, 8192, 16 | published configuration |
| `PCQ_DEPTH` | 4 | own choice (no size published) |
| `RESET_PC` | `32'h8000_0000` | own choice |

Addresses are 32 bits (the target is a 32-bit RISC-V core with compressed
instructions). `RAS_DEPTH` must be a power of two. The cache geometry must
give a power-of-two number of sets.

## Departures and choices

These follow the published scheme:

- the three states and their address and way use;
- entering Tag on IQ full and leaving ETL only on a redirect or exception;
- the Way register, the tag-address multiplexer and the distributor with the
  output multiplexer;
- the (PC, NPC) look-ahead queue;
- fetching the redirect target in the cycle of the mis-prediction;
- the sizes in the table above.

These are this design's own choices:

- The state is loaded from the IQ's next-cycle fullness, so the Tag state
  falls on the first bubble cycle.
- The Tag lookup is made once per bubble.
- Lookups are single-cycle, with arrays read combinationally.
- The miss handling described above: no lookups during a refill, and an
  early miss refills at once and then loads the Way register.
- The victim choice (first invalid, else round robin), and the refill
  handshake and beat order.
- The predictor organisation: block-indexed BTB with one branch per block,
  non-speculative history, an unrepaired RAS and an unreset PHT.
- Flushing both queues on a redirect. The IQ accepts a push in the flush
  cycle.
- Only the IQ-full bubble starts DETL. A bubble caused by a cache miss does
  not.

Not included:

- The decoder, issue queue and execution units. They are the host core's
  and appear here as ports.
- The next memory level.
- Any power or area model.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. Most compare the block with a reference
model written independently in the testbench:

| Testbench | What it checks |
|---|---|
| `tb_detl_ctrl` | directed Parallel→Tag→ETL→Parallel walk, including the one-cycle bubble, then 5000 random cycles against a reference state machine |
| `tb_way_distributor` | all input combinations |
| `tb_icache_tag_array`, `tb_icache_data_array` | random fills and lookups against array models (1 KB cache) |
| `tb_icache_refill` | request address, beat order, victim way, busy window with random memory delays |
| `tb_icache_detl` | 1 KB cache with a random-jump request stream, IQ model and redirects. Checks that every block written is the one requested, with the right bytes; that Parallel reads 4 ways, ETL reads 1 and Tag reads 0; and that the state follows the control path. Tag lookups, ETL fetches and early misses must all occur |
| `tb_pc_queue`, `tb_inst_queue` | FIFO models with flush, fall-through and full / full_next |
| `tb_bp_btb`, `tb_bp_pht`, `tb_bp_bhr`, `tb_bp_ras`, `tb_branch_pred` | predictor structures and next-PC choice against behavioural models |
| `tb_detl_frontend` | the whole front end at its default size (see below) |
| `tb_detl_workload_profiles` | the whole front end under a low and a high back-end idle rate (see below) |

`tb_detl_frontend` runs a synthetic program over 256 KB of code. Each 8-byte
block is made, by a hash of its address, into either:

- a block without a branch;
- a loop-like conditional branch;
- a jump, a call or a return.

A back-end model drains the IQ with bursts of stalls. It executes the true
path and trains the predictor. It redirects the front end on every wrong NPC
and now and then on an exception. A memory model serves refills.

The testbench checks two things. Every block that reaches the back end must
be the next block of the true path. Its bytes must also match memory. It
also requires each mechanism to happen:

- Parallel, Tag and ETL lookups;
- IQ-full bubbles;
- returns from ETL to Parallel;
- Parallel and early misses;
- mis-predictions and exceptions;
- fall-through of the PC queue;
- BTB hits and RAS pushes and pops.

Over 200,000 blocks a typical run reports:

- 0 failures;
- about 59 % of the data-RAM way reads that an always-parallel cache would
  make;
- about the same number of tag reads as an always-parallel cache.

The testbench also counts RAM reads per access. It requires 4 data-way reads
for each Parallel access and 1 for each ETL access. It requires 4 tag-way
reads for each lookup of any kind.

The exact figures depend on the synthetic program's branch and stall
behaviour, so they say nothing about the savings on real code.

`tb_detl_workload_profiles` shows how the savings depend on fetch bubbles.
It runs the same program twice from reset, each time for 100,000 blocks,
under a different back-end stall profile:

| Profile | Idle-cycle rate (IQ full) | Data-RAM way reads vs. always-parallel |
|---|---|---|
| low idle, like SPEC CPU2006 libquantum (5.3 % on a dual-issue in-order core) | about 6 % | about 81 % |
| high idle, like SPEC CPU2006 h264ref (22.2 % on the same core) | about 21 % | about 65 % |

The benchmark programs themselves need a whole processor and are not run. The
stall settings are tuned so that the measured idle rate lands within 3 points
of the target, which the testbench checks. It also checks that the
high-idle profile reads fewer data ways than the low-idle one.

### Running a testbench

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/detl_pkg.sv tb/tb_detl_frontend.sv \
          --top-module tb_detl_frontend
./obj_dir/Vtb_detl_frontend
```

Replace the testbench name to run any other. The full-size front-end test
takes under a second of simulation. `-y rtl` lets Verilator find each module
in `rtl/<module>.sv`, and the package is listed first.

## Limits of trust

- The RTL was verified in simulation against models written from the same
  reading of the scheme. A misreading shared by both would not show.
- No gate-level, timing or power analysis was done. The single-cycle array
  reads are a modelling choice, not a timing-closed implementation.
- The branch predictor is a plain, reasonable one, not a tuned copy of any
  particular core. Its accuracy affects how often DETL is active, not whether
  fetched data are correct.
