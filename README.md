# A simultaneous multithreaded DLX core

This is a superscalar, out-of-order DLX processor that runs up to eight
programs (threads) at the same time. It is built on the Tomasulo scheme with a
reorder buffer. Every cycle it fetches, issues, executes and commits
instructions of several threads side by side. The function units are kept
busy by whichever thread has work, so the issue slots one thread leaves empty
are filled by the others.

Only a few things are needed on top of a single-threaded Tomasulo core:

- one program counter per thread, plus a rule for choosing which threads fetch;
- a flush and a trap that act on one thread only;
- a register file with one set of 32 registers per thread.

Everything else is shared by all threads: the instruction queue, the
reservation stations, the function units and the reorder buffer. One thread
alone can therefore use almost the whole machine.

The RTL is synthesizable SystemVerilog. It is parameterized, and the defaults
are the main configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `NT` | 8 | hardware threads |
| `FT` x `FPT` | 2 x 4 | fetch: 4 instructions from each of 2 threads per cycle (the "4:2" scheme) |
| `IQ_N` | 32 | shared instruction queue |
| `ISSUE_W` | 8 | instructions issued per cycle (a choice of this design, equal to the fetch and commit widths) |
| `N_ALU`, `N_LDST`, `N_BR` | 4, 2, 1 | function units, each with its own reservation station |
| `RS_DEPTH` | 8 | entries per reservation station |
| `ROB_N` | 64 | reorder buffer entries (must be a power of two) |
| `COMMIT_W` | 8 | commits per cycle |
| `BHT_N` | 512 | 2-bit branch prediction counters, shared |
| `IMEM_WORDS`, `DMEM_WORDS` | 4096 | flat instruction and data memories (a choice of this design) |

## The pipeline

```
 fetch_stage --fq--> decode_stage --dq--> issue_stage --iss--> rsv_station x7 --> alu_unit x4
   |  ^  bpred                            |  ^   ^                                ldst_unit x2
   |  |                                   |  |   |                                branch_unit
 imem |                             alloc |  |   +------- CDB (8 lanes) <-- complete_stage <--+
      |                                   v  |              |
      +--- flush / redirect / halt ------ rob <-------------+
                                          |  \-- dmem (loads and stores at commit)
                                          v
                                       regfile
```

Every stage boundary is a register:

- **Fetch to decode (`fq`).** This holds one bundle of up to 8 instructions.
- **Decode to issue (`dq`).** This holds one bundle of micro-ops.
- **Instruction queue (IQ).** This is the shared queue inside `issue_stage`.
- **Reservation stations.** These hold issued instructions until both
  operands are present.
- **Complete stage.** This registers each function unit's result and drives
  it on the common data bus (CDB) in the next cycle.
- **Reorder buffer (ROB).** This holds results until they commit.

The function units are combinational. A result computed in cycle n is on the
CDB in cycle n+1. In that cycle:

- the reservation stations capture it as an operand;
- the issue stage can bypass it into a newly issued instruction;
- the ROB marks the instruction done.

An instruction needs at least five cycles from fetch to commit: fetch, decode,
issue, dispatch/execute, complete. It can commit in the cycle after its result
reaches the ROB.

Each bundle register holds its contents until the next stage takes them.
Fetch only fetches when `fq` is empty or is being taken. Decode works the
same way with `dq`. The IQ takes a decoded bundle only when the whole bundle
fits.

### Choosing threads to fetch

Each cycle `fetch_stage` picks up to two threads that are running and not
stopped. For each one it fetches up to four consecutive instructions.

Threads are ranked by how many instructions they currently hold in decode and
in the instruction queue, and the fewest go first. This feedback keeps a
thread that is stalled on long dependencies from filling the shared queue and
starving the others. Ties are broken round robin.

Prediction within a fetch block works as follows:

- **Conditional branches** (`BEQZ`, `BNEZ`) look up the 2-bit counter table.
- **`J` and `JAL`** are always predicted taken.
- **`JR` and `JALR`** are predicted to fall through. The branch unit then
  finds the mismatch and the ROB redirects.
- **A predicted-taken branch** ends the fetch block.
- **A `TRAP`** ends the block and stops the thread's fetch.

Every fetched instruction gets a unique, increasing id (`iid`). The id is used
only for checking and tracing.

### Issue and renaming in a shared queue

The IQ is a compacting array kept in fetch order. Each cycle the issue logic
scans it from the oldest entry and issues up to `ISSUE_W` instructions.

Within a thread, issue is strictly in order. Once one instruction of thread t
cannot issue, nothing younger of t issues this cycle. Instructions of other
threads behind it still may. This is how a single cycle issues from several
threads, and why a stalled thread costs the others little.

An instruction issues when two things hold. First, a ROB entry must be free.
Second, a reservation station of its class (ALU, load/store or branch) must
have room; among the stations of that class, it goes to the one with the most
room. A `TRAP` needs only the ROB entry.

Renaming uses a per-thread table. For each architectural register it records
whether an uncommitted instruction will write it, and if so which ROB entry
that instruction has. Issued instructions get consecutive ROB entries starting
at the ROB's rear pointer.

A source operand is taken from the first of these that applies:

1. An instruction issued earlier in the same cycle writes it. The operand
   waits for that ROB entry.
2. No write is pending. The operand is read from the register file.
3. The pending value already sits in the ROB. It is read from there.
4. The value is on the CDB this cycle. It is bypassed.
5. Otherwise the reservation station waits for that ROB entry.

A table entry is cleared when its writer commits, provided no younger writer
has replaced it. All of a thread's entries are cleared when the thread is
flushed. A flush always starts at the thread's oldest instruction, so nothing
of the thread is left in flight.

### Reservation stations and function units

Each station holds `RS_DEPTH` entries from any mix of threads.

- **Operand capture.** An entry watches all CDB lanes for the ROB tags it
  still needs.
- **Dispatch.** Each cycle the station sends its lowest-numbered entry with
  both operands present to its function unit.
- **Flush.** Entries of a flushed thread are dropped at once.

What each function unit does:

- **ALU.** Computes the DLX integer operations: add, subtract, logic, shifts,
  set-on-compare and `LHI`.
- **Load/store unit.** Only forms the effective address. For a store it also
  passes the data on. Memory itself is accessed at commit (see below).
- **Branch unit.** Evaluates the condition and the target. For `JAL` and
  `JALR` it produces the link value pc+4. It flags a misprediction when the
  actual next pc differs from the one fetch predicted. There is no delay slot.

## The reorder buffer and its commit pointers

This is the heart of the design, and the part that differs most from a
textbook ROB.

The ROB is one circular queue of `ROB_N` entries shared by all threads.
Entries are allocated in issue order at the main rear pointer (`mrp`).

A single-threaded ROB commits from one front pointer and stops at the first
entry that is not finished. With several threads that is wasteful: an
unfinished load of thread 3 would block finished instructions of thread 5,
although the two threads have no ordering between them.

Here each thread has its own front pointer (`tfp`): the oldest entry of that
thread. Each cycle the commit logic does the following:

1. It scans the queue from the **main front pointer** (`mfp`), the oldest
   valid entry of any thread.
2. For each thread it commits that thread's entries in order, as long as they
   are done.
3. It stops for a thread at that thread's first unfinished entry. The scan
   goes on for the other threads.
4. At most `COMMIT_W` instructions commit per cycle, and at most one of them
   is a memory access.
5. `mfp` then moves past every entry that is no longer valid.

Since the per-thread pointers are derived from `mfp` every cycle, the free
space is simply the distance from `mrp` back around to `mfp`:
`free = ROB_N - used`, and `mrp + free == mfp` modulo `ROB_N`. The issue stage
uses `free` to decide how much it may issue.

At commit the ROB changes the machine state:

| Instruction | Action at commit |
|---|---|
| ALU op, `JAL`, `JALR` | writes the result into the thread's registers |
| `LW` | reads the data memory in the commit cycle. The value goes to the register file and is broadcast on an extra CDB lane (`ld_lane`), so waiting reservation stations see it. Loads are blocking: a load waits for the memory port. |
| `SW` | writes the data memory. Stores wait for no reply. |
| conditional branch | trains the prediction table with its outcome |
| mispredicted branch or jump | flushes every younger instruction of its thread in all stages and restarts the thread's fetch at the correct pc |
| `TRAP` | flushes the thread and halts it. The thread's `active` bit drops. |

Doing loads and stores at commit keeps memory free of speculation. The cost is
load latency: a dependent instruction waits until the load becomes the oldest
unfinished instruction of its thread. This is why the reservation stations
are 8 deep.

## Runtime self-checkers

Two checkers watch the running core without affecting it. Their flags are
outputs of the top. Each flag is sticky, and each also fires an assertion
warning in simulation.

**`rob_checker`** checks the commit pointers. For every thread that has
entries:

- if `mfp < mrp`, then `mfp <= tfp <= mrp`;
- if `mfp > mrp` (the queue wraps), then `tfp >= mfp` or `tfp <= mrp`.

It also checks that `mrp + free == mfp` (mod `ROB_N`) always holds. A front
pointer that drifts out of bounds would report wrong free space to issue, and
that kind of bug is otherwise very hard to trace.

**`global_checker`** watches the traffic between fetch, decode, issue and the
CDB. It uses the instruction ids and raises `err[4:0]`:

| Bit | Rule |
|---|---|
| 0 | After thread t is flushed, no instruction of t fetched before the flush appears at decode, at issue or on the CDB. |
| 1 | Per thread, issued ids strictly increase: nothing is issued twice or out of order. |
| 2 | A fetch or decode bundle that the next stage did not take stays unchanged, except for flushed entries. |
| 3 | No id appears twice in one cycle on the issue lanes or on the CDB. |
| 4 | Issue keeps feeding the stations (see below). |

For rule 4 the checker keeps its own count of each thread's instructions in
the instruction queue. The count goes up with bundles taken from decode,
down with issued instructions, and to zero on a flush. Rule 4 fires in a
cycle where all of these hold:

- some thread that is not being flushed has queued instructions;
- the ROB has a free entry;
- no reservation station is full;
- nothing issued.

## Programming the core

The ISA is a DLX integer subset:

- ALU instructions in R and I form: `ADD(U)`, `SUB(U)`, `AND`, `OR`, `XOR`,
  `SLL`, `SRL`, `SRA`, `SEQ`, `SNE`, `SLT`, `SGT`, `SLE`, `SGE`, their
  immediate forms, and `LHI`;
- `LW`, `SW`;
- `BEQZ`, `BNEZ`, `J`, `JAL`, `JR`, `JALR`;
- `TRAP`, which halts the thread.

Details:

- Addresses are byte addresses of aligned words.
- Any other opcode is executed as a no-op.
- There is no branch delay slot.
- The link register is r31.

To run programs:

1. Hold the core idle after reset.
2. Write the programs through the instruction-memory port (`im_we`,
   `im_waddr`, `im_wdata`).
3. Write the data through the data-memory loader port (`dm_ld_*`).
4. Pulse `start` with `start_mask` and one `start_pc` per thread.

A thread runs until its `TRAP` commits. `commits` gives the number of
instructions committed in each cycle, so IPC can be measured outside the core.
The threads share one address space. Giving each its own region is up to the
program.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/smt_pkg.sv tb/tb_rob.sv \
          --top-module tb_rob -Mdir obj && obj/Vtb_rob
```

Testbenches that need a module load it from `rtl/` through `-Irtl`. The
package `rtl/smt_pkg.sv` must come first.

`tb/tb_smt_dlx_top.sv` runs the whole core at its default size. How it works:

- It contains a small assembler and a sequential instruction-set model.
- It gives each of the 8 threads a program that sums an array in a loop, runs
  120 random instructions (ALU ops, loads, stores, data-dependent forward
  branches), calls a subroutine with `JAL`/`JR`, and ends with `TRAP`.
- At the end it compares every register of every thread and all of data
  memory with the model.
- It checks that neither self-checker raised a flag.
- It fails if any of twelve mechanisms never occurred: two-thread fetch,
  taken prediction, queue full, station full, ROB full, issue from several
  threads in one cycle, operand wait, commit past a blocked thread, load
  broadcast, store, misprediction flush, trap.

A run takes about 420 cycles at an IPC of about 3.7. The random program
comes from a fixed seed in the bench.

`tb/tb_smt_dlx_workloads.sv` runs small kernels at the default size, on
1, 2, 4 and 8 threads. The kernels are a 16-word bubble sort, a 16-word
selection sort, and a 24-number Fibonacci series that calls a subroutine.
Thread t runs kernel t mod 3. The bench checks the results against the model
and checks that the sorted data is in order. It also checks that 8 threads
give more throughput than 1. The measured IPC:

| Threads | Instructions | Cycles | IPC |
|---|---|---|---|
| 1 | 1045 | 1617 | 0.65 |
| 2 | 1960 | 1740 | 1.13 |
| 4 | 3200 | 1734 | 1.85 |
| 8 | 6350 | 2354 | 2.70 |

These kernels are short and full of dependences. With one thread, every loop
iteration waits for its loads, because loads complete only at commit. With
several threads, other threads fill the gaps. The memories always hit, so
these figures contain no cache effects.

The unit testbenches use smaller parameters where that keeps them fast. For
example, the ROB test uses 2 threads and 8 entries.

## Where this design departs from, or goes beyond, its source

- **No caches.** Instruction and data memory are flat arrays that answer in
  the same cycle, with one data access per cycle at commit. The cache
  hierarchy the design was evaluated with existed only as a statistical
  model, so cache-miss behaviour cannot be reproduced.
- **Choices of this design where the description is silent:**
  - the issue width (8);
  - one reservation station per function unit;
  - one CDB lane per function unit, plus one for loads;
  - 1-cycle function units;
  - the station-choice and dispatch orders;
  - the round-robin tie-break;
  - predicting `JR`/`JALR` as not taken;
  - `TRAP` meaning "halt this thread";
  - the branch table's index (pc[10:2]) and reset value (weakly not taken);
  - zeroed registers at reset;
  - the loader and start interface.
- **Register file read in the same cycle.** It is not pipelined.
- **Global checker rules.** The checker covers the rules listed above. How
  each rule is detected is this design's own choice.
- **Not built:** the non-speculative variant and the single-commit-pointer
  baseline. The core built here is the speculative, multi-pointer design.

## Files

- `rtl/smt_pkg.sv`: constants, opcodes and the structs passed between stages
  (`fetch_t`, `uop_t`, `rs_entry_t`, `result_t`, `rob_alloc_t`, `commit_t`).
- `rtl/smt_dlx_top.sv`: the core.
- `rtl/fetch_stage.sv`, `rtl/bpred.sv`, `rtl/imem.sv`: fetch.
- `rtl/decode_stage.sv`: decode.
- `rtl/issue_stage.sv`, `rtl/regfile.sv`: issue.
- `rtl/rsv_station.sv`, `rtl/alu_unit.sv`, `rtl/ldst_unit.sv`,
  `rtl/branch_unit.sv`, `rtl/complete_stage.sv`: execution.
- `rtl/rob.sv`, `rtl/dmem.sv`: commit.
- `rtl/rob_checker.sv`, `rtl/global_checker.sv`: the self-checkers.
- `tb/`: one testbench per module, plus the full-core and workload benches.
