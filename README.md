# A four-thread superscalar core with Flexible Result Commit

This is a superscalar processor core that runs four threads at once and shares one out-of-order
engine between them. The design is built around one idea: the out-of-order machinery of a
single-threaded superscalar stays almost unchanged. Only three things know that threads exist:

- the fetch stage, which keeps one program counter per thread;
- the operand lookup in the decoder, which matches on thread as well as register;
- the commit logic.

Each cycle, fetch takes one aligned block of four instructions from one thread, chosen by a
simple rotating counter. The scheduling unit issues instructions from all threads together
without looking at which thread they belong to. The commit logic may retire a finished block
of one thread while an older, unfinished block of another thread still waits. That commit rule,
called *Flexible Result Commit*, is what stops one slow thread from blocking the others.

The core follows the organisation of the SDSP (Superscalar Digital Signal Processor) and its
multithreaded extension, including all its sizes:

- 4 threads;
- fetch of 4 instructions per cycle;
- a 32-entry scheduling unit;
- issue of 8 instructions per cycle;
- 128 registers;
- an 8-entry store buffer;
- an 8 KB, 4-way data cache with 16-byte lines and LRU replacement;
- functional-unit counts and latencies as in the table below.

The instruction set, the floating-point format details and the bus protocols are not part of
that description. They are this design's own and are listed under "Departures and own choices".

## Pipeline at a glance

```
           +-------------+  block of 4  +---------+   decoded block  +------------------+
 icache -->| instruction |------------->| decoder |----------------->|  scheduling unit |
 (perfect) |  unit (TRR) |<--predict--- | + tags  |<--lookup view----|  8 blocks x 4    |
           +-------------+   BTB        +---------+                  |  (ROB + window)  |
                 ^  redirect on mispredict     |  reg file reads     +------------------+
                 +-----------------------------|-------------------- issue |   ^ 12 result buses
                                               v                     ≤8    v   |
                                        register file <--- commit ---  execution unit
                                        128 = 4 x 32                   4 ALU, MUL, DIV, LD,
                                                                       ST, CT, FADD, FMUL, FDIV
                                                                        |LD         |ST
                                                         data cache <---+   store buffer (8)
                                                         8KB 4-way  <------ committed stores
                                                            | refill / write-through
                                                         main memory (outside the core)
```

| Unit | Count | Latency (cycles) | Pipelined |
|---|---|---|---|
| Integer ALU | 4 | 1 | yes |
| Integer multiply | 1 | 2 | yes |
| Integer divide / remainder | 1 | 15 | no |
| Load | 1 | 1 (cache hit or store-buffer hit) | yes |
| Store | 1 | 1 | yes |
| Control transfer | 1 | 1 | yes |
| FP add / subtract | 1 | 3 | yes |
| FP multiply | 1 | 6 | yes |
| FP divide | 1 | 40 | no |

## Instruction unit: True Round Robin fetch

`fetch_unit` holds four program counters and a modulo-4 counter that advances on **every**
clock, whatever the threads are doing. The thread the counter points at may fetch in that
cycle. It does not fetch if it has halted, if the scheduling unit refuses the block, or if the
thread is being redirected after a mispredicted branch. Its turn is then lost; it is not given
to another thread. The result is strict cycle-by-cycle interleaving of blocks from the
threads.

A fetch reads the aligned 4-word block that holds the PC:

- Slots before the PC are marked invalid.
- The branch predictor (`branch_predictor`) looks up all four slots at once.
- The block ends after the first slot predicted taken, and that thread's PC moves to the
  predicted target.

The predictor is one table shared by all threads. It has 64 direct-mapped, tagged entries
with 2-bit saturating counters, and it is updated only when a control transfer commits. The
instruction cache (`icache`) is a perfect cache: a word array read in the same cycle.

## Decoder and renaming tags

`decoder` turns the four instructions of a block into scheduling-unit entries. Each source
operand is resolved in this order:

1. An earlier instruction **of the same block** that writes the register. The source takes
   that instruction's new tag.
2. Otherwise, the most recent live entry in the scheduling unit whose **thread and** register
   number match. The source takes its value if the entry has finished, or its tag if not.
3. Otherwise, the register file, at address `{tid, r}`.

Every instruction gets a renaming tag from `tag_allocator`. It is a bitmap of 64 tags, which
is twice the number of scheduling-unit entries, so the pool cannot run out. The four lowest
free tags are offered each cycle. Tags are unique across all threads. That is why write-back
and issue never need the thread ID. A tag returns to the pool only when its entry has left the
scheduling unit, either committed or squashed. A squashed entry that is still executing also
has to wait for its unit to answer first (see below).

## Scheduling unit (the hard part)

`sched_unit` is the reorder buffer and the instruction window in one structure. It holds
8 block positions of 4 entries each. Position 0 is the bottom, which holds the oldest block.
Each block position records its thread ID once, because a fetched block always comes from one
thread. Each entry holds:

- the decoded instruction;
- its two operands, each a value or a tag;
- state bits `issued`, `done` and `killed`;
- its result, and for control transfers the resolved outcome.

All the following happens in one cycle and takes effect at one clock edge.

**Issue, oldest first.** Entries are scanned from the bottom up. An entry is ready when both
of its operands are known, counting values on this cycle's result buses (bypass). A ready
entry takes the lowest free unit of its class that has not been taken yet this cycle, up to
8 issues per cycle. Loads and stores of one thread issue in program order: a memory operation
waits while an older memory operation of the same thread has not issued. The reason is that
stores only leave for memory after they commit, so a load must not overtake a store of its own
thread. Operations of different threads are not ordered against each other.

**Write back.** Each of the 12 units has its own result bus. An entry whose tag matches takes
the result and becomes `done`. Every waiting operand with that tag captures the value. Because
the tags are unique, no thread check is needed.

**Selective squash.** A control transfer that resolves against its prediction makes the
instruction unit restart that thread at the correct PC. In the scheduling unit, it kills every
entry that is **above the branch and of the same thread**. Entries of other threads are kept,
even when they sit above the branch. Killed entries commit nothing. They stay in place
and are removed when their block leaves. A killed entry that was already issued keeps its tag
reserved until its unit answers. Without that rule, a late result could be taken by a newer
instruction that had been given the same tag. The killed tags are also sent to the store
buffer, which drops the matching wrong-path stores.

**Flexible Result Commit.** The commit logic looks at the bottom four block positions. A block
commits if both of these hold:

- all of its entries are `done`;
- its thread differs from the thread of **every** block below it.

Of the blocks that qualify, the lowest one commits, and at most one block commits per cycle.
The result is that a thread's blocks always commit in program order. A block of another thread
that has finished does not have to wait behind a slow block. The committed block's up to four
results are routed to the register file's four write ports through a 4-to-1 block multiplexer.
Its tags are freed, and its control transfers update the predictor. The blocks above it then
move down one position, so a gap in the middle closes in the same cycle. Set `NCOMMIT = 1` to
allow only the bottom block to commit, as in a plain reorder buffer.

**Insertion and stall.** A new block enters at the lowest free position. When the unit is full,
a block may still enter in a cycle where one commits. If no block commits, the block is
refused and `ev_stall` pulses. This is the scheduling-unit stall, the event Flexible Result
Commit exists to reduce.

## Execution unit

`exec_unit` instantiates the 12 units, numbered class by class:

| Unit numbers | Class |
|---|---|
| 0–3 | ALU |
| 4 | MUL |
| 5 | DIV |
| 6 | LD |
| 7 | ST |
| 8 | CT |
| 9 | FADD |
| 10 | FMUL |
| 11 | FDIV |

All units share one interface:

- a `fu_req_t` request, which carries the tag, thread, opcode, operands, immediate, PC and
  prediction;
- a `ready` signal;
- a `fu_res_t` result, which carries valid, tag, value, and for control transfers the
  mispredict flag, the taken bit and the correct next PC.

The multi-cycle units are shift pipelines of their latency. The divide units are not
pipelined: they refuse new work while busy. Floating point is IEEE single precision, computed
in `fp32_pkg` with truncation and flush-to-zero. NaN and infinity are passed through only
roughly.

## Memory side: store buffer and data cache

The **store unit** computes `rs1 + imm` and places the store into `store_buffer`. It can issue
only while the buffer has room.

The store buffer holds 8 entries:

- An entry becomes eligible to leave when its instruction commits.
- Killed entries are dropped.
- The oldest committed entry is written to memory, one per cycle.

The **load unit** first checks the store buffer. A load may take its data from a buffered
store to the same word if either holds:

- the store belongs to the load's own thread;
- the store has already committed.

If several stores match, the youngest one is used. If none matches, the load goes to the
data cache.

`dcache` is 8 KB, 4-way set associative, with 16-byte lines and true LRU (2-bit age per way):

- A hit answers one cycle later.
- A miss is parked in the single miss register and starts a line refill. Hits to other lines
  continue to be served meanwhile.
- A second miss during a refill is held. The cache then takes no new load until the refill is
  done, after which the held load is replayed.
- Stores are write-through without write-allocate. A store that hits also updates the line.
- `WAYS = 1` gives the direct-mapped 8 KB cache. The cache testbench also passes with that
  setting.

## Register file

`register_file` holds 128 × 32-bit registers, addressed `{tid, r}`, so each thread owns 32.
It has 8 combinational read ports, two per decoded instruction, and 4 write ports for the
committed block. All registers reset to 0.

## Instruction set (this design's own)

32-bit instructions, word-addressed 16-bit PCs:

| Bits | Field |
|---|---|
| [31:26] | opcode |
| [25:21] | rd |
| [20:16] | rs1 |
| [15:11] | rs2 |
| [15:0] | signed imm |

Instructions that read `rs2` (stores and branches) use a signed 11-bit immediate in `[10:0]`.
The opcodes are listed in `mtss_pkg.sv`. The groups are:

- integer ALU: `ADD SUB AND OR XOR SLL SRL SRA SLT SLTU`;
- immediate forms: `ADDI ANDI ORI XORI SLTI LUI`;
- `TID`: rd ← thread ID;
- `MUL DIV REM`;
- memory: `LW SW` (byte address = rs1 + imm);
- control transfer: `BEQ BNE BLT BGE` (target = pc + imm), `JAL JALR` (rd ← pc + 1);
- floating point: `FADD FSUB FMUL FDIV`;
- `NOP`, and `HALT`, which stops the thread when it commits.

## Top level and its interface

`mtss_top` has one parameter, `NCOMMIT`: the number of bottom blocks that commit may choose
from. The default is 4; set it to 1 for bottom-block-only commit. All other sizes live in
`mtss_pkg`. Its ports are:

| Group | Meaning |
|---|---|
| `prog_we/addr/data` | Load the program while `run` is low. All threads start at PC 0 when `run` rises. |
| `mem_rd_valid/addr` | One-cycle line refill request. |
| `mem_rd_resp_valid/data` | The 128-bit line, at any later time. |
| `mem_wr_valid/addr/data` and `mem_wr_ready` | Word writes from the store buffer. |
| `thread_done[3:0]` | Thread has committed HALT. |
| `sb_empty` | All stores are written to memory. |
| `ev_*` | One-cycle event pulses for performance counting (see below). |

The `ev_*` outputs are:

- `ev_stall`, `ev_commit` and `ev_flex_commit` (a commit from a block other than the bottom);
- `ev_ninstr` and `ev_nissue` (instructions committed and issued this cycle);
- `ev_mispredict`;
- `ev_dc_hit` and `ev_dc_miss`;
- `ev_forward` and `ev_bypass`.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The end-to-end test runs the core at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mtss_pkg.sv rtl/fp32_pkg.sv \
          tb/tb_mtss_top.sv --top-module tb_mtss_top
./obj_dir/Vtb_mtss_top
```

Use the same command with another `tb_<name>` for a unit test. `tb/main_memory.sv` is a
behavioural memory used only by the end-to-end test. It has a fixed refill latency, and the
testbench loads its data array directly.

`tb_mtss_top` runs one program on all four threads. Each thread computes on its own data,
chosen by thread ID. The program contains:

- a counted loop of loads, multiplies and adds;
- divide and remainder;
- a store followed by a load of the same word;
- the four FP operations;
- a jump over a store that must never reach memory.

The testbench compares every result in memory with values it computes itself. It also fails
if any of the following never happened: a stall, a flexible commit, a mispredict with
selective squash, a cache hit, a cache miss, store-buffer forwarding, or a bypass. At the
default sizes it finishes in about 415 cycles. The counts seen in that run:

| Event | Count |
|---|---|
| Stalls | 195 |
| Flexible commits | 20 |
| Mispredicts | 10 |
| Cache hits | 31 |
| Cache misses | 18 |
| Forwards | 4 |
| Bypasses | 110 |

`tb_workloads` runs three small benchmark kernels on all four threads, using the same
homogeneous style:

- an 8×8 integer matrix multiply;
- Livermore loop 1 in single-precision FP;
- a sieve of Eratosthenes over 0–127.

Each kernel runs on two cores side by side. One uses Flexible Result Commit (`NCOMMIT = 4`,
the default). The other may commit only the bottom block (`NCOMMIT = 1`). The test checks every
result word of both cores. It also checks that both commit the same instructions, and that the
flexible core is never slower. Measured:

| Kernel | Instructions | Cycles, flexible | Cycles, bottom only | SU stalls, flexible / bottom only |
|---|---|---|---|---|
| Matrix | 5688 | 2082 (IPC 2.7) | 2132 | 320 / 368 |
| LL1 | 416 | 392 (IPC 1.06) | 437 | 217 / 279 |
| Sieve | 1268 | 714 (IPC 1.8) | 714 | 0 / 0 |

The kernels that stall the scheduling unit gain from flexible commit: LL1, with its long FP
latencies, gains the most. Sieve never fills the unit, so the commit rule makes no difference
there. `tb/workload_sys.sv` wraps a core, its memory and the event counters for this test.

## Changing the configuration

The following are package constants in `mtss_pkg`:

- **Threads:** `NTHREADS`. A power of two is assumed by the `{tid, r}` register addressing.
- **Scheduling-unit depth:** `SU_BLOCKS`. For example, 4, 12 or 16 give 16, 48 or 64 entries.
- **Commit window:** `COMMIT_BLOCKS`.
- **Unit counts and latencies:** `N_*` and `LAT_*`.

Cache geometry is set by the `dcache` parameters. Only the default configuration has been
simulated end to end.

## Departures and own choices

- **12 result buses.** One bus per unit replaces the "8 writes per cycle" budget, so write-back
  needs no arbitration. Issue is limited to 8 per cycle, as specified.
- **Only True Round Robin fetch is built.** Masked Round Robin and Conditional Switch were only
  alternatives for comparison.
- **Own choices, where no specification was available:**
  - the instruction set and encoding;
  - FP rounding;
  - predictor size and organisation;
  - tag-pool size;
  - block alignment;
  - the cache write policy;
  - the memory interface;
  - in-order memory issue per thread.
- **No exceptions or interrupts.** There is no memory-management or I/O model. Loads and
  stores move 32-bit words only.
- **Thread count.** Configurations with 5 or 6 threads need `NTHREADS` changed, and 128
  registers do not divide evenly between them.
