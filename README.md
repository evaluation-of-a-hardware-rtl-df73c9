# A microthreaded SVP processor core

This is the RTL of one core of a many-core chip built around the SVP
concurrency model. In SVP a program creates *families* of threads. The
threads of a family talk to each other and to their parent only through
one-way register channels:

- a **global** is written once by the parent and read by every thread;
- a **shared** runs from each thread to the next one, and from the parent
  into the first thread and out of the last.

Reads block until a value is there. Writes never block.

The core runs these threads so that its in-order pipeline never waits. An
instruction may need a value that is not there yet: a load still in
flight, or a shared its predecessor has not yet written. The thread then
parks on that register, and the pipeline carries on with another thread.
The write that fills the register wakes the thread again. Long memory
latency is hidden by having many threads ready, not by caches or
speculation. So the caches are small (1 kB each), and memory answers may
come back in any order.

The sizes are those of the evaluated core:

| Resource | Size |
|---|---|
| integer registers | 1024 |
| thread-table entries | 256 |
| family-table entries | 32 |
| I-cache and D-cache | 1 kB each, 4-way, 64-byte lines |

## The life of a thread

Every thread is always on exactly one list. All the lists are singly
linked through a single `next` field per thread-table entry. A list is
only a head and a tail, so a whole list of threads can be moved onto
another list in one cycle by changing two pointers.

```
  creation ──1──► Ready List ──2──► I-cache check ──3a (hit)──► Active List ──4──► pipeline
                    ▲    ▲               │                          ▲                │
                    │    │               └─(miss / line in flight)  │                │
                    │    │                   thread joins the  ─3b──┘ (line arrives) │
                    │    │                   line's list                             │
                    │    └──6── register written: its suspended list ◄──5b (suspend)─┤
                    └───────5a (SWCH, branch, end of cache line) ◄───────────────────┘
```

| List | Kept where | Filled by | Emptied by |
|---|---|---|---|
| free entries | thread table | context release | creation process |
| Ready List | thread table | creation (1), switch (5a), wake (6) | I-cache check (2) |
| Active List | thread table | I-cache hit (3a), line arrival (3b) | pipeline fetch (4) |
| waiting for line *n* | head/tail in I-cache line *n* | I-cache check | line arrival (3b) |
| suspended on register *r* | head/tail in register *r* | suspend (5b) | write to *r* (6) |

A thread leaves the pipeline in these cases:

- **END:** its instruction is annotated END. The thread terminates.
- **Suspend:** an operand register is not FULL. The thread is parked on
  that register and its PC is kept, so the instruction is retried when
  the thread wakes.
- **SWCH, branch or end of line:** its instruction is annotated SWCH, is
  a branch, or is the last one in its cache line. The thread goes back to
  the Ready List with its new PC, and the I-cache check finds its next
  line.

Each cycle the I-cache check (`svp_icache`) takes the head of the Ready
List and looks up the line that the thread's PC is in:

- **Present:** the thread goes to the Active List.
- **Being fetched:** the thread joins that line's waiting list.
- **Missing:** a line is taken for replacement, its read is queued, and
  the thread starts the line's waiting list. A line can be replaced only
  if no thread refers to it and no read is in flight for it.

Every I-cache line has a reference counter. It counts the threads bound to
the line, from their check until they leave the pipeline, and a line is
never evicted from under them. If no line of the set can be replaced, the
check is refused and tried again.

When a thread leaves the pipeline, the next thread on the Active List
starts in the same cycle, so a thread switch costs nothing.

## Register windows: how channels become registers

A thread sees up to 31 architectural registers. Register 31 reads as zero,
as in the Alpha ISA. The window is laid out in four classes, in this order.
Their sizes G, S and L are set per family:

| Architectural | Class | Physical register |
|---|---|---|
| 0 .. G-1 | global | parent's globals, `gbase + g` |
| G .. G+S-1 | shared (out) | own context `ctx(slot) + s`; the last thread uses the parent's shareds `pshbase + s` |
| G+S .. G+S+L-1 | local | own context `ctx(slot) + S + l` |
| G+S+L .. G+2S+L-1 | dependent (in) | previous thread's shareds `ctx(slot-1) + d`; the first thread uses the parent's shareds `pshbase + d` |

`ctx(k) = ctxbase + k*(S+L)`. A family is given a block of `nblk` contexts
starting at `ctxbase`, and its threads use them round-robin in creation
order. A thread's outgoing shared and the next thread's incoming dependent
are the same physical register. So the consumer suspends on it simply by
reading it, and the producer's write wakes it. `svp_reg_map` does this
translation, with three copies in the pipeline: two for the sources and
one for the destination.

A context can be used again only once its thread **and the next thread**
have both terminated, because the next thread may still need to read the
shareds. Contexts are released in creation order. So a family needs at
least two contexts (`nblk >= 2`); an assertion checks this. A context is
also held while any load its thread issued is still in flight: each
context has a counter of outstanding reads, raised when a load misses and
lowered when the D-cache walker completes it. Without it, a thread that
ends right after a load (for example, one that loads straight into its
outgoing shared) could see its context handed to the next thread, and
the late load would land in the new thread's registers. When a thread
is created:

1. its shared registers are set to EMPTY, except for the last thread,
   whose shareds are the parent's;
2. its index is written into its first local register;
3. it is put on the Ready List.

## Register states

Each register carries a 2-bit state next to its 64-bit value:

| State | Meaning | Value field holds |
|---|---|---|
| EMPTY | nothing yet | — |
| PENDING | a load will fill it | load record |
| WAITING | threads are suspended on it | suspended-thread list, plus any load record |
| FULL | holds a value | the value |

A register that is not FULL uses its value field for bookkeeping
(`svp_pkg::nf_reg_t`):

- the head and tail of the list of suspended threads;
- for an outstanding load, the byte offset in the cache line and the size
  (8 bytes, or 4 bytes sign-extended), a link to
  the next register waiting on the same D-cache line, and the family and
  context slot of the thread that issued it. The walker uses these to
  count the read off when it completes.

The register file has one write port. It takes four operations:

| Operation | Effect |
|---|---|
| `WR_DATA` | the register becomes FULL. If it was WAITING, the suspended list comes out on `wake_*` in the same cycle and is spliced onto the Ready List. |
| `WR_CLEAR` | the register becomes EMPTY. |
| `WR_SUSPEND` | a thread is added to the suspended list. If the list already existed, `link_*` asks the thread table to chain the old tail to the new thread. |
| `WR_LOAD` | the load record is written. |

Four sources compete for the write port, in this priority order:

1. D-cache walker
2. host port
3. creation process
4. pipeline

When the pipeline loses, it holds its instruction for a cycle.

## Decoupled loads

A load that hits in the D-cache writes its register at once. A load that
misses writes a load record into its target register, which becomes
PENDING. That register becomes the new head of the line's register list:
its record points to the previous head. The D-cache line itself keeps only
the head of that list. Only one read per line goes to memory.

When the line arrives, a walker follows the list one register per cycle.
It writes each register with its own quadword or longword of the line,
which also wakes
any thread suspended on it. A line cannot be evicted while a read is in
flight or its list is being walked.

Stores are write-through with no allocation. A store updates a line that
is present, and the write goes through a one-entry buffer to memory. The
write is tagged with its family, and the family's outstanding-write
counter stays up until memory acknowledges it.

## Cache lines and annotations

A 64-byte instruction line holds 16 words. Word 0 is not an instruction:

```
 bit 31    29    27          5     3     1   0
    | a14 | a13 | ...      | a0  |  -  |        word 0: 2-bit annotations
    | instr0 ..................... |             word 1
    | ...                           |
    | instr14 ..................... |             word 15
```

Instruction k sits in word k+1, and its annotation in bits 2k+3..2k+2. The
annotations are:

| Annotation | Code | Effect |
|---|---|---|
| CONTINUE | 0 | none |
| SWCH | 1 | switch to another thread after this instruction |
| END | 2 | the thread terminates after this instruction |

A compiler puts SWCH on instructions that may read a result that is not
there yet, such as a load result or a shared. The fetch never executes
word 0: a PC that points at word 0 moves on to word 1. `svp_annot_decode`
extracts the instruction, its annotation and the end-of-line flag.

## Families

A create request (`cr_*` on the core) carries these fields:

| Field | Meaning |
|---|---|
| `cr_pc` | thread body PC |
| `cr_start`, `cr_step`, `cr_limit` | index range. The limit is exclusive and the step must be positive, so indices are start, start+step, … below limit. |
| `cr_win.n_glob`, `n_shrd`, `n_locl` | window sizes G, S and L |
| `cr_win.gbase` | parent's global registers |
| `cr_win.pshbase` | parent's shared registers |
| `cr_win.ctxbase`, `nblk` | the family's block of contexts, 2 to 16 (`MAX_BLOCK`) |

A family entry is allocated at once, and `cr_ack` returns its number. The
creation process (`svp_family_table`) then makes threads on its own, one
at a time. It goes on while the family has indices left, a thread-table
entry is free, and fewer than `nblk` of its threads hold a context.
The family table counts created and released threads modulo 512. Only
their difference (at most `nblk`) and their equality are used, so a
family may have any number of threads.

A family is complete when three things hold: all its threads have been
created, all have been released (so none has a read in flight), and all
its writes are acknowledged.
`done_v` then pulses with the family number; this is the sync. The parent
is outside the core: it writes its globals and the initial values of its
shareds through the host port (`hw_*`). After the sync it reads the final
shareds through `hr_*`.

## Memory interface

Every request carries a tag (`svp_pkg::mem_tag_t`): a 2-bit kind and an
index.

| Kind | Index | Response |
|---|---|---|
| I-cache read | I-cache line | the whole 64-byte line |
| D-cache read | D-cache line | the whole 64-byte line |
| write | family number | an acknowledgement only |

Responses may come back in any order. The tag alone routes each response
to the I-cache, to the D-cache or to the family's write counter. The core
sends at most one request per cycle, I-cache reads first. A request is
handed over in a cycle where `mem_req_v` and `mem_req_ready` are both
high.

## Instruction set

The core executes a subset of the Alpha integer ISA, with the standard
encodings:

- **operate:** ADDQ, SUBQ, S8ADDQ, CMPEQ, CMPLT, CMPULT, AND, BIS, XOR,
  SLL, SRL, MULQ. Each takes either a register or an 8-bit literal.
- **memory:** LDA, LDL (4 bytes, sign-extended), LDQ, STQ. Addresses are
  aligned by dropping their low bits.
- **branches:** BR, BEQ, BNE.

Any other opcode executes as a no-op. An assertion flags an operate
instruction outside the subset. There is no floating point.

Example: the Fibonacci family, with S=2 and no globals or locals. Registers
r0 and r1 are the shareds and r2 and r3 the dependents:

```
  ADDQ r2, r3, r0      ; f1_out = f1_in + f2_in
  BIS  r31, r2, r1     ; f2_out = f1_in                     [END]
```

Create it with indices 2..9 (start 2, limit 10), with both parent shareds
set to 1. After the sync the parent's first shared holds 55.

## Files

| File | Contents |
|---|---|
| `rtl/svp_pkg.sv` | sizes, register states, annotations, tags, thread entry, window, event vector |
| `rtl/svp_core.sv` | top: pipeline, list plumbing, arbitration, memory routing |
| `rtl/svp_reg_file.sv` | registers with state bits and suspended lists |
| `rtl/svp_thread_table.sv` | thread entries and the free, Ready and Active lists |
| `rtl/svp_family_table.sv` | families, creation process, context release, completion |
| `rtl/svp_icache.sv` | I-cache with waiting lists and reference counters |
| `rtl/svp_dcache.sv` | D-cache with register lists, walker and store buffer |
| `rtl/svp_reg_map.sv` | register window translation |
| `rtl/svp_annot_decode.sv` | instruction and annotation extraction |
| `rtl/svp_alu.sv` | integer operate instructions |
| `tb/svp_mem_model.sv` | behavioural memory: random latency, out-of-order answers |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_svp_workloads.sv` | the two linear kernels at 65,536 elements |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_svp_core \
    rtl/svp_pkg.sv rtl/svp_*.sv tb/svp_mem_model.sv tb/tb_svp_core.sv
./obj_dir/Vtb_svp_core
```

For another block, use its testbench as the top. Only `tb_svp_core` and
`tb_svp_workloads` need `tb/svp_mem_model.sv`.

`tb_svp_core` runs the core at its full size against the memory model.
Five families run at the same time:

- a linear inner product over 100 elements, with the sum carried through a
  shared;
- the Fibonacci family, whose body crosses a line boundary;
- a linear in-place prefix sum over 64 elements, with stores;
- four threads that each run a counting loop;
- sixteen threads that each load the upper, sign-extended half of one
  element (LDL) into their outgoing shared and end at once. Their contexts
  must wait for the loads, and the parent ends up with the value from the
  last element.

It checks every result against values computed in the testbench. It also
counts the core's event pulses (`ev`) and fails if any mechanism never
occurred. The mechanisms are:

- switches on SWCH, END, end of line and branch;
- suspend and wake;
- I-cache hit, miss, join and fill;
- D-cache hit, miss and join;
- stores and port stalls;
- creation, release, a release held back by an outstanding read, and
  completion.

The whole run takes about 1,950 cycles.

`tb_svp_workloads` runs two long kernels on the full-size core, one after
the other. Each is one family of 65,536 threads with the running sum
passed along a shared channel:

- a linear inner product;
- a linear in-place prefix sum.

Both use integer arithmetic, since there is no FPU. The test checks the
results and every stored element, and it requires each run to stay under
16 cycles per thread. With the memory model's latency of 20 to 60 cycles,
one run gave:

| Kernel | Cycles | Instructions | Instructions per cycle |
|---|---|---|---|
| inner product | 723,034 | 393,216 | 0.54 |
| prefix sum | 812,896 | 327,680 | 0.40 |

What limits both is the dependency chain. A family holds at most 16
contexts, so at most 16 threads have loads in flight at once. The sum also
has to pass from thread to thread through the shared register. The whole
simulation takes a few seconds.

The block testbenches check:

| Testbench | Checks |
|---|---|
| `tb_svp_reg_file` | suspended lists, wake-up and load records, plus random traffic against a model |
| `tb_svp_thread_table` | list traffic against queue models, splicing of a linked chain |
| `tb_svp_family_table` | entries, register initialisation, the release rule and completion |
| `tb_svp_icache`, `tb_svp_dcache` | list building, activation or walk, replacement limits, stores |
| `tb_svp_reg_map`, `tb_svp_annot_decode`, `tb_svp_alu` | comparison with reference formulas |

## What is and is not here

**Follows the description of the core:**

- the thread lists and how threads move between them;
- the switch conditions and the SWCH/END annotations, packed in word 0;
- the register states, with suspended lists and load records kept in the
  registers;
- the four-class register window and the round-robin contexts;
- I-cache waiting lists and reference counters;
- D-cache register lists;
- the two-bit-kind memory tags and write acknowledgement;
- counters of outstanding writes (per family) and reads (per thread
  context);
- the core sizes.

**Choices made here:**

- The pipeline is one stage that runs one instruction per cycle. There are
  no separate Fetch, Decode, Read or Execute stages, so no flush is ever
  needed and SWCH serves only to switch threads.
- The instruction subset.
- Family creation and sync are ports, not instructions, because the
  encodings of the SVP instructions are not part of this design.
- Register contexts are given by the creator (`ctxbase`, `nblk`); there is
  no allocator.
- A context is released only after its successor has terminated as well.
- Limits are exclusive and steps positive.
- The encodings and priorities described above.
- Write-through, no-allocate stores through a one-entry buffer.
- Lowest-free-way replacement.
- Writes are counted per family. Reads are counted per register context,
  and that count holds back the context's release.

**Not built:**

- floating point (FPU and FP registers);
- forced termination of a family, and the per-family membership list it
  would use;
- the memory hierarchy behind the core (L2 caches, on-chip directory
  rings, DRAM channels). A behavioural model stands in for it in
  simulation.
- the many-core chip: places, exclusive places, and the spreading of a
  family over several cores.

**Known simplifications to keep in mind when changing the design:**

- Only one thread table entry can be written per cycle for each field.
- A register written by the pipeline while a load to it is outstanding
  will later be overwritten by the load.
- A store to a line whose read is in flight is not merged into the
  arriving data.

Compilers are expected to avoid the last two cases.
