# D2-CMP: a chip multiprocessor with hardware data-driven thread scheduling

Ordinary processors run threads in the order a program or an operating system
picks. In Data-Driven Multithreading (DDM), a thread may start only when every
thread that produces its inputs has finished. That rule is enforced by a small
hardware unit next to each core, the **Thread Synchronization Unit (TSU)**,
rather than by locks or barriers in software. The core stays unmodified. It
talks to its TSU with ordinary loads and stores to memory-mapped registers:

- when a thread finishes, the core tells the TSU which thread it was;
- when the core wants more work, it asks the TSU for the next thread whose
  inputs are all ready.

This repository holds synthesizable SystemVerilog for a two-node D2-CMP:

- two TSUs;
- the shared system bus that joins them to two processors and to a shared
  memory;
- a behavioural processor model and testbenches that run data-driven
  matrix-multiplication programs on it.

The processors (PowerPC 405 cores in the original FPGA prototype) and the
external memory are not part of the RTL. They connect through the top
module's bus ports.

## Threads, templates and the Thread#

A DDM program is a graph of threads. Each thread has a **template** in the
TSU's **Graph Memory (GM)**:

| field       | width | meaning |
|-------------|-------|---------|
| IFP         | 32    | instruction frame pointer: where the thread's code starts |
| DFP         | 32    | data frame pointer: where its data lives |
| Ready Count | 4     | how many producers must finish before it may run (so at most 15) |
| Consumer 1  | 16    | Thread# of a thread that depends on this one (0 = none) |
| Consumer 2  | 16    | second consumer, or a pointer to a consumer list (see below) |

A **Thread#** is 16 bits wide and split into two parts:

- The low `log2(GM_DEPTH)` bits (8 at the default 256 entries) are
  `{Block, ThreadID}`. They select the template.
- The bits above them are the **Context**. Software sets the Context at run
  time to tell apart several invocations of the same code.

A consumer field whose Context bits are zero names a thread in the
producer's own invocation: the consumer inherits the producer's Context. A
consumer field with a non-zero Context is used exactly as written. To start
a new invocation of a code block, software writes an acknowledgement for a
thread of that block under a fresh Context. That thread is typically a start
thread that never runs itself. Its consumers, and their consumers in turn,
then all carry the new Context.

Each running instance also carries a 16-bit **Index**, normally a loop
iteration. Consumers are always updated for the producer's Index. So the
same template can have many instances in flight, one per Index, each with
its own Ready Count.

## Where the Ready Counts live: the Synchronization Memory

The GM's Ready Count is only the starting value. The count that is actually
decremented lives in the **Synchronization Memory (SM)**, a 64-entry
content-addressable memory keyed by `{Thread#, Index}`. The **mapping unit**
compares the key with every entry in parallel, and also gives the lowest
free entry.

When a producer finishes and one of its consumers must be updated:

1. **Hit.** The SM already holds the instance. Its count is decremented.
2. **Miss.** The instance is created. It starts from the GM Ready Count and
   is decremented once.
3. **Count reaches zero.** The instance is ready and the SM entry is freed.
   A consumer whose Ready Count is 0 or 1 therefore never occupies an entry.
4. **Count still above zero.** It is written back, into a newly allocated
   entry if this was a miss.

Software may also preload entries. It writes `SM_KEY`, then the count to
`SM_LOAD`, for instance to set up the counts of a whole block before it
starts. A load of count 0 frees the entry. A load is carried out only when
no acknowledgement is waiting in the AQ. It therefore takes effect after
every acknowledgement written before it.

## Consumers: two fields, a list, and switch threads

A thread with one or two consumers names them directly. A thread with more
consumers sets Consumer 1 to 0 and puts in Consumer 2 a word address in the
**consumer-list memory** (`CL_DEPTH` = 256 words). That list holds one Thread#
per word and ends with a zero word. The **Consumer Select Unit** turns a
template into a stream of consumers, one at a time, and walks lists word by
word.

The producer's **Status**, written with its acknowledgement, selects which
consumers are updated. This is how a *switch* thread (an `if` or a loop exit)
picks its successor:

| Status | value | consumers updated |
|--------|-------|-------------------|
| ALL    | 0     | both fields, or the whole list |
| CONS1  | 1     | consumer 1 only |
| CONS2  | 2     | consumer 2 only |
| NONE   | 3     | nobody |

A list is always walked in full.

## Inside a TSU

```
 bus ─► tsu_bus_if ─┬─► AqTNum/AqStat/AqIndx ─► AQ ─┐
                    │                               ▼
                    │          Post Processing Unit (PPU)
                    │   GM port A (consumers, Ready Count)
                    │   Consumer Select Unit + consumer list
                    │   SM + mapping unit (decrement, test for 0)
                    │                               │ ready {Thread#, Index}
                    │                               ▼
                    │                              WQ
                    │                               │
                    │          Thread Issue Unit (TIU)
                    │   GM port B (IFP, DFP)
                    │                               ▼
                    └◄── RqTNum/RqIndx/RqIptr/RqDptr ◄─ FQ (Ready Queue)
```

The **PPU** (`post_processing_unit`) takes one acknowledgement at a time from
the 16-entry **Acknowledgement Queue (AQ)**:

1. it reads the producer's consumer fields from the GM;
2. it runs the consumers through the Consumer Select Unit;
3. it updates each consumer in the SM;
4. it pushes every consumer that became ready into the 16-entry **Waiting
   Queue (WQ)**.

It stalls, holding its state, while the WQ is full or while it needs a new
SM entry and none is free.

The **TIU** (`thread_issue_unit`) runs at the same time as the PPU. It:

1. takes ready threads from the WQ;
2. fetches their IFP and DFP through the GM's second read port;
3. places `{Thread#, Index, IFP, DFP}` in the 16-entry **Firing Queue (FQ)**.

The head of the FQ is what the processor sees as the **Ready Queue**. The TIU
issues one thread per cycle when nothing blocks it.

The GM (`graph_memory`) is one memory with one write port (written from the
bus) and two synchronous read ports. A 32-bit cycle counter
(`cycle_counter`) lets software time code regions.

### Cycle counts (TSU clock)

| path | cycles |
|------|--------|
| bus write of `AqIndx` → ready thread at the head of the Ready Queue (one consumer, count 1) | 7 |
| PPU, acknowledgement taken from the AQ → consumer in the WQ | 3, plus 2 per further consumer, plus 1 per list word read |
| TIU, WQ → FQ | 3 latency, 1 thread per cycle throughput |

In the original prototype the processor ran at twice the TSU/bus clock.

With the behavioural processor of the testbenches, every access of which
costs a bus transfer, 256 multiply-and-accumulates on one node take these
times (TSU cycles, both nodes running the same job at once):

| points per thread | threads | cycles |
|-------------------|---------|--------|
| 2                 | 128     | 16,242 |
| 4                 | 64      | 9,498  |
| 8                 | 32      | 6,342  |
| 16                | 16      | 4,854  |

The FFT test shows the same trend: 78,460 cycles at 1 butterfly per
thread, then 54,284, 43,404 and 38,444, down to 35,996 at 16.

The per-thread cost (Ready Queue reads, acknowledgement writes, and the
fork/join threads) is amortised as threads grow. The absolute numbers
describe the model processor, not a real core with caches.

## Register map and the software protocol

TSU `n` occupies 16 KiB at `0xC000_0000 + n*0x4000`. Every other address
goes to the shared memory. The offsets below are word offsets: byte address
= base + 4·offset.

| offset | access | register |
|--------|--------|----------|
| 0x000 | W | `AqTNum`: Thread# of the finished thread |
| 0x001 | W | `AqStat`: its Status |
| 0x002 | W | `AqIndx`: its Index; this write pushes the AQ entry |
| 0x004 | R | `RqTNum`: Thread# at the Ready Queue head (0 if empty) |
| 0x005 | R | `RqIndx`: Index at the head |
| 0x006 | R | `RqIptr`: IFP at the head; **this read pops the head** (0 if empty) |
| 0x007 | R | `RqDptr`: DFP at the head |
| 0x008 | R | status: bit0 Ready Queue not empty, bit1 AQ full, bit2 AQ empty, bit3 SM full, bit4 TSU idle, bit5 counter running, [15:8] FQ count, [23:16] WQ count |
| 0x009 | W | cycle counter control: bit0 run, bit1 clear |
| 0x00A | R | cycle counter value |
| 0x00B | R | occupancy: [15:0] SM entries in use, [31:16] AQ entries |
| 0x00C | W | `SM_KEY`: `{Thread#, Index}` for an SM load |
| 0x00D | W | `SM_LOAD`: Ready Count; loads the SM entry (waits while the PPU is busy) |
| 0x400 + 4e + f | W | GM entry `e`, field `f`: 0 IFP, 1 DFP, 2 `{Consumer1, Consumer2}`, 3 Ready Count |
| 0x800 + i | W | consumer-list word `i` |

A processor's scheduling loop looks like this:

```
loop:  t = RqTNum            ; 0 → nothing ready yet, poll again
       x = RqIndx; d = RqDptr
       p = RqIptr            ; pops the thread
       run code at p with data d and index x
       wait until (status & 2) == 0      ; AQ has room — see below
       AqTNum = t; AqStat = status; AqIndx = x
```

**The AQ-space check matters.** A write to `AqIndx` while the AQ is full is
not refused. The TSU holds it, and with it the shared bus, until there is
room. Now suppose the PPU is itself stalled because the WQ and the FQ are
full. That happens when one acknowledgement readies more than 32 threads,
for example a fork with 64 consumers. Only the processor can drain the FQ by
taking threads, and it is stuck in the held write. The result is deadlock.

Software must therefore read the status word and write an acknowledgement
only while bit 1 is clear. If the AQ is full, it keeps the acknowledgement,
takes the next ready thread, and retries later. The test processor model
does exactly this.

The SM has a similar limit. If all 64 entries hold instances that are still
waiting, and none of them can complete, the PPU waits forever. Programs must
keep their live instances within 64; the occupancy register shows how
many entries are in use.

## The bus and the top level

`system_bus` is a simple single-transfer bus. A master raises `valid`
with `we/addr/wdata` and holds the request until it sees `ack` for one
cycle; read data comes with the ack. The slave ignores the request in its
ack cycle, so the master may drop it or start a new one. Requesting
masters are granted in round-robin order. The grant is held until the
slave's ack, and `bus_contention` pulses when a grant is made while another
master is also waiting. Assertions check that masters hold their requests.

`d2cmp_top` has these parameters:

- `NODES` (default 2): one TSU per node, node `n`'s TSU at window `n`;
- sizes `GM_DEPTH`=256, `SM_ENTRIES`=64, `AQ_DEPTH`=`WQ_DEPTH`=`FQ_DEPTH`=16,
  `CL_DEPTH`=256.

Its ports:

- `cpu_req[NODES]`/`cpu_rsp[NODES]`: the processors' bus ports;
- `mem_req`/`mem_rsp`: the shared-memory port;
- `ev[NODES]`: per-TSU event strobes (ack, list word, SM hit, SM allocation,
  fire, stall, issue, held bus access);
- `bus_contention`.

Reset is asynchronous and active low. It clears all control state but not
the memory contents. The design uses a single clock, the bus/TSU clock.

## What follows the original design and what does not

**Taken from the original design:**

- the split of the TSU into a PPU and a TIU that run independently;
- the queues (AQ, WQ, FQ) and the register names;
- the GM with IFP, DFP, Ready Count and two consumer fields, with their
  widths;
- the SM as a CAM with a mapping unit, holding one entry per thread
  instance;
- the consumer-list rule for threads with more than two consumers;
- Thread# = {Context, Block, ThreadID};
- the sizes: GM 256, SM 64, queues 16;
- two nodes on one shared bus, with the TSU as a memory-mapped bus slave;
- loading of the GM and SM by the processor;
- the cycle counter.

**This design's own choices**, where the original gives no detail:

- all widths not listed above (16-bit Index, 2-bit Status) and the Status
  encoding;
- the Context split and Context inheritance;
- consumers inheriting the producer's Index;
- creating an SM instance from the GM Ready Count on its first update;
- the consumer-list format and its size;
- the register map and the pop-on-`RqIptr` rule;
- polling an empty Ready Queue (reads return 0) rather than blocking;
- holding an `AqIndx` write while the AQ is full;
- the bus protocol, round-robin arbitration and address map, which stand in
  for the vendor processor bus of the prototype.

**Different from the original:**

- The GM keeps the whole template per entry, about 100 bits. The
  prototype's quoted GM size corresponds to about 8 bytes per entry.
- There is no exchange of acknowledgements between TSUs. Each processor
  schedules only through its own TSU.
- The planned crossbar interconnect is not built.
- No DMA engine loads the TSU. The processor does it with bus writes.

## Testbenches

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
The block-level testbenches (the queues, GM, SM, mapping unit, Consumer
Select Unit, PPU and TIU) check against reference models written in the
testbench. `tb_tsu` builds a small thread graph with a fork, a join, a
consumer list and a switch. It runs the graph through a full TSU, checks the
7-cycle latency, and checks Context handling.

`tb/ddm_cpu.sv` is a behavioural processor. It:

1. writes input data to shared memory;
2. loads templates, consumer lists and an SM preload into its TSU;
3. runs a data-driven matrix multiplication;
4. times each job with the TSU's cycle counter.

Its thread graph has a start thread, then a fork thread whose consumer list
names all the multiply-and-accumulate (MAC) threads. Joins of 8 MAC threads
each follow (more per join when needed to stay within a Ready Count of 15),
then a switch thread that either starts the next iteration, by acknowledging
with Index+1, or ends at a return thread.

- `tb_d2cmp_top` runs the full-size two-node system (default parameters).
  - Node 0 runs a 1-point MAC thread, 8 threads of 16 points, and 64 threads
    of 4 points.
  - Node 1 runs a 16-point thread and 16 threads of 16 points.
  - Every job runs two iterations.
  - It checks every result and the thread counts, and requires that each
    mechanism happened at least once: consumer lists, SM hits, allocations,
    preloads, both switch outcomes, Ready Queue polling, bus contention,
    PPU stalls on a full WQ, and held-back acknowledgements.
- `tb_matmul_granularity` splits the same 256 MAC operations into threads of
  2, 4, 8 and 16 points (128 to 16 threads) on both nodes at once. It prints
  the cycles per job. One point per thread (256 threads) is not run: with one
  template per thread it needs more than the 256 GM entries.

- `tb_fft_granularity` runs a 256-point radix-2 FFT (8 stages of 128
  butterflies) with 1, 2, 4, 8 and 16 butterflies per thread. The stages are
  separated by a join/switch barrier and numbered by the Index, so the same
  templates serve every stage. Each result is compared with the same integer
  FFT computed directly.
- `tb_vecmat_contexts` runs a vector-matrix multiplication as two code
  blocks: an outer loop over columns whose `new_context` thread starts one
  invocation of an inner-loop block per column, each in its own Context.
  Several invocations are live at once with identical `{thread, Index}`
  pairs, and only the Context keeps their SM instances and data apart.
- `tb_d2cmp_4node` builds the top with four nodes (four processors, four
  TSUs) and runs a job on every node at once.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/d2cmp_pkg.sv tb/tb_d2cmp_top.sv --top-module tb_d2cmp_top
./obj_dir/Vtb_d2cmp_top
```

The testbenches use only two-state values and `$urandom`. They read no
files.

## Limitations

- Deadlock is possible in two cases, as described above:
  - if software writes `AqIndx` into a full AQ while more threads are ready
    than the WQ and FQ hold;
  - if the SM fills with instances that cannot complete.
- Consumers can only be updated for the producer's own Index. A thread
  cannot ready many Indexes of one template at once. Fan-out uses a consumer
  list of distinct templates, so a block is limited to 256 templates.
- The measured TSU latency cannot be compared cycle for cycle with the
  prototype's published figures: the prototype's processor and bus timing
  are not modelled.
