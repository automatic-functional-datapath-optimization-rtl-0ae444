# Pipelined, multithreaded and FAME-partitioned datapaths in SystemVerilog

The idea behind this design is that a designer writes only a plain,
single-cycle, functionally correct datapath, and a tool adds pipelining,
multithreading or FPGA-emulation partitioning to it. That tool adds
control logic that follows fixed rules. This repository gives that control
logic as synthesizable SystemVerilog. It also gives three example designs
that show the logic at work:

* **A multithreaded, three-stage, in-order RISC core** (`mt_risc`). It is laid
  out the way an automatic pipelining and multithreading transformation would
  lay out a single-cycle core. The architectural state and the ports exist
  once per thread. The combinational logic exists once. Generated-style
  control keeps every thread equal, token for token, to its own copy of the
  unpipelined core.
* **FAME partitioning** (`fame1_system`, `fame5_system`). This is a way to
  emulate a design on a host such as an FPGA. A target design made of modules
  joined by registers and queues is cut at those registers and queues. Each
  module then runs its *target* clock only when its input tokens are present
  and its output buffers have room. The host may take any number of cycles
  per target cycle, yet every module still does exactly what it does in the
  original design. `fame5_system` also shows the multithreaded (FAME5) form
  of a module: one host module runs several copies of the target module.
* **A speculated register read port** (`spec_seq`). This is a small
  multithreaded, pipelined sequencer. Its PC-like register is read early, on a
  guess, and its wrong guesses are detected and cleaned up by kills.

`afdo_top` puts the core, the FAME1 system, the FAME5 system and the
speculation example side by side. They share only the clock and reset.

## Files

| file | contents |
|---|---|
| `rtl/afdo_pkg.sv` | widths, instruction encoding and decoder of the example core, hazard-mode enum |
| `rtl/pipe_ctrl.sv` | valid / was-valid / stall / fire generation for an interlocked pipeline |
| `rtl/thread_sched.sv` | fixed (counter) or dynamic (round-robin over eligible threads) scheduler |
| `rtl/icache_vlu.sv` | instruction cache timing model behind a variable latency interface |
| `rtl/mt_risc.sv` | the multithreaded core |
| `rtl/fame_reg.sv` | FAME Register: FIFO of register-value tokens |
| `rtl/tgt_queue.sv` | plain queue with a target clock enable |
| `rtl/fame_queue.sv` | FAME Queue: a target queue stepped once per pair of host tokens |
| `rtl/fame_ex_pkg.sv`, `rtl/tgt_a.sv`, `rtl/tgt_b.sv` | the two small target modules of the FAME example |
| `rtl/fame1_system.sv` | FAME1 form of the two-module example |
| `rtl/fame5_b.sv`, `rtl/fame5_system.sv` | FAME5 (multithreaded) form of module B and a system using it |
| `rtl/spec_seq.sv` | speculation example: speculative clone, read mux, mis-speculation detection and kills |
| `rtl/afdo_top.sv` | top level |
| `tb/*.sv` | self-checking testbenches, the reference models and the test program |

## The pipeline control rules

Think of a pipelined design as a series of *next-state updates* moving down
the stages. In a processor, each update is one instruction. Every stage `k`
holds at most one update. `pipe_ctrl` computes, for each stage:

```
was_valid[k]  stage k holds an update (stage 0: the scheduler offers one)
valid[k]    = was_valid[k] & ~hold[k] & ~kill[k]
stall[k]    = stall[k+1] | (was_valid[k+1] & hold[k+1] & ~kill[k+1]);  stall[last] = 0
fire[k]     = valid[k] & ~stall[k]
```

`hold[k]` means that stage k cannot act this cycle. This happens when one of
its read ports has a read-after-write hazard, when a ready/valid port it uses
is busy, or when a variable latency unit it uses has no answer yet. A held
stage keeps its update, because the stage in front of it stalls. It also
sends a bubble on to the next stage. A killed stage drops its update. The
datapath loads the pipeline register after stage `k` when `advance[k] =
~stall[k]`. Every state write, every handshake and every unit request of
stage `k` is qualified with `fire[k]`. So an update changes nothing until it
commits, and it commits exactly once.

A port is *busy* when the datapath wants it and the outside world is not
ready. An input port is busy when the datapath raises ready and valid is low.
An output port is busy when the datapath raises valid and ready is low. The
datapath's ready or valid goes out only when the stage fires. This is why
every port of the core is a ready/valid port: the core's timing changes with
the pipeline, so only the order of the tokens is defined.

### Hazards, interlock and bypass

A read port in stage X has a hazard against stage Y > X when Y holds an update
of the same thread that will write the same state element. For the register
file, that means the write is enabled and the register numbers match. The
default resolution is **interlock**: stage X is held until the writer has
left. The other choice is **bypass** (`RF_HAZ = HAZ_BYPASS`). The write data
is then muxed into the read port as soon as a later stage knows it. In this
core that is S2 for every instruction, and S1 for every instruction except a
load. Only a load followed at once by a use of its result still interlocks.

A third choice, **speculation**, is meant for a register such as a PC, whose
new value is known only late. It is described in its own section below.

### Threads

Every piece of architectural state is replicated `THREADS` times: PC, register
file, data memory, halt flag and the ports. Each thread also has its own
instruction cache. The thread number travels down the pipeline with the
update. It selects which copy a read port reads and which copy a write port
writes. Hazards are checked only between updates of the same thread.

* **Dynamic interleave** (`DYNAMIC = 1`, the default). Each cycle the scheduler
  picks the next thread after the last one that is not halted and not waiting
  for an instruction cache fill. When the cache answers "pending", the update
  in S0 is *killed*. The thread then waits out the fill while the other
  threads use the pipeline. The miss latency is hidden this way.
* **Fixed interleave** (`DYNAMIC = 0`, needs `THREADS >= 3`). A counter steps
  through the threads in order. With at least as many threads as stages, one
  thread never has two updates in flight. So no hazard logic is generated.
  When the cache answers "pending", S0 is held and the counter waits.

## The example core

The instruction set is 16 bits wide, with 8 registers of 16 bits (`r0` reads
as zero). Each thread has a 256-word data memory. All threads share one
256-word program memory, which is written through the `imem_*` port. The full
encoding is in `afdo_pkg.sv`. The instructions are: ADD, SUB, AND, OR, XOR,
SLT, ADDI, LW, SW, BEQ, BNE, LUI, JAL, IN, OUT and HALT. IN takes the next
token of the thread's input port. OUT sends a register on the thread's output
port.

| stage | contents |
|---|---|
| S0 | PC read and write, instruction cache request, decode, register reads (with hazard check and bypass), branch resolution, HALT |
| S1 | ALU, input port (IN) |
| S2 | data memory read and write, register write, output port (OUT) |

The PC is read and written in the same stage. So branches cost nothing and
the PC never has a hazard. A single thread can issue on back-to-back cycles,
stopped only by register hazards. With the default interlock, a dependent
instruction right behind its producer waits two cycles.

Each thread's **instruction cache** (`icache_vlu`) is a timing model only.
The instruction words always come from the program memory. A 16-bit LFSR
makes about one request in four miss (`MISS_BITS = 2`). After a miss, the
same request hits when repeated 4 cycles later (`MISS_LAT = 4`). Until then
`resp_pending` is high. The cache has no real tags, so hit and miss do not
depend on the program.

Reset is synchronous and active high. It clears the PCs, register files and
halt flags. The data and program memories are not reset.

## Speculation

`spec_seq` is a one-register datapath pipelined over three stages and
multithreaded with dynamic interleave (`THREADS = 2` by default):

| stage | contents |
|---|---|
| S0 | read `pc` (the speculated read port); update the clone `pc_spec` |
| S1 | read the jump table at `pc` |
| S2 | `next = jump ? target : pc + 1`; write `pc`; send the old `pc` out |

Each update reads `pc` two stages before the previous update writes it.
Interlocking (`SPEC = 0`) gives one token every three cycles. With
speculation (`SPEC = 1`, the default), the control logic works like this:

* **Clone register.** The datapath keeps a *speculative clone*, `pc_spec`.
  It has its own update rule, written like any other piece of datapath
  logic: `pc_spec <= value read + 1`, which guesses "no jump".
* **Read mux.** The read port returns `pc_spec`. The one exception is the
  first S0 cycle after a mis-speculation, when it returns the real `pc`.
  That re-synchronises the clone.
* **Detection.** The value each update read travels down the pipe with the
  update. When the write stage fires, its write data is compared with the
  value read by the next younger update. That is the update in S1, or the one
  in S0 if S1 holds a bubble.
* **Kill.** On a mismatch, every stage from the read stage up to the write
  stage is killed, not counting the write stage itself (here S0 and S1).
  The `mispredict` output pulses.
* **Threads.** `pc`, `pc_spec`, the re-sync flag and the output port exist
  once per thread. The thread number travels with the update. Detection
  compares only values of the same thread: the nearest younger update of the
  writing thread, in S1 or S0, or else the value that thread's next read will
  return. Only the stages that hold the writing thread's updates are killed.
  Killing another thread's update would leave that thread's clone one step
  ahead of its real state.

For one thread, a jump to any address other than `pc + 1` costs two
bubbles, and every other update issues back to back. With two threads the
updates of the two threads alternate. A mis-speculation then usually kills
only the writing thread's update in S0. The rule for where speculation is allowed:
no I/O port, variable latency unit, state write port or other speculated
port may sit between the read stage and the write stage, counting the read
stage. This is why the example core does *not* speculate its PC: its
instruction cache sits in the PC read stage. In `spec_seq` the output port
sits in the write stage, where the rule permits it.

## FAME partitioning

In the example target design, module A writes a register that B reads, and B
produces into a queue that A consumes. (`tgt_a` is a counter and accumulator;
`tgt_b` filters and forwards.) In the FAME1 form:

* the register becomes a `fame_reg`. This is a FIFO of tokens, one per target
  cycle, that starts with one token holding the register's reset value. A
  enqueues its output every target cycle, and B dequeues one token every
  target cycle.
* the queue becomes a `fame_queue`. It holds the target queue's state for one
  target cycle. Producer and consumer each fire once for that cycle, in any
  order. Then the queue steps.
* each module gets its own target clock enable:
  `fire = host_en & every input not host-empty & every output not host-full`.
  All of the module's state updates are gated by it.

In the FAME5 form (`fame5_b`), the state and the ports of B exist once per
copy, and B's logic exists once. A round-robin scheduler picks one copy each
host cycle. That copy fires when its inputs have tokens and its outputs have
room.

## Where this design departs from, or adds to, its source

* The instruction set, widths, memory sizes and stage placement of the core
  are its own. Only "a classic RISC machine with a 4-cycle-miss instruction
  cache behind a variable latency interface and a single-cycle data memory"
  is given.
* The stage count of the core is fixed at 3. The thread count, the interleave
  policy and the hazard mode are parameters. With fixed interleave only 3 or
  4 threads are legal.
* Speculation is shown only on its own example, `spec_seq`. Its datapath,
  its "no jump" guess, its thread start addresses, and the choice to kill only
  the mis-speculated thread's updates are this design's own.
* The core's instruction cache request is qualified by the contents and thread
  of S0, but not by the cache's own `resp_pending`. Qualifying it by that
  signal would form a combinational loop.
* The dynamic scheduler's policy (round robin over eligible threads) is its
  own. The source leaves that scheduler to the user.
* `fame_queue` lets the two sides of a queue be at most one target cycle
  apart. Tokens do not pile up beyond that, so in the examples a FAME
  Register never holds more than two tokens. The register depth is therefore
  2.
* The modules A and B of the FAME example, and the FAME5 thread count (4), are
  this design's own.
* Not built: the automatic placement and balancing of pipeline registers
  (these are tool algorithms, not hardware), and the FAME3 DRAM model and
  research processor that the FAME1 transform was first used with.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. To build and run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/afdo_pkg.sv rtl/fame_ex_pkg.sv tb/tb_risc_pkg.sv tb/tb_afdo_top.sv \
  --top-module tb_afdo_top
./obj_dir/Vtb_afdo_top
```

| testbench | what it checks |
|---|---|
| `tb_afdo_top` | the whole design at default parameters. The core runs the test kernel on both threads with random port timing and is checked token by token against an instruction-level model (`tb_risc_pkg`). The FAME1 and FAME5 systems are checked target cycle by target cycle against the unpartitioned design (`fame0_ref`). Every mechanism must occur at least once: interlock, cache kill and refetch, busy input and output ports, FAME Register full and empty, FAME Queue waits, FAME5 thread without tokens, mis-speculation kill. |
| `tb_mt_risc` | the core in four configurations: default, bypass, interlock with ideal ports, and fixed interleave with 3 threads. Output sequences must match; event counts; the bypass core interlocks only behind loads and needs fewer cycles; a missed fetch does not refetch before 4 cycles. |
| `tb_pipe_ctrl` | random holds and kills on 3 and 5 stages: updates leave in order and exactly once, held or killed stages never fire, and the latency is STAGES-1 without holds |
| `tb_thread_sched` | fixed counter sequence and dynamic round robin, both holding under stall |
| `tb_icache_vlu` | hit data, exact 4-cycle miss latency, `busy` during fills, miss rate |
| `tb_fame_reg`, `tb_fame_queue` | token FIFO and queue token exchange against models |
| `tb_fame1_system`, `tb_fame5` | partitioned systems against the unpartitioned reference |
| `tb_spec_seq` | speculating and interlocked sequencers, with one and two threads, against walks of the jump table. It checks every token and every mis-speculation pulse. With one thread, N tokens take exactly `N-1 + 2*mispredicts` cycles when speculating and `3*(N-1)` when interlocked. With two threads, speculation must be faster. |

To run your own program, write it through `imem_we/imem_waddr/imem_wdata`
while `rst` is high, then release reset. `risc_drv` in `tb/` shows how.
