# nMPRA-MT: a MIPS-style pipeline whose scheduler is hardware

A real-time operating system spends time, and adds jitter, every time it
switches tasks. It saves registers, picks the next task in software, and
restores that task's state. This design removes both costs:

- Every task (a *thread*) gets its own program counter and register file in
  hardware.
- A hardware scheduler engine (the *nHSE*) decides, on every clock, which
  thread's next instruction enters a shared five-stage pipeline.

A thread switch therefore costs nothing. The pipeline simply fetches for a
different thread on the next clock. It is fine-grained multithreading, with a
scheduler built for hard real-time work:

- **Hard threads (HT)** get a fixed issue rate whose timing is known at
  compile time.
- **Soft threads (ST)** use the slots the hard threads leave free.
- Interrupts, a periodic timer, a watchdog and two deadline counters are
  *events attached to threads*, not interrupts of the pipeline. An event wakes
  the thread it belongs to and takes that thread's priority.

The processor runs a subset of the MIPS-I integer instructions, plus three
instructions that talk to the scheduler (`MTS`, `MFS`, `WAIT`).

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, except for the
assertions. By default it has 16 threads.

## Threads, priorities and states

Threads are numbered from 0 to `N_THREADS-1`. **The number is the
priority**: 0 is the highest. Each thread has:

| Register | Contents |
|---|---|
| ID | `{type, number}`. The type is 1 for HT and 0 for ST. |
| STATE | `IDLE` (not scheduled), `ACTIVE` (runnable) or `SLEEP` (waiting for an event) |
| PC | its own program counter, reset to `RESET_PC + i*PC_STRIDE` |
| register file | 32 x 32 bits. r0 always reads 0. |
| event registers | enable mask, pending bits, and timer, watchdog and deadline counters |

At reset the scheduler is **off**. Only thread 0, which is a hard thread, is
active, and it issues on every clock. Thread 0 then acts as the boot and
configuration code:

1. It sets the other threads' types.
2. It sets their states and event masks.
3. It writes the scheduler-enable bit.

From that point on the scheduler interleaves all ready threads.

## The shared, thread-tagged pipeline

```
 select ─► IF ─► ID ─────────► EX ────────► MEM ────► WB
 (nHSE)    imem   decode, RF     ALU, fwd    dmem      RF write
                  branch/jump    MTS / MFS   LW / SW
                  WAIT
```

There is one datapath, one ALU, one control unit, one hazard unit and one
forwarding unit. Every pipeline register (IF/ID, ID/EX, EX/MEM, MEM/WB)
carries a valid bit and the **5-bit number of the thread** that owns the
instruction. That tag does three jobs:

- It picks the register file that is read in ID and written in WB.
- It picks the PC that is changed when a branch resolves.
- It decides whether two instructions in flight depend on each other.
  Forwarding and stalling only ever happen between instructions of the
  **same** thread.

`regfile_bank` holds all the register files as one memory indexed by
`{thread, register}`. It writes before it reads, so an instruction in ID
sees a value written by WB in the same clock.

### Selecting the PC

`pc_unit` holds one PC per thread. Each clock it computes every thread's
next PC from two sources:

- The fetch adder: PC + 4, for the thread that was just fetched.
- The ID stage, which can change the PC of the thread it is decoding to one
  of:
  - the branch target, or the address after a `WAIT`
  - the `J`/`JAL` target
  - the `JR` target
  - the exception address

The scheduler's choice then steers the chosen thread's next PC into the
single fetch register. The scheduler supplies a valid bit and a thread
number; these are `en_PC_decode` and `nHSE_PC_select` in the architecture's
terms. Because the *next* PC is used, rather than the stored one, one thread
can be fetched on consecutive clocks when it runs alone.

Branches (`BEQ`, `BNE`), jumps (`J`, `JAL`, `JR`) and `WAIT` all resolve in
ID. There is **no branch delay slot**. An undefined instruction sends its
thread to `EXC_PC` and is dropped.

## How the scheduler chooses a thread

This is the heart of the design (`nhse_scheduler`). Each clock it looks at:

- which threads are *ready*: ACTIVE, or SLEEP with an enabled event pending
- which of them are hard threads
- which were *just woken* by an event

It then makes three decisions.

**1. The interleave set.** The set holds at most `MAX_ILV` = 4 threads: the
ready threads with the lowest numbers. A low-priority thread therefore runs
only when fewer than four higher-priority threads are ready.

**2. The slot pattern.**

- *Exactly one HT in the set.* The HT takes every second slot. The soft
  threads of the set take the other slots round-robin. If the set has no ST,
  the other slot is a bubble. The HT's instructions are therefore always
  exactly two clocks apart, whatever the soft threads do.
- *Any other mix.* The members are issued round-robin, one per slot.

The set can switch between the two patterns from one clock to the next, as
threads fall asleep or wake. Two rules keep that switch safe:

- Plain round-robin and the ST slots each keep their own round-robin
  pointer.
- The HT/ST phase always follows the kind of thread issued last.

So a set change never gives one thread two consecutive slots.

Together these rules give the per-thread spacing (clocks between two
instructions of the same thread) of the configuration table the design is
built around:

| threads in the set | HT | ST | HT spacing | ST spacing | forwarding configuration |
|---|---|---|---|---|---|
| 1 | 0 | 1 | – | 1 | UFW1 |
| 2 | 2 | 0 | 2 | – | UFW2 |
| 2 | 1 | 1 | 2 | 2 | UFW3 |
| 3 | 1 | 2 | 2 | 4 | UFW4 |
| 2 | 0 | 2 | – | 2 | UFW2 |
| 4 | 2 | 2 | 4 | 4 | NO FW |
| 4 | 4 | 0 | 4 | – | NO FW |
| 4 | 0 | 4 | – | 4 | NO FW |

A single HT alone in the set is issued every second clock, and the clocks in
between are bubbles. The design reports this case as UFW2.

**3. Urgent dispatch.** A thread woken by an event in the current clock takes
the slot at once, and the round-robin resumes after it. If several threads
were woken, the one with the highest priority goes first. When the set holds
a single HT, an urgent thread may only take an ST slot. An urgent HT then
treats that slot as its own, so the two-clock spacing is never broken.

The result is a short, known response time. The interrupt line is sampled at
one clock edge, which sets the pending bit. The woken thread is chosen during
the next clock and fetched at the edge after that. From an asynchronous
interrupt edge to the fetch, this takes between one and two clocks, about 1.5
on average. The architecture's stated bound is "not more than 1.5 clock
cycles".

When the pipeline stalls (see below), the scheduler repeats its choice. It
does not advance its round-robin position or its HT/ST phase.

`en_pipeline_thread` is the one-hot form of the choice, with one bit per
thread. An assertion checks that it is one-hot.

## Hazards when threads are interleaved

Interleaving is also what makes the pipeline predictable. If a thread's
instructions are at least two clocks apart, then:

- its result from EX is already in MEM when its next instruction reaches ID
  (a branch can compare it there)
- a load's data is already available when the next instruction needs it in
  EX

So a thread that is scheduled with spacing ≥ 2 **never stalls and never
loses a fetched instruction**. Only a thread that runs alone and issues on
every clock (UFW1) behaves like a classic MIPS pipeline:

| situation (same thread, consecutive clocks) | what happens |
|---|---|
| ALU result needed by the next instruction in EX | forwarded from EX/MEM |
| result two instructions back | forwarded from MEM/WB |
| `LW` followed by a user of the loaded register | 1-clock stall |
| branch or `JR` reading a register computed by the instruction just before it | 1-clock stall, then the value is forwarded from MEM into ID |
| taken branch, jump or `WAIT` in ID | the wrong-path instruction already fetched for this thread is flushed |

The stall and flush signals, and every forwarding comparison, compare thread
tags. An instruction of thread 3 is never stalled by, or forwarded from, an
instruction of thread 5. `forward_unit` also reports which configuration of
the table above is in use (`fw_cfg`). One set of tag-matched paths serves all
of them; with spacing 4 (NO FW) the paths are simply never used.

## Events and waking

Each thread has five event sources (`nhse_events`):

| bit | source | behaviour |
|---|---|---|
| 0 | interrupt | rising edge of `irq[i]`, sampled by one flip-flop |
| 1 | timer | periodic: fires every *P* clocks after the period *P* is written |
| 2 | watchdog | one-shot: fires *V* clocks after the last write of *V* ("kick") |
| 3 | deadline 1 | one-shot alarm, fires *V* clocks after the write |
| 4 | deadline 2 | one-shot fault, same counting as deadline 1 |

Writing 0 switches a counter off. A firing source sets its **pending** bit.
A thread *wakes* when `pending & enable` is not zero.

`WAIT` (resolved in ID) behaves as follows:

- If the thread already has an enabled event pending, `WAIT` does nothing.
  Otherwise the thread goes from ACTIVE to SLEEP.
- The thread's PC moves past the `WAIT`, so execution resumes with the next
  instruction once the thread wakes.
- Pending bits are **not** cleared by waking. Software clears them by writing
  1s to the pending register, normally right after waking and before the next
  `WAIT`.

## Scheduler instructions and register map

All three instructions use MIPS opcode `0x1C` in I-format. The 16-bit
immediate is split into fields:

```
 31    26 25  21 20  16 15    12 11     8 7   5 4      0
| 0x1C   | 0    |  rt  | sub-op | sreg   | 0   | thread |
```

| sub-op | mnemonic | effect |
|---|---|---|
| 0 | `MTS rt, sreg, thread` | scheduler register `sreg` of `thread` ← `rt` (in EX) |
| 1 | `MFS rt, sreg, thread` | `rt` ← scheduler register `sreg` of `thread` (in EX, forwarded like an ALU result) |
| 2 | `WAIT` | sleep the issuing thread until an enabled event is pending |

| sreg | name | meaning |
|---|---|---|
| 0 | CTRL | bit 0: scheduler enable (global; the thread field is ignored) |
| 1 | STATE | 0 idle, 1 active, 2 sleep |
| 2 | TYPE | bit 0: 1 = hard thread |
| 3 | EVEN | event enable mask (bits 4:0, as in the event table) |
| 4 | TIMER | timer period; 0 = off |
| 5 | WDT | watchdog value; a write restarts it |
| 6 | DL1 | deadline 1 value |
| 7 | DL2 | deadline 2 value |
| 8 | EVPND | pending events; writing 1s clears |
| 9 | ID | read only: `{type, thread number}` |

The ordinary instructions are:

- **R-type:** `ADD(U) SUB(U) AND OR XOR NOR SLT(U) SLL SRL SRA SLLV SRLV SRAV JR`
- **I-type:** `ADDI(U) SLTI(U) ANDI ORI XORI LUI LW SW BEQ BNE`
- **Jumps:** `J JAL`

There are no overflow traps and no byte or half-word accesses.

## Where this design departs from, or adds to, the original architecture

These points follow the original architecture:

- one PC and one register file per thread
- the four thread-tagged pipeline registers
- the PC selection driven by the scheduler's valid bit and thread number
- the five event sources attached to threads
- the ID and STATE registers
- priority equal to thread number
- power-up with only HT0 running
- the per-configuration spacing of the table above

These points are this design's own:

- **Pipeline registers are shared and tagged, not replicated per thread.**
  The original multi-tasking core keeps a separate set of pipeline registers
  for every task. That is needed when a task's in-flight instructions are
  frozen while another task runs. Here, instructions in flight always drain,
  so one tagged set gives the same behaviour with much less storage. The
  per-thread state is then a PC and a register file: 132 bytes per thread.
- **The scheduling rules** (set of four chosen by priority, the HT
  every-second-slot rule, round-robin, urgent dispatch) are chosen to
  reproduce the spacing in the table. The original gives the spacings but not
  the rules.
- **The forwarding configurations** UFW1 to UFW4 and NO FW are one set of
  tag-matched forwarding paths plus a configuration report. They are not
  separate units.
- **The encodings** of the scheduler instructions and registers, the counter
  semantics, and the write-1-to-clear pending bits.
- **Branches resolve in ID**, with no delay slot.
- **Exceptions:** only undefined instructions raise one. They are sent to
  `EXC_PC`, and the cause is not recorded.
- **Memories** are 1024-word instruction and data memories with
  combinational read, shared by all threads. There are no wait states, so the
  original's longer response time when the CPU is accessing external memory
  does not arise.
- **One clock** runs both the pipeline and the scheduler engine.
- **Interrupt sampling:** the interrupt input is sampled by a single
  flip-flop, chosen for response time. Put a synchronizer in front of it if
  `irq` is truly asynchronous.
- **Register file sizing:** the register file is not sized for nesting
  levels. Each thread has exactly one file.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_THREADS` | 16 | threads (≤ 32, the tag is 5 bits) |
| `MAX_ILV` | 4 | largest interleave set |
| `IMEM_WORDS`, `DMEM_WORDS` | 1024 | memory sizes in 32-bit words |
| `RESET_PC`, `PC_STRIDE` | 0, 0x100 | thread *i* starts at `RESET_PC + i*PC_STRIDE` |
| `EXC_PC` | 0xFF0 | exception target |

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `mt_pkg` | types, opcodes, register map |
| `nmpra_mt` | top level |
| `pc_unit` | program counters and the fetch register |
| `instr_mem` | instruction memory |
| `regfile_bank` | register files |
| `pipe_stage_reg` | tagged pipeline register |
| `control_unit` | instruction decode |
| `alu` | ALU |
| `hazard_unit` | stall and flush |
| `forward_unit` | forwarding and configuration report |
| `data_mem` | data memory |
| `nhse` | scheduler engine, wrapping `nhse_events`, `nhse_thread_regs` and `nhse_scheduler` |

`tb/` holds one self-checking testbench per module, plus `mt_asm_pkg`, an
instruction encoder that the processor test uses to write its programs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mt_pkg.sv tb/mt_asm_pkg.sv rtl/*.sv tb/tb_nmpra_mt.sv \
  --top-module tb_nmpra_mt -o sim
./obj_dir/sim
```

Use the same command with another `tb_<module>` to test one unit. Every
testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself after
a fixed number of cycles if something hangs.

`tb_nmpra_mt` runs the processor at its default size: 16 threads, every
parameter at its default. It loads five programs:

- **Thread 0, run alone:**
  - tests forwarding, a load-use stall, and a branch stall with a flush
  - configures thread 1 as a hard thread and threads 2 and 3 as soft threads
  - enables its own interrupt and the scheduler
  - sleeps with `WAIT`
- **Threads 1, 2 and 3:**
  - compute sums in parallel, each with a different length, so the
    interleave set changes from 4 threads down to 1
  - then sleep on the timer (thread 1, three periods), deadline 1 and then
    deadline 2 (thread 2), and the watchdog (thread 3)
  - after each wake, store the pending event bits, and at the end a done
    marker
- **Thread 0, woken by `irq[0]`:** runs an undefined instruction, whose
  handler at `EXC_PC` stores a marker.

The testbench checks:

- every stored result: sums, the event that woke each thread, the number of
  timer wakes
- the hard thread's spacing: whenever thread 1 is the only hard thread in
  the set, it must be chosen on every second clock
- that no stall occurs outside the single-thread configuration
- the interrupt response: the woken thread must be fetched one clock after
  the sampling edge

It also counts every mechanism and fails if one never occurred:

- each forwarding configuration
- each event source
- stalls, flushes, EX and ID forwarding
- `WAIT`, waking, urgent dispatch, the exception

It needs about 1400 clocks. The scheduler's own testbench (`tb_nhse_scheduler`)
checks the spacing of every row of the configuration table, and
`tb_nhse_events` checks the exact clock on which each event source fires.

`tb_nmpra_mt_threads` also runs at the default size, and uses all 16 threads
at once:

- Thread 0 makes threads 1 and 9 hard threads, then starts threads 1 to 15.
- Each of threads 1 to 15 computes a sum and then sleeps for good.
- On every clock, the testbench checks that the chosen thread is one of the
  four highest-priority ready threads.
- It also checks that the set size, the HT/ST mix and the forwarding
  configuration are consistent.
- Finally, it checks that no thread issues twice in a row, and that nothing
  stalls, while more than one thread is interleaved.

All 15 testbenches pass. For each module, a copy with a deliberate bug (for
example, forwarding that ignores thread tags, or a timer that reloads one
clock early) makes its testbench fail.
