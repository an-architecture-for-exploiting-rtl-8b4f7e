# MLCA Control Processor: a superscalar core whose instructions are tasks

A superscalar processor finds parallelism in a sequential instruction stream:
it renames registers so that reuse of a name no longer orders two
instructions, starts each instruction as soon as its operands exist, and
commits results in program order. The Multi-Level Computing Architecture
(MLCA) applies the same idea one level up. The "instructions" are calls of
whole task functions, each running for hundreds to hundreds of thousands of
cycles on one of several processing units (PUs, soft processors). The
"registers" form a Universal Register File (URF) through which tasks pass
scalar values and pointers to each other. A sequential *control program*
lists task instructions (TIs) plus a few control instructions. The Control
Processor (CP) runs that program and keeps all PUs busy with tasks whose
inputs are ready. The programmer writes ordinary sequential code.

This repository holds synthesizable SystemVerilog for the CP, in the
configuration built for an 8-PU FPGA system. It also holds a testbench
environment in which behavioural PUs execute the tasks. The PUs, their
caches, the shared DDR2 memory and the bus are not part of the RTL.

Because tasks are long, no CP unit has to finish its work in one cycle.
Every unit is a small state machine that handles a task over several
cycles: a *macro stage*. The units run concurrently and are joined by
FIFOs, so a stall in one unit does not stall its neighbours at once. The
CP only has to keep up with the PUs on average. The sizing rule behind the
design is:

* tasks of about 1000 cycles, 8 PUs and 10 inputs plus 10 outputs per task;
* that means one task every 125 cycles;
* and one output register every 12 cycles.

## Programming model

A control program is made of 128-bit words held in an on-chip program
memory (1024 words). The opcode is in bits [127:124].

| Instruction | Fields | Meaning |
|---|---|---|
| `TASK` | [123:108] task ID; [106:100] number of inputs; [99:93] number of outputs; [92] writes a CR; [91:87] that CR | Run task function *ID*. Its operand list follows in ⌈(in+out)/16⌉ words: 8 bits per URF register, inputs first, slot *j* in bits [8j+7:8j]. |
| `MOVI` | [123:119] CR; [31:0] immediate | Set a control register. |
| `JMPA` | [9:0] target | Jump. |
| `JZ` / `JNZ` | [123:119] CR; [9:0] target | Jump if the CR is zero / non-zero. |
| `STOP` | | Stop fetching. |

Sizes:

* There are 256 URF registers and 32 control registers (CRs).
* A task has up to 64 inputs and 64 outputs.
* A task may write one CR. This is how a task steers the control program, for example to end a loop.

`mlca_pkg` has builder functions (`enc_task`, `enc_movi`, `enc_jump`) for all of these encodings.

**What a PU sees.** The CP talks to PU *p* through two queues.

The input queue (32-bit words) carries:

* a header word: [31:16] task ID, [15] CR flag, [14:8] input count, [6:0] output count;
* then the input values.

The PU's output queue carries `pu_out_t` messages:

* `PO_OUT` (output argument number, value), any number and in any order, at any time while the task runs;
* then `PO_CR` (the CR value) if the task writes a CR;
* then `PO_DONE`.

A PU must send all its outputs before `PO_DONE`. A PU runs one task at a time.

## Pipeline

```
 program  ┌───────┐  ┌────────┐ tokens ┌────────┐ 64-reg  ┌──────────┐ 4-entry ┌─────────┐
 memory ─►│ fetch │─►│ decode │───────►│ rename │──queue─►│ dispatch │──queue─►│ wake-up │
          │8 words│  │ + CRF  │        │ 3 cyc/ │         │          │         │         │
          └───────┘  └────────┘        │  reg   │         └────┬─────┘         └────┬────┘
             ▲  redirect │  ▲ CR values└────────┘              │ descriptors,       │ ready
             └───────────┘  │                ▲ freed regs      ▼ operand lists      ▼
                            │           ┌────────┐        ┌────────────┐       ┌────────────┐
                            │           │ retire │◄───────│ task queue │       │ ready pool │
                            │           └────────┘ oldest │ 512 tasks  │       │ FIFO 512   │
                            │                             └────────────┘       └─────┬──────┘
                            │                               ▲ done, out map          ▼
                      ┌───────────┐  events to wake-up ┌────────────┐ PU free ┌────────────┐
                      │write-back │────────────────────│  physical  │◄────────│ select and │
                      │round robin│──────write────────►│ reg. file  │         │  assign    │
                      └───────────┘                    │ 2048 × 32  │         └─────┬──────┘
                            ▲                          └────────────┘ inputs        ▼
                  PU output queues ◄──── PUs ◄──── PU input queues ◄──────────── issue
```

The CP has three parts:

* the **in-order front end**: fetch, decode, rename, dispatch;
* the **out-of-order part**: task queue, wake-up, ready pool, select and assign, physical register file, issue, write-back, and the PU queues;
* the **in-order back end**: retire.

### Fetch (`cp_fetch`)

Fetch keeps an 8-word buffer filled from the program memory, which has a
one-cycle read. A taken jump (*redirect*) flushes the buffer and refetches
from the target. `STOP` freezes fetching.

### Decode and the control registers (`cp_decode`)

Decode turns each TI into a stream of *tokens*, one per cycle:

* a header;
* one token per input register;
* one token per output register.

Decode also runs the control instructions itself. The control register file
lives here.

The difficult part is conditional jumps, because their CR is often written
by a task that is still running. This design uses a write sequence number
per CR:

* Every decoded task that writes CR *c* takes the next sequence number of *c*, stores it in its descriptor, and marks *c* not ready.
* `MOVI` also takes a number, and writes the value directly.
* When a task's `PO_CR` arrives, write-back sends {CR, sequence number, value} back to decode. The value is kept only if the number is still the newest for that CR. A late value from an older writer is ignored.
* A conditional jump waits until its CR is ready.

The loop branch therefore resolves as soon as the *last earlier writer*
produces the value. It does not wait for that task to retire, and it does
not wait for unrelated tasks. Fetch never runs past an unresolved jump:
there is no speculation.

### Rename (`cp_rename`)

Rename keeps a map from the 256 URF registers to 2048 physical registers,
plus a free list.

* An input token gets the current mapping.
* An output token gets a fresh physical register. It also carries the register it replaces, which is freed when the task retires.

Each register takes three cycles: accept, resolve, emit. A task with 20
inputs therefore needs 60 cycles to rename its inputs.

After reset, URF register *i* maps to physical register *i* and reads as 0.
The free list (`cp_free_list`) hands out never-used registers 256…2047 from
a counter, then reuses returned ones from a FIFO. No initialisation pass is
needed. When no register is free, rename stalls until retirement returns
one.

### Dispatch, task queue and operand rings (`cp_dispatch`, `cp_task_queue`)

Dispatch waits until there is room for the whole task:

* one entry in the 512-entry task queue;
* its input list in the input ring;
* its output list in the output ring.

Each ring has 2048 entries. All three structures are allocated and freed in
program order, so each one is a circular buffer with a head and a tail.

Dispatch then writes the descriptor and the operand lists, and sends the
wake-up unit a stream of messages through the 4-entry dispatch queue:

* a header message;
* one message per operand;
* an end message.

The task queue is the CP's reorder buffer. It stores:

* the descriptor: task ID, counts, CR number and sequence number, ring bases;
* a done flag.

Issue, write-back and retire each read the task queue through their own
port. Each port would be a separate copy of a two-port FPGA memory.

### Wake-up (`cp_wakeup`)

The wake-up unit does not search all waiting tasks for a matching register,
which would be a large CAM on an FPGA. Instead it keeps:

* a ready bit for each of the 2048 physical registers;
* a count of missing inputs for each waiting task;
* for each physical register that is not ready, a linked list of the task inputs waiting on it. The list entries (2048 in all) come from their own free list.

The messages from dispatch are handled as follows:

* `IN` links an entry into the list if the register is not ready.
* `OUT` clears the ready bit of the task's new output register.
* `END` sends the task straight to the ready pool if nothing is missing.

When write-back reports a register, the unit sets the register's ready bit
and walks its list, one entry per cycle. Each task on the list has its count
decremented. A task whose count reaches zero is ready. Write-back events are
handled before dispatch messages.

### Ready pool, select and assign (`cp_ready_pool`, `cp_select`)

Ready tasks queue in a 512-entry FIFO. The policy is *first ready, first
served*. Select and assign gives the oldest ready task to the
lowest-numbered free PU and remembers which task each PU is running.

### Issue (`cp_issue`)

Issue handles one task at a time. It sends the header word to the PU, then
each input value read from the physical register file, one word per cycle.
A task with *n* inputs takes *n*+2 cycles. Only the task ID, the counts and
the input values go to the PU. Output register names stay in the CP.

### Write-back (`cp_writeback`) and PU queues (`cp_pu_comm`)

Write-back serves the 8 PU output queues round robin, one message per cycle.

* `PO_OUT`: looks up the task's output list to find the physical register, writes the physical register file and sends the register to the wake-up unit. A consumer can therefore start while its producer is still running.
* `PO_CR`: returns the CR value to decode.
* `PO_DONE`: sets the task's done flag and frees the PU.

Each PU has a 128-word input queue (enough for a header and 64 inputs) and a
64-message output queue.

### Retire (`cp_retire`)

Retire waits for the oldest task in the task queue to be done. It then
returns the physical registers that the task's outputs replaced to the free
list, one per cycle, and releases the task's queue entry and ring space to
dispatch. Tasks leave strictly in program order. That is what would allow
precise exceptions and recovery from misspeculation, but neither is built.

## Sizes and rates

| Parameter | Value | Where |
|---|---|---|
| PUs (`NUM_PU`, top parameter) | 8 | `mlca_cp` (works from 1 up) |
| URF / CRF registers | 256 / 32 | `mlca_pkg` |
| Max inputs, max outputs per task | 64 / 64 | `mlca_pkg` |
| Task queue | 512 tasks | `mlca_pkg` |
| Physical registers | 2048 × 32 bit | `mlca_pkg` |
| Wake-up list entries | 2048 | `mlca_pkg` |
| Ready pool | 512 tasks, FIFO | `mlca_pkg` |
| Fetch buffer | 8 × 128-bit words | `mlca_pkg` |
| Rename output queue | 64 tokens | `mlca_pkg` |
| Dispatch queue | 4 messages | `mlca_pkg` |
| Operand rings (*own choice*) | 2048 + 2048 | `mlca_pkg` |
| Program memory (*own choice*) | 1024 words | `mlca_pkg` |
| Decode→rename, write-back→wake-up FIFOs (*own choice*) | 8, 16 | `mlca_cp` |
| PU input / output queues (*own choice for depth*) | 128 words / 64 msgs | `cp_pu_comm` |

Take the reference task: 10 inputs and 10 outputs, with one task due every
125 cycles.

| Unit | Cost per reference task |
|---|---|
| Rename | 3 × 21 = 63 cycles |
| Dispatch | 22 cycles |
| Issue | 12 cycles |
| Retire | about 12 cycles |
| Write-back | 1 cycle per output (12 are allowed) |

All of these fit inside the 125-cycle budget. The front end is the first
limit when tasks are short: rename costs 3 cycles per register. So does
single-task issue.

The synthetic benchmark measures this. Its tasks have 2 inputs and 1 output.
Speed-up is relative to 1 PU.

| Task length | 4 PUs | 8 PUs | 16 PUs |
|---|---|---|---|
| 1061 cycles | 3.9 | 7.8 | 12.7 |
| 530 cycles | 3.95 | 7.8 | 12.3 |
| 132 cycles | 3.9 | 6.7 | 8.4 |
| 66 cycles | 3.8 | 5.3 | 5.3 |

PU utilization is the share of PU time spent running tasks. With 8 PUs it
is 97 % for 1061-cycle tasks, 79 % for 132-cycle tasks and 58 % for
66-cycle tasks.

## Where this design departs from the architecture

* **No speculation.** Conditional jumps wait for their control register. The architecture allows speculation past them, but recovery was never built for it. The CR sequence numbers keep the wait short.
* **Single issue.** One task is issued at a time. This matches the built CP; the general architecture mentions multiple issue.
* **Own internals.** The wake-up lists, the operand rings, the CR sequence numbers, the instruction encoding, the PU message format, the free-list organisation and all widths (32-bit register values, 16-bit task IDs) are this design's own. The original describes these units only by what they do.
* **Multi-read structures.** The task queue and the physical register file are written as arrays with several combinational read ports. On an FPGA these would be copies of two-port memories, or the reads would be registered.
* **Loading and observing.** The host loads the program through a write port and starts it with a pulse. Debug ports read any URF register and CR.
* **Not built:** the processing units (soft processors and their monitor program), caches, bus, DDR2 controller and memory, and the software cache-flush routines. The testbenches use a behavioural PU (`tb/pu_model.sv`).

## Verification

Every unit has its own self-checking testbench, `tb/tb_<module>.sv`. Each
compares the unit with an independent model and prints
`TB_RESULT checks=N failures=M`. The rename testbench also checks the rate of
3 cycles per register. The issue testbench checks *n*+2 cycles per task.

Two testbenches cover the whole CP.

**`tb_mlca_cp`** runs at the default configuration with 8 behavioural PUs.
It runs four programs:

* the example loop (tasks A–E, with a state carried across iterations, a recycled register and a task-written loop condition);
* random tasks with up to 64 inputs and 64 outputs;
* long tasks that drain the free list;
* a 640-task straight run that fills the task queue.

After each program it compares all 256 URF registers and 32 CRs with a
sequential interpretation of the same program. It also counts a list of
mechanisms and fails if any never happened:

* wake-up walks;
* tasks ready at dispatch;
* out-of-order issue;
* taken branches;
* waits for a CR;
* full task queue;
* empty free list;
* register recycling;
* outputs consumed before the producer finished;
* all PUs busy;
* multi-word operand lists.

**`tb_mlca_synthetic`** runs the synthetic benchmark on 1, 4, 8 and 16 PUs,
using `synth_rig`, one system per PU count. It checks the results and the
speed-up and utilization trends in the table above.

To simulate with Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mlca_cp \
  rtl/mlca_pkg.sv tb/mlca_tb_pkg.sv rtl/sync_fifo.sv rtl/cp_*.sv rtl/mlca_cp.sv \
  tb/pu_model.sv tb/tb_mlca_cp.sv -o sim && ./obj_dir/sim
```

To run a unit test, swap in the unit's testbench and top module. The
synthetic benchmark also needs `tb/synth_rig.sv`. Tasks' results come from
the functions in `tb/mlca_tb_pkg.sv`. These functions are shared by the
behavioural PU and the reference interpreter. Change them to model other
task functions.

## Files

| File | Contents |
|---|---|
| `rtl/mlca_pkg.sv` | sizes, encodings, message structs, instruction builders |
| `rtl/mlca_cp.sv` | the CP top: all units and the FIFOs between them |
| `rtl/cp_prog_mem.sv` | control program memory |
| `rtl/cp_fetch.sv` | fetch |
| `rtl/cp_decode.sv` | decode |
| `rtl/cp_rename.sv` | rename |
| `rtl/cp_dispatch.sv` | dispatch |
| `rtl/cp_task_queue.sv` | task queue and operand rings |
| `rtl/cp_wakeup.sv` | wake-up |
| `rtl/cp_ready_pool.sv` | ready pool |
| `rtl/cp_select.sv` | select and assign |
| `rtl/cp_prf.sv` | physical register file |
| `rtl/cp_issue.sv` | issue |
| `rtl/cp_writeback.sv` | write-back |
| `rtl/cp_retire.sv` | retire |
| `rtl/cp_pu_comm.sv` | PU input/output queues |
| `rtl/sync_fifo.sv` | FIFO helper |
| `rtl/cp_free_list.sv` | free-list helper |
| `tb/` | unit testbenches, `pu_model`, `synth_rig`, the two system testbenches |
