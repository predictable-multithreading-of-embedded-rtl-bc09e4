# ARPRET: a hardware thread scheduler for PRET-C

PRET-C is a small synchronous extension of C. A program is a set of
light-weight threads started with `PAR(T1, ..., Tn)` that all run in lock step,
in *ticks*. Inside a tick the threads run one after another in a fixed
priority order (T1 before T2). None is interrupted until it reaches its `EOT`
(end of tick). A global tick ends only when every thread has reached its
`EOT`. Preemption is `[weak] abort P when pre C`: the body `P` is killed when
condition `C` was true in the *previous* tick. Because execution within a tick
is sequential and in a fixed order, shared C variables need no locks. Because
every tick is bounded, a program's worst-case reaction time (WCRT) can be
computed and enforced.

ARPRET runs such programs on an ordinary soft-core processor. A hardware
coprocessor, the **Predictable Functional Unit (PFU)**, does the part that is
slow and variable in software: it keeps every thread's context, picks the next
thread at each `EOT`, and handles preemption. The processor sends the PFU a
short command at each `PAR`, `EOT` and thread end. It then blocks until the
PFU returns the program counter of the thread to run next. Optionally, the PFU
holds every tick to exactly the WCRT, so that the program's timing is fully
predictable.

This repository holds the SystemVerilog of the PFU and of the two FSL links
that connect it to the processor. The processor itself (a Xilinx MicroBlaze in
the original platform) is not included. Its two link ports are the top-level
ports of `arpret`, and the testbenches play its part.

```
             mb_m_*  +-----------+  in_*   +---------------------------------+
 processor --------->| fsl_fifo  |-------->|  pfu                            |
 (not here)          +-----------+         |   pfu_controller (command LUT,  |
             mb_s_*  +-----------+  out_*  |     tick and preemption FSM)    |
           <---------| fsl_fifo  |<--------|   thread_table   abort_table    |
                     +-----------+         |   pfu_scheduler  wcrt_timer     |
                                           +---------------------------------+
```

## Files

| file | what it is |
|---|---|
| `rtl/pretc_pkg.sv` | command IDs, the command lookup table, table-operation enums |
| `rtl/arpret.sv` | top: two FSL FIFOs and the PFU |
| `rtl/pfu.sv` | the PFU: wires the five parts below |
| `rtl/pfu_controller.sv` | command decoding, tick boundary, preemption scan |
| `rtl/thread_table.sv` | per-thread contexts |
| `rtl/abort_table.sv` | shared abort contexts and the pre-value register |
| `rtl/pfu_scheduler.sv` | fixed-priority choice of the next thread |
| `rtl/wcrt_timer.sv` | tick-length timer for constant-length ticks |
| `rtl/fsl_fifo.sv` | one FSL link (FIFO, first-word fall-through) |
| `tb/fsl_host.sv` | processor model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The command protocol

All traffic is 32-bit words on the two links. The processor sends a command
word and possibly one more word. For some commands the PFU answers with one
word, the PC of the next thread. The processor executes that PC; the PFU does
not touch the processor's registers or memory.

Command word: bits `[7:0]` function ID, `[15:8]` operand, bit `16` flag.

| ID | command | extra words read | PCs written back | effect |
|---|---|---|---|---|
| 10 | SPAWN | 1: start address | 0 | slot `operand` becomes a new thread, child of the running one |
| 12 | EOT | 1: continuation PC | 1 | running thread has finished its local tick |
| 14 | SUSPEND | 1: PC after the PAR | 1 | running thread waits for its children (the PAR's join) |
| 16 | TERMINATE | 0 | 1 | running thread ends |
| 18 | ABORT_START | 1: preemption address | 0 | open an abort scope on condition `operand`; flag = weak |
| 20 | ABORT_END | 0 | 0 | close the innermost abort scope of the running thread |
| 22 | SET_PV | 0 | 0 | condition `operand` := flag, visible from the next tick |

IDs 10, 12 and 14 and their word counts are those of the original ARPRET
lookup table. The other four are this design's own. The original description
says that the processor starts thread termination and that abort contexts live
in the PFU, but it defines no commands for them. An unknown ID is dropped (one
word) and pulses `bad_cmd`.

A `PAR(T1, T2)` in the running thread P therefore compiles to
`SPAWN(T1), SPAWN(T2), SUSPEND(join)`. P is then suspended and T1 receives the
processor. When the last child sends TERMINATE, P resumes at `join` in the
same tick.

## Threads and priorities

`thread_table` has one entry per thread slot (`N = 128` by default). Each
entry holds PC (32 bits), TDA (alive), TSP (suspended in a PAR), TLT (local
tick reached), PID (parent slot), ALC (number of open abort scopes) and SC
(number of live children, 32 bits).

The thread's priority is its **slot number**: slot 0 is the highest. The
compiler must therefore number threads in PRET-C's priority order, with
children after their parent: the threads of a `PAR` in argument order, after
every thread that precedes them. The preemption scan relies on this: a parent
always has a lower slot number than its children. After reset, slot 0 is the
running main thread (its own parent) and all other slots are dead.

`pfu_scheduler` is a priority encoder over `TDA & ~TSP & ~TLT`. When no thread
is ready, the global tick is over.

## Ticks and timing

The controller (`pfu_controller`) is a small state machine. When the processor
hands over (EOT, SUSPEND or TERMINATE), the cost from the command word
reaching the PFU to the next PC leaving it is:

* 4 clocks inside a tick: command, extra word, execute, select, send. TERMINATE
  takes 3, because it has no extra word.
* 3 more clocks at a tick boundary: the TLT bits are cleared and the pre-values
  latched; the next tick is released; the scheduler selects again.
* each FSL link adds one clock per word.

**Constant mode** (`const_mode = 1`): the next tick is released only when
`wcrt` cycles have passed since the previous tick started, so the
`tick_start` pulses are exactly `wcrt` cycles apart. `wcrt` would be the bound
computed by WCRT analysis of the program. A tick that takes longer starts
late and pulses `overrun` (a report only; nothing else happens). In **variable
mode** a tick starts as soon as the previous one has ended.

## Preemption

This is the least obvious part of the design.

**Abort contexts.** `abort_table` holds `M = 16` entries shared by all
threads. Each entry is taken from the lowest free slot when a thread opens an
abort scope and freed when it closes it. An entry holds Valid, TID (owning
thread), PVI (which condition), WS (weak/strong), PA (preemption address, where
the owner continues) and AL (nesting level within the owner, equal to the
owner's ALC when the scope was opened).

**Pre-values.** `pre C` is the value C had at the end of the previous tick.
The processor reports condition values with SET_PV. They go into a staging
register, and at each tick boundary the staging register is copied into the
`X = 16`-bit PV register. A condition that rises during tick *t* is therefore
seen by the abort logic only in tick *t+1*.

**When aborts are checked.**

* *Strong* aborts are checked at the start of every tick, before any thread
  runs. The aborted body does not run in that tick.
* *Weak* aborts are checked once at the end of the instant, after every thread
  has reached its EOT. The body has run in this tick. The owner then restarts
  at PA within the same instant, before the global tick ends.

**What a firing abort does.** The controller scans the slots in order, one per
clock. For slot *i*:

* if *i*'s parent was killed or preempted earlier in the scan, *i* is killed
  and its abort entries are freed;
* otherwise, if one of *i*'s own aborts of the kind being checked has a true
  pre-value, the outermost one (lowest AL) fires. Thread *i* continues at its
  PA, no longer suspended and with no children. Its entries at that level and
  deeper are freed, and every descendant of *i* dies later in the same scan.

One pass is enough because parents come before children. The scan stops at
the highest alive slot, so it costs (that slot + 1) clocks. It runs only when
some abort of that kind actually has a true pre-value, so ticks without
preemption pay nothing for it. `preempt` pulses once
per firing abort.

## Top-level interface (`arpret`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mb_m_data`, `mb_m_write`, `mb_m_full` | in, in, out | 32, 1, 1 | processor to PFU link, processor side; do not write while full |
| `mb_s_data`, `mb_s_exists`, `mb_s_read` | out, out, in | 32, 1, 1 | PFU to processor link; read only while `mb_s_exists` |
| `const_mode`, `wcrt` | in | 1, 32 | constant-tick mode and tick length in cycles |
| `tick_start` | out | 1 | first cycle of each global tick |
| `tick_end` | out | 1 | every alive thread has reached its EOT |
| `preempt` | out | 1 | an abort fired |
| `overrun` | out | 1 | a constant-length tick ran past `wcrt` |
| `bad_cmd` | out | 1 | unknown function ID, or abort table full |
| `any_alive` | out | 1 | 0 once every thread has terminated |

Parameters: `N = 128` threads (at most 256, the width of the operand field),
`M = 16` abort entries, `X = 16` conditions, `FSL_DEPTH = 16`. All widths
follow from them (`$clog2`).

## Where this design follows its source and where it chooses

Taken from the original ARPRET description:

* the platform: processor, PFU, and two FSL links;
* the thread-table fields and their widths;
* the abort-table fields and the PV register;
* the fact that abort entries are shared by all threads;
* the SPAWN/EOT/SUSPEND IDs and their word counts;
* fixed-priority scheduling at every EOT, with the processor blocking for the
  next PC;
* a TLT bit set at EOT;
* variable and constant (WCRT) tick modes;
* the `pre` semantics of aborts, strong at the start and weak at the end of an
  instant.

Own choices, where the description is silent:

* the four extra commands and the command-word operand fields;
* priority equal to the slot number. The original text lists a priority
  field (TP) in the thread table, but its block diagram has none, so no
  priority is stored;
* a SPAWN word that carries the target slot in its operand field. In the
  original description the SPAWN word is only the value 10;
* the meanings given to PID, ALC and SC;
* join in the same tick;
* the pre-value staging register;
* the abort scan, and outermost-wins among one thread's aborts;
* the controller timing;
* the overrun, tick and status outputs;
* the sizes M, X and FSL depth;
* `N = 128`, the largest configuration in the original resource measurements
  (8 to 128 threads).

The original resource figures were for a Xilinx FPGA and grow linearly with
the thread count. A generic gate-level synthesis of `arpret` (Yosys `synth`,
assertions ignored) shows the same trend:

| N | gate cells | flip-flops |
|---|---|---|
| 8 | 11,434 | 2,528 |
| 16 | 16,568 | 3,162 |
| 32 | 26,828 | 4,429 |
| 64 | 47,394 | 6,976 |
| 128 | 88,807 | 12,115 |

Each thread slot costs about 640 gate cells and 80 flip-flops. Most of the
flip-flops are the thread table's 78 bits per slot. The flip-flop counts
include the 1,024 bits of the two link FIFOs.

Not covered: the processor and the compiler that produces the command
sequences.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. With
plain Verilator, the package goes first:

```
verilator --binary --timing --assert -Irtl rtl/pretc_pkg.sv rtl/*.sv \
    tb/fsl_host.sv tb/tb_arpret.sv --top-module tb_arpret
./obj_dir/Vtb_arpret
```

Replace `tb_arpret` with any other `tb_<module>`.

| testbench | what it checks |
|---|---|
| `tb_fsl_fifo` | order, FULL at exactly DEPTH, one-cycle latency, random traffic against a queue |
| `tb_pfu_scheduler` | random status vectors against a reference priority search |
| `tb_wcrt_timer` | exact tick spacing in constant mode, overrun, variable mode |
| `tb_thread_table` | spawn, suspend, EOT, tick, join on the last child, kill, restart |
| `tb_abort_table` | allocation, full, pre-value latching, outermost-hit query, release |
| `tb_pfu_controller` | words read and written per function ID, unknown IDs, hand-over latency |
| `tb_pfu` | a program with PAR, nested PAR, joins, strong and weak aborts, constant mode, overrun, latency (N = 8) |
| `tb_arpret` | the full platform at default sizes (below) |
| `tb_abro` | the ABRO benchmark on the full platform, against a tick-level reference |
| `tb_smokers` | the cigarette smokers benchmark on the full platform: weak aborts, constant ticks |

`tb_arpret` runs the classic producer-consumer program on the full platform at
the default sizes. A sampler thread puts a sensor value into a 1000-entry
circular buffer every other tick. A display thread takes one out every third
tick. Both run inside a strong `abort ... when pre(reset)` opened by main.

The test runs about 6,000 ticks until the buffer has been full for a while. It
checks that each thread runs once per tick in priority order and that values
come out in the order they went in. It then runs 200 ticks in constant mode
(each exactly `wcrt` cycles) and forces one overrun. Finally it presses reset,
so that the next tick starts in main's abort handler with both threads killed,
and runs a weak abort around a nested PAR, a burst that fills the link, and
program termination. It counts every mechanism (spawn, suspend, EOT,
terminate, join, strong and weak abort, constant ticks, overrun, link full,
buffer full and empty) and fails if any of them never happened.

`tb_abro` runs ABRO: emit O once both A and B have been seen, and restart
whenever R was present. It is written as main with a strong abort on
`pre(R)` around `PAR(await A, await B)`. Random inputs drive it for 3,000
ticks, and O is compared tick by tick with a plain software model of ABRO. It
also prints the PFU's share of the reaction time. This counts only scheduling
and link cycles, with a processor that needs no time of its own. It comes to
about 13 cycles per tick on average, with a worst case of about 40 cycles in
ticks that restart the threads.

`tb_smokers` runs the cigarette smokers problem with an agent and three
smokers, five threads in all. The agent puts two of three ingredients on the
table, and the smoker who holds the third takes them in the same tick. Each
cigarette lasts a random 1 to 4 puffs. It ends with a weak abort whose
condition the smoker sets at its last puff. The testbench checks who smoked
each of 400 cigarettes, and in which ticks, against a closed-form schedule.
The first half runs in variable mode and measures the longest tick. The second
half runs in constant mode with `wcrt` set 8 cycles above that, and checks that
every tick lasts exactly `wcrt` with no overrun.
