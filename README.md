# Multithreaded emulation engine: a 4-thread interleaved MIPS-compatible core for early FPGA prototyping

Prototyping a system on an FPGA usually has to wait until every block exists
as RTL. An alternative is to run the not-yet-designed parts as software tasks
that talk to each other through FIFO queues (a task/queue model), on a
processor built to run several such tasks at once, and to swap tasks for real
hardware one by one as they get designed. This repository holds that
processor, the *multithreaded emulation engine*, together with the hardware
queues and thread controls that let tasks move between software and hardware.

The engine's main idea is to make a small, fast FPGA processor by removing the
parts of a pipeline that need long wires: forwarding paths and interlocks.
It does so by interleaving four hardware threads, one instruction per cycle in
fixed rotation, on a single classical 5-stage pipeline.

## Interleaved multithreading: why there is no forwarding, interlock or flush

Four threads issue in the order 0, 1, 2, 3, 0, 1, ... one per cycle:

```
cycle      0    1    2    3    4    5    6    7    8
thread 0   IF   ID   EX   MEM  WB
thread 1        IF   ID   EX   MEM  WB
thread 2             IF   ID   EX   MEM  WB
thread 3                  IF   ID   EX   MEM  WB
thread 0                       IF   ID   EX   MEM  WB
```

At any moment the five stages hold instructions of four different threads
(the thread in IF is the one in WB, one round later). Consequences, all used
by the RTL:

* **No data hazards.** An instruction writes the register file at the end of
  WB (cycle c+4); the same thread's next instruction reads it in ID at c+5.
  There is no bypass network and no stall logic; the register file
  (`mte_regfile`) is a plain 2-read, 1-write RAM of 4 x 32 x 32 bits.
* **Free branches.** A branch resolves in EX (c+2) and rewrites its thread's
  next-PC register (`mte_thread_ctrl`) before that thread fetches again
  (c+4). Nothing is predicted or flushed.
* **Room in MEM.** Work started in EX may finish in MEM because nobody needs
  it for four cycles. The multiplier (`mte_hilo`) uses this: operands are
  registered at the end of EX, the 64-bit product is formed in MEM.
* **Fixed per-thread rate.** Each thread retires exactly one instruction
  every four cycles, whatever the others do. A stopped thread leaves its slot
  empty rather than giving it away, so this stays true.

The price is single-thread speed: one thread alone runs at a quarter of the
clock.

## System thread and computation threads

Thread 0 is the *system thread*. It alone takes interrupts (`mte_cp0`), and it
is meant to run the kernel: scheduling, task dispatch and software queues.
Threads 1 to 3 are *computation threads*: no interrupt ever touches them, so a
task placed there finishes at a predictable cycle.

Interrupt handling follows MIPS32 coprocessor 0 in a reduced form:

| register | number | contents |
|---|---|---|
| Status | 12 | bit 0 IE (enable), bit 1 EXL (in handler) |
| Cause  | 13 | bit 10 IP2 = level of `irq` (read only) |
| EPC    | 14 | PC of the interrupted instruction |

When `irq` is high, IE=1 and EXL=0, the next system-thread instruction to
reach EX is squashed, EPC takes its PC, EXL is set and the thread continues at
`IRQ_VECTOR` (0x180). ERET clears EXL and resumes at EPC. An instruction in a
branch delay slot is never interrupted (the interrupt waits one instruction),
so EPC alone is enough to resume. MTC0 and ERET from computation threads are
ignored.

## Instruction set

MIPS-I integer instructions, 32-bit, with one branch delay slot:

* ALU: ADD(U), SUB(U), AND, OR, XOR, NOR, SLT(U), ADDI(U), SLTI(U), ANDI,
  ORI, XORI, LUI, SLL, SRL, SRA, SLLV, SRLV, SRAV
* memory: LB, LBU, LH, LHU, LW, SB, SH, SW (little-endian, no alignment trap)
* control: BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ, BLTZAL, BGEZAL, J, JAL, JR, JALR
* multiply: MULT, MULTU, MFHI, MFLO, MTHI, MTLO (HI/LO per thread)
* system: MFC0, MTC0, ERET

Departures from MIPS-I: no DIV/DIVU (a multi-cycle divider does not fit the
one-slot-per-thread rotation), ADD/ADDI/SUB never trap on overflow, and any
other opcode executes as a no-operation (the decoder flags it on its
`illegal` output).

The delay slot comes out of the PC pair each thread keeps: at fetch
`pc <= npc, npc <= npc + 4`; a taken branch in EX only writes `npc`, so the
instruction after the branch is still fetched next. Traps and ERET write both
and have no delay slot.

## The prototyping system (`mte_system`)

`mte_system` wraps the engine with an instruction memory, a data memory, three
hardware queues and thread-control registers:

```
            prog_*                           irq
              |                               |
          +-------+   +-----------------------v----+   +--------+
          | imem  |-->|          mte_core          |-->|  dmem  |
          +-------+   | 4 threads, 5-stage pipeline|   +--------+
                      +------------+---------------+
                                   | loads/stores at 0x8000_00xx
      in_* --> [queue 0] -->-------+------->-- [queue 1] --> out_*
                          [queue 2] (task to task)
                          thread enable / thread PC registers
```

Memory map of loads and stores:

| address | access | meaning |
|---|---|---|
| 0x0000_0000 + | R/W | data memory, `DMEM_WORDS` words |
| 0x8000_0000 + 0x10*q | load | pop head of queue q (returns 0, no pop, if empty) |
| 0x8000_0000 + 0x10*q | store | push to queue q (dropped if full) |
| 0x8000_0004 + 0x10*q | load | status: bit 0 not empty, bit 1 full, bits 15:8 fill level |
| 0x8000_0040 | R/W | thread enable mask, bits 3:0; bit 0 always reads 1 |
| 0x8000_0050 + 4*t | store | set PC of thread t (stop the thread first) |

Queue 0 is filled from the `in_valid/in_data/in_ready` port and read by the
engine; queue 1 is written by the engine and drained on
`out_valid/out_data/out_ready`; queue 2 is written and read by the engine, a
hardware queue between two tasks on different threads. Software polls the
status words; a full or empty queue never stalls the pipeline, so the
rotation is never disturbed.

The thread-control registers are how a kernel on thread 0 hands a task to a
computation thread: clear the thread's enable bit, write its PC, set the bit
again. At reset all four threads run, thread t from `BOOT_PC + t*THREAD_STRIDE`.

The program is loaded through `prog_we/prog_addr/prog_wdata` (word address)
while `rst` is high. `wb_valid/wb_tid/wb_pc`, `irq_taken` and `branch_taken`
are a retirement trace and event pulses for debugging.

## Multi-core mode (`mte_multicore`, the top)

The flow has two software stages before RTL. First all tasks share one
engine and talk through software or hardware queues. Later each task gets a
processor of its own, and the data between tasks moves through hardware
queues only. `mte_multicore` covers both: it holds `NCORES` copies of
`mte_system` in a chain, engine i's output queue feeding engine i+1's input
queue through the same valid/ready handshake as the external ports.

```
 in_* --> [engine 0] --q1 -> q0--> [engine 1] --q1 -> q0--> ... --> out_*
```

With the default `NCORES = 1` the top is a single multithreaded engine, the
main configuration. A word crosses a link in one cycle whenever the upstream
output queue has data and the downstream input queue has room, so a slow
stage back-pressures the ones before it. Each engine has its own `irq`;
programs are downloaded one engine at a time, with `prog_core` naming the
engine. Per-engine trace outputs are unpacked arrays.

Each queue is also the place where a task can later be replaced by RTL: a
hardware block attached to `in_*` or `out_*`, in place of the task that fed
or drained that queue, leaves the other tasks unchanged. No such task
hardware is part of this repository.

## Timing of one instruction

| stage | cycle | what happens |
|---|---|---|
| IF  | c   | thread `c mod 4` presents its PC to the instruction memory (registered read) |
| ID  | c+1 | decode (`mte_decoder`), register read |
| EX  | c+2 | ALU (`mte_alu`), branch (`mte_branch_unit`), interrupt decision, multiply operands latched, MFHI/MFLO/MFC0 read |
| MEM | c+3 | data memory or queue access; product formed, HI/LO written at the end |
| WB  | c+4 | load alignment (`mte_lsu`), register write |

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| mte_multicore | `NCORES` | 1 | engines in the chain |
| mte_system | `IMEM_WORDS` | 4096 | 16 KiB of code |
| mte_system | `DMEM_WORDS` | 16384 | 64 KiB of data |
| mte_system | `QUEUE_DEPTH` | 16 | each of the three queues |
| mte_system, mte_core | `BOOT_PC` | 0 | thread 0 start address |
| mte_system, mte_core | `THREAD_STRIDE` | 0x400 | thread t starts at `BOOT_PC + t*THREAD_STRIDE` |
| mte_system, mte_core | `IRQ_VECTOR` | 0x180 | system-thread interrupt entry |

The number of threads (4), registers (32 per thread, 32 bits) and stages (5)
are fixed by the design and live in `mte_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/mte_pkg.sv` | counts, opcodes, enums, the decoded control word |
| `rtl/mte_multicore.sv` | top: chain of `NCORES` systems |
| `rtl/mte_system.sv` | one engine with memories, queues, memory map |
| `rtl/mte_core.sv` | the pipeline |
| `rtl/mte_thread_ctrl.sv` | thread rotation, per-thread PC/next-PC |
| `rtl/mte_regfile.sv` | 4 x 32 x 32-bit register file |
| `rtl/mte_decoder.sv`, `mte_alu.sv`, `mte_branch_unit.sv`, `mte_lsu.sv` | ID/EX/MEM/WB datapath |
| `rtl/mte_hilo.sv` | multiplier across EX and MEM, per-thread HI/LO |
| `rtl/mte_cp0.sv` | system-thread interrupts |
| `rtl/mte_imem.sv`, `mte_dmem.sv` | block-RAM style memories |
| `rtl/mte_hw_queue.sv` | FIFO used for the queues |
| `tb/mips_asm_pkg.sv` | functions that encode MIPS instructions, for test programs |
| `tb/jpeg_slice_pkg.sv` | test workload: colour conversion and level-shift tasks, reference model |
| `tb/tb_mte_full.sv` | the top at default parameters, one complete workload run |
| `tb/tb_jpeg_tlm.sv` | JPEG encoder (colour, DCT, quantise/zigzag/run-length, Huffman) as tasks on two engines |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mte_full \
    rtl/mte_pkg.sv tb/mips_asm_pkg.sv tb/jpeg_slice_pkg.sv rtl/*.sv tb/tb_mte_full.sv
./obj_dir/Vtb_mte_full
```

(list the three packages first; for another testbench change the top and the
last file). Every run takes well under a minute. Registers are not reset, so test programs
initialise what they use.

What the testbenches establish:

* `tb_mte_multicore` runs the top with two engines: engine 0 converts pixels
  on thread 1 and sends them over the link; engine 1's kernel dispatches the
  level-shift task to its thread 3. The output is held off long enough that
  every queue on the path fills and the link stalls; all output words, link
  transfers, interrupts on both engines and the rotation of both engines are
  checked.
* `tb_jpeg_tlm` runs a whole (luma-only) JPEG encoder as software on the
  top with two engines. Engine 0's kernel writes the DCT,
  quantiser-reciprocal and zigzag tables into data memory and dispatches
  three tasks. Thread 1 converts RGB to luma and level-shifts it. Thread 2
  collects an 8x8 block from queue 2 and computes its 2-D DCT as two
  fixed-point matrix passes. It hands the block to thread 3 through a
  one-block mailbox in data memory (a software queue with a flag word).
  Thread 3 quantises with the JPEG example luminance table, scans in zigzag
  order and run-length codes into queue 1. That queue feeds engine 1 over
  the link, where a Huffman task does the following:
  - codes the DC difference and the AC (run, size) symbols, using a 16-zero
    escape for long runs;
  - packs the bits into 32-bit words.

  The AC code lengths follow a simple rule of this test, not the standard's
  table. The run-length words on the link and the coded words at the output
  are compared with a reference model. A block comes out about every 54,000
  cycles; the direct matrix DCT sets that rate. The DCT of every block is
  checked to take exactly 47,592 cycles: 4 cycles for each of its 11,898
  instructions. That fixed timing is what a computation thread guarantees.
* `tb_mte_full` runs the same one-engine workload as `tb_mte_system` through
  the top with every parameter at its default.
* `tb_mte_system` runs `mte_system` at its default sizes. Four tasks run together:
  thread 1 converts a stream of 64 random RGB pixels to YCbCr with the usual
  8-bit JPEG fixed-point coefficients (nine multiplies per pixel), passes
  them through queue 2 to thread 3, which level-shifts each component by 128
  and writes queue 1; thread 2 computes a sum; thread 0 stops thread 3, sends
  it to its task through the thread-control registers and then services four
  interrupts. Every output word is compared with a reference model, and the
  test fails unless every mechanism occurred: queue full and queue empty on
  all queues, input back-pressure, interrupts, dispatch, a stopped thread,
  multiplies finishing in MEM, and an unbroken thread rotation.
* `tb_mte_core` runs four hand-assembled programs and checks, besides the
  results, that each computation thread reaches its last instruction at
  exactly `t + 4 + 4k` cycles (k = instructions executed) while the system
  thread is being interrupted, that only interrupt-squashed instructions
  leave gaps in the retirement rotation, and that an interrupt arriving
  during a delay slot is deferred.
* The unit testbenches compare each module against an independent model with
  random stimulus.

## Where this design is its own

The following were chosen here, not taken from a specification:

* the exact MIPS subset, the kept delay slot, no divide, no overflow traps;
* coprocessor-0 layout, the interrupt vector, the delay-slot deferral;
* separate instruction and data memories, their sizes and their
  one-cycle read latency;
* the memory map, queue depth and width, polling instead of blocking on
  queues, the thread enable and thread PC registers, boot addresses;
* little-endian byte order.

The interleaved 4-thread organisation, the absence of forwarding and
interlocks, branch resolution within the thread's round, EX work spilling into
MEM, the system/computation thread split and hardware FIFO queues between
tasks are the design's defining features and are implemented as described.

Not included: the multitasking kernel (software), the clock multiplier that
derives the engine clock from a slower board clock (an FPGA vendor
primitive), and any of the JPEG encoder stages as hardware; they appear here
only as engine software in the test workloads above.

## Expected implementation results

The organisation targets FPGAs: with no forwarding multiplexers or interlock
logic, the critical path is confined to single stages. A design of this kind
has been reported at about 740 Virtex-II CLBs for the datapath (register file
excluded) and 143 MHz, against 1,300 CLBs and 89 MHz for a single-threaded
RISC core with forwarding of similar ISA. This RTL has not been run through
FPGA place and route, so those figures are not confirmed for it.
