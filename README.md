# A two-thread interleaved MIPS-I pipeline

A classic five-stage MIPS pipeline loses cycles to its own dependencies. A branch is known only
in the fourth stage, so either the instructions behind it are thrown away on a misprediction or
a predictor is needed. An instruction that reads a register written by its neighbour needs
forwarding paths, and sometimes a stall. This core removes most of that machinery by running
**two hardware threads, interleaved one instruction at a time**: the pipeline takes an
instruction from thread A, then B, then A, and so on. Two instructions of the same thread are
therefore always two stages apart, and most hazards disappear by construction:

* a branch resolved in EX has only one instruction of its own thread behind it, and that
  instruction is the architectural **branch delay slot**. There is no branch predictor, no
  flush and no wasted slot;
* an instruction in DI can depend only on its own thread's instruction in MEM. One
  same-cycle forwarding path covers that case, loads included. There is no load-use stall.

Throughput is one instruction per cycle for the two threads together; each single thread
runs at half that rate. The core is a re-implementation of the interleaved-multithreading
modification of the miniMIPS soft core. It keeps that core's stage names and block split:
PF, EI, DI, EX and MEM, a register bank, a bypass unit, a system coprocessor and a bus
controller. The PC and the register bank are doubled, and a one-bit counter selects between them.

## Pipeline timing

Stages: **PF** (pick the PC), **EI** (fetch), **DI** (decode, read registers), **EX** (execute,
resolve branches, take exceptions), **MEM** (load/store, write back at the end of the cycle).

| cycle | PF | EI | DI | EX | MEM |
|------:|----|----|----|----|-----|
| 1 | A1 |    |    |    |     |
| 2 | B1 | A1 |    |    |     |
| 3 | A2 | B1 | A1 |    |     |
| 4 | B2 | A2 | B1 | A1 |     |
| 5 | A3 | B2 | A2 | B1 | A1  |

Suppose A1 is a branch. In cycle 4 it is in EX and reloads thread A's PC at the end of that
cycle. A2 was already fetched in cycle 3, and it executes whatever the branch decides: it is the
delay slot. A3 is picked in cycle 5 from the PC that was just reloaded, so it is always the right
instruction. EX is three stages behind PF, an odd distance, so in the cycle a thread's branch is
in EX that thread is never in PF. The branch reload and the normal PC+4 step of one thread can
therefore never collide.

In cycle 5, A2 reads its registers in DI while A1 is still in MEM and writes back only at the
end of the cycle. The bypass (`bypass_unit`) compares thread and register number and forwards
the MEM result into DI. That covers ALU results and load data alike, because a load's data
arrives during MEM. No other forwarding exists. The instruction in EX always belongs to the
other thread, so there is nothing to compare against it.

HI/LO are read by MFHI/MFLO in EX and written by MULT/DIV/MTHI/MTLO in EX. The next
instruction of the same thread reaches EX two cycles later, so HI/LO need no forwarding at all.
The same holds for the coprocessor-0 registers (MFC0/MTC0/RFE act in EX).

### Thread selection

`thread_sel` is the one-bit counter. It toggles on every cycle in which the pipeline advances.
It holds when the pipeline is stalled, so the A/B alternation is never broken. Each
instruction also carries its thread bit down the pipeline. That bit equals the counter in PF,
DI and MEM and is its inverse in EI and EX, and assertions in the top check this at run time.
The bit selects the register bank to read (DI), the bank to write (MEM), the HI/LO pair and the
coprocessor state (EX), and the PC to reload (EX).

## What each thread owns

Doubled, one per thread:
* the PC (`pc_unit`);
* the register bank (`reg_bank`): 31 × 32-bit registers, with r0 hard-wired to zero (992
  flip-flops), plus HI/LO;
* the coprocessor-0 state inside `syscop`: Status, Cause, EPC and BadVAddr;
* a one-bit "last instruction was a branch" flag in `ex_stage`, used to recognise delay slots.

Shared: all pipeline stages, the ALU, the multiply/divide unit, the decoder, the bypass and
the memory bus. There is no context-switch cost: a thread switch happens every cycle for free.

## Exceptions and interrupts

This is the least obvious part of the design, because an exception must cancel work that the
interleaving has already started.

* Synchronous exceptions are found in EX: reserved instruction, SYSCALL, BREAK, signed
  overflow of ADD/ADDI/SUB, and misaligned LH/LHU/LW/SH/SW. `ex_stage` reports them to
  `syscop`. `syscop` also sees an enabled pending interrupt of the EX instruction's thread.
  Interrupts have priority, and they are taken on whatever valid instruction that thread
  has in EX.
* When an exception is taken, the EX instruction is turned into a bubble, so it writes no
  register, HI/LO or coprocessor state and makes no memory access. Its thread's PC is loaded with
  `EXC_VECTOR`. The thread's next instruction, which is in EI at that moment, is dropped by
  `ei_stage`. So an exception costs exactly two issue slots of the faulting thread; the other
  thread does not notice.
* EPC is the instruction's address. If that instruction is a delay slot, EPC is the address of
  the branch and Cause.BD is set (R3000 convention), so returning to EPC re-executes the branch.
* Status bits 5:0 form the usual KU/IE three-level stack: it is pushed on entry and popped by RFE.
  The return sequence is `jr k0` followed by `rfe` in its delay slot.
* Each thread has one level-sensitive interrupt line (`irq[t]`), visible as Cause.IP2 and masked
  by Status.IM2 and Status.IEc. Cause.IP0/IP1 are software interrupt bits written by MTC0.
* Exception codes: Int 0, AdEL 4, AdES 5, Sys 8, Bp 9, RI 10, Ov 12.

## Memory bus and stalls

Fetch (EI) and data access (MEM) share one bus (`bus_ctrl`), as in the original core, and the
data access wins. A load or store therefore costs the fetch one cycle, and the whole pipeline
holds for that cycle. The memory may also add wait states by holding back `mem_ack`. Every stall
freezes all stages and the thread counter together. If a data access is acknowledged while the
pipeline is held for another reason, `mem_stage` keeps the read data and does not repeat the
access.

Bus protocol: `mem_req` high with `mem_addr` (word aligned), `mem_we`, `mem_be`, `mem_wdata`.
The access completes in the cycle `mem_ack` is high, and read data must be valid on `mem_rdata`
in that cycle. The memory may acknowledge in the request cycle (a combinational read). Byte lanes are
little-endian: byte address offset *n* is `data[8n+7:8n]`.

Cycle accounting: after the 4 fill cycles, every advancing cycle completes one instruction,
except two slots for each exception taken. The number of stall cycles equals the number of
loads and stores plus any memory wait states.

## Instruction set

MIPS-I integer instructions: SLL SRL SRA SLLV SRLV SRAV, ADD ADDU SUB SUBU AND OR XOR NOR
SLT SLTU, ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI, MULT MULTU DIV DIVU MFHI MFLO MTHI MTLO,
BEQ BNE BLEZ BGTZ BLTZ BGEZ BLTZAL BGEZAL, J JAL JR JALR, LB LBU LH LHU LW SB SH SW,
SYSCALL BREAK, and MFC0 MTC0 RFE. Anything else raises a reserved-instruction exception.
Not implemented: LWL/LWR/SWL/SWR, coprocessors 1–3, caches, an MMU or TLB, and the
user/kernel address checks. Every branch and jump has one delay slot. Loads have no load delay
slot: the loaded value is available to the next instruction of the thread.

Multiply and divide are single-cycle combinational operations. Division by zero gives
LO = 0xFFFFFFFF and HI = the dividend. 0x80000000 / −1 gives LO = 0x80000000 and HI = 0.

## Modules

| file | block | role |
|------|-------|------|
| `rtl/mips_imt_pkg.sv` | – | shared types: decoded control, stage registers, enums, CP0 numbers |
| `rtl/minimips_imt.sv` | top | wires the pipeline, doubles PC and register bank, event outputs |
| `rtl/thread_sel.sv` | sel | one-bit thread counter |
| `rtl/pc_unit.sv` | PF | one thread's PC: step by 4 or reload |
| `rtl/ei_stage.sv` | EI | PF/EI register, fetch request, drops the instruction after an exception |
| `rtl/di_stage.sv` | DI | EI/DI register, decoder, register-read request |
| `rtl/bypass_unit.sv` | BYP | MEM→DI forwarding, same thread only |
| `rtl/ex_stage.sv` | EX | DI/EX register, ALU, mult/div, branches, address, exception detection |
| `rtl/syscop.sv` | CP0 | per-thread Status/Cause/EPC/BadVAddr, exception and interrupt entry |
| `rtl/mem_stage.sv` | MEM | EX/MEM register, load/store lanes, write-back bundle |
| `rtl/reg_bank.sv` | banc | one thread's r1–r31 and HI/LO |
| `rtl/bus_ctrl.sv` | bus | fetch/data arbitration onto one memory bus |

Each stage module owns the pipeline register at its input and is written as `always_ff` for
that register plus `always_comb` for the stage's work. All state changes are qualified by
`advance`, the inverse of the global stall.

### Top-level parameters and ports

| parameter | default | meaning |
|-----------|---------|---------|
| `RESET_PC0` | `32'hBFC0_0000` | first instruction of thread 0 |
| `RESET_PC1` | `32'hBFC0_0800` | first instruction of thread 1 |
| `EXC_VECTOR` | `32'h8000_0080` | exception handler, shared by both threads |

The ports are `clk` and `rst_n` (synchronous, active low), `irq[1:0]`, the memory bus above,
and one-cycle event pulses for performance counters: `ev_stall`, `ev_retire`
(+ `ev_retire_tid`), `ev_bypass`, `ev_branch`, `ev_exception` and `ev_interrupt`.

Both threads start at reset with all registers zero and interrupts disabled. Software can tell
the threads apart only by where they start, so give them different entry code or let each entry
point set up its own data pointers.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_minimips_imt \
    rtl/mips_imt_pkg.sv tb/mips_asm_pkg.sv tb/tb_minimips_imt.sv -Mdir obj
./obj/Vtb_minimips_imt
```

For another block, replace the testbench name: `tb_thread_sel`, `tb_pc_unit`, `tb_reg_bank`,
`tb_bypass_unit`, `tb_bus_ctrl`, `tb_ei_stage`, `tb_di_stage`, `tb_ex_stage`, `tb_mem_stage`,
`tb_syscop`. Verilator finds the other files through `-I`.

Test programs are written in SystemVerilog: `tb/mips_asm_pkg.sv` has one encoder function per
instruction, and the testbenches place the words into `tb/mem_model.sv`, a 16 KiB behavioural
memory. Its word index is address bit 29 followed by bits 12:2. That keeps the reset region,
the exception vector and a data area at 0x1000–0x1FFF in separate words of a small array. It
can insert wait states with its `hold` input.

`tb_minimips_imt` runs the core at its default parameters. It runs:

* a 4×4 matrix multiply whose rows are split between the two threads, which share the code;
* directed checks of the delay slot, back-to-back dependencies through ALU results and loads,
  byte/halfword stores and loads, and signed/unsigned multiply and divide;
* three exceptions in thread 0, and a SYSCALL plus an external interrupt in thread 1, under a
  shared handler that logs Cause;
* a stretch of random memory wait states.

It checks every result. It also checks the cycle accounting above and that instructions complete
in strict A B A B order, and it requires each mechanism (bus stall, wait state, bypass, taken
branch, exception, interrupt) to occur at least once.
More system tests run at the default parameters:

* `tb_minimips_isa` runs every implemented instruction in both threads through shared code.
  It checks each result, the exact delay-slot behaviour of every branch and jump, and the
  link values.
* `tb_minimips_random` generates random programs for both threads: ALU, shift, multiply/divide,
  loads/stores and forward branches with random delay slots. It runs them with and without
  random wait states and compares every register and data word with a sequential MIPS-I
  interpreter written in the testbench.
* `tb_workload_independent` and `tb_workload_matmul` run the two usage patterns the
  interleaving is meant for: two unrelated programs, and one parallel job (an 8×8 matrix
  multiply split by rows). The first shows that the two programs finish together, each at
  two cycles per instruction. The second shows that both threads together run at one cycle
  per instruction apart from the bus cycles of loads and stores: about 1.12 cycles per
  instruction for the matrix multiply, where 11 % of the instructions are memory accesses.
* `tb_workload_os` runs two programs under a periodic clock tick, the case where a
  single-context core would pay for a context switch at every tick. A timer model raises each
  thread's interrupt line at its own period and drops it when that thread acknowledges. One
  handler serves both threads, saves no registers, and uses only k0/k1 to find its thread's
  tick record. The test checks that every tick is counted once by the right thread, that
  ticks landing in delay slots resume correctly, and that each tick costs only its own thread
  two bubble slots plus the handler, leaving the other thread's timing unchanged.

## How far to trust it, and where it is this design's own

The pipeline organisation comes from the source design: the five stages, the doubled PC and
register bank, the one-bit selection counter, the removal of the branch predictor, the one
delay slot and branch resolution in the fourth stage. Everything inside the stages was written
here from the MIPS-I architecture definition, because the source gives each unit only by name
and purpose:

* the exact instruction list. The original core implements 51 MIPS-I instructions that are not
  listed; this one decodes the 57 given above;
* per-thread HI/LO and per-thread coprocessor-0 state, which keep each thread a complete
  context;
* the reduced bypass. The source describes the interleaved pipeline as free of dependency
  handling, but its block diagram still contains the bypass unit, and the timing above needs
  the one MEM→DI path that is kept. Its thread comparison is redundant as long as the
  interleaving holds, and is kept only as a guard;
* the bus handshake, data-over-fetch priority and little-endian byte lanes;
* reset addresses, the exception vector, one interrupt line per thread, and the
  single-cycle multiplier/divider;
* how exceptions are handled: the instruction after the faulting one is dropped, and BD/EPC
  follow the R3000 rules.

The source reports a 15.5 % slice and 41.3 % flip-flop increase over the single-thread core on a
Virtex-II FPGA, with the clock rate almost unchanged. That comparison has not been repeated for
this RTL. Yosys coarse synthesis gives about 600 flip-flop bits outside the register arrays.
The two general-register arrays hold 2 × 992 bits (31 words each, as in the source design), and
the coprocessor state adds 172 bits held as memories.

Verification is by simulation only: one unit testbench per block with random and directed
stimulus, and the system tests above. For each block, a deliberately broken copy was checked to
fail its testbench. The core has not run compiled C programs and has not been compared
against a reference MIPS simulator.
