# A fine-grained multithreaded MIPS soft processor (3, 5 or 7 stages)

A pipelined soft processor gets much of its cost from keeping dependent
instructions apart. Hazard detection stalls the pipeline, forwarding paths
carry results back to earlier stages, and branch mispredictions or delay slots
waste issue slots. This processor avoids all of that by **issuing from a
different thread every cycle**. Threads take turns in strict round-robin
order. When there are about as many threads as pipeline stages, an
instruction has left the pipeline (or passed the point that matters) before
the next instruction of its own thread enters. Instructions that are in
flight together are therefore independent. The pipeline has no hazard
detection, no forwarding network and no branch predictor, and the 5- and
7-stage versions retire one instruction every cycle.

The per-thread state is kept cheap:

* One program counter per thread.
* One physical register file holding every thread's registers. The thread
  number selects a range within it.
* One instruction memory, shared by all threads.
* One data memory, divided into a private range per thread.

The instruction set is a subset of 32-bit MIPS I, changed to suit the
interleaving: no branch or load delay slots, no Hi/Lo registers, and a
3-operand multiply that writes straight to the register file.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The memories are
written as arrays that map onto FPGA block RAM.

## Instruction set

The instructions are MIPS I encodings, with these changes:

| Group | Instructions | Notes |
|---|---|---|
| ALU, register | ADD(U), SUB(U), AND, OR, XOR, NOR, SLT, SLTU | ADD/SUB do not trap on overflow |
| ALU, immediate | ADDI(U), SLTI(U), ANDI, ORI, XORI, LUI | |
| Shifts | SLL, SRL, SRA, SLLV, SRLV, SRAV | |
| Multiply | `MUL rd,rs,rt` (SPECIAL funct 0x18): low 32 bits of rs×rt; `MULH rd,rs,rt` (funct 0x19): high 32 bits of the signed product | Replaces MULT/MULTU/MFHI/MFLO; no Hi/Lo state per thread |
| Loads/stores | LB, LBU, LH, LHU, LW, SB, SH, SW | Little-endian byte lanes; no alignment trap |
| Branches | BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ | **No delay slot**: target = PC+4+offset·4 |
| Jumps | J, JAL, JR, JALR | **No delay slot**: JAL/JALR link PC+4 |

Division is left to software. There are no exceptions, interrupts or
coprocessor 0. Unknown opcodes do nothing.

Removing the Hi/Lo registers matters more for a multithreaded core than for a
single-threaded one. Hi and Lo would have to be copied for every thread, and
the multiplexers that route them back cost area. A multiply that writes the
normal register file needs neither.

## How interleaving replaces hazard logic

All three pipelines use synchronous block memories. Each memory registers its
address on a clock edge and returns the data in the following cycle. Each
instruction passes three such edges in a fixed order:

1. Fetch address into the instruction memory.
2. Register numbers into the register file, at the end of decode.
3. Data address into the data memory, at the end of execute.

The result is written to the register file at the end of W. A register read
that is registered on the same edge as a write sees the new value (the
block RAM runs write-first).

Take thread *t* issuing instruction *i* in cycle *c*. Its next instruction
*i+1* is fetched in cycle *c+T* at the earliest, where T is the number of
threads. Two conditions decide whether the pipeline is safe:

* **Branches.** A branch of *i* is resolved in execute, and it rewrites only
  the PC of thread *t*. The PC of *i+1* is chosen one cycle before *i+1* is
  fetched. If that cycle is not after the branch resolves, the branch target
  has to be forwarded into the fetch address. `thread_pcs` does this.
* **Registers.** *i+1* must read its registers no earlier than the edge on
  which *i* writes its result.

| Pipeline | Stages | Branch resolved | Result written | Fewest threads that work |
|---|---|---|---|---|
| 3-stage | F E (M) W | cycle c+1 | end of c+2 (short), c+3 (long) | 3; 2 with target forwarding and one extra hold (below) |
| 5-stage | F D E M W | c+2 | end of c+4 | 3 (with target forwarding), 4 without |
| 7-stage | F D R E1 E2 M W | c+3 | end of c+6 | 5 |

By default `THREADS = STAGES`. One thread fewer than the stage count also
works for all three depths. It gives the same throughput, a shorter latency
for each thread, and one thread context less. An elaboration-time assertion
rejects thread counts below the minimum in the table.

Consecutive instructions in the pipeline always belong to different threads.
The processor therefore never compares register numbers between
instructions. Its only stall is a structural one, in the 3-stage pipeline.

## The three pipelines

### 3-stage: F, E, W, with a pipelined second execute cycle

* **F** reads the instruction, decodes it and addresses the register file.
* **E** executes and resolves branches.
* **W** writes the result.

Loads, shifts and multiplies ("long" instructions) need a second execute
cycle, **M**:

* Shifts go through the multiplier, as a multiply by 2^s.
* The multiplier is split by a register after the product.
* A load reads the data memory in M.

Because neighbouring instructions come from different threads, this
two-cycle path is **pipelined**: long instructions can enter E back to back.
A single-threaded pipeline could not do this without extra hazard logic.

The register file has only one write port, and that creates the one stall
in the design. A short instruction that directly follows a long one would
reach W in the same cycle as the long one. It is held in F for one cycle,
and a bubble enters E. Copies of one program tend to bring long instructions
together and rarely stall. Mixes of different programs stall more often. In
the tests the 3-stage core reaches 0.78 to 0.96 instructions per cycle (see
"Copies versus mixes").

With only 2 threads, a thread's next instruction may reach F while its own
long instruction is still in M. That instruction is also held for one cycle.
The same cycle would otherwise lose the result. The branch target also has to
be forwarded to fetch, which puts the branch adder on the fetch path.

### 5-stage: F, D, E, M, W

Every unit takes one cycle. The shifter is built from the multiplier, the
multiply finishes in E, and loads read memory in M. Nothing can stall, so one
instruction retires every cycle. This pipeline is the default.

`NUM_REGS = 25` selects a smaller register file. Each thread then keeps 25
registers instead of 32, and the compiler must leave s0–s6 (r16–r22) unused.
Five threads × 25 registers × 32 bits is 4000 bits, which fits one 4-Kbit
block memory per copy.

### 7-stage: F, D, R, E1, E2, M, W

* **R** registers the operands.
* **E1** holds the ALU, a barrel shifter and branch resolution, and starts
  the multiply.
* **E2** finishes the multiply and sends the address to the data memory.

Nothing can stall, so one instruction retires every cycle.

## Shared thread state

**Register file (`mt_regfile`).** There is one physical array, stored twice:
each copy serves one read port, and every write goes to both copies. With 32
registers per thread the physical index is `{thread, reg}`, i.e. the register
number shifted by the thread number. With 25 registers it is
`thread*25 + compact(reg)`, where `compact` closes the gap left by
r16–r22. That layout needs an adder. Register 0 reads as zero through a flag
that is registered alongside the read, and writes to it are dropped.

**Instruction memory (`imem`).** There is one memory, and each thread has its
own start address (`reset_pc`). Threads that run copies of one program share
one code range; each copy only needs its own start-up code to set its stack
and global pointers. Threads that run different programs use separate
ranges.

**Data memory (`dmem`).** There is one memory, cut into 2^⌈log2 THREADS⌉
equal ranges. A thread's byte address is reduced modulo its range, and the
thread number forms the upper address bits. A thread therefore cannot reach
another thread's data. With the default 16384 words and 5 threads, each
thread gets 2048 words (8 KB). The data memory also:

* steers stores onto byte lanes,
* aligns and sign- or zero-extends loads,
* has a second port for the host.

## Interface of `mt_processor`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock; asynchronous active-low reset |
| `reset_pc[THREADS]` | in | Start byte address of each thread, loaded at reset |
| `imem_load_we/addr/data` | in | Writes a program word (word address) |
| `dmem_host_we/addr/wdata` | in | Host write into the data memory (physical word address = thread·range + offset) |
| `dmem_host_rdata` | out | Host read data, one cycle after the address |
| `retire`, `retire_tid`, `retire_pc`, `retire_instr` | out | One instruction leaving W |
| `ev_stall`, `ev_redirect`, `ev_pc_bypass` | out | Stall cycle (3-stage only); taken branch or jump; branch target forwarded to fetch |

| Parameter | Default | Meaning |
|---|---|---|
| `STAGES` | 5 | 3, 5 or 7 |
| `THREADS` | `STAGES` | Hardware threads (see the minimums above) |
| `NUM_REGS` | 32 | 32, or 25 for the reduced file |
| `IMEM_WORDS`, `DMEM_WORDS` | 16384 | Memory sizes (64 KB each) |

Use:

1. Hold `rst_n` low.
2. Load the code and the data.
3. Set `reset_pc`.
4. Release the reset.

Threads run until the next reset, and a program finishes by jumping to
itself.

## Modules

| File | Contents |
|---|---|
| `rtl/mt_pkg.sv` | Opcodes, function codes, decoded-instruction struct |
| `rtl/mt_processor.sv` | Top: core + memories |
| `rtl/mt_core.sv` | The pipeline for all three depths (generate blocks per depth) |
| `rtl/thread_pcs.sv` | PCs per thread, round-robin select, branch redirect and forwarding |
| `rtl/mt_regfile.sv` | Shared, duplicated register file |
| `rtl/sdp_ram.sv` | Generic one-write/one-read synchronous RAM |
| `rtl/imem.sv`, `rtl/dmem.sv` | Instruction and data memories |
| `rtl/decoder.sv`, `rtl/alu.sv`, `rtl/branch_unit.sv` | Decode, integer ALU, branch condition and target |
| `rtl/shifter.sv` | Multiplier-based or barrel shifter, optionally registered |
| `rtl/multiplier.sv` | MUL/MULH, combinational or registered |

## Simulating

Each testbench in `tb/` checks itself and prints one line,
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mt_pkg.sv tb/mips_asm_pkg.sv tb/tb_mt_processor.sv \
    --top-module tb_mt_processor -o sim
./obj_dir/sim
```

The testbenches are:

* **`tb_mt_processor`** runs the whole processor in six configurations:
  3/3, 3/2, 5/5, 5/4 with the 25-register file, 7/7 and 7/6
  (stages/threads).
  * Every thread runs a program that touches every instruction class:
    ALU, immediate, multiply, all shifts, byte/half/word memory access,
    every branch, calls and loops.
  * The last thread runs from its own code range.
  * Every result word is compared with values the testbench computes itself.
  * The test also checks strict thread alternation at retirement, and that
    every cycle either retires an instruction or is a stall.
  * It requires that each mechanism actually happened: the 3-stage stall,
    back-to-back long instructions, taken branches, and branch-target
    forwarding with 2 threads.
* **`tb_mt_processor_full`** runs the same program on the processor with all
  defaults (5 stages, 5 threads, 64 KB memories) and requires IPC = 1.
* **`tb_mt_core`** runs a chain in which every instruction depends on the
  previous one, on all three depths. It checks:
  * the result,
  * round-robin retirement,
  * that each thread retires every THREADS cycles at 5 and 7 stages,
  * that the first instruction retires after exactly STAGES cycles.
* **`tb_mt_workloads`** runs three small kernels, as copies of one kernel
  and as multiprogrammed mixes. The results are in the next section.
* **Unit tests**: `tb_alu`, `tb_decoder`, `tb_shifter` (every shift amount,
  multiplier and barrel forms), `tb_multiplier`, `tb_branch_unit`,
  `tb_thread_pcs`, `tb_mt_regfile` (both layouts, write-first, r0),
  `tb_imem`, `tb_dmem` (all access sizes from five threads against a byte
  model).

`tb/mips_asm_pkg.sv` holds small encoder functions for writing test programs
in SystemVerilog.

## Copies versus mixes

The workload test uses three kernels, one for each kind of program that
stresses the long path:

* a bubble sort of 16 words (mostly loads),
* a bitwise CRC-32 over 8 words (mostly shifts),
* an 8-tap FIR filter (mostly multiplies).

Each is run as one copy per thread, and as a mix in which threads take the
kernels in turn. IPC is measured from reset until the first thread finishes,
as is usual for multiprogrammed mixes:

| Pipeline | Threads | Workload | IPC |
|---|---|---|---|
| 3-stage | 3 | sort ×3 | about 0.83 |
| 3-stage | 3 | CRC ×3 | 0.954 |
| 3-stage | 3 | FIR ×3 | 0.960 |
| 3-stage | 3 | mix, three rotations | 0.80–0.82 |
| 3-stage | 2 | mix | 0.778 |
| 5-stage | 5 | CRC ×5, mix, mix with 25 registers | 1.000 |
| 7-stage | 7 and 6 | mixes | 1.000 |

Copies of one program run the same instruction class in neighbouring slots.
Long instructions then follow long ones and flow through the pipelined
second execute cycle without conflict. In a mix, short and long instructions
alternate more often, so the 3-stage pipeline stalls more. The deeper
pipelines have no multi-cycle paths and never stall. Figures that involve the sort
vary a little from run to run. The input data is random, and the number of
swaps depends on it.

## What to trust, and what was chosen here

Taken directly from the design as specified:

* Round-robin fine-grained multithreading with one thread per stage (or one
  fewer), and no hazard detection or forwarding.
* Replicated PCs.
* One shared register file indexed by shifting the register number (or by
  adding an offset for 25 registers), duplicated for the second read port.
* One instruction memory and one data memory with a private data range per
  thread.
* No delay slots; 3-operand multiplies instead of Hi/Lo.
* A multiplier-based shifter at 3 and 5 stages, a barrel shifter at 7.
* Pipelined long instructions at 3 stages; single-cycle units at 5 stages.
* The reduced 25-register file.

Choices made in this implementation, where the specification gives no
detail:

* Which operations sit in which stage at each depth, including the R and E2
  stages of the 7-stage pipeline.
* The encodings of MUL/MULH, and the signed high word.
* Which seven registers the reduced file drops (r16–r22).
* The write-first register file.
* How the single write port is resolved in the 3-stage pipeline (hold a short
  instruction that follows a long one).
* The extra same-thread hold with 2 threads.
* The lowest accepted thread count. The usual rule is one thread fewer than
  the stage count. The 5-stage pipeline also accepts 3 threads, because its
  branch targets are forwarded to fetch. Only 4 and 5 threads at 5 stages
  are exercised by the tests.
* The data-memory range mapping and the little-endian byte lanes.
* The memory sizes (one 64 KB block each).
* The load and host ports.

Not included:

* Caches and off-chip memory.
* Exceptions and interrupts.
* Divide.
* The single-threaded comparison processors and the Hi/Lo alternative.

Area, clock frequency and power depend on the FPGA and tools, and nothing
here measures them. The cycle-level behaviour is checked in simulation:
IPC of exactly 1 for the 5- and 7-stage pipelines, and stalls only where
described for the 3-stage one. The tests use hand-written programs, not
compiled benchmark code.
