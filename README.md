# RV32I teaching processor: multi-cycle and single-cycle

A state machine built for one job (say, a traffic light) has to be rebuilt
for the next job. A general-purpose processor avoids that. Its hardware is
fixed, and software chooses the job: a program of instructions sits in
memory, and the processor fetches, decodes and executes them one after the
other. This repository holds such a processor for the 32-bit RISC-V base
integer instruction set, RV32I, in synthesizable SystemVerilog. It comes in
two organisations built from the same parts:

* **Multi-cycle, one memory (von Neumann).** `mc_cpu` does each instruction
  in three steps: FETCH, DECODE and EXECUTE. Because of this, one memory can
  hold both the program and its data. The CPU is the active part and the
  memory is passive. Between them runs a single bus: address, one write
  wire, data out and data in.
* **Single-cycle, two memories (Harvard).** `sc_cpu` fetches, decodes and
  executes one instruction in each clock cycle. This needs a separate
  instruction memory and data memory. The clock period must also be long
  enough for the slowest instruction.

`rv32i_top` puts both machines side by side. Each has its own memory, and
all memories are loaded with the same program image.

## The building blocks

| module | what it is |
|---|---|
| `alu` | Combinational 32-bit ALU. It computes ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT and SLTU, plus pass-B for LUI, and a multiplexer driven by `alu_sel` picks one result. Status flags: A==B, signed A<B, unsigned A<B. |
| `regfile` | x0..x31, 32 bits each. One write port (`reg_write`, `rw`) and two combinational read ports (`ra`→`a`, `rb`→`b`). x0 always reads 0, and writes to it are dropped. |
| `instr_reg` | Instruction register. Loads the fetched word and splits it into funct7 [31:25], rs2 [24:20], rs1 [19:15], funct3 [14:12], rd [11:7] and opcode [6:0]. |
| `pc_reg` | Program counter. It can be reset to `RESET_PC`, advanced by 4, or loaded with a branch or jump target. |
| `decoder` | Maps the instruction to a `ctrl_t` bundle: the ALU operation, the operand sources (rs1 or the instruction address; rs2 or the immediate), the immediate format, whether rd is written and from where, memory read or write, branch, JAL, JALR and halt. |
| `imm_gen` | Builds the I, S, B, U and J immediates and sign-extends them by copying instruction bit 31 upwards. B and J offsets count in 2-byte units. |
| `branch_unit` | Turns funct3 and the ALU flags into "taken" for BEQ, BNE, BLT, BGE, BLTU and BGEU. |
| `load_store_unit` | Byte, halfword and word handling, little endian. For loads it picks the right byte lane and extends it with zeros (LBU, LHU) or with the sign bit (LB, LH). For stores it merges the low byte or halfword of rs2 into the addressed word. |
| `memory` | An array of 32-bit words with byte addresses. Reads are combinational and writes happen on the clock edge. A second read-only port lets the block serve as an instruction memory. It is loaded at start-up from a `$readmemh` image. |
| `mc_control` | The fetch/decode/execute state machine of the multi-cycle CPU. |
| `mc_cpu`, `sc_cpu` | The two processors. |
| `rv32i_top` | Both machines with their memories. |

`rv32i_pkg` holds the shared opcodes, the instruction field struct, the ALU
operation enum, the immediate formats and the control bundle.

## How the multi-cycle CPU steps through an instruction

This is the part of the design worth reading closely. The controller
(`mc_control`) is a five-state machine:

```
reset -> INIT --> FETCH --> DECODE --+--> EXECUTE --> FETCH ...
                                     |
                                     +--(instruction is EBREAK)--> HALT (until reset)
```

| state | what happens at the end of the cycle | bus carries |
|---|---|---|
| INIT | PC ← `RESET_PC` (0) | PC |
| FETCH | IR ← mem[PC]; `ipc` ← PC | PC (read) |
| DECODE | PC ← PC + 4; decoder output settles from IR | PC |
| EXECUTE | rd ← result, or mem[rs1+imm] ← data, or PC ← target | rs1+imm for loads and stores, otherwise PC |
| HALT | nothing | PC |

Some details follow from this sequence:

* **Three cycles per instruction.** After the one INIT cycle, each
  instruction takes FETCH, DECODE and EXECUTE. EBREAK takes only FETCH and
  DECODE before HALT. A program of *n* instructions that ends in EBREAK
  therefore keeps `halted` low for exactly 3·*n* cycles. The single-cycle
  CPU needs *n* cycles.
* **PC moves before the instruction executes.** DECODE already adds 4 to
  PC. That is why the CPU keeps the fetch address in a separate register,
  `ipc`. Branch and JAL targets are `ipc + offset`, AUIPC adds to `ipc`, and
  the link value of JAL and JALR is `ipc + 4`. The JALR target is
  rs1 + imm with bit 0 cleared.
* **Memory timing.** The memory is read combinationally. The instruction
  reaches IR in the FETCH cycle, and a load's data reaches rd in the EXECUTE
  cycle. No wait states exist. A memory with a registered read would need
  one extra state before each of those two steps.
* **Byte and halfword stores on a one-strobe bus.** The bus has a single
  write wire and no byte enables. For SB and SH, the CPU puts rs1+imm on the
  address in EXECUTE. It reads the word that is there, replaces the byte or
  halfword in `load_store_unit`, and writes the merged word back at the end
  of the same cycle. SW writes rs2 directly.
* **Halting.** EBREAK stops the machine so that a simulation can see the
  end of a program. `halted` stays high until reset. The multi-cycle PC
  then points past the EBREAK; the single-cycle PC stays on it.

## The single-cycle CPU

`sc_cpu` wires the same blocks without a controller. The instruction at PC
comes straight from `imem_rdata`, without an instruction register, and is
decoded and executed in the same cycle. At the clock edge PC becomes PC + 4
or the target, rd is written, and a store is written to the data memory.
It does byte and halfword stores in the same read-modify-write way as the
multi-cycle CPU, on its data port.

## Instruction set

All RV32I instructions are decoded: LUI, AUIPC, JAL, JALR, the six
conditional branches, LB, LH, LW, LBU, LHU, SB, SH, SW, the nine
register-immediate operations and the ten register-register operations.
EBREAK halts. FENCE and ECALL do nothing, because this machine has no
memory ordering to enforce and no operating system to call. Encodings
that are not RV32I also do nothing, and `ctrl.illegal` flags them inside
the decoder.

Byte order is little endian. For example, the instruction `0x02002083`
(LW x1, 0x20(x0)) sits in memory as the bytes `83 20 00 02`.

## Where the design makes its own choices

These points are not fixed by the instruction set or the machine
organisation described above. They can be changed without touching the
rest of the design:

* **Sizes.** Memory is 1024 words (4 KiB) per memory (`MEM_WORDS`). Address
  bits above the array are ignored, so addresses wrap.
* **Reset.** Resets are synchronous and active low. The PC starts at
  address 0. An alternative start address can be set with `RESET_PC` /
  `MC_RESET_PC`; an address of 0x10 is also a natural choice. IR resets to
  a no-op, and the data registers have no reset.
* **Memory reads** are combinational (see above).
* **Misaligned accesses** do not trap. For word accesses the low address
  bits are ignored, and for halfword accesses bit 0 is ignored.
* **Encodings.** The ALU flags, the encodings of `alu_sel` and of the
  control bundle, and the HALT state are this design's own.
* **Not included.** There are no input/output devices, no interrupts, no
  CSRs and no multiply/divide.

## Program image

`rtl/demo_program.hex` is the default image for all memories in
`rv32i_top`. It holds one 32-bit word per line, starting at address 0. The
program loads 42 from 0x20 and 13 from 0x24, adds them, stores 55 at 0x28
and halts:

```
0x00  02002083  LW   x1, 0x20(x0)
0x04  02402103  LW   x2, 0x24(x0)
0x08  002081b3  ADD  x3, x1, x2
0x0c  02302423  SW   x3, 0x28(x0)
0x10  00100073  EBREAK
0x20  0000002a  .word 42
0x24  0000000d  .word 13
```

The path of the image is a parameter (`MC_INIT_FILE`). It is relative to
the directory the simulator runs in.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `rv32i_ref_pkg` is an instruction-set model of RV32I, written
  independently of the RTL. Its `gen_program` produces random programs that
  always end:
  1. a prologue that gives every register a random 32-bit value;
  2. a body of ALU operations, LUI/AUIPC, loads and stores (relative to x0
     or to a freshly set base register), forward branches, JAL and JALR;
  3. an epilogue that stores x1..x31 to 0x700.. and executes EBREAK.
* `mc_cpu_tb` and `sc_cpu_tb` run the demo program and 200 random programs.
  After each program they compare the entire memory with the model and
  check the cycle count: 3 per instruction for the multi-cycle CPU, 1 for
  the single-cycle CPU. `mc_cpu_tb` also checks the state sequence of the
  demo program.
* `rv32i_top_tb` runs the top at its default sizes. It runs the demo program
  from the default image on both machines (55 at 0x28, 15 and 5 cycles),
  then 100 random programs. It counts each mechanism and fails if any never
  occurs: the five controller states, each instruction class, taken and
  not-taken branches, JAL, JALR, byte and halfword loads and stores, and
  halting.
* The unit testbenches compare each block with a model written separately
  in the testbench: ALU results and flags, register file, instruction
  fields, PC updates, decoder control words for every instruction and for
  invalid encodings, immediates of all five formats, load/store byte lanes,
  branch conditions, memory ports, and the controller states.

Simulate with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/rv32i_pkg.sv tb/rv32i_ref_pkg.sv tb/rv32i_top_tb.sv --top-module rv32i_top_tb
./obj_dir/Vrv32i_top_tb
```

Replace `rv32i_top_tb` with any other `*_tb` to run that block's test.
Verilator finds the other modules through `-Irtl`.
