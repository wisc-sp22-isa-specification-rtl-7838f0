# WISC-SP22: a 16-bit teaching processor in SystemVerilog

WISC-SP22 is a small load/store instruction set for teaching computer
architecture. It has eight 16-bit registers, 16-bit instructions, and byte
addresses, so the PC advances by 2. Every instruction does one simple thing.
This RTL implements the whole instruction set as a processor that completes
one instruction per clock cycle. It has separate instruction and data memories
and needs no stalls, forwarding or branch prediction. That includes the
optional exception instructions SIIC and RTI.

The instruction set fixes what every instruction does. The organisation of
the processor is this design's own choice. That covers single-cycle
execution, the memory sizes and ports, the reset state, and the load, dump
and trace interfaces.

## Instruction formats

Bits [15:11] always hold a 5-bit opcode. There are four formats:

| Format      | [15:11] | [10:8] | [7:5]  | [4:2]  | [1:0]     |
|-------------|---------|--------|--------|--------|-----------|
| J           | opcode  | 11-bit displacement (signed) ||||
| I-format 1  | opcode  | Rs     | Rd     | 5-bit immediate ||
| I-format 2  | opcode  | Rs     | 8-bit immediate |||
| R-format    | opcode  | Rs     | Rt     | Rd     | extension |

All 32 opcodes are in use:

| Opcode | Instruction | Opcode | Instruction |
|---|---|---|---|
| 00000 | HALT | 10000 | ST Rd, Rs, imm |
| 00001 | NOP | 10001 | LD Rd, Rs, imm |
| 00010 | SIIC Rs | 10010 | SLBI Rs, imm |
| 00011 | RTI | 10011 | STU Rd, Rs, imm |
| 00100 | J disp | 10100..10111 | ROLI, SLLI, RORI, SRLI |
| 00101 | JR Rs, imm | 11000 | LBI Rs, imm |
| 00110 | JAL disp | 11001 | BTR Rd, Rs |
| 00111 | JALR Rs, imm | 11010 | ROL/SLL/ROR/SRL (ext 00/01/10/11) |
| 01000..01011 | ADDI, SUBI, XORI, ANDNI | 11011 | ADD/SUB/XOR/ANDN (ext 00/01/10/11) |
| 01100..01111 | BEQZ, BNEZ, BLTZ, BGEZ | 11100..11111 | SEQ, SLT, SLE, SCO |

### Semantics that are easy to get wrong

- **Subtraction is reversed.** `SUB Rd,Rs,Rt` computes Rt − Rs, and
  `SUBI Rd,Rs,imm` computes imm − Rs. The ALU has a dedicated `ALU_RSUB`
  operation (B − A) for these.
- **Immediate extension depends on the kind of operation.** Arithmetic and
  memory instructions sign-extend their 5-bit immediate. XORI, ANDNI and the
  shifts zero-extend it, and shifts use only its low 4 bits. LBI, branches, JR
  and JALR sign-extend 8 bits. SLBI zero-extends 8 bits. J and JAL sign-extend
  11 bits.
- **ANDN/ANDNI clear bits.** They compute Rs AND NOT(operand).
- **STU** stores Rd at Rs + imm and also writes that effective address back
  into Rs.
- **SLBI** computes Rs ← (Rs << 8) | imm8.
- **Branch and jump targets are relative to PC + 2**, the next instruction.
  JR and JALR jump to Rs + imm. JAL and JALR write PC + 2 into R7.
- **Set instructions** write 1 or 0. SEQ, SLT and SLE compare as two's
  complement. SCO writes the carry out of the unsigned 16-bit sum Rs + Rt.
- **BTR** reverses the bits of Rs.
- **HALT** lets older instructions finish and stops issuing. The PC is left
  at the word after the HALT.
- **SIIC** is an illegal-instruction trap. It sets EPC to PC + 2 and jumps to
  the handler at address 0x0002. **RTI** loads the PC from EPC. Its Rs field
  is ignored. Because the handler sits at 0x0002, a program normally starts
  with a jump over it.

## Organisation

```
                 +---------+   instr   +-------------+  ctrl_t
  PC ----------> | u_imem  | --------> | u_dec       | -------------------+
  ^              +---------+           +-------------+                    |
  |                                     rs, rt | rd, we                    |
  |    +-------------+  rs_val   +-------------+                          |
  +--- | u_pc        | <-------- | u_rf        |  rt_val (store data)     |
       | PC, EPC,    |           +-------------+ -------+                 |
       | halted      |            rs_val |  | rt_val    |                 |
       +-------------+                   v  v (or imm)  v                 |
             | pc_plus2            +-------------+  addr  +---------+     |
             +------------------+  | u_alu       | -----> | u_dmem  |     |
                                |  | (u_shifter) |        +---------+     |
                                v  +-------------+             | rdata    |
                             write-back mux: ALU / memory / PC+2 ----> u_rf
```

| Module | Role |
|---|---|
| `wisc_pkg` | Opcodes, ALU/shift/branch/next-PC enumerations, and the `ctrl_t` control word |
| `wisc_cpu` | Top level. Wires the datapath, loads the program, exposes the dump port and trace |
| `wisc_decoder` | Instruction → `ctrl_t` |
| `wisc_regfile` | R0..R7. Two asynchronous read ports and one write port |
| `wisc_alu` | Add, reverse subtract, XOR, AND-NOT, compares, SCO, BTR, LBI/SLBI. Shifts go through `wisc_shifter` |
| `wisc_shifter` | Rotate left, shift left, rotate right and shift right logical by 0..15, as a 4-stage barrel shifter |
| `wisc_pc_unit` | PC, EPC and the halted flag. Evaluates branch conditions and picks the next PC |
| `wisc_mem` | 16-bit word memory with byte addressing. Used twice: instruction memory and data memory |

### The decoder's fixed port assignment

Register read port A always gets bits [10:8] and port B always gets bits
[7:5]. In the R-format, [7:5] is Rt. In I-format 1 it is "Rd", which a
store reads as its data. So ST and STU read their store data through port B
with no extra multiplexer. The write address is the only field that changes
with the format:

- [4:2] for R-format
- [7:5] for I-format 1 ALU instructions and LD
- [10:8] for LBI and SLBI, and for STU's base update
- R7 for JAL and JALR

### Next-PC selection

`wisc_pc_unit` takes the decoder's `npc_sel`:

| `npc_sel` | Next PC |
|---|---|
| `SEQ` | PC + 2 |
| `BRANCH` | PC + 2 + imm if the condition on Rs holds, else PC + 2 |
| `JUMP` | PC + 2 + imm |
| `JREG` | Rs + imm |
| `EXC` | 0x0002 (also loads EPC with PC + 2) |
| `RTI` | EPC |
| `HALT` | PC + 2 (also sets `halted`) |

Once `halted` is set, the PC, the register file and the data memory stop
changing until the next reset.

## Timing and interfaces of `wisc_cpu`

- **Clock and reset.** `rst_n` is asynchronous and active low. Reset sets the
  PC, EPC and all registers to 0. Memory contents are not reset; they start
  at zero, which decodes as HALT.
- **One instruction per cycle.** Fetch, decode, register read, ALU, memory
  read and write-back all happen in one cycle. Both memories are read
  combinationally. Register-file and memory writes and the new PC take effect
  at the rising edge. A program of N dynamic instructions takes N cycles from
  reset release to `halted`.
- **Loading a program.** Hold `rst_n` low. For each word, drive `load_we`,
  `load_addr` (byte address) and `load_data` for one clock edge. The word is
  written into both memories. An assertion flags `load_we` outside reset.
- **Reading results.** `dump_addr`/`dump_data` is a second, combinational read
  port on the data memory. Use it to dump the memory after HALT.
- **Trace.** While `trace_valid` is high, the `trace_*` outputs describe the
  instruction executing this cycle:
  - its PC and encoding
  - its register write (enable, register, value)
  - its store (enable, address, data)
  - whether it redirects the PC
  - the current EPC

  The testbench compares this against a reference model.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `wisc_cpu.MEM_WORDS` / `wisc_mem.WORDS` | 32768 | Words per memory. The default covers the whole 16-bit byte address space. A smaller memory wraps addresses. |

The instruction set fixes every other width: 16-bit data and addresses, 8
registers, and 3-bit register fields.

## Choices this design makes where the ISA is silent or inconsistent

- **Single-cycle organisation.** The ISA mentions a pipeline in passing but
  gives it no structure. This design implements the architectural behaviour
  with CPI = 1. A pipelined version would need its own hazard logic.
- **Harvard memories, word accesses.** Address bit 0 is ignored. There is no
  alignment exception and no byte access.
- **JALR link value is PC + 2.** One description says "address of the JALR
  instruction plus one". The summary table and JAL both say PC + 2, and PC + 2
  is the next instruction's byte address.
- **J-format displacements are 11 bits for J and JAL.** The format is
  "5 bits | 11 bits"; some encodings in the summary are printed with fewer
  `d`/`x` characters.
- **SIIC and RTI are fully implemented**, not left as NOP. A SIIC inside the
  handler overwrites EPC. There is no nesting.
- **HALT's "dump memory state to file"** is left to the environment. The
  processor stops and offers the dump port; the testbench reads the memory
  through it.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wisc_pkg.sv tb/tb_wisc_cpu.sv \
          --top-module tb_wisc_cpu -Mdir obj_cpu && obj_cpu/Vtb_wisc_cpu
```

Replace `cpu` with `alu`, `shifter`, `regfile`, `decoder`, `pc_unit` or `mem`
to run a unit test.

| Testbench | What it checks |
|---|---|
| `tb_wisc_cpu` | Full-size processor (default parameters). An instruction-set reference model in the testbench runs in lockstep with the processor. The trace is compared every cycle, the whole data memory is compared after each HALT, and the cycle count must equal the instruction count. It runs one directed program with hand-computed results, then 40 random programs of 300 instructions. The directed program covers every opcode, each branch both taken and not taken, SIIC→handler→RTI, JAL/JR, JALR and STU. The random programs use forward branches and jumps only. They also raise SIIC, whose handler returns at once. The test counts each mechanism: every opcode, every branch outcome, exception entry and return, links, STU, loads, stores, carry out and rotate wrap-around. A mechanism that never occurs is a failure. |
| `tb_wisc_alu` | Every ALU operation and shift kind, on corner values and random operands, against integer arithmetic |
| `tb_wisc_shifter` | All kinds and amounts against a doubled-word reference |
| `tb_wisc_decoder` | All 32 opcodes and all extensions against a per-opcode expectation table (write register, immediate extension, ALU op, write-back source, load/store, next PC, branch condition) |
| `tb_wisc_pc_unit` | Random next-PC kinds and Rs values against the ISA rules, including EPC, `taken`, and the PC freezing after HALT |
| `tb_wisc_regfile` | Reset to zero, then random writes and reads against a shadow array |
| `tb_wisc_mem` | Zero initial contents, then random reads and writes on both ports (at 256 words) |

## Limits

- No pipeline, caches or multi-cycle memory. Nothing here models timing
  beyond one instruction per clock.
- The reset state, the memory sizes and the program-load, dump and trace
  ports are this implementation's. Change them freely. The instruction
  semantics are fixed by the ISA and captured in `wisc_decoder`, `wisc_alu`,
  `wisc_shifter` and `wisc_pc_unit`.
