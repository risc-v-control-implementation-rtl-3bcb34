# RV32I in one cycle and in five stages

This is the textbook RISC-V RV32I processor in two forms that share their parts.
The **single-cycle processor** runs each instruction from fetch to register write in
one long clock cycle. A small ROM turns nine instruction bits plus two comparator
flags into every control signal of the datapath. The **five-stage pipelined
processor** cuts the same datapath into IF, ID, EX, MEM and WB with four pipeline
registers. Up to five instructions are in flight, so the clock can be as short as
the slowest stage rather than the slowest instruction. Both run the RV32I integer
instructions: loads and stores of every width, all branches, `jal`, `jalr`, `lui`,
`auipc` and all register and immediate ALU operations.

The pipeline is deliberately the *basic* one. It has no forwarding, no stalls and
no flushes. Software must schedule around data and control hazards (see
"What the pipeline does not do"). This is the most important thing to know before
using it.

## The datapath

Both processors are built from the same units (`rtl/`):

| unit | module | behaviour |
|---|---|---|
| PC register, PC+4 adder, PC mux | inside the processors | `PCSel` = 0 takes PC+4, `PCSel` = 1 takes the ALU result |
| instruction memory | `imem` | 1024 words, combinational read; a load port fills it |
| register file `Reg[]` | `regfile` | 32 x 32 bits; 2 combinational reads, 1 write at the clock edge; x0 = 0 |
| immediate generator | `imm_gen` | I, S, B, U, J immediates from `inst[31:7]`, chosen by `ImmSel` |
| branch comparator | `branch_comp` | `BrEq`, `BrLT` (signed, or unsigned when `BrUn` = 1) |
| operand muxes | inside the processors | `ASel`: R[rs1] or PC; `BSel`: R[rs2] or immediate |
| ALU | `alu` | add, sub, sll, slt, sltu, xor, srl, sra, or, and, pass-B |
| data memory | `dmem` | 1024 words, combinational read, write at the clock edge when `MemRW` = 1 |
| write-back mux | inside the processors | `WBSel`: 0 memory, 1 ALU, 2 PC+4 |
| controller | `control_rom` | 2048 x 15-bit ROM |

Branch and jump targets come out of the ALU: a branch adds the B-immediate to the
PC (`ASel` = PC, `BSel` = imm), `jal` adds the J-immediate to the PC, and `jalr`
adds the I-immediate to R[rs1]. The PC mux needs only two inputs, and the
comparator only decides *whether* the ALU result becomes the next PC. `jal` and
`jalr` write PC+4 to `rd` through the write-back mux. The `jalr` target is used as
the ALU produces it, without clearing bit 0. The instruction memory ignores the
two low address bits.

## The controller: a ROM addressed by nine instruction bits

Every RV32I instruction this design implements can be told apart by nine bits:
`inst[30]`, `funct3 = inst[14:12]` and `inst[6:2]` (the two low opcode bits are always
`11`, and `inst[30]` is the only `funct7` bit that varies: add/sub, srl/sra). Adding
the comparator outputs `BrEq` and `BrLT` gives an 11-bit address. The ROM word at
that address is the whole control word, 15 bits in this order (`rv32i_pkg::ctrl_t`):

```
PCSel | ImmSel[2:0] | BrUn | ASel | BSel | ALUSel[3:0] | MemRW | RegWEn | WBSel[1:0]
```

Some rows of the table (– marks a don't-care; the ROM stores 0 there):

| instr | PCSel | ImmSel | BrUn | ASel | BSel | ALUSel | MemRW | RegWEn | WBSel |
|---|---|---|---|---|---|---|---|---|---|
| add  | 0 | – | – | rs1 | rs2 | add | read | 1 | ALU |
| sub  | 0 | – | – | rs1 | rs2 | sub | read | 1 | ALU |
| addi | 0 | I | – | rs1 | imm | add | read | 1 | ALU |
| lw   | 0 | I | – | rs1 | imm | add | read | 1 | mem |
| sw   | 0 | S | – | rs1 | imm | add | write | 0 | – |
| beq  | BrEq | B | – | PC | imm | add | read | 0 | – |
| bne  | !BrEq | B | – | PC | imm | add | read | 0 | – |
| blt / bge | BrLT / !BrLT | B | 0 | PC | imm | add | read | 0 | – |
| bltu / bgeu | BrLT / !BrLT | B | 1 | PC | imm | add | read | 0 | – |
| jalr | 1 | I | – | rs1 | imm | add | read | 1 | PC+4 |
| jal  | 1 | J | – | PC | imm | add | read | 1 | PC+4 |
| auipc | 0 | U | – | PC | imm | add | read | 1 | ALU |
| lui  | 0 | U | – | – | imm | pass-B | read | 1 | ALU |

`MemRW` is never left as a don't-care. An instruction that does not use memory
must *read*, so it never writes memory by accident. `PCSel` is built as
"jump OR (branch AND its condition)": ordinary instructions give 0, and jumps
always give 1.

How the ROM is realised:

* **Contents are computed, not stored.** `rv32i_pkg::control_word(addr)` spells out
  the table above for one address. `control_rom` calls it for all 2048 addresses at
  elaboration and holds the result as a constant. To change the control of an
  instruction, edit `control_word`.
* **Two reads instead of one.** `BrUn` is a ROM output and feeds the comparator.
  The comparator's `BrEq`/`BrLT` are ROM address bits. A single lookup would
  therefore be a combinational loop, even though `BrUn` never depends on the flags.
  `control_rom` reads the instruction's row once with `BrEq` = `BrLT` = 0 for all
  fields except `PCSel`, and once with the real flags for `PCSel` alone. The
  contents are the same single table.
* **Encodings are this design's own.** `ImmSel`: I 0, S 1, B 2, U 3, J 4.
  `ALUSel` = `{inst[30], funct3}` for register-register operations (add 0000, sll
  0001, slt 0010, sltu 0011, xor 0100, srl 0101, or 0110, and 0111, sub 1000, sra
  1101), plus 1111 for pass-B. For OP-IMM instructions, `inst[30]` counts only for
  `srai`. `ASel`/`BSel` 0 select the register. `WBSel`: 0 mem, 1 ALU, 2 PC+4.
  `BrUn` 1 = unsigned. `MemRW` 1 = write.
* **Not implemented:** FENCE, FENCE.I, ECALL, EBREAK and the CSR instructions
  decode as no-operations, and so do undefined encodings. There are no traps.

## Single-cycle timing

Everything between the PC register and the register file, data memory and PC
write is combinational. The PC, the register write and the data memory write all
update at the same rising edge, so the CPI is exactly 1. The clock period must
cover the longest path, which is a load: IMEM → register read → ALU → DMEM → write
back. With stage delays of 200 ps (IMEM), 100 ps (register read), 200 ps (ALU),
200 ps (DMEM) and 100 ps (register write), that is 800 ps, or 1.25 GHz. An `add`
would need only 600 ps and a `beq` 500 ps, so most of the hardware idles for most
of the cycle. The RTL carries no delays; these figures only explain why the
pipeline exists.

## The five-stage pipeline

`riscv_pipelined` places the units as follows:

| stage | work | register after it (`rv32i_pkg`) |
|---|---|---|
| IF  | PC, IMEM, PC+4, PC mux | `if_id_t`: pc, inst |
| ID  | register file read | `id_ex_t`: pc, rs1 value, rs2 value, inst |
| EX  | controller, Imm Gen, comparator, operand muxes, ALU | `ex_mem_t`: pc, alu, rs2 value, inst, MemRW, RegWEn, WBSel |
| MEM | DMEM, PC+4 recomputed from pc, write-back mux | `mem_wb_t`: wb value, inst, RegWEn |
| WB  | register file write (rd = `inst_W[11:7]`) | – |

Points that are easy to miss:

* **The instruction travels with its data.** Each stage uses the `inst` held in
  its own pipeline register, so every stage works on a different instruction.
  The controller decodes `inst` in EX, where `BrEq`/`BrLT` exist. The
  bits that MEM and WB need (`MemRW`, `WBSel`, `RegWEn`) are stored in EX/MEM and
  MEM/WB next to the data. The write address comes from the instruction in WB,
  not from the one being decoded.
* **PC+4 is recomputed in MEM** from the PC carried down the pipe. Only one of
  PC and PC+4 travels through EX/MEM.
* **Branches and jumps resolve in EX.** The EX stage's `PCSel` and ALU result
  drive the PC mux in IF directly.
* **Pipeline registers** (`pipe_reg`, a register parameterised by its struct type)
  load every cycle and reset to a NOP (`addi x0,x0,0`) with every enable off. A
  reset pipeline drains harmlessly.

Timing: an instruction fetched in cycle *n* writes its register at the end of
cycle *n*+4. Each instruction takes five cycles, and once the pipe is full one
instruction completes per cycle. With 200 ps stages this gives a 5 GHz clock
(against 1.25 GHz single-cycle) and a 1000 ps instruction latency (against 800 ps).
The pipeline wins on throughput, not on latency.

### What the pipeline does not do

There is no hazard handling. Two consequences follow, both checked by the
testbench:

1. **Data hazards.** The register file has no write-to-read bypass, and nothing
   forwards results. A register written by an instruction can be read correctly
   only by an instruction fetched **four or more instructions later** (three
   instructions in between). In `add t0,t1,t2; or t3,t4,t5; sll t6,t0,t3`, the
   `sll` reads the *old* `t0` and `t3`.
2. **Control hazards.** A taken branch or jump redirects fetch from EX, by which
   time the next **two** instructions are already in IF and ID. They are not
   squashed: they execute, like two delay slots.

Programs written for this pipeline must pad with NOPs or independent instructions.
Four NOPs after every instruction is always safe, and the tests use that.

## A smaller example: pipelining an add-then-square

`add_square_pipe` is the same idea at the scale of two components. It computes
`(a + b)²`: an adder feeds a multiplier whose two inputs are both the sum. Unpipelined,
the critical path runs through both. A register between them splits that path. Each
clock cycle then holds only the adder or only the multiplier, so the clock can be
faster. The cost is one cycle of latency: `y` shows the square of the sum of the
operands sampled at the previous rising edge. A new pair can still enter every cycle.

The sum is `WIDTH` bits (32 by default) and drops its carry. `y` is the full
`2*WIDTH`-bit product. The register loads every cycle and clears on reset. In the
top it sits beside the processors with its own `as_a`, `as_b` and `as_y` ports.

## Simulating

Everything is plain SystemVerilog-2017. Each testbench is self-checking and ends
by printing `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_riscv_top \
    -y rtl -y tb rtl/rv32i_pkg.sv tb/rv_iss_pkg.sv tb/tb_riscv_top.sv
./obj_dir/Vtb_riscv_top
```

| testbench | what it checks |
|---|---|
| `tb_alu`, `tb_imm_gen`, `tb_branch_comp` | every operation/format on corner and random values against models written in the testbench |
| `tb_regfile`, `tb_imem`, `tb_dmem` | random traffic against shadow copies; x0, write enables, byte/half/word lanes, reset |
| `tb_control_rom` | every row of the control table, for all four `BrEq`/`BrLT` combinations, with random register fields |
| `tb_pipe_reg` | reset value and one-cycle transfer |
| `tb_riscv_single_cycle` | the test program in lock-step with an instruction-set model: PC, register and memory writes every cycle; CPI = 1 |
| `tb_riscv_pipelined` | the padded test program's write order; first write-back in the fifth cycle; one instruction per cycle; five instructions in flight; the two hazard effects above |
| `tb_instruction_timing` | add, beq, lw, sw, jal on both processors: 5 cycles single-cycle (4000 ps at 800 ps), 9 cycles pipelined (1800 ps at 200 ps), results checked |
| `tb_add_square_pipe` | reset value, one cycle of latency, carry dropped from the sum, 2000 random operand pairs |
| `tb_riscv_top` | both processors at full default size on the same program, against the model; counts every mechanism (branches taken and not taken, `jal`, `jalr`, loads, stores, write-back sources, full pipeline); the add-then-square example checked every cycle alongside |

`tb/rv_iss_pkg.sv` holds the instruction encoders, the test-program generator and
the instruction-set model. The model is written from the RV32I definition, not from
the RTL. The test program covers every implemented instruction, forward and backward
branches, and a random stretch of ALU instructions.

To load your own program, drive the processor's `imem_we`/`imem_waddr`/`imem_wdata`
(word address) while `rst` is high, then release `rst`. The PC starts at 0. The
`rf_*` and `dm_*` outputs show each register write and memory write as it commits.
The pipeline's `stage_inst` shows the instruction in each stage.

## Where this design makes its own choices

The overall structure, the control-signal set and widths, the ROM addressing and the
stage split follow the standard RV32I teaching design. These are this design's own:

* memory sizes (1024 words each), the IMEM load port, and the trace outputs;
* synchronous reset: PC = 0, registers cleared, pipeline full of NOPs;
* all binary encodings of the control fields (listed above);
* the `funct3` input of `dmem`, which provides byte and halfword accesses. Accesses
  must be naturally aligned, and addresses wrap modulo the memory size;
* the two-read ROM lookup that avoids the `BrUn` → `BrEq/BrLT` → address loop;
* no-operation decoding of FENCE/ECALL/EBREAK/CSR instructions;
* no clearing of bit 0 of the `jalr` target;
* the add-then-square example's width (32), reset, dropped sum carry and full-width product.
