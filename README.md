# A single-cycle and a five-stage pipelined MIPS-subset processor

This RTL builds the same small processor twice. Both versions run the same
seven MIPS instructions. The only difference is how the work of one
instruction is spread over clock cycles.

- **Single-cycle.** Each instruction is fetched, decoded, executed, given its
  memory access and written back within one clock cycle. The clock period
  must therefore cover the slowest instruction, which is a load:
  fetch + register read + ALU + memory + register write.
- **Pipelined.** The same datapath is cut into five stages (IF, ID, EX, MEM,
  WB) by four pipeline registers. A new instruction starts every cycle, and
  each one finishes five cycles later. The clock period only has to cover
  the slowest *stage*. Each instruction takes just as long as before, but
  throughput goes up by up to the number of stages.

Both processors share one main controller. It is built as a two-level
AND/OR logic array, and it is the most exact part of the design: every
signal follows from a written equation.

## Instruction subset and encoding

| instr | format | opcode (31:26) | funct (5:0) | operation |
|---|---|---|---|---|
| add | R | 000000 | 100000 | R[rd] = R[rs] + R[rt] |
| sub | R | 000000 | 100010 | R[rd] = R[rs] - R[rt] |
| ori | I | 001101 | - | R[rt] = R[rs] \| zero_ext(imm16) |
| lw  | I | 100011 | - | R[rt] = MEM[R[rs] + sign_ext(imm16)] |
| sw  | I | 101011 | - | MEM[R[rs] + sign_ext(imm16)] = R[rt] |
| beq | I | 000100 | - | if R[rs] == R[rt]: PC = PC + 4 + (sign_ext(imm16) << 2) |
| j   | J | 000010 | - | PC = {PC+4[31:28], target26, 00} |

The fields are op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6,
funct 5:0, imm16 15:0 and target 25:0. Every other encoding, including
the all-zero word, drives no control signal and acts as a nop. The
processor has no overflow trap, no exceptions and no other instructions.

## The controller (`controller`, `ctrl_and_logic`, `ctrl_or_logic`)

The controller has two planes.

The **AND plane** forms one product term per instruction:

- `rtype = (op == 000000)`
- `add = rtype & (func == 100000)`
- `sub = rtype & (func == 100010)`
- `ori`, `lw`, `sw`, `beq` and `jump` each compare the opcode with its constant.

The **OR plane** ORs those lines into the datapath controls:

```
RegDst   = add + sub          MemWrite = sw
ALUSrc   = ori + lw + sw      nPCsel   = beq
MemtoReg = lw                 Jump     = jump
RegWrite = add + sub + ori + lw
ExtOp    = lw + sw            ALUctr[0] = sub + beq,  ALUctr[1] = ori
```

ALUctr is 2 bits wide: 00 ADD, 01 SUB, 10 OR. In the per-instruction
control table, a "don't care" entry takes whatever these sums produce. For
example, beq gets ExtOp = 0 and j gets ALUctr = ADD. Neither matters:

- The branch offset has its own sign extension in the next-PC logic, so
  ExtOp does not reach it.
- A jump writes nothing, so its ALU result is unused.

All control signals are collected in the packed struct `mips_pkg::ctrl_t`.

## Single-cycle datapath (`single_cycle_cpu`)

PC → `inst_mem` → controller and `regfile` (rs, rt) → `extender` →
ALUSrc mux → `alu` → `data_mem` → MemtoReg mux → register file write port.
The RegDst mux chooses rt or rd as the destination. `next_pc` then picks
one of:

- PC+4;
- the branch target, when nPCsel and the ALU's Zero output are both set
  (beq subtracts, so Zero means the registers are equal);
- the jump target.

The PC, register file and data memory all update on the rising edge. The
rest is combinational. One instruction retires per cycle.

## Pipelined datapath (`pipelined_cpu`)

Each pipeline register is a `pipe_reg` that holds a stage-boundary struct
from `mips_pkg`:

| stage | work | register written |
|---|---|---|
| IF  | read the instruction at PC, compute PC+4 | IF/ID: PC+4, instruction |
| ID  | controller decode, read rs/rt, extend imm16 | ID/EX: controls, PC+4, A, B, imm32, imm16, target, rt, rd |
| EX  | ALU; branch target = PC+4 + (offset<<2); jump target; RegDst mux picks rt/rd | EX/MEM: controls, branch/jump targets, Zero, ALU result, store data, write register |
| MEM | data memory read/write; taken beq or j redirects the PC | MEM/WB: controls, load data, ALU result, write register |
| WB  | MemtoReg mux, register file write | - |

**The write-register number travels with the instruction.** It moves
through ID/EX, EX/MEM and MEM/WB. Suppose instead it were taken from the
instruction bits in IF/ID, as in a naive split of the single-cycle
datapath. Then a load would write its result into a register named by
whatever instruction is in decode four cycles later. Carrying the number is
what makes WB correct.

**Branch and jump are resolved in MEM.** The EX/MEM register holds the
branch target, the Zero flag and the jump target. The PC mux reads them
there. By that time the three instructions after the branch or jump have
been fetched, and nothing cancels them.

### Hazards are not handled: rules for code

This pipeline has no forwarding, no stall logic and no flushing. Code must
obey these timing rules:

- **Data.** An instruction fetched k slots after a register-writing
  instruction reads the new value only if k ≥ 4, so three instructions must
  sit between producer and consumer. The register file is written at the
  edge that ends WB, and a read in that same cycle still returns the old
  value. A load result follows the same rule. A store followed directly by
  a load from the same address works, because memory is accessed in program
  order in MEM.
- **Control.** The three instructions after a taken beq or a j always
  execute. Fill them with nops or with useful, independent instructions.
- A word of all zeros is a nop.

The testbench `tb_pipelined_cpu` checks these rules directly: consumers one,
two and three slots behind read the old value, four slots behind read the
new one, and the three instructions after a taken branch execute.

### Timing and throughput

An instruction fetched in cycle k writes back in cycle k+4. N instructions
without a taken branch or jump finish in N+4 cycles. The single-cycle
processor needs N cycles, but each of its cycles is much longer.

Take stage times of 200 ps for fetch, ALU and memory, and 100 ps for a
register read or write:

- A single-cycle lw needs 800 ps, sw 700 ps, R-format 600 ps and beq 500 ps.
  The single-cycle clock must be 800 ps.
- A pipelined clock is set by the slowest stage, 200 ps.

`tb_timing_workload` runs lw, sw, add and beq back to back on both
processors:

- single-cycle: 4 cycles × 800 ps = 3200 ps;
- pipelined: 8 cycles × 200 ps = 1600 ps.

For long programs the ratio approaches 4, not 5, because the five stages are
not balanced. The RTL contains no delays; only cycle counts are checked.

## Interfaces

The top level `mips_top` places the two processors side by side. They share
only `clk`. Each processor has the following ports, prefixed `sc_` or
`pl_` at the top:

| port | dir | width | meaning |
|---|---|---|---|
| `rst` | in | 1 | synchronous reset: PC = 0, registers = 0, pipeline registers = nop |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, log2(IMEM_WORDS), 32 | program load; write while in reset (waddr is a word index) |
| `pc` | out | 32 | current (fetch) PC |
| `dbg_reg_addr` → `dbg_reg_data` | in/out | 5 → 32 | third, combinational read port of the register file |
| `dbg_mem_addr` → `dbg_mem_data` | in/out | log2(DMEM_WORDS) → 32 | second, combinational read port of data memory |
| `wb_valid` (pipelined only) | out | 1 | an instruction is writing a register in WB this cycle |

The parameters are `IMEM_WORDS = 256` and `DMEM_WORDS = 256`, both in
32-bit words. Memories are word addressed: address bits 1:0 are ignored,
and addresses past the end wrap. Both memories start out all zero and have
no reset. Register $0 reads as zero and ignores writes.

## What is this design's own choice

The lecture fixes the instruction set, the control equations, the
datapaths, the five stages, the four pipeline registers and the carried
write-register number. The following were chosen here:

- **Memory depth.** 256 words each. The memories are asynchronous-read
  arrays.
- **Ports.** The program-load port and the debug read ports.
- **Reset.** The reset behaviour, and clearing the register file on reset.
- **Branch arithmetic.** The branch target adds the shifted offset to PC+4,
  as in the datapath drawings; the lecture's register-transfer line omits
  the +4. The branch offset is always sign-extended.
- **Jump target.** The usual MIPS rule, `{PC+4[31:28], target, 00}`.
- **Store source.** sw stores register rt, as the datapath wires it; the
  lecture's register-transfer line names rs.
- **ori.** ori ORs, as its control signals say; its register-transfer line
  says "+".
- **Pipeline control.** Decode happens in ID with the single-cycle
  controller, and the controls travel in the pipeline registers. j is
  resolved in MEM together with beq. The RegDst mux sits in EX.
- **No hazard handling**, as described above.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ctrl_and_logic` | all 4096 opcode/func pairs |
| `tb_ctrl_or_logic`, `tb_controller` | each instruction and several non-subset encodings, against the control table |
| `tb_alu` | random operands |
| `tb_extender` | every immediate |
| `tb_regfile`, `tb_inst_mem`, `tb_data_mem` | random traffic against reference arrays |
| `tb_next_pc` | random branch and jump cases |
| `tb_pipe_reg` | one-cycle delay and reset |
| `tb_single_cycle_cpu` | lock-step PC comparison with a reference instruction-set model on a directed loop program and 20 random programs, then all registers and memory |
| `tb_pipelined_cpu` | exact write-back cycle pattern (latency 5, one per cycle, N+4), the hazard rules above, and 20 random nop-spaced programs against the model |
| `tb_mips_top` | both processors on the same programs against the model; counts every instruction kind, taken and not-taken beq, j, MEM-stage PC redirects, back-to-back write-backs, and loads written back to their own register while another instruction is in decode |
| `tb_timing_workload` | the four-instruction timing example above |

The reference model and an assembler for the seven instructions are in
`tb/mips_asm_pkg.sv`. The expected control table is in
`tb/ctrl_table_pkg.sv`.

## Simulating

Each testbench is its own top. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/ctrl_table_pkg.sv tb/tb_mips_top.sv \
  --top-module tb_mips_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_mips_top
```

Lint a module with
`verilator --lint-only -Wall -Irtl rtl/mips_pkg.sv rtl/<module>.sv -y rtl +libext+.sv`.
The only remaining lint warnings are unused upper and lower address bits of
the memories and unused package constants in leaf modules.

To load a program into your own simulation:

1. Hold `rst` high.
2. Write one word per cycle through `imem_*`.
3. Release `rst`.

Fetch starts at address 0 on the cycle after reset is released.
