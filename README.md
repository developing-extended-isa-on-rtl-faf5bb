# RV32IM processor with a sequential multiply/divide extension

This is a small 32-bit RISC-V processor that executes the RV32I base integer instructions and
the RV32M extension (MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU). The point of the design is
the extension. RV32I has no multiply or divide, so software must build them from shift, add and
branch loops. This design adds an M unit that works on operand magnitudes. It multiplies by
add-and-shift in a fixed 32 steps. It divides by repeated subtraction, one step per unit of the
quotient. While the unit works, the core stalls.

The core runs each RV32I instruction in a single clock. An M instruction holds the program
counter until its result is written back:

| instruction | clocks |
|---|---|
| any RV32I instruction | 1 |
| MUL, MULH, MULHSU, MULHU | 34 |
| DIV, DIVU, REM, REMU | q + 4, where q is the magnitude of the quotient |
| division by zero, or -2^31 / -1 | 3 (result 0, overflow flag raised) |

A 10 x 3 shift-and-add multiply loop in RV32I takes 226 clocks on this core. MUL takes 34, so MUL
is 6.6 times faster. Division is a different story. DIVU 100 / 10 takes 14 clocks, against 260
for a 32-step software division. But DIVU 100000 / 7 takes 14289 clocks. The divider only pays off
when the quotient is small.

## Block structure

```
c_processor                      top: wires fetch, control and datapath, observation ports
├── u_instr_fetch                program counter + byte-addressed instruction memory, flash port
├── u_ctrl                       decode
│   ├── b_main_ctrl              register write, write-back source, jump, load/store, M enable
│   └── b_alu_ctrl               ALU operation, result select, branch type, operand selects
└── u_datapath
    ├── b_reg_file               32 x 32 bits, x0 = 0
    ├── b_alu                    immediates, operand muxes, adder/logic, shifter, SLT, branch unit
    ├── b_data_mem               byte-addressed data memory, LB/LH/LW(U), SB/SH/SW
    └── b_m_ext                  sequential multiply / divide
```

`rtl/rv32_pkg.sv` holds the shared opcode and funct3 constants, the ALU encodings, and the two
control bundles. `main_ctrl_t` carries the outputs of `b_main_ctrl` and `alu_ctrl_t` those of
`b_alu_ctrl`.

## One instruction, one clock

Everything between the program counter and the register file is combinational:

1. `u_instr_fetch` drives `op_addr` (the PC register) and `op_instr`, the word stored at that
   address.
2. `u_ctrl` decodes the instruction.
3. `b_reg_file` reads rs1 (bits 19:15) and rs2 (bits 24:20) combinationally.
4. `b_alu` computes the result, the branch decision and the branch/jump target.
5. `b_data_mem` returns load data combinationally, using the ALU result as the address.
6. The write-back multiplexer picks the value for rd. It takes the M result when
   `m_ext_wb_ctrl` is set, the load data when `wb_ctrl` is set, and the ALU result otherwise.

At the rising edge that ends the clock, three things happen:

- the register file writes rd;
- the data memory performs a store;
- the PC moves on.

The PC's next value is chosen in this order:

1. hold, while the M unit stalls the core;
2. the target from the ALU, on a jump or a taken branch;
3. otherwise PC + 4.

There are no pipeline registers, so there are no hazards, forwarding or flushes. The clock
period is set by the longest path: fetch read, decode, register read, 32-bit adder, data-memory
read, write-back.

## Memory map

Instructions and data live in separate byte-addressed memories. Words are little-endian.

| region | addresses | size |
|---|---|---|
| reserved | 0x0000_0000 - 0x0000_7FFF | not implemented |
| text (instruction memory) | 0x0000_8000 - 0x01FF_FFFF | 33,521,664 bytes |
| static data, heap, stack (data memory) | 0x0200_0000 - 0x0FFF_FFFF | 234,881,024 bytes |

The PC resets to 0x0000_8000. The stack pointer conventionally starts at 0x0FFF_FFFC, the top of
the data memory; software must set it, because reset clears all registers. All four boundaries
are parameters of `c_processor`: `RESET_PC`, `IMEM_LAST`, `DMEM_BASE` and `DMEM_LAST`.

An access outside a memory reads 0 and writes nothing. No trap is raised. Neither memory is
cleared by reset.

Programs are loaded through the flash port while `ip_en` is low. With `ip_wr_en` high,
`ip_wr_data` is written at `ip_wr_addr`, one word per clock. Raising `ip_en` then starts
execution. Dropping `ip_en` freezes the core: no PC update, register write, store or M-unit
start.

## Control encodings

`b_alu_ctrl` drives the ALU with these small codes:

| field | encoding |
|---|---|
| `alu_ctrl` | AND 000, OR 001, XOR 010, ADD 011, SUB 111 (bit 2 inverts operand B and sets the carry-in) |
| `result_ctrl` | 00 logic/adder, 01 set-less-than, 10 shifter |
| `br_ctrl` | 00 BEQ, 01 BNE, 10 BLT/BLTU, 11 BGE/BGEU |
| `sh_ctrl` | 0 left, 1 right |
| `uns_ctrl` | unsigned compare (SLTU, SLTIU, BLTU, BGEU) or logical right shift (SRL, SRLI) |

It also sets one enable per instruction class (I-type, LUI, AUIPC, JAL, JALR, branch, load,
store) and `imm_ctrl`, which selects the immediate as operand B.

`b_main_ctrl` makes the following decisions:

- It sets the register write enable for every class except branches and stores.
- It selects the memory as write-back source for loads.
- It takes the access size from funct3[1:0] and zero-extension from funct3[2].
- It raises the M enable for the register-register opcode with funct7[0] = 1.

Unknown opcodes decode to no action.

## ALU

Operand A is chosen as follows:

- zero, for LUI;
- the PC, for AUIPC, JAL and JALR;
- rs1, for everything else.

Operand B is chosen as follows:

- the constant 4, for JAL and JALR, so that the ALU produces the return address PC + 4;
- the immediate, for I-type, loads, stores, LUI and AUIPC;
- rs2, for everything else.

Immediates follow the RV32I layouts (I, S, B, U, J) and are sign-extended.

Inside the ALU:

- One 33-bit adder does ADD, SUB and all comparisons.
- Set-less-than is sign XOR overflow of the subtraction when signed. It is the inverted carry
  when unsigned.
- The branch unit applies the same rule to BLT/BGE and BLTU/BGEU. It uses the zero test of the
  difference for BEQ/BNE.
- A barrel shifter shifts rs1 by operand B bits 4:0.
- A separate adder forms the target:
  - PC + B offset for branches;
  - PC + J offset for JAL;
  - (rs1 + I offset) with bit 0 cleared for JALR.

`op_overflow` is an observation flag. It is not an RV32I feature, and nothing traps on it. It is
raised in two cases:

- signed overflow of ADD, ADDI or SUB;
- a register-register shift whose amount register has any of bits 31:5 set. Only bits 4:0 are
  used.

It is masked while an M instruction executes. The ALU sees those instructions too, because they
share the register-register opcode.

## The M unit (`b_m_ext`)

This is the part of the design that needs the most care.

**Start.** The datapath pulses `ip_m_ext_en` in the first clock of an M instruction, when the unit
is neither busy nor just finishing. Clock 1 is that start clock. The unit then latches:

- the operation (funct3);
- the magnitude of each operand;
- each operand's sign, where the operation treats that operand as signed:

| operation | A signed | B signed |
|---|---|---|
| MUL, MULH, DIV, REM | yes | yes |
| MULHSU | yes | no |
| MULHU, DIVU, REMU | no | no |

**Multiply (add and shift).** The product register is 64 bits wide. Its upper half feeds a
33-bit adder. In each of 32 steps:

1. Bit `counter` of operand B decides whether operand A is added to the upper half.
2. The register is shifted right by one.
3. The adder's carry enters at bit 63.

After step 32 the register holds |A| x |B|. It is negated when exactly one operand was negative.
MUL returns the low word. MULH, MULHSU and MULHU return the high word. The result appears in
clock 34.

**Divide (subtract and compare).** The remainder starts as |dividend|. Each clock, if the
remainder is at least |divisor|, the divisor is subtracted from it and the quotient is
incremented. The first clock in which the remainder is smaller marks the quotient ready. The
next clock outputs one of two values:

- the quotient (DIV, DIVU), negated when the signs differ;
- the remainder (REM, REMU), carrying the dividend's sign.

For a quotient magnitude q, the result appears in clock q + 4. The cost is linear in the
quotient, so large quotients are slow: 0xFFFF_FFFF / 1 takes 2^32 + 3 clocks. A processor
running general code would want a radix-2 restoring divider instead (32 steps). This design
keeps the simple scheme.

**Errors.** Two cases end the operation at once, with result 0 and `op_overflow` high in clock 3:

- a zero divisor;
- a signed division of -2^31 by -1.

Standard RV32M would instead return all ones (division by zero) or -2^31 (overflow). This design
returns 0 and flags it.

**Outputs and stall.** The outputs are valid for one clock only:

- `op_result` and `op_overflow` carry the answer.
- `op_done` marks the clock in which they are valid.
- `op_nop_ctrl` is high while the unit works (clocks 2 .. result clock - 1).

The datapath stalls the core whenever the decoded instruction is an M instruction and `op_done`
is low, which also covers the start clock. During a stall:

- the PC holds;
- the register write is suppressed.

In the clock of `op_done` the result is written to rd and the PC moves on. A start request while
the unit is busy is ignored.

## Top-level ports (`c_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| `ip_clk` | in | 1 | clock (all state changes on the rising edge) |
| `ip_rst` | in | 1 | synchronous, active-high reset: PC to `RESET_PC`, registers and M unit cleared |
| `ip_en` | in | 1 | run enable |
| `ip_wr_en`, `ip_wr_addr`, `ip_wr_data` | in | 1, 32, 32 | flash port into the instruction memory |
| `op_pc`, `op_instr` | out | 32, 32 | instruction executing in this clock |
| `op_retire` | out | 1 | that instruction completes at the coming edge |
| `op_rd_wr_en`, `op_rd_addr`, `op_rd_data` | out | 1, 5, 32 | register write-back bus |
| `op_alu_overflow`, `op_m_overflow` | out | 1, 1 | overflow flags of the ALU and the M unit |
| `op_stall` | out | 1 | core held by the M unit |

## Where this design departs from its source description

The design follows a written description of the blocks, their interfaces, their control tables
and the M unit's algorithms and test plan. The following points are departures from it, or
choices where it was silent or contradicted itself.

**Microarchitecture**

- **Single-cycle instead of five stages.** The description names five stages (fetch, decode,
  execute, memory, write-back) but gives no pipeline registers or hazard handling. Every block is
  drawn with a clock, including the register file, memories and decoders. Here the decoders, the
  ALU and all reads are combinational and only state is clocked. This lets one instruction
  complete per clock without hazards.

**ALU and control**

- **JALR writes PC + 4.** The description's operand selection would write rs1 + 4.
- **Branch and jump offsets** use the RV32I immediate layout, in 2-byte units. The description
  shifts every offset left once more.
- **SLTIU** compares against the sign-extended immediate, as RV32I defines.
- **Branches and stores write no register.** The control table enables a write for both.
- **Right shifts are logical when funct7[5] = 0**, for both SRL and SRLI. The control table
  contradicts itself on this.
- **Left shifts use direction 0** for both SLL and SLLI.

**M unit**

- **`op_done`** is an added output. The timing of result, stall and overflow follows the
  description's test plan: result in clock 34 for multiplies and q + 4 for divides, error flag in
  clock 3. One passage of the text puts the error flag in the fourth clock instead.
- **Error results** are 0 with a flag, not the RV32M values.

**Memories**

- **Memories are not cleared by reset.** The description's models clear them.
- **Out-of-range accesses** read 0 and write nothing.

**Not built**

- The F, A and C extensions are mentioned in the description but not designed.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares against values computed
independently, by the reference instruction-set model in `tb/rv32_tb_pkg.sv` or by a model of
its own. Each ends with a line `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_b_reg_file` | random reads and writes, x0 stays 0, reset |
| `tb_b_data_mem` | all load/store sizes, sign and zero extension, range limits |
| `tb_u_instr_fetch` | flash writes, +4 sequencing, branch/jump, stall hold, enable, reset |
| `tb_b_main_ctrl`, `tb_b_alu_ctrl`, `tb_u_ctrl` | every opcode/funct3/funct7 row of the control tables |
| `tb_b_alu` | 20,000 random instructions of every class, including corner operands |
| `tb_b_m_ext` | the 18-case test plan, plus 400 random operations against 64-bit reference arithmetic; exact clock of each result and of the stall, one-clock validity, start-while-busy |
| `tb_u_datapath` | 3,000 random instructions through control and datapath: write-back, branch targets, flags, stall lengths, enable |
| `tb_c_processor` | full-size processor: a program of ~800 instructions compared instruction by instruction against the reference model |
| `tb_workloads` | the multiply and divide clock comparisons quoted at the top |

The program in `tb_c_processor` consists of:

- an opening with an ALU overflow, M-unit errors and a software multiply loop checked against
  MUL;
- a random body with loads and stores of all sizes, forward branches, JAL and JALR, and
  multiplies and divides;
- random pauses of `ip_en`.

It counts each mechanism and fails if any never happened. The mechanisms are: stall, taken and
not-taken branches, backward branch, jump, load, store, ALU overflow, M overflow, multiply,
divide and hold. It also checks the clock count of every instruction.

`tb_c_processor` and `tb_workloads` instantiate the processor at its default, full memory sizes.
The simulator then needs about 270 MB, and each run takes a few seconds.

To run a testbench with Verilator 5, list the package first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rv32_pkg.sv rtl/b_*.sv rtl/u_*.sv rtl/c_processor.sv \
    tb/rv32_tb_pkg.sv tb/tb_c_processor.sv --top-module tb_c_processor -Mdir obj -o sim
obj/sim
```

The block testbenches need only the modules they use, plus `rtl/rv32_pkg.sv`. The decoder
testbenches and `tb_b_alu` also need `tb/rv32_tb_pkg.sv`.

**Lint.** Verilator lint reports only unused-signal warnings, all of them deliberate:

- instruction bits a decoder does not look at;
- the low bit of the multiply register, which is shifted out;
- a constant in the package.

**Synthesis.** The blocks synthesise on their own. The full processor's memories (about 268 MB
of byte arrays) are far beyond what generic logic synthesis handles. A real implementation would
map them to SRAM macros or shrink them through the four address parameters.
