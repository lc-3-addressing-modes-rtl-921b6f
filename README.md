# A multi-cycle LC-3 processor in SystemVerilog

The LC-3 is a small 16-bit teaching computer. It has eight registers, a
word-addressed 64K-word memory, and 16 opcodes. Its datapath is built around one
shared bus, and a finite state machine drives it through several cycles per
instruction. This RTL implements the part of the LC-3 that shows how a machine
forms addresses and changes its flow of control. That covers:

- register, immediate, base+offset and PC-relative addressing;
- conditional branches on the condition codes;
- jumps through a register;
- function calls and returns;
- TRAP, an indirect call through a vector table.

The instruction subset is ADD, AND, NOT, LD, LDR, ST, STR, LEA, BR, JMP (with
RET = JMP R7), JSR, JSRR and TRAP. RTI, LDI, STI and the reserved opcode 1101
are not implemented. The processor fetches them and does nothing with them.

## Datapath

All register transfers go over one 16-bit bus. Each cycle at most one of four
gates drives it:

| gate        | source                                                    |
|-------------|-----------------------------------------------------------|
| GatePC      | the program counter                                       |
| GateMARMUX  | an address: the address adder's sum, or `ZEXT(IR[7:0])`   |
| GateALU     | the ALU result                                            |
| GateMDR     | the memory data register                                  |

Registers that take their value from the bus each have a load enable: MAR, MDR,
IR, the register file (LD.REG), the condition codes (LD.CC) and the PC (LD.PC,
through PCMUX). The bus is a multiplexer here, not tri-state wires. An assertion
in `lc3_bus` checks that no two gates are open at the same time.

The **address adder** (`lc3_addr_unit`) is the main idea of the design. Every
address in the machine is a *base* plus a *sign-extended field of IR*:

| instruction | base (ADDR1MUX) | offset (ADDR2MUX)      | result goes to       |
|-------------|-----------------|------------------------|----------------------|
| LD, ST      | PC              | SEXT(IR[8:0])          | MAR (via MARMUX)     |
| LEA         | PC              | SEXT(IR[8:0])          | DR (via MARMUX)      |
| LDR, STR    | BaseR = IR[8:6] | SEXT(IR[5:0])          | MAR (via MARMUX)     |
| BR          | PC              | SEXT(IR[8:0])          | PC, if BEN           |
| JMP, RET    | BaseR = IR[8:6] | SEXT(IR[5:0])          | PC                   |
| JSR         | PC              | SEXT(IR[10:0])         | PC                   |
| JSRR        | BaseR = IR[8:6] | SEXT(IR[5:0])          | PC                   |
| TRAP        | none            | `ZEXT(IR[7:0])` on MARMUX | MAR                |

"PC" always means the address of the next instruction, because the PC is
incremented during fetch. PCMUX picks the PC's next value from three sources:
PC + 1, the address adder, or the bus. The bus is used by TRAP, which loads the
PC from MDR.

The **ALU** (`lc3_alu`) takes SR1 as its A input. Its B input comes from SR2MUX,
which is steered by IR[5]: the SR2 register when IR[5] = 0, and `SEXT(IR[4:0])`
when IR[5] = 1. The ALU does ADD, AND, NOT and pass-A. Pass-A carries the source
register of a store onto the bus. For stores, SR1MUX reads the source register
from IR[11:9] instead of IR[8:6].

**Condition codes** (`lc3_cc_logic`) are worked out from the bus value:

- N = bit 15;
- Z = NOR of all 16 bits;
- P = neither N nor Z.

They are loaded on *every* register write, because LD.CC is tied to LD.REG. So
besides ADD, AND, NOT and the loads, LEA also sets them. So do the R7 writes of
JSR, JSRR and TRAP. Many published LC-3 versions leave the codes unchanged on
those R7 writes. This design does not.

**BEN** (`lc3_ben_logic`) is stored in the decode state:

`BEN = ((N & IR[11]) | (Z & IR[10]) | (P & IR[9])) & (opcode == BR)`

In the BR state it serves as the PC's load enable. A mask of 000 gives a no-op,
and a mask of 111 gives an unconditional branch.

## Control: the state sequence

`lc3_control` is a Moore machine. Its states use the numbers of the usual LC-3
state diagram. Each state drives one control word (`ctrl_t` in `lc3_pkg`). The
exceptions are the memory states, which wait for the memory's ready signal R,
and the BR state, whose LD.PC is BEN.

```
18  MAR <- PC, PC <- PC+1
33  MDR <- M[MAR]                 (repeats until R)
35  IR  <- MDR
32  BEN <- ..., branch on IR[15:12]
    ADD 1 / AND 5 / NOT 9   DR <- SR1 op B, set CC
    LEA 14                  DR <- PC + off9, set CC
    LD 2 / LDR 6            MAR <- address ; 25 MDR <- M (until R) ; 27 DR <- MDR, set CC
    ST 3 / STR 7            MAR <- address ; 23 MDR <- SR ; 16 M[MAR] <- MDR (until R)
    BR 0                    if BEN: PC <- PC + off9
    JMP 12                  PC <- BaseR + off6
    JSR 4 -> 21             R7 <- PC and PC <- PC + off11     (IR[11] = 1)
          -> 20             R7 <- PC and PC <- BaseR + off6   (IR[11] = 0)
    TRAP 15                 MAR <- ZEXT(trapvect8)
         28                 MDR <- M[MAR], R7 <- PC           (until R)
         30                 PC <- MDR
every sequence returns to 18
```

The function call mechanism works like this:

- JSR and JSRR save the return address in R7.
- RET is `JMP R7` with offset 0.
- In state 20 or 21, the PC and R7 load in the same cycle. The adder therefore
  reads the old BaseR, so `JSRR R7` jumps to the old R7.

TRAP is a call through the vector table. Memory words x0000 to x00FF each hold
the start address of one service routine. `TRAP x1B` loads the PC from M[x001B]
and leaves the return address in R7. The routine returns with `JMP R7` like any
other function.

**Cycle counts**, with memory latency L (L = 1 means no wait):

| instruction                       | cycles  |
|-----------------------------------|---------|
| ADD, AND, NOT, LEA, BR, JMP       | 4 + L   |
| JSR, JSRR                         | 5 + L   |
| LD, LDR, ST, STR, TRAP            | 5 + 2L  |
| the four no-op opcodes            | 3 + L   |

## Memory and the host port

`lc3_memory` holds MAR, MDR and a 2^16 x 16-bit array:

- Reads are combinational.
- MDR loads from the array when MEM.EN is high, and from the bus otherwise.
- A write happens at the clock edge that ends the cycle in which R is high.
- R rises after `LATENCY` cycles of MEM.EN. The default is 1, which gives R in
  the first cycle.

The memory is not reset. Programs and the vector table are written through the
host port `ext_we/ext_addr/ext_wdata`, and `ext_rdata` reads any word. Use the
port while `rst_n` is low. Writes from it take priority over the processor's.

## Top-level interface (`lc3_top`)

| port                         | dir | width  | meaning                                              |
|------------------------------|-----|--------|------------------------------------------------------|
| clk, rst_n                   | in  | 1      | clock; asynchronous active-low reset                 |
| ext_we, ext_addr, ext_wdata  | in  | 1/16/16| host write into memory                               |
| ext_rdata                    | out | 16     | memory word at ext_addr                              |
| pc, ir, nzp, state           | out | 16/16/3/6 | program counter, instruction, N/Z/P, FSM state    |
| dbg_sel / dbg_reg            | in/out | 3/16 | read any register (observation only)              |

| parameter | default | meaning                                   |
|-----------|---------|-------------------------------------------|
| ADDR_W    | 16      | memory address bits (full LC-3 space)     |
| LATENCY   | 1       | cycles until the memory raises R          |
| RESET_PC  | x3000   | address of the first instruction          |

After reset: the PC is RESET_PC, all registers are 0, the condition codes are
Z, and the state is 18.

## Where this design makes its own choices

The instruction behaviour above is the defined LC-3 behaviour, with these
variations and additions:

- **JMP and JSRR take an offset.** They add a sign-extended IR[5:0] to the base
  register. Standard LC-3 code has zeros in those bits, so it behaves as usual.
- **BR finishes in one state.** BEN gates the PC load directly, instead of going
  through a separate "PC <- PC + off9" state.
- **Condition codes** are set on every register write, including LEA and the
  R7 writes (see above).
- **Unused opcodes are no-ops.** RTI, LDI, STI and 1101 do nothing.
- **Not built:** interrupts, exceptions and privilege (the PSR holds only N, Z,
  P).
- **No devices.** Memory-mapped INPUT and OUTPUT devices are not modelled, and
  every address is RAM.
- **Own choices:** the reset values, the reset PC x3000, the memory timing and
  the R handshake, the host port, the debug register port, and every
  mux-select and ALUK encoding (see `lc3_pkg`).

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

- `tb_lc3_regfile`, `tb_lc3_alu`, `tb_lc3_addr_unit`, `tb_lc3_pc_unit`,
  `tb_lc3_cc_logic`, `tb_lc3_ben_logic`, `tb_lc3_bus`: random and boundary
  stimulus, checked against values computed in the testbench. The BEN test is
  exhaustive over opcode, mask and condition code.
- `tb_lc3_memory` runs a LATENCY = 1 and a LATENCY = 3 memory side by side. It
  checks the cycle in which R rises and that no write lands early.
- `tb_lc3_control` steps the FSM through every opcode with 0 to 3 wait cycles.
  It checks the state sequence, the cycle count, the load and gate signals, and
  the mux selects of each state.
- `tb_lc3_top` runs the whole processor with LATENCY = 2. It compares the PC,
  all registers and the condition codes after every instruction against an
  instruction-level model (`tb/lc3_ref_pkg.sv`). It also checks the cycle count
  of every instruction. It runs two things:
  - a directed program: function call and return, TRAP x1B, every branch
    condition, loads and stores, JSR/JSRR;
  - 40 runs of 150 instructions, each from a memory filled entirely with random
    words.

  At the end it compares all of memory. It also counts each opcode, taken and
  untaken branches, RETs and memory wait cycles, and fails if any of them never
  occurred.
- `tb_lc3_full` runs the directed program on `lc3_top` with all default
  parameters. It also checks the two worked examples explicitly:
  - the call sequence at 150 to 152 leaves R1 = 300 and R7 = 153;
  - `TRAP x1B` at x1234, with vector xA0D2, leaves R7 = x1235 and PC = xA0D2.

To run one with Verilator (the testbench packages must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lc3_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/lc3_pkg.sv tb/lc3_ref_pkg.sv tb/tb_lc3_top.sv
./obj_dir/Vtb_lc3_top
```

The reference model in `lc3_ref_pkg` follows the same instruction definitions as
this design, JMP/JSRR offsets and condition codes included. If you change those
rules in the RTL, change them in the model too. The package also has small
encoder functions (`add_i`, `ld`, `br`, `trap`, ...) for writing test programs.

## Files

| file | contents |
|------|----------|
| `rtl/lc3_pkg.sv` | opcodes, state numbers, mux encodings, control word |
| `rtl/lc3_top.sv` | processor top: IR, SR1/DR muxes, wiring |
| `rtl/lc3_control.sv` | state machine |
| `rtl/lc3_regfile.sv` | R0 to R7 |
| `rtl/lc3_alu.sv` | ALU with SR2MUX and imm5 extension |
| `rtl/lc3_addr_unit.sv` | ADDR1MUX, ADDR2MUX, sign extenders, address adder, MARMUX |
| `rtl/lc3_pc_unit.sv` | PC and PCMUX |
| `rtl/lc3_cc_logic.sv` | N/Z/P |
| `rtl/lc3_ben_logic.sv` | BEN |
| `rtl/lc3_bus.sv` | bus gates |
| `rtl/lc3_memory.sv` | MAR, MDR, memory array, ready, host port |
