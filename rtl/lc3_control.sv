// lc3_control: the multi-cycle finite state machine of the LC-3.
//
// Every instruction starts with the fetch states 18 (MAR <- PC, PC <- PC+1),
// 33 (MDR <- M[MAR], held until the memory's ready R) and 35 (IR <- MDR),
// then reaches the decode state 32, which stores BEN and branches 16 ways on
// IR[15:12]. The execute states are:
//   ADD 1, AND 5, NOT 9:   DR <- SR1 op (SR2 | imm5)
//   LEA 14:                DR <- PC + off9
//   LD 2 / LDR 6:          MAR <- PC + off9 / BaseR + off6, then 25 (MDR <- M)
//                          and 27 (DR <- MDR)
//   ST 3 / STR 7:          MAR as for loads, then 23 (MDR <- SR) and 16 (M <- MDR)
//   BR 0:                  PC <- PC + off9, the load enabled by BEN
//   JMP/RET 12:            PC <- BaseR + off6
//   JSR/JSRR 4 -> 21 / 20: R7 <- PC and PC <- PC + off11 / BaseR + off6
//   TRAP 15, 28, 30:       MAR <- ZEXT(trapvect8); MDR <- M and R7 <- PC;
//                          PC <- MDR
// The condition codes load on every register write (LD.CC = LD.REG).
// RTI, LDI, STI and the reserved opcode are not part of this machine; they
// return to fetch without any effect.
//
// State numbers 0, 15, 28, 30 and 32 and the TRAP and BR behaviour follow the
// lecture material this design is built from; the other state numbers follow
// the usual LC-3 state diagram. JMP and JSRR adding a sign-extended IR[5:0]
// to the base register, merging "R7 <- PC" into the state that loads the PC
// for JSR/JSRR, and treating the unlisted opcodes as no-ops are this design's
// choices. The control word is a Moore output of the state, except that the
// memory states wait on R and state 0 gates LD.PC with BEN.
module lc3_control
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  ir,
  input  logic   ben,
  input  logic   r,        // memory ready
  output state_e state,
  output ctrl_t  ctrl
);

  state_e next;
  opcode_e opcode;

  assign opcode = opcode_e'(ir[15:12]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= next;
  end

  // Next-state function.
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_FETCH:   next = S_IFMEM;
      S_IFMEM:   next = r ? S_IFIR : S_IFMEM;
      S_IFIR:    next = S_DECODE;
      S_DECODE: begin
        unique case (opcode)
          OP_BR:   next = S_BR;
          OP_ADD:  next = S_ADD;
          OP_AND:  next = S_AND;
          OP_NOT:  next = S_NOT;
          OP_LD:   next = S_LD;
          OP_LDR:  next = S_LDR;
          OP_ST:   next = S_ST;
          OP_STR:  next = S_STR;
          OP_LEA:  next = S_LEA;
          OP_JMP:  next = S_JMP;
          OP_JSR:  next = S_JSR;
          OP_TRAP: next = S_TRAP;
          default: next = S_FETCH;
        endcase
      end
      S_LD, S_LDR:   next = S_LDMEM;
      S_LDMEM:       next = r ? S_LDREG : S_LDMEM;
      S_ST, S_STR:   next = S_STMDR;
      S_STMDR:       next = S_STORE;
      S_STORE:       next = r ? S_FETCH : S_STORE;
      S_JSR:         next = ir[11] ? S_JSR11 : S_JSRR;
      S_TRAP:        next = S_TRAPMEM;
      S_TRAPMEM:     next = r ? S_TRAPPC : S_TRAPMEM;
      default:       next = S_FETCH;
    endcase
  end

  // Control word of the current state.
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S_FETCH: begin
        ctrl.gate_pc = 1'b1;
        ctrl.ld_mar  = 1'b1;
        ctrl.ld_pc   = 1'b1;
        ctrl.pcmux   = PCMUX_INC;
      end
      S_IFMEM, S_LDMEM: begin
        ctrl.mio_en = 1'b1;
        ctrl.ld_mdr = 1'b1;
      end
      S_IFIR: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.ld_ir    = 1'b1;
      end
      S_DECODE: ctrl.ld_ben = 1'b1;
      S_ADD, S_AND, S_NOT: begin
        ctrl.aluk     = (state == S_ADD) ? ALU_ADD : (state == S_AND) ? ALU_AND : ALU_NOT;
        ctrl.sr1mux   = SR1_IR8;
        ctrl.gate_alu = 1'b1;
        ctrl.ld_reg   = 1'b1;
        ctrl.drmux    = DR_IR11;
      end
      S_LEA: begin
        ctrl.addr1mux    = ADDR1_PC;
        ctrl.addr2mux    = ADDR2_OFF9;
        ctrl.marmux      = MARMUX_ADDR;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_reg      = 1'b1;
        ctrl.drmux       = DR_IR11;
      end
      S_LD, S_ST, S_LDR, S_STR: begin
        ctrl.addr1mux    = (state == S_LD || state == S_ST) ? ADDR1_PC : ADDR1_BASE;
        ctrl.addr2mux    = (state == S_LD || state == S_ST) ? ADDR2_OFF9 : ADDR2_OFF6;
        ctrl.sr1mux      = SR1_IR8;
        ctrl.marmux      = MARMUX_ADDR;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_mar      = 1'b1;
      end
      S_LDREG: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.ld_reg   = 1'b1;
        ctrl.drmux    = DR_IR11;
      end
      S_STMDR: begin
        ctrl.sr1mux   = SR1_IR11;
        ctrl.aluk     = ALU_PASSA;
        ctrl.gate_alu = 1'b1;
        ctrl.ld_mdr   = 1'b1;
      end
      S_STORE: begin
        ctrl.mio_en = 1'b1;
        ctrl.r_w    = 1'b1;
      end
      S_BR: begin
        ctrl.addr1mux = ADDR1_PC;
        ctrl.addr2mux = ADDR2_OFF9;
        ctrl.pcmux    = PCMUX_ADDR;
        ctrl.ld_pc    = ben;
      end
      S_JMP: begin
        ctrl.sr1mux   = SR1_IR8;
        ctrl.addr1mux = ADDR1_BASE;
        ctrl.addr2mux = ADDR2_OFF6;
        ctrl.pcmux    = PCMUX_ADDR;
        ctrl.ld_pc    = 1'b1;
      end
      S_JSR11, S_JSRR: begin
        ctrl.gate_pc  = 1'b1;
        ctrl.ld_reg   = 1'b1;
        ctrl.drmux    = DR_R7;
        ctrl.sr1mux   = SR1_IR8;
        ctrl.addr1mux = (state == S_JSR11) ? ADDR1_PC : ADDR1_BASE;
        ctrl.addr2mux = (state == S_JSR11) ? ADDR2_OFF11 : ADDR2_OFF6;
        ctrl.pcmux    = PCMUX_ADDR;
        ctrl.ld_pc    = 1'b1;
      end
      S_TRAP: begin
        ctrl.marmux      = MARMUX_ZEXT;
        ctrl.gate_marmux = 1'b1;
        ctrl.ld_mar      = 1'b1;
      end
      S_TRAPMEM: begin
        ctrl.mio_en  = 1'b1;
        ctrl.ld_mdr  = 1'b1;
        ctrl.gate_pc = 1'b1;
        ctrl.ld_reg  = 1'b1;
        ctrl.drmux   = DR_R7;
      end
      S_TRAPPC: begin
        ctrl.gate_mdr = 1'b1;
        ctrl.pcmux    = PCMUX_BUS;
        ctrl.ld_pc    = 1'b1;
      end
      default: ;
    endcase
    ctrl.ld_cc = ctrl.ld_reg;
  end

endmodule
