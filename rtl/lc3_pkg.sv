// lc3_pkg: types and constants shared by the LC-3 processor.
//
// Holds the 4-bit opcodes, the controller's state names (numbered as in the
// LC-3 state diagram), the select codes of every datapath multiplexer and the
// control word that the controller hands to the datapath each cycle.
// The opcode values and the ALUK width of 2 follow the LC-3 instruction set;
// the numeric encodings of the mux selects are this design's choice.
package lc3_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;

  // Opcodes, IR[15:12].
  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_e;

  // Controller states. The numbers are those of the LC-3 state diagram.
  typedef enum logic [5:0] {
    S_BR      = 6'd0,   // PC <- PC + off9 if BEN
    S_ADD     = 6'd1,
    S_LD      = 6'd2,   // MAR <- PC + off9
    S_ST      = 6'd3,   // MAR <- PC + off9
    S_JSR     = 6'd4,   // choose JSR or JSRR on IR[11]
    S_AND     = 6'd5,
    S_LDR     = 6'd6,   // MAR <- BaseR + off6
    S_STR     = 6'd7,   // MAR <- BaseR + off6
    S_NOT     = 6'd9,
    S_JMP     = 6'd12,  // PC <- BaseR + off6
    S_LEA     = 6'd14,
    S_TRAP    = 6'd15,  // MAR <- ZEXT(trapvect8)
    S_STORE   = 6'd16,  // M[MAR] <- MDR, wait for R
    S_FETCH   = 6'd18,  // MAR <- PC, PC <- PC + 1
    S_JSRR    = 6'd20,  // R7 <- PC, PC <- BaseR + off6
    S_JSR11   = 6'd21,  // R7 <- PC, PC <- PC + off11
    S_STMDR   = 6'd23,  // MDR <- SR
    S_LDMEM   = 6'd25,  // MDR <- M[MAR], wait for R
    S_LDREG   = 6'd27,  // DR <- MDR
    S_TRAPMEM = 6'd28,  // MDR <- M[MAR], R7 <- PC, wait for R
    S_TRAPPC  = 6'd30,  // PC <- MDR
    S_DECODE  = 6'd32,  // BEN <- ..., branch on opcode
    S_IFMEM   = 6'd33,  // MDR <- M[MAR], wait for R
    S_IFIR    = 6'd35   // IR <- MDR
  } state_e;

  // ALU operation (ALUK).
  typedef enum logic [1:0] {
    ALU_ADD   = 2'd0,
    ALU_AND   = 2'd1,
    ALU_NOT   = 2'd2,
    ALU_PASSA = 2'd3
  } aluk_e;

  // PCMUX: PC + 1, the bus, or the address adder.
  typedef enum logic [1:0] {
    PCMUX_INC  = 2'd0,
    PCMUX_BUS  = 2'd1,
    PCMUX_ADDR = 2'd2
  } pcmux_e;

  // ADDR1MUX: PC or SR1OUT (BaseR).
  typedef enum logic {
    ADDR1_PC   = 1'b0,
    ADDR1_BASE = 1'b1
  } addr1mux_e;

  // ADDR2MUX: 0, SEXT(IR[5:0]), SEXT(IR[8:0]), SEXT(IR[10:0]).
  typedef enum logic [1:0] {
    ADDR2_ZERO  = 2'd0,
    ADDR2_OFF6  = 2'd1,
    ADDR2_OFF9  = 2'd2,
    ADDR2_OFF11 = 2'd3
  } addr2mux_e;

  // MARMUX: ZEXT(IR[7:0]) or the address adder.
  typedef enum logic {
    MARMUX_ZEXT = 1'b0,
    MARMUX_ADDR = 1'b1
  } marmux_e;

  // DRMUX: IR[11:9] or R7.
  typedef enum logic {
    DR_IR11 = 1'b0,
    DR_R7   = 1'b1
  } drmux_e;

  // SR1MUX: IR[8:6] (BaseR, SR1) or IR[11:9] (source of a store).
  typedef enum logic {
    SR1_IR8  = 1'b0,
    SR1_IR11 = 1'b1
  } sr1mux_e;

  // One cycle's control signals.
  typedef struct packed {
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_ben;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    logic      gate_pc;
    logic      gate_mdr;
    logic      gate_alu;
    logic      gate_marmux;
    pcmux_e    pcmux;
    addr1mux_e addr1mux;
    addr2mux_e addr2mux;
    marmux_e   marmux;
    drmux_e    drmux;
    sr1mux_e   sr1mux;
    aluk_e     aluk;
    logic      mio_en;   // MEM.EN: memory access this cycle
    logic      r_w;      // 1 = write M[MAR] <- MDR
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    ld_mar: 1'b0, ld_mdr: 1'b0, ld_ir: 1'b0, ld_ben: 1'b0, ld_reg: 1'b0,
    ld_cc: 1'b0, ld_pc: 1'b0, gate_pc: 1'b0, gate_mdr: 1'b0, gate_alu: 1'b0,
    gate_marmux: 1'b0, pcmux: PCMUX_INC, addr1mux: ADDR1_PC, addr2mux: ADDR2_ZERO,
    marmux: MARMUX_ADDR, drmux: DR_IR11, sr1mux: SR1_IR8, aluk: ALU_PASSA,
    mio_en: 1'b0, r_w: 1'b0
  };

endpackage
