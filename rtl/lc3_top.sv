// lc3_top: a multi-cycle LC-3 processor.
//
// The datapath is organised around one 16-bit bus. Each cycle the controller
// (lc3_control) opens one bus gate (PC, MARMUX, ALU or MDR) and raises the
// load enables of the registers that take the bus value: MAR, MDR, IR, the
// register file, the condition codes, PC. The address adder (lc3_addr_unit)
// forms every address from a base (PC or a register) plus a sign-extended
// field of IR, or takes IR[7:0] zero-extended for TRAP; its sum reaches the
// PC through PCMUX and the bus through MARMUX. lc3_ben_logic turns the
// condition codes and the n/z/p bits of a BR instruction into BEN.
//
// Instructions: ADD, AND, NOT, LD, LDR, ST, STR, LEA, BR, JMP (RET = JMP R7),
// JSR, JSRR and TRAP. An instruction takes 4 to 8 cycles with LATENCY = 1;
// each memory access adds LATENCY - 1 wait cycles.
//
// The host port ext_* reads and writes the memory array directly; use it to
// load a program and trap vector table while rst_n is low. pc, ir, nzp,
// state and the register selected by dbg_sel (dbg_reg) are brought out for
// observation. Reset is asynchronous, active low;
// execution starts at RESET_PC.
module lc3_top
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned LATENCY  = 1,
  parameter word_t       RESET_PC = 16'h3000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ext_we,
  input  logic [ADDR_W-1:0] ext_addr,
  input  word_t             ext_wdata,
  output word_t             ext_rdata,
  output word_t             pc,
  output word_t             ir,
  output logic [2:0]        nzp,
  output state_e            state,
  input  logic [2:0]        dbg_sel,
  output word_t             dbg_reg
);

  ctrl_t ctrl;
  word_t bus, mar, mdr, sr1_out, sr2_out, alu_out, addr_sum, marmux_out;
  logic  ben, mem_r;
  logic [2:0] sr1, dr;

  lc3_control u_ctrl (
    .clk, .rst_n, .ir, .ben, .r(mem_r), .state, .ctrl
  );

  // Instruction register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ir <= '0;
    else if (ctrl.ld_ir) ir <= bus;
  end

  assign sr1 = (ctrl.sr1mux == SR1_IR11) ? ir[11:9] : ir[8:6];
  assign dr  = (ctrl.drmux == DR_R7) ? 3'd7 : ir[11:9];

  lc3_regfile u_rf (
    .clk, .rst_n, .ld_reg(ctrl.ld_reg), .dr, .d_in(bus),
    .sr1, .sr2(ir[2:0]), .sr1_out, .sr2_out,
    .dbg_sel, .dbg_out(dbg_reg)
  );

  lc3_alu u_alu (
    .aluk(ctrl.aluk), .a(sr1_out), .sr2_out, .ir_lo(ir[5:0]), .result(alu_out)
  );

  lc3_addr_unit u_addr (
    .pc, .base(sr1_out), .ir_lo(ir[10:0]), .addr1mux(ctrl.addr1mux),
    .addr2mux(ctrl.addr2mux), .marmux(ctrl.marmux), .addr_sum, .marmux_out
  );

  lc3_pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .ld_pc(ctrl.ld_pc), .pcmux(ctrl.pcmux), .bus, .addr_sum, .pc
  );

  lc3_cc_logic u_cc (
    .clk, .rst_n, .ld_cc(ctrl.ld_cc), .bus, .nzp
  );

  lc3_ben_logic u_ben (
    .clk, .rst_n, .ld_ben(ctrl.ld_ben), .ir, .nzp, .ben
  );

  lc3_bus u_bus (
    .gate_marmux(ctrl.gate_marmux), .gate_pc(ctrl.gate_pc), .gate_alu(ctrl.gate_alu),
    .gate_mdr(ctrl.gate_mdr), .marmux_out, .pc, .alu_out, .mdr, .bus
  );

  lc3_memory #(.ADDR_W(ADDR_W), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .bus, .ld_mar(ctrl.ld_mar), .ld_mdr(ctrl.ld_mdr),
    .mio_en(ctrl.mio_en), .r_w(ctrl.r_w), .mar, .mdr, .r(mem_r),
    .ext_we, .ext_addr, .ext_wdata, .ext_rdata
  );

endmodule
