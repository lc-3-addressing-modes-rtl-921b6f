// lc3_pc_unit: the program counter and its input multiplexer PCMUX.
//
// PCMUX picks PC + 1 (sequential fetch), the bus (TRAP: PC <- MDR) or the
// address adder (BR, JMP/RET, JSR, JSRR). The PC loads at the rising clock
// edge when LD.PC is high. The reset address RESET_PC is this design's
// choice (x3000, where LC-3 user programs conventionally start).
module lc3_pc_unit
  import lc3_pkg::*;
#(
  parameter word_t RESET_PC = 16'h3000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld_pc,
  input  pcmux_e pcmux,
  input  word_t  bus,
  input  word_t  addr_sum,
  output word_t  pc
);

  word_t pc_next;

  always_comb begin
    unique case (pcmux)
      PCMUX_BUS:  pc_next = bus;
      PCMUX_ADDR: pc_next = addr_sum;
      default:    pc_next = pc + 16'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= RESET_PC;
    else if (ld_pc) pc <= pc_next;
  end

endmodule
