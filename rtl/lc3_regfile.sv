// lc3_regfile: the eight general-purpose registers R0..R7, 16 bits each.
//
// Two combinational read ports (SR1, SR2) feed the ALU and the address adder;
// one write port loads register DR from the bus at the rising clock edge when
// LD.REG is high. A third read port (dbg_sel/dbg_out) serves observation from
// outside the processor and has no role in execution. A register read in the same cycle it is written returns the
// old value. Registers clear to zero on reset (the register contents after
// reset are this design's choice).
module lc3_regfile
  import lc3_pkg::*;
#(
  parameter int unsigned NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_reg,
  input  logic [$clog2(NREGS)-1:0] dr,
  input  word_t                    d_in,
  input  logic [$clog2(NREGS)-1:0] sr1,
  input  logic [$clog2(NREGS)-1:0] sr2,
  output word_t                    sr1_out,
  output word_t                    sr2_out,
  input  logic [$clog2(NREGS)-1:0] dbg_sel,
  output word_t                    dbg_out
);

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= d_in;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[sr2];
  assign dbg_out = regs[dbg_sel];

endmodule
