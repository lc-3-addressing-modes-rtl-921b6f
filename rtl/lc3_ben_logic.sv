// lc3_ben_logic: the branch enable flag BEN.
//
// BEN = ((N & IR[11]) | (Z & IR[10]) | (P & IR[9])) & (IR[15:12] == 0000):
// a BR instruction whose n/z/p mask matches a set condition code. The result
// is stored in a flip-flop written when LD.BEN is high (in the decode state),
// and BEN in turn enables LD.PC in the BR state. Cleared on reset.
module lc3_ben_logic
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_ben,
  input  word_t      ir,
  input  logic [2:0] nzp,
  output logic       ben
);

  logic ben_d;

  always_comb ben_d = (|(nzp & ir[11:9])) && (ir[15:12] == OP_BR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ben <= 1'b0;
    else if (ld_ben) ben <= ben_d;
  end

endmodule
