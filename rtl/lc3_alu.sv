// lc3_alu: the ALU with its SR2MUX and the imm5 sign extender in front of B.
//
// Input A is SR1OUT. Input B is SR2OUT when IR[5] = 0 (register mode) and
// IR[4:0] sign-extended to 16 bits when IR[5] = 1 (immediate mode), as the
// LC-3 ADD and AND formats lay out. ALUK selects ADD, AND, NOT A or pass A;
// pass A carries a register to the bus for stores. Purely combinational.
// The ALUK encoding is this design's choice.
module lc3_alu
  import lc3_pkg::*;
(
  input  aluk_e      aluk,
  input  word_t      a,        // SR1OUT
  input  word_t      sr2_out,
  input  logic [5:0] ir_lo,    // IR[5:0]: steering bit and imm5
  output word_t      result
);

  word_t b;

  always_comb begin
    b = ir_lo[5] ? {{(WORD_W-5){ir_lo[4]}}, ir_lo[4:0]} : sr2_out;
    unique case (aluk)
      ALU_ADD:   result = a + b;
      ALU_AND:   result = a & b;
      ALU_NOT:   result = ~a;
      ALU_PASSA: result = a;
    endcase
  end

endmodule
