// lc3_addr_unit: LC-3 address generation.
//
// The address adder adds ADDR1MUX (PC or the base register SR1OUT) and
// ADDR2MUX (zero or IR[5:0], IR[8:0], IR[10:0] sign-extended to 16 bits).
// Its sum goes to PCMUX directly and to MARMUX, which alternatively passes
// IR[7:0] zero-extended (the TRAP vector table address). Combinational.
// The datapath structure follows the LC-3 datapath drawing; the select
// encodings come from lc3_pkg.
module lc3_addr_unit
  import lc3_pkg::*;
(
  input  word_t      pc,
  input  word_t      base,      // SR1OUT
  input  logic [10:0] ir_lo,    // IR[10:0]
  input  addr1mux_e  addr1mux,
  input  addr2mux_e  addr2mux,
  input  marmux_e    marmux,
  output word_t      addr_sum,  // to PCMUX
  output word_t      marmux_out // to GateMARMUX
);

  word_t op1, op2;

  always_comb begin
    op1 = (addr1mux == ADDR1_BASE) ? base : pc;
    unique case (addr2mux)
      ADDR2_ZERO:  op2 = '0;
      ADDR2_OFF6:  op2 = {{(WORD_W-6){ir_lo[5]}},  ir_lo[5:0]};
      ADDR2_OFF9:  op2 = {{(WORD_W-9){ir_lo[8]}},  ir_lo[8:0]};
      ADDR2_OFF11: op2 = {{(WORD_W-11){ir_lo[10]}}, ir_lo[10:0]};
    endcase
    addr_sum   = op1 + op2;
    marmux_out = (marmux == MARMUX_ZEXT) ? {{(WORD_W-8){1'b0}}, ir_lo[7:0]} : addr_sum;
  end

endmodule
