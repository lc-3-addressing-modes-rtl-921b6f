// tb_lc3_alu: random operands for every ALUK value, in register mode
// (IR[5] = 0) and immediate mode (IR[5] = 1), against results computed here.
module tb_lc3_alu;
  import lc3_pkg::*;
  aluk_e aluk;
  word_t a, sr2_out, result, b, exp;
  logic [5:0] ir_lo;
  int checks = 0, failures = 0;

  lc3_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      aluk    = aluk_e'(2'($urandom));
      a       = 16'($urandom);
      sr2_out = 16'($urandom);
      ir_lo   = 6'($urandom);
      if (n < 8) begin a = 16'h7fff; ir_lo = 6'b111111; end // imm5 = -1
      b = ir_lo[5] ? word_t'(signed'(ir_lo[4:0])) : sr2_out;
      case (aluk)
        ALU_ADD: exp = a + b;
        ALU_AND: exp = a & b;
        ALU_NOT: exp = ~a;
        default: exp = a;
      endcase
      #1;
      checks++;
      if (result !== exp) begin
        failures++;
        $display("aluk=%0d a=%h sr2=%h ir=%b got %h exp %h", aluk, a, sr2_out, ir_lo, result, exp);
      end
    end
    // Directed: ADD R1, R2, #-1 on x7fff gives x7ffe; AND with imm x10 sign-extends to xfff0.
    aluk = ALU_ADD; a = 16'h7fff; ir_lo = 6'b111111; #1;
    checks++; if (result !== 16'h7ffe) failures++;
    aluk = ALU_AND; a = 16'h1234; ir_lo = 6'b110000; #1;
    checks++; if (result !== 16'h1230) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
