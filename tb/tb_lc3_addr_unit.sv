// tb_lc3_addr_unit: every ADDR1MUX/ADDR2MUX/MARMUX combination with random
// PC, base and IR fields, plus the address examples of the LC-3 notes
// (LD R1 at 150 with offset -51 reads 100; TRAP x1B reads x001B).
module tb_lc3_addr_unit;
  import lc3_pkg::*;
  word_t pc, base, addr_sum, marmux_out, exp_sum, exp_mar, off;
  logic [10:0] ir_lo;
  addr1mux_e addr1mux;
  addr2mux_e addr2mux;
  marmux_e marmux;
  int checks = 0, failures = 0;

  lc3_addr_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      pc = 16'($urandom); base = 16'($urandom); ir_lo = 11'($urandom);
      addr1mux = addr1mux_e'(1'($urandom));
      addr2mux = addr2mux_e'(2'($urandom));
      marmux   = marmux_e'(1'($urandom));
      case (addr2mux)
        ADDR2_ZERO:  off = 0;
        ADDR2_OFF6:  off = word_t'(signed'(ir_lo[5:0]));
        ADDR2_OFF9:  off = word_t'(signed'(ir_lo[8:0]));
        default:     off = word_t'(signed'(ir_lo[10:0]));
      endcase
      exp_sum = (addr1mux == ADDR1_PC ? pc : base) + off;
      exp_mar = (marmux == MARMUX_ZEXT) ? {8'h00, ir_lo[7:0]} : exp_sum;
      #1;
      checks++;
      if (addr_sum !== exp_sum || marmux_out !== exp_mar) begin
        failures++;
        $display("a1=%0d a2=%0d pc=%h base=%h ir=%h sum %h/%h mar %h/%h", addr1mux, addr2mux, pc, base, ir_lo, addr_sum, exp_sum, marmux_out, exp_mar);
      end
    end
    // LD R1, -51 fetched from 150: PC = 151, address 100.
    pc = 16'd151; ir_lo = 11'(9'(-51)); addr1mux = ADDR1_PC; addr2mux = ADDR2_OFF9; marmux = MARMUX_ADDR; #1;
    checks++; if (marmux_out !== 16'd100) failures++;
    // TRAP x1B: MAR <- x001B.
    ir_lo = 11'h01B; marmux = MARMUX_ZEXT; #1;
    checks++; if (marmux_out !== 16'h001B) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
