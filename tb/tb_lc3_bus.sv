// tb_lc3_bus: each gate alone puts its own source on the bus; with no gate
// open the bus carries zero.
module tb_lc3_bus;
  import lc3_pkg::*;
  logic gate_marmux = 0, gate_pc = 0, gate_alu = 0, gate_mdr = 0;
  word_t marmux_out, pc, alu_out, mdr, bus, exp;
  int checks = 0, failures = 0;

  lc3_bus dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      marmux_out = 16'($urandom); pc = 16'($urandom);
      alu_out = 16'($urandom); mdr = 16'($urandom);
      {gate_marmux, gate_pc, gate_alu, gate_mdr} = 4'b0000;
      case (n % 5)
        0: begin gate_marmux = 1; exp = marmux_out; end
        1: begin gate_pc = 1;     exp = pc;         end
        2: begin gate_alu = 1;    exp = alu_out;    end
        3: begin gate_mdr = 1;    exp = mdr;        end
        default: exp = '0;
      endcase
      #1;
      checks++;
      if (bus !== exp) begin
        failures++;
        $display("n=%0d bus %h exp %h", n, bus, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
