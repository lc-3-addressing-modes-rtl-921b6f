// tb_lc3_pc_unit: reset value, increment, load from bus and from the address
// adder, and hold when LD.PC is low, against a model PC.
module tb_lc3_pc_unit;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_pc = 0;
  pcmux_e pcmux = PCMUX_INC;
  word_t bus = 0, addr_sum = 0, pc, model;
  int checks = 0, failures = 0;

  lc3_pc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (pc !== 16'h3000) failures++;
    rst_n = 1;
    model = 16'h3000;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      ld_pc    = 1'($urandom);
      pcmux    = pcmux_e'($urandom_range(0, 2));
      bus      = 16'($urandom);
      addr_sum = 16'($urandom);
      if (n == 5) begin ld_pc = 1; pcmux = PCMUX_BUS; bus = 16'hFFFF; end
      if (n == 6) begin ld_pc = 1; pcmux = PCMUX_INC; end
      @(posedge clk);
      if (ld_pc) model = (pcmux == PCMUX_BUS) ? bus : (pcmux == PCMUX_ADDR) ? addr_sum : model + 1;
      #1;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("n=%0d pc %h exp %h", n, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
