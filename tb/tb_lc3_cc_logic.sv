// tb_lc3_cc_logic: condition codes after random and boundary bus values
// (0, x8000, x7fff, xffff), loaded and not loaded, against N/Z/P worked out
// here from the sign and zero-ness of the value.
module tb_lc3_cc_logic;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_cc = 0;
  word_t bus = 0;
  logic [2:0] nzp, model;
  int checks = 0, failures = 0;

  lc3_cc_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (nzp !== 3'b010) failures++;
    rst_n = 1;
    model = 3'b010;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      ld_cc = ($urandom_range(0, 3) != 0);
      case (n % 6)
        0: bus = 16'h0000;
        1: bus = 16'h8000;
        2: bus = 16'h7fff;
        3: bus = 16'hffff;
        default: bus = 16'($urandom);
      endcase
      @(posedge clk);
      if (ld_cc) model = (signed'(bus) < 0) ? 3'b100 : (bus == 0) ? 3'b010 : 3'b001;
      #1;
      checks++;
      if (nzp !== model) begin
        failures++;
        $display("bus=%h nzp %b exp %b", bus, nzp, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
