// tb_lc3_ben_logic: all 8 n/z/p masks of IR[11:9] against all three
// condition codes, for the BR opcode and for every other opcode, plus the
// hold of BEN while LD.BEN is low.
module tb_lc3_ben_logic;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_ben = 0, ben, exp;
  word_t ir = 0;
  logic [2:0] nzp = 3'b010;
  int checks = 0, failures = 0;

  lc3_ben_logic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (ben !== 1'b0) failures++;
    rst_n = 1;
    for (int op = 0; op < 16; op++)
      for (int mask = 0; mask < 8; mask++)
        for (int cc = 0; cc < 3; cc++) begin
          @(negedge clk);
          ld_ben = 1;
          ir  = {4'(op), 3'(mask), 9'($urandom)};
          nzp = 3'b100 >> cc;
          exp = (op == 0) && ((mask & (4 >> cc)) != 0);
          @(posedge clk); #1;
          checks++;
          if (ben !== exp) begin
            failures++;
            $display("op=%0d mask=%b nzp=%b ben %b exp %b", op, mask, nzp, ben, exp);
          end
          // Hold: LD.BEN low, flip the inputs, BEN must not change.
          @(negedge clk);
          ld_ben = 0;
          ir[11:9] = ~ir[11:9];
          @(posedge clk); #1;
          checks++; if (ben !== exp) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
