// tb_lc3_full: the processor with every parameter at its default (full 64K
// word memory, single-cycle memory ready, start at x3000) runs the directed
// program of lc3_ref_pkg: the function call and return through LD, LEA and
// JMP, the TRAP x1B call through the vector table, branches on each
// condition, loads, stores, JSR and JSRR. After every instruction the PC,
// registers and condition codes are compared with the reference model, and
// the values the LC-3 notes give for the two examples are checked directly
// (R1 = 300 and R7 = 153 before the call; R7 = x1235 and PC = xA0D2 after
// TRAP x1B). Finally the whole memory is compared.
module tb_lc3_full;
  timeunit 1ns;
  timeprecision 1ps;
  import lc3_pkg::*;
  import lc3_ref_pkg::*;

  logic clk = 0, rst_n = 0, ext_we = 0;
  logic [15:0] ext_addr = 0;
  word_t ext_wdata = 0, ext_rdata, pc, ir, dbg_reg;
  logic [2:0] nzp, dbg_sel = 0;
  state_e state;
  int checks = 0, failures = 0;
  lc3_model m;

  lc3_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask


  task automatic compare(input string tag);
    check(pc == m.pc, $sformatf("%s pc %h exp %h", tag, pc, m.pc));
    check(nzp == m.nzp, $sformatf("%s nzp %b exp %b", tag, nzp, m.nzp));
    for (int i = 0; i < 8; i++) begin
      dbg_sel = 3'(i); #0.1;
      check(dbg_reg == m.r[i], $sformatf("%s R%0d %h exp %h", tag, i, dbg_reg, m.r[i]));
    end
  endtask

  task automatic dut_reg(input int i, output word_t v);
    dbg_sel = 3'(i); #0.1;
    v = dbg_reg;
  endtask

  initial begin
    word_t halt, instr, v;
    int n;
    m = new(16'h3000);
    halt = load_directed(m);
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = 16'(i); ext_wdata = m.mem[i];
    end
    @(negedge clk);
    ext_we = 0;
    @(negedge clk);
    rst_n = 1;
    compare("reset");
    n = 0;
    while (pc != halt && n < 200) begin
      instr = m.mem[m.pc];
      m.step();
      do @(negedge clk); while (state != S_FETCH);
      compare($sformatf("#%0d ir=%h", n, instr));
      // The worked examples.
      if (m.pc == 16'd300) begin
        dut_reg(1, v); check(v == 16'd300, "R1 = 300 after LD R1,-51");
        dut_reg(7, v); check(v == 16'd153, "R7 = 153 after LEA R7,1");
      end
      if (instr == 16'hF01B) begin
        dut_reg(7, v); check(v == 16'h1235, "R7 = x1235 after TRAP x1B");
        check(pc == 16'hA0D2, "PC = xA0D2 after TRAP x1B");
      end
      n++;
    end
    check(pc == halt, $sformatf("program reaches its final loop at %h", halt));
    rst_n = 0;
    for (int i = 0; i < 65536; i++) begin
      ext_addr = 16'(i);
      @(negedge clk);
      if (ext_rdata != m.mem[i]) check(0, $sformatf("memory %h = %h exp %h", i, ext_rdata, m.mem[i]));
    end
    checks++;
    $display("  %0d instructions, %0d branches taken, %0d not taken, %0d RET, %0d TRAP",
             n, m.br_taken, m.br_not_taken, m.rets, m.op_count[15]);
    check(m.br_taken > 0 && m.br_not_taken > 0 && m.rets > 0 && m.op_count[15] > 0, "mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
