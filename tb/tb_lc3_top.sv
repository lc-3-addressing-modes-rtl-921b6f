// tb_lc3_top: end-to-end test of the processor with two-cycle memory
// (LATENCY = 2, so every memory access waits for R).
//
// Phase 1 runs the directed program of lc3_ref_pkg (function call through
// LD/LEA/JMP, TRAP x1B through the vector table, every branch condition,
// loads, stores, JSR, JSRR, RET). Phase 2 resets the processor, fills all
// 64K words of memory with random data and executes 150 instructions from
// it, 40 times over. After every instruction the PC, all eight registers
// and the condition codes are compared with the reference model, and the
// cycle count of the instruction with the one the state sequence implies.
// The memory words the program stored are compared at the end. Each
// mechanism (every opcode, branch taken and not taken, memory wait cycles,
// TRAP, RET) is counted, and one that never happened is a failure.
module tb_lc3_top;
  timeunit 1ns;
  timeprecision 1ps;
  import lc3_pkg::*;
  import lc3_ref_pkg::*;

  localparam int unsigned LAT = 2;
  localparam int RUNS = 40, INSTRS = 150;

  logic clk = 0, rst_n = 0, ext_we = 0;
  logic [15:0] ext_addr = 0;
  word_t ext_wdata = 0, ext_rdata, pc, ir;
  logic [2:0] nzp, dbg_sel = 0;
  word_t dbg_reg;
  state_e prev_state = S_FETCH;
  state_e state;
  int checks = 0, failures = 0;
  int unsigned wait_cycles = 0;
  lc3_model m;

  lc3_top #(.LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;

  // A memory state seen in two cycles running is a wait for R.
  always @(posedge clk) begin
    if (rst_n && state == prev_state && state inside {S_IFMEM, S_LDMEM, S_STORE, S_TRAPMEM})
      wait_cycles++;
    prev_state <= state;
  end

  initial begin
    repeat (20000000) @(posedge clk);
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

  task automatic load_memory();
    rst_n = 0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = 16'(i); ext_wdata = m.mem[i];
    end
    @(negedge clk);
    ext_we = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  function automatic int expected_cycles(input word_t i);
    int mem_states;
    int n;
    n = 4; mem_states = 1;
    case (i[15:12])
      4'b0010, 4'b0110: begin n += 3; mem_states++; end
      4'b0011, 4'b0111: begin n += 3; mem_states++; end
      4'b1111:          begin n += 3; mem_states++; end
      4'b0100:          n += 2;
      4'b1000, 4'b1010, 4'b1011, 4'b1101: ;
      default:          n += 1;
    endcase
    return n + mem_states * (int'(LAT) - 1);
  endfunction

  task automatic compare(input string tag);
    check(pc == m.pc, $sformatf("%s pc %h exp %h", tag, pc, m.pc));
    check(nzp == m.nzp, $sformatf("%s nzp %b exp %b", tag, nzp, m.nzp));
    for (int i = 0; i < 8; i++) begin
      dbg_sel = 3'(i); #0.1;
      check(dbg_reg == m.r[i], $sformatf("%s R%0d %h exp %h", tag, i, dbg_reg, m.r[i]));
    end
  endtask

  // Run n instructions, comparing after each one.
  task automatic run(input int n, input string tag);
    word_t instr;
    int cycles;
    for (int k = 0; k < n; k++) begin
      // At a negedge in state 18: the previous instruction is complete.
      instr = m.mem[m.pc];
      m.step();
      cycles = 0;
      do begin
        @(negedge clk);
        cycles++;
      end while (state != S_FETCH);
      compare($sformatf("%s #%0d ir=%h", tag, k, instr));
      check(cycles == expected_cycles(instr), $sformatf("%s ir=%h took %0d cycles, exp %0d", tag, instr, cycles, expected_cycles(instr)));
    end
  endtask

  initial begin
    word_t halt;
    word_t stored [word_t];
    m = new(16'h3000);
    halt = load_directed(m);
    load_memory();
    compare("reset");
    run(60, "directed");
    check(pc == halt, $sformatf("directed program ends at the final loop: pc %h exp %h", pc, halt));
    // Stored words, read back with the processor held in reset.
    rst_n = 0;
    for (int i = 0; i < 65536; i++) begin
      ext_addr = 16'(i);
      @(negedge clk);
      if (ext_rdata != m.mem[i]) begin
        check(0, $sformatf("memory %h = %h exp %h", i, ext_rdata, m.mem[i]));
      end
    end
    checks++;

    // Phase 2: random memory images, many short runs.
    for (int img = 0; img < RUNS; img++) begin
      lc3_model m2;
      m2 = new(16'h3000);
      foreach (m2.mem[i]) m2.mem[i] = 16'($urandom);
      for (int i = 0; i < 16; i++) m2.op_count[i] = m.op_count[i];
      m2.br_taken = m.br_taken; m2.br_not_taken = m.br_not_taken; m2.rets = m.rets;
      m = m2;
      load_memory();
      run(INSTRS, $sformatf("random image %0d", img));
      rst_n = 0;   // stop the processor while its memory is read back
      for (int i = 0; i < 65536; i++) begin
        ext_addr = 16'(i);
        @(negedge clk);
        if (ext_rdata != m.mem[i]) check(0, $sformatf("memory %h = %h exp %h", i, ext_rdata, m.mem[i]));
      end
      checks++;
    end

    // Mechanisms.
    begin
      string names [16] = '{"BR", "ADD", "LD", "ST", "JSR/JSRR", "AND", "LDR", "STR",
                             "RTI(no-op)", "NOT", "LDI(no-op)", "STI(no-op)", "JMP", "reserved(no-op)", "LEA", "TRAP"};
      for (int i = 0; i < 16; i++) begin
        $display("  %-16s executed %0d times", names[i], m.op_count[i]);
        check(m.op_count[i] > 0, $sformatf("opcode %s never executed", names[i]));
      end
      $display("  branch taken %0d, not taken %0d, RET %0d, memory wait cycles %0d",
               m.br_taken, m.br_not_taken, m.rets, wait_cycles);
      check(m.br_taken > 0, "no branch taken");
      check(m.br_not_taken > 0, "no branch not taken");
      check(m.rets > 0, "no RET");
      check(wait_cycles > 0, "memory never made the controller wait");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
