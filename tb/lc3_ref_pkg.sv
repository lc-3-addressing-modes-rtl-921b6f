// lc3_ref_pkg: an instruction-level reference model of the LC-3 subset the
// processor implements, and small encoders for writing test programs.
//
// lc3_model::step() executes one instruction on the model's own memory,
// registers, PC and condition codes, following the instruction definitions
// (not the processor's datapath): the condition codes are set by every
// register write, JMP and JSRR add a sign-extended IR[5:0] to the base
// register, TRAP saves PC in R7 and jumps through the vector table at
// x0000-x00FF, and RTI, LDI, STI and the reserved opcode do nothing.
package lc3_ref_pkg;

  typedef logic [15:0] word_t;

  function automatic word_t sext(input word_t v, input int bits);
    word_t m = word_t'(1) << (bits - 1);
    v = v & ((word_t'(1) << bits) - 1);
    return (v ^ m) - m;
  endfunction

  class lc3_model;
    word_t      mem [65536];
    word_t      r   [8];
    word_t      pc;
    logic [2:0] nzp;
    int unsigned op_count [16];
    int unsigned br_taken, br_not_taken, rets;

    function new(input word_t reset_pc);
      pc  = reset_pc;
      nzp = 3'b010;
      foreach (r[i]) r[i] = '0;
      foreach (op_count[i]) op_count[i] = 0;
      br_taken = 0; br_not_taken = 0; rets = 0;
    endfunction

    function void setreg(input int d, input word_t v);
      r[d] = v;
      nzp  = v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
    endfunction

    function void step();
      word_t ir, a;
      int dr, sr1, sr2;
      ir  = mem[pc];
      pc  = pc + 1;
      dr  = int'(ir[11:9]);
      sr1 = int'(ir[8:6]);
      sr2 = int'(ir[2:0]);
      op_count[ir[15:12]]++;
      case (ir[15:12])
        4'b0001: setreg(dr, r[sr1] + (ir[5] ? sext(ir, 5) : r[sr2]));
        4'b0101: setreg(dr, r[sr1] & (ir[5] ? sext(ir, 5) : r[sr2]));
        4'b1001: setreg(dr, ~r[sr1]);
        4'b1110: setreg(dr, pc + sext(ir, 9));
        4'b0010: setreg(dr, mem[pc + sext(ir, 9)]);
        4'b0110: setreg(dr, mem[r[sr1] + sext(ir, 6)]);
        4'b0011: mem[pc + sext(ir, 9)] = r[dr];
        4'b0111: mem[r[sr1] + sext(ir, 6)] = r[dr];
        4'b0000: begin
          if ((ir[11:9] & nzp) != 0) begin pc = pc + sext(ir, 9); br_taken++; end
          else br_not_taken++;
        end
        4'b1100: begin
          if (sr1 == 7) rets++;
          pc = r[sr1] + sext(ir, 6);
        end
        4'b0100: begin
          a = ir[11] ? pc + sext(ir, 11) : r[sr1] + sext(ir, 6);
          setreg(7, pc);
          pc = a;
        end
        4'b1111: begin
          setreg(7, pc);
          pc = mem[{8'h00, ir[7:0]}];
        end
        default: ;
      endcase
    endfunction
  endclass

  // Encoders.
  function automatic word_t add_i(int d, int s, int imm); return {4'b0001, 3'(d), 3'(s), 1'b1, 5'(imm)}; endfunction
  function automatic word_t add_r(int d, int s, int t);   return {4'b0001, 3'(d), 3'(s), 3'b000, 3'(t)}; endfunction
  function automatic word_t and_i(int d, int s, int imm); return {4'b0101, 3'(d), 3'(s), 1'b1, 5'(imm)}; endfunction
  function automatic word_t and_r(int d, int s, int t);   return {4'b0101, 3'(d), 3'(s), 3'b000, 3'(t)}; endfunction
  function automatic word_t not_r(int d, int s);          return {4'b1001, 3'(d), 3'(s), 6'b111111}; endfunction
  function automatic word_t lea(int d, int off);          return {4'b1110, 3'(d), 9'(off)}; endfunction
  function automatic word_t ld(int d, int off);           return {4'b0010, 3'(d), 9'(off)}; endfunction
  function automatic word_t ldr(int d, int b, int off);   return {4'b0110, 3'(d), 3'(b), 6'(off)}; endfunction
  function automatic word_t st(int s, int off);           return {4'b0011, 3'(s), 9'(off)}; endfunction
  function automatic word_t str(int s, int b, int off);   return {4'b0111, 3'(s), 3'(b), 6'(off)}; endfunction
  function automatic word_t br(int nzp, int off);         return {4'b0000, 3'(nzp), 9'(off)}; endfunction
  function automatic word_t jmp(int b, int off);          return {4'b1100, 3'b000, 3'(b), 6'(off)}; endfunction
  function automatic word_t jsr(int off);                 return {4'b0100, 1'b1, 11'(off)}; endfunction
  function automatic word_t jsrr(int b, int off);         return {4'b0100, 3'b000, 3'(b), 6'(off)}; endfunction
  function automatic word_t trap(int v);                  return {4'b1111, 4'b0000, 8'(v)}; endfunction

  // The directed program: the function call and return of the LC-3 notes
  // (LD R1,-51 / LEA R7,1 / JMP R1,0 at 150..152 with M[100] = 300), the
  // TRAP x1B example (TRAP at x1234, vector table slot x001B = xA0D2), then
  // BR on each condition, loads, stores, JSR and JSRR, and a final BRnzp -1
  // loop at the returned address. Execution starts at x3000.
  function automatic word_t load_directed(lc3_model m);
    word_t a;
    foreach (m.mem[i]) m.mem[i] = '0;     // x0000 = BR never = no-op
    // x3000: reach the example at 150.
    m.mem[16'h3000] = ld(2, 2);           // R2 <- M[x3003] = 150
    m.mem[16'h3001] = jmp(2, 0);          // PC <- 150
    m.mem[16'h3003] = 16'd150;
    // Function call and return.
    m.mem[16'd100]  = 16'd300;
    m.mem[16'd150]  = ld(1, -51);         // R1 <- M[100] = 300
    m.mem[16'd151]  = lea(7, 1);          // R7 <- 153
    m.mem[16'd152]  = jmp(1, 0);          // PC <- 300
    m.mem[16'd300]  = add_i(0, 0, 5);
    m.mem[16'd301]  = jmp(7, 0);          // RET to 153
    m.mem[16'd153]  = ld(3, 1);           // R3 <- x1234
    m.mem[16'd154]  = jmp(3, 0);
    m.mem[16'd155]  = 16'h1234;
    // TRAP x1B.
    m.mem[16'h001B] = 16'hA0D2;
    m.mem[16'h1234] = trap('h1B);        // R7 <- x1235, PC <- xA0D2
    m.mem[16'hA0D2] = add_i(6, 6, 7);
    m.mem[16'hA0D3] = jmp(7, 0);          // RET to x1235
    // Branches on each condition code.
    a = 16'h1235;
    m.mem[a++] = and_i(4, 4, 0);          // Z
    m.mem[a++] = br('b010, 1);           // BRz taken
    m.mem[a++] = add_i(4, 4, 1);          //   skipped
    m.mem[a++] = br('b101, 1);           // BRnp not taken
    m.mem[a++] = add_i(4, 4, -1);         // N
    m.mem[a++] = br('b100, 1);           // BRn taken
    m.mem[a++] = not_r(4, 4);             //   skipped
    m.mem[a++] = add_i(5, 4, 3);          // R5 = 2, P
    m.mem[a++] = br('b001, 1);           // BRp taken
    m.mem[a++] = add_i(5, 5, 1);          //   skipped
    m.mem[a++] = br('b000, 1);           // BR (never): no-op
    m.mem[a++] = not_r(5, 5);             // R5 = ~2
    m.mem[a++] = and_r(5, 5, 6);          // R5 = ~2 & 7
    m.mem[a++] = add_r(5, 5, 0);          // + R0
    // Loads and stores.
    m.mem[a++] = st(5, 20);               // M[a+20] <- R5
    m.mem[a++] = lea(2, 30);              // R2 <- a + 30
    m.mem[a++] = str(4, 2, -3);           // M[R2-3] <- R4
    m.mem[a++] = ldr(1, 2, -3);           // R1 <- M[R2-3]
    m.mem[a++] = ld(3, 16);               // R3 <- the word ST wrote
    // JSR and JSRR.
    m.mem[a++] = jsr(2);                  // R7 <- a, PC <- a+2
    m.mem[a++] = br('b111, 4);           // after return: jump to JSRR part
    m.mem[a++] = 16'h0000;
    m.mem[a++] = add_i(0, 0, 1);          // subroutine
    m.mem[a++] = jmp(7, 0);               // RET
    m.mem[a++] = 16'h0000;
    m.mem[a++] = lea(2, 2);               // R2 <- subroutine 2
    m.mem[a++] = jsrr(2, 0);
    m.mem[a++] = br('b111, -1);          // final loop
    m.mem[a++] = not_r(0, 0);             // subroutine 2
    m.mem[a++] = jmp(7, 0);
    return a - 3;                         // address of the final loop
  endfunction

endpackage
