// tb_lc3_control: walks the controller through every opcode, with and without
// memory wait cycles and with BEN both ways, and checks the state sequence,
// the number of cycles per instruction and the main control signals of each
// state against tables written here from the LC-3 instruction definitions.
module tb_lc3_control;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ben = 0, r;
  word_t ir = 0;
  state_e state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int wait_cycles = 0, waited = 0;

  lc3_control dut (.*);

  always #5 clk = ~clk;

  // Memory ready: high after wait_cycles cycles of MEM.EN.
  always_ff @(posedge clk) waited <= (ctrl.mio_en && !r) ? waited + 1 : 0;
  assign r = ctrl.mio_en && (waited >= wait_cycles);

  typedef int unsigned path_t[$];

  function automatic path_t exec_path(input word_t i);
    case (i[15:12])
      4'b0001: return '{1};
      4'b0101: return '{5};
      4'b1001: return '{9};
      4'b1110: return '{14};
      4'b0010: return '{2, 25, 27};
      4'b0110: return '{6, 25, 27};
      4'b0011: return '{3, 23, 16};
      4'b0111: return '{7, 23, 16};
      4'b0000: return '{0};
      4'b1100: return '{12};
      4'b0100: return i[11] ? '{4, 21} : '{4, 20};
      4'b1111: return '{15, 28, 30};
      default: return '{};
    endcase
  endfunction

  // Expected {ld_mar, ld_mdr, ld_ir, ld_reg, ld_cc, ld_pc, gate_pc, gate_mdr,
  // gate_alu, gate_marmux, mio_en, r_w} of a state.
  function automatic logic [11:0] expect_sig(input int unsigned s, input logic b);
    case (s)
      18: return 12'b100001100000;
      33, 25: return 12'b010000000010;
      35: return 12'b001000010000;
      32: return 12'b000000000000;
      1, 5, 9: return 12'b000110001000;
      14: return 12'b000110000100;
      2, 6, 3, 7, 15: return 12'b100000000100;
      27: return 12'b000110010000;
      23: return 12'b010000001000;
      16: return 12'b000000000011;
      0: return {5'b0, b, 6'b0};
      12: return 12'b000001000000;
      4: return 12'b000000000000;
      20, 21: return 12'b000111100000;
      28: return 12'b010110100010;
      30: return 12'b000001010000;
      default: return 'x;
    endcase
  endfunction

  // Expected address path of the states that form an address:
  // {addr1mux, addr2mux, marmux used, marmux, pcmux used, pcmux}.
  function automatic bit addr_ok(input int unsigned st);
    case (st)
      0, 21:    return ctrl.addr1mux == ADDR1_PC && ctrl.pcmux == PCMUX_ADDR &&
                       ctrl.addr2mux == (st == 0 ? ADDR2_OFF9 : ADDR2_OFF11);
      12, 20:   return ctrl.addr1mux == ADDR1_BASE && ctrl.addr2mux == ADDR2_OFF6 &&
                       ctrl.pcmux == PCMUX_ADDR && ctrl.sr1mux == SR1_IR8;
      2, 3, 14: return ctrl.addr1mux == ADDR1_PC && ctrl.addr2mux == ADDR2_OFF9 && ctrl.marmux == MARMUX_ADDR;
      6, 7:     return ctrl.addr1mux == ADDR1_BASE && ctrl.addr2mux == ADDR2_OFF6 &&
                       ctrl.marmux == MARMUX_ADDR && ctrl.sr1mux == SR1_IR8;
      15:       return ctrl.marmux == MARMUX_ZEXT;
      18:       return ctrl.pcmux == PCMUX_INC;
      30:       return ctrl.pcmux == PCMUX_BUS;
      1, 5, 9, 27: return ctrl.drmux == DR_IR11 && (st == 27 || ctrl.sr1mux == SR1_IR8);
      default:  return 1'b1;
    endcase
  endfunction

  function automatic logic [11:0] got_sig();
    return {ctrl.ld_mar, ctrl.ld_mdr, ctrl.ld_ir, ctrl.ld_reg, ctrl.ld_cc, ctrl.ld_pc,
            ctrl.gate_pc, ctrl.gate_mdr, ctrl.gate_alu, ctrl.gate_marmux, ctrl.mio_en, ctrl.r_w};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_t p, full;
    int cycles, expected_cycles, mem_states;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (state != S_FETCH) failures++;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      word_t next_ir;
      next_ir = 16'($urandom);
      if (n < 32) next_ir[15:12] = 4'(n % 16);
      if (n >= 16 && n < 32) next_ir[11] = ~next_ir[11];
      wait_cycles = (n % 3 == 0) ? 0 : $urandom_range(0, 3);
      ben = 1'($urandom);
      // The IR loads in state 35; present the next instruction from then on.
      full = '{18, 33, 35, 32};
      p = exec_path(next_ir);
      foreach (p[k]) full.push_back(p[k]);
      mem_states = 1;
      foreach (p[k]) if (p[k] inside {25, 16, 28}) mem_states++;
      expected_cycles = full.size() + mem_states * wait_cycles;
      cycles = 0;
      foreach (full[k]) begin
        forever begin
          logic stall;
          if (full[k] == 32) ir = next_ir;
          #1;
          checks++;
          if (int'(state) != int'(full[k])) begin
            failures++;
            $display("ir=%h step %0d state %0d exp %0d", next_ir, k, state, full[k]);
          end
          checks++;
          if (got_sig() !== expect_sig(full[k], ben)) begin
            failures++;
            $display("ir=%h state %0d signals %b exp %b", next_ir, state, got_sig(), expect_sig(full[k], ben));
          end
          checks++;
          if (!addr_ok(full[k])) begin
            failures++;
            $display("ir=%h state %0d: wrong mux selects", next_ir, state);
          end
          if (state == S_TRAPMEM || state == S_JSR11 || state == S_JSRR) begin
            checks++; if (ctrl.drmux != DR_R7) failures++;
          end
          if (state == S_TRAP) begin
            checks++; if (ctrl.marmux != MARMUX_ZEXT) failures++;
          end
          if (state == S_STMDR) begin
            checks++; if (ctrl.sr1mux != SR1_IR11 || ctrl.aluk != ALU_PASSA) failures++;
          end
          if (state == S_ADD || state == S_AND || state == S_NOT) begin
            checks++;
            if (ctrl.aluk != (state == S_ADD ? ALU_ADD : state == S_AND ? ALU_AND : ALU_NOT)) failures++;
          end
          cycles++;
          stall = ctrl.mio_en && !r;
          @(negedge clk);
          if (!stall) break;
        end
      end
      #1;
      checks++;
      if (state != S_FETCH || cycles != expected_cycles) begin
        failures++;
        $display("ir=%h took %0d cycles, expected %0d, now in %0d", next_ir, cycles, expected_cycles, state);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
