// tb_lc3_regfile: random writes and reads of the register file, checked
// against a shadow array; also checks reset clears every register and that a
// write with LD.REG low changes nothing.
module tb_lc3_regfile;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_reg = 0;
  logic [2:0] dr = 0, sr1 = 0, sr2 = 0, dbg_sel = 0;
  word_t d_in = 0, sr1_out, sr2_out, dbg_out;
  word_t model [8];
  int checks = 0, failures = 0;

  lc3_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      model[i] = '0;
      sr1 = 3'(i); sr2 = 3'(7 - i); #1;
      checks++; if (sr1_out !== 16'h0 || sr2_out !== 16'h0) failures++;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ld_reg = ($urandom_range(0, 3) != 0);
      dr     = 3'($urandom);
      d_in   = 16'($urandom);
      sr1    = 3'($urandom);
      sr2    = 3'($urandom);
      dbg_sel = 3'($urandom);
      #1;
      // Read returns the old value before the edge.
      checks++; if (sr1_out !== model[sr1] || sr2_out !== model[sr2]) failures++;
      @(posedge clk);
      if (ld_reg) model[dr] = d_in;
      #1;
      checks++; if (dbg_out !== model[dbg_sel]) failures++;
      checks++; if (sr1_out !== model[sr1] || sr2_out !== model[sr2]) begin
        failures++;
        $display("mismatch sr1=%0d got %h exp %h / sr2=%0d got %h exp %h", sr1, sr1_out, model[sr1], sr2, sr2_out, model[sr2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
