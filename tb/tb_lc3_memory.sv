// tb_lc3_memory: two memories, one with LATENCY = 1 and one with LATENCY = 3,
// driven by the same controls. Checks MAR and MDR loading, reads and writes
// through MAR/MDR against a shadow array filled by the host port, the cycle
// in which R rises (first cycle for LATENCY 1, third for LATENCY 3), that a
// write lands only in the cycle R is high, and host port reads.
module tb_lc3_memory;
  import lc3_pkg::*;
  logic clk = 0, rst_n = 0, ld_mar = 0, ld_mdr = 0, mio_en = 0, r_w = 0;
  logic ext_we = 0;
  logic [15:0] ext_addr = 0;
  word_t bus = 0, ext_wdata = 0;
  word_t mar1, mdr1, mar3, mdr3, ext_rdata1, ext_rdata3;
  logic r1, r3;
  word_t model [word_t];
  int checks = 0, failures = 0;

  lc3_memory #(.LATENCY(1)) u1 (.clk, .rst_n, .bus, .ld_mar, .ld_mdr, .mio_en, .r_w,
    .mar(mar1), .mdr(mdr1), .r(r1), .ext_we, .ext_addr, .ext_wdata, .ext_rdata(ext_rdata1));
  lc3_memory #(.LATENCY(3)) u3 (.clk, .rst_n, .bus, .ld_mar, .ld_mdr, .mio_en, .r_w,
    .mar(mar3), .mdr(mdr3), .r(r3), .ext_we, .ext_addr, .ext_wdata, .ext_rdata(ext_rdata3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input word_t a, input word_t d);
    @(negedge clk); ext_we = 1; ext_addr = a; ext_wdata = d;
    @(posedge clk); #1 ext_we = 0;
    model[a] = d;
  endtask

  task automatic set_mar(input word_t a);
    @(negedge clk); bus = a; ld_mar = 1;
    @(posedge clk); #1 ld_mar = 0;
    check(mar1 == a && mar3 == a, "MAR load");
  endtask

  // Hold MEM.EN for three cycles, checking R each cycle.
  task automatic access(input bit write);
    @(negedge clk); mio_en = 1; r_w = write; ld_mdr = !write;
    for (int c = 1; c <= 3; c++) begin
      #1;
      check(r1 == 1'b1, "R with LATENCY 1");
      check(r3 == (c == 3), $sformatf("R with LATENCY 3 in cycle %0d", c));
      if (write && c < 3) begin
        ext_addr = mar3; #1;
        check(ext_rdata3 != mdr3 || model[mar3] == mdr3, "no early write");
      end
      @(negedge clk);
    end
    mio_en = 0; r_w = 0; ld_mdr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, d;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Trap vector table slot x001B holds xA0D2.
    host_write(16'h001B, 16'hA0D2);
    for (int i = 0; i < 20; i++) host_write(16'($urandom), 16'($urandom));
    // Reads through MAR/MDR.
    foreach (model[k]) begin
      set_mar(k);
      access(0);
      check(mdr1 == model[k] && mdr3 == model[k], $sformatf("read %h", k));
    end
    // Writes: MDR <- bus, then M[MAR] <- MDR.
    for (int i = 0; i < 20; i++) begin
      a = 16'($urandom); d = 16'($urandom);
      set_mar(a);
      @(negedge clk); bus = d; ld_mdr = 1;
      @(posedge clk); #1 ld_mdr = 0;
      check(mdr1 == d && mdr3 == d, "MDR load from bus");
      if (!model.exists(a)) begin
        // make the old contents known and different
        ext_addr = a; #1; model[a] = ext_rdata3;
        if (model[a] == d) begin host_write(a, ~d); end
      end
      access(1);
      model[a] = d;
      ext_addr = a; #1;
      check(ext_rdata1 == d && ext_rdata3 == d, $sformatf("write %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
