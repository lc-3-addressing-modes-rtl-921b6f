// lc3_memory: LC-3 main memory with its address and data registers.
//
// MAR loads from the bus when LD.MAR is high. MDR loads when LD.MDR is high,
// from the memory when MEM.EN is high (a read) and from the bus otherwise
// (the data of a store). With MEM.EN high and R.W = 1 the word in MDR is
// written to M[MAR]. The memory answers an access with the ready signal R
// after LATENCY cycles; the controller holds its memory states until R is
// high, and the read or write takes effect at the edge that ends the cycle
// in which R is high. LATENCY = 1 gives R in the first cycle. Assertions
// check that MEM.EN, R.W and MAR stay steady until R.
//
// The array holds 2^ADDR_W words of 16 bits (the full LC-3 address space).
// It is read combinationally and written at the clock edge. Words x0000 to
// x00FF serve as the TRAP vector table. A separate host port (ext_*) lets a
// boot loader or test bench write and read the array directly; it is meant
// for use while the processor is held in reset and is this design's
// addition, as are the latency parameter and the read/ready timing.
module lc3_memory
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned LATENCY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  word_t             bus,
  input  logic              ld_mar,
  input  logic              ld_mdr,
  input  logic              mio_en,
  input  logic              r_w,
  output word_t             mar,
  output word_t             mdr,
  output logic              r,
  // host port
  input  logic              ext_we,
  input  logic [ADDR_W-1:0] ext_addr,
  input  word_t             ext_wdata,
  output word_t             ext_rdata
);

  word_t mem [2**ADDR_W];

  localparam int unsigned CNT_W = (LATENCY > 1) ? $clog2(LATENCY) : 1;
  logic [CNT_W-1:0] wait_cnt;
  logic [ADDR_W-1:0] addr;

  assign addr = mar[ADDR_W-1:0];
  assign r    = mio_en && (32'(wait_cnt) == LATENCY - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           wait_cnt <= '0;
    else if (!mio_en || r) wait_cnt <= '0;
    else                  wait_cnt <= wait_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ld_mar) mar <= bus;
      if (ld_mdr) mdr <= mio_en ? mem[addr] : bus;
    end
  end

  always_ff @(posedge clk) begin
    if (ext_we)                  mem[ext_addr] <= ext_wdata;
    else if (mio_en && r_w && r) mem[addr]     <= mdr;
  end

  assign ext_rdata = mem[ext_addr];

  // Handshake rules: once an access has started, MEM.EN, R.W and MAR hold
  // until R is high.
  a_hold_en:   assert property (@(posedge clk) disable iff (!rst_n) (mio_en && !r) |=> mio_en);
  a_hold_rw:   assert property (@(posedge clk) disable iff (!rst_n) (mio_en && !r) |=> $stable(r_w));
  a_hold_addr: assert property (@(posedge clk) disable iff (!rst_n) (mio_en && !r) |=> $stable(mar));

endmodule
