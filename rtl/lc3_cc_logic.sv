// lc3_cc_logic: the condition codes N, Z, P (PSR.CC).
//
// LOGIC looks at the value on the bus: N = BUS[15], Z = NOR of all bus bits,
// P = NOT N AND NOT Z. The three flip-flops load at the rising clock edge when
// LD.CC is high; the controller raises LD.CC together with LD.REG, so every
// register write sets the codes. Exactly one of N, Z, P is set at any time.
// After reset Z is set (this design's choice).
module lc3_cc_logic
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_cc,
  input  word_t      bus,
  output logic [2:0] nzp     // {N, Z, P}
);

  logic n, z, p;

  always_comb begin
    n = bus[WORD_W-1];
    z = ~|bus;
    p = ~n & ~z;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     nzp <= 3'b010;
    else if (ld_cc) nzp <= {n, z, p};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(nzp));

endmodule
