// lc3_bus: the LC-3 global bus.
//
// Four sources reach the 16-bit bus through gates: GateMARMUX, GatePC,
// GateALU and GateMDR. In the drawing these are tri-state drivers; here the
// bus is a multiplexer selected by the gate signals, which carries zero when
// no gate is open. At most one gate may be open in a cycle, which an
// assertion checks. Combinational.
module lc3_bus
  import lc3_pkg::*;
(
  input  logic  gate_marmux,
  input  logic  gate_pc,
  input  logic  gate_alu,
  input  logic  gate_mdr,
  input  word_t marmux_out,
  input  word_t pc,
  input  word_t alu_out,
  input  word_t mdr,
  output word_t bus
);

  always_comb begin
    bus = '0;
    if (gate_marmux) bus = marmux_out;
    if (gate_pc)     bus = pc;
    if (gate_alu)    bus = alu_out;
    if (gate_mdr)    bus = mdr;
    a_one_driver: assert final ($countones({gate_marmux, gate_pc, gate_alu, gate_mdr}) <= 1);
  end

endmodule
