// aes_clock_gate: the core's clock gate, a 2:1 multiplexer on the clock.
//
// clk = start_in ? clk_aes : 1. While start_in is low the whole core sees no
// rising edge and every register holds, so the core consumes no dynamic
// power. The multiplexer with a constant 1 on its idle input is the circuit
// the document draws. It is glitch-free only if start_in changes while
// clk_aes is high, i.e. when start_in comes from logic clocked on the rising
// edge of clk_aes. A latch-based integrated clock-gating cell from the
// target library would remove that rule; that substitution is left to the
// implementation flow.
module aes_clock_gate (
  input  logic clk_aes,
  input  logic start_in,
  output logic clk
);

  assign clk = start_in ? clk_aes : 1'b1;

endmodule
