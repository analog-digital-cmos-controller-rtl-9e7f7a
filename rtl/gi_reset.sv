// gi_reset: reset pulse for the gated integrator of the analog front-end.
//
// The capacitor of the gated integrator must be discharged once per ADC
// conversion, for the shortest time a single clock allows: half a clock
// period. A flip-flop clocked on the falling edge of clk keeps a copy of eoc
// delayed by half a period; analog_reset is high while eoc is already low
// but its delayed copy is still high, i.e. from the falling edge of eoc
// (which happens on a rising clock edge) to the next falling clock edge.
//
// Follows the controller's circuit: one falling-edge flip-flop plus gating,
// triggered by the falling edge of EoC. The standard-cell delay that follows
// it on the chip (about 10 ns) is not part of this module.
module gi_reset (
  input  logic clk,
  input  logic eoc,
  output logic analog_reset
);

  logic eoc_half;   // eoc delayed by half a clock period

  always_ff @(negedge clk) eoc_half <= eoc;

  assign analog_reset = eoc_half && !eoc;

endmodule
