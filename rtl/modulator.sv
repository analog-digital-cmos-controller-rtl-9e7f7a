// modulator: generates the two dithering square waves, Dith_Mod(1) and
// Dith_Mod(0), in phase quadrature.
//
// At each tick of the clock divider the 2-bit state steps through the
// Gray sequence (Dith_Mod(1), Dith_Mod(0)) = 00 -> 10 -> 11 -> 01 -> 00, so
// each bit is a square wave of four ticks (120 us, 12 ADC samples) and
// Dith_Mod(0) lags Dith_Mod(1) by one tick (a quarter period). Each heater of
// the MZI is dithered by one bit; the two modulations are orthogonal, so each
// integrator sees only its own.
//
// While en is low the state rests at 01, so the first tick gives 00.
// Interface: dith_mod is registered and changes on the clock edge where tick
// is high. The sequence is the controller's; the resting state is this
// design's.
module modulator (
  input  logic       clk,
  input  logic       en,
  input  logic       tick,
  output logic [1:0] dith_mod
);

  always_ff @(posedge clk) begin
    if (!en)       dith_mod <= 2'b01;
    else if (tick) dith_mod <= {~dith_mod[0], dith_mod[1]};
  end

endmodule
