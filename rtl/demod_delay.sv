// demod_delay: delays the dithering modulation by two ADC conversions to
// build the demodulation signal.
//
// From the moment a dither step is applied to the heater to the moment the
// sample it produced is summed in the integrator about 27 clocks pass; the
// demodulating bit must change after the previous sample was summed and
// before the next one arrives. Two flip-flop stages clocked by the ADC's end
// of conversion (one conversion = 11 clocks) give the required 22-clock
// delay without a counter. Each of the W modulation bits has its own pair of
// stages.
//
// Interface: eoc is used as the clock; dith_demod is dith_mod as it was two
// eoc rising edges ago. Follows the controller's circuit; delaying both bits
// in one module is this design's packaging.
module demod_delay #(
  parameter int unsigned W      = 2,
  parameter int unsigned STAGES = 2
) (
  input  logic         eoc,
  input  logic [W-1:0] dith_mod,
  output logic [W-1:0] dith_demod
);

  logic [W-1:0] stage [STAGES];

  always_ff @(posedge eoc) begin
    stage[0] <= dith_mod;
    for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
  end

  assign dith_demod = stage[STAGES-1];

endmodule
