// feedback_sign: chooses whether the control loop of a heater locks the MZI
// output to a minimum or to a maximum.
//
// The demodulating bit handed to the integrator is the delayed modulation bit
// XNOR the sign setting. The integrator adds a sample when demod is 1 and
// subtracts it when demod is 0, and the dithering adder raises the heater
// drive when the modulation bit is 1. So with sign = 1 samples taken on the
// high half of the dither are added and the loop climbs to a maximum of the
// photodiode signal; with sign = 0 they are subtracted and it descends to a
// minimum. Combinational.
//
// The XNOR is the controller's; which sign value means "minimum" follows from
// the add/subtract conventions chosen in this design.
module feedback_sign (
  input  logic de_mod,
  input  logic sign,
  output logic demod
);

  assign demod = ~(de_mod ^ sign);

endmodule
