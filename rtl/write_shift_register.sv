// write_shift_register: serial-in parallel-out configuration register.
//
// The controller's parameters (thresholds, bandwidth, Det_Move, saturation
// settings, dither amplitudes, manual DAC words...) are loaded through two
// pads: bit_in carries the data and every rising edge of new_in shifts it in.
// new_in is the register's clock, since the data come from outside at their
// own pace. Bit q[0] receives bit_in, q[i] receives q[i-1]; to load a word the
// bit meant for q[W-1] is sent first.
//
// There is no reset: the register holds whatever was last shifted in. Width
// and structure follow the controller; field meaning is in pic_ctrl_pkg.
module write_shift_register #(
  parameter int unsigned W = 263
) (
  input  logic         new_in,
  input  logic         bit_in,
  output logic [W-1:0] q
);

  always_ff @(posedge new_in) q <= {q[W-2:0], bit_in};

endmodule
