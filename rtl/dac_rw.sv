// dac_rw: selects the word sent to a heater DAC.
//
// Normally the DAC follows the control loop (dac_loop). A user-defined word
// (dac_manual) replaces it only when the loop is open (loop_reset high) and
// write is high; it is not possible to force the DAC while the loop runs.
// When write is low again the output returns to dac_loop, which with the
// loop open is the last working point found by the loop.
//
// Interface: registered, one clock of latency. Follows the controller.
module dac_rw
  import pic_ctrl_pkg::*;
(
  input  logic              clk,
  input  logic              loop_reset,
  input  logic              write,
  input  logic [DAC_W-1:0]  dac_loop,
  input  logic [DAC_W-1:0]  dac_manual,
  output logic [DAC_W-1:0]  dac_word
);

  always_ff @(posedge clk)
    dac_word <= (loop_reset && write) ? dac_manual : dac_loop;

endmodule
