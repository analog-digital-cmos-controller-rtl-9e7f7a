// dith_add: superimposes the dithering step on the working point of a heater.
//
// The zero-to-peak dither amplitude is Dith_Amp = 2^dith_sel (dith_sel 0..15,
// so each step doubles it). When dith_mod is 1 the amplitude is added to the
// integrator's 16-bit result, when it is 0 it is subtracted; the sum is
// clipped to the 16-bit range and its upper 15 bits form set_point. Dropping
// the LSB makes the smallest setting (Dith_Amp = 1) move set_point by exactly
// one LSB from one half of the dither to the other. While loop_reset is high
// no dither is applied and set_point is simply result[15:1].
//
// Interface: registered, one clock of latency from result/dith_mod to
// set_point. The one-hot amplitude, the 16-to-15-bit output and the Reset
// behaviour are the controller's; clipping instead of wrapping is this
// design's.
module dith_add
  import pic_ctrl_pkg::*;
(
  input  logic                    clk,
  input  logic                    loop_reset,
  input  logic [RESULT_W-1:0]     result,
  input  logic                    dith_mod,
  input  logic [DITH_SEL_W-1:0]   dith_sel,
  output logic [SETPOINT_W-1:0]   set_point
);

  logic [RESULT_W-1:0] dith_amp;
  logic [RESULT_W:0]   sum;        // one extra bit for carry / borrow
  logic [RESULT_W-1:0] clipped;    // bit 0 is dropped: set_point is the upper 15 bits

  always_comb begin
    dith_amp = RESULT_W'(1) << dith_sel;
    if (loop_reset) begin
      sum     = {1'b0, result};
      clipped = result;
    end else if (dith_mod) begin
      sum     = {1'b0, result} + {1'b0, dith_amp};
      clipped = sum[RESULT_W] ? '1 : sum[RESULT_W-1:0];
    end else begin
      sum     = {1'b0, result} - {1'b0, dith_amp};
      clipped = sum[RESULT_W] ? '0 : sum[RESULT_W-1:0];
    end
  end

  always_ff @(posedge clk) set_point <= clipped[RESULT_W-1:1];

endmodule
