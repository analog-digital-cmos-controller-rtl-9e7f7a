// integrator: digital demodulator and integral controller of one heater.
//
// Each valid ADC sample of a dithering period is added to (demod = 1) or
// subtracted from (demod = 0) a 34-bit accumulator, S_Result. The word is
// OVF_W overflow bits, a CORE_W-bit field and GUARD_W guard bits:
//
//   [33:31] overflow   [30:3] 28-bit field   [2:0] guard
//
// A sample converted with front-end gain code g (0 = lowest gain) and
// bandwidth setting b is added at bit 2*(GAIN_MAX-g) + b: each gain step is
// a factor 4, so a sample taken one step higher in gain weighs two bits less,
// and each BW_Gain step doubles the loop gain. b is clamped so the sample
// stays inside the field.
//
// When the last sample of the period (dith_over) has been summed:
//  * if the word did not change over the whole period and the gain is not the
//    highest, Det_Move is added at the Result position, to walk out of flat
//    regions where the dither is below one ADC step;
//  * if the 5 MSBs of the field are at or above sat_th, or it overflowed,
//    Result is reset to ~sat_reset; if they are at or below ~sat_th, or it
//    went negative, Result is reset to sat_reset;
//  * result, the 16 MSBs of the field (bits [30:15]), is updated.
// While start is low the word is initialised to sat_reset at the Result
// position.
//
// Timing: a sample presented with valid_in is registered at the next clock
// edge; demod is sampled and the sum made at the edge after, and result
// changes at that same edge for the last sample of a period.
//
// Follows the controller's description for the widths, weighting, Det_Move
// and saturation reset; the inclusive saturation comparisons, the BW_Gain
// clamp and the initial value are this design's choices.
module integrator
  import pic_ctrl_pkg::*;
#(
  parameter int unsigned CORE_W  = 28,
  parameter int unsigned OVF_W   = 3,
  parameter int unsigned GUARD_W = 3
) (
  input  logic                 clk,
  input  logic                 start,
  input  logic                 demod,
  input  logic [ADC_W-1:0]     in_sample,
  input  logic                 dith_over,
  input  logic [GAIN_W-1:0]    tia_gain,
  input  logic                 valid_in,
  input  logic [BW_W-1:0]      bw_gain,
  input  logic [RESULT_W-1:0]  det_move,
  input  logic [SAT_TH_W-1:0]  sat_th,
  input  logic [RESULT_W-1:0]  sat_reset,
  output logic [RESULT_W-1:0]  result
);

  localparam int unsigned W        = OVF_W + CORE_W + GUARD_W;   // 34
  localparam int unsigned TOP      = CORE_W + GUARD_W - 1;       // field MSB, 30
  localparam int unsigned BW_CLAMP = CORE_W + GUARD_W - ADC_W - 2 * GAIN_MAX;  // 11

  typedef logic signed [W-1:0] word_t;

  // Stage 1: sample registered.
  logic              s1_valid, s1_over;
  logic [ADC_W-1:0]  s1_sample;
  logic [4:0]        s1_shift;
  logic              s1_gain_max;

  // Accumulator and its value at the start of the current period.
  word_t acc, acc_start;

  logic [4:0] shift_in;
  always_comb begin
    logic [4:0] bw;
    bw       = (bw_gain > BW_W'(BW_CLAMP)) ? 5'(BW_CLAMP) : 5'(bw_gain);
    shift_in = 5'(2 * GAIN_MAX) - 5'({tia_gain, 1'b0}) + bw;
  end

  function automatic word_t at_result(input logic [RESULT_W-1:0] v);
    word_t w;
    w = '0;
    w[TOP -: RESULT_W] = v;
    return w;
  endfunction

  word_t addend, summed, moved, next_acc;
  logic  unchanged, ovf_hi, ovf_lo, sat_hi, sat_lo;
  logic [SAT_TH_W-1:0] msb5;

  always_comb begin
    addend    = word_t'({{(W-ADC_W){1'b0}}, s1_sample}) <<< s1_shift;
    summed    = demod ? acc + addend : acc - addend;
    unchanged = (summed == acc_start) && !s1_gain_max;
    moved     = unchanged ? summed + at_result(det_move) : summed;
    ovf_lo    = moved[W-1];
    ovf_hi    = !moved[W-1] && (moved[W-2 -: OVF_W-1] != '0);
    msb5      = moved[TOP -: SAT_TH_W];
    sat_hi    = ovf_hi || (!ovf_lo && msb5 >= sat_th);
    sat_lo    = ovf_lo || (!sat_hi && msb5 <= ~sat_th);
    if (sat_hi)      next_acc = at_result(~sat_reset);
    else if (sat_lo) next_acc = at_result(sat_reset);
    else             next_acc = moved;
  end

  always_ff @(posedge clk) begin
    if (!start) begin
      s1_valid  <= 1'b0;
      s1_over   <= 1'b0;
      s1_sample <= '0;
      s1_shift  <= '0;
      s1_gain_max <= 1'b0;
      acc       <= at_result(sat_reset);
      acc_start <= at_result(sat_reset);
      result    <= sat_reset;
    end else begin
      s1_valid <= valid_in;
      s1_over  <= valid_in && dith_over;
      if (valid_in) begin
        s1_sample   <= in_sample;
        s1_shift    <= shift_in;
        s1_gain_max <= (tia_gain == GAIN_W'(GAIN_MAX));
      end
      if (s1_valid) begin
        if (s1_over) begin
          acc       <= next_acc;
          acc_start <= next_acc;
          result    <= next_acc[TOP -: RESULT_W];
        end else begin
          acc <= summed;
        end
      end
    end
  end

  // Between periods the word always sits inside the field.
  a_in_field: assert property (@(posedge clk) disable iff (!start)
                               acc_start[W-1 -: OVF_W] == '0);

endmodule
