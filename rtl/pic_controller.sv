// pic_controller: mixed-signal controller for a mesh of Mach-Zehnder
// interferometers (MZI), digital part. Top level.
//
// Each MZI of the mesh has a photodiode on one output and two thermal
// heaters. N_CH identical channels (mzi_channel) lock their MZI to a minimum
// or maximum of the photodiode signal by square-wave dithering of the two
// heaters in quadrature, demodulation of the ADC samples and integration. The
// ADCs, the analog front-ends and the heater DACs are outside this module;
// their digital signals are ports.
//
// Configuration enters through a 263-bit serial write register (bit_in,
// shifted on each rising edge of new_in). Its layout, bit 0 first:
//   [52:0]                 shared_cfg_t: Sample th., BW_Gain, Det_Move,
//                          Sat_th, Sat_Reset, Ctrl_sqrt, Feedback_Sign
//   [53+30c +: 30]         ch_cfg_t of channel c: Dith_Sel, then for each
//                          DAC k the 12-bit DAC_Manual and the Write bit
// The state of every channel can be read through a 259-bit read register:
// while get_bit is low it follows the channels; while get_bit is high it is
// frozen and each rising edge of read_bit presents the next bit on out_bit.
// Channel c occupies bits [37c +: 37]: ADC sample, TIA gain, DAC words of
// branch 0 and branch 1 (mon_t).
//
// start turns the system on (integrators initialised, gain at maximum while
// low); loop_reset high opens all control loops (no integration, no dither)
// and allows the manual DAC words to be written.
//
// Channel count and register sizes are the controller's (7 MZIs, 263 and 259
// bits); the field order in both registers is this design's.
module pic_controller
  import pic_ctrl_pkg::*;
#(
  parameter int unsigned N_CH = 7
) (
  input  logic                         clk,
  input  logic                         start,
  input  logic                         loop_reset,
  input  logic [N_CH-1:0][ADC_W-1:0]   adc_data,
  input  logic [N_CH-1:0]              adc_eoc,
  input  logic                         new_in,
  input  logic                         bit_in,
  input  logic                         get_bit,
  input  logic                         read_bit,
  output logic                         out_bit,
  output logic [N_CH-1:0][GAIN_W-1:0]  tia_gain,
  output logic [N_CH-1:0][N_SW-1:0]    tia_sw,
  output logic [N_CH-1:0]              gi_reset,
  output logic [N_CH-1:0][1:0][DAC_W-1:0] dac_word
);

  localparam int unsigned WREG_W = SHARED_CFG_W + N_CH * CH_CFG_W;   // 263 for 7
  localparam int unsigned RREG_W = N_CH * MON_W;                     // 259 for 7

  logic [WREG_W-1:0] wreg;
  shared_cfg_t       cfg;
  ch_cfg_t [N_CH-1:0] ch_cfg;
  mon_t    [N_CH-1:0] mon;

  write_shift_register #(.W(WREG_W)) u_wreg (.new_in, .bit_in, .q(wreg));

  assign cfg    = wreg[SHARED_CFG_W-1:0];
  assign ch_cfg = wreg[WREG_W-1:SHARED_CFG_W];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    mzi_channel u_ch (
      .clk, .start, .loop_reset,
      .adc_data (adc_data[c]),
      .adc_eoc  (adc_eoc[c]),
      .cfg,
      .ch_cfg   (ch_cfg[c]),
      .tia_gain (tia_gain[c]),
      .tia_sw   (tia_sw[c]),
      .gi_rst   (gi_reset[c]),
      .dac_word (dac_word[c])
    );
    assign mon[c] = '{dac1: dac_word[c][1], dac0: dac_word[c][0],
                      tia_gain: tia_gain[c], adc_sample: adc_data[c]};
  end

  read_shift_register #(.W(RREG_W)) u_rreg (
    .clk, .d(mon), .get_bit, .read_bit, .out_bit
  );

endmodule
