// mzi_channel: the complete digital control channel of one Mach-Zehnder
// interferometer with two heaters and one photodiode.
//
// Signal flow. The ADC converts the gated-integrator output every 11 clocks
// and pulses adc_eoc. gain_adjust steps the front-end gain when the first
// sample of a dithering period is out of range (tia_switch_decode turns the
// code into switch commands) and feeds the accepted samples to two identical
// heater branches. gi_reset discharges the gated integrator after each
// conversion. reset_delay, clk_div and modulator produce the two dither
// square waves in quadrature, started in step with the ADC when the loop is
// switched on; demod_delay delays them by two conversions for demodulation.
// Branch k (k = 0, 1) is dithered by Dith_Mod(k) and demodulated by the
// delayed Dith_Mod(k) through feedback_sign:
//
//   integrator -> dith_add -> square_root -> dac_rw -> dac_word[k]
//
// Timing: a dither step reaches the DAC two clocks after the modulator
// changes (dith_add and dac_rw registers). The integrator output, and so the
// heater working point, moves once per dithering period (12 samples, 132
// clocks, 120 us at 1.1 MHz).
//
// The divided clock div_clk is kept as a signal for observation only: the
// modulator is paced by the divider's one-clock tick in the clk domain.
//
// The structure is the controller's. The packaging of the timing blocks and
// per-branch feedback_sign instances are this design's.
module mzi_channel
  import pic_ctrl_pkg::*;
(
  input  logic                  clk,
  input  logic                  start,
  input  logic                  loop_reset,
  input  logic [ADC_W-1:0]      adc_data,
  input  logic                  adc_eoc,
  input  shared_cfg_t           cfg,
  input  ch_cfg_t               ch_cfg,
  output logic [GAIN_W-1:0]     tia_gain,
  output logic [N_SW-1:0]       tia_sw,
  output logic                  gi_rst,
  output logic [1:0][DAC_W-1:0] dac_word
);

  logic              dith_over, valid;
  logic [ADC_W-1:0]  sample;
  logic              mod_start, tick, div_clk;
  logic [1:0]        dith_mod, dith_demod;

  gain_adjust u_gain_adjust (
    .clk, .start, .loop_reset,
    .adc_sample (adc_data),
    .eoc        (adc_eoc),
    .sample_th  (cfg.sample_th),
    .dith_over,
    .valid_out  (valid),
    .out_sample (sample),
    .tia_gain
  );

  tia_switch_decode u_sw (.tia_gain, .sw(tia_sw));

  gi_reset u_gi_reset (.clk, .eoc(adc_eoc), .analog_reset(gi_rst));

  reset_delay u_reset_delay (.clk, .start, .loop_reset, .eoc(adc_eoc), .mod_start);

  clk_div u_clk_div (.clk, .en(mod_start), .div_clk, .tick);

  modulator u_modulator (.clk, .en(mod_start), .tick, .dith_mod);

  demod_delay u_demod_delay (.eoc(adc_eoc), .dith_mod, .dith_demod);

  for (genvar k = 0; k < 2; k++) begin : g_branch
    logic                  demod;
    logic [RESULT_W-1:0]   result;
    logic [SETPOINT_W-1:0] set_point;
    logic [DAC_W-1:0]      dac_loop;

    feedback_sign u_fb (.de_mod(dith_demod[k]), .sign(cfg.fb_sign), .demod);

    integrator u_integrator (
      .clk, .start, .demod,
      .in_sample (sample),
      .dith_over,
      .tia_gain,
      .valid_in  (valid),
      .bw_gain   (cfg.bw_gain),
      .det_move  (cfg.det_move),
      .sat_th    (cfg.sat_th),
      .sat_reset (cfg.sat_reset),
      .result
    );

    dith_add u_dith_add (
      .clk, .loop_reset, .result,
      .dith_mod (dith_mod[k]),
      .dith_sel (ch_cfg.dith_sel),
      .set_point
    );

    square_root u_sqrt (.set_point, .ctrl_sqrt(cfg.ctrl_sqrt), .dac_loop);

    dac_rw u_dac_rw (
      .clk, .loop_reset,
      .write      (ch_cfg.dac[k].write),
      .dac_loop,
      .dac_manual (ch_cfg.dac[k].dac_manual),
      .dac_word   (dac_word[k])
    );
  end

endmodule
