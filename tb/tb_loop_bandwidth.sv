// tb_loop_bandwidth: measures the closed-loop speed of one channel and how
// BW_Gain sets it.
//
// One mzi_channel drives the behavioural MZI, photodiode, front-end and ADC
// models. The channel is first locked to the minimum. Then, at a dithering
// period boundary, a fixed offset is added to the heater-0 DAC word seen by
// the MZI model: a step disturbance of the heater phase, as a thermal drift
// would cause. The loop must walk its heater-0 result back by the same amount.
// The testbench records the result once per period, takes the mean of the
// last 50 periods as the final value, and measures the time constant as the
// summed error over the step: a first-order loop that corrects a fraction k
// of the error each period gives tau = 1 + sum(e_i) / e_0 = 1 / k periods and
// a 0 dB bandwidth of 1/(2 pi tau T), with T = 132 clocks = 120 us the
// dithering period. The loop gain grows with the light in the MZI; the model
// is run with 1 mW at its input, the level the controller's loop-gain
// estimate (about 600 Hz) assumes.
//
// The controller gives each BW_Gain step twice the sample weight, so the loop
// gain doubles and tau halves. The testbench checks, for BW_Gain 8 to 11:
//  * the light returns to the minimum after the step;
//  * tau(b) / tau(b+1) lies between 1.5 and 2.7;
//  * the fastest setting reaches a bandwidth between 200 Hz and the dither
//    frequency (8.3 kHz).
// The dither amplitude (Dith_Sel 8) and the step size are this testbench's
// choices. The bandwidth also scales with the dither amplitude, the light
// level and the MZI model's curvature, which are model choices. +trace
// prints the first 40 recorded periods of each step.
module tb_loop_bandwidth;
  import pic_ctrl_pkg::*;

  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b1, adc_en = 1'b0;
  shared_cfg_t cfg;
  ch_cfg_t     ch_cfg;
  logic [GAIN_W-1:0] tia_gain;
  logic [N_SW-1:0]   tia_sw;
  logic              gi_rst, eoc;
  logic [ADC_W-1:0]  adc_data;
  logic [1:0][DAC_W-1:0] dac_word, plant_word;
  logic [DAC_W-1:0]  step_off = '0;
  real p_out, v_out;

  int checks = 0, failures = 0;

  localparam real P_IN   = 1.0e-3;
  localparam real T_DITH = 120.0e-6;   // 132 clocks at 1.1 MHz
  localparam int  STEP   = 40;         // heater-0 DAC word offset
  localparam int  N_REC  = 200;        // periods recorded after each step
  localparam int  BW_LO  = 8, BW_HI = 11;

  always #455 clk = ~clk;   // 1.1 MHz

  mzi_channel dut (.clk, .start, .loop_reset, .adc_data, .adc_eoc(eoc), .cfg, .ch_cfg,
                   .tia_gain, .tia_sw, .gi_rst, .dac_word);

  adc10a_model u_adc (.clk, .en(adc_en), .vin(v_out), .data(adc_data), .eoc);

  // The disturbance: the MZI sees heater 0 driven STEP codes off.
  assign plant_word[0] = dac_word[0] + step_off;
  assign plant_word[1] = dac_word[1];

  mzi_plant_model #(.P_A(P_IN / 2), .P_B(P_IN / 2)) u_plant (
    .dac_word(plant_word), .tia_gain, .p_out, .v_out);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Waits for the end of a dithering period and returns the heater-0 result
  // once the integrator has updated it.
  task automatic next_period(output int r);
    do @(posedge clk); while (!(dut.valid && dut.dith_over));
    repeat (3) @(posedge clk);
    r = int'(dut.g_branch[0].result);
  endtask

  task automatic run_periods(input int n);
    int r;
    repeat (n) next_period(r);
  endtask

  real p_avg;
  task automatic average_light();
    p_avg = 0.0;
    for (int i = 0; i < 1320; i++) begin
      @(posedge clk);
      p_avg += p_out;
    end
    p_avg /= 1320.0;
  endtask

  // Applies a step of the given sign and returns tau in periods.
  int rec [N_REC];
  task automatic measure_step(input int b, input int dir, output real tau);
    int r_before, r_end, e0;
    real sum_e;
    next_period(r_before);
    @(negedge clk) step_off = (dir > 0) ? DAC_W'(STEP) : '0;
    for (int i = 0; i < N_REC; i++) next_period(rec[i]);
    r_end = 0;
    for (int i = N_REC - 50; i < N_REC; i++) r_end += rec[i];
    r_end = r_end / 50;
    e0  = r_before - r_end;
    sum_e = 0.0;
    for (int i = 0; i < N_REC; i++) sum_e += real'(rec[i] - r_end);
    if ($test$plusargs("trace"))
      for (int i = 0; i < 40; i++) $display("bw %0d dir %0d period %0d: r0 %0d", b, dir, i, rec[i]);
    tau = 1.0 + sum_e / real'(e0 == 0 ? 1 : e0);
    check(e0 > 200 || e0 < -200, "the step moves the lock point");
    average_light();
    check(p_avg / P_IN < 1.0e-3, "light back at the minimum after the step (< -30 dB)");
    $display("BW_Gain %0d, step %s: result %0d -> %0d, tau = %0.2f periods, f_0dB ~ %0.0f Hz, p/p_in %e",
             b, dir > 0 ? "up" : "down", r_before, r_end, tau,
             1.0 / (6.283185 * tau * T_DITH), p_avg / P_IN);
  endtask

  real tau_up [BW_LO:BW_HI];
  real tau_dn [BW_LO:BW_HI];

  initial begin
    cfg.fb_sign   = 1'b0;                  // lock to the minimum
    cfg.ctrl_sqrt = 1'b1;
    cfg.sat_reset = 16'h4000;
    cfg.sat_th    = 5'd31;
    cfg.det_move  = 16'd64;
    cfg.bw_gain   = 4'd11;
    cfg.sample_th = {5'd28, 5'd4};
    ch_cfg.dith_sel = 4'd10;
    ch_cfg.dac[0] = '{write: 1'b0, dac_manual: '0};
    ch_cfg.dac[1] = '{write: 1'b0, dac_manual: '0};
    repeat (4) @(negedge clk);
    adc_en = 1'b1;
    start  = 1'b1;
    repeat (30) @(negedge clk);
    loop_reset = 1'b0;

    // Lock with a coarse dither, then settle with the measuring dither.
    run_periods(400);
    ch_cfg.dith_sel = 4'd8;
    run_periods(200);
    average_light();
    $display("locked: p/p_in = %e, dac %0d %0d", p_avg / P_IN, dac_word[0], dac_word[1]);
    check(p_avg / P_IN < 1.0e-3, "initial lock to the minimum (< -30 dB)");

    for (int b = BW_HI; b >= BW_LO; b--) begin
      @(negedge clk) cfg.bw_gain = 4'(b);
      run_periods(20);
      measure_step(b, 1, tau_up[b]);
      measure_step(b, -1, tau_dn[b]);
    end

    for (int b = BW_LO; b < BW_HI; b++) begin
      real ratio;
      ratio = (tau_up[b] + tau_dn[b]) / (tau_up[b + 1] + tau_dn[b + 1]);
      $display("tau(BW_Gain %0d) / tau(BW_Gain %0d) = %0.2f", b, b + 1, ratio);
      check(ratio > 1.5 && ratio < 2.7, "one BW_Gain step doubles the loop speed");
    end
    begin
      real f_hi;
      f_hi = 2.0 / (6.283185 * (tau_up[BW_HI] + tau_dn[BW_HI]) * T_DITH);
      check(f_hi > 200.0 && f_hi < 8300.0, "fastest bandwidth between 200 Hz and the dither frequency");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
