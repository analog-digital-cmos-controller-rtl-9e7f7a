// tb_mzi_channel: closed-loop test of one controller channel driving the
// behavioural MZI, photodiode, front-end and ADC models.
//
// Sequence: with start low and loop_reset high the manual DAC words are
// written and the gain must sit at its maximum. Then the loop is closed and
// the channel must bring the light on the monitored output to its minimum,
// twice, the channel being restarted in between. The lock uses a large
// dither first and then a small one, as the residual light is set by the
// dither amplitude. A third run sets Feedback_Sign to lock to the maximum,
// where the dither becomes invisible near the top at the lower gains and
// Det_Move must act; the light must end above 95 % of the input.
// Along the way the testbench checks the timing the controller prescribes:
// 11 clocks per conversion, 12 accepted samples per dithering period, the two
// dither square waves toggling every 66 clocks and in quadrature, one
// gated-integrator reset per conversion. It counts gain steps up and down and
// Det_Move, and fails if one never happened. +trace prints the loop state.
module tb_mzi_channel;
  import pic_ctrl_pkg::*;

  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b1, adc_en = 1'b0;
  shared_cfg_t cfg;
  ch_cfg_t     ch_cfg;
  logic [GAIN_W-1:0] tia_gain;
  logic [N_SW-1:0]   tia_sw;
  logic              gi_rst, eoc;
  logic [ADC_W-1:0]  adc_data;
  logic [1:0][DAC_W-1:0] dac_word;
  real p_out, v_out;
  real theta0 = 0.0, phi0 = 0.0;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_det = 0;

  localparam real P_IN = 10.0e-6;

  always #455 clk = ~clk;   // 1.1 MHz

  mzi_channel dut (.clk, .start, .loop_reset, .adc_data, .adc_eoc(eoc), .cfg, .ch_cfg,
                   .tia_gain, .tia_sw, .gi_rst, .dac_word);

  adc10a_model u_adc (.clk, .en(adc_en), .vin(v_out), .data(adc_data), .eoc);

  mzi_plant_model #(.P_A(P_IN / 2), .P_B(P_IN / 2)) u_plant (
    .dac_word, .tia_gain, .p_out, .v_out);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- timing monitors ----
  logic [GAIN_W-1:0] gain_q;
  int clk_since_eoc = 0, valid_in_period = 0, gi_count = 0, eoc_count = 0;
  int since_mod0 = 0, since_mod1 = 0;
  logic [1:0] mod_q;
  logic mod_run = 1'b0;

  always @(posedge clk) begin
    gain_q <= tia_gain;
    if (start && tia_gain == gain_q + 1'b1) n_up++;
    if (start && tia_gain + 1'b1 == gain_q) n_down++;
    if (start && tia_gain != gain_q)
      check(tia_gain == gain_q + 1'b1 || tia_gain + 1'b1 == gain_q, "gain steps by one");

    if (eoc) begin
      eoc_count++;
      if (adc_en && eoc_count > 1) check(clk_since_eoc == CONV_CLKS, "11 clocks per conversion");
      clk_since_eoc = 1;
    end else clk_since_eoc++;
    if (gi_rst) gi_count++;

    // The first period after loop_reset falls may be partial: the sample
    // counter keeps running while the loop is open.
    if (!start || loop_reset) valid_in_period = -1000;
    else if (dut.valid) begin
      valid_in_period++;
      if (dut.dith_over) begin
        if (valid_in_period > 0) check(valid_in_period == N_SAMPLES, "12 samples per dithering period");
        valid_in_period = 0;
      end
    end

    mod_q <= dut.dith_mod;
    if (!dut.mod_start) begin
      mod_run = 1'b0;
    end else begin
      since_mod0++; since_mod1++;
      if (dut.dith_mod[0] != mod_q[0]) begin
        if (mod_run) check(since_mod0 == 66, "dither 0 half period 66 clocks");
        check(dut.dith_mod[1] == mod_q[1], "dither bits change one at a time");
        since_mod0 = 0;
        mod_run = 1'b1;
      end
      if (dut.dith_mod[1] != mod_q[1]) begin
        if (mod_run && since_mod0 != 0) check(since_mod0 == 33, "dither 1 lags dither 0 by 33 clocks");
        since_mod1 = 0;
      end
    end
  end

  always @(posedge clk)
    if (start && dut.g_branch[0].u_integrator.s1_valid && dut.g_branch[0].u_integrator.s1_over &&
        dut.g_branch[0].u_integrator.unchanged) n_det++;

  // gi_reset is a half-clock pulse; count it on its own edges.
  int gi_edges = 0;
  always @(posedge gi_rst) gi_edges++;

  // +trace prints the loop state every 10 dithering periods.
  initial if ($test$plusargs("trace")) forever begin
    repeat (1320) @(posedge clk);
    $display("%0t r0=%0d r1=%0d dac=%0d %0d p/p_in=%e gain=%0d sample=%0d", $time,
             dut.g_branch[0].result, dut.g_branch[1].result, dac_word[0], dac_word[1],
             p_out / P_IN, tia_gain, adc_data);
  end

  // ---- one locking run ----
  task automatic run_lock(input int periods, input string tag);
    real p_avg;
    int eoc0, gi0;
    start = 1'b0;
    loop_reset = 1'b1;
    repeat (5) @(posedge clk);
    check(tia_gain == GAIN_W'(GAIN_MAX), "gain at maximum while start is low");
    start = 1'b1;
    repeat (30) @(posedge clk);
    loop_reset = 1'b0;
    eoc0 = eoc_count;
    gi0  = gi_edges;
    ch_cfg.dith_sel = 4'd10;
    repeat (periods * 132) @(posedge clk);
    // Finish with a small dither, as a locked system runs: the residual
    // light is then set by the dither amplitude, not by the lock error.
    ch_cfg.dith_sel = 4'd6;
    repeat (periods * 132 / 2) @(posedge clk);
    // Average the monitored power over the last 10 periods.
    p_avg = 0.0;
    for (int i = 0; i < 1320; i++) begin
      @(posedge clk);
      p_avg += p_out;
    end
    p_avg /= 1320.0;
    $display("%s: p/p_in = %e (%0.1f dB), gain %0d, dac %0d %0d", tag, p_avg / P_IN,
             10.0 * $log10(p_avg / P_IN + 1e-30), tia_gain, dac_word[0], dac_word[1]);
    if (cfg.fb_sign) begin
      check(p_avg / P_IN > 0.95, {tag, ": locked to the maximum (> 95 %)"});
    end else begin
      check(p_avg / P_IN < 3.0e-4, {tag, ": locked to the minimum (< -35 dB)"});
    end
    check(gi_edges - gi0 == eoc_count - eoc0 || gi_edges - gi0 == eoc_count - eoc0 + 1,
          "one gated-integrator reset per conversion");
  endtask

  initial begin
    cfg.fb_sign   = 1'b0;                  // lock to the minimum
    cfg.ctrl_sqrt = 1'b1;
    cfg.sat_reset = 16'h4000;
    cfg.sat_th    = 5'd31;
    cfg.det_move  = 16'd64;
    cfg.bw_gain   = 4'd11;
    cfg.sample_th = {5'd28, 5'd4};
    ch_cfg.dith_sel = 4'd10;
    ch_cfg.dac[0] = '{write: 1'b1, dac_manual: 12'd1234};
    ch_cfg.dac[1] = '{write: 1'b1, dac_manual: 12'd3000};
    repeat (4) @(posedge clk);
    check(dac_word[0] == 12'd1234 && dac_word[1] == 12'd3000, "manual DAC words in reset");
    adc_en = 1'b1;

    run_lock(400, "first lock");
    run_lock(400, "relock");
    // Lock to the maximum: the stalls near the top are handled by Det_Move.
    // Starting from a higher Sat_Reset puts the nearest maximum well inside
    // the saturation window.
    cfg.fb_sign = 1'b1;
    cfg.sat_reset = 16'h6000;
    n_det = 0;
    run_lock(400, "maximum");
    check(n_det > 0, "Det_Move applied while locking to the maximum");
    $display("Det_Move applied %0d times", n_det);

    check(n_up > 0, "gain stepped up at least once");
    check(n_down > 0, "gain stepped down at least once");
    $display("gain up %0d, down %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
