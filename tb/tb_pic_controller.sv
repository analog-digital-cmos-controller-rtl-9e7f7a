// tb_pic_controller: end-to-end test of the controller at its full size
// (seven channels, 263-bit write register, 259-bit read register) with a
// behavioural MZI, photodiode, front-end and ADC per channel.
//
// The configuration is shifted in serially, as a host would, and compared
// with the image sent. The run then goes through the operating phases of the
// controller:
//   1. start low, loop_reset high: gains at maximum, manual DAC words written;
//   2. loops closed with a coarse dither, then finer ones: channels 0-3 and 6
//      must reach the minimum of their monitored output; channel 4 is set so
//      that its minimum lies below the saturation window and must be reset
//      from the bottom; channel 5 gets a dither too small to see, so its
//      integrator stalls and Det_Move must push it up to the top threshold;
//   3. the read register is frozen and read out bit by bit and compared with
//      the channel state at the moment of freezing;
//   4. loop_reset high and a new configuration with the square root
//      bypassed; the loops run again in that mode.
// Every clock the DAC words are compared with a reference of the
// square-root / bypass mapping of the set point. Each mechanism (gain up,
// gain down, Det_Move, reset from the top and from the bottom, manual write,
// square root on and bypassed, readout, lock) is counted, and one that never
// happened counts as a failure. Runs with no parameter override on the top.
// The DAC reference is not checked while the write register is shifting,
// since the host changes the configuration asynchronously to the clock.
module tb_pic_controller;
  import pic_ctrl_pkg::*;

  localparam int unsigned NC = 7;
  localparam int unsigned WREG_W = SHARED_CFG_W + NC * CH_CFG_W;
  localparam int unsigned RREG_W = NC * MON_W;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b1, adc_en = 1'b0;
  logic new_in = 1'b0, bit_in = 1'b0, get_bit = 1'b0, read_bit = 1'b0, out_bit;
  logic [NC-1:0][ADC_W-1:0]   adc_data;
  logic [NC-1:0]              adc_eoc;
  logic [NC-1:0][GAIN_W-1:0]  tia_gain;
  logic [NC-1:0][N_SW-1:0]    tia_sw;
  logic [NC-1:0]              gi_reset;
  logic [NC-1:0][1:0][DAC_W-1:0] dac_word;
  real p_out [NC];
  real v_out [NC];

  int checks = 0, failures = 0;
  int n_gain_up = 0, n_gain_down = 0, n_det_move = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_manual = 0, n_sqrt = 0, n_bypass = 0, n_readout = 0, n_locked = 0;

  always #455 clk = ~clk;   // 1.1 MHz

  pic_controller dut (
    .clk, .start, .loop_reset, .adc_data, .adc_eoc, .new_in, .bit_in, .get_bit,
    .read_bit, .out_bit, .tia_gain, .tia_sw, .gi_reset, .dac_word
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- plant per channel ----
  function automatic real p_in(input int c);
    case (c)
      5:       return 200.0e-6;
      6:       return 40.0e-6;
      default: return 10.0e-6;
    endcase
  endfunction
  function automatic real theta0(input int c);
    case (c)
      1: return 0.3 * PI;
      2: return -0.1 * PI;
      3: return 0.9 * PI;
      4: return 0.35 * PI;
      6: return -0.2 * PI;
      default: return 0.0;
    endcase
  endfunction
  function automatic real phi0(input int c);
    case (c)
      1: return 0.5 * PI;
      2: return 0.5 * PI;
      3: return 1.5 * PI;
      6: return 0.25 * PI;
      default: return 0.0;
    endcase
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_plant
    mzi_plant_model #(.P_A(p_in(c) / 2), .P_B(p_in(c) / 2),
                      .THETA0(theta0(c)), .PHI0(phi0(c))) u_plant (
      .dac_word (dac_word[c]), .tia_gain (tia_gain[c]),
      .p_out    (p_out[c]),    .v_out    (v_out[c]));
    adc10a_model #(.PHASE(3 * c)) u_adc (
      .clk, .en(adc_en), .vin(v_out[c]), .data(adc_data[c]), .eoc(adc_eoc[c]));
  end

  // ---- configuration image and serial load ----
  shared_cfg_t         cfg_img;
  ch_cfg_t [NC-1:0]    ch_img;

  logic loading = 1'b0;   // the write register is being shifted
  int   quiet = 0;        // clocks since the last shift

  always @(posedge clk) quiet = loading ? 0 : quiet + 1;

  task automatic load_config();
    logic [WREG_W-1:0] img;
    img = {ch_img, cfg_img};
    loading = 1'b1;
    for (int i = WREG_W - 1; i >= 0; i--) begin   // last bit sent lands in bit 0
      bit_in = img[i];
      #300 new_in = 1'b1;
      #300 new_in = 1'b0;
    end
    #300;
    loading = 1'b0;
    check(dut.cfg == cfg_img, "shared configuration loaded");
    for (int c = 0; c < NC; c++) check(dut.ch_cfg[c] == ch_img[c], "channel configuration loaded");
  endtask

  // ---- reference of the DAC mapping ----
  function automatic logic [DAC_W-1:0] ref_dac(input logic [SETPOINT_W-1:0] sp, input logic sq);
    longint x, y;
    int n;
    if (!sq) return sp[SETPOINT_W-1:3];
    x = longint'(sp) * 64;
    if (x == 0) return '0;
    n = 0;
    while ((64'd1 << (2 * (n + 1))) <= x) n++;      // 4^n <= x < 4^(n+1)
    y = (x >> n) + (64'd1 << (n + 1));
    return DAC_W'(y);
  endfunction

  // ---- monitors per channel ----
  logic [NC-1:0][1:0][RESULT_W-1:0] res_mon;   // integrator outputs
  for (genvar c = 0; c < NC; c++) begin : g_mon
    assign res_mon[c][0] = dut.g_ch[c].u_ch.g_branch[0].result;
    assign res_mon[c][1] = dut.g_ch[c].u_ch.g_branch[1].result;
    logic [GAIN_W-1:0] gain_q;
    logic [1:0][SETPOINT_W-1:0] sp_q;
    logic lr_q, wr_q0, wr_q1, sq_q;
    always @(negedge clk) begin
      if (start) begin
        if (tia_gain[c] == gain_q + 1'b1) n_gain_up++;
        if (tia_gain[c] + 1'b1 == gain_q) n_gain_down++;
      end
      gain_q = tia_gain[c];
      // DAC word = mapping of the set point one clock earlier.
      if (adc_en && quiet > 2) begin
        for (int k = 0; k < 2; k++) begin
          if (lr_q && (k == 0 ? wr_q0 : wr_q1)) begin
            check(dac_word[c][k] == ch_img[c].dac[k].dac_manual, "manual DAC word");
            n_manual++;
          end else begin
            check(dac_word[c][k] == ref_dac(sp_q[k], sq_q), "DAC word = mapped set point");
            if (sq_q) n_sqrt++; else n_bypass++;
          end
        end
      end
      sp_q[0] = dut.g_ch[c].u_ch.g_branch[0].set_point;
      sp_q[1] = dut.g_ch[c].u_ch.g_branch[1].set_point;
      lr_q  = loop_reset;
      wr_q0 = dut.ch_cfg[c].dac[0].write;
      wr_q1 = dut.ch_cfg[c].dac[1].write;
      sq_q  = dut.cfg.ctrl_sqrt;
    end
    for (genvar k = 0; k < 2; k++) begin : g_br
      always @(posedge clk) begin
        if (start && dut.g_ch[c].u_ch.g_branch[k].u_integrator.s1_valid &&
            dut.g_ch[c].u_ch.g_branch[k].u_integrator.s1_over) begin
          if (dut.g_ch[c].u_ch.g_branch[k].u_integrator.unchanged) n_det_move++;
          if (dut.g_ch[c].u_ch.g_branch[k].u_integrator.sat_hi) n_sat_hi++;
          else if (dut.g_ch[c].u_ch.g_branch[k].u_integrator.sat_lo) n_sat_lo++;
        end
      end
    end
  end

  // ---- readout through the read register ----
  task automatic readout();
    logic [RREG_W-1:0] expect_v, got;
    @(negedge clk) get_bit = 1'b1;
    @(posedge clk);
    @(negedge clk);                 // state in effect at the last load
    for (int c = 0; c < NC; c++)
      expect_v[MON_W*c +: MON_W] = {dac_word[c][1], dac_word[c][0], tia_gain[c], adc_data[c]};
    repeat (4) @(negedge clk);
    for (int i = 0; i < RREG_W; i++) begin
      got[i] = out_bit;
      #1000 read_bit = 1'b1;
      #2000 read_bit = 1'b0;
      #2000;
    end
    get_bit = 1'b0;
    check(got == expect_v, "read register returns the frozen channel state");
    if (got == expect_v) n_readout++;
    else $display("readout got %h\n      expected %h", got, expect_v);
  endtask

  // +trace prints the integrator outputs and the light every 20 periods.
  initial if ($test$plusargs("trace")) forever begin
    run_periods(20);
    $write("%0t", $time);
    for (int c = 0; c < NC; c++) $write(" | %0d %0d %0.1e g%0d", res_mon[c][0], res_mon[c][1], p_out[c] / p_in(c), tia_gain[c]);
    $write("\n");
  end

  task automatic run_periods(input int n);
    repeat (n * N_SAMPLES * CONV_CLKS) @(negedge clk);
  endtask


  real p_acc [NC];

  initial begin
    cfg_img.fb_sign   = 1'b0;             // minimum
    cfg_img.ctrl_sqrt = 1'b1;
    cfg_img.sat_reset = 16'h1800;
    cfg_img.sat_th    = 5'd30;
    cfg_img.det_move  = 16'd600;
    cfg_img.bw_gain   = 4'd11;
    cfg_img.sample_th = {5'd28, 5'd4};
    for (int c = 0; c < NC; c++) begin
      ch_img[c].dith_sel = (c == 5) ? 4'd0 : 4'd10;
      ch_img[c].dac[0]   = '{write: 1'(c % 2), dac_manual: DAC_W'(100 * c + 7)};
      ch_img[c].dac[1]   = '{write: 1'b1,      dac_manual: DAC_W'(4000 - 300 * c)};
    end

    // 1. configuration with the system off
    load_config();
    @(negedge clk) adc_en = 1'b1;
    repeat (20) @(negedge clk);
    for (int c = 0; c < NC; c++) check(tia_gain[c] == GAIN_W'(GAIN_MAX), "gain at maximum before start");

    // 2. closed loop, coarse then fine dither
    @(negedge clk) start = 1'b1;
    repeat (30) @(negedge clk);
    loop_reset = 1'b0;
    run_periods(400);
    for (int sel = 8; sel >= 6; sel -= 2) begin
      @(negedge clk) loop_reset = 1'b1;
      for (int c = 0; c < NC; c++) if (c != 5) ch_img[c].dith_sel = 4'(sel);
      load_config();
      // Keep the loop open a few periods: while the register shifted, the
      // Write bits passed through transient ones and the DACs took random
      // words, so the gain must settle again before samples count.
      run_periods(8);
      @(negedge clk) loop_reset = 1'b0;
      run_periods(200);
    end
    foreach (p_acc[c]) p_acc[c] = 0.0;
    for (int i = 0; i < 1320; i++) begin
      @(posedge clk);
      foreach (p_acc[c]) p_acc[c] += p_out[c];
    end
    for (int c = 0; c < NC; c++) begin
      real rel;
      rel = p_acc[c] / 1320.0 / p_in(c);
      $display("channel %0d: p/p_in = %e (%0.1f dB), gain %0d, result %0d %0d", c, rel,
               10.0 * $log10(rel + 1e-30), tia_gain[c],
               res_mon[c][0], res_mon[c][1]);
      if (c <= 3 || c == 6) begin
        check(rel < 3.0e-4, "channel locked to its minimum (< -35 dB)");
        if (rel < 3.0e-4) n_locked++;
      end
    end

    // 3. readout
    readout();

    // 4. square root bypassed
    @(negedge clk) loop_reset = 1'b1;
    cfg_img.ctrl_sqrt = 1'b0;
    for (int c = 0; c < NC; c++) if (c != 5) ch_img[c].dith_sel = 4'd10;
    load_config();
    repeat (50) @(negedge clk);
    loop_reset = 1'b0;
    run_periods(60);

    $display("gain up %0d, gain down %0d, Det_Move %0d, reset from top %0d, from bottom %0d",
             n_gain_up, n_gain_down, n_det_move, n_sat_hi, n_sat_lo);
    $display("manual DAC %0d, square root %0d, bypass %0d, readouts %0d, locked %0d",
             n_manual, n_sqrt, n_bypass, n_readout, n_locked);
    check(n_gain_up > 0,   "gain stepped up");
    check(n_gain_down > 0, "gain stepped down");
    check(n_det_move > 0,  "Det_Move applied");
    check(n_sat_hi > 0,    "saturation reset from the top");
    check(n_sat_lo > 0,    "saturation reset from the bottom");
    check(n_manual > 0,    "manual DAC write");
    check(n_sqrt > 0,      "square root mapping used");
    check(n_bypass > 0,    "square root bypass used");
    check(n_readout > 0,   "read register read out");
    check(n_locked == 5,   "all lock channels locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
