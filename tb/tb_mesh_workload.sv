// tb_mesh_workload: the controller at its default size steering an 8-input
// diagonal MZI mesh (seven cascaded stages, one channel each) so that all the
// light of eight coherent inputs leaves through a single output.
//
// Stage k combines the light passed on by stage k-1 with input k+1 and has
// its photodiode on the drop port; locking every drop port to its minimum
// sends the light down the diagonal. The inputs have equal powers and
// arbitrary phases, the heaters arbitrary offsets, so the stages must find
// both the splitting ratio and the relative phase. Every stage's input power
// depends on the stages before it, so the seven loops interact.
//
// The configuration is shifted in serially. Sat_Reset is set about 2 pi of
// heater phase above the lower saturation threshold, the setting the
// saturation reset is meant for. The loops run with a coarse dither, then
// finer ones (Dith_Sel 10, 8, 6). At the end the light on every drop port
// must be below -30 dB of the total input and the final output must carry at
// least 99 % of it. Gain steps are counted; none must be missing.
module tb_mesh_workload;
  import pic_ctrl_pkg::*;

  localparam int unsigned NC = 7;
  localparam int unsigned WREG_W = SHARED_CFG_W + NC * CH_CFG_W;
  localparam real PI = 3.14159265358979;
  localparam real P_EACH = 5.0e-6;           // W per input
  localparam real P_TOTAL = P_EACH * (NC + 1);

  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b1, adc_en = 1'b0;
  logic new_in = 1'b0, bit_in = 1'b0, out_bit;
  logic [NC-1:0][ADC_W-1:0]   adc_data;
  logic [NC-1:0]              adc_eoc;
  logic [NC-1:0][GAIN_W-1:0]  tia_gain;
  logic [NC-1:0][N_SW-1:0]    tia_sw;
  logic [NC-1:0]              gi_reset;
  logic [NC-1:0][1:0][DAC_W-1:0] dac_word;

  real in_re [NC+1];
  real in_im [NC+1];
  real t_re [NC];
  real t_im [NC];
  real p_drop [NC];
  real v_out [NC];

  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  always #455 clk = ~clk;   // 1.1 MHz

  pic_controller dut (
    .clk, .start, .loop_reset, .adc_data, .adc_eoc, .new_in, .bit_in,
    .get_bit(1'b0), .read_bit(1'b0), .out_bit, .tia_gain, .tia_sw, .gi_reset, .dac_word
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Arbitrary but fixed input phases and heater offsets.
  function automatic real in_phase(input int k);
    return 2.0 * PI * real'((37 * k + 11) % 64) / 64.0;
  endfunction
  function automatic real theta0(input int k);
    return 2.0 * PI * real'((23 * k + 5) % 32) / 32.0;
  endfunction
  function automatic real phi0(input int k);
    return 2.0 * PI * real'((13 * k + 19) % 32) / 32.0;
  endfunction

  initial
    for (int k = 0; k <= NC; k++) begin
      in_re[k] = $sqrt(P_EACH) * $cos(in_phase(k));
      in_im[k] = $sqrt(P_EACH) * $sin(in_phase(k));
    end

  for (genvar c = 0; c < NC; c++) begin : g_stage
    real a_re, a_im;
    if (c == 0) begin : g_first
      always_comb begin a_re = in_re[0]; a_im = in_im[0]; end
    end else begin : g_next
      always_comb begin a_re = t_re[c-1]; a_im = t_im[c-1]; end
    end
    mzi_mesh_stage_model #(.THETA0(theta0(c)), .PHI0(phi0(c))) u_stage (
      .a_re, .a_im, .b_re(in_re[c+1]), .b_im(in_im[c+1]),
      .dac_word(dac_word[c]), .tia_gain(tia_gain[c]),
      .t_re(t_re[c]), .t_im(t_im[c]), .p_drop(p_drop[c]), .v_out(v_out[c]));
    adc10a_model #(.PHASE(2 * c)) u_adc (
      .clk, .en(adc_en), .vin(v_out[c]), .data(adc_data[c]), .eoc(adc_eoc[c]));

    logic [GAIN_W-1:0] gain_q;
    always @(negedge clk) begin
      if (start && tia_gain[c] == gain_q + 1'b1) n_up++;
      if (start && tia_gain[c] + 1'b1 == gain_q) n_down++;
      gain_q = tia_gain[c];
    end
  end

  shared_cfg_t      cfg_img;
  ch_cfg_t [NC-1:0] ch_img;

  task automatic load_config();
    logic [WREG_W-1:0] img;
    img = {ch_img, cfg_img};
    for (int i = WREG_W - 1; i >= 0; i--) begin
      bit_in = img[i];
      #300 new_in = 1'b1;
      #300 new_in = 1'b0;
    end
    #300;
    check({dut.ch_cfg, dut.cfg} == img, "configuration loaded");
  endtask

  task automatic run_periods(input int n);
    repeat (n * N_SAMPLES * CONV_CLKS) @(negedge clk);
  endtask

  initial if ($test$plusargs("trace")) forever begin
    run_periods(25);
    $write("%0t", $time);
    for (int c = 0; c < NC; c++) $write(" %0.1e", p_drop[c] / P_TOTAL);
    $write(" | out %0.4f\n", (t_re[NC-1] * t_re[NC-1] + t_im[NC-1] * t_im[NC-1]) / P_TOTAL);
  end

  real acc_drop [NC];
  real acc_out;

  initial begin
    cfg_img.fb_sign   = 1'b0;
    cfg_img.ctrl_sqrt = 1'b1;
    cfg_img.sat_reset = 16'hC400;
    cfg_img.sat_th    = 5'd30;
    cfg_img.det_move  = 16'd64;
    cfg_img.bw_gain   = 4'd11;
    cfg_img.sample_th = {5'd28, 5'd4};
    for (int c = 0; c < NC; c++) begin
      ch_img[c].dith_sel = 4'd10;
      ch_img[c].dac[0]   = '{write: 1'b0, dac_manual: '0};
      ch_img[c].dac[1]   = '{write: 1'b0, dac_manual: '0};
    end
    load_config();
    @(negedge clk) adc_en = 1'b1;
    repeat (20) @(negedge clk);
    start = 1'b1;
    repeat (30) @(negedge clk);
    loop_reset = 1'b0;
    run_periods(600);
    for (int sel = 8; sel >= 6; sel -= 2) begin
      @(negedge clk) loop_reset = 1'b1;
      for (int c = 0; c < NC; c++) ch_img[c].dith_sel = 4'(sel);
      load_config();
      // Keep the loop open a few periods: while the register shifted, the
      // Write bits passed through transient ones and the DACs took random
      // words, so the gain must settle again before samples count.
      run_periods(8);
      @(negedge clk) loop_reset = 1'b0;
      run_periods(200);
    end

    foreach (acc_drop[c]) acc_drop[c] = 0.0;
    acc_out = 0.0;
    for (int i = 0; i < 1320; i++) begin
      @(negedge clk);
      foreach (acc_drop[c]) acc_drop[c] += p_drop[c];
      acc_out += t_re[NC-1] * t_re[NC-1] + t_im[NC-1] * t_im[NC-1];
    end
    for (int c = 0; c < NC; c++) begin
      real rel;
      rel = acc_drop[c] / 1320.0 / P_TOTAL;
      $display("stage %0d: drop/total = %e (%0.1f dB), gain %0d", c, rel, 10.0 * $log10(rel + 1e-30), tia_gain[c]);
      check(rel < 1.0e-3, "drop port dark (< -30 dB of the total input)");
    end
    $display("output/total = %0.4f", acc_out / 1320.0 / P_TOTAL);
    check(acc_out / 1320.0 / P_TOTAL > 0.99, "all light in the output (> 99 %)");
    $display("gain up %0d, gain down %0d", n_up, n_down);
    check(n_up > 0, "gain stepped up");
    check(n_down > 0, "gain stepped down");
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
