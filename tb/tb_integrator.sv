// tb_integrator: feeds dithering periods of 12 samples with random values,
// gains, demodulation signs and BW_Gain and compares Result, period by
// period, with a 64-bit reference model of the weighted demodulating sum,
// Det_Move and the saturation reset. Also checks the two-clock latency from
// the last sample to Result.
module tb_integrator;
  import pic_ctrl_pkg::*;
  logic clk = 1'b0, start = 1'b0, demod = 1'b0, dith_over = 1'b0, valid_in = 1'b0;
  logic [ADC_W-1:0] in_sample = '0;
  logic [GAIN_W-1:0] tia_gain = '0;
  logic [BW_W-1:0] bw_gain = '0;
  logic [RESULT_W-1:0] det_move, sat_reset, result;
  logic [SAT_TH_W-1:0] sat_th;
  int checks = 0, failures = 0;
  int n_det = 0, n_sat_hi = 0, n_sat_lo = 0;

  integrator dut (.clk, .start, .demod, .in_sample, .dith_over, .tia_gain, .valid_in,
                  .bw_gain, .det_move, .sat_th, .sat_reset, .result);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint acc, acc0;   // reference word, as an integer with 3 guard bits

  // Feed one period. mode: 0 random, 1 all-zero samples (flat region),
  // 2 strongly positive, 3 strongly negative.
  task automatic period(input int mode, input int g, input int bw);
    longint add, old_res;
    int msb5;
    bit hi, lo;
    old_res = longint'(result);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      case (mode)
        1: in_sample = '0;
        2, 3: in_sample = ADC_W'(900 + $urandom % 124);
        default: in_sample = ADC_W'($urandom);
      endcase
      demod = (mode == 2) ? 1'b1 : (mode == 3) ? 1'b0 : 1'($urandom);
      tia_gain = GAIN_W'(g);
      bw_gain = BW_W'(bw);
      valid_in = 1'b1;
      dith_over = (i == 11);
      add = longint'(in_sample) << (2 * (5 - g) + (bw > 11 ? 11 : bw));
      acc = demod ? acc + add : acc - add;
      @(negedge clk);
      valid_in = 1'b0;
      dith_over = 1'b0;
      if (i == 11) begin
        // Result must not have changed yet (one clock after the sample) ...
        check(longint'(result) == old_res, "result holds one clock after last sample");
        if (acc == acc0 && g != 5) begin
          acc += longint'(det_move) << 15;
          n_det++;
        end
        msb5 = int'((acc >> 26) & 31);
        hi = (acc >= (longint'(1) << 31)) || (acc >= 0 && msb5 >= int'(sat_th));
        lo = !hi && (acc < 0 || msb5 <= 31 - int'(sat_th));
        if (hi) begin acc = (65535 - longint'(sat_reset)) << 15; n_sat_hi++; end
        else if (lo) begin acc = longint'(sat_reset) << 15; n_sat_lo++; end
        acc0 = acc;
        @(negedge clk);
        // ... and must have changed one clock later.
        check(longint'(result) == (acc >> 15),
              $sformatf("result %0d expected %0d", result, acc >> 15));
      end
      repeat (1 + $urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    det_move  = 16'd300;
    sat_reset = 16'h1000;
    sat_th    = 5'd28;       // upper at 28/32 of the range, lower at 3/32
    repeat (3) @(negedge clk);
    check(result == sat_reset, "initialised to Sat_Reset while start low");
    acc = longint'(sat_reset) << 15;
    acc0 = acc;
    start = 1'b1;
    for (int p = 0; p < 400; p++) begin
      int mode;
      mode = (p % 10 == 3) ? 1 : (p % 50 < 5) ? 2 : (p % 50 > 44) ? 3 : 0;
      period(mode, $urandom % 6, (p % 25 == 0) ? 15 : $urandom % 8);
    end
    // Flat region at the highest gain: no Det_Move.
    begin
      longint r0;
      r0 = longint'(result);
      period(1, 5, 0);
      check(longint'(result) == r0, "no Det_Move at the highest gain");
    end
    check(n_det > 0 && n_sat_hi > 0 && n_sat_lo > 0, "Det_Move and both saturations seen");
    $display("det_move %0d, sat_hi %0d, sat_lo %0d", n_det, n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
