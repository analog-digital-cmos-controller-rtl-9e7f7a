// tb_gain_adjust: drives ADC conversions (eoc one clock high every 11
// clocks) with samples that wander across the two thresholds and compares
// the outputs, one clock after each eoc, with a reference model: gain
// steps only on the first sample of a period, the 12-sample period count,
// zeroed samples and no period end while the loop is open, maximum gain
// while start is low.
module tb_gain_adjust;
  import pic_ctrl_pkg::*;
  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b0, eoc = 1'b0;
  logic [ADC_W-1:0] adc_sample = '0;
  logic [TH_W-1:0]  sample_th;
  logic dith_over, valid_out;
  logic [ADC_W-1:0] out_sample;
  logic [GAIN_W-1:0] tia_gain;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_over = 0;

  gain_adjust dut (.clk, .start, .loop_reset, .adc_sample, .eoc, .sample_th,
                   .dith_over, .valid_out, .out_sample, .tia_gain);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int exp_gain, exp_cnt;

  // One conversion: eoc high for one clock, then 10 clocks idle.
  task automatic conversion(input int smp);
    int msb5;
    bit exp_valid, exp_over;
    @(negedge clk);
    adc_sample = ADC_W'(smp);
    eoc = 1'b1;
    msb5 = smp >> 5;
    exp_valid = 0; exp_over = 0;
    if (exp_cnt == 0 && msb5 >= int'(sample_th[9:5]) && exp_gain != 0) begin
      exp_gain--; n_down++;
    end else if (exp_cnt == 0 && msb5 <= int'(sample_th[4:0]) && exp_gain != 5) begin
      exp_gain++; n_up++;
    end else begin
      exp_valid = 1;
      exp_over  = (exp_cnt == 11) && !loop_reset;
      exp_cnt   = (exp_cnt + 1) % 12;
    end
    @(negedge clk);
    eoc = 1'b0;
    check(valid_out == exp_valid, "valid_out one clock after eoc");
    check(dith_over == exp_over, "dith_over");
    if (exp_over) n_over++;
    if (exp_valid) check(out_sample == (loop_reset ? 0 : ADC_W'(smp)), "out_sample");
    check(int'(tia_gain) == exp_gain, $sformatf("tia_gain %0d exp %0d", tia_gain, exp_gain));
    @(negedge clk);
    check(!valid_out && !dith_over, "single-clock pulses");
    repeat (8) @(negedge clk);
  endtask

  initial begin
    int level;
    sample_th = {5'd30, 5'd8};   // 970 and 277, reduced to 5 bits
    repeat (3) @(negedge clk);
    check(tia_gain == 3'd5, "maximum gain while start low");
    start = 1'b1;
    exp_gain = 5; exp_cnt = 0;
    level = 600;
    for (int n = 0; n < 1500; n++) begin
      // A slowly wandering level with noise, sometimes far out of range.
      level += int'($urandom % 201) - 100;
      if (level < 0) level = 0;
      if (level > 1023) level = 1023;
      loop_reset = (n >= 700 && n < 800);
      conversion(level);
    end
    // Stop: gain returns to maximum, count cleared.
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check(tia_gain == 3'd5, "gain back to maximum");
    check(n_up > 0 && n_down > 0 && n_over > 0, "all mechanisms exercised");
    $display("gain up %0d, gain down %0d, periods %0d", n_up, n_down, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
