// tb_dith_add: set_point must be (result +/- 2^dith_sel), clipped to 16 bits,
// without its LSB, one clock after the inputs; no dither while loop_reset.
module tb_dith_add;
  import pic_ctrl_pkg::*;
  logic clk = 1'b0, loop_reset, dith_mod;
  logic [RESULT_W-1:0] result;
  logic [DITH_SEL_W-1:0] dith_sel;
  logic [SETPOINT_W-1:0] set_point;
  int checks = 0, failures = 0;

  dith_add dut (.clk, .loop_reset, .result, .dith_mod, .dith_sel, .set_point);

  always #5 clk = ~clk;

  function automatic int ref_sp(int r, bit m, int s, bit rst);
    int v;
    v = rst ? r : (m ? r + (1 << s) : r - (1 << s));
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return v >> 1;
  endfunction

  initial begin
    int exp_v;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      result     = RESULT_W'($urandom);
      if (n % 7 == 0) result = RESULT_W'(n % 3 == 0 ? 0 : 16'hFFF0 + (n % 16));
      dith_mod   = 1'($urandom);
      dith_sel   = DITH_SEL_W'($urandom);
      loop_reset = ($urandom % 8) == 0;
      exp_v = ref_sp(int'(result), dith_mod, int'(dith_sel), loop_reset);
      @(posedge clk); #1;
      checks++;
      if (int'(set_point) != exp_v) begin
        failures++;
        $display("FAIL r=%0d m=%b s=%0d rst=%b: %0d expected %0d",
                 result, dith_mod, dith_sel, loop_reset, set_point, exp_v);
      end
    end
    // Dith_Sel = 0 moves set_point by exactly one LSB peak to peak.
    @(negedge clk); result = 16'd1000; dith_sel = 0; dith_mod = 1; loop_reset = 0;
    @(negedge clk); exp_v = int'(set_point); dith_mod = 0;
    @(negedge clk);
    checks++; if (exp_v - int'(set_point) != 1) failures++;
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
