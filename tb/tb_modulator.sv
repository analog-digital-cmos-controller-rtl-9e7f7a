// tb_modulator: the two dither bits step through 00 -> 10 -> 11 -> 01 (bit 1
// written first) on each tick, so each is a square wave of four ticks and bit
// 0 lags bit 1 by one tick; nothing changes between ticks or while disabled.
module tb_modulator;
  logic clk = 1'b0, en = 1'b0, tick = 1'b0;
  logic [1:0] dith_mod;
  int checks = 0, failures = 0;
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  modulator dut (.clk, .en, .tick, .dith_mod);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (dith_mod !== 2'b01) failures++;
    en = 1'b1;
    for (int t = 0; t < 40; t++) begin
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      checks++;
      if (dith_mod !== seq[t % 4]) begin
        failures++;
        $display("FAIL tick %0d: %b expected %b", t, dith_mod, seq[t % 4]);
      end
      repeat (1 + ($urandom % 5)) begin
        @(negedge clk);
        checks++;
        if (dith_mod !== seq[t % 4]) failures++;
      end
    end
    en = 1'b0;
    @(negedge clk);
    checks++; if (dith_mod !== 2'b01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
