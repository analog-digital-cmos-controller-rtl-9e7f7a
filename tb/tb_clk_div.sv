// tb_clk_div: after en rises the first tick comes at the first clock edge,
// then exactly every 33 clocks; the divided clock is high 17 and low 16
// clocks of each period; nothing happens while en is low.
module tb_clk_div;
  logic clk = 1'b0, en = 1'b0, div_clk, tick;
  int checks = 0, failures = 0;

  clk_div dut (.clk, .en, .div_clk, .tick);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int ticks, high;
    repeat (5) @(negedge clk);
    check(!tick && !div_clk, "idle while en low");
    en = 1'b1;
    #1 check(tick, "tick right after en");
    for (int p = 0; p < 10; p++) begin
      ticks = 0; high = 0;
      for (int c = 0; c < 33; c++) begin
        if (c != 0) @(negedge clk);
        if (tick) ticks++;
        if (div_clk) high++;
        if (c == 0) check(tick, "tick at period start");
      end
      check(ticks == 1, "one tick per 33 clocks");
      check(high == 17, "17 clocks high");
      @(negedge clk);
    end
    en = 1'b0;
    repeat (40) begin
      @(negedge clk);
      check(!tick, "no tick after en low");
    end
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
