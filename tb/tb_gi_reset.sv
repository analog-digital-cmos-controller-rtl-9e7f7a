// tb_gi_reset: the gated-integrator reset must be a pulse of exactly half a
// clock period that starts when eoc falls, and must be low at all other
// times. eoc is driven like the ADC's: high for one clock every 11 clocks,
// changing just after the rising clock edge.
module tb_gi_reset;
  logic clk = 1'b0, eoc = 1'b0, analog_reset;
  int checks = 0, failures = 0;
  int pulses = 0;

  gi_reset dut (.clk, .eoc, .analog_reset);

  always #5 clk = ~clk;   // period 10

  task automatic expect_level(input logic lvl, input string what);
    checks++;
    if (analog_reset !== lvl) begin
      failures++;
      $display("FAIL %s at %0t: analog_reset=%b", what, $time, analog_reset);
    end
  endtask

  initial begin
    // Settle the falling-edge flip-flop.
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      // eoc rises just after a rising edge ...
      @(posedge clk); #1 eoc = 1'b1;
      #2 expect_level(1'b0, "eoc high, first half");
      @(negedge clk); #1 expect_level(1'b0, "eoc high, second half");
      // ... and falls after the next rising edge: the pulse starts.
      @(posedge clk); #1 eoc = 1'b0;
      #1 expect_level(1'b1, "after eoc fall");
      if (analog_reset) pulses++;
      #2 expect_level(1'b1, "pulse middle");
      // It ends at the falling clock edge, half a period after it began.
      @(negedge clk); #1 expect_level(1'b0, "after falling edge");
      repeat (8) begin
        @(posedge clk); #2 expect_level(1'b0, "idle");
      end
    end
    checks++;
    if (pulses != 20) failures++;
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
