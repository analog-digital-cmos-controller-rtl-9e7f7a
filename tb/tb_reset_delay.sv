// tb_reset_delay: after the loop is enabled, mod_start must rise after the
// 10th falling clock edge that follows the falling edge at which eoc was seen,
// so that the modulator starts on the 11th rising edge counted from the
// rising edge at which eoc went high; it must drop when the loop is opened
// or the system stopped.
module tb_reset_delay;
  logic clk = 1'b0, start = 1'b0, loop_reset = 1'b1, eoc = 1'b0, mod_start;
  int checks = 0, failures = 0;
  int cyc = 0, eoc_cyc = -1, seen_eoc = 0;

  reset_delay dut (.clk, .start, .loop_reset, .eoc, .mod_start);

  always #5 clk = ~clk;

  // ADC-like eoc: one clock high every 11 clocks, just after the rising edge.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1 eoc = ((cyc % 11) == 10);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int trial = 0; trial < 6; trial++) begin
      start = 1'b1;
      loop_reset = 1'b1;
      repeat (5 + $urandom % 20) @(negedge clk);
      check(!mod_start, "held while loop_reset");
      // Release the loop at a random point of a conversion.
      #2 loop_reset = 1'b0;
      // Find the first eoc seen by a falling edge after release (one
      // falling edge is spent leaving the idle state).
      @(negedge clk);
      seen_eoc = 0;
      while (!seen_eoc) begin
        @(negedge clk);
        if (eoc) seen_eoc = 1;
        else check(!mod_start, "low before eoc");
      end
      // Rising edges R1..R10 must see mod_start low, R11 high.
      for (int r = 1; r <= 11; r++) begin
        @(posedge clk);
        if (r <= 10) check(!mod_start, $sformatf("low at rising edge %0d", r));
        else         check(mod_start, "high at rising edge 11");
      end
      repeat (30) @(negedge clk);
      check(mod_start, "stays high");
      if (trial % 2) begin
        loop_reset = 1'b1;
      end else begin
        start = 1'b0;
      end
      @(negedge clk); @(negedge clk);
      check(!mod_start, "drops when loop disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
