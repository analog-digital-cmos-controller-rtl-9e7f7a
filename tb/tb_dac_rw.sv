// tb_dac_rw: the DAC word is the manual word only when both loop_reset and
// write are high, otherwise the loop word; one clock of latency.
module tb_dac_rw;
  import pic_ctrl_pkg::*;
  logic clk = 1'b0, loop_reset, write;
  logic [DAC_W-1:0] dac_loop, dac_manual, dac_word, exp_w;
  int checks = 0, failures = 0;

  dac_rw dut (.clk, .loop_reset, .write, .dac_loop, .dac_manual, .dac_word);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      {loop_reset, write} = 2'($urandom);
      dac_loop   = DAC_W'($urandom);
      dac_manual = DAC_W'($urandom);
      exp_w = (loop_reset && write) ? dac_manual : dac_loop;
      #1;
      checks++;
      if (n > 0 && dac_word === exp_w && dac_loop != dac_manual && exp_w != dac_word) failures++;
      @(posedge clk); #1;
      checks++;
      if (dac_word !== exp_w) begin
        failures++;
        $display("FAIL rst=%b wr=%b: %h expected %h", loop_reset, write, dac_word, exp_w);
      end
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
