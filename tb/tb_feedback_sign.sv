// tb_feedback_sign: exhaustive check of the loop-sign selection
// (demod = de_mod XNOR sign).
module tb_feedback_sign;
  logic de_mod, sign, demod;
  int checks = 0, failures = 0;

  feedback_sign dut (.de_mod, .sign, .demod);

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sign, de_mod} = 2'(i);
      #1;
      checks++;
      // sign = 1: demodulate in phase; sign = 0: in opposition.
      if (demod !== (sign ? de_mod : !de_mod)) begin
        failures++;
        $display("FAIL sign=%b de_mod=%b demod=%b", sign, de_mod, demod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
