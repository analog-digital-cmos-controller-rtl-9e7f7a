// tb_demod_delay: the demodulation bits must equal the modulation bits as
// they were two eoc rising edges earlier.
module tb_demod_delay;
  logic eoc = 1'b0;
  logic [1:0] dith_mod, dith_demod;
  logic [1:0] hist [$];
  int checks = 0, failures = 0;

  demod_delay dut (.eoc, .dith_mod, .dith_demod);

  initial begin
    dith_mod = 2'b00;
    for (int n = 0; n < 200; n++) begin
      dith_mod = 2'($urandom);
      #5 eoc = 1'b1;
      hist.push_back(dith_mod);
      #5 eoc = 1'b0;
      // Change the input between edges: it must not leak through.
      dith_mod = ~dith_mod;
      #5;
      if (hist.size() >= 2) begin
        checks++;
        if (dith_demod !== hist[hist.size()-2]) begin
          failures++;
          $display("FAIL edge %0d: demod=%b expected %b", n, dith_demod, hist[hist.size()-2]);
        end
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
