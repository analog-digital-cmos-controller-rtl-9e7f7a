// tb_write_shift_register: a random 263-bit word shifted in MSB first with
// new_in strobes must appear on the parallel outputs; bits do not move
// without a strobe.
module tb_write_shift_register;
  localparam int W = 263;   // the register's default width
  logic new_in = 1'b0, bit_in = 1'b0;
  logic [W-1:0] q, word;
  int checks = 0, failures = 0;

  write_shift_register dut (.new_in, .bit_in, .q);

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < W; i++) word[i] = 1'($urandom);
      for (int i = W - 1; i >= 0; i--) begin
        bit_in = word[i];
        #7 new_in = 1'b1;
        #13 new_in = 1'b0;
        bit_in = ~bit_in;
        #5;
      end
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL word %0d", t);
      end
      bit_in = 1'b1;
      #100;
      checks++;
      if (q !== word) failures++;
      // After one more strobe the word has moved by one place.
      #5 new_in = 1'b1;
      #5 new_in = 1'b0;
      checks++;
      if (q !== {word[W-2:0], 1'b1}) failures++;
    end
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
