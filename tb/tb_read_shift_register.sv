// tb_read_shift_register: while get_bit is low the register follows d; after
// get_bit goes high it is frozen and read_bit rising edges shift out all
// 259 bits of the frozen word, bit 0 first, even though d keeps changing.
module tb_read_shift_register;
  localparam int W = 259;   // the register's default width
  logic clk = 1'b0, get_bit = 1'b0, read_bit = 1'b0, out_bit;
  logic [W-1:0] d, frozen;
  int checks = 0, failures = 0;

  read_shift_register dut (.clk, .d, .get_bit, .read_bit, .out_bit);

  always #5 clk = ~clk;

  task automatic rand_d();
    for (int i = 0; i < W; i++) d[i] = 1'($urandom);
  endtask

  initial begin
    rand_d();
    for (int t = 0; t < 3; t++) begin
      get_bit = 1'b0;
      repeat (5) begin
        rand_d();
        repeat (4) @(negedge clk);
        checks++;
        if (out_bit !== d[0]) failures++;
      end
      frozen = d;
      get_bit = 1'b1;
      repeat (4) @(negedge clk);
      for (int i = 0; i < W; i++) begin
        rand_d();
        checks++;
        if (out_bit !== frozen[i]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d: %b expected %b", i, out_bit, frozen[i]);
        end
        read_bit = 1'b1;
        repeat (3) @(negedge clk);
        read_bit = 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
