// tb_square_root: every 15-bit input is compared with the segment formula
// X/2^N + 2^(N+1) (X = input * 64, 4^N <= X < 4^(N+1)) and with 3*sqrt(X):
// the line meets 3*sqrt(X) at the segment ends and stays within 6 % below it.
// The bypass must give the 12 MSBs of the input.
module tb_square_root;
  import pic_ctrl_pkg::*;
  logic [SETPOINT_W-1:0] set_point;
  logic ctrl_sqrt;
  logic [DAC_W-1:0] dac_loop;
  int checks = 0, failures = 0;

  square_root dut (.set_point, .ctrl_sqrt, .dac_loop);

  initial begin
    longint x, n, y;
    real s3;
    for (int v = 0; v < (1 << SETPOINT_W); v++) begin
      set_point = SETPOINT_W'(v);
      ctrl_sqrt = 1'b1;
      #1;
      x = longint'(v) * 64;
      if (x == 0) y = 0;
      else begin
        n = 0;
        while ((longint'(1) << (2 * (n + 1))) <= x) n++;
        y = (x >> n) + (longint'(1) << (n + 1));
      end
      checks++;
      if (longint'(dac_loop) != y) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d: %0d expected %0d", x, dac_loop, y);
      end
      s3 = 3.0 * $sqrt(real'(x));
      if (real'(dac_loop) > s3 + 1.0 || real'(dac_loop) < 0.94 * s3 - 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d: %0d far from 3*sqrt=%f", x, dac_loop, s3);
      end
      ctrl_sqrt = 1'b0;
      #1;
      checks++;
      if (dac_loop !== set_point[14:3]) failures++;
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
