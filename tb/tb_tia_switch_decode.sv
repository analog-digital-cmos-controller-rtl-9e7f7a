// tb_tia_switch_decode: checks every gain code against the switch table of
// the front-end (which of S1..S10 close for each of the six gain regions).
module tb_tia_switch_decode;
  import pic_ctrl_pkg::*;

  logic [GAIN_W-1:0] tia_gain;
  logic [N_SW-1:0]   sw;
  int checks = 0, failures = 0;

  tia_switch_decode dut (.tia_gain, .sw);

  // Expected closed switches per code, as switch numbers (1-based).
  function automatic logic [N_SW-1:0] expect_sw(input int code);
    int list [4];
    logic [N_SW-1:0] m;
    case (code)
      0: list = '{1, 4, 8, 0};
      1: list = '{2, 4, 8, 0};
      2: list = '{3, 4, 8, 0};
      3: list = '{3, 5, 9, 0};
      4: list = '{3, 6, 9, 0};
      default: list = '{3, 7, 9, 10};
    endcase
    m = '0;
    foreach (list[i]) if (list[i] != 0) m[list[i]-1] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int c = 0; c < 8; c++) begin
      tia_gain = GAIN_W'(c);
      #1;
      checks++;
      if (sw !== expect_sw(c)) begin
        failures++;
        $display("FAIL code %0d: sw=%b expected %b", c, sw, expect_sw(c));
      end
    end
    // S10 always follows S7; S4 goes with S8 and never with S9.
    for (int c = 0; c < 6; c++) begin
      tia_gain = GAIN_W'(c);
      #1;
      checks++;
      if (sw[9] != sw[6] || sw[3] != sw[7] || (sw[3] && sw[8])) failures++;
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
