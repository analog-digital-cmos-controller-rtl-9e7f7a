// tia_switch_decode: decodes the 3-bit front-end gain code (A B C) into the
// closing commands of the ten switches S1..S10 of the transimpedance stage's
// resistive network, which set R_F and R for the six gain regions.
//
// Purely combinational. sw[i-1] = 1 closes switch S_i. The truth table is the
// controller's switch table:
//   code 000 -> S1 S4 S8        code 011 -> S3 S5 S9
//   code 001 -> S2 S4 S8        code 100 -> S3 S6 S9
//   code 010 -> S3 S4 S8        code 101 -> S3 S7 S9 S10
// Codes 110 and 111 are never produced by the gain controller; this design
// decodes them like 101.
module tia_switch_decode
  import pic_ctrl_pkg::*;
(
  input  logic [GAIN_W-1:0] tia_gain,
  output logic [N_SW-1:0]   sw
);

  always_comb begin
    sw = '0;
    unique case (tia_gain)
      3'b000: begin sw[0] = 1'b1; sw[3] = 1'b1; sw[7] = 1'b1; end
      3'b001: begin sw[1] = 1'b1; sw[3] = 1'b1; sw[7] = 1'b1; end
      3'b010: begin sw[2] = 1'b1; sw[3] = 1'b1; sw[7] = 1'b1; end
      3'b011: begin sw[2] = 1'b1; sw[4] = 1'b1; sw[8] = 1'b1; end
      3'b100: begin sw[2] = 1'b1; sw[5] = 1'b1; sw[8] = 1'b1; end
      default: begin sw[2] = 1'b1; sw[6] = 1'b1; sw[8] = 1'b1; sw[9] = 1'b1; end
    endcase
  end

endmodule
