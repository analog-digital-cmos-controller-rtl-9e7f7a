// square_root: piecewise-linear approximation of the square root that
// linearises the heater: the phase shift grows with heater power, i.e. with
// the square of the DAC voltage, so driving the DAC with sqrt(C) makes the
// phase proportional to the control variable C.
//
// The 15-bit set point is taken as the top of a 21-bit word X = set_point
// followed by six zero bits. On every interval 2^(2N) <= X < 2^(2N+2) the
// output is the straight line
//       dac_loop = X / 2^N + 2^(N+1)
// which equals 3*sqrt(X) at both ends of the interval (3*2^N and 3*2^(N+1))
// and lies slightly below it inside. The factor 3 avoids a division by 3 and
// is absorbed in the loop gain; with X < 2^21 the output fits in 12 bits.
// X = 0 gives 0. With ctrl_sqrt = 0 the block is bypassed and dac_loop is the
// 12 MSBs of set_point.
//
// Purely combinational. The approximation, the widths and the bypass are the
// controller's; X = 0 -> 0 and the bypass taking set_point's MSBs are this
// design's reading.
module square_root
  import pic_ctrl_pkg::*;
(
  input  logic [SETPOINT_W-1:0] set_point,
  input  logic                  ctrl_sqrt,
  output logic [DAC_W-1:0]      dac_loop
);

  localparam int unsigned X_W = SETPOINT_W + 6;   // 21

  logic [X_W-1:0] x;
  logic [3:0]     n;          // segment index N = floor(log2(X) / 2)
  logic [X_W-1:0] line;       // below 2^12 for every 15-bit set point; upper bits unused

  assign x = {set_point, 6'b0};

  always_comb begin
    n = '0;
    for (int i = 0; i < X_W; i++) begin
      if (x[i]) n = 4'(i / 2);
    end
    line = (x >> n) + (X_W'(1) << (n + 4'd1));
  end

  always_comb begin
    if (!ctrl_sqrt)      dac_loop = set_point[SETPOINT_W-1 -: DAC_W];
    else if (x == '0)    dac_loop = '0;
    else                 dac_loop = line[DAC_W-1:0];
  end

endmodule
