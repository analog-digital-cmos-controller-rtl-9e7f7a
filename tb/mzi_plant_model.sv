// mzi_plant_model: behavioural model (not synthesizable) of one thermally
// tuned Mach-Zehnder interferometer, its monitor photodiode and the
// variable-gain transimpedance front-end, as seen by one controller channel.
//
// Optics: two coherent inputs of real amplitude sqrt(p_a) and sqrt(p_b) enter
// an MZI made of two 50/50 couplers. The heater driven by DAC branch 0 sets
// the internal phase theta, the heater of branch 1 the phase phi of input a.
// The photodiode sits on output 1:
//   E1 = (e^{j theta} - 1)/2 * e^{j phi} * a + j (e^{j theta} + 1)/2 * b
// A heater phase grows with dissipated power, i.e. with the square of the
// DAC voltage: phase = phase0 + PHASE_FS * (word / 4096)^2, PHASE_FS about
// 2.88 pi for the full 6 V. All light can be sent to output 2, so the minimum
// of the monitored power is the photodiode's dark current alone.
//
// Electronics: I = 0.85 A/W * P * 10^(-0.7) (7 dB insertion loss) + 150 nA
// dark current; v_out = -1.65 V + 0.15 V + I * G_IN(tia_gain) with the six
// transimpedance gains 3.5 k, 14 k, 56 k, 224 k, 896 k and 3.58 M (code 0..5).
// The adc10a_model averages and converts v_out.
//
// Interface: purely combinational in the real domain; v_out follows the DAC
// words and gain code at once (no thermal time constant). Responsivity, dark
// current, loss, gain ratio and voltage margins follow the controller
// description; the two-input optical arrangement, the heater mapping and the
// absolute gain values are choices of this model.
module mzi_plant_model #(
  parameter real P_A      = 5.0e-6,   // W, input a
  parameter real P_B      = 5.0e-6,   // W, input b
  parameter real THETA0   = 0.0,      // rad
  parameter real PHI0     = 0.0,      // rad
  parameter real PHASE_FS = 2.88 * 3.14159265358979
) (
  input  logic [1:0][11:0] dac_word,
  input  logic [2:0]       tia_gain,
  output real              p_out,     // optical power on the photodiode, W
  output real              v_out      // front-end output, V
);

  localparam real RESP = 0.85;
  localparam real LOSS = 0.19952623;   // 10^(-7/10)
  localparam real DARK = 150.0e-9;

  function automatic real g_in(input logic [2:0] g);
    case (g)
      3'd0:    return 3.5e3;
      3'd1:    return 14.0e3;
      3'd2:    return 56.0e3;
      3'd3:    return 224.0e3;
      3'd4:    return 896.0e3;
      default: return 3.584e6;
    endcase
  endfunction

  function automatic real heat(input real p0, input logic [11:0] w);
    real x;
    x = real'(w) / 4096.0;
    return p0 + PHASE_FS * x * x;
  endfunction

  always_comb begin
    real th, ph, a, b, re1, im1, re_t, im_t, re2, im2;
    th = heat(THETA0, dac_word[0]);
    ph = heat(PHI0, dac_word[1]);
    a  = $sqrt(P_A);
    b  = $sqrt(P_B);
    // (e^{j th} - 1)/2 * e^{j ph} * a
    re_t = ($cos(th) - 1.0) / 2.0;
    im_t = $sin(th) / 2.0;
    re1  = a * (re_t * $cos(ph) - im_t * $sin(ph));
    im1  = a * (re_t * $sin(ph) + im_t * $cos(ph));
    // j (e^{j th} + 1)/2 * b
    re2  = -b * $sin(th) / 2.0;
    im2  =  b * ($cos(th) + 1.0) / 2.0;
    p_out = (re1 + re2) * (re1 + re2) + (im1 + im2) * (im1 + im2);
    v_out = -1.65 + 0.15 + (RESP * LOSS * p_out + DARK) * g_in(tia_gain);
  end

endmodule
