// mzi_mesh_stage_model: behavioural model (not synthesizable) of one stage
// of a diagonal MZI mesh: an MZI with two heaters that combines the light
// passed on by the previous stage with one new input, a monitor photodiode on
// its drop port and the variable-gain transimpedance front-end.
//
// How it works: the complex input fields a (from the previous stage) and
// b (new input) pass through the heater of DAC branch 1 (phase phi on a), a
// 50/50 coupler, the heater of DAC branch 0 (phase theta on the upper arm)
// and a second coupler:
//   drop    = (e^{j theta} - 1)/2 * e^{j phi} a + j (e^{j theta} + 1)/2 * b
//   through = j (e^{j theta} + 1)/2 * e^{j phi} a - (e^{j theta} - 1)/2 * b
// (fields in sqrt(W)). The drop port is monitored and must be driven dark,
// which sends all the light on to the next stage. Heater phase =
// phase0 + PHASE_FS * (word / 4096)^2. The photodiode and front-end are those
// of mzi_plant_model: 0.85 A/W, 7 dB loss, 150 nA dark current, gains
// 3.5 kOhm * 4^code, 0.15 V above the -1.65 V rail.
//
// Interface: combinational in the real domain, no thermal time constant.
// The optical arrangement and the heater mapping are choices of this model;
// the electrical numbers follow the controller description.
module mzi_mesh_stage_model #(
  parameter real THETA0   = 0.0,
  parameter real PHI0     = 0.0,
  parameter real PHASE_FS = 2.88 * 3.14159265358979
) (
  input  real              a_re, a_im,
  input  real              b_re, b_im,
  input  logic [1:0][11:0] dac_word,
  input  logic [2:0]       tia_gain,
  output real              t_re, t_im,   // through port, to the next stage
  output real              p_drop,       // light on the photodiode, W
  output real              v_out         // front-end output, V
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
    real th, ph, ar, ai, mr, mi, pr, pq, d_re, d_im;
    th = heat(THETA0, dac_word[0]);
    ph = heat(PHI0, dac_word[1]);
    // a' = e^{j phi} a
    ar = a_re * $cos(ph) - a_im * $sin(ph);
    ai = a_re * $sin(ph) + a_im * $cos(ph);
    // m = (e^{j theta} - 1)/2, p = (e^{j theta} + 1)/2
    mr = ($cos(th) - 1.0) / 2.0;  mi = $sin(th) / 2.0;
    pr = ($cos(th) + 1.0) / 2.0;  pq = $sin(th) / 2.0;
    // drop = m a' + j p b
    d_re = (mr * ar - mi * ai) - (pr * b_im + pq * b_re);
    d_im = (mr * ai + mi * ar) + (pr * b_re - pq * b_im);
    // through = j p a' - m b
    t_re = -(pr * ai + pq * ar) - (mr * b_re - mi * b_im);
    t_im =  (pr * ar - pq * ai) - (mr * b_im + mi * b_re);
    p_drop = d_re * d_re + d_im * d_im;
    v_out  = -1.65 + 0.15 + (RESP * LOSS * p_drop + DARK) * g_in(tia_gain);
  end

endmodule
