// pic_ctrl_pkg: widths, constants and configuration types shared by the
// MZI-mesh controller.
//
// The numbers are those of the controller for a 7-MZI (8-input diagonal)
// mesh: a 10-bit ADC sampling every 11 clocks of the 1.1 MHz master clock,
// six front-end gain regions spaced by a factor 4, 12 samples per dithering
// period, a 16-bit integrator output, 15-bit dithered set point and 12-bit
// DAC words. The configuration record layout inside the 263-bit serial write
// register and the monitor layout inside the 259-bit read register are this
// design's choice; the field widths and the split between shared and
// per-channel fields follow the controller description.
package pic_ctrl_pkg;

  localparam int unsigned ADC_W       = 10;  // ADC10A resolution
  localparam int unsigned GAIN_W      = 3;   // TIA_gain code width
  localparam int unsigned GAIN_MAX    = 5;   // code 101: highest G_IN (region 6)
  localparam int unsigned N_SAMPLES   = 12;  // ADC samples per dithering period
  localparam int unsigned CONV_CLKS   = 11;  // clocks per ADC conversion
  localparam int unsigned RESULT_W    = 16;  // integrator output (state variable C)
  localparam int unsigned SETPOINT_W  = 15;  // Dith_Add output
  localparam int unsigned DAC_W       = 12;  // DAC word
  localparam int unsigned BW_W        = 4;   // BW_Gain
  localparam int unsigned SAT_TH_W    = 5;   // Sat_th
  localparam int unsigned DITH_SEL_W  = 4;   // Dith_Sel
  localparam int unsigned TH_W        = 10;  // Sample th. (two 5-bit thresholds)
  localparam int unsigned N_SW        = 10;  // switches S1..S10 of the resistive network

  // Configuration shared by all channels.
  typedef struct packed {
    logic                  fb_sign;    // Feedback_Sign: 1 = lock to a maximum, 0 = minimum
    logic                  ctrl_sqrt;  // 1 = square root on, 0 = 12 MSBs straight to the DAC
    logic [RESULT_W-1:0]   sat_reset;  // Sat_Reset
    logic [SAT_TH_W-1:0]   sat_th;     // Sat_th
    logic [RESULT_W-1:0]   det_move;   // Det_Move
    logic [BW_W-1:0]       bw_gain;    // BW_Gain
    logic [TH_W-1:0]       sample_th;  // Sample th.: [9:5] upper, [4:0] lower
  } shared_cfg_t;                       // 53 bits

  // Configuration of one DAC (heater) branch.
  typedef struct packed {
    logic               write;          // Write
    logic [DAC_W-1:0]   dac_manual;     // DAC_Manual
  } dac_cfg_t;                          // 13 bits

  // Configuration of one channel (one MZI, two heaters).
  typedef struct packed {
    dac_cfg_t [1:0]           dac;       // branch 1 in the upper half
    logic [DITH_SEL_W-1:0]    dith_sel;  // Dith_Sel, shared by the two branches
  } ch_cfg_t;                           // 30 bits

  localparam int unsigned SHARED_CFG_W = $bits(shared_cfg_t);
  localparam int unsigned CH_CFG_W     = $bits(ch_cfg_t);

  // Monitor record of one channel in the read register.
  typedef struct packed {
    logic [DAC_W-1:0]   dac1;
    logic [DAC_W-1:0]   dac0;
    logic [GAIN_W-1:0]  tia_gain;
    logic [ADC_W-1:0]   adc_sample;
  } mon_t;                              // 37 bits

  localparam int unsigned MON_W = $bits(mon_t);

endpackage
