// gain_adjust: automatic gain control of the photodiode front-end and the
// sample source of the two integrators of a channel.
//
// Every ADC conversion ends with a pulse on eoc. The sample is taken on the
// rising edge of eoc and the outputs are registered one clock later. Samples
// are counted in groups of N_SAMPLES (one dithering period). The first sample
// of a period is checked against two 5-bit thresholds held in sample_th:
// if its 5 MSBs are at or above sample_th[9:5] the gain code steps down (less
// transimpedance), if they are at or below sample_th[4:0] it steps up. A
// sample that triggers a step is dropped and the next sample starts the
// period again; otherwise it and the following samples are passed on with
// valid_out, and dith_over marks the last one of the period.
//
// While start is low the gain is held at its maximum (code GAIN_MAX = 101)
// and the count is cleared. While loop_reset is high out_sample is forced to
// zero, so the integrators do not move, and dith_over is held low (this
// design's choice: it also keeps the integrator's end-of-period actions off).
//
// Follows the controller description for the thresholds, the initial gain,
// the 12-sample period and the one-clock latency; the inclusive threshold
// comparison and the handling of a rejected first sample are this design's.
module gain_adjust
  import pic_ctrl_pkg::*;
#(
  parameter int unsigned N_SMP = N_SAMPLES
) (
  input  logic              clk,
  input  logic              start,
  input  logic              loop_reset,
  input  logic [ADC_W-1:0]  adc_sample,
  input  logic              eoc,
  input  logic [TH_W-1:0]   sample_th,
  output logic              dith_over,
  output logic              valid_out,
  output logic [ADC_W-1:0]  out_sample,
  output logic [GAIN_W-1:0] tia_gain
);

  localparam int unsigned CNT_W = $clog2(N_SMP);

  logic             eoc_q;
  logic [CNT_W-1:0] cnt;
  logic             new_sample;
  logic [4:0]       msb5;
  logic             too_high, too_low;

  assign new_sample = eoc && !eoc_q;
  assign msb5       = adc_sample[ADC_W-1 -: 5];
  assign too_high   = (msb5 >= sample_th[9:5]) && (tia_gain != '0);
  assign too_low    = (msb5 <= sample_th[4:0]) && (tia_gain != GAIN_W'(GAIN_MAX));

  always_ff @(posedge clk) begin
    eoc_q     <= eoc;
    valid_out <= 1'b0;
    dith_over <= 1'b0;
    if (!start) begin
      tia_gain   <= GAIN_W'(GAIN_MAX);
      cnt        <= '0;
      out_sample <= '0;
    end else if (new_sample) begin
      if (cnt == '0 && too_high) begin
        tia_gain <= tia_gain - 1'b1;
      end else if (cnt == '0 && too_low) begin
        tia_gain <= tia_gain + 1'b1;
      end else begin
        valid_out  <= 1'b1;
        out_sample <= loop_reset ? '0 : adc_sample;
        if (cnt == CNT_W'(N_SMP - 1)) begin
          cnt       <= '0;
          dith_over <= !loop_reset;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // The gain code never leaves the six regions of the front-end.
  a_gain_range: assert property (@(posedge clk) disable iff (!start) tia_gain <= GAIN_W'(GAIN_MAX));
  // The end of a period is always carried by a valid sample.
  a_over_valid: assert property (@(posedge clk) disable iff (!start) dith_over |-> valid_out);

endmodule
