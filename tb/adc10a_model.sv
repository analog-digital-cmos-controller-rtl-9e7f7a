// adc10a_model: behavioural model (not synthesizable) of the 10-bit ADC fed
// by the gated integrator of one photodiode channel, used by the channel and
// system testbenches.
//
// How it works: the model averages its real input vin over one conversion
// window of CONV clocks (this stands for the gated integrator, whose output
// is the mean of the transimpedance voltage over the integration time) and
// converts the mean with the ADC's +/-1.65 V references:
//   code = floor((v + 1.65 V) / 3.3 V * 1024), clamped to 0..1023.
// At the end of every window it presents the code on data and raises eoc for
// one clock.
//
// Interface and timing: clk is the 1.1 MHz master clock. data and eoc change
// 1 ns after the rising clock edge that ends a window, so the controller
// samples them cleanly on the next edge; eoc is high for one clock every
// CONV clocks. PHASE shifts the first window so that several channels need
// not convert in step. Conversion every 11 clocks and the reference voltages
// follow the controller description; the averaging window, the 1 ns output
// delay and PHASE are choices of this model.
module adc10a_model #(
  parameter int unsigned CONV  = 11,
  parameter int unsigned PHASE = 0
) (
  input  logic       clk,
  input  logic       en,
  input  real        vin,
  output logic [9:0] data,
  output logic       eoc
);

  int  cnt = 0;
  real acc = 0.0;

  initial begin
    data = '0;
    eoc  = 1'b0;
    cnt  = int'(PHASE % CONV);
  end

  function automatic logic [9:0] to_code(input real v);
    real c;
    c = (v + 1.65) / 3.3 * 1024.0;
    if (c < 0.0)     return 10'd0;
    if (c >= 1023.0) return 10'd1023;
    return 10'($rtoi(c));
  endfunction

  always @(posedge clk) begin
    if (!en) begin
      cnt = 0;
      acc = 0.0;
      #1 eoc = 1'b0;
    end else begin
      acc = acc + vin;
      if (cnt == int'(CONV) - 1) begin
        cnt = 0;
        #1;
        data = to_code(acc / real'(CONV));
        eoc  = 1'b1;
        acc  = 0.0;
      end else begin
        cnt = cnt + 1;
        #1 eoc = 1'b0;
      end
    end
  end

endmodule
