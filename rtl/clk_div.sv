// clk_div: divides the 1.1 MHz master clock by 33 to pace the dithering
// modulation (33 clocks = 3 ADC conversions = one quarter of the 120 us
// dithering period).
//
// A counter runs 0..DIV-1 while en is high and is held at 0 while en is low.
// tick is high for one clock whenever the count is 0 and en is high, i.e. at
// the first clock edge after en rises and then every DIV clocks: it marks the
// rising edge of the divided clock. div_clk is the divided clock itself, high
// for HIGH clocks and low for DIV-HIGH clocks.
//
// The ratio 33 and the 17 + 16 split are the controller's; which half is high,
// and producing an enable tick in the master-clock domain instead of a second
// clock, are this design's choices.
module clk_div #(
  parameter int unsigned DIV  = 33,
  parameter int unsigned HIGH = 17
) (
  input  logic clk,
  input  logic en,
  output logic div_clk,
  output logic tick
);

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!en)                         cnt <= '0;
    else if (cnt == CW'(DIV - 1))    cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end

  assign tick    = en && (cnt == '0);
  assign div_clk = en && (cnt < CW'(HIGH));

endmodule
