// reset_delay: aligns the start of the dithering modulation with the ADC
// conversions after the control loop is switched on.
//
// Reset (loop_reset) and Start come from pads and are asynchronous. When the
// loop is enabled (start high, loop_reset low) the block waits for an ADC end
// of conversion, sampling eoc on the falling clock edge so that a one-clock
// eoc is seen exactly once. It then counts ten more falling edges and raises
// mod_start after the tenth; the modulator starts on the next rising edge,
// the 11th of the conversion, so that the two registers between the modulator
// and the heater put each dither step on the heater at the 2nd clock of a
// conversion. mod_start stays high until the loop is disabled again.
//
// All state is clocked on the falling edge of clk, as in the controller. The
// count and the edge choices are the controller's; keeping mod_start high
// rather than pulsing it is this design's.
module reset_delay #(
  parameter int unsigned COUNT = 10
) (
  input  logic clk,
  input  logic start,
  input  logic loop_reset,
  input  logic eoc,
  output logic mod_start
);

  typedef enum logic [1:0] {IDLE, WAIT_EOC, COUNTING, RUN} state_t;

  state_t                     state;
  logic [$clog2(COUNT+1)-1:0] cnt;

  always_ff @(negedge clk) begin
    if (!start || loop_reset) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE:     state <= WAIT_EOC;
        WAIT_EOC: if (eoc) begin
                    state <= COUNTING;
                    cnt   <= '0;
                  end
        COUNTING: if (cnt == ($bits(cnt))'(COUNT - 1)) state <= RUN;
                  else                                 cnt   <= cnt + 1'b1;
        RUN:      state <= RUN;
      endcase
    end
  end

  assign mod_start = (state == RUN);

endmodule
