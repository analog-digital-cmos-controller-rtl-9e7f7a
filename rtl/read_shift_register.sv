// read_shift_register: parallel-in serial-out monitor register.
//
// While get_bit is low the register reloads d on every clock, tracking the
// ADC samples, gain codes and DAC words of all channels. While get_bit is
// high the content is frozen and each rising edge of read_bit shifts it one
// place towards bit 0; out_bit is bit 0, so the bits leave in index order,
// d[0] first, at whatever pace the external reader chooses.
//
// get_bit and read_bit come from pads and are asynchronous: each passes
// through a two-flip-flop synchroniser, and the rising edge of read_bit is
// detected in the clk domain, so read_bit must stay high and low for at least
// two clocks each. The freeze-and-shift scheme is the controller's; the
// polarity of get_bit (the description is not consistent on it), the
// synchronisers and the bit order are this design's.
module read_shift_register #(
  parameter int unsigned W = 259
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  input  logic         get_bit,
  input  logic         read_bit,
  output logic         out_bit
);

  logic [1:0]   get_sync, read_sync;
  logic         read_q;
  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    get_sync  <= {get_sync[0], get_bit};
    read_sync <= {read_sync[0], read_bit};
    read_q    <= read_sync[1];
    if (!get_sync[1])                     sr <= d;
    else if (read_sync[1] && !read_q)     sr <= {1'b0, sr[W-1:1]};
  end

  assign out_bit = sr[0];

endmodule
