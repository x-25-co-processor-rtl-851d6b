// ll2_zero_deleter: zero deleter of the low level 2 receiver.
//
// Removes the zeros the far transmitter inserted after five consecutive
// ones.  The control counts ones in the enabled data stream; a zero that
// follows five ones is swallowed (its strobe is not passed on).  The count
// restarts on every zero and while enable is low, so it only works on the
// bits between the flags.  The enable itself passes unchanged to the FCS
// check control.
//
// Timing: combinational from strobe to dstb/dout; the counter moves on the
// strobe.  dout is the input bit itself: a zero is deleted only by
// withholding its strobe, which is this design's way of the described
// "skips one clock cycle".
module ll2_zero_deleter (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic stb,
  input  logic din,
  output logic dout,
  output logic dstb,
  output logic deleting   // pulses with the strobe of a deleted zero
);
  logic [2:0] ones;

  assign deleting = stb & enable & (ones == 3'd5) & ~din;
  assign dstb     = stb & enable & ~deleting;
  assign dout     = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ones <= '0;
    else if (!enable) ones <= '0;
    else if (stb) begin
      if (!din) ones <= '0;
      else if (ones != 3'd5) ones <= ones + 3'd1;
    end
  end
endmodule
