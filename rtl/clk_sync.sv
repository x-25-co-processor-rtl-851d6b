// clk_sync: level 1 clock synchronizer.
//
// The network delivers its bit clock S (typically 48 kHz, at most 64 kHz)
// asynchronously to the chip.  This block samples S with the fast system
// clock (about 20 MHz) through two flip-flops and turns its edges into
// one-system-clock strobes.  All bit-serial logic of levels 1 and 2 runs on
// the system clock and uses these strobes as clock enables, so that every
// "clock" of the bit-serial machines changes only on a system clock edge,
// as the design asks for the outgoing clock.
//
//   s_rise : leading edge of S   (transmit data may change)
//   s_fall : trailing edge of S  (received data is valid and is sampled)
//
// Latency: a strobe appears two to three system clocks after the edge of S.
// The two-flip-flop synchronizer and the strobe form are this design's own
// choice; the description only asks for high-rate sampling of S.
module clk_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic s_in,     // asynchronous bit clock from the network
  output logic s_sync,   // synchronized level of S
  output logic s_rise,   // one clk pulse per leading edge
  output logic s_fall    // one clk pulse per trailing edge
);
  logic meta, sync, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      sync <= 1'b0;
      prev <= 1'b0;
    end else begin
      meta <= s_in;
      sync <= meta;
      prev <= sync;
    end
  end

  assign s_sync = sync;
  assign s_rise = sync & ~prev;
  assign s_fall = ~sync & prev;
endmodule
