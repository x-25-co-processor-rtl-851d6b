// level1: the physical level (X.21) of the co-processor.
//
// Four units: the clock synchronizer for the network bit clock S, the
// receiver, the transmitter and the test loop.  The receiver decides from
// the I and R lines whether the network is ready and enables the
// transmitter; the transmitter shows the chip's readiness on C and T and,
// once in the data transfer state, takes one bit per leading edge of S from
// the low level 2 transmitter.  Received bits go to the low level 2
// receiver with a strobe on the trailing edge of S.  With loop set, T and
// C are fed back into R and I and the network sees "not ready".
module level1 #(
  parameter int unsigned STABLE_BITS = 16,
  parameter int unsigned HOLD_BITS   = 24
) (
  input  logic clk,
  input  logic rst_n,
  // network side
  input  logic s_in,
  input  logic r_line,
  input  logic i_line,
  output logic t_line,
  output logic c_line,
  // control from high level 2
  input  logic enable_l1,
  input  logic loop,
  // low level 2 side
  input  logic txd,
  output logic tx_stb,
  output logic rxd,
  output logic rx_stb,
  output logic [1:0] rx_state,
  output logic [1:0] tx_state
);
  logic s_sync, s_rise, s_fall;
  logic r_chip, i_chip, t_chip, c_chip, enable_tx;

  clk_sync u_sync (.clk, .rst_n, .s_in, .s_sync, .s_rise, .s_fall);

  l1_testloop u_loop (
    .loop, .r_line, .i_line, .t_line, .c_line,
    .t_chip, .c_chip, .r_chip, .i_chip
  );

  l1_receiver #(.STABLE_BITS(STABLE_BITS)) u_rx (
    .clk, .rst_n, .s_rise, .s_fall, .r_in(r_chip), .i_in(i_chip),
    .enable_l1, .rxd, .rx_stb, .enable_tx, .state(rx_state)
  );

  l1_transmitter #(.HOLD_BITS(HOLD_BITS)) u_tx (
    .clk, .rst_n, .s_rise, .enable_l1, .enable_tx, .txd, .tx_stb,
    .c_out(c_chip), .t_out(t_chip), .state(tx_state)
  );
endmodule
