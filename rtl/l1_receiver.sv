// l1_receiver: X.21 level 1 receiver.
//
// Passes the received data on the R line to the low level 2 receiver while
// level 1 is enabled and the network shows I = ON, and tells the level 1
// transmitter when it may send (enable_tx).
//
// A line is only believed after it has been stable: the filtered copies of
// R and I follow the pins once a pin has not changed for STABLE_BITS bit
// times (16 in the description).  "DCE ready" is I low with R = 1.
//
// Three states, as in the description:
//   DISABLED : level 1 not enabled (X.21 states 22 & 24 for a DTE)
//   ENABLED  : level 1 enabled, network not ready (state 18)
//   DATA     : network ready or I on (state 1); enable_tx is high
// Data and the bit strobe go to level 2 only in DATA and only while the
// filtered I line is ON; "DCE ready" alone enables the transmitter but lets
// no bits through.  The description's flow diagram passes data on "DCE
// ready" too; this block follows the prose, which says data waits for I.
//
// Timing: R and I are sampled on the trailing edge of S (s_fall); the state
// and enable_tx change only on a leading edge (s_rise).  rx_stb is a one
// clk strobe coinciding with s_fall, rxd is valid with it.
// Signals are active high: I = 1 means I is ON.
module l1_receiver #(
  parameter int unsigned STABLE_BITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_rise,
  input  logic s_fall,
  input  logic r_in,
  input  logic i_in,
  input  logic enable_l1,
  output logic rxd,        // data to low level 2 receiver
  output logic rx_stb,     // bit strobe to low level 2 receiver (RxC1)
  output logic enable_tx,  // to the level 1 transmitter
  output logic [1:0] state // 0 disabled, 1 enabled (18), 2 data (1)
);
  typedef enum logic [1:0] {RX_DISABLED = 2'd0, RX_ENABLED = 2'd1, RX_DATA = 2'd2} rx_state_e;
  rx_state_e st;

  localparam int CW = $clog2(STABLE_BITS + 1);
  logic [CW-1:0] i_cnt, r_cnt;
  logic i_last, r_last, i_f, r_f;

  // Stability filters, stepped once per bit on the trailing edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_cnt <= '0; r_cnt <= '0;
      i_last <= 1'b0; r_last <= 1'b0;
      i_f <= 1'b0; r_f <= 1'b0;
    end else if (s_fall) begin
      i_last <= i_in;
      r_last <= r_in;
      if (i_in != i_last) i_cnt <= '0;
      else if (i_cnt < CW'(STABLE_BITS)) i_cnt <= i_cnt + 1'b1;
      if (r_in != r_last) r_cnt <= '0;
      else if (r_cnt < CW'(STABLE_BITS)) r_cnt <= r_cnt + 1'b1;
      if (i_in == i_last && i_cnt >= CW'(STABLE_BITS - 1)) i_f <= i_in;
      if (r_in == r_last && r_cnt >= CW'(STABLE_BITS - 1)) r_f <= r_in;
    end
  end

  logic net_ok;
  assign net_ok = i_f | (~i_f & r_f);   // I on, or DCE ready

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= RX_DISABLED;
    else if (s_rise) begin
      unique case (st)
        RX_DISABLED: if (enable_l1) st <= RX_ENABLED;
        RX_ENABLED:  if (!enable_l1) st <= RX_DISABLED;
                     else if (net_ok) st <= RX_DATA;
        RX_DATA:     if (!enable_l1) st <= RX_DISABLED;
                     else if (!net_ok) st <= RX_ENABLED;
        default:     st <= RX_DISABLED;
      endcase
    end
  end

  assign enable_tx = (st == RX_DATA);
  assign rxd       = (st == RX_DATA && i_f) ? r_in : 1'b0;
  assign rx_stb    = (st == RX_DATA && i_f) ? s_fall : 1'b0;
  assign state     = st;
endmodule
