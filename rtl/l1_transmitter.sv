// l1_transmitter: X.21 level 1 transmitter.
//
// Drives the C and T lines towards the network and hands the bit clock to
// the low level 2 transmitter.  Three states, as in the description:
//   RESET : level 1 not enabled (X.21 states 22 & 24): C = OFF, T = 0
//   READY : level 1 enabled, receiver has not enabled tx (state 18):
//           C = OFF, T = 1
//   DATA  : enabled and enable_tx from the receiver (state 1): C = ON,
//           T = data from level 2, the bit strobe goes to level 2
// Every state is shown on the lines for at least HOLD_BITS bit times (24 in
// the description) before the next change.
//
// Timing: state, C and T change on the leading edge of S (s_rise).  In DATA
// the block gives tx_stb = s_rise to level 2, which answers in the same
// system clock cycle with txd; T takes that bit at the same clock edge.
// Signals are active high (C = 1 means C is ON).
module l1_transmitter #(
  parameter int unsigned HOLD_BITS = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_rise,
  input  logic enable_l1,
  input  logic enable_tx,
  input  logic txd,        // data from low level 2 (TxD1)
  output logic tx_stb,     // bit strobe to low level 2 (TxC1)
  output logic c_out,
  output logic t_out,
  output logic [1:0] state // 0 reset, 1 ready (18), 2 data (1)
);
  typedef enum logic [1:0] {TX_RESET = 2'd0, TX_READY = 2'd1, TX_DATA = 2'd2} tx_state_e;
  tx_state_e st, nxt;

  localparam int CW = $clog2(HOLD_BITS + 1);
  logic [CW-1:0] hold;
  logic held;
  assign held = (hold >= CW'(HOLD_BITS - 1));   // HOLD_BITS leading edges shown

  always_comb begin
    nxt = st;
    unique case (st)
      TX_RESET: if (enable_l1) nxt = TX_READY;
      TX_READY: if (!enable_l1) nxt = TX_RESET;
                else if (enable_tx) nxt = TX_DATA;
      TX_DATA:  if (!enable_l1) nxt = TX_RESET;
                else if (!enable_tx) nxt = TX_READY;
      default:  nxt = TX_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= TX_RESET;
      hold <= CW'(HOLD_BITS);
      t_out <= 1'b0;
    end else if (s_rise) begin
      if (nxt != st && held) begin
        st <= nxt;
        hold <= '0;
        t_out <= (nxt == TX_READY);
      end else begin
        if (!held) hold <= hold + 1'b1;
        unique case (st)
          TX_DATA:  t_out <= txd;
          TX_READY: t_out <= 1'b1;
          default:  t_out <= 1'b0;
        endcase
      end
    end
  end

  assign tx_stb = (st == TX_DATA && !(nxt != st && held)) ? s_rise : 1'b0;
  assign c_out  = (st == TX_DATA);
  assign state  = st;
endmodule
