// ll2_transmitter: the low level 2 transmitter.
//
// The bit strobe from level 1 climbs the chain
//   pattern generator -> zero inserter -> FCS control -> transmit manager
// and is consumed by the first stage that has something to send: the
// pattern generator while it sends a flag, abort or idle (MUX1 high), the
// zero inserter when it inserts a 0, otherwise the transmit manager, which
// takes the bit from the address/control/FRMR shift registers or from
// level 3 while the FCS generator divides it, or lets the FCS generator
// shift out the frame check sequence.  The bit travels back down the same
// chain to level 1 within one system clock cycle.
module ll2_transmitter
  import x25_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // level 1
  input  logic       tx_stb,
  output logic       txd,
  // high level 2 registers
  input  logic [3:0] cmd_tx1,
  input  logic       cmd_tx1_wr,
  input  logic       frame_end,
  input  logic       soft_reset,
  output logic       frame_end_ack,
  output logic       ready,
  input  logic [3:0] wdata,
  input  logic       fsr_we_addr,
  input  logic       fsr_we_ctl1,
  input  logic       fsr_we_ctl2,
  input  logic [4:0] fsr_we_frmr,
  // level 3
  input  logic       l3_txd,
  output logic       l3_stb,
  // observation
  output logic       zero_inserted,
  output logic       in_frame,
  output pattern_e   pattern,
  output logic       pattern_done
);
  logic     zi_stb, fcs_stb, mgr_dout, fcs_dout, zi_dout;
  logic     mux1, pat_done, fcs_preload, fcs_calc, field_shift, field_bit, inserting;
  pattern_e pat_req, pat_cur;
  logic [15:0] fcs_rem;
  logic [35:0] chain;

  ll2_pattern_gen u_pat (
    .clk, .rst_n, .stb(tx_stb), .req(pat_req), .din(zi_dout), .dout(txd),
    .up_stb(zi_stb), .mux1, .done(pat_done), .cur(pat_cur)
  );

  ll2_zero_inserter u_zi (
    .clk, .rst_n, .stb(zi_stb), .mux1, .din(fcs_dout), .dout(zi_dout),
    .up_stb(fcs_stb), .inserting
  );

  fcs_generator u_fcs (
    .clk, .rst_n, .stb(fcs_stb), .preload(fcs_preload), .calc(fcs_calc),
    .din(mgr_dout), .dout(fcs_dout), .rem(fcs_rem)
  );

  ll2_tx_field_sr u_fsr (
    .clk, .rst_n, .wdata, .we_addr(fsr_we_addr), .we_ctl1(fsr_we_ctl1),
    .we_ctl2(fsr_we_ctl2), .we_frmr(fsr_we_frmr), .shift(field_shift),
    .dout(field_bit), .chain
  );

  ll2_tx_manager u_mgr (
    .clk, .rst_n, .cmd(cmd_tx1), .cmd_wr(cmd_tx1_wr), .frame_end, .soft_reset,
    .frame_end_ack, .stb(fcs_stb), .pat_done, .pat_cur, .pat_req, .fcs_preload,
    .fcs_calc, .field_shift, .field_bit, .l3_txd, .l3_stb, .dout(mgr_dout),
    .ready, .in_frame
  );

  assign zero_inserted = zi_stb & inserting;
  assign pattern       = pat_cur;
  assign pattern_done  = pat_done;
endmodule
