// x25_l12_top: levels 1 and 2 of the single chip X.25 co-processor.
//
// Level 1 (X.21) connects the chip to the network lines S, R, I, C and T.
// The low level 2 transmitter and receiver handle the HDLC frame envelope
// bit by bit: flags, aborts, idles, zero insertion and deletion, the frame
// check sequence, address and control bytes, frame length.  High level 2,
// a microprogrammed controller running a receive and a transmit process,
// manages the logical link through 4 bit registers.  Level 3, the DMA unit
// and the host bus interface are outside this block; their connections
// are brought out as ports:
//   - l3_txd / l3_tx_stb      information field bits for transmission
//   - l3_rxd / l3_rx_stb / l3_rx_frame_end   received information field
//   - l3_command / l3_status  low level 3 command and status lines
//   - l3_addr/we/wdata/rdata, l3_attention   high level 3 register port
// Everything runs on one system clock (about 20 MHz); the network bit
// clock S is sampled and used as a clock enable.
module x25_l12_top #(
  parameter int unsigned STABLE_BITS   = 16,
  parameter int unsigned HOLD_BITS     = 24,
  parameter int unsigned CW            = 12,
  parameter int unsigned TICK_CYCLES   = 500_000,
  parameter int unsigned TICKS_PER_SEC = 40,
  parameter string       ROM_FILE      = "rtl/hl2_microcode.hex"
) (
  input  logic       clk,
  input  logic       rst_n,
  // network (X.21)
  input  logic       s_in,
  input  logic       r_line,
  input  logic       i_line,
  output logic       t_line,
  output logic       c_line,
  // level 3 data
  input  logic       l3_txd,
  output logic       l3_tx_stb,
  output logic       l3_rxd,
  output logic       l3_rx_stb,
  output logic       l3_rx_frame_end,
  // low level 3 command / status
  input  logic [3:0] l3_command,
  output logic [3:0] l3_status,
  // high level 3 register port
  input  logic [2:0] l3_addr,
  input  logic       l3_we,
  input  logic [7:0] l3_wdata,
  output logic [7:0] l3_rdata,
  output logic       l3_attention,
  // observation of internal events (for monitoring and test)
  output logic [1:0] obs_l1_rx_state,
  output logic [1:0] obs_l1_tx_state,
  output logic       obs_zero_inserted,
  output logic       obs_zero_deleted,
  output logic       obs_tx_in_frame,
  output logic [1:0] obs_pattern,
  output logic       obs_pattern_done,
  output logic       obs_frame_end,
  output logic       obs_frame_ok,
  output logic       obs_abort,
  output logic       obs_idle,
  output logic       obs_proc,
  output logic       obs_change,
  output logic       obs_call,
  output logic       obs_ret
);
  import x25_pkg::*;

  // level 1 <-> low level 2
  logic txd, tx_stb, rxd, rx_stb;
  // high level 2 controls
  logic enable_l1, loop, rx_reset, tx_reset, cmd_tx1_wr, tx_frame_end;
  logic [3:0] cmd_tx1, bus_wdata;
  logic fsr_we_addr, fsr_we_ctl1, fsr_we_ctl2;
  logic [4:0] fsr_we_frmr;
  logic [CW-1:0] n1;
  // low level 2 reports
  logic ev_flag, ev_abort, ev_idle, ev_addr_a, ev_addr_b, ev_addr_valid;
  logic ev_ctl_valid, ev_frame_end, frame_ok, lt32, eq32, too_long;
  logic [7:0] rx_ctl;
  logic tx_ready, frame_end_ack;
  pattern_e pattern;

  level1 #(.STABLE_BITS(STABLE_BITS), .HOLD_BITS(HOLD_BITS)) u_l1 (
    .clk, .rst_n, .s_in, .r_line, .i_line, .t_line, .c_line,
    .enable_l1, .loop, .txd, .tx_stb, .rxd, .rx_stb,
    .rx_state(obs_l1_rx_state), .tx_state(obs_l1_tx_state)
  );

  ll2_transmitter u_ll2_tx (
    .clk, .rst_n, .tx_stb, .txd,
    .cmd_tx1, .cmd_tx1_wr, .frame_end(tx_frame_end), .soft_reset(tx_reset),
    .frame_end_ack, .ready(tx_ready), .wdata(bus_wdata),
    .fsr_we_addr, .fsr_we_ctl1, .fsr_we_ctl2, .fsr_we_frmr,
    .l3_txd, .l3_stb(l3_tx_stb),
    .zero_inserted(obs_zero_inserted), .in_frame(obs_tx_in_frame), .pattern,
    .pattern_done(obs_pattern_done)
  );

  ll2_receiver #(.CW(CW)) u_ll2_rx (
    .clk, .rst_n, .rx_stb, .rxd, .reset(rx_reset), .n1,
    .ev_flag, .ev_abort, .ev_idle, .ev_addr_a, .ev_addr_b, .ev_addr_valid,
    .ev_ctl_valid, .ev_frame_end, .frame_ok, .lt32, .eq32, .too_long,
    .ctl(rx_ctl), .l3_rxd, .l3_stb(l3_rx_stb), .l3_frame_end(l3_rx_frame_end),
    .zero_deleted(obs_zero_deleted)
  );

  high_level2 #(.CW(CW), .TICK_CYCLES(TICK_CYCLES), .TICKS_PER_SEC(TICKS_PER_SEC),
                .ROM_FILE(ROM_FILE)) u_hl2 (
    .clk, .rst_n,
    .rx_ev_flag(ev_flag), .rx_ev_abort(ev_abort), .rx_ev_idle(ev_idle),
    .rx_ev_addr_a(ev_addr_a), .rx_ev_addr_b(ev_addr_b),
    .rx_ev_addr_valid(ev_addr_valid), .rx_ev_ctl_valid(ev_ctl_valid),
    .rx_ev_frame_end(ev_frame_end), .rx_frame_ok(frame_ok),
    .rx_lt32(lt32), .rx_eq32(eq32), .rx_too_long(too_long), .rx_ctl,
    .rx_reset, .l1_enable(enable_l1), .l1_loop(loop), .n1,
    .tx_ready, .tx_frame_end_ack(frame_end_ack), .cmd_tx1, .cmd_tx1_wr,
    .tx_frame_end, .tx_reset, .bus_wdata,
    .fsr_we_addr, .fsr_we_ctl1, .fsr_we_ctl2, .fsr_we_frmr,
    .l3_command, .l3_status, .l3_addr, .l3_we, .l3_wdata, .l3_rdata, .l3_attention,
    .proc(obs_proc), .ev_change(obs_change), .ev_call(obs_call), .ev_ret(obs_ret)
  );

  assign obs_pattern   = 2'(pattern);
  assign obs_frame_end = ev_frame_end;
  assign obs_frame_ok  = frame_ok;
  assign obs_abort     = ev_abort;
  assign obs_idle      = ev_idle;
endmodule
