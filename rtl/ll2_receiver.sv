// ll2_receiver: the low level 2 receiver.
//
// Bits from level 1 pass the pattern recognizer (8 bit delay, flag /
// address / abort / idle detection), the zero deleter, and then feed in
// parallel the FCS checker, the bit counter and the receive manager.  The
// receive manager drops the address, catches the control byte and sends
// the information field through the 16 bit delay line to level 3, so the
// frame check sequence stays behind.
//
// The FCS check control presets the checker on the leading edge of enable.
// The frame-end report to high level 2 (ev_frame_end) comes one clock after
// the closing flag is recognized, once the checker and the counter have
// taken the last bit; frame_ok and the length flags are valid with it.
// Level 3 gets l3_frame_end at the same time.
module ll2_receiver #(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_stb,
  input  logic          rxd,
  input  logic          reset,       // COMMAND RX reset (= busy)
  input  logic [CW-1:0] n1,
  output logic          ev_flag,
  output logic          ev_abort,
  output logic          ev_idle,
  output logic          ev_addr_a,
  output logic          ev_addr_b,
  output logic          ev_addr_valid,
  output logic          ev_ctl_valid,
  output logic          ev_frame_end,
  output logic          frame_ok,
  output logic          lt32,
  output logic          eq32,
  output logic          too_long,
  output logic [7:0]    ctl,
  output logic          l3_rxd,
  output logic          l3_stb,
  output logic          l3_frame_end,
  output logic          zero_deleted
);
  logic pr_dout, pr_dstb, enable, pr_frame_end;
  logic zd_dout, zd_dstb;
  logic en_d, shift16, clr16, in_data;
  logic [15:0] dl_contents;
  logic [15:0] fcs_rem;
  logic [CW-1:0] count;

  ll2_pattern_rec u_pr (
    .clk, .rst_n, .reset, .stb(rx_stb), .din(rxd), .dout(pr_dout), .dstb(pr_dstb),
    .enable, .ev_flag, .ev_abort, .ev_idle, .ev_addr_a, .ev_addr_b, .ev_addr_valid,
    .ev_frame_end(pr_frame_end)
  );

  ll2_zero_deleter u_zd (
    .clk, .rst_n, .enable, .stb(pr_dstb), .din(pr_dout), .dout(zd_dout),
    .dstb(zd_dstb), .deleting(zero_deleted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d <= 1'b0;
      ev_frame_end <= 1'b0;
    end else begin
      en_d <= enable;
      ev_frame_end <= pr_frame_end;
    end
  end

  fcs_checker u_fcs (
    .clk, .rst_n, .preload(enable & ~en_d), .stb(zd_dstb), .din(zd_dout),
    .ok(frame_ok), .rem(fcs_rem)
  );

  ll2_bit_counter #(.CW(CW)) u_cnt (
    .clk, .rst_n, .reset, .enable, .stb(zd_dstb), .n1, .count, .lt32, .eq32, .too_long
  );

  ll2_rx_manager u_mgr (
    .clk, .rst_n, .reset, .enable, .stb(zd_dstb), .din(zd_dout), .ctl,
    .ev_ctl_valid, .shift16, .clr16, .in_data
  );

  delay_line #(.N(16)) u_dl (
    .clk, .rst_n, .clr(clr16), .shift(shift16), .din(zd_dout),
    .dout(l3_rxd), .dout_stb(l3_stb), .contents(dl_contents)
  );

  assign l3_frame_end = ev_frame_end;
endmodule
