// ll2_rx_manager: receive manager of the low level 2 receiver, with the
// control byte register (CONTROL RX 1 and 2).
//
// Started by the leading edge of enable from the pattern recognizer, it
// routes the zero-deleted bits of a frame:
//   bits 1-8   address: deleted (no register is enabled)
//   bits 9-16  control byte: shifted into the control register; after the
//              8th bit a control-valid pulse goes to high level 2
//   bits 17-   into the 16 bit delay line (shift16); what falls out of
//              that line goes to level 3
// At frame end, when enable drops, everything is disabled.  The BUSY /
// reset command of high level 2 stops it as well.
// The control register holds its byte until the next frame's control
// byte; ctl[7:4] is CONTROL RX 1 (first received bit in bit 7).
//
// Timing: moves on the bit strobe from the zero deleter.
module ll2_rx_manager (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       reset,
  input  logic       enable,
  input  logic       stb,
  input  logic       din,
  output logic [7:0] ctl,
  output logic       ev_ctl_valid,
  output logic       shift16,     // shift strobe to the delay line
  output logic       clr16,       // clear the delay line at frame start
  output logic       in_data      // information field in progress
);
  logic en_d;
  logic [4:0] cnt;   // 0..16, saturates at 16 = data phase

  assign clr16        = enable & ~en_d;
  assign in_data      = enable & (cnt == 5'd16);
  assign shift16      = stb & enable & ~reset & (cnt == 5'd16);
  assign ev_ctl_valid = stb & enable & ~reset & (cnt == 5'd15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d <= 1'b0;
      cnt <= '0;
      ctl <= '0;
    end else begin
      en_d <= enable;
      if (reset || !enable) cnt <= '0;
      else if (stb) begin
        if (cnt >= 5'd8 && cnt < 5'd16) ctl <= {ctl[6:0], din};
        if (cnt != 5'd16) cnt <= cnt + 5'd1;
      end
    end
  end
endmodule
