// ll2_pattern_rec: pattern recognizer of the low level 2 receiver.
//
// Received bits enter an 8 bit shift register.  Its contents are compared
// with the flag (0111 1110) and the A, B, C and D addresses, and a counter
// of consecutive ones finds abort (seven ones) and idle (fifteen ones).
// After a flag the next 8 bits must be an address: an A or B address (or a
// C or D multilink address) enables the machines behind the recognizer,
// anything else sends it back to flag hunting.  While enabled, the bit that
// falls out of the shift register goes on to the zero deleter; because of
// the 8 bit delay the closing flag never leaves the register.  A flag seen
// while enabled is the closing flag: frame_end, and the recognizer is
// ready for the address of the next frame (a shared flag).  An abort stops
// the frame and starts flag hunting.  While reset (the BUSY command of high
// level 2) is high the recognizer stays in flag hunting and reports nothing.
//
// Timing: all events are one clock pulses with the bit strobe that
// completes the pattern.  On the strobe that completes the closing flag,
// the last bit before that flag is still passed on (dstb) together with
// frame_end.  The pattern values of C and D are not in the description and
// come from the X.75 multilink procedure.
module ll2_pattern_rec
  import x25_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic reset,       // BUSY / reset from COMMAND RX
  input  logic stb,         // bit strobe from level 1
  input  logic din,
  output logic dout,        // delayed data to the zero deleter
  output logic dstb,        // its strobe (only while enabled)
  output logic enable,      // frame in progress
  output logic ev_flag,
  output logic ev_abort,
  output logic ev_idle,
  output logic ev_addr_a,
  output logic ev_addr_b,
  output logic ev_addr_valid,
  output logic ev_frame_end
);
  typedef enum logic [1:0] {P_HUNT = 2'd0, P_ADDR = 2'd1, P_FRAME = 2'd2} prec_state_e;
  prec_state_e st;

  logic [7:0] sr, sr_n;
  logic [3:0] ones, ones_n;
  logic [2:0] cnt;

  assign sr_n   = {sr[6:0], din};
  assign ones_n = din ? ((ones == 4'd15) ? ones : ones + 4'd1) : 4'd0;
  assign enable = (st == P_FRAME);
  assign dout   = sr[7];

  logic go;
  assign go = stb & ~reset;

  logic is_flag, is_abort, is_idle, is_a, is_b, is_cd;
  assign is_flag  = (sr_n == FLAG_PAT);
  assign is_abort = din && ones == 4'd6;
  assign is_idle  = din && ones == 4'd14;
  assign is_a     = (sr_n == ADDR_A);
  assign is_b     = (sr_n == ADDR_B);
  assign is_cd    = (sr_n == ADDR_C) || (sr_n == ADDR_D);

  logic addr_slot;
  assign addr_slot = (st == P_ADDR) && (cnt == 3'd7) && !is_flag;

  assign dstb          = go & (st == P_FRAME);
  assign ev_flag       = go & is_flag;
  assign ev_abort      = go & is_abort;
  assign ev_idle       = go & is_idle;
  assign ev_frame_end  = go & is_flag & (st == P_FRAME);
  assign ev_addr_a     = go & addr_slot & is_a;
  assign ev_addr_b     = go & addr_slot & is_b;
  assign ev_addr_valid = go & addr_slot & (is_a | is_b | is_cd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_HUNT;
      sr <= '0;
      ones <= '0;
      cnt <= '0;
    end else if (reset) begin
      st <= P_HUNT;
      sr <= '0;
      ones <= '0;
      cnt <= '0;
    end else if (stb) begin
      sr <= sr_n;
      ones <= ones_n;
      if (is_flag) begin
        st <= P_ADDR;
        cnt <= '0;
      end else if (is_abort || is_idle) begin
        st <= P_HUNT;
      end else if (st == P_ADDR) begin
        if (cnt == 3'd7) st <= (is_a | is_b | is_cd) ? P_FRAME : P_HUNT;
        cnt <= cnt + 3'd1;
      end
    end
  end
endmodule
