// tb_x25_l12_top: end-to-end test of levels 1 and 2 at the default sizes.
//
// The testbench plays the network (DCE) and level 3:
//  - it drives the bit clock S (20 MHz system clock, 48 kbit/s line: one
//    bit every 416 clocks), I = ON and R, and reads C and T;
//  - its own HDLC encoder builds frames (flags, zero insertion, a bitwise
//    CRC-CCITT written in the reflected form, independent of the RTL) and
//    its own decoder takes apart what the chip sends (flag hunting, zero
//    deletion, abort and idle detection, FCS residue F0B8);
//  - as level 3 it sets the link addresses and enables level 2 through the
//    8 bit register port, takes received information bits and supplies the
//    bits of one packet to transmit.
// Scenario: idle on the line -> enable level 2 -> flags -> SABM, expect UA
// -> I frame (with bytes that force zero insertion), expect its bits at
// level 3 and an RR with N(R)=1 -> the same I frame again, expect REJ ->
// undefined control field, expect FRMR -> I frame with a bad FCS, expect
// no reply
// -> abort and idle on the line -> level 3 packet, expect an I frame with
// N(S)=0, N(R)=1 -> RR N(R)=1 from the network, expect the acknowledgement
// in communication register 2 with attention; with the window k = 1 a
// second packet waits until then and follows as N(S)=1; T1 (2 ticks) stays
// quiet for the acknowledged frame and runs out for the second -> DISC,
// expect UA -> connection command from level 3, expect SABM (P = 1) at the
// command address; a UA answer stops T1 and no second SABM follows.
// Every mechanism (idle, flags, zero insertion and deletion, FCS good and bad, abort, idle detection, level 1
// states, process change, subroutine call and return, level 3 data in
// both directions) is counted and must have happened at least once.
// The longest run of one microprogram process between two CHANGEs is
// measured and must stay within 35 microcycles, the budget per process
// and bit at 64 kbit/s.
`timescale 1ns/1ps
module tb_x25_l12_top;
  localparam int HALF_S = 208;          // clocks per half bit
  localparam logic [7:0] A_ADDR = 8'b1100_0000, B_ADDR = 8'b1000_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #25 clk = ~clk;                // 20 MHz

  logic s_in = 1'b0, r_line = 1'b1, i_line = 1'b1;
  logic t_line, c_line;
  logic l3_txd, l3_tx_stb, l3_rxd, l3_rx_stb, l3_rx_frame_end;
  logic [3:0] l3_command = 4'b0000, l3_status;
  logic [2:0] l3_addr = 3'd0;
  logic l3_we = 1'b0;
  logic [7:0] l3_wdata = 8'd0, l3_rdata;
  logic l3_attention;
  logic [1:0] obs_l1_rx_state, obs_l1_tx_state, obs_pattern;
  logic obs_zero_inserted, obs_zero_deleted, obs_tx_in_frame, obs_pattern_done;
  logic obs_frame_end, obs_frame_ok, obs_abort, obs_idle;
  logic obs_proc, obs_change, obs_call, obs_ret;

  x25_l12_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- CRC
  function automatic logic [15:0] crc_step(input logic [15:0] c, input bit b);
    return (c[0] ^ b) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
  endfunction

  // ------------------------------------------------------ DCE transmitter
  bit tx_q[$];                          // bits queued for R
  int fill_idx = 0;                     // position inside the fill flag
  bit send_ones = 1'b0;                 // fill with ones (idle) instead of flags
  int s_cnt = 0;

  task automatic push_bits_stuffed(input bit bits[$]);
    int ones = 0;
    foreach (bits[i]) begin
      tx_q.push_back(bits[i]);
      if (bits[i]) begin
        ones++;
        if (ones == 5) begin tx_q.push_back(1'b0); ones = 0; end
      end else ones = 0;
    end
  endtask

  task automatic push_flag();
    for (int i = 7; i >= 0; i--) tx_q.push_back(x25_pkg::FLAG_PAT[i]);
  endtask

  task automatic send_frame(input logic [7:0] addr, input logic [7:0] ctl,
                            input logic [7:0] info[$], input bit bad_fcs);
    bit bits[$];
    logic [15:0] c = 16'hFFFF;
    for (int i = 7; i >= 0; i--) bits.push_back(addr[i]);
    for (int i = 7; i >= 0; i--) bits.push_back(ctl[i]);
    foreach (info[k]) for (int i = 7; i >= 0; i--) bits.push_back(info[k][i]);
    foreach (bits[i]) c = crc_step(c, bits[i]);
    c = ~c;
    if (bad_fcs) c[3] = ~c[3];
    for (int i = 0; i < 16; i++) bits.push_back(c[i]);
    push_flag();
    push_bits_stuffed(bits);
    push_flag();
  endtask

  // bit clock and R
  logic s_fall_now;
  assign s_fall_now = (s_cnt == HALF_S - 1) && s_in;
  always @(posedge clk) begin
    if (s_cnt == HALF_S - 1) begin
      s_cnt <= 0;
      s_in <= ~s_in;
      if (!s_in) begin                  // rising edge of S: next bit on R
        if (fill_idx == 0 && tx_q.size() > 0) r_line <= tx_q.pop_front();
        else if (send_ones && fill_idx == 0) r_line <= 1'b1;
        else begin
          r_line <= x25_pkg::FLAG_PAT[7 - fill_idx];
          fill_idx <= (fill_idx + 1) % 8;
        end
      end
    end else s_cnt <= s_cnt + 1;
  end

  // ---------------------------------------------------------- DCE receiver
  typedef struct {
    logic [7:0] addr;
    logic [7:0] ctl;
    bit info[$];
  } frame_t;
  frame_t rx_frames[$];
  bit fb[$];
  int ones_in = 0;
  bit hunting = 1'b1;
  int n_idle_seen = 0, n_flag_seen = 0, n_frames_bad = 0, n_c_on = 0;

  task automatic take_frame();
    frame_t f;
    logic [15:0] c = 16'hFFFF;
    if (fb.size() < 32 || fb.size() % 8 != 0) begin
      n_frames_bad++;
      return;
    end
    foreach (fb[i]) c = crc_step(c, fb[i]);
    if (c != 16'hF0B8) begin
      n_frames_bad++;
      return;
    end
    for (int i = 0; i < 8; i++) f.addr[7 - i] = fb[i];
    for (int i = 0; i < 8; i++) f.ctl[7 - i] = fb[8 + i];
    for (int i = 16; i < fb.size() - 16; i++) f.info.push_back(fb[i]);
    rx_frames.push_back(f);
  endtask

  always @(posedge clk) begin
    if (s_fall_now && rst_n) begin
      if (c_line) begin
        n_c_on++;
        if (t_line) begin
          ones_in++;
          if (ones_in == 15) n_idle_seen++;
          if (ones_in == 7) begin hunting = 1'b1; fb.delete(); end
          if (!hunting) fb.push_back(1'b1);
        end else begin
          if (ones_in == 6) begin
            n_flag_seen++;
            if (!hunting) begin
              repeat (6) void'(fb.pop_back());
              void'(fb.pop_back());
              if (fb.size() > 0) take_frame();
            end
            fb.delete();
            hunting = 1'b0;
          end else if (ones_in == 5) begin
            // inserted zero: drop it
          end else if (!hunting) fb.push_back(1'b0);
          ones_in = 0;
        end
      end
    end
  end

  // ----------------------------------------------------------- level 3
  bit l3_rx_bits[$];
  bit l3_rx_done[$][$];
  int n_l3_rx_frames = 0;
  always @(posedge clk) begin
    if (l3_rx_stb) l3_rx_bits.push_back(l3_rxd);
    if (l3_rx_frame_end) begin
      l3_rx_done.push_back(l3_rx_bits);
      l3_rx_bits.delete();
      n_l3_rx_frames++;
    end
  end

  logic [7:0] pkt[$];
  int pkt_idx = 0, n_l3_tx_bits = 0;
  assign l3_txd = (pkt_idx / 8 < pkt.size()) ? pkt[pkt_idx / 8][7 - pkt_idx % 8] : 1'b0;
  always @(posedge clk) begin
    if (l3_tx_stb) begin
      n_l3_tx_bits++;
      l3_command[1] <= 1'b0;                             // packet taken
      if (pkt_idx + 1 >= (pkt.size() - 1) * 8) l3_command[2] <= 1'b1;  // last octet
      pkt_idx <= pkt_idx + 1;
    end
  end

  task automatic l3_write(input logic [2:0] a, input logic [7:0] d);
    @(posedge clk);
    l3_addr <= a; l3_wdata <= d; l3_we <= 1'b1;
    @(posedge clk);
    l3_we <= 1'b0;
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_zi = 0, n_zd = 0, n_fok = 0, n_fbad = 0, n_abort = 0, n_idle = 0;
  int n_change = 0, n_call = 0, n_ret = 0, n_pat_idle = 0, n_pat_flag = 0;
  int n_l1_data = 0;
  int run_clocks = 0, max_run_clocks = 0;   // longest run of one process
  always @(posedge clk) if (rst_n) begin
    run_clocks++;
    if (obs_change) begin
      if (run_clocks > max_run_clocks) max_run_clocks = run_clocks;
      run_clocks = 0;
    end
    if (obs_zero_inserted) n_zi++;
    if (obs_zero_deleted) n_zd++;
    if (obs_frame_end && obs_frame_ok) n_fok++;
    if (obs_frame_end && !obs_frame_ok) n_fbad++;
    if (obs_abort) n_abort++;
    if (obs_idle) n_idle++;
    if (obs_change) n_change++;
    if (obs_call) n_call++;
    if (obs_ret) n_ret++;
    if (obs_pattern_done && obs_pattern == 2'd3) n_pat_idle++;
    if (obs_pattern_done && obs_pattern == 2'd1) n_pat_flag++;
    if (obs_l1_rx_state == 2'd2 && obs_l1_tx_state == 2'd2) n_l1_data++;
  end

  task automatic l3_read(input logic [2:0] a, output logic [7:0] d);
    l3_addr <= a;
    @(posedge clk);
    #1 d = l3_rdata;
  endtask

  task automatic wait_bits(input int n);
    repeat (n * 2 * HALF_S) @(posedge clk);
  endtask

  task automatic expect_frame(input logic [7:0] addr, input logic [7:0] ctl,
                              input logic [7:0] info[$], input string what);
    int t = 0;
    while (rx_frames.size() == 0 && t < 400) begin wait_bits(1); t++; end
    check(rx_frames.size() > 0, {what, ": frame received"});
    if (rx_frames.size() > 0) begin
      automatic frame_t f = rx_frames.pop_front();
      automatic bit ok = (f.info.size() == info.size() * 8);
      check(f.addr == addr, $sformatf("%s: address %b", what, f.addr));
      check(f.ctl == ctl, $sformatf("%s: control %b", what, f.ctl));
      if (ok) foreach (f.info[i]) if (f.info[i] != info[i / 8][7 - i % 8]) ok = 1'b0;
      check(ok, $sformatf("%s: information field (%0d bits)", what, f.info.size()));
    end
  endtask

  logic [7:0] none[$];
  logic [7:0] rd;
  logic [7:0] frmr_info[$];
  int n_frmr = 0, n_t1 = 0, n_ack = 0, n_window_wait = 0, bits_before = 0;
  logic [7:0] data1[$];

  initial begin
    repeat (10) @(posedge clk);
    rst_n <= 1'b1;
    l3_write(3'd4, {B_ADDR[7:4], A_ADDR[7:4]});   // command B, response A
    l3_write(3'd1, 8'h10);                          // window k = 1
    l3_write(3'd3, 8'd2);                           // T1 = 2 ticks (25-50 ms)
    // Level 1 comes up; the chip sends idle until level 2 is enabled.
    wait_bits(120);
    check(c_line == 1'b1, "level 1 reached the data phase (C on)");
    check(n_idle_seen > 0, "idle pattern seen on T");
    check(rx_frames.size() == 0, "no frame before level 2 is enabled");
    l3_write(3'd5, 8'h80);                          // enable level 2
    wait_bits(60);
    check(n_flag_seen > 2, "flags on T after enabling level 2");

    // SABM (P = 1) -> UA (F = 1)
    send_frame(A_ADDR, 8'b1111_1100, none, 1'b0);
    expect_frame(A_ADDR, 8'b1100_1110, none, "UA after SABM");

    // I frame N(S)=0 N(R)=0 with bytes full of ones -> level 3 data + RR N(R)=1
    data1 = '{8'hFF, 8'h7E, 8'h3C, 8'(($urandom % 255) + 1), 8'hF8, 8'h1F};
    send_frame(A_ADDR, 8'b0000_0000, data1, 1'b0);
    expect_frame(A_ADDR, 8'b1000_0100, none, "RR after I frame");
    check(n_l3_rx_frames == 2, "level 3 told of the end of each frame (SABM, I)");
    check(l3_rx_done.size() == 2 && l3_rx_done[0].size() == 0, "no level 3 data from a SABM");
    if (l3_rx_done.size() == 2) begin
      automatic bit ok = (l3_rx_done[1].size() == data1.size() * 8);
      if (ok) foreach (l3_rx_done[1][i]) if (l3_rx_done[1][i] != data1[i / 8][7 - i % 8]) ok = 1'b0;
      check(ok, $sformatf("level 3 got the information field only (%0d bits)", l3_rx_done[1].size()));
    end
    check(l3_status[1] == 1'b1, "level 3 status: packet valid after I frame");
    check(l3_attention == 1'b0, "no attention: nothing acknowledged yet");

    // the same N(S) again: out of sequence -> REJ N(R)=1, no packet valid
    send_frame(A_ADDR, 8'b0000_0000, data1, 1'b0);
    expect_frame(A_ADDR, 8'b1001_0100, none, "REJ after out-of-sequence I frame");
    check(l3_status[1] == 1'b0, "level 3 status: no packet valid after REJ");

    // undefined control field 1101 0000 -> FRMR with the rejected field,
    // V(S)=0, V(R)=1 and W set
    send_frame(A_ADDR, 8'b1101_0000, none, 1'b0);
    frmr_info = '{8'b1101_0000, 8'b0000_0100, 8'b1000_0000};
    expect_frame(A_ADDR, 8'b1110_0001, frmr_info, "FRMR after an undefined control field");
    n_frmr++;

    // bad FCS: no reply
    send_frame(A_ADDR, 8'b0000_0010, data1, 1'b1);
    wait_bits(250);
    check(rx_frames.size() == 0, "no reply to a frame with a bad FCS");
    check(n_fbad >= 1, "bad FCS detected");

    // abort inside a frame, then idle
    push_flag();
    push_bits_stuffed('{1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1});
    repeat (8) tx_q.push_back(1'b1);
    repeat (20) tx_q.push_back(1'b1);
    wait_bits(80);
    check(n_abort >= 1, "abort detected");
    check(n_idle >= 1, "idle detected");
    check(rx_frames.size() == 0, "no reply to an aborted frame");

    // level 3 packet -> I frame N(S)=0, N(R)=1
    pkt = '{8'h01, 8'hFE, 8'hFF, 8'(($urandom % 256)), 8'h55};
    pkt_idx = 0;
    l3_command[1] <= 1'b1;
    expect_frame(B_ADDR, 8'b0000_0100, pkt, "I frame from level 3 data");
    check(n_l3_tx_bits == pkt.size() * 8, $sformatf("level 3 asked for %0d bits", n_l3_tx_bits));
    l3_command[2] <= 1'b0;

    // window k = 1 is full: a second packet has to wait
    bits_before = n_l3_tx_bits;
    pkt = '{8'hA5, 8'h0F, 8'(($urandom % 256))};
    pkt_idx = 0;
    l3_command[1] <= 1'b1;
    wait_bits(150);
    check(rx_frames.size() == 0 && n_l3_tx_bits == bits_before,
          "window full: the second packet waits for an acknowledgement");
    n_window_wait++;

    // RR N(R)=1 from the network acknowledges the first frame -> level 3
    // told, and the window opens for the second packet: N(S)=1, N(R)=1
    check(l3_attention == 1'b0, "no attention before the acknowledgement");
    send_frame(B_ADDR, 8'b1000_0100, none, 1'b0);
    wait_bits(70);
    check(l3_attention == 1'b1, "attention: packet acknowledged");
    l3_read(3'd0, rd);
    check(rd[3:0] == 4'b1001, $sformatf("communication register 2 = %b (flag, N(R) 1)", rd[3:0]));
    l3_write(3'd0, 8'h00);
    @(posedge clk);
    check(l3_attention == 1'b0, "attention cleared by level 3");
    n_ack++;
    l3_read(3'd5, rd);
    check(rd[3] == 1'b0, "T1 stopped by the acknowledgement, not expired");
    expect_frame(B_ADDR, 8'b0100_0100, pkt, "second I frame once the window opened");
    check(n_l3_tx_bits - bits_before == pkt.size() * 8, "level 3 asked for the second packet's bits");
    l3_command[2] <= 1'b0;

    // the second frame is never acknowledged: T1 runs out
    wait_bits(2500);                                // 52 ms
    l3_read(3'd5, rd);
    check(rd[3] == 1'b1, "T1 expired for the unacknowledged frame");
    n_t1++;

    // DISC (P = 1) -> UA (F = 1)
    send_frame(A_ADDR, 8'b1100_1010, none, 1'b0);
    expect_frame(A_ADDR, 8'b1100_1110, none, "UA after DISC");

    // connection command from level 3 -> SABM (P = 1) at the command address;
    // the UA from the other station stops T1 and no second SABM follows
    l3_write(3'd5, 8'hC0);
    expect_frame(B_ADDR, 8'b1111_1100, none, "SABM on the connection command");
    send_frame(B_ADDR, 8'b1100_1110, none, 1'b0);
    wait_bits(2500);
    l3_read(3'd5, rd);
    check(rd[3] == 1'b0, "T1 stopped by the UA to our SABM");
    check(rx_frames.size() == 0, "no second SABM once the link is set up");
    check(n_frames_bad == 0, "every frame from the chip had a good FCS");

    // mechanisms
    check(n_l1_data > 0, "level 1 data phase");
    check(n_ack == 1, "acknowledgement passed to level 3");
    check(n_window_wait == 1, "window full once");
    check(n_t1 == 1, "T1 expiry seen once");
    check(n_frmr == 1, "frame reject sent once");
    check(n_pat_idle > 0, $sformatf("idle patterns sent: %0d", n_pat_idle));
    check(n_pat_flag > 0, $sformatf("flags sent: %0d", n_pat_flag));
    check(n_zi > 0, $sformatf("zeros inserted: %0d", n_zi));
    check(n_zd > 0, $sformatf("zeros deleted: %0d", n_zd));
    check(n_fok >= 3, $sformatf("frames with good FCS: %0d", n_fok));
    check(n_fbad > 0, $sformatf("frames with bad FCS: %0d", n_fbad));
    check(n_abort > 0, $sformatf("aborts received: %0d", n_abort));
    check(n_idle > 0, $sformatf("idles received: %0d", n_idle));
    check(n_change > 0, $sformatf("process changes: %0d", n_change));
    // microcycle budget of one process per bit at 64 kbit/s: 35
    check(max_run_clocks / 5 <= 35,
          $sformatf("longest process run: %0d microcycles", max_run_clocks / 5));
    check(n_call > 0 && n_ret == n_call, $sformatf("calls %0d returns %0d", n_call, n_ret));
    check(n_l3_rx_frames > 0 && n_l3_tx_bits > 0, "level 3 data in both directions");
    $display("mechanisms: idle=%0d flag=%0d zi=%0d zd=%0d fcs_ok=%0d fcs_bad=%0d abort=%0d idle_rx=%0d change=%0d call=%0d ret=%0d longest_run=%0d microcycles",
             n_pat_idle, n_pat_flag, n_zi, n_zd, n_fok, n_fbad, n_abort, n_idle, n_change, n_call, n_ret, max_run_clocks / 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
