// tb_ll2_pattern_rec: checks the receive pattern recognizer.
// A line stream is built from flags, random frames (stuffed by a
// reference), a frame with an unknown address, a frame cut by an abort and
// a run of idle ones.  Checked: one flag event per flag sent; address A and
// B events and address valid; the bits passed on with dstb are exactly the
// stuffed bits between the flags of each accepted frame; frame end once
// per accepted frame; one abort and one idle event; nothing passed for the
// unknown address; nothing at all while reset is held.  The idle run also
// counts as an abort when its seventh one arrives.
`timescale 1ns/1ps
module tb_ll2_pattern_rec;
  import x25_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0, stb = 1'b0, din = 1'b0;
  logic dout, dstb, enable, ev_flag, ev_abort, ev_idle, ev_addr_a, ev_addr_b;
  logic ev_addr_valid, ev_frame_end;
  always #5 clk = ~clk;
  ll2_pattern_rec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  bit line[$];
  bit frames[$][$];
  int n_flags_sent = 0;
  task automatic flag();
    for (int i = 7; i >= 0; i--) line.push_back(FLAG_PAT[i]);
    n_flags_sent++;
  endtask
  task automatic frame(input logic [7:0] addr, input int nbytes, input bit keep);
    bit raw[$], st[$];
    int ones = 0;
    for (int i = 7; i >= 0; i--) raw.push_back(addr[i]);
    for (int i = 0; i < nbytes * 8; i++) raw.push_back(($urandom % 4) != 0);
    foreach (raw[i]) begin
      st.push_back(raw[i]);
      if (raw[i]) begin
        ones++;
        if (ones == 5) begin st.push_back(1'b0); ones = 0; end
      end else ones = 0;
    end
    foreach (st[i]) line.push_back(st[i]);
    if (keep) frames.push_back(st);
  endtask

  bit cur[$];
  bit got[$][$];
  int n_flag = 0, n_abort = 0, n_idle = 0, n_a = 0, n_b = 0, n_valid = 0, n_end = 0;
  always @(posedge clk) begin
    if (dstb) cur.push_back(dout);
    if (ev_frame_end) begin got.push_back(cur); cur.delete(); end
    if (ev_abort) cur.delete();
    n_flag += int'(ev_flag); n_abort += int'(ev_abort); n_idle += int'(ev_idle);
    n_a += int'(ev_addr_a); n_b += int'(ev_addr_b); n_valid += int'(ev_addr_valid);
    n_end += int'(ev_frame_end);
  end

  task automatic play();
    foreach (line[i]) begin
      @(posedge clk) begin din <= line[i]; stb <= 1'b1; end
      @(posedge clk) stb <= 1'b0;
    end
    line.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) line.push_back(1'b1);
    flag(); flag();
    frame(ADDR_A, 6, 1'b1); flag();
    frame(ADDR_B, 3, 1'b1); flag();           // shared flag
    frame(8'b0101_0101, 4, 1'b0); flag();     // unknown address
    frame(ADDR_A, 20, 1'b1); flag(); flag();
    frame(ADDR_B, 5, 1'b0);                   // cut by an abort
    line.push_back(1'b0);
    repeat (7) line.push_back(1'b1);
    line.push_back(1'b0);
    flag();
    repeat (20) line.push_back(1'b1);         // idle
    play();
    check(n_flag == n_flags_sent, $sformatf("flags %0d of %0d", n_flag, n_flags_sent));
    check(n_a == 2 && n_b == 2 && n_valid == 4, $sformatf("addresses A=%0d B=%0d valid=%0d", n_a, n_b, n_valid));
    check(n_end == 3 && got.size() == 3, $sformatf("frame ends %0d", n_end));
    for (int k = 0; k < 3 && k < got.size(); k++)
      check(got[k] == frames[k], $sformatf("frame %0d bits passed on (%0d of %0d)", k, got[k].size(), frames[k].size()));
    check(n_abort == 2, $sformatf("aborts %0d (the frame, and the start of the idle run)", n_abort));
    check(n_idle == 1, $sformatf("idles %0d", n_idle));
    check(!enable, "hunting after idle");
    // reset held: nothing is recognised
    reset <= 1'b1;
    n_flag = 0; n_end = 0;
    flag(); frame(ADDR_A, 2, 1'b0); flag();
    play();
    check(n_flag == 0 && n_end == 0 && !enable, "nothing while reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
