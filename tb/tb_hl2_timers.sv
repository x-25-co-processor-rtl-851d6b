// tb_hl2_timers: checks the T1 timer, the 1 second pulse and the
// retransmission counter, with a short tick (10 clocks, 4 ticks per
// "second") to keep the run short.
// T1 started with a maximum of m ticks must expire after m ticks (within
// one tick), stay stopped after expiry, not expire when stopped, and
// restart on a new write.  The second pulse must come every 40 clocks.
// The retransmission counter reports overflow once it reaches N2.
`timescale 1ns/1ps
module tb_hl2_timers;
  localparam int TICK = 10, TPS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] t1_max = 8'd5;
  logic t1_wr = 1'b0, t1_stop = 1'b0, retr_wr = 1'b0;
  logic t1_expired, t1_stopped, sec_pulse, retr_ovf;
  logic [3:0] n2_max = 4'd5;
  logic [2:0] retr_wdata = '0, retr_cnt;
  always #5 clk = ~clk;
  hl2_timers #(.TICK_CYCLES(TICK), .TICKS_PER_SEC(TPS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int last_sec = -1, sec_gap_bad = 0, n_sec = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (sec_pulse) begin
      if (last_sec >= 0 && cyc - last_sec != TICK * TPS) sec_gap_bad++;
      last_sec = cyc;
      n_sec++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    check(t1_stopped && !t1_expired, "T1 stopped after reset");
    for (int k = 0; k < 6; k++) begin
      automatic int m = 1 + $urandom % 12;
      automatic int n = 0;
      t1_max <= 8'(m);
      @(posedge clk) begin t1_wr <= 1'b1; t1_stop <= 1'b0; end
      @(posedge clk) t1_wr <= 1'b0;
      #1;
      while (!t1_expired && n < 400) begin @(posedge clk); n++; end
      check(n > (m - 1) * TICK && n <= m * TICK + 1, $sformatf("T1 max %0d expired after %0d clocks", m, n));
      check(t1_stopped, "stopped after expiry");
    end
    @(posedge clk) begin t1_wr <= 1'b1; t1_stop <= 1'b1; end
    @(posedge clk) t1_wr <= 1'b0;
    #1;
    check(!t1_expired, "write clears expiry");
    repeat (300) @(posedge clk);
    check(!t1_expired, "stopped timer does not expire");
    check(n_sec > 5 && sec_gap_bad == 0, $sformatf("second pulse every %0d clocks (%0d pulses)", TICK * TPS, n_sec));
    for (int v = 0; v < 8; v++) begin
      @(posedge clk) begin retr_wr <= 1'b1; retr_wdata <= 3'(v); end
      @(posedge clk) retr_wr <= 1'b0;
      #1;
      check(retr_cnt == 3'(v) && retr_ovf == (v >= 5), $sformatf("retransmission count %0d", v));
    end
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
