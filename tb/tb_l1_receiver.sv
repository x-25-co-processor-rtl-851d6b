// tb_l1_receiver: checks the X.21 level 1 receiver at the default
// stability time (16 bit times).
// Bit strobes: s_rise and s_fall alternate every 4 clocks.  The test checks
// that the receiver stays disabled without enable, moves to the enabled
// state, waits until I has been stable for 16 bits before entering the
// data state (between 15 and 18 bit times), then passes R on every
// trailing edge, and leaves the data state when I has been OFF for 16
// bits, after which no data passes.
`timescale 1ns/1ps
module tb_l1_receiver;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_rise = 1'b0, s_fall = 1'b0, r_in = 1'b0, i_in = 1'b0, enable_l1 = 1'b0;
  logic rxd, rx_stb, enable_tx;
  logic [1:0] state;
  always #5 clk = ~clk;
  l1_receiver dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // one bit: s_rise, 3 clocks, s_fall, 3 clocks
  int stb_seen = 0;
  bit stb_ok = 1'b1;
  task automatic bit_time();
    @(posedge clk) s_rise <= 1'b1;
    @(posedge clk) s_rise <= 1'b0;
    repeat (2) @(posedge clk);
    s_fall <= 1'b1;
    #1;
    @(posedge clk) s_fall <= 1'b0;
    repeat (2) @(posedge clk);
  endtask
  always @(posedge clk) if (rx_stb) begin
    stb_seen++;
    if (rxd !== r_in || !s_fall) stb_ok = 1'b0;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) bit_time();
    check(state == 2'd0 && !enable_tx, "disabled without enable");
    enable_l1 <= 1'b1;
    bit_time();
    check(state == 2'd1, "enabled state after enable");
    repeat (20) bit_time();
    check(state == 2'd1 && stb_seen == 0, "no data while I is OFF");
    i_in <= 1'b1;
    n = 0;
    while (state != 2'd2 && n < 40) begin bit_time(); n++; end
    check(n >= 15 && n <= 18, $sformatf("data state after %0d bits of stable I", n));
    check(enable_tx, "enable_tx in data state");
    stb_seen = 0;
    for (int i = 0; i < 64; i++) begin
      r_in <= 1'($urandom);
      bit_time();
    end
    check(stb_seen == 64 && stb_ok, $sformatf("64 data bits passed (%0d)", stb_seen));
    // a short glitch on I (3 bits) must not end the data state
    i_in <= 1'b0;
    repeat (3) bit_time();
    i_in <= 1'b1;
    repeat (3) bit_time();
    check(state == 2'd2, "short glitch on I filtered");
    i_in <= 1'b0;
    n = 0;
    while (state == 2'd2 && n < 40) begin bit_time(); n++; end
    check(n >= 15 && n <= 18, $sformatf("left data state after %0d bits of I OFF", n));
    stb_seen = 0;
    repeat (10) bit_time();
    check(stb_seen == 0, "no data after leaving data state");
    enable_l1 <= 1'b0;
    bit_time();
    check(state == 2'd0, "disabled again");
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
