// tb_l1_transmitter: checks the X.21 level 1 transmitter at the default
// hold time (24 bit times).
// After reset C and T are OFF.  Enable gives the ready state (C OFF, T ON)
// at the next leading edge; enable_tx gives the data state only after the
// ready state has been shown for 24 bits.  In the data state C is ON, a bit
// strobe goes out with every leading edge and T carries the bit given with
// that strobe.  Dropping enable_tx returns to ready after the hold time.
`timescale 1ns/1ps
module tb_l1_transmitter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_rise = 1'b0, enable_l1 = 1'b0, enable_tx = 1'b0, txd = 1'b0;
  logic tx_stb, c_out, t_out;
  logic [1:0] state;
  always #5 clk = ~clk;
  l1_transmitter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int stb_seen = 0;
  bit t_ok = 1'b1;
  logic exp_t;
  always @(posedge clk) if (tx_stb) begin
    stb_seen++;
    txd <= 1'($urandom);
    exp_t <= txd;
  end
  task automatic bit_time();
    @(posedge clk) s_rise <= 1'b1;
    @(posedge clk) s_rise <= 1'b0;
    repeat (6) @(posedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) bit_time();
    check(!c_out && !t_out && state == 2'd0, "reset state: C OFF, T OFF");
    enable_l1 <= 1'b1;
    enable_tx <= 1'b1;
    bit_time();
    check(state == 2'd1 && !c_out && t_out, "ready state: C OFF, T ON");
    n = 1;
    while (state != 2'd2 && n < 60) begin bit_time(); n++; end
    check(n == 25, $sformatf("data state after %0d bits (ready held 24)", n));
    check(c_out, "C ON in data state");
    stb_seen = 0;
    for (int i = 0; i < 40; i++) begin
      bit_time();
      check(t_out == exp_t, "T carries the bit given with the strobe");
    end
    check(stb_seen == 40, $sformatf("one strobe per bit (%0d)", stb_seen));
    enable_tx <= 1'b0;
    n = 0;
    while (state != 2'd1 && n < 60) begin bit_time(); n++; end
    check(n == 1, "back to ready at once when data state held long enough");
    check(!c_out && t_out, "C OFF, T ON again");
    stb_seen = 0;
    enable_tx <= 1'b1;
    n = 0;
    while (state != 2'd2 && n < 60) begin bit_time(); n++; end
    check(n == 24, $sformatf("ready state held 24 bits again (%0d)", n));
    enable_l1 <= 1'b0;
    enable_tx <= 1'b0;
    n = 0;
    while (state != 2'd0 && n < 60) begin bit_time(); n++; end
    check(n == 24 && !c_out && !t_out, $sformatf("reset state after hold (%0d)", n));
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
