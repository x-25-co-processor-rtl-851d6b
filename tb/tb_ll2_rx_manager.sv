// tb_ll2_rx_manager: checks the receive manager.
// Frames of random bits are fed while enable is high.  The manager must
// skip the 8 address bits, collect the next 8 as the control byte (first
// received bit in bit 7), signal control valid with the strobe of the 16th
// bit, clear the delay line when enable rises and give a delay line shift
// for every bit after the 16th.  With reset held nothing happens.
`timescale 1ns/1ps
module tb_ll2_rx_manager;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0, enable = 1'b0, stb = 1'b0, din = 1'b0;
  logic [7:0] ctl;
  logic ev_ctl_valid, shift16, clr16, in_data;
  always #5 clk = ~clk;
  ll2_rx_manager dut (.*);

  int checks = 0, failures = 0;
  int n_valid = 0, n_shift = 0, n_clr = 0, valid_at = -1, bitno = 0;
  always @(posedge clk) begin
    if (stb) bitno <= bitno + 1;
    if (ev_ctl_valid) begin n_valid++; valid_at = bitno + 1; end
    if (shift16) n_shift++;
    if (clr16) n_clr++;
  end

  task automatic run(input int n, input bit rst);
    automatic logic [7:0] c = '0;
    n_valid = 0; n_shift = 0; n_clr = 0; valid_at = -1; bitno = 0;
    reset <= rst;
    @(posedge clk) enable <= 1'b1;
    for (int i = 0; i < n; i++) begin
      automatic logic b = 1'($urandom);
      if (i >= 8 && i < 16) c = {c[6:0], b};
      @(posedge clk) begin din <= b; stb <= 1'b1; end
      @(posedge clk) stb <= 1'b0;
    end
    @(posedge clk) enable <= 1'b0;
    @(posedge clk);
    checks++;
    if (rst) begin
      if (n_valid != 0 || n_shift != 0) begin failures++; $display("FAIL: activity in reset"); end
    end else if (n_clr != 1 || n_valid != (n >= 16) || (n >= 16 && (valid_at != 16 || ctl != c))
                 || n_shift != ((n > 16) ? n - 16 : 0)) begin
      failures++;
      $display("FAIL n=%0d clr=%0d valid=%0d at %0d ctl=%b want %b shifts=%0d", n, n_clr, n_valid,
               valid_at, ctl, c, n_shift);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run(10, 1'b0);
    run(16, 1'b0);
    for (int k = 0; k < 15; k++) run(17 + $urandom % 80, 1'b0);
    run(40, 1'b1);
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
