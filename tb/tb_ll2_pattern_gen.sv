// tb_ll2_pattern_gen: checks the flag, abort and idle generator.
// A strobe is given every 3 clocks.  With a flag request the line must
// carry 01111110 repeated with a done pulse on each eighth bit; an abort is
// seven ones, an idle fifteen ones, each with done on its last bit.  A
// request withdrawn in the middle of a pattern must not cut it short.
// Without a request the generator must pass data and strobe straight
// through to the zero inserter side.
`timescale 1ns/1ps
module tb_ll2_pattern_gen;
  import x25_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, stb = 1'b0, din = 1'b0;
  pattern_e req = PAT_NONE;
  logic dout, up_stb, mux1, done;
  pattern_e cur;
  always #5 clk = ~clk;
  ll2_pattern_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // one strobe; returns the bit on the line and whether done was raised
  task automatic step(output logic b, output logic d, output logic u);
    @(posedge clk) stb <= 1'b1;
    #1 b = dout; d = done; u = up_stb;
    @(posedge clk) stb <= 1'b0;
    @(posedge clk);
  endtask

  task automatic expect_pattern(input pattern_e p, input int len, input logic [14:0] bits,
                                input bit drop_req);
    logic b, d, u;
    bit ok = 1'b1;
    req <= p;
    for (int i = 0; i < len; i++) begin
      if (drop_req && i == 2) req <= PAT_NONE;
      step(b, d, u);
      if (b !== bits[len - 1 - i] || d !== (i == len - 1) || u !== 1'b0) ok = 1'b0;
    end
    check(ok, $sformatf("pattern %0d of %0d bits", p, len));
  endtask

  initial begin
    logic b, d, u;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) expect_pattern(PAT_FLAG, 8, 15'b01111110, 1'b0);
    expect_pattern(PAT_ABORT, 7, 15'b1111111, 1'b0);
    expect_pattern(PAT_IDLE, 15, 15'h7fff, 1'b0);
    expect_pattern(PAT_FLAG, 8, 15'b01111110, 1'b1);   // request dropped mid-flag
    check(!mux1, "line free after the pattern");
    ok = 1'b1;
    req <= PAT_NONE;
    for (int i = 0; i < 50; i++) begin
      din <= 1'($urandom);
      #1;
      if (dout !== din) ok = 1'b0;
      step(b, d, u);
      if (d || !u) ok = 1'b0;
    end
    check(ok, "data and strobe passed through without a request");
    expect_pattern(PAT_IDLE, 15, 15'h7fff, 1'b1);
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
