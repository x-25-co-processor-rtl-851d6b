// tb_clk_sync: checks the bit clock synchroniser.
// S is toggled at random intervals (at least 3 system clocks per level).
// A reference two-stage delay of S predicts s_sync, and the edge pulses
// must appear exactly one clock wide, two clocks after each edge of S,
// once per edge.
`timescale 1ns/1ps
module tb_clk_sync;
  logic clk = 1'b0, rst_n = 1'b0, s_in = 1'b0;
  logic s_sync, s_rise, s_fall;
  always #5 clk = ~clk;
  clk_sync dut (.*);

  int checks = 0, failures = 0;
  logic d1 = 1'b0, d2 = 1'b0, d3 = 1'b0;
  int rises_in = 0, falls_in = 0, rises_out = 0, falls_out = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (s_sync !== d2 || s_rise !== (d2 & ~d3) || s_fall !== (~d2 & d3)) begin
      failures++;
      $display("FAIL t=%0t sync=%b rise=%b fall=%b ref=%b%b", $time, s_sync, s_rise, s_fall, d2, d3);
    end
    if (s_rise) rises_out++;
    if (s_fall) falls_out++;
  end
  always @(posedge clk) begin
    d1 <= s_in; d2 <= d1; d3 <= d2;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      repeat (3 + $urandom % 20) @(posedge clk);
      s_in <= ~s_in;
      if (!s_in) rises_in++; else falls_in++;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (rises_in != rises_out || falls_in != falls_out) begin
      failures++;
      $display("FAIL edge counts in %0d/%0d out %0d/%0d", rises_in, falls_in, rises_out, falls_out);
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
