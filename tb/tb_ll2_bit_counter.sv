// tb_ll2_bit_counter: checks the receive frame length counter.
// For frame lengths around the limits (below, at and above 32 bits, and
// around the maximum length N1 = 100 set here) the counter is enabled,
// counts that many strobes, and the flags below-32, equal-32 and too-long
// are compared with the length.  Strobes without enable are not counted,
// and a new enable restarts the count.
`timescale 1ns/1ps
module tb_ll2_bit_counter;
  localparam int CW = 12;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0, enable = 1'b0, stb = 1'b0;
  logic [CW-1:0] n1 = CW'(100), count;
  logic lt32, eq32, too_long;
  always #5 clk = ~clk;
  ll2_bit_counter #(.CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    int lens[] = '{0, 8, 31, 32, 33, 99, 100, 101, 200};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (lens[k]) begin
      @(posedge clk) enable <= 1'b1;
      for (int i = 0; i < lens[k]; i++) begin
        @(posedge clk) stb <= 1'b1;
        @(posedge clk) stb <= 1'b0;
        if ($urandom % 3 == 0) @(posedge clk);
      end
      @(posedge clk) enable <= 1'b0;
      repeat (5) begin @(posedge clk) stb <= 1'b1; @(posedge clk) stb <= 1'b0; end
      @(posedge clk);
      checks++;
      if (count != CW'(lens[k]) || lt32 != (lens[k] < 32) || eq32 != (lens[k] == 32)
          || too_long != (lens[k] > 100)) begin
        failures++;
        $display("FAIL length %0d: count=%0d lt=%b eq=%b long=%b", lens[k], count, lt32, eq32, too_long);
      end
    end
    @(posedge clk) reset <= 1'b1;
    @(posedge clk) reset <= 1'b0;
    @(posedge clk);
    checks++;
    if (count != 0) begin failures++; $display("FAIL: reset"); end
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
