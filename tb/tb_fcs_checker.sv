// tb_fcs_checker: checks the receive FCS checker.
// Random frames get a correct FCS from a reference CRC (reflected form,
// preset FFFF, polynomial 8408, inverted, low bit first).  After data and
// FCS have been shifted in, ok must be high; with one bit of the frame
// flipped at a random place it must be low.
`timescale 1ns/1ps
module tb_fcs_checker;
  logic clk = 1'b0, rst_n = 1'b0, stb = 1'b0, preload = 1'b0, din = 1'b0;
  logic ok;
  logic [15:0] rem;
  always #5 clk = ~clk;
  fcs_checker dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [15:0] crc_step(input logic [15:0] c, input bit b);
    return (c[0] ^ b) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 60; f++) begin
      automatic bit bits[$];
      automatic logic [15:0] c = 16'hFFFF;
      automatic int n = 8 * (2 + $urandom % 19);
      automatic bit bad = f[0];
      for (int i = 0; i < n; i++) bits.push_back(1'($urandom));
      foreach (bits[i]) c = crc_step(c, bits[i]);
      c = ~c;
      for (int i = 0; i < 16; i++) bits.push_back(c[i]);
      if (bad) begin
        automatic int k = $urandom % bits.size();
        bits[k] = ~bits[k];
      end
      @(posedge clk) preload <= 1'b1;
      @(posedge clk) preload <= 1'b0;
      foreach (bits[i]) begin
        @(posedge clk) begin din <= bits[i]; stb <= 1'b1; end
        @(posedge clk) stb <= 1'b0;
      end
      @(posedge clk);
      checks++;
      if (ok !== !bad) begin
        failures++;
        $display("FAIL frame %0d (bad=%b): ok=%b rem=%h", f, bad, ok, rem);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
