// tb_ll2_zero_deleter: checks zero deletion.
// A random source with many runs of ones is stuffed by a reference (a 0
// after five ones) and fed to the deleter one bit per strobe.  The bits
// passed on with dstb must equal the source, and deleting must pulse once
// per inserted zero.  Without enable nothing passes.
`timescale 1ns/1ps
module tb_ll2_zero_deleter;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, stb = 1'b0, din = 1'b0;
  logic dout, dstb, deleting;
  always #5 clk = ~clk;
  ll2_zero_deleter dut (.*);

  int checks = 0, failures = 0;
  bit got[$];
  int n_del = 0;
  always @(posedge clk) begin
    if (dstb) got.push_back(dout);
    if (deleting) n_del++;
  end

  initial begin
    bit src[$], line[$];
    int ones = 0, n_ins = 0;
    for (int i = 0; i < 800; i++) src.push_back(($urandom % 8) != 0);
    foreach (src[i]) begin
      line.push_back(src[i]);
      if (src[i]) begin
        ones++;
        if (ones == 5) begin line.push_back(1'b0); ones = 0; n_ins++; end
      end else ones = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) begin @(posedge clk) begin din <= 1'b1; stb <= 1'b1; end @(posedge clk) stb <= 1'b0; end
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL: data passed without enable"); end
    @(posedge clk) enable <= 1'b1;
    foreach (line[i]) begin
      @(posedge clk) begin din <= line[i]; stb <= 1'b1; end
      @(posedge clk) stb <= 1'b0;
    end
    @(posedge clk);
    checks++;
    if (got.size() != src.size()) begin failures++; $display("FAIL: %0d bits out, %0d in", got.size(), src.size()); end
    else foreach (src[i]) begin
      checks++;
      if (got[i] !== src[i]) begin
        failures++;
        if (failures < 5) $display("FAIL at bit %0d", i);
      end
    end
    checks++;
    if (n_del != n_ins) begin failures++; $display("FAIL: %0d deletions, %0d insertions", n_del, n_ins); end
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
