// tb_ll2_zero_inserter: checks zero insertion.
// A source with many runs of ones feeds the inserter one bit per upstream
// strobe.  The bits on the line are collected at every line strobe and
// compared with the source sequence stuffed by a reference (a 0 after
// every five consecutive ones).  Asserting mux1 (a flag on the line) must
// restart the count of ones.
`timescale 1ns/1ps
module tb_ll2_zero_inserter;
  logic clk = 1'b0, rst_n = 1'b0, stb = 1'b0, mux1 = 1'b0;
  logic din, dout, up_stb, inserting;
  always #5 clk = ~clk;
  ll2_zero_inserter dut (.*);

  int checks = 0, failures = 0;
  bit src[$], line[$], ref_q[$];
  int idx = 0, n_ins = 0;
  assign din = (idx < src.size()) ? src[idx] : 1'b0;
  always @(posedge clk) begin
    if (stb) line.push_back(dout);
    if (up_stb) idx <= idx + 1;
    if (inserting && stb) n_ins++;
  end

  initial begin
    int ones = 0;
    for (int i = 0; i < 600; i++) src.push_back(($urandom % 8) != 0);
    foreach (src[i]) begin
      ref_q.push_back(src[i]);
      if (src[i]) begin
        ones++;
        if (ones == 5) begin ref_q.push_back(1'b0); ones = 0; end
      end else ones = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (line.size() < ref_q.size()) begin
      @(posedge clk) stb <= 1'b1;
      @(posedge clk) stb <= 1'b0;
    end
    foreach (ref_q[i]) begin
      checks++;
      if (line[i] !== ref_q[i]) begin
        failures++;
        if (failures < 5) $display("FAIL bit %0d: got %b want %b", i, line[i], ref_q[i]);
      end
    end
    checks++;
    if (n_ins == 0) failures++;
    // mux1 clears the count: 4 ones, flag, 4 ones: no insertion
    repeat (2) @(posedge clk);
    line.delete();
    src.delete(); idx = 0;
    repeat (8) src.push_back(1'b1);
    @(posedge clk) mux1 <= 1'b1;
    @(posedge clk) mux1 <= 1'b0;
    repeat (4) begin @(posedge clk) stb <= 1'b1; @(posedge clk) stb <= 1'b0; end
    @(posedge clk) mux1 <= 1'b1;
    @(posedge clk) mux1 <= 1'b0;
    repeat (4) begin @(posedge clk) stb <= 1'b1; @(posedge clk) stb <= 1'b0; end
    @(posedge clk);
    checks++;
    if (line.size() != 8 || line.sum() with (int'(item)) != 8) begin
      failures++;
      $display("FAIL: mux1 did not restart the count (%0d bits)", line.size());
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
