// tb_delay_line: checks the 16 bit delay line that holds back the FCS.
// Random bits are shifted in at random intervals.  After a clear the first
// 16 shifts give no output strobe; from then on every shift outputs the
// bit shifted in 16 shifts earlier.  So of an n bit field only the first
// n-16 bits come out, which is how the FCS is kept from level 3.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift = 1'b0, din = 1'b0;
  logic dout, dout_stb;
  logic [N-1:0] contents;
  always #5 clk = ~clk;
  delay_line #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 20; f++) begin
      automatic bit in[$], out[$];
      automatic int n = $urandom % 60;
      @(posedge clk) clr <= 1'b1;
      @(posedge clk) clr <= 1'b0;
      for (int i = 0; i < n; i++) begin
        @(posedge clk) begin din <= 1'($urandom); shift <= 1'b1; end
        #1 in.push_back(din);
        if (dout_stb) out.push_back(dout);
        @(posedge clk) shift <= 1'b0;
        repeat ($urandom % 3) @(posedge clk);
      end
      checks++;
      if (out.size() != ((n > N) ? n - N : 0)) begin
        failures++;
        $display("FAIL frame %0d: %0d bits out of %0d", f, out.size(), n);
      end else foreach (out[i]) if (out[i] !== in[i]) begin
        failures++;
        $display("FAIL frame %0d bit %0d", f, i);
        break;
      end
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
