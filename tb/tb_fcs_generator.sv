// tb_fcs_generator: checks the transmit FCS against a reference CRC.
// For random frames (2 to 20 octets) the generator is preset, the octets
// are shifted through with calc = 1, then 16 strobes with calc = 0 shift
// the FCS out.  The reference is the bitwise CRC-CCITT in its reflected
// form (preset FFFF, polynomial 8408, result inverted, sent low bit first),
// written here independently of the RTL's shift direction.  The data bits
// must pass unchanged, and a receiver running over data and FCS must end
// with the residue F0B8.
`timescale 1ns/1ps
module tb_fcs_generator;
  logic clk = 1'b0, rst_n = 1'b0, stb = 1'b0, preload = 1'b0, calc = 1'b1, din = 1'b0;
  logic dout;
  logic [15:0] rem;
  always #5 clk = ~clk;
  fcs_generator dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [15:0] crc_step(input logic [15:0] c, input bit b);
    return (c[0] ^ b) ? ((c >> 1) ^ 16'h8408) : (c >> 1);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 40; f++) begin
      automatic bit data[$], out[$];
      automatic logic [15:0] c = 16'hFFFF, r = 16'hFFFF;
      automatic int n = 8 * (2 + $urandom % 19);
      automatic bit ok = 1'b1;
      for (int i = 0; i < n; i++) data.push_back(1'($urandom));
      foreach (data[i]) c = crc_step(c, data[i]);
      c = ~c;
      @(posedge clk) preload <= 1'b1;
      @(posedge clk) preload <= 1'b0;
      calc <= 1'b1;
      for (int i = 0; i < n + 16; i++) begin
        @(posedge clk);
        if (i == n) calc <= 1'b0;
        din <= (i < n) ? data[i] : 1'($urandom);
        stb <= 1'b1;
        #1 out.push_back(dout);
        @(posedge clk) stb <= 1'b0;
      end
      calc <= 1'b1;
      for (int i = 0; i < n; i++) if (out[i] !== data[i]) ok = 1'b0;
      checks++;
      if (!ok) begin failures++; $display("FAIL frame %0d: data changed", f); end
      ok = 1'b1;
      for (int i = 0; i < 16; i++) if (out[n + i] !== c[i]) ok = 1'b0;
      checks++;
      if (!ok) begin failures++; $display("FAIL frame %0d: FCS differs from reference %h", f, c); end
      foreach (out[i]) r = crc_step(r, out[i]);
      checks++;
      if (r != 16'hF0B8) begin failures++; $display("FAIL frame %0d: residue %h", f, r); end
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
