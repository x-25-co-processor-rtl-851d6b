// tb_ll2_tx_field_sr: checks the address / control / FRMR shift registers.
// Random nibbles are written to the address (upper half of the first
// octet, lower half zero), control 1 and 2 and FRMR 1..5 registers; then
// 36 shifts must give, first bit first: address nibble, 0000, control 1,
// control 2, FRMR 1..5, each nibble from its bit 3 down.
`timescale 1ns/1ps
module tb_ll2_tx_field_sr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] wdata = '0;
  logic we_addr = 1'b0, we_ctl1 = 1'b0, we_ctl2 = 1'b0, shift = 1'b0;
  logic [4:0] we_frmr = '0;
  logic dout;
  logic [35:0] chain;
  always #5 clk = ~clk;
  ll2_tx_field_sr dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 20; r++) begin
      logic [3:0] nib [9];
      logic [35:0] want;
      automatic bit ok = 1'b1;
      for (int i = 0; i < 9; i++) nib[i] = 4'($urandom);
      nib[1] = 4'b0000;
      for (int i = 0; i < 9; i++) begin
        if (i == 1) continue;
        @(posedge clk);
        wdata <= nib[i];
        we_addr <= (i == 0); we_ctl1 <= (i == 2); we_ctl2 <= (i == 3);
        we_frmr <= (i >= 4) ? 5'(1 << (i - 4)) : 5'd0;
        @(posedge clk);
        we_addr <= 1'b0; we_ctl1 <= 1'b0; we_ctl2 <= 1'b0; we_frmr <= '0;
      end
      want = {nib[0], nib[1], nib[2], nib[3], nib[4], nib[5], nib[6], nib[7], nib[8]};
      for (int i = 35; i >= 0; i--) begin
        @(posedge clk);
        #1 if (dout !== want[i]) ok = 1'b0;
        shift <= 1'b1;
        @(posedge clk) shift <= 1'b0;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL round %0d: want %h", r, want); end
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
