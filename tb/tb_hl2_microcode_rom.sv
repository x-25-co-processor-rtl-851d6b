// tb_hl2_microcode_rom: checks the microprogram ROM and its contents.
// The whole ROM is read through its port.  Known words are compared with
// their encodings worked out by hand: the Rx process starts at 000 with
// MVI T,0000 (040), the Tx process at 200 with CHANGE (010).  Then every
// CJUMP / CCALL (first bit 1) must be followed by a target address that
// holds an instruction, and the unused part of the ROM must read as NOP.
`timescale 1ns/1ps
module tb_hl2_microcode_rom;
  logic [9:0] addr = '0, data;
  hl2_microcode_rom dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [9:0] img [1024];
  initial begin
    int used_rx = 0, used_tx = 0;
    bit targets_ok = 1'b1;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a);
      #1 img[a] = data;
    end
    check(img[0] == 10'h040, "word 000: MVI T,0000");
    check(img[1] == 10'h081, "word 001: MOV STATUS RX 1,T");
    check(img[9] == 10'h358, "word 009: CJUMP on connection bit 0 false");
    check(img[10] == 10'h008, "word 00A: its target");
    check(img[512] == 10'h010, "word 200: CHANGE");
    for (int a = 0; a < 1024; a++) begin
      if (img[a] != 0) begin
        if (a < 512) used_rx++; else used_tx++;
      end
      if (img[a][9] && a < 1023) begin
        if (img[img[a + 1]] == 10'd0) targets_ok = 1'b0;
        a++;
      end
    end
    check(used_rx > 20 && used_tx > 10, $sformatf("programs present: Rx %0d words, Tx %0d words", used_rx, used_tx));
    check(targets_ok, "every branch target holds an instruction");
    check(img[1023] == 10'h000 && img[700] == 10'h000 && img[300] == 10'h000, "unused words are NOP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
