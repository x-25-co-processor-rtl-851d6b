// tb_hl2_alu: exhaustive check of the 4 bit ALU of high level 2.
// All 4 x 256 combinations of operation and operands are compared with
// plain integer arithmetic: AND, OR, ADD (carry = bit 4 of the sum) and
// SUB (a - b, carry = borrow).
`timescale 1ns/1ps
module tb_hl2_alu;
  import x25_pkg::*;
  logic [3:0] a, b, y;
  alu_op_e op;
  logic carry;
  hl2_alu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int o = 0; o < 4; o++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int r;
          op = alu_op_e'(o); a = 4'(i); b = 4'(j);
          #1;
          case (o)
            0: r = i & j;
            1: r = i | j;
            2: r = i + j;
            default: r = i - j;
          endcase
          checks++;
          if (y !== 4'(r) || carry !== ((o == 2) ? (r > 15) : (o == 3) ? (r < 0) : 1'b0)) begin
            failures++;
            $display("FAIL op=%0d a=%0d b=%0d y=%0d c=%b", o, i, j, y, carry);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
