// hl2_alu: 4 bit ALU of high level 2.
//
// Works on the accumulator (a) and the temporary register (b) and performs
// AND, OR, ADD and SUB, all modulo 16.  carry reports an overflow of ADD
// or a borrow of SUB (a < b); it is 0 for AND and OR.
// Purely combinational; the result is written to the accumulator by the
// microcontroller.
module hl2_alu
  import x25_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  alu_op_e    op,
  output logic [3:0] y,
  output logic       carry
);
  logic [4:0] wide;
  always_comb begin
    wide = '0;
    unique case (op)
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_ADD: wide = {1'b0, a} + {1'b0, b};
      ALU_SUB: wide = {1'b0, a} - {1'b0, b};
      default: wide = '0;
    endcase
  end
  assign y     = wide[3:0];
  assign carry = wide[4];
endmodule
