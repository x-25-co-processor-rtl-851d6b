// ll2_bit_counter: frame length counter of the low level 2 receiver.
//
// Counts the bits between the leading and the closing flag after zero
// deletion (address, control, information and FCS).  It restarts on the
// leading edge of enable and on reset, counts while enable is high and
// holds its value afterwards so high level 2 can read the result:
//   lt32     fewer than 32 bits: not a valid frame
//   eq32     exactly 32 bits: a frame without information field
//   too_long more than N1 bits (N1 is loaded by level 3); compared
//            continuously with the counter
// The counter saturates at its maximum.
//
// Timing: counts on the bit strobe; outputs are combinational from the
// counter.  The counter width is this design's own choice.
module ll2_bit_counter #(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset,
  input  logic          enable,
  input  logic          stb,
  input  logic [CW-1:0] n1,
  output logic [CW-1:0] count,
  output logic          lt32,
  output logic          eq32,
  output logic          too_long
);
  logic en_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      en_d <= 1'b0;
    end else begin
      en_d <= enable;
      if (reset || (enable && !en_d)) count <= '0;
      else if (enable && stb && count != '1) count <= count + 1'b1;
    end
  end

  assign lt32     = (count < CW'(32));
  assign eq32     = (count == CW'(32));
  assign too_long = (count > n1);
endmodule
