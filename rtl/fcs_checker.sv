// fcs_checker: frame check sequence checker.
//
// The same divider as the generator (x^16 + x^12 + x^5 + 1, preset to
// ones), fed with every bit between the flags, frame check sequence
// included.  For an undisturbed frame the remainder is a fixed constant;
// ok is high while the remainder equals it.  The constant is the F0B8 of
// the checker schematic, read with stage x^15 as the least significant bit.
//
// Timing: preload and the bit strobe act on the next clock edge; ok is
// combinational from the register, so it is valid one clock after the
// strobe of the last FCS bit.
module fcs_checker
  import x25_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic preload,
  input  logic stb,
  input  logic din,
  output logic ok,
  output logic [15:0] rem
);
  logic fb;
  assign fb = din ^ rem[15];
  assign ok = (reverse16(rem) == FCS_GOOD_RESIDUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rem <= '1;
    else if (preload) rem <= '1;
    else if (stb) rem <= {rem[14:0], 1'b0} ^ ({16{fb}} & FCS_TAPS);
  end
endmodule
