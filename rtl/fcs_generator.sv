// fcs_generator: frame check sequence generator.
//
// A 16 stage shift register (stages x^0 .. x^15) divides the transmitted
// bits by x^16 + x^12 + x^5 + 1.  The feedback, data XOR stage x^15, is
// added into stages x^0, x^5 and x^12.  The register is preset to all ones
// by a preload pulse from the FCS control.  While calc is high the data
// from the transmit manager passes through and is divided; when calc goes
// low the feedback is gated off and the inverted contents of stage x^15 are
// shifted out, x^15 first, for 16 bit times.
//
// Structure (taps, AND gate on the feedback, inverter at the output) from
// the generator schematic; the register length is 16 as drawn there.
// Timing: the register moves on the bit strobe; dout is combinational.
module fcs_generator
  import x25_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic stb,       // bit strobe from the zero inserter
  input  logic preload,   // preset to ones
  input  logic calc,      // 1: divide data, 0: shift FCS out
  input  logic din,       // data from the transmit manager
  output logic dout,      // to the zero inserter
  output logic [15:0] rem // register contents, bit i = stage x^i
);
  logic fb;
  assign fb   = calc & (din ^ rem[15]);
  assign dout = calc ? din : ~rem[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rem <= '1;
    else if (preload) rem <= '1;
    else if (stb) rem <= {rem[14:0], 1'b0} ^ ({16{fb}} & FCS_TAPS);
  end
endmodule
