// delay_line: N bit shift register between level 2 and level 3 of the
// receiver (16 bits in the design).
//
// Every received bit after the control byte is shifted in; the bit that
// falls out at the far end goes to level 3, but only once N bits have
// entered since the last clear.  When the closing flag ends the frame the
// last N bits, the frame check sequence, are left behind in the register
// and never reach level 3.
//
// Timing: shift and clear act on the next clock edge; dout/dout_stb are
// combinational: dout_stb is high with the shift strobe that pushes a
// valid bit out.
module delay_line #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         shift,
  input  logic         din,
  output logic         dout,
  output logic         dout_stb,
  output logic [N-1:0] contents
);
  localparam int CW = $clog2(N + 1);
  logic [CW-1:0] fill;

  assign dout     = contents[N-1];
  assign dout_stb = shift & (fill == CW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      contents <= '0;
      fill <= '0;
    end else if (clr) begin
      fill <= '0;
    end else if (shift) begin
      contents <= {contents[N-2:0], din};
      if (fill != CW'(N)) fill <= fill + 1'b1;
    end
  end
endmodule
