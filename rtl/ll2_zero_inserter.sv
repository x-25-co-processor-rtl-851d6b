// ll2_zero_inserter: zero inserter with its control.
//
// Between an opening and a closing flag a 0 is inserted after every run of
// five 1s, so that data can never look like a flag, abort or idle.  The
// control counts the 1s passing from TXD2 to TXD2A; after five it makes the
// ZERO INSERT line true, sends a 0 and withholds the bit strobe from the
// FCS control for that bit.  The count restarts after an inserted zero, on
// a data zero and while MUX1 (pattern generator busy) is high.
//
// Timing: one bit per strobe, combinational from strobe to up_stb/dout;
// the 1s counter changes on the strobe.
module ll2_zero_inserter (
  input  logic clk,
  input  logic rst_n,
  input  logic stb,        // bit strobe from the pattern generator
  input  logic mux1,       // pattern generator busy: restart counting
  input  logic din,        // TXD2: data from the FCS generator
  output logic dout,       // TXD2A
  output logic up_stb,     // bit strobe passed to the FCS control
  output logic inserting   // ZERO INSERT line
);
  logic [2:0] ones;

  assign inserting = (ones == 3'd5);
  assign dout      = inserting ? 1'b0 : din;
  assign up_stb    = stb & ~inserting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ones <= '0;
    else if (mux1) ones <= '0;
    else if (stb) begin
      if (inserting || !din) ones <= '0;
      else ones <= ones + 3'd1;
    end
  end
endmodule
