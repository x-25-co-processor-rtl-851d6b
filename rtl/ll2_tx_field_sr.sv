// ll2_tx_field_sr: address, control and FRMR shift registers of the
// low level 2 transmitter.
//
// Nine 4 bit registers written by high level 2 over its 4 bit bus and
// chained into one 36 bit shift register:
//   ADDRESS TX 1, ADDRESS TX 2, CONTROL TX 1, CONTROL TX 2, FRMR 1 .. 5.
// Everything leaves through the last bit of the address register: first
// the 8 address bits, then the control byte (which has moved into the
// address registers), then the 24 bits of FRMR information (the five FRMR
// nibbles and four zeros that enter at the free end of the chain).
// ADDRESS TX 2 always holds zeros: it is cleared whenever ADDRESS TX 1 is
// written.  The first transmitted bit of each nibble is its bit 3.
//
// Timing: a write or a shift takes effect on the next clock edge; shift
// is the bit strobe of the transmit manager.  dout is the bit that goes
// out at the next shift.
module ll2_tx_field_sr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] wdata,
  input  logic       we_addr,      // ADDRESS TX 1
  input  logic       we_ctl1,      // CONTROL TX 1
  input  logic       we_ctl2,      // CONTROL TX 2
  input  logic [4:0] we_frmr,      // FRMR 1 .. 5 (bit 0 = FRMR 1)
  input  logic       shift,
  output logic       dout,
  output logic [35:0] chain        // {addr1, addr2, ctl1, ctl2, frmr1..5}
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else if (shift) chain <= {chain[34:0], 1'b0};
    else begin
      if (we_addr) chain[35:28] <= {wdata, 4'b0000};
      if (we_ctl1) chain[27:24] <= wdata;
      if (we_ctl2) chain[23:20] <= wdata;
      for (int i = 0; i < 5; i++)
        if (we_frmr[i]) chain[19 - 4*i -: 4] <= wdata;
    end
  end
  assign dout = chain[35];
endmodule
