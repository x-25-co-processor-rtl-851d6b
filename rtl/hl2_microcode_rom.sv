// hl2_microcode_rom: microprogram ROM of the high level 2 controller.
//
// 1k words of 10 bits, the size the 10 bit branch address reaches.  Read
// is asynchronous: the word at addr is available in the same cycle, and the
// controller clocks it into its pipeline register.  The contents are loaded
// from a hex file; the default program (INIT_FILE) is a small link program
// for this design: initialisation, link enable, answering SABM and DISC
// with UA, I frames with RR (or REJ when out of sequence), undefined
// control fields with FRMR, an SABM on the connection command, passing
// acknowledgements to level 3, and the transmit process that sends the
// responses the receive process prepares and the I frames of level 3.  It is not the complete X.25 link procedure.
// For a chip the ROM is a mask-programmed array built from the same file;
// a synthesis flow that does not evaluate $readmemh sees an all-zero ROM.
module hl2_microcode_rom #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 10,
  parameter string INIT_FILE = "rtl/hl2_microcode.hex"
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];
endmodule
