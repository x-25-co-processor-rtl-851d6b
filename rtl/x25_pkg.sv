// x25_pkg: types and constants shared by the level 1 / level 2 blocks of
// the X.25 co-processor.
//
// Bit order convention: every nibble and octet is written in transmission
// order, first transmitted bit in the most significant position.  So the
// flag 0111 1110 is 8'b0111_1110 and the A address (11000000 on the line)
// is 8'b1100_0000, and a nibble test with mask 4'b1000 looks at the first
// bit of a register.  This follows the way the bit strings and register
// masks are written in the design description; the encoding of the
// enumerations and the register map below are this design's own choice.
package x25_pkg;

  // HDLC patterns (transmission order, first bit at the MSB).
  localparam logic [7:0] FLAG_PAT   = 8'b0111_1110;
  localparam logic [7:0] ADDR_A     = 8'b1100_0000;
  localparam logic [7:0] ADDR_B     = 8'b1000_0000;
  // Multilink addresses (values from the X.75 multilink procedure).
  localparam logic [7:0] ADDR_C     = 8'b1111_0000;
  localparam logic [7:0] ADDR_D     = 8'b1110_0000;

  // FCS: polynomial x^16 + x^12 + x^5 + 1, register preset to ones.
  // Taps are applied into stages x^5 and x^12, feedback from stage x^15.
  localparam logic [15:0] FCS_TAPS    = 16'b0001_0000_0010_0001;
  // Remainder left in a checker after a correct frame, read with the
  // x^15 stage as the least significant bit (the "F0B8" of the checker).
  localparam logic [15:0] FCS_GOOD_RESIDUE = 16'hF0B8;

  // Pattern generator requests.
  typedef enum logic [1:0] {
    PAT_NONE  = 2'd0,
    PAT_FLAG  = 2'd1,
    PAT_ABORT = 2'd2,
    PAT_IDLE  = 2'd3
  } pattern_e;

  // High level 2 register addresses on the 5 bit address bus.  Where a
  // read-only and a write-only register share one address the name gives
  // both (read / write).
  typedef enum logic [4:0] {
    R_FLAGS      = 5'd0,   // carry, zero, attention, constant one
    R_STATUS_RX1 = 5'd1,   // address valid, control valid, frame end, frame ok
    R_STATUS_RX2 = 5'd2,   // flag, abort, idle, A address
    R_STATUS_RX3 = 5'd3,   // B address, <32, =32, too long
    R_CONTROL_1  = 5'd4,   // control rx 1 / control tx 1
    R_CONTROL_2  = 5'd5,   // control rx 2 / control tx 2
    R_COMMAND_RX = 5'd6,   // reset (= busy)
    R_L1_ENABLE  = 5'd7,   // enable level 1, test loop
    R_TX_1       = 5'd8,   // status tx (ready) / command tx 1
    R_COMMAND_TX2= 5'd9,   // frame end, reset
    R_ADDRESS_TX = 5'd10,  // address tx 1 (address tx 2 is loaded with zeros)
    R_FRMR1_CONN = 5'd11,  // connection register / FRMR 1
    R_FRMR2_CADR = 5'd12,  // command address / FRMR 2
    R_FRMR3_RADR = 5'd13,  // response address / FRMR 3
    R_FRMR4      = 5'd14,
    R_FRMR5      = 5'd15,
    R_VS         = 5'd16,
    R_VR         = 5'd17,
    R_LAST_ACK   = 5'd18,
    R_LAST_SENT1 = 5'd19,
    R_LAST_SENT2 = 5'd20,
    R_NEXT1      = 5'd21,
    R_NEXT2      = 5'd22,
    R_PSTAT1     = 5'd23,
    R_PSTAT2     = 5'd24,
    R_COMMREG1   = 5'd25,  // REJ count
    R_COMMREG2   = 5'd26,  // packet acknowledged / last acknowledged number
    R_COMMREG3   = 5'd27,  // 1 s timer flag / k
    R_COMMREG4   = 5'd28,  // packet request / next packet to send
    R_RETRN2     = 5'd29,  // overflow flag, retransmission count
    R_TIMER_T1   = 5'd30,  // T1 expired, 1 s flag, -, stopped
    R_L3_CMD_STS = 5'd31   // level 3 command (read) / level 2 status (write)
  } hl2_reg_e;

  // Microinstruction formats (10 bit words):
  //   CJUMP  11 sssss mm t      + 10 bit address word
  //   CCALL  10 sssss mm t      + 10 bit address word
  //   CRET   01 sssss mm t
  //   MOV    001 v w sssss      v: 1 = accu, 0 = temp; w: 1 = into accu/temp
  //   MVI    0001 v dddd -
  //   ALU    00001 oo ---       oo: AND, OR, ADD, SUB
  //   CHANGE 000001 ----
  //   NOP    0000000000
  typedef enum logic [1:0] {
    ALU_AND = 2'b00,
    ALU_OR  = 2'b01,
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_op_e;

  // Index into a nibble for a 2 bit mask code: code 0 selects the first
  // bit (mask 1000B), code 3 the last (mask 0001B).
  function automatic logic nibble_bit(input logic [3:0] n, input logic [1:0] code);
    return n[3 - code];
  endfunction

  function automatic logic [15:0] reverse16(input logic [15:0] v);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = v[15 - i];
    return r;
  endfunction

endpackage
