// l1_testloop: level 1 test loop.
//
// When loop is set the transmitted signals of the chip are fed straight
// back into its own receiver: T goes to R and C goes to I.  Towards the
// network the chip then shows "not ready": C = OFF and T = 0.  With the loop
// off the block is transparent.  Purely combinational.
//
// The connections (T to R, C to I, line outputs forced off) follow the
// description.  Signals are active high here (C = 1 is ON), so C is forced
// off with an AND gate; the printed schematic uses an OR gate on C because
// on the X.21 wire OFF is binary 1.
module l1_testloop (
  input  logic loop,
  // network side
  input  logic r_line,
  input  logic i_line,
  output logic t_line,
  output logic c_line,
  // chip side
  input  logic t_chip,
  input  logic c_chip,
  output logic r_chip,
  output logic i_chip
);
  assign r_chip = loop ? t_chip : r_line;
  assign i_chip = loop ? c_chip : i_line;
  assign t_line = t_chip & ~loop;
  assign c_line = c_chip & ~loop;
endmodule
