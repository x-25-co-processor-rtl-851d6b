// tb_l1_testloop: exhaustive check of the level 1 test loop.
// All 32 combinations of loop, R, I (network) and T, C (chip) are applied.
// Loop closed: the chip must read its own T on R and its own C on I, and
// the network must see C and T held OFF.  Loop open: lines pass straight.
`timescale 1ns/1ps
module tb_l1_testloop;
  logic loop, r_line, i_line, t_chip, c_chip;
  logic t_line, c_line, r_chip, i_chip;
  l1_testloop dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = 0; v < 32; v++) begin
      {loop, r_line, i_line, t_chip, c_chip} = 5'(v);
      #1;
      checks++;
      if (loop ? (r_chip !== t_chip || i_chip !== c_chip || t_line !== 1'b0 || c_line !== 1'b0)
               : (r_chip !== r_line || i_chip !== i_line || t_line !== t_chip || c_line !== c_chip)) begin
        failures++;
        $display("FAIL v=%b out r=%b i=%b t=%b c=%b", 5'(v), r_chip, i_chip, t_line, c_line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
