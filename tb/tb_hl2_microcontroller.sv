// tb_hl2_microcontroller: checks the microprogrammed controller of high
// level 2 against a hand-worked schedule.
// The testbench holds its own program memory and a 32 x 4 bit register
// model (address 0 = {carry, zero, 0, 1}).  The program exercises MVI,
// MOV in both directions, ADD, SUB with borrow, AND, a taken CJUMP on the
// carry, a CCALL into a subroutine with a CRET that is not taken and one
// that is, a CJUMP that is not taken, and CHANGE to the Tx process and
// back (the accumulator and temporary register are shared).  Each register
// write is compared with the expected address, value and microcycle; one
// microcycle is 5 clocks; CJUMP/CCALL take 2 cycles, a taken CRET 2, an
// untaken one 1, CHANGE 2.
`timescale 1ns/1ps
module tb_hl2_microcontroller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] rom_addr, rom_data;
  logic [4:0] reg_addr;
  logic reg_we;
  logic [3:0] reg_wdata, reg_rdata;
  logic carry, zero, proc, cycle_end, ev_change, ev_call, ev_ret;
  always #5 clk = ~clk;
  hl2_microcontroller dut (.*);

  // instruction encoders (see the header of the controller)
  function automatic logic [9:0] br(input int kind, input int r, input int m, input int t);
    return 10'(kind << 8 | r << 3 | m << 1 | t);
  endfunction
  function automatic logic [9:0] mov_to(input bit acc, input int r);   // reg -> accu/temp
    return 10'(1 << 7 | int'(acc) << 6 | 1 << 5 | r);
  endfunction
  function automatic logic [9:0] mov_from(input bit acc, input int r); // accu/temp -> reg
    return 10'(1 << 7 | int'(acc) << 6 | r);
  endfunction
  function automatic logic [9:0] mvi(input bit acc, input int v);
    return 10'(1 << 6 | int'(acc) << 5 | v << 1);
  endfunction
  function automatic logic [9:0] alu(input int op);
    return 10'(1 << 5 | op << 3);
  endfunction
  localparam logic [9:0] CHANGE = 10'b00_0001_0000;
  localparam int CJ = 3, CC = 2, CR = 1;

  logic [9:0] rom [1024];
  logic [3:0] regs [32];
  assign rom_data  = rom[rom_addr];
  assign reg_rdata = (reg_addr == 5'd0) ? {carry, zero, 1'b0, 1'b1} : regs[reg_addr];

  int checks = 0, failures = 0;
  int cyc = 0, nw = 0, n_change = 0, n_call = 0, n_ret = 0;
  int exp_cyc[7]  = '{2, 5, 8, 16, 19, 25, 28};
  int exp_addr[7] = '{16, 17, 18, 22, 20, 23, 21};
  int exp_val[7]  = '{4'b0101, 4'b1000, 4'b1111, 4'b0000, 4'b0000, 4'b1110, 4'b1110};
  always @(posedge clk) if (rst_n) begin
    if (ev_change) n_change++;
    if (ev_call) n_call++;
    if (ev_ret) n_ret++;
    if (reg_we) begin
      regs[reg_addr] <= reg_wdata;
      checks++;
      if (nw >= 7 || reg_addr != 5'(exp_addr[nw]) || reg_wdata != 4'(exp_val[nw]) || cyc != exp_cyc[nw]) begin
        failures++;
        $display("FAIL write %0d: reg %0d <= %b in cycle %0d", nw, reg_addr, reg_wdata, cyc);
      end
      nw++;
    end
    if (cycle_end) cyc++;
  end

  initial begin
    foreach (rom[i]) rom[i] = '0;
    foreach (regs[i]) regs[i] = '0;
    rom[0]  = mvi(0, 4'b0101);
    rom[1]  = mov_from(0, 16);
    rom[2]  = mvi(1, 4'b0011);
    rom[3]  = alu(2);                 // ADD: 0011 + 0101 = 1000
    rom[4]  = mov_from(1, 17);
    rom[5]  = mvi(0, 4'b1001);
    rom[6]  = alu(3);                 // SUB: 1000 - 1001 = 1111, borrow
    rom[7]  = mov_from(1, 18);
    rom[8]  = br(CJ, 0, 0, 1);        // carry set: taken
    rom[9]  = 10'd11;
    rom[10] = mov_from(0, 19);        // skipped
    rom[11] = br(CC, 0, 3, 1);        // always: call 30
    rom[12] = 10'd30;
    rom[13] = mov_from(1, 20);
    rom[14] = br(CJ, 0, 3, 0);        // never taken
    rom[15] = 10'd0;
    rom[16] = CHANGE;
    rom[17] = mov_from(0, 21);
    rom[18] = br(CJ, 0, 3, 1);
    rom[19] = 10'd18;
    rom[30] = mvi(1, 4'b0110);
    rom[31] = alu(0);                 // AND with 1001: 0000, zero
    rom[32] = br(CR, 0, 1, 0);        // return if not zero: not taken
    rom[33] = mov_from(1, 22);
    rom[34] = br(CR, 0, 1, 1);        // return if zero: taken
    rom[512] = mvi(0, 4'b1110);
    rom[513] = mov_from(0, 23);
    rom[514] = CHANGE;
    rom[515] = br(CJ, 0, 3, 1);
    rom[516] = 10'd515;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (40 * 5) @(posedge clk);
    checks++;
    if (nw != 7 || n_change != 2 || n_call != 1 || n_ret != 1) begin
      failures++;
      $display("FAIL: %0d writes, %0d changes, %0d calls, %0d returns", nw, n_change, n_call, n_ret);
    end
    checks++;
    if (proc != 1'b0) begin failures++; $display("FAIL: Rx process should be running"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
