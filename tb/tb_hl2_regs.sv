// tb_hl2_regs: checks the register set of high level 2.
// Through the 4 bit bus: the internal registers (V(S) .. program status)
// read back what was written; status bits are set by receiver events and
// cleared by writing zeros; attention follows control valid, frame end,
// abort and idle; the flag register shows carry, zero, attention and the
// constant one; level 1 enable and loop reach their outputs; a COMMAND TX 1
// write reaches the transmitter one clock later with the new value; the
// field register strobes follow their addresses; frame end acknowledge
// clears COMMAND TX 2 bit 3.  Through the level 3 port: addresses,
// connection register, N1, N2 and T1 are set and read back, the
// communication register flags raise l3_attention and level 3 clears them,
// and the 1 second pulse (short tick here) sets its flag.
`timescale 1ns/1ps
module tb_hl2_regs;
  import x25_pkg::*;
  localparam int CW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] addr = '0;
  logic we = 1'b0;
  logic [3:0] wdata = '0, rdata;
  logic alu_carry = 1'b0, alu_zero = 1'b0;
  logic rx_ev_flag = 0, rx_ev_abort = 0, rx_ev_idle = 0, rx_ev_addr_a = 0, rx_ev_addr_b = 0;
  logic rx_ev_addr_valid = 0, rx_ev_ctl_valid = 0, rx_ev_frame_end = 0, rx_frame_ok = 0;
  logic rx_lt32 = 0, rx_eq32 = 0, rx_too_long = 0;
  logic [7:0] rx_ctl = 8'h00;
  logic rx_reset, l1_enable, l1_loop;
  logic [CW-1:0] n1;
  logic tx_ready = 1'b0, tx_frame_end_ack = 1'b0;
  logic [3:0] cmd_tx1;
  logic cmd_tx1_wr, tx_frame_end, tx_reset, fsr_we_addr, fsr_we_ctl1, fsr_we_ctl2;
  logic [4:0] fsr_we_frmr;
  logic [3:0] l3_command = 4'b0110, l3_status;
  logic [2:0] l3_addr = '0;
  logic l3_we = 1'b0;
  logic [7:0] l3_wdata = '0, l3_rdata;
  logic attention, l3_attention;
  always #5 clk = ~clk;
  hl2_regs #(.CW(CW), .TICK_CYCLES(5), .TICKS_PER_SEC(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic bus_wr(input int a, input logic [3:0] d);
    @(posedge clk) begin addr <= 5'(a); wdata <= d; we <= 1'b1; end
    @(posedge clk) we <= 1'b0;
    #1;
  endtask
  task automatic bus_rd(input int a, output logic [3:0] d);
    @(posedge clk) addr <= 5'(a);
    #1 d = rdata;
  endtask
  task automatic l3_wr(input int a, input logic [7:0] d);
    @(posedge clk) begin l3_addr <= 3'(a); l3_wdata <= d; l3_we <= 1'b1; end
    @(posedge clk) l3_we <= 1'b0;
    #1;
  endtask
  task automatic l3_rd(input int a, output logic [7:0] d);
    @(posedge clk) l3_addr <= 3'(a);
    #1 d = l3_rdata;
  endtask

  int n_cmd_wr = 0;
  logic [3:0] cmd_at_wr;
  always @(posedge clk) if (cmd_tx1_wr) begin n_cmd_wr++; cmd_at_wr = cmd_tx1; end

  initial begin
    logic [3:0] v, vals [9];
    logic [7:0] b;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    check(cmd_tx1 == 4'b1010 && !l1_enable && !rx_reset, "reset values");
    // internal registers
    for (int i = 0; i < 9; i++) begin vals[i] = 4'($urandom); bus_wr(16 + i, vals[i]); end
    ok = 1'b1;
    for (int i = 0; i < 9; i++) begin bus_rd(16 + i, v); if (v != vals[i]) ok = 1'b0; end
    check(ok, "internal registers read back");
    // status bits
    rx_frame_ok = 1'b1; rx_eq32 = 1'b1;
    @(posedge clk) rx_ev_frame_end <= 1'b1; @(posedge clk) rx_ev_frame_end <= 1'b0; #1;
    @(posedge clk) rx_ev_addr_valid <= 1'b1; @(posedge clk) rx_ev_addr_valid <= 1'b0; #1;
    @(posedge clk) rx_ev_abort <= 1'b1; @(posedge clk) rx_ev_abort <= 1'b0; #1;
    @(posedge clk) rx_ev_addr_b <= 1'b1; @(posedge clk) rx_ev_addr_b <= 1'b0; #1;
    bus_rd(R_STATUS_RX1, v); check(v == 4'b1011, $sformatf("STATUS RX 1 = %b", v));
    bus_rd(R_STATUS_RX2, v); check(v == 4'b0100, $sformatf("STATUS RX 2 = %b", v));
    bus_rd(R_STATUS_RX3, v); check(v == 4'b1010, $sformatf("STATUS RX 3 = %b", v));
    check(attention, "attention on frame end / abort");
    alu_carry = 1'b1;
    bus_rd(R_FLAGS, v); check(v == 4'b1011, $sformatf("flags = %b", v));
    bus_wr(R_STATUS_RX1, 4'b0000); bus_wr(R_STATUS_RX2, 4'b0000); bus_wr(R_STATUS_RX3, 4'b0000);
    bus_rd(R_STATUS_RX1, v); check(v == 4'b0000 && !attention, "status cleared, no attention");
    rx_ctl = 8'hA5;
    bus_rd(R_CONTROL_1, v); check(v == 4'hA, "control 1");
    bus_rd(R_CONTROL_2, v); check(v == 4'h5, "control 2");
    // level 1, receiver reset
    bus_wr(R_L1_ENABLE, 4'b1100); check(l1_enable && l1_loop, "level 1 enable and loop");
    bus_wr(R_COMMAND_RX, 4'b1000); check(rx_reset, "receiver reset");
    // transmitter
    bus_wr(R_TX_1, 4'b0001);
    @(posedge clk); #1;
    check(n_cmd_wr == 1 && cmd_at_wr == 4'b0001, "command write reaches the transmitter with its value");
    tx_ready = 1'b1;
    bus_rd(R_TX_1, v); check(v == 4'b1000, "status tx ready");
    bus_wr(R_COMMAND_TX2, 4'b1000); check(tx_frame_end && !tx_reset, "frame end set");
    @(posedge clk) tx_frame_end_ack <= 1'b1; @(posedge clk) tx_frame_end_ack <= 1'b0; #1; check(!tx_frame_end, "frame end cleared by acknowledge");
    fork
      bus_wr(R_ADDRESS_TX, 4'hC);
      begin @(posedge clk); #1 check(fsr_we_addr && !fsr_we_ctl1 && fsr_we_frmr == 0, "address register strobe"); end
    join
    fork
      bus_wr(R_FRMR4, 4'h3);
      begin @(posedge clk); #1 check(fsr_we_frmr == 5'b01000, "FRMR 4 strobe"); end
    join
    // level 3 port
    l3_wr(4, 8'h8C);
    bus_rd(R_FRMR2_CADR, v); check(v == 4'h8, "command address");
    bus_rd(R_FRMR3_RADR, v); check(v == 4'hC, "response address");
    l3_wr(5, 8'hC0);
    bus_rd(R_FRMR1_CONN, v); check(v == 4'hC, "connection register");
    l3_wr(6, 8'h34); l3_wr(7, 8'h02);
    check(n1 == CW'(12'h234), "N1 from level 3");
    l3_wr(2, 8'h30);
    bus_wr(R_RETRN2, 4'b0011);
    bus_rd(R_RETRN2, v); check(v == 4'b1011, $sformatf("retransmissions at N2: %b", v));
    l3_rd(2, b); check(b == 8'h3B, "N2 and retransmission status to level 3");
    bus_rd(R_L3_CMD_STS, v); check(v == 4'b0110, "level 3 command lines");
    bus_wr(R_L3_CMD_STS, 4'b0101); check(l3_status == 4'b0101, "level 3 status lines");
    bus_wr(R_COMMREG2, 4'b1000); check(l3_attention, "level 3 attention");
    l3_rd(0, b); check(b == 8'h08, "communication register 2 to level 3");
    l3_wr(0, 8'h00); l3_rd(0, b); check(b[3] == 1'b0, "level 3 clears the flag");
    repeat (30) @(posedge clk);
    bus_rd(R_TIMER_T1, v); check(v[2], "1 second flag set");
    l3_wr(1, 8'h50);
    l3_rd(1, b); check(b == 8'h50, "k set, second flag cleared by level 3");
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
