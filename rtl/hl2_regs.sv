// hl2_regs: the register set of high level 2 on its 4 bit bus.
//
// All information that high level 2 exchanges with the low level 2
// machines, with level 3 and between its own Rx and Tx processes sits in
// 4 bit registers selected by a 5 bit address (map in x25_pkg).  Read-only
// and write-only registers share addresses so 32 addresses suffice.
//
//  - Low level 2 receiver: STATUS RX 1..3 collect event bits (set by the
//    machines, cleared by high level 2 writing zeros), CONTROL RX 1/2 show
//    the received control byte, COMMAND RX holds reset (= busy).
//  - Low level 2 transmitter: COMMAND TX 1/2, STATUS TX (ready), and the
//    write strobes for the address, control and FRMR shift registers.
//  - LEVEL 1 ENABLE: bit 3 enables level 1, bit 2 closes the test loop.
//  - Internal registers: V(S), V(R), last acknowledged V(S), last frame
//    sent 1/2, next to send 1/2, program status 1/2.
//  - Level 3: communication registers 1..4, the retransmission counter and
//    T1 timer (hl2_timers), the low level 3 command/status lines, and an
//    8 bit port on which level 3 sees two nibbles as one register:
//      l3 addr 0: {COMMREG1, COMMREG2}  write 0 to bit 3 clears the flag
//      l3 addr 1: {COMMREG3, COMMREG4}  write sets k (bits 6:4) and clears
//                                       flags written 0 (bits 7 and 3)
//      l3 addr 2: {N2 max, retransmission status}  write sets N2 max
//      l3 addr 3: T1 max (ticks)
//      l3 addr 4: {command address, response address}
//      l3 addr 5: {connection register, 0000}  bit 7 enable level 2,
//                                              bit 6 start connection
//      l3 addr 6/7: N1 low / high bits
//    l3_attention is high while one of the flag bits of communication
//    registers 2..4 is set, until level 3 clears it.
//  - FLAGS: carry, zero, attention, constant 1.  Attention is high while a
//    control-valid, frame-end, abort or idle report is pending.
//
// Timing: bus reads are combinational; writes and event bits take effect
// on the clock edge.  A write and an event in the same cycle: the event
// bit wins.  The transmitter sees a COMMAND TX 1 write (cmd_tx1_wr) one
// clock after the bus write, together with the new register value.  The register map and all bit positions not named in the
// description are this design's own choice.
module hl2_regs
  import x25_pkg::*;
#(
  parameter int unsigned CW            = 12,
  parameter int unsigned TICK_CYCLES   = 500_000,
  parameter int unsigned TICKS_PER_SEC = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  // 4 bit bus from the microcontroller
  input  logic [4:0]    addr,
  input  logic          we,
  input  logic [3:0]    wdata,
  output logic [3:0]    rdata,
  input  logic          alu_carry,
  input  logic          alu_zero,
  // low level 2 receiver
  input  logic          rx_ev_flag,
  input  logic          rx_ev_abort,
  input  logic          rx_ev_idle,
  input  logic          rx_ev_addr_a,
  input  logic          rx_ev_addr_b,
  input  logic          rx_ev_addr_valid,
  input  logic          rx_ev_ctl_valid,
  input  logic          rx_ev_frame_end,  // delayed: FCS and length settled
  input  logic          rx_frame_ok,
  input  logic          rx_lt32,
  input  logic          rx_eq32,
  input  logic          rx_too_long,
  input  logic [7:0]    rx_ctl,
  output logic          rx_reset,
  output logic          l1_enable,
  output logic          l1_loop,
  output logic [CW-1:0] n1,
  // low level 2 transmitter
  input  logic          tx_ready,
  input  logic          tx_frame_end_ack,
  output logic [3:0]    cmd_tx1,
  output logic          cmd_tx1_wr,
  output logic          tx_frame_end,
  output logic          tx_reset,
  output logic          fsr_we_addr,
  output logic          fsr_we_ctl1,
  output logic          fsr_we_ctl2,
  output logic [4:0]    fsr_we_frmr,
  // low level 3 command / status lines
  input  logic [3:0]    l3_command,       // busy, tx pack end, pack ready, abort
  output logic [3:0]    l3_status,        // diagnostic, pack end, pack valid, reset
  // high level 3 port
  input  logic [2:0]    l3_addr,
  input  logic          l3_we,
  input  logic [7:0]    l3_wdata,
  output logic [7:0]    l3_rdata,
  output logic          attention,
  output logic          l3_attention      // a level 3 flag is set
);
  logic [3:0] status_rx1, status_rx2, status_rx3, command_rx, l1_en_reg;
  logic [3:0] command_tx2;
  logic [3:0] internal [9];          // V(S) .. PSTAT2, addresses 16..24
  logic [3:0] commreg [4];
  logic [3:0] conn_reg, cmd_addr, resp_addr, n2_max;
  logic [7:0] t1_max;

  logic wr;
  assign wr = we;
  function automatic logic hit(input logic [4:0] a, input hl2_reg_e r);
    return a == r;
  endfunction

  // Timers and retransmission counter.
  logic t1_expired, t1_stopped, sec_pulse, retr_ovf;
  logic [2:0] retr_cnt;
  hl2_timers #(.TICK_CYCLES(TICK_CYCLES), .TICKS_PER_SEC(TICKS_PER_SEC)) u_timers (
    .clk, .rst_n,
    .t1_max, .t1_wr(wr && hit(addr, R_TIMER_T1)), .t1_stop(wdata[0]),
    .t1_expired, .t1_stopped, .sec_pulse,
    .n2_max, .retr_wr(wr && hit(addr, R_RETRN2)), .retr_wdata(wdata[2:0]),
    .retr_cnt, .retr_ovf
  );

  assign rx_reset     = command_rx[3];
  assign l1_enable    = l1_en_reg[3];
  assign l1_loop      = l1_en_reg[2];
  assign tx_frame_end = command_tx2[3];
  assign tx_reset     = command_tx2[2];
  assign fsr_we_addr  = wr && hit(addr, R_ADDRESS_TX);
  assign fsr_we_ctl1  = wr && hit(addr, R_CONTROL_1);
  assign fsr_we_ctl2  = wr && hit(addr, R_CONTROL_2);
  assign fsr_we_frmr  = {wr && hit(addr, R_FRMR5), wr && hit(addr, R_FRMR4),
                         wr && hit(addr, R_FRMR3_RADR), wr && hit(addr, R_FRMR2_CADR),
                         wr && hit(addr, R_FRMR1_CONN)};
  assign l3_attention = commreg[1][3] | commreg[2][3] | commreg[3][3];
  assign attention    = status_rx1[2] | status_rx1[1] | status_rx2[2] | status_rx2[1];

  logic [3:0] set_rx1, set_rx2, set_rx3;
  assign set_rx1 = {rx_ev_addr_valid, rx_ev_ctl_valid, rx_ev_frame_end,
                    rx_ev_frame_end & rx_frame_ok};
  assign set_rx2 = {rx_ev_flag, rx_ev_abort, rx_ev_idle, rx_ev_addr_a};
  assign set_rx3 = {rx_ev_addr_b, rx_ev_frame_end & rx_lt32,
                    rx_ev_frame_end & rx_eq32, rx_ev_frame_end & rx_too_long};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_rx1 <= '0; status_rx2 <= '0; status_rx3 <= '0;
      command_rx <= '0; l1_en_reg <= '0; command_tx2 <= '0;
      cmd_tx1 <= 4'b1010;   // idle after reset
      cmd_tx1_wr <= 1'b0;
      for (int i = 0; i < 9; i++) internal[i] <= '0;
      for (int i = 0; i < 4; i++) commreg[i] <= '0;
      conn_reg <= '0; cmd_addr <= '0; resp_addr <= '0; n2_max <= 4'd5;
      t1_max <= 8'd85; n1 <= CW'(1080);
      l3_status <= '0;
    end else begin
      // The write strobe to the transmitter follows the new register value.
      cmd_tx1_wr <= wr && hit(addr, R_TX_1);
      // Bus writes from high level 2.
      if (wr) begin
        unique case (addr)
          R_COMMAND_RX:  command_rx <= wdata;
          R_L1_ENABLE:   l1_en_reg  <= wdata;
          R_TX_1:        cmd_tx1    <= wdata;
          R_COMMAND_TX2: command_tx2 <= wdata;
          R_VS, R_VR, R_LAST_ACK, R_LAST_SENT1, R_LAST_SENT2,
          R_NEXT1, R_NEXT2, R_PSTAT1, R_PSTAT2:
                         internal[4'(addr - 5'd16)] <= wdata;
          R_COMMREG1:    commreg[0] <= wdata;
          R_COMMREG2:    commreg[1] <= wdata;
          R_COMMREG3:    commreg[2] <= {wdata[3], commreg[2][2:0]};
          R_COMMREG4:    commreg[3] <= wdata;
          R_L3_CMD_STS:  l3_status  <= wdata;
          default: ;
        endcase
      end
      // Events from the low level 2 machines.
      status_rx1 <= (wr && hit(addr, R_STATUS_RX1) ? wdata : status_rx1) | set_rx1;
      status_rx2 <= (wr && hit(addr, R_STATUS_RX2) ? wdata : status_rx2) | set_rx2;
      status_rx3 <= (wr && hit(addr, R_STATUS_RX3) ? wdata : status_rx3) | set_rx3;
      if (tx_frame_end_ack) command_tx2[3] <= 1'b0;
      if (sec_pulse) commreg[2][3] <= 1'b1;
      // Level 3 writes.
      if (l3_we) begin
        unique case (l3_addr)
          3'd0: begin
            commreg[1][3] <= commreg[1][3] & l3_wdata[3];
          end
          3'd1: begin
            commreg[2] <= {commreg[2][3] & l3_wdata[7], l3_wdata[6:4]};
            commreg[3][3] <= commreg[3][3] & l3_wdata[3];
          end
          3'd2: n2_max <= l3_wdata[7:4];
          3'd3: t1_max <= l3_wdata;
          3'd4: begin cmd_addr <= l3_wdata[7:4]; resp_addr <= l3_wdata[3:0]; end
          3'd5: conn_reg <= l3_wdata[7:4];
          3'd6: n1[7:0] <= l3_wdata;
          default: n1[CW-1:8] <= l3_wdata[CW-9:0];
        endcase
      end
    end
  end

  // Bus reads.
  always_comb begin
    rdata = '0;
    unique case (addr)
      R_FLAGS:       rdata = {alu_carry, alu_zero, attention, 1'b1};
      R_STATUS_RX1:  rdata = status_rx1;
      R_STATUS_RX2:  rdata = status_rx2;
      R_STATUS_RX3:  rdata = status_rx3;
      R_CONTROL_1:   rdata = rx_ctl[7:4];
      R_CONTROL_2:   rdata = rx_ctl[3:0];
      R_COMMAND_RX:  rdata = command_rx;
      R_L1_ENABLE:   rdata = l1_en_reg;
      R_TX_1:        rdata = {tx_ready, 3'b000};
      R_COMMAND_TX2: rdata = command_tx2;
      R_FRMR1_CONN:  rdata = conn_reg;
      R_FRMR2_CADR:  rdata = cmd_addr;
      R_FRMR3_RADR:  rdata = resp_addr;
      R_VS, R_VR, R_LAST_ACK, R_LAST_SENT1, R_LAST_SENT2,
      R_NEXT1, R_NEXT2, R_PSTAT1, R_PSTAT2:
                     rdata = internal[4'(addr - 5'd16)];
      R_COMMREG1:    rdata = commreg[0];
      R_COMMREG2:    rdata = commreg[1];
      R_COMMREG3:    rdata = commreg[2];
      R_COMMREG4:    rdata = commreg[3];
      R_RETRN2:      rdata = {retr_ovf, retr_cnt};
      R_TIMER_T1:    rdata = {t1_expired, commreg[2][3], 1'b0, t1_stopped};
      R_L3_CMD_STS:  rdata = l3_command;
      default:       rdata = '0;
    endcase
  end

  always_comb begin
    unique case (l3_addr)
      3'd0:    l3_rdata = {commreg[0], commreg[1]};
      3'd1:    l3_rdata = {commreg[2], commreg[3]};
      3'd2:    l3_rdata = {n2_max, retr_ovf, retr_cnt};
      3'd3:    l3_rdata = t1_max;
      3'd4:    l3_rdata = {cmd_addr, resp_addr};
      3'd5:    l3_rdata = {conn_reg, t1_expired, 3'b000};
      3'd6:    l3_rdata = n1[7:0];
      default: l3_rdata = 8'(n1 >> 8);
    endcase
  end
endmodule
