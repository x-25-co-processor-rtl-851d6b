// high_level2: the link manager of level 2.
//
// The microprogrammed controller (with its ROM) runs the Rx and Tx
// processes over the 4 bit bus of the register set, which connects it to
// the low level 2 machines, level 1 enable, the timers and level 3.
module high_level2 #(
  parameter int unsigned CW            = 12,
  parameter int unsigned TICK_CYCLES   = 500_000,
  parameter int unsigned TICKS_PER_SEC = 40,
  parameter string       ROM_FILE      = "rtl/hl2_microcode.hex"
) (
  input  logic          clk,
  input  logic          rst_n,
  // low level 2 receiver
  input  logic          rx_ev_flag,
  input  logic          rx_ev_abort,
  input  logic          rx_ev_idle,
  input  logic          rx_ev_addr_a,
  input  logic          rx_ev_addr_b,
  input  logic          rx_ev_addr_valid,
  input  logic          rx_ev_ctl_valid,
  input  logic          rx_ev_frame_end,
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
  output logic [3:0]    bus_wdata,
  output logic          fsr_we_addr,
  output logic          fsr_we_ctl1,
  output logic          fsr_we_ctl2,
  output logic [4:0]    fsr_we_frmr,
  // level 3
  input  logic [3:0]    l3_command,
  output logic [3:0]    l3_status,
  input  logic [2:0]    l3_addr,
  input  logic          l3_we,
  input  logic [7:0]    l3_wdata,
  output logic [7:0]    l3_rdata,
  output logic          l3_attention,
  // observation
  output logic          proc,
  output logic          ev_change,
  output logic          ev_call,
  output logic          ev_ret
);
  logic [9:0] rom_addr, rom_data;
  logic [4:0] reg_addr;
  logic       reg_we, carry, zero, attention, cycle_end;
  logic [3:0] reg_wdata, reg_rdata;

  hl2_microcode_rom #(.INIT_FILE(ROM_FILE)) u_rom (.addr(rom_addr), .data(rom_data));

  hl2_microcontroller u_uc (
    .clk, .rst_n, .rom_addr, .rom_data, .reg_addr, .reg_we, .reg_wdata, .reg_rdata,
    .carry, .zero, .proc, .cycle_end, .ev_change, .ev_call, .ev_ret
  );

  hl2_regs #(.CW(CW), .TICK_CYCLES(TICK_CYCLES), .TICKS_PER_SEC(TICKS_PER_SEC)) u_regs (
    .clk, .rst_n, .addr(reg_addr), .we(reg_we), .wdata(reg_wdata), .rdata(reg_rdata),
    .alu_carry(carry), .alu_zero(zero),
    .rx_ev_flag, .rx_ev_abort, .rx_ev_idle, .rx_ev_addr_a, .rx_ev_addr_b,
    .rx_ev_addr_valid, .rx_ev_ctl_valid, .rx_ev_frame_end, .rx_frame_ok,
    .rx_lt32, .rx_eq32, .rx_too_long, .rx_ctl, .rx_reset, .l1_enable, .l1_loop, .n1,
    .tx_ready, .tx_frame_end_ack, .cmd_tx1, .cmd_tx1_wr, .tx_frame_end, .tx_reset,
    .fsr_we_addr, .fsr_we_ctl1, .fsr_we_ctl2, .fsr_we_frmr,
    .l3_command, .l3_status, .l3_addr, .l3_we, .l3_wdata, .l3_rdata,
    .attention, .l3_attention
  );

  assign bus_wdata = reg_wdata;
endmodule
