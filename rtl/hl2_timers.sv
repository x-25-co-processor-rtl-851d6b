// hl2_timers: maximum timer T1, the 1 second timer and the retransmission
// counter of high level 2.
//
// A prescaler divides the system clock into ticks of TICK_CYCLES clocks
// (25 ms at a 20 MHz system clock).  T1 counts ticks while running and sets the expired
// flag when it reaches t1_max (loaded by level 3, in ticks: 85 for the
// 2.125 s class, 8 for 200 ms); it then stops.  Writing the timer register
// restarts the count and clears expired; written bit 0 = 1 stops the timer.
// Every TICKS_PER_SEC ticks sec_pulse marks one second for level 3.
// The retransmission counter is written by high level 2 (usually reset to
// 0 or incremented through the ALU); ovf is high when it has reached N2,
// the maximum set by level 3.
//
// Timing: all registered, one system clock domain.  Tick length and the
// register bit layout are this design's own choices.
module hl2_timers #(
  parameter int unsigned TICK_CYCLES   = 500_000,
  parameter int unsigned TICKS_PER_SEC = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] t1_max,
  input  logic       t1_wr,
  input  logic       t1_stop,
  output logic       t1_expired,
  output logic       t1_stopped,
  output logic       sec_pulse,
  input  logic [3:0] n2_max,
  input  logic       retr_wr,
  input  logic [2:0] retr_wdata,
  output logic [2:0] retr_cnt,
  output logic       retr_ovf
);
  localparam int PW = $clog2(TICK_CYCLES + 1);
  localparam int SW = $clog2(TICKS_PER_SEC + 1);
  logic [PW-1:0] pre;
  logic [SW-1:0] sec;
  logic [7:0]    t1_cnt;
  logic          tick;

  assign tick = (pre == PW'(TICK_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      sec <= '0;
      sec_pulse <= 1'b0;
    end else begin
      sec_pulse <= 1'b0;
      if (tick) begin
        pre <= '0;
        if (sec == SW'(TICKS_PER_SEC - 1)) begin
          sec <= '0;
          sec_pulse <= 1'b1;
        end else sec <= sec + 1'b1;
      end else pre <= pre + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_cnt <= '0;
      t1_expired <= 1'b0;
      t1_stopped <= 1'b1;
    end else if (t1_wr) begin
      t1_cnt <= '0;
      t1_expired <= 1'b0;
      t1_stopped <= t1_stop;
    end else if (tick && !t1_stopped) begin
      if (t1_cnt + 8'd1 >= t1_max) begin
        t1_expired <= 1'b1;
        t1_stopped <= 1'b1;
      end
      t1_cnt <= t1_cnt + 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) retr_cnt <= '0;
    else if (retr_wr) retr_cnt <= retr_wdata;
  end
  assign retr_ovf = ({1'b0, retr_cnt} >= n2_max);
endmodule
