// ll2_tx_manager: transmit manager of the low level 2 transmitter.
//
// Executes the commands of high level 2 and sequences a frame:
//   leading flag - address (8) - control (8) - [FRMR information (24)] -
//   [level 3 data, whole octets] - FCS (16) - closing flag.
// It selects the data source (field shift registers or level 3), asks the
// pattern generator for flags, aborts and idles, presets the FCS generator
// after the leading flag and switches it to shifting out at frame end.
//
// Commands (COMMAND TX 1, bit 3 is the first bit):
//   1000 FLAGS       send flags continuously
//   0000 NON-TX-FRAME / 0001 FRMR & NON-TX-FRAME: send one frame
//   x1xx ABORT       seven ones now (a frame in progress is cut), then flags
//   xx1x IDLE        fifteen ones, repeated while the command stays
// COMMAND TX 2: bit 3 FRAME-END (no more data after the current field or
// octet; acknowledged and cleared by frame_end_ack), bit 2 RESET.
// A frame or abort command is taken when it is written (cmd_wr); flags
// and idle follow the register level.  ready (STATUS TX) drops on each
// command write and rises when the commanded action has been done: the
// first flag, an abort or idle sequence, or the closing flag of a frame.
// A frame commanded before the closing flag of the previous one starts
// right after that flag, which then serves as its leading flag.
//
// Timing: the manager moves on the bit strobe it gets from the FCS control
// (through the zero inserter) and on done pulses of the pattern generator.
// The command encoding and the write-triggered frame start are this
// design's own reading of the command table of the description.
module ll2_tx_manager
  import x25_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] cmd,          // COMMAND TX 1
  input  logic       cmd_wr,       // COMMAND TX 1 written
  input  logic       frame_end,    // COMMAND TX 2 bit 3
  input  logic       soft_reset,   // COMMAND TX 2 bit 2
  output logic       frame_end_ack,
  input  logic       stb,          // bit strobe from the FCS control
  input  logic       pat_done,
  input  pattern_e   pat_cur,
  output pattern_e   pat_req,
  output logic       fcs_preload,
  output logic       fcs_calc,
  output logic       field_shift,  // shift the address/control/FRMR chain
  input  logic       field_bit,
  input  logic       l3_txd,       // data from level 3
  output logic       l3_stb,       // clock + enable to level 3
  output logic       dout,         // data to the FCS generator
  output logic       ready,
  output logic       in_frame
);
  typedef enum logic [2:0] {
    T_LINE  = 3'd0,   // flags, aborts or idles between frames
    T_FIELD = 3'd1,   // address, control, FRMR
    T_DATA  = 3'd2,   // level 3 data
    T_FCS   = 3'd3
  } tx_state_e;

  tx_state_e st;
  logic [5:0] cnt;
  logic [5:0] field_bits;
  logic frame_pend, frmr_pend, abort_pend, idle_mode;

  assign idle_mode = cmd[1] & ~cmd[2];
  assign in_frame  = (st != T_LINE);

  always_comb begin
    pat_req = PAT_NONE;
    if (st == T_LINE) begin
      if (abort_pend)      pat_req = PAT_ABORT;
      else if (idle_mode)  pat_req = PAT_IDLE;
      else                 pat_req = PAT_FLAG;
    end
  end

  assign fcs_calc    = (st != T_FCS);
  assign field_shift = (st == T_FIELD) & stb;
  assign l3_stb      = (st == T_DATA) & stb;
  assign dout        = (st == T_DATA) ? l3_txd : field_bit;

  // Leaving the line state for a frame happens on the done pulse of a flag.
  logic start_frame;
  assign start_frame = pat_done && pat_cur == PAT_FLAG && frame_pend
                       && !abort_pend && !idle_mode;
  assign fcs_preload = start_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_LINE;
      cnt <= '0;
      field_bits <= 6'd16;
      frame_pend <= 1'b0;
      frmr_pend <= 1'b0;
      abort_pend <= 1'b0;
      ready <= 1'b0;
      frame_end_ack <= 1'b0;
    end else if (soft_reset) begin
      st <= T_LINE;
      cnt <= '0;
      frame_pend <= 1'b0;
      abort_pend <= 1'b0;
      ready <= 1'b0;
      frame_end_ack <= 1'b0;
    end else begin
      frame_end_ack <= 1'b0;
      if (cmd_wr) begin
        ready <= 1'b0;
        if (cmd[2]) abort_pend <= 1'b1;
        else if (!cmd[3] && !cmd[1]) begin
          frame_pend <= 1'b1;
          frmr_pend  <= cmd[0];
        end
      end
      unique case (st)
        T_LINE: begin
          if (start_frame) begin
            st <= T_FIELD;
            cnt <= '0;
            field_bits <= frmr_pend ? 6'd40 : 6'd16;
            frame_pend <= 1'b0;
          end else if (pat_done) begin
            if (pat_cur == PAT_ABORT) abort_pend <= 1'b0;
            if (!cmd_wr) ready <= 1'b1;
          end
        end
        T_FIELD: begin
          if (abort_pend || idle_mode) st <= T_LINE;
          else if (stb) begin
            if (cnt == field_bits - 6'd1) begin
              cnt <= '0;
              if (frame_end) begin
                st <= T_FCS;
                frame_end_ack <= 1'b1;
              end else st <= T_DATA;
            end else cnt <= cnt + 6'd1;
          end
        end
        T_DATA: begin
          if (abort_pend || idle_mode) st <= T_LINE;
          else if (stb) begin
            if (cnt[2:0] == 3'd7) begin
              cnt <= '0;
              if (frame_end) begin
                st <= T_FCS;
                frame_end_ack <= 1'b1;
              end
            end else cnt <= cnt + 6'd1;
          end
        end
        T_FCS: begin
          if (abort_pend || idle_mode) st <= T_LINE;
          else if (stb) begin
            if (cnt == 6'd15) begin
              cnt <= '0;
              st <= T_LINE;   // closing flag follows
            end else cnt <= cnt + 6'd1;
          end
        end
        default: st <= T_LINE;
      endcase
    end
  end
endmodule
