// ll2_pattern_gen: flag / abort / idle generator of the low level 2
// transmitter.
//
// It sits last in the transmit chain, right before level 1, so its
// patterns never pass the zero inserter.  On request of the transmit
// manager it sends a flag (0111 1110), an abort (seven ones) or an idle
// sequence (fifteen ones).  While it sends a pattern its MUX1 line is
// high: the output multiplexer selects the generator and the machines
// above it get no bit clock.  When it is not busy it passes the bit strobe
// up to the zero inserter and passes the data coming back down to level 1.
//
// Timing: a request seen at a bit strobe starts the pattern at that same
// strobe (its first bit goes out then); done pulses with the strobe of the
// last bit.  The request encoding and the done pulse are this design's own.
module ll2_pattern_gen
  import x25_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     stb,      // bit strobe from level 1
  input  pattern_e req,      // pattern wanted by the transmit manager
  input  logic     din,      // data from the zero inserter
  output logic     dout,     // data to level 1
  output logic     up_stb,   // bit strobe passed to the zero inserter
  output logic     mux1,     // pattern generator owns the line
  output logic     done,     // last bit of a pattern sent
  output pattern_e cur       // pattern being sent (valid while mux1)
);
  logic     busy;
  pattern_e kind;
  logic [3:0] idx;

  pattern_e act;
  logic [3:0] aidx;
  assign act  = busy ? kind : req;
  assign aidx = busy ? idx  : 4'd0;
  assign mux1 = busy | (req != PAT_NONE);
  assign cur  = act;

  function automatic logic [3:0] last_idx(input pattern_e p);
    unique case (p)
      PAT_FLAG:  return 4'd7;
      PAT_ABORT: return 4'd6;
      default:   return 4'd14;
    endcase
  endfunction

  always_comb begin
    if (mux1) begin
      dout   = (act == PAT_FLAG) ? FLAG_PAT[3'(7 - aidx)] : 1'b1;
      up_stb = 1'b0;
      done   = stb & (aidx == last_idx(act));
    end else begin
      dout   = din;
      up_stb = stb;
      done   = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      kind <= PAT_NONE;
      idx  <= '0;
    end else if (stb && mux1) begin
      if (aidx == last_idx(act)) begin
        busy <= 1'b0;
        idx  <= '0;
      end else begin
        busy <= 1'b1;
        kind <= act;
        idx  <= aidx + 4'd1;
      end
    end
  end
endmodule
