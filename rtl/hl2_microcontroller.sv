// hl2_microcontroller: microprogrammed controller of high level 2.
//
// One controller runs two programs, the receive (Rx) and the transmit (Tx)
// process, in time sharing: each process has its own program count
// register and runs until it executes CHANGE, which hands the controller to
// the other process.  Around the microprogram ROM sit a pipeline register
// (the instruction executed now was fetched during the previous cycle), a
// next address multiplexer (program count register, branch address word,
// stack), an incrementer, a 4 deep return stack, the condition selector, the
// accumulator and temporary register with the 4 bit ALU, and the timing
// unit that splits every microcycle into PHASES phases.
//
// Instructions (10 bits; see x25_pkg): CJUMP / CCALL (followed by a word
// with the 10 bit target), CRET, MOV, MVI, AND/OR/ADD/SUB, CHANGE, and the
// all-zero NOP.  A branch tests one bit (2 bit mask code, 0 = first bit) of
// the register on the bus against a true/false bit.
// Cycle counts, as in the description: CJUMP and CCALL take 2 microcycles
// whether taken or not; CRET takes 2 when it returns and 1 when not;
// CHANGE takes 2, because the word fetched behind it is not executed; all
// others take 1.
//
// Bus: reg_addr selects one of 32 4 bit registers; reg_rdata is read
// combinationally, reg_we pulses in the last phase of the microcycle.  The
// flag register (carry, zero, attention, constant 1) is assembled by the
// register set from carry/zero given here.
//
// Reset: pipeline cleared to NOP, Rx program count register to 0.  The Tx
// program count register starts at TX_START (the description resets both
// counters to zero; a separate start address lets the Tx initialisation run
// as the second program sequence after reset).  All state changes take
// place in the last phase of the microcycle: the per-phase strobes of the
// timing diagrams are folded into that one clock edge.
module hl2_microcontroller
  import x25_pkg::*;
#(
  parameter int unsigned AW          = 10,
  parameter int unsigned STACK_DEPTH = 4,
  parameter int unsigned PHASES      = 5,
  parameter logic [9:0]  TX_START    = 10'd512
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] rom_addr,
  input  logic [9:0]    rom_data,
  output logic [4:0]    reg_addr,
  output logic          reg_we,
  output logic [3:0]    reg_wdata,
  input  logic [3:0]    reg_rdata,
  output logic          carry,
  output logic          zero,
  output logic          proc,      // 0 = Rx process, 1 = Tx process
  output logic          cycle_end, // last phase of a microcycle
  output logic          ev_change, // a CHANGE executed
  output logic          ev_call,   // a taken CCALL
  output logic          ev_ret     // a taken CRET
);
  localparam int PHW = $clog2(PHASES);
  localparam int SPW = $clog2(STACK_DEPTH + 1);
  localparam int SIW = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  logic [PHW-1:0] phase;
  logic [9:0]     ir;
  logic [AW-1:0]  pc [2];
  logic [AW-1:0]  stack [STACK_DEPTH];
  logic [SPW-1:0] sp;
  logic [3:0]     accu, temp;
  logic           addr_word;   // ir holds the address word of a branch
  logic           pend_cond, pend_call;

  assign cycle_end = (phase == PHW'(PHASES - 1));
  assign zero      = (accu == 4'd0);

  // Decode.
  typedef enum logic [2:0] {
    I_NOP, I_CJUMP, I_CCALL, I_CRET, I_MOV, I_MVI, I_ALU, I_CHANGE
  } instr_e;
  instr_e ins;
  always_comb begin
    if      (addr_word)          ins = I_NOP;
    else if (ir[9:8] == 2'b11)   ins = I_CJUMP;
    else if (ir[9:8] == 2'b10)   ins = I_CCALL;
    else if (ir[9:8] == 2'b01)   ins = I_CRET;
    else if (ir[9:7] == 3'b001)  ins = I_MOV;
    else if (ir[9:6] == 4'b0001) ins = I_MVI;
    else if (ir[9:5] == 5'b00001) ins = I_ALU;
    else if (ir[9:4] == 6'b000001) ins = I_CHANGE;
    else                         ins = I_NOP;
  end

  logic is_branch;
  assign is_branch = (ins == I_CJUMP) || (ins == I_CCALL) || (ins == I_CRET);

  // Bus address and data.
  always_comb begin
    reg_addr  = ir[4:0];
    reg_wdata = ir[6] ? accu : temp;
    if (is_branch) reg_addr = ir[7:3];
  end
  assign reg_we = cycle_end && ins == I_MOV && !ir[5];

  // Condition selector.
  logic cond;
  assign cond = (nibble_bit(reg_rdata, ir[2:1]) == ir[0]);

  // ALU.
  logic [3:0] alu_y;
  logic       alu_c;
  hl2_alu u_alu (.a(accu), .b(temp), .op(alu_op_e'(ir[4:3])), .y(alu_y), .carry(alu_c));

  // Next address multiplexer.
  logic [AW-1:0] pc_cur, fetch;
  logic          push, pop;
  logic [SPW-1:0] sp_dec;
  logic [SIW-1:0] push_idx, pop_idx;
  assign sp_dec   = sp - 1'b1;
  assign push_idx = sp[SIW-1:0];
  assign pop_idx  = sp_dec[SIW-1:0];
  assign pc_cur = pc[proc];
  always_comb begin
    fetch  = pc_cur;
    push   = 1'b0;
    pop    = 1'b0;
    if (addr_word) begin
      if (pend_cond) begin
        fetch = ir[AW-1:0];
        push  = pend_call;
      end
    end else begin
      unique case (ins)
        I_CRET:  pop = cond && sp != '0;
        default: ;
      endcase
    end
  end
  assign rom_addr = fetch;

  assign ev_change = cycle_end && ins == I_CHANGE;
  assign ev_call   = cycle_end && push;
  assign ev_ret    = cycle_end && pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      ir <= '0;
      pc[0] <= '0;
      pc[1] <= TX_START[AW-1:0];
      sp <= '0;
      proc <= 1'b0;
      accu <= '0;
      temp <= '0;
      carry <= 1'b0;
      addr_word <= 1'b0;
      pend_cond <= 1'b0;
      pend_call <= 1'b0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else if (!cycle_end) begin
      phase <= phase + 1'b1;
    end else begin
      phase <= '0;
      // Execute.
      unique case (ins)
        I_CJUMP, I_CCALL: begin
          pend_cond <= cond;
          pend_call <= (ins == I_CCALL);
        end
        I_MOV: if (ir[5]) begin
          if (ir[6]) accu <= reg_rdata; else temp <= reg_rdata;
        end
        I_MVI: if (ir[5]) accu <= ir[4:1]; else temp <= ir[4:1];
        I_ALU: begin
          accu <= alu_y;
          carry <= alu_c;
        end
        default: ;
      endcase
      addr_word <= (ins == I_CJUMP) || (ins == I_CCALL);
      // Stack.
      if (push && sp != SPW'(STACK_DEPTH)) begin
        stack[push_idx] <= pc_cur;
        sp <= sp + 1'b1;
      end
      // Fetch.
      if (pop) begin
        pc[proc] <= stack[pop_idx];
        sp <= sp_dec;
        ir <= '0;
      end else if (ins == I_CHANGE) begin
        proc <= ~proc;
        ir <= '0;
      end else begin
        ir <= rom_data;
        pc[proc] <= fetch + 1'b1;
      end
    end
  end
endmodule
