// regex_uc: the rule module's microcontroller.
//
// Each regular expression is cut at its wildcards and bounded gaps into
// literal segments; the tiles find the segments, and this controller joins
// them again. It keeps flags (an unbounded wildcard ".*" has been reached)
// and old counter values (where a bounded gap started) in a 32 x 16 data
// memory and runs short routines from a 128 x 16 instruction memory, one
// routine per segment event.
//
// Execution: address 0 is the wait loop. While the PC is 0 and an event is
// waiting (ev_valid), the controller takes it (ev_pop), loads the PC with the
// event's entry point and the event's counter value into the time register;
// that dispatch takes one cycle. Otherwise it executes imem[PC], one
// instruction per cycle, with an asynchronous data-memory read and a write at
// the end of the cycle. With no event the word at address 0 is executed; it
// should be "jump 0". Routines end by jumping back to 0.
//
// Instruction word: [15:13] opcode, [12:8] data address, [7:0] immediate.
//   000 JMP    PC <= imm[6:0] if neg = 0, else PC+1
//   001 SETFLG dmem[addr] <= imm;          neg <= 0
//   010 SETCNT dmem[addr] <= time;         neg <= 0
//   011 SETOUT out_reg[imm[3:0]] <= 1, match_valid pulse with match_id = imm;
//              neg <= 0
//   100 SUB    shadow <= shadow - dmem[addr]; neg <= result < 0
//   101 SUBT   shadow <= time - dmem[addr];   neg <= result < 0
//   110 NOP    nothing
//   111 LOAD   shadow <= dmem[addr];          neg <= dmem[addr] < 1
// Comparisons are on 16-bit two's complement values.
//
// Programming: imem and dmem are written at run time through the im_*/dm_*
// ports; a host write to dmem wins over a write by the program in the same
// cycle, so the host should write dmem while the controller is idle.
// out_clear clears the output register.
//
// From the source description: the eight opcodes and what they read, write
// and compare, the wait loop at address 0, the memory sizes and the 16-bit
// data path. Own choices: the field layout, the neg-flag rule of the
// non-arithmetic opcodes, the output register as 16 sticky bits, and the
// one-cycle dispatch.
module regex_uc
  import regex_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // event from the subpattern FIFO, already translated
  input  logic               ev_valid,
  input  logic [IADDR_W-1:0] ev_entry,
  input  logic [CNT_W-1:0]   ev_time,
  output logic               ev_pop,
  // programming
  input  logic               im_we,
  input  logic [IADDR_W-1:0] im_addr,
  input  instr_t             im_data,
  input  logic               dm_we,
  input  logic [DADDR_W-1:0] dm_addr,
  input  logic [CNT_W-1:0]   dm_data,
  // results
  input  logic               out_clear,
  output logic               match_valid,
  output logic [7:0]         match_id,
  output logic [15:0]        out_reg,
  output logic               busy,
  output logic [IADDR_W-1:0] pc
);

  instr_t             imem [2**IADDR_W];
  logic [CNT_W-1:0]   dmem [2**DADDR_W];

  logic [IADDR_W-1:0] pc_q, pc_d;
  logic [CNT_W-1:0]   shadow_q, shadow_d;
  logic [CNT_W-1:0]   time_q, time_d;
  logic               neg_q, neg_d;
  instr_t             ir;
  logic [CNT_W-1:0]   ram_out;
  logic               dispatch;
  logic               wr_en;
  logic [CNT_W-1:0]   wr_val;
  logic               set_out;

  assign ir       = imem[pc_q];
  assign ram_out  = dmem[ir.addr];
  assign dispatch = (pc_q == '0) && ev_valid;
  assign ev_pop   = dispatch;

  always_comb begin
    pc_d     = pc_q + 1'b1;
    shadow_d = shadow_q;
    time_d   = time_q;
    neg_d    = neg_q;
    wr_en    = 1'b0;
    wr_val   = '0;
    set_out  = 1'b0;
    if (dispatch) begin
      pc_d   = ev_entry;
      time_d = ev_time;
      neg_d  = 1'b0;
    end else begin
      unique case (ir.op)
        OP_JMP: if (!neg_q) pc_d = ir.imm[IADDR_W-1:0];
        OP_SETFLG: begin
          wr_en  = 1'b1;
          wr_val = CNT_W'(ir.imm);
          neg_d  = 1'b0;
        end
        OP_SETCNT: begin
          wr_en  = 1'b1;
          wr_val = time_q;
          neg_d  = 1'b0;
        end
        OP_SETOUT: begin
          set_out = 1'b1;
          neg_d   = 1'b0;
        end
        OP_SUB: begin
          shadow_d = shadow_q - ram_out;
          neg_d    = shadow_d[CNT_W-1];
        end
        OP_SUBT: begin
          shadow_d = time_q - ram_out;
          neg_d    = shadow_d[CNT_W-1];
        end
        OP_NOP: ;
        OP_LOAD: begin
          shadow_d = ram_out;
          neg_d    = ($signed(ram_out) < $signed(CNT_W'(1)));
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (im_we) imem[im_addr] <= im_data;
    if (dm_we)      dmem[dm_addr] <= dm_data;
    else if (wr_en) dmem[ir.addr] <= wr_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= '0;
      shadow_q    <= '0;
      time_q      <= '0;
      neg_q       <= 1'b0;
      out_reg     <= '0;
      match_valid <= 1'b0;
      match_id    <= '0;
    end else begin
      pc_q        <= pc_d;
      shadow_q    <= shadow_d;
      time_q      <= time_d;
      neg_q       <= neg_d;
      match_valid <= set_out;
      if (set_out) match_id <= ir.imm;
      if (out_clear)    out_reg <= '0;
      else if (set_out) out_reg[ir.imm[3:0]] <= 1'b1;
    end
  end

  assign busy = (pc_q != '0);
  assign pc   = pc_q;

endmodule
