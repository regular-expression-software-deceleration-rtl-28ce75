// counter_bank: configurable counter bank of a rule module.
//
// Four free-running 16-bit counters advance on the bytes of the stream:
//   0  every byte
//   1  every byte other than '\n' (0x0A)
//   2  every whitespace byte: 0x09..0x0D and 0x20
//   3  every byte equal to a programmable value (prog_byte)
// The counters are not tied to patterns; the microcontroller stores a value
// and later subtracts it from a newer one, so wrap-around at 2^16 is harmless
// for gaps below 65536.
//
// The bank is also the place where the choice of counter per segment is kept:
// a 32 x 2 table (programmed through csel_we/csel_addr/csel_data) says which
// counter accompanies each segment index into the event FIFO. The lookup
// port picks that counter out of a snapshot (lk_cnts) taken when the segment
// matched, combinationally.
//
// Timing: a byte in cycle t is counted in cnts from cycle t+1, the same cycle
// in which the tiles show the PMV for that byte.
//
// From the source description: the four counter kinds and 16-bit width. Own
// choices: the exact whitespace set, the programmable counter as an
// equal-to-a-byte counter, reset to zero and the per-segment selection table.
module counter_bank
  import regex_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [7:0]                 in_byte,
  // programming
  input  logic                       csel_we,
  input  logic [SEG_W-1:0]           csel_addr,
  input  cnt_sel_e                   csel_data,
  input  logic                       pbyte_we,
  input  logic [7:0]                 pbyte_data,
  // counters
  output logic [NCNT-1:0][CNT_W-1:0] cnts,
  // per-segment lookup
  input  logic [SEG_W-1:0]           lk_seg,
  input  logic [NCNT-1:0][CNT_W-1:0] lk_cnts,
  output logic [CNT_W-1:0]           lk_value
);

  cnt_sel_e  csel [XLAT_DEPTH];
  logic [7:0] prog_byte;
  logic       is_space;

  assign is_space = (in_byte == 8'h20) || (in_byte >= 8'h09 && in_byte <= 8'h0D);

  always_ff @(posedge clk) begin
    if (csel_we) csel[csel_addr] <= csel_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnts      <= '0;
      prog_byte <= '0;
    end else begin
      if (pbyte_we) prog_byte <= pbyte_data;
      if (in_valid) begin
        cnts[CNT_ANY] <= cnts[CNT_ANY] + 1'b1;
        if (in_byte != 8'h0A)      cnts[CNT_NONL]  <= cnts[CNT_NONL] + 1'b1;
        if (is_space)              cnts[CNT_SPACE] <= cnts[CNT_SPACE] + 1'b1;
        if (in_byte == prog_byte)  cnts[CNT_PROG]  <= cnts[CNT_PROG] + 1'b1;
      end
    end
  end

  assign lk_value = lk_cnts[csel[lk_seg]];

endmodule
