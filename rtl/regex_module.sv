// regex_module: one regular-expression rule module.
//
// Data path, one input byte per cycle:
//   byte -> four bit-split tiles (two bits each) -> AND of the four partial
//   match vectors = segment match vector (28 bits)
//   -> priority encoder with FIFO (one segment index per cycle, with a
//      snapshot of the counters taken when the segment ended)
//   -> the counter bank picks the counter chosen for that segment
//   -> subpattern FIFO (16 x {5-bit index, 16-bit counter value})
//   -> entry point translation (index -> instruction address)
//   -> microcontroller, which joins the segments and raises match.
// seg_valid/seg_index/seg_count show each segment event as it enters the
// event FIFO. The byte stream is never stopped: when the event FIFO or the encoder's
// queue is full, events are lost and overflow is set (sticky).
//
// Programming bus (cfg, one write per cycle, any time):
//   CFG_TILE  addr[10:9] tile, addr[8:0] row, data = row (see bitsplit_tile)
//   CFG_XLAT  addr[4:0] segment, data[6:0] entry point
//   CFG_IMEM  addr[6:0] word, data[15:0] instruction
//   CFG_DMEM  addr[4:0] word, data[15:0] value
//   CFG_CSEL  addr[4:0] segment, data[1:0] counter for that segment
//   CFG_CBYTE data[7:0] byte counted by the programmable counter
//
// Timing: counting from the clock edge that takes the last byte of a segment,
// the tiles' vectors are valid after edge 0, the encoder queues the vector at
// edge 1, loads it at edge 2 and presents the index at edge 3; the event is
// written into the FIFO at edge 4 and dispatched at edge 5. A routine whose
// first instruction is SETOUT raises match_valid after edge 6. Each further
// instruction adds one cycle; simultaneous segments follow one per cycle.
//
// From the source description: the blocks and their connection, the widths
// (28-bit PMVs, 16-bit counters, 21-bit events) and sizes. Own choices: the
// programming bus, the overflow flags and the pipeline registers.
module regex_module
  import regex_pkg::*;
#(
  parameter int unsigned TILE_STATES = regex_pkg::DEF_TILE_STATES,
  parameter int unsigned PE_DEPTH    = 4,
  localparam int unsigned SB    = $clog2(TILE_STATES),
  localparam int unsigned ROW_W = 4*SB + NSEG
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  cfg_wr_t     cfg,
  input  logic        out_clear,
  output logic        match_valid,
  output logic [7:0]  match_id,
  output logic [15:0] out_reg,
  output logic        overflow,
  output logic        seg_valid,
  output logic [SEG_W-1:0] seg_index,
  output logic [CNT_W-1:0] seg_count,
  output logic        uc_busy,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count
);

  // ---- tiles --------------------------------------------------------------
  logic [NTILES-1:0]           pmv_valid;
  logic [NTILES-1:0][NSEG-1:0] pmv;
  logic [NSEG-1:0]             seg_vec;

  for (genvar t = 0; t < NTILES; t++) begin : g_tile
    bitsplit_tile #(.STATES(TILE_STATES), .NSEG(NSEG)) u_tile (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_bits  (in_byte[2*t +: 2]),
      .wr_en    (cfg.we && cfg.target == CFG_TILE && cfg.addr[10:9] == 2'(t)),
      .wr_addr  (cfg.addr[SB-1:0]),
      .wr_data  (cfg.data[ROW_W-1:0]),
      .pmv_valid(pmv_valid[t]),
      .pmv      (pmv[t]),
      .state    ()
    );
  end

  // A segment has matched when every tile reports it.
  always_comb begin
    seg_vec = '1;
    for (int t = 0; t < NTILES; t++) seg_vec &= pmv[t];
  end

  // ---- counters -----------------------------------------------------------
  logic [NCNT-1:0][CNT_W-1:0] cnts;
  logic                       pe_valid;
  logic [SEG_W-1:0]           pe_seg;
  logic [NCNT-1:0][CNT_W-1:0] pe_cnts;
  logic [CNT_W-1:0]           pe_value;
  logic                       pe_overflow;

  counter_bank u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_byte   (in_byte),
    .csel_we   (cfg.we && cfg.target == CFG_CSEL),
    .csel_addr (cfg.addr[SEG_W-1:0]),
    .csel_data (cnt_sel_e'(cfg.data[1:0])),
    .pbyte_we  (cfg.we && cfg.target == CFG_CBYTE),
    .pbyte_data(cfg.data[7:0]),
    .cnts      (cnts),
    .lk_seg    (pe_seg),
    .lk_cnts   (pe_cnts),
    .lk_value  (pe_value)
  );

  // ---- priority encoder ---------------------------------------------------
  match_priority_encoder #(.NSEG(NSEG), .DEPTH(PE_DEPTH)) u_pe (
    .clk      (clk),
    .rst_n    (rst_n),
    .vec_valid(pmv_valid[0]),
    .vec      (seg_vec),
    .cnts     (cnts),
    .ev_valid (pe_valid),
    .ev_seg   (pe_seg),
    .ev_cnts  (pe_cnts),
    .overflow (pe_overflow)
  );

  // ---- subpattern FIFO ----------------------------------------------------
  event_t fifo_din, fifo_dout;
  logic   fifo_empty, fifo_full, fifo_overflow, ev_pop;

  assign fifo_din = '{seg: pe_seg, cnt: pe_value};

  subpattern_fifo #(.WIDTH($bits(event_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (pe_valid),
    .din     (fifo_din),
    .pop     (ev_pop),
    .dout    (fifo_dout),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count),
    .overflow(fifo_overflow)
  );

  // ---- entry point translation --------------------------------------------
  logic [IADDR_W-1:0] entry;

  entry_translation #(.DEPTH(XLAT_DEPTH), .AW(IADDR_W)) u_xlat (
    .clk  (clk),
    .we   (cfg.we && cfg.target == CFG_XLAT),
    .waddr(cfg.addr[SEG_W-1:0]),
    .wdata(cfg.data[IADDR_W-1:0]),
    .seg  (fifo_dout.seg),
    .entry(entry)
  );

  // ---- microcontroller ----------------------------------------------------
  regex_uc u_uc (
    .clk        (clk),
    .rst_n      (rst_n),
    .ev_valid   (!fifo_empty),
    .ev_entry   (entry),
    .ev_time    (fifo_dout.cnt),
    .ev_pop     (ev_pop),
    .im_we      (cfg.we && cfg.target == CFG_IMEM),
    .im_addr    (cfg.addr[IADDR_W-1:0]),
    .im_data    (instr_t'(cfg.data[INSTR_W-1:0])),
    .dm_we      (cfg.we && cfg.target == CFG_DMEM),
    .dm_addr    (cfg.addr[DADDR_W-1:0]),
    .dm_data    (cfg.data[CNT_W-1:0]),
    .out_clear  (out_clear),
    .match_valid(match_valid),
    .match_id   (match_id),
    .out_reg    (out_reg),
    .busy       (uc_busy),
    .pc         ()
  );

  assign overflow  = fifo_overflow | pe_overflow;
  assign seg_valid = pe_valid;
  assign seg_index = pe_seg;
  assign seg_count = pe_value;

  logic unused_full;
  assign unused_full = fifo_full;

endmodule
