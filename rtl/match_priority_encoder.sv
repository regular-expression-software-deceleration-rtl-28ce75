// match_priority_encoder: priority encoder with FIFO.
//
// Several pattern segments can end on the same byte, or on bytes in quick
// succession. This block accepts one match vector per cycle (the AND of the
// four tiles' PMVs) together with a snapshot of the counter bank taken on the
// same cycle, queues non-zero vectors in a small FIFO, and hands out the
// encoded index of every set bit, lowest index first, one per cycle. Each
// index leaves with the counter snapshot of its own byte, so the time of the
// detection is kept however long the encoder takes.
//
// Interface: vec_valid/vec/cnts in; ev_valid/ev_seg/ev_cnts out (one cycle
// pulse, no back-pressure: the byte stream cannot be stopped). overflow is
// sticky and set when a vector arrives while the queue is full; that vector
// is dropped. Timing: a vector arriving in cycle t gives its first index in
// cycle t+1 at the earliest.
//
// From the source description: the serialising priority encoder and its
// FIFO. Own choices: lowest index first, queue depth DEPTH = 4, the sticky
// overflow flag.
module match_priority_encoder
  import regex_pkg::NCNT, regex_pkg::CNT_W;
#(
  parameter int unsigned NSEG  = regex_pkg::NSEG,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned SW   = $clog2(NSEG)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       vec_valid,
  input  logic [NSEG-1:0]            vec,
  input  logic [NCNT-1:0][CNT_W-1:0] cnts,
  output logic                       ev_valid,
  output logic [SW-1:0]              ev_seg,
  output logic [NCNT-1:0][CNT_W-1:0] ev_cnts,
  output logic                       overflow
);

  typedef struct packed {
    logic [NSEG-1:0]            vec;
    logic [NCNT-1:0][CNT_W-1:0] cnts;
  } entry_t;

  localparam int unsigned PW = $clog2(DEPTH);

  entry_t          q [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;
  logic [PW:0]     count;
  entry_t          cur;        // vector being encoded
  logic            push, pop, full, empty;
  logic [SW-1:0]   low_idx;
  logic [NSEG-1:0] rest;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);

  // Lowest set bit of the current vector.
  always_comb begin
    low_idx = '0;
    for (int i = NSEG-1; i >= 0; i--)
      if (cur.vec[i]) low_idx = SW'(i);
    rest = cur.vec & ~(NSEG'(1) << low_idx);
  end

  assign push = vec_valid && (vec != '0) && !full;
  // Load the next queued vector when the current one is finished.
  assign pop  = !empty && (rest == '0);

  always_ff @(posedge clk) begin
    if (push) q[wr_ptr] <= '{vec: vec, cnts: cnts};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      cur      <= '0;
      ev_valid <= 1'b0;
      ev_seg   <= '0;
      ev_cnts  <= '0;
      overflow <= 1'b0;
    end else begin
      ev_valid <= (cur.vec != '0);
      ev_seg   <= low_idx;
      ev_cnts  <= cur.cnts;
      if (pop) cur <= q[rd_ptr];
      else     cur.vec <= rest;
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      if (vec_valid && (vec != '0) && full) overflow <= 1'b1;
    end
  end

endmodule
