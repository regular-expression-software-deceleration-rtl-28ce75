// subpattern_fifo: event buffer between segment detection and the
// microcontroller.
//
// Each entry is one segment event: the 5-bit segment index and the 16-bit
// counter value at the moment the segment matched (21 bits). The buffer
// absorbs bursts while the microcontroller spends several cycles on each
// event. It cannot stall the byte stream, so a push into a full buffer drops
// the event and sets the sticky overflow flag.
//
// Interface: push/din in; the head entry is on dout whenever empty is low
// (first-word fall-through) and pop removes it. Timing: an entry pushed in
// cycle t can be popped from cycle t+1. A push and a pop in the same cycle
// are both done, also when the buffer is full.
//
// From the source description: 16 slots, 21 bits per slot, overflow by a
// determined sender. Own choices: fall-through read, drop-new on overflow and
// the sticky flag.
module subpattern_fifo #(
  parameter int unsigned WIDTH = 21,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [PW:0]      count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  // A pop is only meaningful when an entry is present.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("subpattern_fifo: pop while empty");

endmodule
