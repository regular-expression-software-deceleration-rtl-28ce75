// entry_translation: segment index to instruction entry point.
//
// A 32-entry table, programmed at run time, that turns the encoded index of a
// matched pattern segment into the address of the code that handles it in the
// microcontroller's 128-word instruction memory (7 bits). Several segments may
// share an entry point.
//
// Interface: write port we/waddr/wdata; read port seg -> entry, combinational
// (a small distributed RAM), so the head of the event FIFO is translated in
// the cycle the microcontroller takes it.
//
// From the source description: 32 x 7 size and the function. Own choice: the
// asynchronous read.
module entry_translation #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = 7,
  localparam int unsigned SW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [SW-1:0] waddr,
  input  logic [AW-1:0] wdata,
  input  logic [SW-1:0] seg,
  output logic [AW-1:0] entry
);

  logic [AW-1:0] table_q [DEPTH];

  always_ff @(posedge clk) begin
    if (we) table_q[waddr] <= wdata;
  end

  assign entry = table_q[seg];

endmodule
