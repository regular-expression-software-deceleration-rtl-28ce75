// bitsplit_tile: one bit-split DFA tile.
//
// A rule module splits its segment-matching DFA into four machines, each of
// which sees only two bits of every input byte (tile k sees bits 2k+1:2k).
// Each state therefore has four next-state pointers instead of 256, and
// carries a partial match vector (PMV): bit i is set when, judged from this
// tile's two bits alone, segment i may have just ended. A segment has really
// matched when all four tiles set its bit; the AND is done by the caller.
//
// Storage: STATES rows of {next[3], next[2], next[1], next[0], pmv}, each
// pointer $clog2(STATES) bits. With the defaults a row is 4*9+28 = 64 bits and
// the table is 512 x 64 = 32 Kbit, two 18 Kbit block RAMs. The row table is
// written at run time through wr_en/wr_addr/wr_data.
//
// Timing: one byte per cycle. The row of the current state is held in row_q
// (a synchronous block-RAM read). For a byte the next state is picked from
// row_q combinationally and its row read on the same edge, so the PMV of the
// state reached by the byte of cycle t is on pmv during cycle t+1, with
// pmv_valid high. In a cycle without a byte the row of the current state is
// read again, so one idle cycle after reset or after programming is needed
// before the first byte.
//
// From the source description: four tiles of two bits and 28-bit PMVs. Own
// choices: 512 states, the row layout, the read scheme and reset to state 0.
module bitsplit_tile #(
  parameter int unsigned STATES = 512,
  parameter int unsigned NSEG   = 28,
  localparam int unsigned SB    = $clog2(STATES),
  localparam int unsigned ROW_W = 4*SB + NSEG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0]       in_bits,
  input  logic             wr_en,
  input  logic [SB-1:0]    wr_addr,
  input  logic [ROW_W-1:0] wr_data,
  output logic             pmv_valid,
  output logic [NSEG-1:0]  pmv,
  output logic [SB-1:0]    state
);

  logic [ROW_W-1:0] mem [STATES];
  logic [ROW_W-1:0] row_q;
  logic [SB-1:0]    state_q;
  logic [SB-1:0]    nxt;
  logic [SB-1:0]    rd_addr;

  always_comb begin
    nxt     = row_q[NSEG + SB*in_bits +: SB];
    rd_addr = in_valid ? nxt : state_q;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    row_q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '0;
      pmv_valid <= 1'b0;
    end else begin
      state_q   <= rd_addr;
      pmv_valid <= in_valid;
    end
  end

  assign pmv   = row_q[NSEG-1:0];
  assign state = state_q;

endmodule
