// regex_pkg: types and constants shared by the rule-module RTL.
//
// A rule module matches up to 28 pattern segments with four bit-split DFA
// tiles (two input bits each), serialises segment matches through a priority
// encoder into a 16-entry event FIFO that also holds a 16-bit counter snapshot,
// translates each segment index into an instruction address and runs a small
// microcontroller that joins segments across wildcards and bounded gaps.
//
// Sizes that follow the source description: 28 segments per module, four
// tiles of two bits, 16 FIFO slots of 21 bits, a 32 x 7 translation table,
// 128 x 16 instruction memory, 32 x 16 data memory, 3-bit opcodes, 16-bit
// counters. Own choices: 512 states per tile, the instruction field layout and
// the programming-bus layout below.
package regex_pkg;

  localparam int unsigned NSEG       = 28;   // pattern segments per module
  localparam int unsigned NTILES     = 4;    // bit-split tiles per module
  localparam int unsigned DEF_TILE_STATES = 512; // states per tile (own choice)
  localparam int unsigned SEG_W      = 5;    // encoded segment index width
  localparam int unsigned CNT_W      = 16;   // counter and data word width
  localparam int unsigned NCNT       = 4;    // counters in the counter bank
  localparam int unsigned FIFO_DEPTH = 16;   // subpattern FIFO slots
  localparam int unsigned IADDR_W    = 7;    // 128 instruction words
  localparam int unsigned DADDR_W    = 5;    // 32 data words
  localparam int unsigned XLAT_DEPTH = 32;   // translation table entries
  localparam int unsigned INSTR_W    = 16;

  // Counters of the configurable counter bank.
  typedef enum logic [1:0] {
    CNT_ANY     = 2'd0,  // every byte
    CNT_NONL    = 2'd1,  // bytes other than '\n'
    CNT_SPACE   = 2'd2,  // whitespace bytes (\s)
    CNT_PROG    = 2'd3   // bytes equal to a programmable value
  } cnt_sel_e;

  // Microcontroller opcodes (3 bits).
  typedef enum logic [2:0] {
    OP_JMP    = 3'b000,  // jump if the negative flag is clear
    OP_SETFLG = 3'b001,  // dmem[addr] <= immediate
    OP_SETCNT = 3'b010,  // dmem[addr] <= counter value of the event
    OP_SETOUT = 3'b011,  // set output register bit, raise match
    OP_SUB    = 3'b100,  // shadow <= shadow - dmem[addr]
    OP_SUBT   = 3'b101,  // shadow <= event time - dmem[addr]
    OP_NOP    = 3'b110,
    OP_LOAD   = 3'b111   // shadow <= dmem[addr], neg <= dmem[addr] < 1
  } opcode_e;

  // Instruction word: opcode, data-memory address, 8-bit immediate
  // (jump target in the low 7 bits, flag value or output number).
  typedef struct packed {
    opcode_e             op;
    logic [DADDR_W-1:0]  addr;
    logic [7:0]          imm;
  } instr_t;

  // One entry of the subpattern FIFO: 5-bit segment index + 16-bit counter.
  typedef struct packed {
    logic [SEG_W-1:0] seg;
    logic [CNT_W-1:0] cnt;
  } event_t;

  // Programming targets of the run-time programming bus.
  typedef enum logic [2:0] {
    CFG_TILE   = 3'd0,  // tile rows, tile number in addr[10:9]
    CFG_XLAT   = 3'd1,  // translation table
    CFG_IMEM   = 3'd2,  // instruction memory
    CFG_DMEM   = 3'd3,  // data memory
    CFG_CSEL   = 3'd4,  // counter selection per segment
    CFG_CBYTE  = 3'd5   // byte value of the programmable counter
  } cfg_target_e;

  // Programming-bus write: one word per cycle.
  typedef struct packed {
    logic         we;
    cfg_target_e  target;
    logic [10:0]  addr;
    logic [63:0]  data;
  } cfg_wr_t;

endpackage
