# Regular-expression rule modules with a joining microcontroller

Intrusion-detection rules are increasingly written as regular expressions
such as `finger.{1024}\n` or `scripts.*cgi`. Turning a whole set of such
expressions into one deterministic automaton (DFA) makes the state count
explode: every `.*` copies part of the automaton, and a bounded gap
`.{n}` copies it n times. This design avoids the explosion by cutting every
expression at its wildcards and bounded gaps. The pieces between the cuts,
called *segments*, are literal strings (or small sub-expressions), and a DFA
handles them cheaply. A small microcontroller next to each DFA then puts the
expression back together at run time: it remembers that a segment was seen
(`.*`), or when it was seen (`.{n}`), and it reports the expression once the
last segment arrives under the right conditions.

All tables are ordinary RAMs that are written at run time: the DFA, the
controller program, its data, the segment-to-program map and the counter
selection. A new rule set therefore needs no new FPGA bitstream.

```
                       rule module (regex_module)
 byte ─┬─► tile 0 (bits 1:0) ─ PMV0 ─┐
       ├─► tile 1 (bits 3:2) ─ PMV1 ─┤ AND   28-bit          5-bit index
       ├─► tile 2 (bits 5:4) ─ PMV2 ─┼─────► segment ─► priority encoder ──┐
       ├─► tile 3 (bits 7:6) ─ PMV3 ─┘       vector     with FIFO          │
       │                                                  ▲ counter         │
       └─► counter bank (any, non-\n, \s, programmable) ──┘ snapshot        ▼
                         per-segment counter choice ──────────────► {index, 16-bit count}
                                                                            │
                                     subpattern FIFO, 16 x 21 ◄─────────────┘
                                                │
                              entry point translation, 32 x 7
                                                │ entry address + count
                                                ▼
                      microcontroller: PC, IMEM 128x16, DMEM 32x16 ─► match
```

The device-level top, `regex_ids_array`, holds 47 of these modules, which
all watch the same reassembled byte stream. Each module carries up to 28
segments, so the array holds 1,316 segments in total.

## Segment matching: bit-split tiles

An ordinary DFA state needs 256 next-state pointers, one for each input
byte. In the bit-split scheme the DFA is replaced by four smaller machines,
called tiles. Each tile sees only two bits of every byte: tile *k* sees bits
`2k+1:2k`. A tile state therefore needs only four pointers.

Each tile state also carries a 28-bit *partial match vector* (PMV). Bit *i*
is set when segment *i* may have ended at the current byte, judged from this
tile's two bits alone. A segment has really ended when all four tiles set
its bit. The module ANDs the four PMVs into the 28-bit segment match vector.

How a tile table is computed (the testbench package `bs_compiler_pkg` does
this for literal segments):

1. Build the Aho-Corasick automaton of the segments and complete it into a
   byte DFA `δ(s, c)`. `out(s)` is the set of segments that end in state `s`.
2. For tile *k*, each tile state is a set *S* of DFA states. The start state
   is `{0}`. On the 2-bit value *b*, *S* moves to
   `{ δ(s, c) : s ∈ S, (c >> 2k) & 3 = b }`. New sets become new tile states.
3. The PMV of *S* is the union of `out(s)` over all `s ∈ S`.

For literal segments, the AND of the four vectors is exactly the set of
segments that end at the byte.

A tile row is `{next[3], next[2], next[1], next[0], pmv}`, 9 + 9 + 9 + 9 + 28
= 64 bits, and a tile has 512 rows. One tile fills two 16-Kbit block RAMs,
so a module uses eight. The tile holds the row of its current state in a
register. On each byte it takes the pointer selected by the byte's two bits
and reads that row on the same clock edge. The tile thus accepts one byte
per cycle with a synchronous RAM, and its PMV appears one cycle after the
byte. On cycles with no byte, the tile reads the current row again. This is
why one idle cycle is needed after reset or after the tables are written.

## From segment matches to events

Several segments can end on the same byte: `scripts` and `cripts` always
do. They can also end on bytes in quick succession. The path to the
controller must keep both the order of the matches and their timing:

* **Counter bank.** Four free-running 16-bit counters: every byte, every
  byte except `\n`, every whitespace byte (0x09 to 0x0D and 0x20), and every
  byte equal to a programmable value. A 32 × 2 table chooses one counter for
  each segment.
* **Priority encoder with FIFO.** Each non-zero match vector is queued
  (4 deep) together with a snapshot of all four counters taken on the same
  cycle. The encoder then emits the index of every set bit, lowest index
  first, one per cycle. Each index keeps the snapshot of its own byte, so a
  detection that waits in the queue does not change its count.
* **Subpattern FIFO.** 16 entries of `{5-bit index, 16-bit count}`, with the
  count taken from the counter chosen for that segment. It absorbs bursts
  while the controller spends several cycles on each event.
* **Entry point translation.** A 32 × 7 table that maps the segment index to
  the address of the routine that handles it.

The byte stream is never stopped. If the encoder queue or the event FIFO is
full, the event is lost and the sticky `overflow` output is set. This is a
real limit of the design. Take `scripts.*cgi` followed by `cgi` repeated back
to back. A new `cgi` arrives every 3 cycles, and the controller needs 5 cycles
for each (one dispatch cycle and four instructions). The FIFO therefore
fills by 2 entries every 15 cycles: 16 / (1 − 3/5) = 40 repeats. The
simulated module overflows after 43 repeats, because its pipeline registers
hold a few more events. Segments shorter than about 5 bytes whose routines
run 4 instructions can therefore be used to flood the module.

Latency, counted from the clock edge that takes the last byte of a segment:

| edge | what happens |
|------|--------------|
| 0 | the tiles' PMVs are valid after this edge |
| 1 | the vector enters the encoder queue |
| 2 | the encoder loads the vector |
| 3 | the index and count are presented |
| 4 | the event is written into the subpattern FIFO |
| 5 | the controller dispatches it |
| 6 | `match_valid`, if the routine starts with `SETOUT` |

## The microcontroller

Address 0 is the wait loop. While the PC is 0 and the FIFO holds an event,
the controller pops the event in one cycle. It loads the PC with the event's
entry address and loads the event's count into the `time` register. Every
other cycle executes one instruction. Both memories are read
asynchronously, and writes take effect at the end of the cycle. A routine
ends by jumping back to 0. When no event is waiting, the word at address 0
is executed; it must be `JMP 0`.

Instruction word: `[15:13]` opcode, `[12:8]` data address, `[7:0]`
immediate.

| op  | name   | effect | negative flag |
|-----|--------|--------|---------------|
| 000 | JMP    | `PC ← imm[6:0]` if neg = 0, else PC+1 | unchanged |
| 001 | SETFLG | `dmem[addr] ← imm` | cleared |
| 010 | SETCNT | `dmem[addr] ← time` | cleared |
| 011 | SETOUT | `out_reg[imm[3:0]] ← 1`, one-cycle `match_valid`, `match_id = imm` | cleared |
| 100 | SUB    | `shadow ← shadow − dmem[addr]` | result < 0 |
| 101 | SUBT   | `shadow ← time − dmem[addr]` | result < 0 |
| 110 | NOP    | – | unchanged |
| 111 | LOAD   | `shadow ← dmem[addr]` | dmem[addr] < 1 |

Arithmetic is 16-bit two's complement. Counters wrap, so `time − old` gives
the correct gap for gaps below 32768.

Because JMP is taken only when the flag is clear, an unconditional jump
depends on the instruction before it clearing the flag. Every non-arithmetic
instruction does so. LOAD sets the flag for values below 1. A flag word
therefore reads as "jump" when it holds a positive value. The example program
below stores 1 for "not yet seen" and 0 for "seen".

Example program (from `tb/uc_prog_pkg.sv`). Its entry points for segments
0 to 5 are 1, 3, 10, 12, 16 and 18:

```
 0  JMP 0            wait loop
 1  SETCNT m0        "finger": remember its count
 2  JMP 20
 3  LOAD m3          "\n": was "finger" seen?  (m3 = 0 when seen)
 4  JMP 0              no  -> done
 5  SUBT m0            gap = time - count at "finger"
 6  SUB m1             gap - bound
 7  JMP 0              gap >= bound -> done
 8  SETOUT 0           match 0: finger.{<bound}\n
 9  JMP 0
10  SETFLG m2,0      "scripts": wildcard now open
11  JMP 0
12  LOAD m2          "cgi": wildcard open?
13  JMP 15             no  -> skip
14  SETOUT 1           match 1: scripts.*cgi
15  JMP 0
16  SETOUT 2         "cripts": plain string rule
17  JMP 0
20  SETFLG m3,0      mark "finger" seen
21  JMP 0
```

Cycle counts, including the dispatch cycle: `cgi` takes 5 cycles when the
wildcard is open and 4 when it is not. `\n` takes 3 cycles before any
`finger`; after one it takes 8 cycles when the gap is inside the bound and
6 when it is not. Lower and upper bounds
on a gap are built from further SUB and JMP pairs. A segment shared by
several rules (`\n` typically) simply runs one check after another, so limit
how many such rules one module carries.

## Programming

Each module has one write port, `cfg` (type `cfg_wr_t` in
`rtl/regex_pkg.sv`). It accepts one write per cycle:

| target | addr | data |
|--------|------|------|
| `CFG_TILE`  | `[10:9]` tile, `[8:0]` row | 64-bit row |
| `CFG_XLAT`  | `[4:0]` segment | `[6:0]` entry address |
| `CFG_IMEM`  | `[6:0]` word | `[15:0]` instruction |
| `CFG_DMEM`  | `[4:0]` word | `[15:0]` value |
| `CFG_CSEL`  | `[4:0]` segment | `[1:0]` counter (`cnt_sel_e`) |
| `CFG_CBYTE` | – | `[7:0]` byte counted by the programmable counter |

The RAM contents have no reset. Write the tile, translation, selection,
instruction and data tables while `rst_n` is low, so that nothing runs on
power-up contents. Then release reset, write `CFG_CBYTE` (it is a reset
register), and wait one idle cycle. Tables can be rewritten while bytes
flow. A host write to data memory wins over a program write in the same
cycle, so write data memory while the module is idle (`uc_busy` low).

In `regex_ids_array` a write goes to module `cfg_module`, or to all modules
when `cfg_broadcast` is high. `out_clear` clears every output register.

## Sizes

| quantity | value | origin |
|----------|-------|--------|
| modules per device | 47 (`NUM_MODULES`) | source design (Virtex-4 FX100, 376 block RAMs) |
| segments per module | 28 | source design |
| tiles × bits | 4 × 2 | source design |
| states per tile | 512 (`TILE_STATES`) | own choice: 2 block RAMs per tile, 8 per module |
| encoder queue | 4 vectors (`PE_DEPTH`) | own choice |
| event FIFO | 16 × 21 | source design |
| translation | 32 × 7 | source design |
| instruction memory | 128 × 16 | source design |
| data memory | 32 × 16 | source design |
| counters | 4 × 16 bits | source design |

The source design reports 412 MHz with one byte per cycle (3.3 Gbps) on that
device. This RTL also takes one byte per cycle. Its clock rate has not been
measured.

## How far to trust it, and where it departs

Followed closely: the block structure and widths; the four counter kinds;
the opcode list with what each opcode reads, writes and compares; the
memory sizes; the wait loop at address 0; and the 5-cycle cost of an
unbounded-wildcard check. The design's own choices are:

* The instruction field layout, and which instructions clear the negative
  flag.
* The programming bus, and the one-cycle dispatch.
* The 512 tile states and the tile read scheme.
* The priority order (lowest index first) and the encoder queue depth.
* The whitespace set, and the reading of the "programmable match counter"
  as a counter of one chosen byte value.
* The 16-bit sticky output register.
* Dropping new events on overflow.

Two details of the source's example listing do not agree with its own text.
Its subtract opcode is shown as a "load", and its wildcard check skips the
output when the wildcard *is* active. This RTL follows the opcode table and
the text. The example program above is written for that reading.

Not included: TCP stream reassembly, per-stream buffers, header matching and
the configuration controller that surround the array. These are a separate
system outside the array. The software that splits rules, builds the
annotated DFA and assembles programs is not included either. The
testbenches carry a compiler for literal segments, plus one way to add a
small hand-written DFA: the product of the two automata is bit-split like
the literal automaton. `tb_fig2_database` uses this for `(c(a|b)*)` and
`((de)+)`, and there the AND of the four tiles matched the direct DFA on
every byte tested. For general sub-expressions, AND-ing the tiles can report
a segment that did not occur. The table software must then add states; that
software is not part of this repository. Flags and counters are never
cleared by the hardware at a stream boundary. Use reset, or rewrite the data
memory.

A character class inside a segment, such as the `\s` in `NLST\s`, can be
written as one literal segment per byte value, all sent to the same entry
point. That is how `tb_nlst_rule` builds `NLST\s[^\n]{100}`. A rule that
ends in a bounded run of non-newline bytes is decided when the next newline
arrives, so a match is reported at the end of the line rather than at its
100th byte.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|-----------|--------|
| `tb_bitsplit_tile` | four compiled tiles; AND of PMVs equals a direct string search at every byte; PMV one cycle after the byte; overlapped `telephone`/`phonebook` on `telephonebook` reports both |
| `tb_match_priority_encoder` | order, snapshot and one-per-cycle output; a 5-bit vector takes 5 consecutive cycles; overflow only when full |
| `tb_counter_bank` | all four counters and the per-segment choice against a model |
| `tb_subpattern_fifo` | random traffic against a queue model; 16 entries; drop and overflow |
| `tb_entry_translation` | example entry points 1, 3, 10, 12, 16, 18 plus random rewrites |
| `tb_regex_uc` | example program against a rule model; cycles per event (3, 5, 8) |
| `tb_regex_module` | whole module: every event and count, every match, run-time bound change, 6-cycle latency, overflow after about 40 `cgi` repeats |
| `tb_fig2_database` | one module with the three-rule example set `finger.{1024}\n`, `scripts.*cgi`, `(c(a|b)*).{,1000}((de)+)`; the last rule's segments come from a small DFA combined with the literal segments; events, counts and matches against a reference; each rule matches and is rejected |
| `tb_nlst_rule` | one module with `NLST\s[^\n]{100}`: five `NLST`+whitespace segments share one entry point; the program keeps the first hit of the line and reports a match at the newline if at least 100 bytes lay between; every line end against a reference, gaps on both sides of 100 |
| `tb_regex_ids_array` | all 47 modules at default size, each with its own bound; matches per module; run-time rewrite; overflow in every module |

Example, for the full array (it builds in under a minute and runs in under a second):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/regex_pkg.sv tb/bs_compiler_pkg.sv tb/uc_prog_pkg.sv \
  $(ls rtl/*.sv | grep -v regex_pkg) \
  tb/tb_regex_ids_array.sv --top-module tb_regex_ids_array
./obj_dir/Vtb_regex_ids_array
```

For a single block, list the packages first, then the block's RTL files and
its testbench, and pass the testbench as `--top-module`.

## Files

`rtl/regex_pkg.sv` holds the shared constants, opcodes and the `event_t`,
`instr_t` and `cfg_wr_t` types. One module per file:

* `bitsplit_tile`
* `match_priority_encoder`
* `counter_bank`
* `subpattern_fifo`
* `entry_translation`
* `regex_uc`
* `regex_module` (one rule module)
* `regex_ids_array` (top)

`tb/` holds one testbench per module, plus `bs_compiler_pkg` (the tile-table
compiler and reference matcher) and `uc_prog_pkg` (the example rule
program).
