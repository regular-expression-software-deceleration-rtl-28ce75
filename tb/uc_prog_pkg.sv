// uc_prog_pkg: the example rule program used by the testbenches.
//
// Segments (index: text, counter, entry point):
//   0 "finger"  any-byte counter   1   remember where "finger" ended
//   1 "\n"      any-byte counter   3   match 0 if "finger" was seen and the
//                                      gap since its end is below BOUND
//   2 "scripts" any-byte counter  10   open the ".*" wildcard
//   3 "cgi"     any-byte counter  12   match 1 if "scripts" was seen before
//   4 "cripts"  any-byte counter  16   match 2 (a plain string rule)
//   5 "nlst "   non-\n counter    18   no action (exercises the selection)
// Data memory: 0 = counter at the last "finger", 1 = BOUND, 2 = wildcard
// flag, 3 = "finger seen" flag. Flags hold 1 while the event has NOT
// happened and 0 once it has, because LOAD sets the negative flag for values
// below 1 and JMP is taken when that flag is clear.
package uc_prog_pkg;
  import regex_pkg::*;

  localparam int BOUND = 1024;

  function automatic instr_t mk(opcode_e op, int unsigned addr, int unsigned imm);
    instr_t i;
    i.op   = op;
    i.addr = DADDR_W'(addr);
    i.imm  = 8'(imm);
    return i;
  endfunction

  function automatic instr_t prog(int a);
    case (a)
      0:  return mk(OP_JMP,    0, 0);   // wait loop
      1:  return mk(OP_SETCNT, 0, 0);   // finger: mem0 <= counter
      2:  return mk(OP_JMP,    0, 20);
      3:  return mk(OP_LOAD,   3, 0);   // \n: finger seen?
      4:  return mk(OP_JMP,    0, 0);   //     no -> done
      5:  return mk(OP_SUBT,   0, 0);   //     gap = counter - mem0
      6:  return mk(OP_SUB,    1, 0);   //     gap - bound
      7:  return mk(OP_JMP,    0, 0);   //     >= 0 -> done
      8:  return mk(OP_SETOUT, 0, 0);   //     match 0
      9:  return mk(OP_JMP,    0, 0);
      10: return mk(OP_SETFLG, 2, 0);   // scripts: wildcard active
      11: return mk(OP_JMP,    0, 0);
      12: return mk(OP_LOAD,   2, 0);   // cgi: wildcard active?
      13: return mk(OP_JMP,    0, 15);  //     no -> skip
      14: return mk(OP_SETOUT, 0, 1);   //     match 1
      15: return mk(OP_JMP,    0, 0);
      16: return mk(OP_SETOUT, 0, 2);   // cripts: match 2
      17: return mk(OP_JMP,    0, 0);
      18: return mk(OP_NOP,    0, 0);   // nlst: nothing
      19: return mk(OP_JMP,    0, 0);
      20: return mk(OP_SETFLG, 3, 0);   // finger seen
      21: return mk(OP_JMP,    0, 0);
      default: return mk(OP_JMP, 0, 0);
    endcase
  endfunction

  function automatic logic [15:0] dmem_init(int a, int bound);
    case (a)
      1: return 16'(bound);
      2: return 16'd1;
      3: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction

  function automatic int entry_of(int seg);
    case (seg)
      0: return 1;
      1: return 3;
      2: return 10;
      3: return 12;
      4: return 16;
      5: return 18;
      default: return 0;
    endcase
  endfunction

  function automatic cnt_sel_e counter_of(int seg);
    return (seg == 5) ? CNT_NONL : CNT_ANY;
  endfunction

  function automatic void segments(ref string s[$]);
    s = '{"finger", "\n", "scripts", "cgi", "cripts", "nlst "};
  endfunction

  // The rule set of the source's internal database example:
  //   finger.{1024}\n        segments 0 "finger", 1 "\n"
  //   scripts.*cgi           segments 2 "scripts", 3 "cgi"
  //   (c(a|b)*).{,1000}((de)+)  segments 4 "(c(a|b)*)", 5 "((de)+)"
  // with the entry points 1, 3, 10, 12, 16, 18 for segments 0..5.
  // Data memory: 0 count at "finger", 1 bound 1024, 2 wildcard flag,
  // 3 "finger seen", 4 count at segment 4, 5 "segment 4 seen", 6 bound 1000.
  // Match numbers: 0, 1, 2 for the three rules.
  localparam int FIG2_BOUND_A = 1024;
  localparam int FIG2_BOUND_B = 1000;

  function automatic instr_t prog_fig2(int a);
    case (a)
      2:  return mk(OP_JMP,    0, 28);
      16: return mk(OP_SETCNT, 4, 0);   // (c(a|b)*): mem4 <= counter
      17: return mk(OP_JMP,    0, 26);
      18: return mk(OP_LOAD,   5, 0);   // ((de)+): segment 4 seen?
      19: return mk(OP_JMP,    0, 0);   //     no -> done
      20: return mk(OP_SUBT,   4, 0);   //     gap = counter - mem4
      21: return mk(OP_SUB,    6, 0);   //     gap - 1000
      22: return mk(OP_JMP,    0, 0);   //     >= 0 -> done
      23: return mk(OP_SETOUT, 0, 2);   //     match 2
      24: return mk(OP_JMP,    0, 0);
      26: return mk(OP_SETFLG, 5, 0);   // segment 4 seen
      27: return mk(OP_JMP,    0, 0);
      28: return mk(OP_SETFLG, 3, 0);   // finger seen
      29: return mk(OP_JMP,    0, 0);
      default: return (a < 16) ? prog(a) : mk(OP_JMP, 0, 0);
    endcase
  endfunction

  function automatic logic [15:0] dmem_init_fig2(int a);
    case (a)
      1: return 16'(FIG2_BOUND_A);
      2: return 16'd1;
      3: return 16'd1;
      5: return 16'd1;
      6: return 16'(FIG2_BOUND_B);
      default: return 16'd0;
    endcase
  endfunction

endpackage
