// tb_nlst_rule: one rule module running the example rule NLST\s[^\n]{100}
// ("NLST", one whitespace byte, then at least 100 bytes without a newline).
//
// The rule is cut into the segments "NLST" + each whitespace byte (tab,
// 0x0B, 0x0C, carriage return, space; all five share one entry point) and
// "\n". The program arms on the first "NLST\s" after a newline, keeping its
// byte count, and on the next "\n" reports a match when at least 100 bytes
// lay between them. The match is therefore reported when the line ends. A
// newline directly after "NLST" is left out of \s here, so that the
// segment "\n" never ends on the same byte as an "NLST\s" segment.
//
// The reference decides every newline from the bytes alone: a match when an
// "NLST\s" ended at q, no newline lies after q, and p - q - 1 >= 100.
module tb_nlst_rule;
  import regex_pkg::*;
  import bs_compiler_pkg::*;
  import uc_prog_pkg::mk;

  localparam int RUN = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [7:0]  in_byte;
  cfg_wr_t     cfg;
  logic        out_clear, match_valid, overflow, seg_valid, uc_busy;
  logic [7:0]  match_id;
  logic [15:0] out_reg;
  logic [SEG_W-1:0] seg_index;
  logic [15:0] seg_count;
  logic [4:0]  fifo_count;

  regex_module u_dut (.*);

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int  exp_m[$];
  int  n_match = 0, n_short = 0, n_unarmed = 0;
  string segs[$];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t nlst_prog(int a);
    case (a)
      1:  return mk(OP_LOAD,   3, 0);   // NLST\s: already armed?
      2:  return mk(OP_JMP,    0, 5);   //     no -> arm
      3:  return mk(OP_SETFLG, 31, 0);  //     yes: clear the flag, done
      4:  return mk(OP_JMP,    0, 0);
      5:  return mk(OP_SETCNT, 0, 0);   // arm: mem0 <= count
      6:  return mk(OP_SETFLG, 3, 0);
      7:  return mk(OP_JMP,    0, 0);
      8:  return mk(OP_LOAD,   3, 0);   // \n: armed?
      9:  return mk(OP_JMP,    0, 0);   //     no -> done
      10: return mk(OP_SETFLG, 3, 1);   //     disarm
      11: return mk(OP_SUBT,   0, 0);   //     gap = count - mem0
      12: return mk(OP_SUB,    1, 0);   //     gap - (RUN + 1)
      13: return mk(OP_JMP,    0, 16);  //     >= 0 -> match
      14: return mk(OP_SETFLG, 31, 0);
      15: return mk(OP_JMP,    0, 0);
      16: return mk(OP_SETOUT, 0, 0);
      17: return mk(OP_JMP,    0, 0);
      default: return mk(OP_JMP, 0, 0);
    endcase
  endfunction

  // reference
  int armed_at = -1;
  function automatic void ref_byte(int p);
    logic [27:0] m = ref_match(stream, p);
    if (stream[p] == 8'h0A) begin
      if (armed_at < 0) n_unarmed++;
      else if (p - armed_at - 1 >= RUN) begin exp_m.push_back(0); n_match++; end
      else n_short++;
      armed_at = -1;
    end else if (m[4:0] != 0 && armed_at < 0) armed_at = p;
  endfunction

  always @(negedge clk) if (rst_n && match_valid) begin
    checks++;
    if (exp_m.size() == 0) begin
      failures++; $display("unexpected match %0d", match_id);
    end else void'(exp_m.pop_front());
  end

  task automatic cfg_write(cfg_target_e tg, int addr, logic [63:0] data);
    cfg.we = 1; cfg.target = tg; cfg.addr = 11'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic push_str(string s);
    for (int j = 0; j < s.len(); j++) stream.push_back(byte'(s[j]));
  endtask

  initial begin
    int p = 0;
    byte ws[5] = '{8'h09, 8'h0B, 8'h0C, 8'h0D, 8'h20};
    in_valid = 0; in_byte = 0; cfg = '0; out_clear = 0;
    for (int i = 0; i < 5; i++) begin
      automatic string s = "NLST ";
      s[4] = ws[i];
      segs.push_back(s);
    end
    segs.push_back("\n");
    compile(segs);
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) cfg_write(CFG_TILE, (k << 9) | i, rows[k][i]);
    for (int s = 0; s < 32; s++) cfg_write(CFG_XLAT, s, (s < 5) ? 64'd1 : (s == 5) ? 64'd8 : 64'd0);
    for (int s = 0; s < 32; s++) cfg_write(CFG_CSEL, s, 64'(CNT_ANY));
    for (int a = 0; a < 128; a++) cfg_write(CFG_IMEM, a, 64'(nlst_prog(a)));
    for (int a = 0; a < 32; a++) cfg_write(CFG_DMEM, a, (a == 1) ? 64'(RUN + 1) : (a == 3) ? 64'd1 : 64'd0);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // lines: some start with an NLST command followed by 90..110 bytes
    for (int line = 0; line < 300; line++) begin
      automatic int kind = $urandom_range(0, 3);
      if (kind != 0) begin
        push_str("NLST");
        stream.push_back(ws[$urandom_range(0, 4)]);
        if ($urandom_range(0, 3) == 0) push_str("NLST ");
      end
      for (int i = 0, n = (kind == 0) ? $urandom_range(0, 40) : $urandom_range(RUN - 10, RUN + 10); i < n; i++) begin
        automatic string a = "abNLSTxyz0-/.";
        stream.push_back(byte'(a[$urandom_range(0, a.len()-1)]));
      end
      stream.push_back(8'h0A);
    end
    while (p < stream.size()) begin
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_byte = stream[p];
      ref_byte(p);
      @(negedge clk);
      in_valid = 0;
      p++;
    end
    repeat (20) @(negedge clk);
    while (uc_busy || fifo_count != 0) @(negedge clk);
    repeat (5) @(negedge clk);

    checks++;
    if (exp_m.size() != 0) begin failures++; $display("%0d matches missing", exp_m.size()); end
    checks++;
    if (overflow) begin failures++; $display("events lost"); end
    $display("lines matched %0d, too short %0d, without NLST %0d", n_match, n_short, n_unarmed);
    checks++;
    if (n_match == 0 || n_short == 0 || n_unarmed == 0) begin
      failures++; $display("a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
