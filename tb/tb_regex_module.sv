// tb_regex_module: one rule module end to end.
//
// The example rule set (see uc_prog_pkg) is compiled into the four tiles and
// loaded with its program. A random byte stream with the segments inserted is
// sent; a reference built here from the bytes alone gives
//   - every segment event with the counter value it must carry into the event
//     FIFO, in order (checked at the FIFO input), and
//   - every rule match in order (checked at match_valid).
// Then the bound is rewritten at run time and the stream continues, and
// finally "scripts" followed by back-to-back "cgi" floods the event FIFO: the
// number of "cgi" repeats before overflow must be close to 16 / (1 - 3/5) =
// 40, because each "cgi" arrives every 3 cycles and takes 5 to handle.
// Each mechanism (simultaneous segments, bounded match and reject, wildcard
// match and reject, counter selection, run-time rewrite, overflow) is counted
// and must occur.
module tb_regex_module;
  import regex_pkg::*;
  import bs_compiler_pkg::*;
  import uc_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [7:0]  in_byte;
  cfg_wr_t     cfg;
  logic        out_clear, match_valid, overflow, seg_valid, uc_busy;
  logic [7:0]  match_id;
  logic [15:0] out_reg;
  logic [SEG_W-1:0] seg_index;
  logic [4:0]  fifo_count;
  logic [15:0] seg_count;

  regex_module u_dut (.*);

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int  exp_ev_seg[$], exp_ev_cnt[$], exp_m[$];
  int  n_simul = 0, n_bmatch = 0, n_breject = 0, n_wmatch = 0, n_wreject = 0;
  int  n_nonl = 0, n_rewrite = 0, n_ovf = 0;
  int  bound = 200;
  bit  flood = 0;
  string segs[$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference: counters and rules from the bytes alone -----------------
  int  c_any = 0, c_nonl = 0;
  bit  seen = 0, active = 0;
  int  last_f = 0;

  function automatic void ref_byte(int p);
    logic [27:0] m;
    c_any++;
    if (stream[p] != 8'h0A) c_nonl++;
    m = ref_match(stream, p);
    if (m[2] && m[4]) n_simul++;
    for (int s = 0; s < 6; s++) if (m[s]) begin
      int t = (s == 5) ? c_nonl : c_any;
      if (s == 5) n_nonl++;
      exp_ev_seg.push_back(s);
      exp_ev_cnt.push_back(t & 16'hFFFF);
      case (s)
        0: begin seen = 1; last_f = t; end
        1: if (seen) begin
             if (t - last_f < bound) begin exp_m.push_back(0); n_bmatch++; end
             else n_breject++;
           end
        2: active = 1;
        3: if (active) begin exp_m.push_back(1); n_wmatch++; end else n_wreject++;
        4: exp_m.push_back(2);
        default: ;
      endcase
    end
  endfunction

  // ---- monitors ------------------------------------------------------------
  always @(negedge clk) if (rst_n && seg_valid && !flood) begin
    checks++;
    if (exp_ev_seg.size() == 0) begin
      failures++; $display("unexpected segment event %0d", seg_index);
    end else begin
      automatic int es = exp_ev_seg.pop_front();
      automatic int ec = exp_ev_cnt.pop_front();
      if (int'(seg_index) != es || int'(seg_count) != ec) begin
        failures++;
        $display("segment event %0d/%0d, expected %0d/%0d", seg_index, seg_count, es, ec);
      end
    end
  end
  always @(negedge clk) if (rst_n && match_valid && !flood) begin
    checks++;
    if (exp_m.size() == 0) begin
      failures++; $display("unexpected match %0d", match_id);
    end else if (int'(match_id) != exp_m.pop_front()) begin
      failures++; $display("wrong match %0d", match_id);
    end
  end

  // ---- drivers -------------------------------------------------------------
  task automatic cfg_write(cfg_target_e tg, int addr, logic [63:0] data);
    cfg.we = 1; cfg.target = tg; cfg.addr = 11'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  task automatic send(int p, bit idle);
    if (idle) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_byte = stream[p];
    ref_byte(p);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic add_random(int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        automatic string s = segs[$urandom_range(0, segs.size()-1)];
        for (int j = 0; j < s.len(); j++) stream.push_back(byte'(s[j]));
      end else if ($urandom_range(0, 60) == 0) stream.push_back(8'h0A);
      else begin
        automatic string a = "fingerscrptlsx ";
        stream.push_back(byte'(a[$urandom_range(0, a.len()-1)]));
      end
    end
  endtask

  task automatic drain();
    repeat (20) @(negedge clk);
    while (uc_busy || fifo_count != 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int p, first;
    in_valid = 0; in_byte = 0; cfg = '0; out_clear = 0;
    segments(segs);
    compile(segs);
    // the tables are written while reset is held, so that nothing runs on
    // their power-up contents
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) cfg_write(CFG_TILE, (k << 9) | i, rows[k][i]);
    for (int s = 0; s < 32; s++) cfg_write(CFG_XLAT, s, 64'(entry_of(s)));
    for (int s = 0; s < 32; s++) cfg_write(CFG_CSEL, s, 64'(counter_of(s)));
    for (int a = 0; a < 128; a++) cfg_write(CFG_IMEM, a, 64'(prog(a)));
    for (int a = 0; a < 32; a++) cfg_write(CFG_DMEM, a, 64'(dmem_init(a, bound)));
    rst_n = 1;
    @(negedge clk);
    cfg_write(CFG_CBYTE, 0, 64'h3b);
    repeat (2) @(negedge clk);

    // phase 1
    add_random(3000);
    stream.push_back(8'h0A);
    p = 0;
    while (p < stream.size()) begin send(p, $urandom_range(0, 2) == 0); p++; end
    drain();
    // phase 2: rewrite the bound at run time
    bound = 1000;
    cfg_write(CFG_DMEM, 1, 64'(bound));
    n_rewrite++;
    first = stream.size();
    add_random(3000);
    foreach (segs[i]) for (int j = 0; j < segs[i].len(); j++) stream.push_back(byte'(segs[i][j]));
    while (p < stream.size()) begin send(p, $urandom_range(0, 2) == 0); p++; end
    drain();
    checks++;
    if (exp_m.size() != 0 || exp_ev_seg.size() != 0) begin
      failures++; $display("missing: %0d matches, %0d segment events", exp_m.size(), exp_ev_seg.size());
    end
    checks++;
    if (overflow) begin
      failures++; $display("overflow during normal traffic");
    end
    // latency: an isolated "cripts" (one SETOUT) shows match_valid 6 clock
    // edges after the edge that takes its last byte: tile row, encoder
    // queue, encoder register, encoder output, event FIFO, dispatch; the
    // SETOUT result is registered on the sixth edge
    begin
      int lat = 0;
      flood = 1;
      foreach (segs[4][j]) begin in_valid = 1; in_byte = segs[4][j]; @(negedge clk); end
      in_valid = 0;
      lat = 0;
      while (!match_valid && lat < 50) begin @(negedge clk); lat++; end
      $display("latency of an isolated segment rule: %0d cycles", lat);
      checks++;
      if (lat != 6) begin failures++; $display("latency %0d, expected 6", lat); end
      drain();
    end
    // phase 3: flood with "cgi" after "scripts"
    flood = 1;
    foreach (segs[2][j]) begin in_valid = 1; in_byte = segs[2][j]; @(negedge clk); end
    in_valid = 0;
    drain();
    begin
      int reps = 0;
      string cgi = "cgi";
      while (!overflow && reps < 200) begin
        for (int j = 0; j < 3; j++) begin in_valid = 1; in_byte = cgi[j]; @(negedge clk); end
        reps++;
      end
      in_valid = 0;
      if (overflow) n_ovf++;
      $display("cgi repeats before overflow: %0d", reps);
      checks++;
      if (reps < 36 || reps > 46) begin
        failures++; $display("overflow after %0d repeats, expected about 40", reps);
      end
    end
    // every mechanism must have happened
    $display("simultaneous=%0d bounded match=%0d reject=%0d wildcard match=%0d reject=%0d nonl=%0d rewrite=%0d overflow=%0d",
             n_simul, n_bmatch, n_breject, n_wmatch, n_wreject, n_nonl, n_rewrite, n_ovf);
    checks++; if (n_simul == 0)   begin failures++; $display("no simultaneous segments"); end
    checks++; if (n_bmatch == 0)  begin failures++; $display("no bounded match"); end
    checks++; if (n_breject == 0) begin failures++; $display("no bounded reject"); end
    checks++; if (n_wmatch == 0)  begin failures++; $display("no wildcard match"); end
    checks++; if (n_wreject == 0) begin failures++; $display("no wildcard reject"); end
    checks++; if (n_nonl == 0)    begin failures++; $display("no non-newline counter use"); end
    checks++; if (n_ovf == 0)     begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
