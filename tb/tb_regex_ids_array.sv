// tb_regex_ids_array: the whole array at its default size (47 rule modules,
// 512-state tiles), end to end.
//
// The tiles, translation tables, counter selections and programs are
// broadcast to every module while reset is held; then each module gets its
// own bound for the "finger ... \n" rule (100 + 40 * module) through the
// module-select path, so the modules must answer differently to the same
// stream. A random stream with the segments inserted is sent, and every
// module's matches are compared in order with a reference computed here from
// the bytes. The bound of module 0 is then rewritten at run time, and
// finally a "cgi" flood must set overflow in every module.
// Mechanisms counted (each must occur): simultaneous segments, bounded match,
// bounded reject, wildcard match, wildcard reject, per-module difference,
// run-time rewrite, overflow.
module tb_regex_ids_array;
  import regex_pkg::*;
  import bs_compiler_pkg::*;
  import uc_prog_pkg::*;

  localparam int N = 47;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid;
  logic [7:0]         in_byte;
  cfg_wr_t            cfg;
  logic [5:0]         cfg_module;
  logic               cfg_broadcast, out_clear, any_match;
  logic [N-1:0]       match_valid, overflow, seg_valid;
  logic [N-1:0][7:0]  match_id;
  logic [N-1:0][15:0] out_reg;

  regex_ids_array u_dut (.*);

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int  exp_m[N][$];
  int  bound[N];
  int  n_simul = 0, n_bmatch = 0, n_breject = 0, n_wmatch = 0, n_wreject = 0;
  int  n_differ = 0, n_rewrite = 0, n_ovf = 0, n_got = 0;
  bit  flood = 0;
  string segs[$];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference -----------------------------------------------------------
  int c_any = 0;
  bit seen = 0, active = 0;
  int last_f = 0;

  function automatic void ref_byte(int p);
    logic [27:0] m;
    c_any++;
    m = ref_match(stream, p);
    if (m[2] && m[4]) n_simul++;
    for (int s = 0; s < 5; s++) if (m[s]) begin
      case (s)
        0: begin seen = 1; last_f = c_any; end
        1: if (seen) begin
             automatic int nm = 0;
             for (int k = 0; k < N; k++)
               if (c_any - last_f < bound[k]) begin exp_m[k].push_back(0); n_bmatch++; nm++; end
               else n_breject++;
             if (nm != 0 && nm != N) n_differ++;
           end
        2: active = 1;
        3: if (active) begin
             for (int k = 0; k < N; k++) exp_m[k].push_back(1);
             n_wmatch++;
           end else n_wreject++;
        4: for (int k = 0; k < N; k++) exp_m[k].push_back(2);
        default: ;
      endcase
    end
  endfunction

  always @(negedge clk) if (rst_n && !flood) begin
    for (int k = 0; k < N; k++) if (match_valid[k]) begin
      checks++;
      n_got++;
      if (exp_m[k].size() == 0) begin
        failures++; $display("module %0d: unexpected match %0d", k, match_id[k]);
      end else if (int'(match_id[k]) != exp_m[k].pop_front()) begin
        failures++; $display("module %0d: wrong match %0d", k, match_id[k]);
      end
    end
    checks++;
    if (any_match != |match_valid) begin
      failures++; $display("any_match wrong");
    end
  end

  // ---- drivers -------------------------------------------------------------
  task automatic cfg_write(bit bc, int m, cfg_target_e tg, int addr, logic [63:0] data);
    cfg.we = 1; cfg.target = tg; cfg.addr = 11'(addr); cfg.data = data;
    cfg_broadcast = bc; cfg_module = 6'(m);
    @(negedge clk);
    cfg.we = 0; cfg_broadcast = 0;
  endtask

  task automatic add_random(int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        automatic string s = segs[$urandom_range(0, 4)];
        for (int j = 0; j < s.len(); j++) stream.push_back(byte'(s[j]));
      end else if ($urandom_range(0, 40) == 0) stream.push_back(8'h0A);
      else begin
        automatic string a = "fingerscrptlsx ";
        stream.push_back(byte'(a[$urandom_range(0, a.len()-1)]));
      end
    end
  endtask

  task automatic send_all(ref int p);
    while (p < stream.size()) begin
      if ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_byte = stream[p];
      ref_byte(p);
      @(negedge clk);
      in_valid = 0;
      p++;
    end
    repeat (300) @(negedge clk);
  endtask

  initial begin
    int p = 0;
    in_valid = 0; in_byte = 0; cfg = '0; cfg_module = 0; cfg_broadcast = 0; out_clear = 0;
    segments(segs);
    compile(segs);
    for (int k = 0; k < N; k++) bound[k] = 100 + 40 * k;
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) cfg_write(1, 0, CFG_TILE, (k << 9) | i, rows[k][i]);
    for (int s = 0; s < 32; s++) cfg_write(1, 0, CFG_XLAT, s, 64'(entry_of(s)));
    for (int s = 0; s < 32; s++) cfg_write(1, 0, CFG_CSEL, s, 64'(counter_of(s)));
    for (int a = 0; a < 128; a++) cfg_write(1, 0, CFG_IMEM, a, 64'(prog(a)));
    for (int a = 0; a < 32; a++) cfg_write(1, 0, CFG_DMEM, a, 64'(dmem_init(a, 0)));
    for (int k = 0; k < N; k++) cfg_write(0, k, CFG_DMEM, 1, 64'(bound[k]));
    rst_n = 1;
    repeat (2) @(negedge clk);

    // "cgi" before any "scripts": the wildcard rule must stay silent
    foreach (segs[3][j]) stream.push_back(byte'(segs[3][j]));
    add_random(4000);
    send_all(p);
    // rewrite module 0's bound at run time
    bound[0] = 3000;
    cfg_write(0, 0, CFG_DMEM, 1, 64'(bound[0]));
    n_rewrite++;
    add_random(2000);
    send_all(p);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (exp_m[k].size() != 0) begin
        failures++; $display("module %0d: %0d matches missing", k, exp_m[k].size());
      end
      checks++;
      if (overflow[k]) begin
        failures++; $display("module %0d: overflow in normal traffic", k);
      end
      checks++;
      if (out_reg[k][2:0] != 3'b111) begin
        failures++; $display("module %0d: output register %h", k, out_reg[k]);
      end
    end
    // flood: "scripts" then back-to-back "cgi"
    flood = 1;
    begin
      string fl = "scripts";
      for (int r = 0; r < 80; r++) fl = {fl, "cgi"};
      for (int j = 0; j < fl.len(); j++) begin in_valid = 1; in_byte = fl[j]; @(negedge clk); end
      in_valid = 0;
    end
    checks++;
    if (overflow == '1) n_ovf++;
    else begin failures++; $display("overflow %h", overflow); end
    @(negedge clk); out_clear = 1; @(negedge clk); out_clear = 0;
    checks++;
    if (out_reg != '0) begin failures++; $display("out_clear failed"); end

    $display("matches=%0d simultaneous=%0d bounded match=%0d reject=%0d wildcard match=%0d reject=%0d differ=%0d rewrite=%0d overflow=%0d",
             n_got, n_simul, n_bmatch, n_breject, n_wmatch, n_wreject, n_differ, n_rewrite, n_ovf);
    checks++; if (n_simul == 0)   begin failures++; $display("no simultaneous segments"); end
    checks++; if (n_bmatch == 0)  begin failures++; $display("no bounded match"); end
    checks++; if (n_breject == 0) begin failures++; $display("no bounded reject"); end
    checks++; if (n_wmatch == 0)  begin failures++; $display("no wildcard match"); end
    checks++; if (n_wreject == 0) begin failures++; $display("no wildcard reject"); end
    checks++; if (n_differ == 0)  begin failures++; $display("modules never differed"); end
    checks++; if (n_ovf == 0)     begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
