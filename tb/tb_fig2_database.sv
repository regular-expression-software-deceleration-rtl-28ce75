// tb_fig2_database: one rule module running the three-rule example database
//   finger.{1024}\n   scripts.*cgi   (c(a|b)*).{,1000}((de)+)
// The last rule's segments are not literals: they come from the DFA of
// "(c(a|b)*)((de)+)" whose accepting states carry pattern numbers 0x1 and
// 0x2, mapped here to segments 4 and 5. The literal segments and that DFA
// are combined and bit-split into the four tiles.
//
// Checks:
//  - "cadede" gives the segment events 4, 4, 5, 5 on bytes 1, 2, 4 and 6,
//    which is the DFA state sequence 1(0x1) 3(0x1) 2 5(0x2) 6 7(0x2);
//  - on a long random stream every segment event, with its counter value,
//    equals a reference that runs the literal comparison and the DFA
//    directly on the bytes, and every rule match equals a rule model;
//  - each rule both matches and is rejected (gap beyond its bound, or
//    wildcard never opened), and no event is lost.
module tb_fig2_database;
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
  logic [15:0] seg_count;
  logic [4:0]  fifo_count;

  regex_module u_dut (.*);

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  int  exp_ev_seg[$], exp_ev_cnt[$], exp_m[$];
  int  n_match[3] = '{0, 0, 0}, n_reject[3] = '{0, 0, 0};
  int  n_ev = 0;
  string lits[$];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference from the bytes alone --------------------------------------
  int c_any = 0, xs = 0;
  bit seen_f = 0, active = 0, seen_4 = 0;
  int last_f = 0, last_4 = 0;

  function automatic void ref_byte(int p);
    logic [27:0] m;
    c_any++;
    m = ref_match(stream, p);
    xs = x_delta[xs][stream[p]];
    m |= x_out[xs];
    for (int s = 0; s < 6; s++) if (m[s]) begin
      exp_ev_seg.push_back(s);
      exp_ev_cnt.push_back(c_any & 16'hFFFF);
      case (s)
        0: begin seen_f = 1; last_f = c_any; end
        1: if (seen_f) begin
             if (c_any - last_f < FIG2_BOUND_A) begin exp_m.push_back(0); n_match[0]++; end
             else n_reject[0]++;
           end
        2: active = 1;
        3: if (active) begin exp_m.push_back(1); n_match[1]++; end else n_reject[1]++;
        4: begin seen_4 = 1; last_4 = c_any; end
        5: if (seen_4) begin
             if (c_any - last_4 < FIG2_BOUND_B) begin exp_m.push_back(2); n_match[2]++; end
             else n_reject[2]++;
           end
        default: ;
      endcase
    end
  endfunction

  always @(negedge clk) if (rst_n && seg_valid) begin
    checks++;
    n_ev++;
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
  always @(negedge clk) if (rst_n && match_valid) begin
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

  task automatic push_str(string s);
    for (int j = 0; j < s.len(); j++) stream.push_back(byte'(s[j]));
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
    repeat (20) @(negedge clk);
    while (uc_busy || fifo_count != 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int p = 0;
    int first_ev[$];
    in_valid = 0; in_byte = 0; cfg = '0; out_clear = 0;
    lits = '{"finger", "\n", "scripts", "cgi"};
    fig5_dfa(4, 5);
    compile_with_dfa(lits);
    $display("product states %0d, tile states %0d %0d %0d %0d", ac_n, ts_n[0], ts_n[1], ts_n[2], ts_n[3]);
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) cfg_write(CFG_TILE, (k << 9) | i, rows[k][i]);
    for (int s = 0; s < 32; s++) cfg_write(CFG_XLAT, s, 64'(entry_of(s)));
    for (int s = 0; s < 32; s++) cfg_write(CFG_CSEL, s, 64'(CNT_ANY));
    for (int a = 0; a < 128; a++) cfg_write(CFG_IMEM, a, 64'(prog_fig2(a)));
    for (int a = 0; a < 32; a++) cfg_write(CFG_DMEM, a, 64'(dmem_init_fig2(a)));
    rst_n = 1;
    repeat (2) @(negedge clk);

    // the worked example: "cadede"
    push_str("cadede");
    send_all(p);
    checks++;
    if (n_ev != 4 || n_match[2] != 2) begin
      failures++; $display("cadede: %0d events, %0d matches of rule 2", n_ev, n_match[2]);
    end

    // rejects by distance and by a wildcard never opened
    push_str("cgi");
    push_str("finger");
    for (int i = 0; i < 1100; i++) stream.push_back(8'h78);
    push_str("\n");
    push_str("cab");
    for (int i = 0; i < 1100; i++) stream.push_back(8'h78);
    push_str("dede");
    send_all(p);

    // random traffic
    for (int i = 0; i < 6000; i++) begin
      case ($urandom_range(0, 40))
        0: push_str("finger");
        1: push_str("scripts");
        2: push_str("cgi");
        3: push_str("cab");
        4: push_str("dede");
        5: push_str("de");
        6: stream.push_back(8'h0A);
        default: begin
          automatic string a = "fingerxyzlmop t";
          stream.push_back(byte'(a[$urandom_range(0, a.len()-1)]));
        end
      endcase
    end
    send_all(p);

    checks++;
    if (exp_m.size() != 0 || exp_ev_seg.size() != 0) begin
      failures++; $display("missing: %0d matches, %0d events", exp_m.size(), exp_ev_seg.size());
    end
    checks++;
    if (overflow) begin failures++; $display("events lost"); end
    $display("events=%0d rule matches %0d %0d %0d, rejects %0d %0d %0d", n_ev,
             n_match[0], n_match[1], n_match[2], n_reject[0], n_reject[1], n_reject[2]);
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (n_match[r] == 0 || n_reject[r] == 0) begin
        failures++; $display("rule %0d never matched or never rejected", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
