// tb_match_priority_encoder: feeds sparse match vectors with counter
// snapshots and checks that every set bit comes out once, lowest index first,
// in arrival order, each with the snapshot of its own vector, one index per
// cycle without gaps. Then floods the encoder and checks that overflow is
// raised only once the queue is really full.
module tb_match_priority_encoder;
  import regex_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       vec_valid;
  logic [27:0]                vec;
  logic [NCNT-1:0][CNT_W-1:0] cnts;
  logic                       ev_valid;
  logic [4:0]                 ev_seg;
  logic [NCNT-1:0][CNT_W-1:0] ev_cnts;
  logic                       overflow;

  match_priority_encoder u_dut (.*);

  typedef struct { int seg; logic [NCNT-1:0][CNT_W-1:0] c; } exp_t;
  exp_t exp_q[$];
  int checks = 0, failures = 0, got = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(negedge clk) if (rst_n && ev_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected index %0d", ev_seg);
    end else begin
      e = exp_q.pop_front();
      if (int'(ev_seg) != e.seg || ev_cnts != e.c) begin
        failures++; $display("got %0d, expected %0d", ev_seg, e.seg);
      end
    end
    got++;
  end

  initial begin
    int first_cycle, last_cycle, cyc;
    vec_valid = 0; vec = 0; cnts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: at most 3 bits every 4 cycles never overflows
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      vec_valid = 1;
      vec = '0;
      if ($urandom_range(0, 3) == 0) begin
        automatic int k = $urandom_range(1, 3);
        for (int j = 0; j < k; j++) vec[$urandom_range(0, 27)] = 1'b1;
      end
      for (int c = 0; c < NCNT; c++) cnts[c] = 16'($urandom);
      for (int i = 0; i < 28; i++) if (vec[i]) exp_q.push_back('{i, cnts});
      @(negedge clk); vec_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || overflow) begin
      failures++; $display("phase 1: %0d left, overflow=%0b", exp_q.size(), overflow);
    end
    // phase 2: one vector with 5 bits gives 5 indices on 5 consecutive cycles
    @(negedge clk);
    vec_valid = 1; vec = 28'h00000F1;
    cnts = '0;
    for (int i = 0; i < 28; i++) if (vec[i]) exp_q.push_back('{i, cnts});
    @(negedge clk); vec_valid = 0;
    cyc = 0; first_cycle = -1; last_cycle = -1;
    repeat (12) begin
      if (ev_valid) begin
        if (first_cycle < 0) first_cycle = cyc;
        last_cycle = cyc;
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (first_cycle < 0 || last_cycle - first_cycle != 5 - 1) begin
      failures++; $display("burst of 5 took cycles %0d..%0d", first_cycle, last_cycle);
    end
    // phase 3: flood with full vectors: the queue of 4 must overflow
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      checks++;
      if (n <= 5 && overflow) begin
        failures++; $display("overflow too early");
      end
      vec_valid = 1; vec = '1;
      if (n < 5) for (int i = 0; i < 28; i++) exp_q.push_back('{i, cnts});
    end
    @(negedge clk); vec_valid = 0;
    checks++;
    if (!overflow) begin
      failures++; $display("no overflow after flood");
    end
    repeat (300) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("after flood %0d indices missing", exp_q.size());
    end
    $display("indices seen: %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
