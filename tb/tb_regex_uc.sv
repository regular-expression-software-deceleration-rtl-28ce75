// tb_regex_uc: loads the example rule program, feeds it segment events with
// increasing counter values and compares the reported matches with a model
// of the rules themselves ("finger" then "\n" within BOUND bytes; "scripts"
// then "cgi" at any distance; "cripts"). Also checks the cycle counts: a
// "cgi" event takes 5 cycles (dispatch plus four instructions), a "\n" with
// no "finger" before it 3 cycles, and a "\n" with one 8 cycles.
module tb_regex_uc;
  import regex_pkg::*;
  import uc_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               ev_valid, ev_pop;
  logic [IADDR_W-1:0] ev_entry;
  logic [CNT_W-1:0]   ev_time;
  logic               im_we, dm_we, out_clear, match_valid, busy;
  logic [IADDR_W-1:0] im_addr, pc;
  instr_t             im_data;
  logic [DADDR_W-1:0] dm_addr;
  logic [CNT_W-1:0]   dm_data;
  logic [7:0]         match_id;
  logic [15:0]        out_reg;

  regex_uc u_dut (.*);

  typedef struct { int seg; int t; } ev_t;
  ev_t evq[$];
  int  exp_m[$];
  int  checks = 0, failures = 0, nmatch = 0;
  int  pop_cycles[$];
  int  cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && ev_pop) begin
    void'(evq.pop_front());
    pop_cycles.push_back(cyc);
  end
  always @(negedge clk) begin
    ev_valid = (evq.size() != 0);
    ev_entry = (evq.size() != 0) ? IADDR_W'(entry_of(evq[0].seg)) : '0;
    ev_time  = (evq.size() != 0) ? CNT_W'(evq[0].t) : '0;
  end
  always @(negedge clk) if (rst_n && match_valid) begin
    checks++;
    nmatch++;
    if (exp_m.size() == 0) begin
      failures++; $display("unexpected match %0d", match_id);
    end else if (int'(match_id) != exp_m.pop_front()) begin
      failures++; $display("wrong match id %0d", match_id);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rule model
  bit seen = 0, active = 0;
  int last_f = 0;
  function automatic void model(int seg, int t);
    case (seg)
      0: begin seen = 1; last_f = t; end
      1: if (seen && (t - last_f) < BOUND) exp_m.push_back(0);
      2: active = 1;
      3: if (active) exp_m.push_back(1);
      4: exp_m.push_back(2);
      default: ;
    endcase
  endfunction

  task automatic wait_idle();
    while (evq.size() != 0 || busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic burst_gap(int seg, int n, int expect_gap, string what);
    int base;
    pop_cycles.delete();
    for (int i = 0; i < n; i++) begin
      evq.push_back('{seg, 20000 + i});
      model(seg, 20000 + i);
    end
    wait_idle();
    for (int i = 1; i < pop_cycles.size(); i++) begin
      checks++;
      if (pop_cycles[i] - pop_cycles[i-1] != expect_gap) begin
        failures++;
        $display("%s: %0d cycles per event, expected %0d", what, pop_cycles[i] - pop_cycles[i-1], expect_gap);
      end
    end
  endtask

  initial begin
    int t;
    im_we = 0; dm_we = 0; out_clear = 0; im_addr = 0; im_data = '0; dm_addr = 0; dm_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 128; a++) begin
      im_we = 1; im_addr = 7'(a); im_data = prog(a);
      @(negedge clk);
    end
    im_we = 0;
    for (int a = 0; a < 32; a++) begin
      dm_we = 1; dm_addr = 5'(a); dm_data = dmem_init(a, BOUND);
      @(negedge clk);
    end
    dm_we = 0;
    // timing with nothing seen yet: "\n" exits after LOAD and JMP
    burst_gap(1, 6, 3, "newline without finger");
    // random event streams
    t = 0;
    for (int n = 0; n < 600; n++) begin
      automatic int seg = $urandom_range(0, 5);
      t += (seg == 1) ? $urandom_range(1, 700) : $urandom_range(1, 40);
      evq.push_back('{seg, t});
      model(seg, t);
      if ($urandom_range(0, 3) == 0) wait_idle();
    end
    wait_idle();
    // timing: "cgi" back to back = 5 cycles; "\n" after finger = 8 cycles
    burst_gap(3, 8, 5, "cgi");
    evq.push_back('{0, 19990}); model(0, 19990); wait_idle();
    burst_gap(1, 6, 8, "newline after finger");
    checks++;
    if (out_reg[2:0] != 3'b111) begin
      failures++; $display("output register %h", out_reg);
    end
    @(negedge clk); out_clear = 1; @(negedge clk); out_clear = 0;
    checks++;
    if (out_reg != 0) begin
      failures++; $display("out_clear did not clear");
    end
    checks++;
    if (exp_m.size() != 0) begin
      failures++; $display("%0d matches missing", exp_m.size());
    end
    $display("matches: %0d", nmatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
