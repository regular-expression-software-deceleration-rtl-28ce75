// tb_subpattern_fifo: random pushes and pops against a queue model; checks
// the head word, the occupancy, that a push into a full buffer is dropped and
// raises overflow, and that 16 entries fit.
module tb_subpattern_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push, pop, empty, full, overflow;
  logic [20:0] din, dout;
  logic [4:0]  count;

  subpattern_fifo u_dut (.*);

  int checks = 0, failures = 0;
  logic [20:0] q[$];
  bit ovf_model = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit do_push, bit do_pop);
    push = do_push; pop = do_pop && (q.size() != 0); din = 21'($urandom);
    #1;
    checks++;
    if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == 16)) begin
      failures++; $display("count %0d model %0d", count, q.size());
    end
    if (q.size() != 0) begin
      checks++;
      if (dout != q[0]) begin
        failures++; $display("head %h model %h", dout, q[0]);
      end
    end
    @(negedge clk);
    if (pop) void'(q.pop_front());
    if (push) begin
      if (q.size() < 16) q.push_back(din);
      else ovf_model = 1;
    end
    checks++;
    if (overflow != ovf_model) begin
      failures++; $display("overflow %0b model %0b", overflow, ovf_model);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0 ? 1'b0 : 1'b1);
    while (q.size() != 0) step(0, 1);
    for (int n = 0; n < 16; n++) step(1, 0);
    checks++;
    if (!full || overflow) begin
      failures++; $display("16 entries: full=%0b overflow=%0b", full, overflow);
    end
    step(1, 1);  // full, push and pop together: both done
    checks++;
    if (overflow) begin
      failures++; $display("push with pop on full buffer overflowed");
    end
    step(1, 0);  // full: dropped
    checks++;
    if (!overflow) begin
      failures++; $display("no overflow on push into full buffer");
    end
    for (int n = 0; n < 16; n++) step(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
