// tb_entry_translation: loads the segment-to-entry-point table of the
// example program (segments 0..5 -> 1, 3, 10, 12, 16, 18) plus random
// entries, and reads every entry back, also after rewriting some at run time.
module tb_entry_translation;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       we;
  logic [4:0] waddr, seg;
  logic [6:0] wdata, entry;

  entry_translation u_dut (.*);

  int checks = 0, failures = 0;
  logic [6:0] model [32];
  int table2 [6] = '{1, 3, 10, 12, 16, 18};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    we = 1; waddr = 5'(a); wdata = 7'(d); model[a] = 7'(d);
    @(negedge clk);
    we = 0;
  endtask

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      seg = 5'(i);
      #1;
      checks++;
      if (entry != model[i]) begin
        failures++; $display("segment %0d -> %0d, expected %0d", i, entry, model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; seg = 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) wr(i, i < 6 ? table2[i] : $urandom_range(0, 127));
    check_all();
    for (int n = 0; n < 20; n++) wr($urandom_range(0, 31), $urandom_range(0, 127));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
