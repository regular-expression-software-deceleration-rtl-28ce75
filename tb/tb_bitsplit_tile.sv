// tb_bitsplit_tile: four bit-split tiles programmed with a compiled segment
// set; the AND of their partial match vectors must equal the set of segments
// that a direct string comparison finds ending at each byte, one cycle after
// the byte. Each tile alone must never miss a segment (its vector is a
// superset of the true matches). A second set, "telephone" and "phonebook",
// checks the overlapped case on "telephonebook": both segments are reported,
// at bytes 8 and 12, each with its own bit.
module tb_bitsplit_tile;
  import bs_compiler_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  logic [7:0]  in_byte;
  logic [3:0]  wr_en;
  logic [8:0]  wr_addr;
  logic [63:0] wr_data;
  logic [3:0]  pmv_valid;
  logic [3:0][27:0] pmv;
  logic [3:0][8:0]  st;

  for (genvar t = 0; t < 4; t++) begin : g_t
    bitsplit_tile u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bits(in_byte[2*t +: 2]),
      .wr_en(wr_en[t]), .wr_addr(wr_addr), .wr_data(wr_data),
      .pmv_valid(pmv_valid[t]), .pmv(pmv[t]), .state(st[t]));
  end

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  string segs[$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_byte = 0; wr_en = 0; wr_addr = 0; wr_data = 0;
    segs = '{"finger", "\n", "scripts", "cgi", "cripts", "he", "she", "his", "hers"};
    compile(segs);
    $display("tile states: %0d %0d %0d %0d", ts_n[0], ts_n[1], ts_n[2], ts_n[3]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) begin
        @(negedge clk);
        wr_en = 4'(1 << k); wr_addr = 9'(i); wr_data = rows[k][i];
      end
    @(negedge clk); wr_en = 0;
    @(negedge clk);
    // stream: random bytes from a small alphabet with segments inserted
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 7) == 0) begin
        automatic string s = segs[$urandom_range(0, segs.size()-1)];
        for (int i = 0; i < s.len(); i++) stream.push_back(byte'(s[i]));
      end else begin
        automatic string a = "fingrscriptghe\n ";
        stream.push_back(byte'(a[$urandom_range(0, a.len()-1)]));
      end
    end
    for (int p = 0; p < stream.size(); p++) begin
      logic [27:0] exp_m;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      while (!in_valid) begin
        in_byte = 8'($urandom);
        @(negedge clk);
        in_valid = 1;
      end
      in_byte = stream[p];
      @(negedge clk);
      in_valid = 0;
      exp_m = ref_match(stream, p);
      checks++;
      if (pmv_valid != 4'hF) begin
        failures++; $display("pmv_valid not one cycle after byte %0d", p);
      end
      checks++;
      if ((pmv[0] & pmv[1] & pmv[2] & pmv[3]) != exp_m) begin
        failures++;
        $display("byte %0d (%02h): and=%07h exp=%07h", p, stream[p], pmv[0]&pmv[1]&pmv[2]&pmv[3], exp_m);
      end
      for (int t = 0; t < 4; t++) begin
        checks++;
        if ((pmv[t] & exp_m) != exp_m) begin
          failures++; $display("tile %0d missed a segment at byte %0d", t, p);
        end
      end
    end

    // overlapped segments, with tables rewritten under reset
    segs = '{"telephone", "phonebook"};
    compile(segs);
    @(negedge clk); rst_n = 0;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < ts_n[k]; i++) begin
        @(negedge clk);
        wr_en = 4'(1 << k); wr_addr = 9'(i); wr_data = rows[k][i];
      end
    @(negedge clk); wr_en = 0; rst_n = 1;
    begin
      string t = "telephonebook";
      for (int p = 0; p < t.len(); p++) begin
        logic [27:0] exp_m;
        in_valid = 1; in_byte = t[p];
        @(negedge clk);
        in_valid = 0;
        exp_m = (p == 8) ? 28'h1 : (p == 12) ? 28'h2 : 28'h0;
        checks++;
        if (pmv_valid != 4'hF || (pmv[0] & pmv[1] & pmv[2] & pmv[3]) != exp_m) begin
          failures++;
          $display("telephonebook byte %0d: and=%07h exp=%07h", p, pmv[0]&pmv[1]&pmv[2]&pmv[3], exp_m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
