// tb_counter_bank: random bytes with idle cycles; the four counters are
// compared every cycle with counts kept here, and the per-segment counter
// selection is checked for every segment index.
module tb_counter_bank;
  import regex_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       in_valid;
  logic [7:0]                 in_byte;
  logic                       csel_we;
  logic [SEG_W-1:0]           csel_addr;
  cnt_sel_e                   csel_data;
  logic                       pbyte_we;
  logic [7:0]                 pbyte_data;
  logic [NCNT-1:0][CNT_W-1:0] cnts;
  logic [SEG_W-1:0]           lk_seg;
  logic [NCNT-1:0][CNT_W-1:0] lk_cnts;
  logic [CNT_W-1:0]           lk_value;

  counter_bank u_dut (.*);

  int checks = 0, failures = 0;
  int m_any = 0, m_nonl = 0, m_sp = 0, m_prog = 0;
  cnt_sel_e sel_model [32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_byte = 0; csel_we = 0; csel_addr = 0; csel_data = CNT_ANY;
    pbyte_we = 0; pbyte_data = 0; lk_seg = 0; lk_cnts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    pbyte_we = 1; pbyte_data = 8'h3b;
    @(negedge clk);
    pbyte_we = 0;
    for (int i = 0; i < 32; i++) begin
      csel_we = 1; csel_addr = 5'(i); csel_data = cnt_sel_e'(2'($urandom));
      sel_model[i] = csel_data;
      @(negedge clk);
    end
    csel_we = 0;
    for (int n = 0; n < 5000; n++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 5))
        0: in_byte = 8'h0A;
        1: in_byte = 8'h20;
        2: in_byte = 8'h3b;
        3: in_byte = 8'(8'h09 + $urandom_range(0, 4));
        default: in_byte = 8'($urandom);
      endcase
      if (in_valid) begin
        m_any++;
        if (in_byte != 8'h0A) m_nonl++;
        if (in_byte == 8'h20 || (in_byte >= 8'h09 && in_byte <= 8'h0D)) m_sp++;
        if (in_byte == 8'h3b) m_prog++;
      end
      lk_seg = 5'($urandom);
      for (int c = 0; c < NCNT; c++) lk_cnts[c] = 16'($urandom);
      #1;
      checks++;
      if (lk_value != lk_cnts[sel_model[lk_seg]]) begin
        failures++; $display("lookup of segment %0d wrong", lk_seg);
      end
      @(negedge clk);
      checks++;
      if (cnts[CNT_ANY] != 16'(m_any) || cnts[CNT_NONL] != 16'(m_nonl) ||
          cnts[CNT_SPACE] != 16'(m_sp) || cnts[CNT_PROG] != 16'(m_prog)) begin
        failures++;
        $display("cycle %0d: %0d %0d %0d %0d expected %0d %0d %0d %0d", n,
                 cnts[0], cnts[1], cnts[2], cnts[3], m_any, m_nonl, m_sp, m_prog);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
