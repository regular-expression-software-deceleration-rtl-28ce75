// bs_compiler_pkg: testbench-side pattern compiler for the bit-split tiles.
//
// Builds an Aho-Corasick automaton for a set of literal segments (segment i
// sets bit i of the match vector), turns it into a full DFA over bytes, and
// then splits it into four tiles: tile k follows only bits 2k+1:2k of each
// byte. A tile state is a set of DFA states; on the 2-bit value b it moves to
// the set of DFA successors under every byte whose bits 2k+1:2k equal b. The
// partial match vector of a tile state is the OR of the outputs of its DFA
// states. The AND of the four tiles' vectors is exactly the set of segments
// that end at the current byte.
//
// Rows are laid out as in bitsplit_tile: {next[3..0], pmv}, SB bits per
// pointer. Also gives a direct reference matcher for checking.
package bs_compiler_pkg;

  localparam int MAXAC   = 256;  // byte-DFA states
  localparam int MAXTS   = 512;  // tile states
  localparam int NSEG    = 28;
  localparam int SB      = 9;

  typedef logic [MAXAC-1:0] acset_t;

  int              ac_n;
  int              ac_goto [MAXAC][256];
  int              ac_fail [MAXAC];
  logic [NSEG-1:0] ac_out  [MAXAC];
  int              dfa     [MAXAC][256];

  acset_t          ts_set  [4][MAXTS];
  int              ts_n    [4];
  logic [63:0]     rows    [4][MAXTS];

  string           pats    [NSEG];
  int              npats;

  function automatic void build_ac();
    int q[$];
    ac_n = 1;
    for (int s = 0; s < MAXAC; s++) begin
      for (int c = 0; c < 256; c++) ac_goto[s][c] = -1;
      ac_out[s]  = '0;
      ac_fail[s] = 0;
    end
    for (int p = 0; p < npats; p++) begin
      int s = 0;
      for (int i = 0; i < pats[p].len(); i++) begin
        int c = int'(pats[p][i]);
        if (ac_goto[s][c] < 0) begin
          ac_goto[s][c] = ac_n;
          ac_n++;
        end
        s = ac_goto[s][c];
      end
      ac_out[s][p] = 1'b1;
    end
    // breadth-first: failure links and the full transition function
    for (int c = 0; c < 256; c++) begin
      if (ac_goto[0][c] < 0) dfa[0][c] = 0;
      else begin
        dfa[0][c] = ac_goto[0][c];
        ac_fail[ac_goto[0][c]] = 0;
        q.push_back(ac_goto[0][c]);
      end
    end
    while (q.size() > 0) begin
      int s = q.pop_front();
      ac_out[s] |= ac_out[ac_fail[s]];
      for (int c = 0; c < 256; c++) begin
        int t = ac_goto[s][c];
        if (t < 0) dfa[s][c] = dfa[ac_fail[s]][c];
        else begin
          dfa[s][c] = t;
          ac_fail[t] = dfa[ac_fail[s]][c];
          q.push_back(t);
        end
      end
    end
  endfunction

  function automatic int find_or_add(int k, acset_t s);
    for (int i = 0; i < ts_n[k]; i++) if (ts_set[k][i] == s) return i;
    if (ts_n[k] >= MAXTS) $fatal(1, "bit-split tile %0d needs more than %0d states", k, MAXTS);
    ts_set[k][ts_n[k]] = s;
    ts_n[k]++;
    return ts_n[k] - 1;
  endfunction

  function automatic void build_tile(int k);
    ts_n[k] = 0;
    void'(find_or_add(k, acset_t'(1)));
    for (int i = 0; i < ts_n[k]; i++) begin
      logic [63:0] row = '0;
      logic [NSEG-1:0] pmv = '0;
      for (int s = 0; s < ac_n; s++) if (ts_set[k][i][s]) pmv |= ac_out[s];
      for (int b = 0; b < 4; b++) begin
        acset_t t = '0;
        for (int s = 0; s < ac_n; s++)
          if (ts_set[k][i][s])
            for (int c = 0; c < 256; c++)
              if (((c >> (2*k)) & 3) == b) t[dfa[s][c]] = 1'b1;
        row[NSEG + SB*b +: SB] = SB'(find_or_add(k, t));
      end
      row[NSEG-1:0] = pmv;
      rows[k][i] = row;
    end
  endfunction

  // An extra byte DFA for segments that are not literals (state 0 = start).
  int              x_n;
  int              x_delta [16][256];
  logic [NSEG-1:0] x_out   [16];

  // The DFA of "(c(a|b)*)((de)+)" with pattern numbers: states 1, 3, 4 end
  // segment seg_a, states 5, 7 end segment seg_b. Transitions not listed
  // behave as from state 0, so that matching restarts anywhere in the stream
  // (for "cadede" the states are 1, 3, 2, 5, 6, 7).
  function automatic void fig5_dfa(int seg_a, int seg_b);
    x_n = 8;
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < 256; c++) x_delta[s][c] = 0;
      x_delta[s][int'("c")] = 1;
      x_delta[s][int'("d")] = 2;
      x_out[s] = '0;
    end
    for (int s = 1; s < 8; s++) if (s == 1 || s == 3 || s == 4) begin
      x_delta[s][int'("a")] = 3;
      x_delta[s][int'("b")] = 4;
    end
    x_delta[2][int'("e")] = 5;
    x_delta[5][int'("d")] = 6;
    x_delta[6][int'("e")] = 7;
    x_delta[7][int'("d")] = 6;
    x_out[1][seg_a] = 1'b1;
    x_out[3][seg_a] = 1'b1;
    x_out[4][seg_a] = 1'b1;
    x_out[5][seg_b] = 1'b1;
    x_out[7][seg_b] = 1'b1;
  endfunction

  int              pd [MAXAC][256];
  logic [NSEG-1:0] po [MAXAC];

  // Literal segments plus the extra DFA: the product of the two automata
  // replaces the Aho-Corasick DFA before the tiles are built.
  function automatic void compile_with_dfa(string p[$]);
    int pa[$], px[$];
    npats = p.size();
    for (int i = 0; i < npats; i++) pats[i] = p[i];
    build_ac();
    pa.push_back(0); px.push_back(0);
    for (int i = 0; i < pa.size(); i++) begin
      po[i] = ac_out[pa[i]] | x_out[px[i]];
      for (int c = 0; c < 256; c++) begin
        int a = dfa[pa[i]][c];
        int x = x_delta[px[i]][c];
        int j = -1;
        for (int k = 0; k < pa.size(); k++) if (pa[k] == a && px[k] == x) j = k;
        if (j < 0) begin
          if (pa.size() >= MAXAC) $fatal(1, "product automaton needs more than %0d states", MAXAC);
          pa.push_back(a); px.push_back(x);
          j = pa.size() - 1;
        end
        pd[i][c] = j;
      end
    end
    ac_n = pa.size();
    for (int i = 0; i < ac_n; i++) begin
      ac_out[i] = po[i];
      for (int c = 0; c < 256; c++) dfa[i][c] = pd[i][c];
    end
    for (int k = 0; k < 4; k++) build_tile(k);
  endfunction

  // Compile the segment list; rows[k][0 .. ts_n[k]-1] then hold tile k.
  function automatic void compile(string p[$]);
    npats = p.size();
    for (int i = 0; i < npats; i++) pats[i] = p[i];
    build_ac();
    for (int k = 0; k < 4; k++) build_tile(k);
  endfunction

  // Reference: which segments end at position pos of the stream.
  function automatic logic [NSEG-1:0] ref_match(const ref byte unsigned s[$], int pos);
    logic [NSEG-1:0] m = '0;
    for (int p = 0; p < npats; p++) begin
      int l = pats[p].len();
      if (pos + 1 >= l) begin
        bit ok = 1;
        for (int i = 0; i < l; i++)
          if (s[pos - l + 1 + i] != byte'(pats[p][i])) ok = 0;
        if (ok) m[p] = 1'b1;
      end
    end
    return m;
  endfunction

endpackage
