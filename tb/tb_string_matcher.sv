// tb_string_matcher: self-checking test of one merge + FSM string matcher.
//
// For each of several search strings the rule compiler (ids_compile_pkg)
// produces the merge table, the exact-token count and the FSM table, which
// are loaded into the matcher. Random packets with planted occurrences are
// then classified word by word directly in the testbench (longest primary
// and secondary symbol of the string that the word matches) and fed to the
// matcher. Every word's match flag, two cycles later, and every packet's
// match bit are compared with a byte-by-byte search of the packet. The
// compiled symbol sets of the published worked example ("ABCDEFG") are
// compared with its printed primary, secondary and merged sets first.
module tb_string_matcher;
  import ids_pkg::*;
  import ids_compile_pkg::*;

  localparam int P_W = 6, S_W = 2, WILD_W = 2, TOK_W = 6, STATE_W = 5;
  localparam int WBY = 4, LAT = 2;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic                     mtbl_we = 1'b0, nx_we = 1'b0, fsm_we = 1'b0;
  logic [WILD_W+S_W-1:0]    mtbl_addr = '0;
  logic [TOK_W-1:0]         mtbl_wdata = '0;
  logic [P_W-1:0]           nx_wdata = '0, p_tok = '0;
  logic [STATE_W+TOK_W-1:0] fsm_addr = '0;
  logic [STATE_W:0]         fsm_wdata = '0;
  logic [S_W-1:0]           s_tok = '0;
  tag_t                     tag_in = '0;
  logic                     match, pkt_match, pkt_done, bypass;

  string_matcher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_hit = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit m; bit done; bit pm; } exp_t;
  exp_t exp_at[int];

  task automatic tick();
    exp_t e = '{m: 0, done: 0, pm: 0};
    @(negedge clk);
    if (exp_at.exists(cyc - LAT)) e = exp_at[cyc - LAT];
    checks++;
    if (match !== e.m || pkt_done !== e.done || (e.done && pkt_match !== e.pm)) begin
      failures++;
      if (failures < 10) $display("@%0d match %b done %b pm %b expected %b %b %b", cyc, match, pkt_done, pkt_match, e.m, e.done, e.pm);
    end
  endtask

  task automatic load(IdsProgram pg);
    int nxt;
    bit hit;
    nx_we = 1; nx_wdata = P_W'(pg.n_exact[0]); tick(); nx_we = 0;
    foreach (pg.mlut[0][a]) begin
      mtbl_we = 1; mtbl_addr = (WILD_W+S_W)'(a); mtbl_wdata = TOK_W'(pg.mlut[0][a]);
      tick();
    end
    mtbl_we = 0;
    for (int q = 0; q < pg.strs[0].len(); q++)
      for (int t = 0; t < pg.m_loc[0].size(); t++) begin
        pg.fsm_entry(0, q, t, nxt, hit);
        fsm_we = 1; fsm_addr = {STATE_W'(q), TOK_W'(t)}; fsm_wdata = {STATE_W'(nxt), hit};
        tick();
      end
    fsm_we = 0;
  endtask

  task automatic run(IdsProgram pg, int npkt);
    byte unsigned pkt[$];
    int ends[$];
    string s = pg.strs[0];
    pat_t w;
    exp_t e;
    int nw;
    for (int p = 0; p < npkt; p++) begin
      nw = $urandom_range(1, 8);
      pkt = {};
      for (int i = 0; i < nw * WBY; i++)
        pkt.push_back($urandom_range(0, 3) == 0 ? 8'($urandom) : s[$urandom_range(0, s.len() - 1)]);
      if ($urandom_range(0, 1) == 0)
        for (int j = 0, pos = $urandom_range(0, nw * WBY - 1) - 2; j < s.len(); j++)
          if (pos + j >= 0 && pos + j < pkt.size()) pkt[pos+j] = s[j];
      find_ends(s, pkt, ends);
      if (ends.size() > 0) n_hit++;
      for (int k = 0; k < nw; k++) begin
        w = '0;
        for (int i = 0; i < WBY; i++) w = set_byte(w, i, pkt[k*WBY+i]);
        p_tok = P_W'(pg.p_loc[0].reduce(w));
        s_tok = S_W'(pg.s_loc[0].reduce(w));
        tag_in = '{valid: 1, sop: k == 0, eop: k == nw - 1};
        e = '{m: 0, done: k == nw - 1, pm: ends.size() > 0};
        foreach (ends[i]) if (ends[i] / WBY == k) e.m = 1;
        exp_at[cyc] = e;
        tick();
        if ($urandom_range(0, 5) == 0) begin
          tag_in = '0;
          tick();
        end
      end
      tag_in = '0;
    end
    repeat (LAT + 1) tick();
  endtask

  IdsProgram pg;

  // The published worked example: string "ABCDEFG" in 4-byte words has the
  // primary symbols ABCD BCDE CDEF DEFG EFG* FG** G*** ****, the secondary
  // symbols *ABC **AB ***A ****, and 17 merged symbols.
  task automatic check_example();
    string exp_p[$] = '{"ABCD", "BCDE", "CDEF", "DEFG", "EFG*", "FG**", "G***", "****"};
    string exp_s[$] = '{"*ABC", "**AB", "***A", "****"};
    string exp_m[$] = '{"***A", "**AB", "*ABC", "ABCD", "BCDE", "CDEF", "DEFG", "EFGA",
                        "EFG*", "FGAB", "FG*A", "FG**", "GABC", "G*AB", "G**A", "G***", "****"};
    IdsProgram ex = new('{"ABCDEFG"}, 1, 1, 1, 1, S_W);
    string got;
    bit found;
    checks++;
    if (ex.p_loc[0].size() != exp_p.size()) failures++;
    foreach (exp_p[i]) begin
      checks++;
      got = (i < ex.p_loc[0].size()) ? pat_str(ex.p_loc[0].q[i]) : "";
      if (got != exp_p[i]) begin failures++; $display("primary %0d: %s expected %s", i, got, exp_p[i]); end
    end
    checks++;
    if (ex.s_loc[0].size() != exp_s.size()) failures++;
    foreach (exp_s[i]) begin
      checks++;
      got = (i < ex.s_loc[0].size()) ? pat_str(ex.s_loc[0].q[i]) : "";
      if (got != exp_s[i]) begin failures++; $display("secondary %0d: %s expected %s", i, got, exp_s[i]); end
    end
    // merged set: same members, order free
    checks++;
    if (ex.m_loc[0].size() != exp_m.size()) begin
      failures++; $display("merged set has %0d symbols, expected %0d", ex.m_loc[0].size(), exp_m.size());
    end
    foreach (exp_m[i]) begin
      found = 0;
      foreach (ex.m_loc[0].q[j]) if (pat_str(ex.m_loc[0].q[j]) == exp_m[i]) found = 1;
      checks++;
      if (!found) begin failures++; $display("merged symbol %s missing", exp_m[i]); end
    end
  endtask

  initial begin
    string strs[$] = '{"abcabcabd", "ABCDEFGF", "xyz", "aaaaaaa", "GET /cgi-bin/phf"};
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_example();
    foreach (strs[i]) begin
      pg = new('{strs[i]}, 1, 1, 1, 1, S_W);
      load(pg);
      run(pg, 150);
    end
    checks++; if (n_hit == 0) failures++;
    $display("packets containing the string: %0d", n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
