// tb_ids_word64: end-to-end test of the string matching engine built for
// 64-bit network words (WORD_BYTES = 8), otherwise at its default sizes.
//
// Same procedure as the 32-bit test: the rule compiler, switched to 8-byte
// words, compiles two rule sets of four strings in turn (one of them 7 bytes,
// the shortest allowed at this word size); each is loaded through the
// configuration port and random packets with planted occurrences at every
// byte offset, back-to-back pairs, strings split across packets and idle
// cycles are streamed at one word per clock. Every word's and every packet's
// result is compared with a byte-by-byte search 5 cycles after the word.
module tb_ids_word64;
  import ids_pkg::*;
  import ids_compile_pkg::*;

  localparam int N_FSM   = 4;
  localparam int WBY     = 8;
  localparam int KEY_W   = 8 * WBY;
  localparam int P_DEPTH = 753;
  localparam int S_DEPTH = 165;
  localparam int MID_W   = 8;
  localparam int TOK_W   = 6;
  localparam int STATE_W = 5;
  localparam int S_W     = 3;
  localparam int LAT     = 5;
  localparam int CFG_DW  = 2 * KEY_W + 1;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              cfg_we = 1'b0;
  cfg_tgt_e          cfg_tgt = CFG_P_TCAM;
  logic [7:0]        cfg_idx = '0;
  logic [15:0]       cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  logic [KEY_W-1:0]  data = '0;
  logic              in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [N_FSM-1:0]  match, pkt_match, merge_bypass;
  logic              pkt_done, cls_miss;

  ids_top #(.WORD_BYTES(WBY)) dut (
    .clk, .rst_n, .cfg_we, .cfg_tgt, .cfg_idx, .cfg_addr, .cfg_wdata,
    .data, .in_valid, .in_sop, .in_eop,
    .match, .pkt_match, .pkt_done, .merge_bypass, .cls_miss
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;  // number of rising edges so far
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_bypass = 0, n_lookup = 0, n_span = 0, n_in_word = 0, n_end_start = 0;
  int n_split = 0, n_idle = 0, n_reload = 0, n_pkt_hit = 0, n_pkt_miss = 0;
  int n_off[WBY];

  typedef struct {
    bit              valid;
    bit              eop;
    bit [N_FSM-1:0]  m;
    bit [N_FSM-1:0]  pm;
  } exp_t;
  exp_t exp_at[int];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // Check the outputs for the word driven LAT cycles ago. Called at negedge.
  task automatic check_outputs();
    exp_t e;
    int k = cyc - LAT;
    if (exp_at.exists(k)) begin
      e = exp_at[k];
      exp_at.delete(k);
    end else begin
      e = '{valid: 0, eop: 0, m: '0, pm: '0};
    end
    checks++;
    if (match !== e.m) fail($sformatf("match %b expected %b", match, e.m));
    checks++;
    if (pkt_done !== (e.valid && e.eop)) fail($sformatf("pkt_done %b", pkt_done));
    if (e.valid && e.eop) begin
      checks++;
      if (pkt_match !== e.pm) fail($sformatf("pkt_match %b expected %b", pkt_match, e.pm));
    end
    if (e.valid) begin
      if (merge_bypass != '0) n_bypass++;
      if (merge_bypass != '1) n_lookup++;
    end
    checks++;
    if (cls_miss) fail("TCAM miss");
  endtask

  task automatic tick();
    @(negedge clk);
    check_outputs();
  endtask

  task automatic cfg_write(cfg_tgt_e t, int idx, int addr, logic [CFG_DW-1:0] wd);
    cfg_we = 1'b1; cfg_tgt = t; cfg_idx = 8'(idx); cfg_addr = 16'(addr); cfg_wdata = wd;
    tick();
    cfg_we = 1'b0;
  endtask

  task automatic load(IdsProgram pg);
    logic [CFG_DW-1:0] w;
    int nxt;
    bit hit;
    if (pg.p_global.size() > P_DEPTH || pg.s_global.size() > S_DEPTH)
      fail("rule set needs more TCAM entries than built");
    for (int a = 0; a < P_DEPTH; a++) begin
      w = '0;
      if (a < pg.p_global.size())
        w = {1'b1, KEY_W'(tcam_mask(pg.p_global.q[a])), KEY_W'(tcam_value(pg.p_global.q[a]))};
      cfg_write(CFG_P_TCAM, 0, a, w);
    end
    for (int a = 0; a < S_DEPTH; a++) begin
      w = '0;
      if (a < pg.s_global.size())
        w = {1'b1, KEY_W'(tcam_mask(pg.s_global.q[a])), KEY_W'(tcam_value(pg.s_global.q[a]))};
      cfg_write(CFG_S_TCAM, 0, a, w);
    end
    for (int a = 0; a < pg.p_global.size(); a++) begin
      w = '0;
      for (int g = 0; g < pg.n_p_l1; g++) w[g*MID_W +: MID_W] = MID_W'(pg.p_l2_field(a, g));
      cfg_write(CFG_P_L2, 0, a, w);
    end
    for (int a = 0; a < pg.s_global.size(); a++) begin
      w = '0;
      for (int g = 0; g < pg.n_s_l1; g++) w[g*MID_W +: MID_W] = MID_W'(pg.s_l2_field(a, g));
      cfg_write(CFG_S_L2, 0, a, w);
    end
    for (int g = 0; g < pg.n_p_l1; g++)
      for (int a = 0; a < pg.p_l1[g].size(); a++) begin
        w = '0;
        for (int k = 0; k < pg.fpp; k++) w[k*TOK_W +: TOK_W] = TOK_W'(pg.p_l1_field(g, a, k));
        cfg_write(CFG_P_L1, g, a, w);
      end
    for (int g = 0; g < pg.n_s_l1; g++)
      for (int a = 0; a < pg.s_l1[g].size(); a++) begin
        w = '0;
        for (int k = 0; k < pg.fps; k++) w[k*S_W +: S_W] = S_W'(pg.s_l1_field(g, a, k));
        cfg_write(CFG_S_L1, g, a, w);
      end
    for (int f = 0; f < N_FSM; f++) begin
      if (pg.m_loc[f].size() > (1 << TOK_W)) fail("merged symbol set too large");
      if (pg.strs[f].len() > (1 << STATE_W)) fail("string too long for FSM");
      cfg_write(CFG_MERGE_NX, f, 0, CFG_DW'(pg.n_exact[f]));
      foreach (pg.mlut[f][a]) cfg_write(CFG_MERGE, f, a, CFG_DW'(pg.mlut[f][a]));
      for (int q = 0; q < pg.strs[f].len(); q++)
        for (int t = 0; t < pg.m_loc[f].size(); t++) begin
          pg.fsm_entry(f, q, t, nxt, hit);
          cfg_write(CFG_FSM, f, (q << TOK_W) | t, CFG_DW'({STATE_W'(nxt), hit}));
        end
    end
  endtask

  // ---------------- traffic ----------------
  byte unsigned alpha[$];

  function automatic byte unsigned rnd_byte();
    if ($urandom_range(0, 9) < 8) return alpha[$urandom_range(0, alpha.size() - 1)];
    return 8'($urandom_range(0, 255));
  endfunction

  function automatic void plant(ref byte unsigned pkt[$], input string s, input int pos);
    for (int j = 0; j < s.len(); j++)
      if (pos + j >= 0 && pos + j < pkt.size()) pkt[pos+j] = s[j];
  endfunction

  // Send one packet, recording what each of its words must produce.
  task automatic send_packet(IdsProgram pg, byte unsigned pkt[$]);
    int ends[N_FSM][$];
    int nw = pkt.size() / WBY;
    exp_t e;
    int tmp[$];
    bit [N_FSM-1:0] pm = '0;
    foreach (pg.strs[f]) begin
      find_ends(pg.strs[f], pkt, tmp);
      ends[f] = tmp;
      if (tmp.size() > 0) pm[f] = 1'b1;
      foreach (tmp[i]) begin
        n_off[tmp[i] % WBY]++;
        if ((tmp[i] - pg.strs[f].len() + 1) / WBY != tmp[i] / WBY) n_span++;
        else n_in_word++;
      end
    end
    // a word where one occurrence ends and another starts later in it
    foreach (pg.strs[f]) foreach (ends[f][i])
      foreach (pg.strs[f2]) foreach (ends[f2][j]) begin
        int st2 = ends[f2][j] - pg.strs[f2].len() + 1;
        if (st2 / WBY == ends[f][i] / WBY && st2 > ends[f][i] && ends[f2][j] / WBY > st2 / WBY)
          n_end_start++;
      end
    if (pm != '0) n_pkt_hit++; else n_pkt_miss++;
    for (int w = 0; w < nw; w++) begin
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
        n_idle++;
        tick();
      end
      for (int i = 0; i < WBY; i++) data[8*(WBY-1-i) +: 8] = pkt[w*WBY+i];
      in_valid = 1'b1; in_sop = (w == 0); in_eop = (w == nw - 1);
      e = '{valid: 1, eop: (w == nw - 1), m: '0, pm: pm};
      foreach (pg.strs[f]) foreach (ends[f][i]) if (ends[f][i] / WBY == w) e.m[f] = 1'b1;
      exp_at[cyc] = e;
      tick();
    end
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
  endtask

  task automatic run_traffic(IdsProgram pg, int npkt);
    byte unsigned pkt[$], nxt[$];
    int nw, pos, a, b, cut;
    alpha = {};
    foreach (pg.strs[f]) for (int j = 0; j < pg.strs[f].len(); j++) alpha.push_back(pg.strs[f][j]);
    nxt = {};
    for (int p = 0; p < npkt; p++) begin
      nw = $urandom_range(1, 12);
      pkt = {};
      for (int i = 0; i < nw * WBY; i++) pkt.push_back(rnd_byte());
      // carried-over tail of a string split at the previous packet's end
      foreach (nxt[i]) if (i < pkt.size()) pkt[i] = nxt[i];
      nxt = {};
      case ($urandom_range(0, 4))
        0, 1: for (int r = 0; r < 2; r++) begin
          a = $urandom_range(0, N_FSM - 1);
          plant(pkt, pg.strs[a], $urandom_range(0, pkt.size() - 1) - 3);
        end
        2: begin  // back-to-back pair, small gap
          a = $urandom_range(0, N_FSM - 1);
          b = $urandom_range(0, N_FSM - 1);
          pos = $urandom_range(0, 7);
          plant(pkt, pg.strs[a], pos);
          plant(pkt, pg.strs[b], pos + pg.strs[a].len() + $urandom_range(0, 3));
        end
        3: begin  // split across the packet boundary
          a = $urandom_range(0, N_FSM - 1);
          cut = $urandom_range(1, pg.strs[a].len() - 1);
          plant(pkt, pg.strs[a], pkt.size() - cut);
          for (int j = cut; j < pg.strs[a].len(); j++) nxt.push_back(pg.strs[a][j]);
          n_split++;
        end
        default: ;
      endcase
      send_packet(pg, pkt);
    end
    repeat (LAT + 2) tick();
  endtask

  IdsProgram prog;

  initial begin
    string set0[$] = '{"ABCDEFGF", "CDEFGHIJ", "aabaabaaab", "/etc/passwd"};
    string set1[$] = '{"1234567", "GGGGGGGGG", "cmd.exe/c", "root:x:0:0:"};
    foreach (n_off[i]) n_off[i] = 0;
    ids_compile_pkg::WB = WBY;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tick();

    prog = new(set0, 2, 2, 1, 4, S_W);
    load(prog);
    run_traffic(prog, 300);

    prog = new(set1, 2, 2, 1, 4, S_W);
    load(prog);
    n_reload++;
    run_traffic(prog, 300);

    $display("mechanisms: bypass=%0d lookup=%0d span=%0d in_word=%0d end+start=%0d split=%0d idle=%0d reload=%0d pkt_hit=%0d pkt_miss=%0d",
             n_bypass, n_lookup, n_span, n_in_word, n_end_start, n_split, n_idle,
             n_reload, n_pkt_hit, n_pkt_miss);
    foreach (n_off[i]) $display("  occurrences ending at byte offset %0d: %0d", i, n_off[i]);
    checks++; if (n_bypass == 0) fail("merge bypass never used");
    checks++; if (n_lookup == 0) fail("merge lookup never used");
    checks++; if (n_span == 0) fail("no occurrence spanning words");
    checks++; if (n_in_word == 0) fail("no occurrence inside one word");
    checks++; if (n_end_start == 0) fail("no end and start in one word");
    checks++; if (n_split == 0) fail("no string split across packets");
    checks++; if (n_idle == 0) fail("no idle cycle");
    checks++; if (n_reload == 0) fail("no rule reload");
    checks++; if (n_pkt_hit == 0 || n_pkt_miss == 0) fail("packet results one-sided");
    foreach (n_off[i]) begin
      checks++;
      if (n_off[i] == 0) fail($sformatf("no occurrence ending at offset %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
