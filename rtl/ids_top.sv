// ids_top: multi-byte string matching engine for network intrusion
// detection. Every search string has its own small table-driven FSM; the
// FSMs do not see the raw network word but a short token that says which
// piece of the string (if any) the word holds, at which byte offset.
//
// Four pipeline stages, each run twice side by side:
//   input classifiers   primary TCAM and secondary TCAM on the network word.
//                       The primary TCAM recognises words that lie inside a
//                       string or hold its end followed by wildcards; the
//                       secondary TCAM recognises words that hold the start
//                       of a string preceded by wildcards. Keeping the two
//                       apart lets a word hold the end of one occurrence and
//                       the start of the next without a priority conflict.
//   level 2 groups      one classifier group per path narrows the TCAM
//                       address to one token per level 1 group.
//   level 1 groups      N_P_L1 primary and N_S_L1 secondary groups narrow
//                       that to one token per string.
//   merge & FSM         per string: merge primary and secondary tokens, run
//                       the string's FSM, collect the per-packet match bit.
// The default tree is the four-FSM example: the primary level 2 group feeds
// two level 1 groups of two FSMs each; the secondary level 2 group feeds one
// level 1 group that serves all four FSMs.
//
// Interface: network word 'data' with in_valid/in_sop/in_eop framing, one
// word per clock, no back-pressure. match[f] pulses for a word in which
// string f ends; pkt_done pulses at the last word of a packet and then
// pkt_match[f] says whether string f occurred in that packet. All tables are
// loaded through one write port: cfg_tgt selects the kind of table
// (ids_pkg::cfg_tgt_e), cfg_idx which instance, cfg_addr the entry.
// Timing: match, pkt_match and pkt_done follow the word by 5 cycles
// (TCAM, level 2, level 1, merge, FSM); cls_miss follows it by 1 cycle.
//
// Following the published scheme: the stage structure, TCAM input classifiers,
// classifier groups as shared-address lookup tables, merge then KMP FSM per
// string, 32-bit word, 6-bit FSM token, 5-bit state, TCAM sizes of the
// 32-bit experiment. Own choices: the intermediate token width MID_W, the
// configuration port, packet framing, registered stages.
module ids_top
  import ids_pkg::*;
#(
  parameter int unsigned WORD_BYTES   = WORD_BYTES_DEF,   // input word size in bytes
  parameter int unsigned P_TCAM_DEPTH = 753,  // primary TCAM entries
  parameter int unsigned S_TCAM_DEPTH = 165,  // secondary TCAM entries
  parameter int unsigned MID_W        = 8,    // level 2 -> level 1 token width
  parameter int unsigned TOK_W        = TOK_W_DEF,   // FSM input word size
  parameter int unsigned STATE_W      = STATE_W_DEF,   // FSM state variable size
  parameter int unsigned N_P_L1       = 2,    // primary level 1 groups
  parameter int unsigned FSM_PER_P_L1 = 2,    // FSMs fed by each primary group
  parameter int unsigned N_S_L1       = 1,    // secondary level 1 groups
  parameter int unsigned FSM_PER_S_L1 = 4,    // FSMs fed by each secondary group
  // derived
  parameter int unsigned KEY_W   = 8 * WORD_BYTES,
  parameter int unsigned N_FSM   = N_P_L1 * FSM_PER_P_L1,
  parameter int unsigned P_IDX_W = $clog2(P_TCAM_DEPTH),
  parameter int unsigned S_IDX_W = $clog2(S_TCAM_DEPTH),
  parameter int unsigned S_W     = $clog2(WORD_BYTES),  // secondary token
  parameter int unsigned WILD_W  = $clog2(WORD_BYTES),  // wildcard primaries
  // widest table word: TCAM entry or a classifier group word
  parameter int unsigned CFG_DW  = max4(2 * KEY_W + 1, N_P_L1 * MID_W,
                                        N_S_L1 * MID_W,
                                        max4(FSM_PER_P_L1 * TOK_W,
                                             FSM_PER_S_L1 * S_W, 0, 0))
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load port
  input  logic              cfg_we,
  input  cfg_tgt_e          cfg_tgt,
  input  logic [7:0]        cfg_idx,
  input  logic [15:0]       cfg_addr,
  input  logic [CFG_DW-1:0] cfg_wdata,
  // network word stream
  input  logic [KEY_W-1:0]  data,
  input  logic              in_valid,
  input  logic              in_sop,
  input  logic              in_eop,
  // results
  output logic [N_FSM-1:0]  match,
  output logic [N_FSM-1:0]  pkt_match,
  output logic              pkt_done,
  output logic [N_FSM-1:0]  merge_bypass,
  output logic              cls_miss
);

  tag_t in_tag;
  assign in_tag = '{valid: in_valid, sop: in_sop, eop: in_eop};

  // ---------------- input classifiers ----------------
  logic [P_IDX_W-1:0] p_idx;
  logic [S_IDX_W-1:0] s_idx;
  logic               p_hit, s_hit;
  tag_t               p_tag0, s_tag0;

  tcam #(.KEY_W(KEY_W), .DEPTH(P_TCAM_DEPTH), .IDX_W(P_IDX_W)) u_p_tcam (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_tgt == CFG_P_TCAM), .cfg_addr(cfg_addr[P_IDX_W-1:0]),
    .cfg_valid(cfg_wdata[2*KEY_W]), .cfg_mask(cfg_wdata[KEY_W +: KEY_W]),
    .cfg_value(cfg_wdata[KEY_W-1:0]),
    .key(data), .tag_in(in_tag), .idx(p_idx), .hit(p_hit), .tag_out(p_tag0)
  );

  tcam #(.KEY_W(KEY_W), .DEPTH(S_TCAM_DEPTH), .IDX_W(S_IDX_W)) u_s_tcam (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_tgt == CFG_S_TCAM), .cfg_addr(cfg_addr[S_IDX_W-1:0]),
    .cfg_valid(cfg_wdata[2*KEY_W]), .cfg_mask(cfg_wdata[KEY_W +: KEY_W]),
    .cfg_value(cfg_wdata[KEY_W-1:0]),
    .key(data), .tag_in(in_tag), .idx(s_idx), .hit(s_hit), .tag_out(s_tag0)
  );

  assign cls_miss = (p_tag0.valid && !p_hit) || (s_tag0.valid && !s_hit);

  // ---------------- level 2 classifier groups ----------------
  logic [MID_W-1:0] p_mid [N_P_L1];
  logic [MID_W-1:0] s_mid [N_S_L1];
  tag_t             p_tag1, s_tag1;

  classifier_group #(.IN_W(P_IDX_W), .N_OUT(N_P_L1), .OUT_W(MID_W)) u_p_l2 (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_tgt == CFG_P_L2), .cfg_addr(cfg_addr[P_IDX_W-1:0]),
    .cfg_wdata(cfg_wdata[N_P_L1*MID_W-1:0]),
    .tok_in(p_idx), .tag_in(p_tag0), .tok_out(p_mid), .tag_out(p_tag1)
  );

  classifier_group #(.IN_W(S_IDX_W), .N_OUT(N_S_L1), .OUT_W(MID_W)) u_s_l2 (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_tgt == CFG_S_L2), .cfg_addr(cfg_addr[S_IDX_W-1:0]),
    .cfg_wdata(cfg_wdata[N_S_L1*MID_W-1:0]),
    .tok_in(s_idx), .tag_in(s_tag0), .tok_out(s_mid), .tag_out(s_tag1)
  );

  // ---------------- level 1 classifier groups ----------------
  logic [TOK_W-1:0] p_tok [N_FSM];
  logic [S_W-1:0]   s_tok [N_FSM];
  tag_t             p_tag2 [N_P_L1];
  tag_t             s_tag2 [N_S_L1];

  for (genvar g = 0; g < N_P_L1; g++) begin : g_p_l1
    logic [TOK_W-1:0] tok [FSM_PER_P_L1];
    classifier_group #(.IN_W(MID_W), .N_OUT(FSM_PER_P_L1), .OUT_W(TOK_W)) u_grp (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_tgt == CFG_P_L1 && cfg_idx == 8'(g)),
      .cfg_addr(cfg_addr[MID_W-1:0]),
      .cfg_wdata(cfg_wdata[FSM_PER_P_L1*TOK_W-1:0]),
      .tok_in(p_mid[g]), .tag_in(p_tag1), .tok_out(tok), .tag_out(p_tag2[g])
    );
    for (genvar k = 0; k < FSM_PER_P_L1; k++) begin : g_out
      assign p_tok[g*FSM_PER_P_L1 + k] = tok[k];
    end
  end

  for (genvar g = 0; g < N_S_L1; g++) begin : g_s_l1
    logic [S_W-1:0] tok [FSM_PER_S_L1];
    classifier_group #(.IN_W(MID_W), .N_OUT(FSM_PER_S_L1), .OUT_W(S_W)) u_grp (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_tgt == CFG_S_L1 && cfg_idx == 8'(g)),
      .cfg_addr(cfg_addr[MID_W-1:0]),
      .cfg_wdata(cfg_wdata[FSM_PER_S_L1*S_W-1:0]),
      .tok_in(s_mid[g]), .tag_in(s_tag1), .tok_out(tok), .tag_out(s_tag2[g])
    );
    for (genvar k = 0; k < FSM_PER_S_L1; k++) begin : g_out
      assign s_tok[g*FSM_PER_S_L1 + k] = tok[k];
    end
  end

  // ---------------- merge & FSM, one per search string ----------------
  logic [N_FSM-1:0] done_v;

  for (genvar f = 0; f < N_FSM; f++) begin : g_str
    string_matcher #(
      .P_W(TOK_W), .S_W(S_W), .WILD_W(WILD_W), .TOK_W(TOK_W), .STATE_W(STATE_W)
    ) u_sm (
      .clk, .rst_n,
      .mtbl_we(cfg_we && cfg_tgt == CFG_MERGE && cfg_idx == 8'(f)),
      .mtbl_addr(cfg_addr[WILD_W+S_W-1:0]), .mtbl_wdata(cfg_wdata[TOK_W-1:0]),
      .nx_we(cfg_we && cfg_tgt == CFG_MERGE_NX && cfg_idx == 8'(f)),
      .nx_wdata(cfg_wdata[TOK_W-1:0]),
      .fsm_we(cfg_we && cfg_tgt == CFG_FSM && cfg_idx == 8'(f)),
      .fsm_addr(cfg_addr[STATE_W+TOK_W-1:0]), .fsm_wdata(cfg_wdata[STATE_W:0]),
      .p_tok(p_tok[f]), .s_tok(s_tok[f]),
      .tag_in(p_tag2[f / FSM_PER_P_L1]),
      .match(match[f]), .pkt_match(pkt_match[f]), .pkt_done(done_v[f]),
      .bypass(merge_bypass[f])
    );
  end

  // All matchers see the same framing; any one of them reports packet end.
  assign pkt_done = done_v[0];

  // The two classifier trees must serve the same strings and stay aligned.
  initial begin
    assert (N_S_L1 * FSM_PER_S_L1 == N_FSM)
      else $error("secondary tree serves %0d strings, primary %0d",
                  N_S_L1 * FSM_PER_S_L1, N_FSM);
    assert (STATE_W + TOK_W <= 16 && P_IDX_W <= 16 && MID_W <= 16)
      else $error("table address wider than cfg_addr");
  end

  a_paths_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    p_tag2[0] == s_tag2[0])
    else $error("primary and secondary paths out of step");

endmodule
