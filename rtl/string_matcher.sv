// string_matcher: the per-string end of the pipeline, a merge stage followed
// by the string's token FSM, plus the Boolean "this string appeared in the
// packet" bit that header-rule logic consumes.
//
// The primary and secondary tokens of the string (each from its own
// classifier tree, arriving in the same cycle) are merged into one token,
// the token FSM advances on it and flags every word in which an occurrence
// ends. A sticky bit collects those flags over a packet: at the last word of
// a packet pkt_done pulses and pkt_match tells whether the string occurred
// anywhere in it.
//
// Interface: configuration of the merge table (mtbl_*), of the merge
// exact-token count (nx_*) and of the FSM table (fsm_*). Timing: one word per
// clock, 'match', 'pkt_match' and 'pkt_done' appear 2 cycles after the tokens
// (1 merge + 1 FSM).
//
// Following the published scheme: merge then FSM per string, match
// bits per string per packet. Own choice: the packet framing by sop/eop.
module string_matcher
  import ids_pkg::*;
#(
  parameter int unsigned P_W     = 6,
  parameter int unsigned S_W     = 2,
  parameter int unsigned WILD_W  = 2,
  parameter int unsigned TOK_W   = 6,
  parameter int unsigned STATE_W = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mtbl_we,
  input  logic [WILD_W+S_W-1:0]    mtbl_addr,
  input  logic [TOK_W-1:0]         mtbl_wdata,
  input  logic                     nx_we,
  input  logic [P_W-1:0]           nx_wdata,
  input  logic                     fsm_we,
  input  logic [STATE_W+TOK_W-1:0] fsm_addr,
  input  logic [STATE_W:0]         fsm_wdata,
  input  logic [P_W-1:0]           p_tok,
  input  logic [S_W-1:0]           s_tok,
  input  tag_t                     tag_in,
  output logic                     match,      // an occurrence ends in this word
  output logic                     pkt_match,  // string seen in the packet (at pkt_done)
  output logic                     pkt_done,   // last word of a packet processed
  output logic                     bypass      // merge took the exact-token path
);

  logic [TOK_W-1:0]   m_tok;
  tag_t               m_tag, f_tag;
  logic               seen;

  merge_stage #(.P_W(P_W), .S_W(S_W), .WILD_W(WILD_W), .OUT_W(TOK_W)) u_merge (
    .clk, .rst_n,
    .tbl_we(mtbl_we), .tbl_addr(mtbl_addr), .tbl_wdata(mtbl_wdata),
    .nx_we, .nx_wdata,
    .p_tok, .s_tok, .tag_in,
    .m_tok, .bypass, .tag_out(m_tag)
  );

  token_fsm #(.TOK_W(TOK_W), .STATE_W(STATE_W)) u_fsm (
    .clk, .rst_n,
    .cfg_we(fsm_we), .cfg_addr(fsm_addr), .cfg_wdata(fsm_wdata),
    .tok(m_tok), .tag_in(m_tag),
    .match, .state(), .tag_out(f_tag)
  );

  logic seen_c;
  always_comb begin
    seen_c    = (f_tag.sop ? 1'b0 : seen) | match;
    pkt_match = seen_c;
    pkt_done  = f_tag.valid && f_tag.eop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           seen <= 1'b0;
    else if (f_tag.valid) seen <= seen_c;
  end

endmodule
