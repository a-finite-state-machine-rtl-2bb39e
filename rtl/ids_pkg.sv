// ids_pkg: types and constants shared by the multi-byte string matching
// pipeline (TCAM input classifiers, classifier groups, merge stage and
// token FSMs).
//
// The default sizes are those of the main configuration: a 32-bit input
// word, FSM input tokens of at most 6 bits and an FSM state of at most
// 5 bits. Every word travels through the pipeline with a small sideband
// tag (valid, start of packet, end of packet) that is delayed alongside the
// tokens so that each stage sees the framing of the word it is working on.
// The packet framing and the configuration-target encoding are choices of
// this design; the published scheme does not specify them.
package ids_pkg;

  // Main configuration: 32-bit network word, 6-bit FSM token, 5-bit state.
  localparam int unsigned WORD_BYTES_DEF = 4;
  localparam int unsigned TOK_W_DEF      = 6;
  localparam int unsigned STATE_W_DEF    = 5;

  function automatic int unsigned max4(int unsigned a, int unsigned b,
                                       int unsigned c, int unsigned d);
    int unsigned m = a;
    if (b > m) m = b;
    if (c > m) m = c;
    if (d > m) m = d;
    return m;
  endfunction

  // Sideband that follows each word through the pipeline.
  typedef struct packed {
    logic valid;  // a word is present in this stage
    logic sop;    // first word of a packet
    logic eop;    // last word of a packet
  } tag_t;

  // Table selected by a configuration write on the top level.
  typedef enum logic [3:0] {
    CFG_P_TCAM   = 4'd0,  // primary TCAM entry   {valid, mask, value}
    CFG_S_TCAM   = 4'd1,  // secondary TCAM entry {valid, mask, value}
    CFG_P_L2     = 4'd2,  // primary level 2 classifier group word
    CFG_S_L2     = 4'd3,  // secondary level 2 classifier group word
    CFG_P_L1     = 4'd4,  // primary level 1 classifier group word [index]
    CFG_S_L1     = 4'd5,  // secondary level 1 classifier group word [index]
    CFG_MERGE    = 4'd6,  // merge lookup table entry [index]
    CFG_MERGE_NX = 4'd7,  // merge exact-token count register [index]
    CFG_FSM      = 4'd8   // FSM transition table entry [index]
  } cfg_tgt_e;

endpackage
