// merge_stage: combines the primary and secondary token of one search string
// into the single token stream its FSM consumes (the "cross product" of the
// primary and secondary symbol sets).
//
// Primary tokens are numbered by the rule compiler with the exact patterns
// (no wildcard bytes) first: tokens 0 .. n_exact-1 are exact, the remaining
// WILD_N = 2**WILD_W tokens are the wildcard-ended patterns and the
// all-wildcard one. An exact primary token already identifies the word, so
// it is passed straight through as the merged token (bypass). Otherwise the
// small lookup table is addressed by {primary token - n_exact, secondary
// token} and returns the merged token. Because only the wildcard primaries
// reach the table, it stays at 2**(WILD_W+S_W) entries whatever the string
// length.
//
// Interface: tbl_* loads one lookup entry, nx_* loads the exact-token count.
// Timing: one token pair per clock, latency 1 cycle; 'bypass' tells, for the
// registered output, which of the two paths produced it.
//
// Following the published scheme: bypass of tokens without wildcards and a small
// lookup table for the rest. Own choices: the numbering convention that
// makes the bypass a single compare, the table address layout and the
// combinational (distributed-memory) read before the output register.
module merge_stage
  import ids_pkg::*;
#(
  parameter int unsigned P_W    = 6,  // primary token width
  parameter int unsigned S_W    = 2,  // secondary token width
  parameter int unsigned WILD_W = 2,  // width of wildcard-primary index
  parameter int unsigned OUT_W  = 6   // merged token width (FSM input)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tbl_we,
  input  logic [WILD_W+S_W-1:0]   tbl_addr,
  input  logic [OUT_W-1:0]        tbl_wdata,
  input  logic                    nx_we,
  input  logic [P_W-1:0]          nx_wdata,
  input  logic [P_W-1:0]          p_tok,
  input  logic [S_W-1:0]          s_tok,
  input  tag_t                    tag_in,
  output logic [OUT_W-1:0]        m_tok,
  output logic                    bypass,
  output tag_t                    tag_out
);

  localparam int unsigned DEPTH = 1 << (WILD_W + S_W);

  logic [OUT_W-1:0] lut [DEPTH];
  logic [P_W-1:0]   n_exact;

  always_ff @(posedge clk) begin
    if (tbl_we) lut[tbl_addr] <= tbl_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     n_exact <= '0;
    else if (nx_we) n_exact <= nx_wdata;
  end

  logic                  is_exact;
  logic [P_W-1:0]        wild_full;
  logic [WILD_W+S_W-1:0] lut_addr;
  logic [OUT_W-1:0]      m_tok_c;

  always_comb begin
    is_exact  = p_tok < n_exact;
    wild_full = p_tok - n_exact;
    lut_addr  = {wild_full[WILD_W-1:0], s_tok};
    m_tok_c   = is_exact ? OUT_W'(p_tok) : lut[lut_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tok   <= '0;
      bypass  <= 1'b0;
      tag_out <= '0;
    end else begin
      m_tok   <= m_tok_c;
      bypass  <= is_exact && tag_in.valid;
      tag_out <= tag_in;
    end
  end

endmodule
