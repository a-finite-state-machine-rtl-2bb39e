// token_fsm: table-driven finite state machine that searches for one string
// in a stream of merged tokens.
//
// The transition table is addressed by {current state, input token} and each
// entry holds {next state, match}. The compiler fills it with a
// Knuth-Morris-Pratt automaton extended to multi-byte words: the state is the
// length of the longest tail of the stream seen so far that is a proper head
// of the search string, and one transition consumes a whole word, so the
// string can be recognised however it is aligned in the words. 'match' is
// set for a word in which an occurrence of the string ends. At the first word
// of a packet the state is taken as 0, so matches do not run across packets;
// words with valid low leave the state alone.
//
// The table's read register is the state register itself, as in a block RAM
// whose output feeds back into its address: one transition per clock, the
// match flag appears 1 cycle after the token. The table holds
// (STATE_W + 1) * 2**(STATE_W + TOK_W) bits, 12 Kbit at the default 5-bit
// state and 6-bit token.
//
// Following the published scheme: table-based FSM, state and token sizes, KMP
// behaviour. Own choices: table layout, the write port, state reset at start
// of packet.
module token_fsm
  import ids_pkg::*;
#(
  parameter int unsigned TOK_W   = 6,  // FSM input word size
  parameter int unsigned STATE_W = 5   // FSM state variable size
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [STATE_W+TOK_W-1:0] cfg_addr,   // {state, token}
  input  logic [STATE_W:0]         cfg_wdata,  // {next state, match}
  input  logic [TOK_W-1:0]         tok,
  input  tag_t                     tag_in,
  output logic                     match,
  output logic [STATE_W-1:0]       state,
  output tag_t                     tag_out
);

  localparam int unsigned DEPTH = 1 << (STATE_W + TOK_W);

  logic [STATE_W:0] trans [DEPTH];

  logic [STATE_W-1:0] cur_state;
  logic [STATE_W:0]   entry;

  always_comb begin
    cur_state = tag_in.sop ? '0 : state;
    entry     = trans[{cur_state, tok}];
  end

  always_ff @(posedge clk) begin
    if (cfg_we) trans[cfg_addr] <= cfg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      match   <= 1'b0;
      tag_out <= '0;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) begin
        state <= entry[STATE_W:1];
        match <= entry[0];
      end else begin
        match <= 1'b0;
      end
    end
  end

endmodule
