// tcam: ternary content addressable memory used as an input classifier.
//
// Each of the DEPTH entries holds a value, a care mask and a valid bit. A
// bit position whose mask bit is 0 is a "don't care". The network word is
// presented as the search key; every valid entry compares against it in
// parallel and the address of the lowest-addressed matching entry is
// returned (lowest address = highest priority). The rule compiler loads the
// entries sorted so that patterns with fewer wildcards sit at lower
// addresses, and puts the all-wildcard pattern last, so a loaded TCAM always
// hits; 'hit' is still reported so that an unloaded or wrongly loaded table
// can be noticed.
//
// Interface: one write port (cfg_we/cfg_addr/cfg_valid/cfg_mask/cfg_value)
// loads an entry; writes and searches may happen in the same cycle (the
// search then sees the old entry). Timing: one search per clock, result
// registered, latency 1 cycle. The sideband tag is delayed by the same
// cycle.
//
// Following the published scheme: ternary match, lowest matching address
// wins. Own choices: a register-based array (the published scheme places the
// TCAM in external devices), the mask polarity, the write port and a reset
// that only clears the valid bits.
module tcam
  import ids_pkg::*;
#(
  parameter int unsigned KEY_W = 32,   // search key = network word width
  parameter int unsigned DEPTH = 753,  // number of entries
  parameter int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // entry load port
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_addr,
  input  logic             cfg_valid,
  input  logic [KEY_W-1:0] cfg_mask,   // 1 = bit must match, 0 = don't care
  input  logic [KEY_W-1:0] cfg_value,
  // search
  input  logic [KEY_W-1:0] key,
  input  tag_t             tag_in,
  output logic [IDX_W-1:0] idx,        // lowest matching address
  output logic             hit,
  output tag_t             tag_out
);

  // Entries are plain registers: every one is read in every cycle.
  logic [DEPTH-1:0][KEY_W-1:0] ent_value;
  logic [DEPTH-1:0][KEY_W-1:0] ent_mask;
  logic [DEPTH-1:0] ent_valid;

  always_ff @(posedge clk) begin
    if (cfg_we && (32'(cfg_addr) < DEPTH)) begin
      ent_value[cfg_addr] <= cfg_value;
      ent_mask[cfg_addr]  <= cfg_mask;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ent_valid <= '0;
    else if (cfg_we && (32'(cfg_addr) < DEPTH)) ent_valid[cfg_addr] <= cfg_valid;
  end

  // Parallel compare, then a priority encoder that keeps the lowest address.
  logic [DEPTH-1:0] match_line;
  logic [IDX_W-1:0] idx_c;
  logic             hit_c;

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++)
      match_line[i] = ent_valid[i] && (((key ^ ent_value[i]) & ent_mask[i]) == '0);
  end

  always_comb begin
    idx_c = '0;
    hit_c = 1'b0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
      if (match_line[i]) begin
        idx_c = IDX_W'(i);
        hit_c = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      hit     <= 1'b0;
      tag_out <= '0;
    end else begin
      idx     <= idx_c;
      hit     <= hit_c && tag_in.valid;
      tag_out <= tag_in;
    end
  end

endmodule
