// classifier_group: a set of intermediate classifiers that share one address
// input, merged into a single lookup table with a wide output word.
//
// The input token (from a TCAM or from the group one level up) addresses a
// table of 2**IN_W words. Each word holds N_OUT bit fields of OUT_W bits;
// field j is the token of output j, i.e. the class of output j's smaller
// symbol set that the input symbol falls into. Several input symbols may map
// to the same output symbol (e.g. "FGHI" and "FG**" both map to "FG**").
//
// Interface: write port (cfg_we/cfg_addr/cfg_wdata) loads one table word;
// tok_in/tag_in is the lookup; tok_out[j] is the token of output j.
// Timing: one lookup per clock, synchronous read like an FPGA block RAM,
// latency 1 cycle; the tag is delayed by the same cycle.
//
// Following the published scheme: the shared-address table with the outputs packed
// side by side in one word. Own choices: the write port, the field order
// (output 0 in the least significant bits) and the registered read.
module classifier_group
  import ids_pkg::*;
#(
  parameter int unsigned IN_W  = 8,   // input token width (table address)
  parameter int unsigned N_OUT = 2,   // number of outputs
  parameter int unsigned OUT_W = 6    // width of each output token
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [IN_W-1:0]        cfg_addr,
  input  logic [N_OUT*OUT_W-1:0] cfg_wdata,
  input  logic [IN_W-1:0]        tok_in,
  input  tag_t                   tag_in,
  output logic [OUT_W-1:0]       tok_out [N_OUT],
  output tag_t                   tag_out
);

  localparam int unsigned DEPTH = 1 << IN_W;

  logic [N_OUT*OUT_W-1:0] table_q [DEPTH];
  logic [N_OUT*OUT_W-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_wdata;
    rd_q <= table_q[tok_in];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;
  end

  always_comb begin
    for (int unsigned j = 0; j < N_OUT; j++)
      tok_out[j] = rd_q[j*OUT_W +: OUT_W];
  end

endmodule
