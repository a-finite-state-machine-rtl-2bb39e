// tb_token_fsm: self-checking test of the table-driven FSM at its default
// 5-bit state and 6-bit token. The whole 2048-entry transition table is
// filled with random {next state, match} entries; a random token stream with
// idle words and packet starts is applied and the state and match flag are
// compared every cycle with a model that applies the same table: state
// forced to 0 at a packet start, unchanged on idle words, one transition per
// clock.
module tb_token_fsm;
  import ids_pkg::*;

  localparam int TOK_W = 6, STATE_W = 5;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic                     cfg_we = 1'b0;
  logic [STATE_W+TOK_W-1:0] cfg_addr = '0;
  logic [STATE_W:0]         cfg_wdata = '0;
  logic [TOK_W-1:0]         tok = '0;
  tag_t                     tag_in = '0, tag_out;
  logic                     match;
  logic [STATE_W-1:0]       state;

  token_fsm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sop = 0, n_idle = 0, n_match = 0;
  logic [STATE_W:0] model [1 << (STATE_W + TOK_W)];

  initial begin
    int ms;
    bit mm;
    logic [STATE_W:0] ent;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << (STATE_W + TOK_W)); a++) begin
      cfg_we = 1; cfg_addr = (STATE_W+TOK_W)'(a); cfg_wdata = (STATE_W+1)'($urandom);
      model[a] = cfg_wdata;
      @(negedge clk);
    end
    cfg_we = 0;
    ms = 0; mm = 0;
    for (int n = 0; n < 5000; n++) begin
      tok = TOK_W'($urandom);
      tag_in = '{valid: $urandom_range(0, 5) != 0, sop: $urandom_range(0, 9) == 0, eop: 0};
      if (tag_in.valid) begin
        ent = model[{(tag_in.sop ? STATE_W'(0) : STATE_W'(ms)), tok}];
        ms = int'(ent[STATE_W:1]);
        mm = ent[0];
        if (tag_in.sop) n_sop++;
        if (mm) n_match++;
      end else begin
        mm = 0;
        n_idle++;
      end
      @(negedge clk);
      checks++;
      if (state !== STATE_W'(ms) || match !== mm || tag_out !== tag_in) begin
        failures++;
        if (failures < 10) $display("n %0d: state %0d match %b expected %0d %b", n, state, match, ms, mm);
      end
    end
    checks++; if (n_sop == 0 || n_idle == 0 || n_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
