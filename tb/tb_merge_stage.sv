// tb_merge_stage: self-checking test of the primary/secondary merge.
// With a random exact-token count and a random lookup table, random token
// pairs must give the primary token itself when it is below the count
// (bypass) and otherwise the table entry at {primary - count, secondary},
// one cycle later. Both paths must be taken.
module tb_merge_stage;
  import ids_pkg::*;

  localparam int P_W = 6, S_W = 2, WILD_W = 2, OUT_W = 6;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  tbl_we = 1'b0, nx_we = 1'b0;
  logic [WILD_W+S_W-1:0] tbl_addr = '0;
  logic [OUT_W-1:0]      tbl_wdata = '0, m_tok;
  logic [P_W-1:0]        nx_wdata = '0, p_tok = '0;
  logic [S_W-1:0]        s_tok = '0;
  tag_t                  tag_in = '0, tag_out;
  logic                  bypass;

  merge_stage dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_bypass = 0, n_lut = 0;
  logic [OUT_W-1:0] model [1 << (WILD_W + S_W)];
  int nx;

  initial begin
    int e_tok;
    bit e_byp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << (WILD_W + S_W)); a++) begin
      tbl_we = 1; tbl_addr = (WILD_W+S_W)'(a); tbl_wdata = OUT_W'($urandom);
      model[a] = tbl_wdata;
      @(negedge clk);
    end
    tbl_we = 0;
    for (int r = 0; r < 8; r++) begin
      nx = $urandom_range(0, 40);
      nx_we = 1; nx_wdata = P_W'(nx);
      @(negedge clk);
      nx_we = 0;
      for (int n = 0; n < 300; n++) begin
        p_tok = P_W'($urandom_range(0, nx + (1 << WILD_W) - 1));
        s_tok = S_W'($urandom);
        tag_in = '{valid: 1, sop: $urandom_range(0, 1), eop: $urandom_range(0, 1)};
        e_byp = int'(p_tok) < nx;
        e_tok = e_byp ? int'(p_tok) : int'(model[{WILD_W'(int'(p_tok) - nx), s_tok}]);
        @(negedge clk);
        checks++;
        if (m_tok !== OUT_W'(e_tok) || bypass !== e_byp || tag_out !== tag_in) begin
          failures++;
          if (failures < 10) $display("p %0d s %0d nx %0d: %0d/%b expected %0d/%b", p_tok, s_tok, nx, m_tok, bypass, e_tok, e_byp);
        end
        if (e_byp) n_bypass++; else n_lut++;
      end
    end
    checks++; if (n_bypass == 0 || n_lut == 0) failures++;
    $display("bypass %0d lookup %0d", n_bypass, n_lut);
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
