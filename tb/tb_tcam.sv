// tb_tcam: self-checking test of the ternary CAM.
//
// A 24-entry, 16-bit TCAM is filled with random values, masks and valid
// bits; keys are either random or copies of a stored entry with its
// don't-care bits randomised, so that several entries often match at once.
// The expected result, the lowest valid matching address, is computed from a
// copy of the entries. The result must appear exactly one cycle after the
// key, together with the delayed tag. Entries are rewritten while searching.
module tb_tcam;
  import ids_pkg::*;

  localparam int KW = 16;
  localparam int D  = 24;
  localparam int IW = $clog2(D);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cfg_we = 1'b0, cfg_valid = 1'b0;
  logic [IW-1:0] cfg_addr = '0;
  logic [KW-1:0] cfg_mask = '0, cfg_value = '0, key = '0;
  tag_t          tag_in = '0, tag_out;
  logic [IW-1:0] idx;
  logic          hit;

  tcam #(.KEY_W(KW), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_multi = 0, n_miss = 0;
  logic [KW-1:0] m_val [D], m_msk [D];
  bit            m_vld [D];

  task automatic write_entry(int a, bit v, logic [KW-1:0] m, logic [KW-1:0] x);
    cfg_we = 1; cfg_addr = IW'(a); cfg_valid = v; cfg_mask = m; cfg_value = x;
    @(negedge clk);
    cfg_we = 0;
    m_val[a] = x; m_msk[a] = m; m_vld[a] = v;
  endtask

  initial begin
    int exp_idx, nm;
    bit exp_hit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset nothing is valid
    key = 16'h1234; tag_in = '{valid: 1, sop: 1, eop: 0};
    @(negedge clk);
    checks++; if (hit !== 1'b0) begin failures++; $display("hit after reset"); end
    for (int a = 0; a < D; a++)
      write_entry(a, $urandom_range(0, 3) != 0, KW'($urandom) | KW'($urandom), KW'($urandom));
    for (int n = 0; n < 3000; n++) begin
      if (n % 50 == 0)
        write_entry($urandom_range(0, D - 1), $urandom_range(0, 3) != 0,
                    KW'($urandom) & KW'($urandom), KW'($urandom));
      if ($urandom_range(0, 1) == 0) begin
        int a = $urandom_range(0, D - 1);
        key = (m_val[a] & m_msk[a]) | (KW'($urandom) & ~m_msk[a]);
      end else key = KW'($urandom);
      tag_in = '{valid: 1, sop: $urandom_range(0, 1), eop: $urandom_range(0, 1)};
      exp_hit = 0; exp_idx = 0; nm = 0;
      for (int a = D - 1; a >= 0; a--)
        if (m_vld[a] && ((key & m_msk[a]) == (m_val[a] & m_msk[a]))) begin
          exp_hit = 1; exp_idx = a; nm++;
        end
      if (nm > 1) n_multi++;
      if (!exp_hit) n_miss++;
      @(negedge clk);  // result registered at the edge in between
      checks++;
      if (hit !== exp_hit || (exp_hit && idx !== IW'(exp_idx)) || tag_out !== tag_in) begin
        failures++;
        if (failures < 10) $display("key %h: hit %b idx %0d, expected %b %0d", key, hit, idx, exp_hit, exp_idx);
      end
    end
    checks++; if (n_multi == 0 || n_miss == 0) begin failures++; $display("coverage"); end
    $display("multi-match searches %0d, misses %0d", n_multi, n_miss);
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
