// tb_classifier_group: self-checking test of the shared-address classifier
// table. A 5-bit-address group with three 4-bit outputs is loaded with random
// words; lookups at random addresses must return every output field one
// cycle later, with the tag delayed by the same cycle. Some words are
// rewritten between lookups.
module tb_classifier_group;
  import ids_pkg::*;

  localparam int IW = 5, NO = 3, OW = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             cfg_we = 1'b0;
  logic [IW-1:0]    cfg_addr = '0, tok_in = '0;
  logic [NO*OW-1:0] cfg_wdata = '0;
  tag_t             tag_in = '0, tag_out;
  logic [OW-1:0]    tok_out [NO];

  classifier_group #(.IN_W(IW), .N_OUT(NO), .OUT_W(OW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NO*OW-1:0] model [1 << IW];

  task automatic wr(int a, logic [NO*OW-1:0] d);
    cfg_we = 1; cfg_addr = IW'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
    model[a] = d;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << IW); a++) wr(a, (NO*OW)'($urandom));
    for (int n = 0; n < 2000; n++) begin
      if (n % 37 == 0) wr($urandom_range(0, (1 << IW) - 1), (NO*OW)'($urandom));
      tok_in = IW'($urandom);
      tag_in = '{valid: $urandom_range(0, 1), sop: $urandom_range(0, 1), eop: $urandom_range(0, 1)};
      @(negedge clk);
      for (int j = 0; j < NO; j++) begin
        checks++;
        if (tok_out[j] !== model[tok_in][j*OW +: OW]) begin
          failures++;
          if (failures < 10) $display("addr %0d out %0d: %h expected %h", tok_in, j, tok_out[j], model[tok_in][j*OW +: OW]);
        end
      end
      checks++;
      if (tag_out !== tag_in) failures++;
    end
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
