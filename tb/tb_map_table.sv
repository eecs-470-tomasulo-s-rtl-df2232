// Testbench for map_table: rename, read, clear on a matching writeback,
// keep on a stale one, and rename priority over a same-cycle clear. A
// shadow array kept by the testbench gives the expected tags.
module tb_map_table;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_idx_t rd_idx1, rd_idx2, ren_reg, wb_reg;
  tag_t     rd_tag1, rd_tag2, ren_tag, wb_tag;
  logic     ren_en, wb_en, wb_match;

  map_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tag_t shadow [NUM_REGS];

  initial begin
    rd_idx1 = 0; rd_idx2 = 0; ren_en = 0; ren_reg = 0; ren_tag = 0; wb_en = 0; wb_reg = 0; wb_tag = 0;
    for (int r = 0; r < NUM_REGS; r++) shadow[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: rename f2 to RS#4, then RS#5; writeback of RS#4 is stale
    ren_en = 1; ren_reg = 2; ren_tag = 4;
    @(negedge clk);
    ren_tag = 5;
    @(negedge clk);
    ren_en = 0; wb_en = 1; wb_reg = 2; wb_tag = 4;
    #1 check(!wb_match, "stale writeback must not match");
    @(negedge clk);
    wb_en = 0; rd_idx1 = 2;
    #1 check(rd_tag1 == 5, "younger rename kept");
    wb_en = 1; wb_tag = 5;
    #1 check(wb_match, "current rename matches");
    @(negedge clk);
    wb_en = 0;
    #1 check(rd_tag1 == 0, "cleared after matching writeback");
    // same-cycle clear and rename of the same register: rename wins
    ren_en = 1; ren_reg = 3; ren_tag = 1;
    @(negedge clk);
    wb_en = 1; wb_reg = 3; wb_tag = 1; ren_en = 1; ren_reg = 3; ren_tag = 2;
    @(negedge clk);
    wb_en = 0; ren_en = 0; rd_idx2 = 3;
    #1 check(rd_tag2 == 2, "rename wins over same-cycle clear");
    for (int r = 0; r < NUM_REGS; r++) begin rd_idx1 = reg_idx_t'(r); #1 shadow[r] = rd_tag1; end
    // random
    for (int n = 0; n < 500; n++) begin
      ren_en  = 1'($urandom_range(0, 1));
      ren_reg = reg_idx_t'($urandom);
      ren_tag = tag_t'($urandom_range(1, 5));
      wb_en   = 1'($urandom_range(0, 1));
      wb_reg  = reg_idx_t'($urandom);
      wb_tag  = tag_t'($urandom_range(1, 5));
      rd_idx1 = reg_idx_t'($urandom);
      rd_idx2 = reg_idx_t'($urandom);
      #1;
      check(rd_tag1 == shadow[rd_idx1] && rd_tag2 == shadow[rd_idx2], "read port");
      check(wb_match == (wb_en && shadow[wb_reg] == wb_tag), "match output");
      if (wb_en && shadow[wb_reg] == wb_tag) shadow[wb_reg] = '0;
      if (ren_en) shadow[ren_reg] = ren_tag;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
