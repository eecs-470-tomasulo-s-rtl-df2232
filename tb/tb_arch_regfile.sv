// Testbench for arch_regfile: reset to zero, random writes and two-port
// reads against a shadow copy, and old-value read in the cycle of a write.
module tb_arch_regfile;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_idx_t rd_idx1, rd_idx2, wr_idx;
  word_t    rd_val1, rd_val2, wr_val;
  logic     wr_en;

  arch_regfile dut (.*);

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

  word_t shadow [NUM_REGS];

  initial begin
    rd_idx1 = 0; rd_idx2 = 0; wr_idx = 0; wr_val = 0; wr_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NUM_REGS; r++) begin
      shadow[r] = '0;
      rd_idx1 = reg_idx_t'(r); #1 check(rd_val1 == 0, "reset value");
    end
    for (int n = 0; n < 500; n++) begin
      wr_en = 1'($urandom_range(0, 1)); wr_idx = reg_idx_t'($urandom); wr_val = $urandom;
      rd_idx1 = reg_idx_t'($urandom); rd_idx2 = reg_idx_t'($urandom);
      #1;
      check(rd_val1 == shadow[rd_idx1], $sformatf("port 1 r%0d", rd_idx1));
      check(rd_val2 == shadow[rd_idx2], $sformatf("port 2 r%0d", rd_idx2));
      if (wr_en) shadow[wr_idx] = wr_val;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
