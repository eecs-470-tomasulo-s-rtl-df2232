// Testbench for phys_renamer: the lecture's example renaming, then random
// sequences after reset checked against a model of the map table and the
// free list, including the stall once the free list is empty.
module tb_phys_renamer;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, has_dst, in_ready;
  logic [1:0] src1, src2, dst;
  logic [2:0] psrc1, psrc2, pdst, free_count;

  phys_renamer dut (.*);

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

  int map [4];
  int next_free;

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 4; a++) map[a] = a;
    next_free = 4;
  endtask

  initial begin
    in_valid = 0; has_dst = 0; src1 = 0; src2 = 0; dst = 0;
    @(negedge clk);
    do_reset();
    // lecture example: {src1, src2, dst} -> expected {p, p, p}
    begin
      automatic int ex [4][6] = '{'{2, 3, 1, 2, 3, 4}, '{2, 1, 3, 2, 4, 5}, '{2, 3, 3, 2, 5, 6}, '{1, 1, 1, 4, 4, 7}};
      for (int n = 0; n < 4; n++) begin
        in_valid = 1; has_dst = 1;
        src1 = 2'(ex[n][0]); src2 = 2'(ex[n][1]); dst = 2'(ex[n][2]);
        #1;
        check(in_ready && psrc1 == 3'(ex[n][3]) && psrc2 == 3'(ex[n][4]) && pdst == 3'(ex[n][5]),
              $sformatf("example insn %0d: p%0d p%0d p%0d", n, psrc1, psrc2, pdst));
        check(free_count == 3'(4 - n), "free count");
        @(negedge clk);
      end
      #1 check(!in_ready, "stall on empty free list");
      in_valid = 0;
    end
    // random sequences
    for (int s = 0; s < 50; s++) begin
      do_reset();
      for (int n = 0; n < 8; n++) begin
        in_valid = 1'($urandom);
        has_dst  = 1'($urandom);
        src1 = 2'($urandom_range(1, 3)); src2 = 2'($urandom_range(1, 3)); dst = 2'($urandom_range(1, 3));
        #1;
        check(psrc1 == 3'(map[src1]) && psrc2 == 3'(map[src2]), "source translation");
        check(in_ready == (!has_dst || next_free <= 7), "ready");
        if (has_dst && next_free <= 7) check(pdst == 3'(next_free), "destination from free list");
        check(free_count == 3'(8 - next_free), "free count");
        if (in_valid && has_dst && next_free <= 7) begin
          map[dst] = next_free;
          next_free++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
