// Testbench for rs_entry: allocation, CDB tag match and value copy, wakeup
// in the cycle of the broadcast, issue marking, free, and allocation winning
// over a free in the same cycle. Expected values are worked out by hand.
module tb_rs_entry;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc, issue, free, issued, ready;
  rs_t  alloc_data, entry;
  cdb_t cdb;

  rs_entry dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    alloc = 0; issue = 0; free = 0; cdb = '0;
  endtask

  initial begin
    alloc = 0; issue = 0; free = 0; cdb = '0; alloc_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!entry.busy && !ready, "idle after reset");
    // allocate: mulf waiting on RS#2 for V2, V1 present
    alloc_data = '{busy: 1'b1, op: OP_MUL, r: 3'd2, t1: '0, t2: 3'd2, v1: 32'd5, v2: '0, imm: '0};
    alloc = 1;
    step();
    check(entry.busy && entry.op == OP_MUL && entry.r == 3'd2, "allocated");
    check(!ready, "not ready while T2 pending");
    // a broadcast of another tag does nothing
    cdb = '{valid: 1'b1, tag: 3'd1, value: 32'd99};
    #1 check(!ready, "wrong tag does not wake");
    step();
    check(entry.t2 == 3'd2, "tag kept on mismatch");
    // matching broadcast: ready in the same cycle, value copied at the edge
    cdb = '{valid: 1'b1, tag: 3'd2, value: 32'd7};
    #1 check(ready, "wakes in the cycle of the broadcast");
    step();
    check(entry.t2 == '0 && entry.v2 == 32'd7 && entry.v1 == 32'd5, "value copied, tag cleared");
    check(ready, "ready after capture");
    // issue
    issue = 1;
    step();
    check(issued && !ready && entry.busy, "issued: stays busy, not ready again");
    // free
    free = 1;
    step();
    check(!entry.busy && !issued, "freed");
    // both sources waiting on the same tag
    alloc_data = '{busy: 1'b1, op: OP_ADD, r: 3'd4, t1: 3'd5, t2: 3'd5, v1: '0, v2: '0, imm: '0};
    alloc = 1;
    step();
    cdb = '{valid: 1'b1, tag: 3'd5, value: 32'd42};
    step();
    check(entry.v1 == 32'd42 && entry.v2 == 32'd42 && entry.t1 == '0 && entry.t2 == '0, "both slots captured");
    // free and alloc in the same cycle: the new instruction wins
    issue = 1;
    step();
    alloc_data = '{busy: 1'b1, op: OP_ST, r: 3'd0, t1: 3'd4, t2: '0, v1: '0, v2: 32'd16, imm: 32'd8};
    free = 1; alloc = 1;
    step();
    check(entry.busy && entry.op == OP_ST && !issued && entry.t1 == 3'd4, "alloc wins over free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
