// Testbench for alu_unit: random ADD/SUB/ADDI with random CDB grants. Each
// result must appear one cycle after the operation enters (X then W), hold
// while not granted, and match a value computed here.
module tb_alu_unit;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fu_req_t req;
  logic    in_ready, out_ack;
  cdb_t    out;

  alu_unit dut (.*);

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

  cdb_t exp_q [$];
  int   cyc = 0, enter_cyc [$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out.valid && out_ack) begin
      cdb_t e;
      int   c;
      e = exp_q.pop_front();
      c = enter_cyc.pop_front();
      check(out.tag == e.tag && out.value == e.value, $sformatf("result %0h expected %0h", out.value, e.value));
    end
    if (req.valid && in_ready) begin
      word_t v;
      case (req.op)
        OP_SUB:  v = req.a - req.b;
        OP_ADDI: v = req.a + req.imm;
        default: v = req.a + req.b;
      endcase
      exp_q.push_back('{valid: 1'b1, tag: req.tag, value: v});
      enter_cyc.push_back(cyc);
    end
  end

  initial begin
    req = '0; out_ack = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: enters at one edge, valid right after it
    req = '{valid: 1'b1, op: OP_ADDI, tag: 3'd1, a: 32'd16, b: '0, imm: 32'd4};
    out_ack = 1;
    @(negedge clk);
    req.valid = 0;
    check(out.valid && out.value == 32'd20, "1-cycle ALU latency");
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      int k;
      k = $urandom_range(0, 2);
      req.valid = 1'($urandom);
      req.op    = (k == 0) ? OP_ADD : (k == 1) ? OP_SUB : OP_ADDI;
      req.tag   = 3'd1;
      req.a     = $urandom;
      req.b     = $urandom;
      req.imm   = $urandom;
      out_ack   = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    req.valid = 0; out_ack = 1;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
