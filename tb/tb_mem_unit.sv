// Testbench for mem_unit: host preload and readback, loads with one cycle
// to the result register and a result held until granted, stores written
// during X with their W flag one cycle later, all against a shadow memory.
module tb_mem_unit;
  import tomasulo_pkg::*;

  localparam int unsigned MW = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fu_req_t ld_req, st_req;
  logic    ld_in_ready, ld_out_ack, st_done, host_we;
  cdb_t    ld_out;
  tag_t    st_done_tag;
  word_t   host_addr, host_wdata, host_rdata;

  mem_unit #(.MEM_WORDS(MW)) dut (.*);

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

  word_t shadow [MW];
  word_t exp_q [$];
  logic  st_prev;

  always @(posedge clk) if (rst_n) begin
    if (ld_out.valid && ld_out_ack) begin
      word_t e;
      e = exp_q.pop_front();
      check(ld_out.value == e, $sformatf("load %0h expected %0h", ld_out.value, e));
    end
    if (ld_req.valid && ld_in_ready) exp_q.push_back(shadow[((ld_req.b + ld_req.imm) >> 2) % MW]);
    check(st_done == st_prev, "store W one cycle after X");
    st_prev = st_req.valid;
    if (st_req.valid) shadow[((st_req.b + st_req.imm) >> 2) % MW] = st_req.a;
    else if (host_we) shadow[(host_addr >> 2) % MW] = host_wdata;
  end

  initial begin
    ld_req = '0; st_req = '0; ld_out_ack = 1; host_we = 0; host_addr = 0; host_wdata = 0; st_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < MW; w++) begin
      host_we = 1; host_addr = word_t'(w) << 2; host_wdata = $urandom;
      @(negedge clk);
    end
    host_we = 0;
    // directed: a load of word 5 is on the result port one cycle later
    ld_req = '{valid: 1'b1, op: OP_LD, tag: 3'd2, a: '0, b: 32'd16, imm: 32'd4};
    @(negedge clk);
    ld_req.valid = 0;
    check(ld_out.valid && ld_out.tag == 3'd2 && ld_out.value == shadow[5], "1-cycle load");
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      ld_req.valid = 1'($urandom);
      ld_req.tag   = 3'd2;
      ld_req.b     = word_t'($urandom_range(0, MW - 1)) << 2;
      ld_req.imm   = '0;
      st_req.valid = 1'($urandom);
      st_req.tag   = 3'd3;
      st_req.a     = $urandom;
      st_req.b     = word_t'($urandom_range(0, MW - 2)) << 2;
      st_req.imm   = 32'd4;
      ld_out_ack   = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    ld_req.valid = 0; st_req.valid = 0; ld_out_ack = 1;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all loads delivered");
    for (int w = 0; w < MW; w++) begin
      host_addr = word_t'(w) << 2;
      #1 check(host_rdata == shadow[w], $sformatf("word %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
