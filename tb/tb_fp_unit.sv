// Testbench for fp_unit: the 3-cycle pipelined single-precision multiply.
// An operation in its X1 cycle must be on the result port (W) in the fourth
// cycle when nothing stalls; back-to-back operations must overlap in the
// pipe; rounding ties, overflow, underflow and the special values must give
// the specified results; and with random CDB grants every result must come
// out once, in order, equal to a reference product computed here with real
// arithmetic.
module tb_fp_unit;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fu_req_t req;
  logic    in_ready, out_ack;
  cdb_t    out;

  fp_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference binary32 multiply: the exact product is formed in double
  // precision (24x24 bits always fit in 53), then rounded to nearest-even at
  // 24 bits. Subnormal inputs count as zero and results below the normal
  // range flush to a signed zero, as specified for the FP unit.
  function automatic logic [31:0] fmul_ref(input logic [31:0] a, input logic [31:0] b);
    logic        s, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    real         ra, rb;
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    s      = a[31] ^ b[31];
    a_nan  = a[30:23] == 8'hFF && a[22:0] != 0;
    b_nan  = b[30:23] == 8'hFF && b[22:0] != 0;
    a_inf  = a[30:23] == 8'hFF && a[22:0] == 0;
    b_inf  = b[30:23] == 8'hFF && b[22:0] == 0;
    a_zero = a[30:23] == 8'h00;
    b_zero = b[30:23] == 8'h00;
    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) return 32'h7FC0_0000;
    if (a_inf || b_inf)   return {s, 8'hFF, 23'd0};
    if (a_zero || b_zero) return {s, 31'd0};
    ra = (1.0 + real'(a[22:0]) / 8388608.0) * $bitstoreal({1'b0, 11'(int'(a[30:23]) - 127 + 1023), 52'd0});
    rb = (1.0 + real'(b[22:0]) / 8388608.0) * $bitstoreal({1'b0, 11'(int'(b[30:23]) - 127 + 1023), 52'd0});
    d  = $realtobits(ra * rb);
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || d[29])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  cdb_t exp_q [$];

  // random operand: mostly moderate exponents with sparse mantissas (so that
  // rounding ties occur), sometimes any bit pattern or an extreme exponent
  function automatic word_t rand_operand();
    word_t w;
    w = $urandom;
    case ($urandom_range(0, 7))
      0:       ;                                                   // any pattern
      1:       w[30:23] = 8'(($urandom_range(0, 1) != 0) ? $urandom_range(0, 3) : $urandom_range(250, 255));
      2:       w[30:23] = 8'($urandom_range(1, 254));
      default: begin
        w[30:23] = 8'($urandom_range(100, 154));
        w[22:0]  = w[22:0] & 23'($urandom) & 23'($urandom);
      end
    endcase
    return w;
  endfunction

  // one operation alone through the pipe, result checked against `expect_v`
  task automatic one(input word_t a, input word_t b, input word_t expect_v, input string what);
    req = '{valid: 1'b1, op: OP_MUL, tag: 3'd4, a: a, b: b, imm: '0};
    @(negedge clk);
    req.valid = 0;
    repeat (2) @(negedge clk);
    check(out.valid && out.value == expect_v, $sformatf("%s: %h * %h = %h, expected %h", what, a, b, out.value, expect_v));
    @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out.valid && out_ack) begin
      cdb_t e;
      e = exp_q.pop_front();
      check(out.tag == e.tag && out.value == e.value, $sformatf("result %0h expected %0h", out.value, e.value));
    end
    if (req.valid && in_ready) begin
      word_t v;
      v = fmul_ref(req.a, req.b);
      exp_q.push_back('{valid: 1'b1, tag: req.tag, value: v});
    end
  end

  initial begin
    req = '0; out_ack = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency and pipelining: two operations on consecutive cycles
    // 3.0 * 7.0 = 21.0 and 3.0 * 11.0 = 33.0
    req = '{valid: 1'b1, op: OP_MUL, tag: 3'd4, a: 32'h4040_0000, b: 32'h40E0_0000, imm: '0};
    @(negedge clk);
    req = '{valid: 1'b1, op: OP_MUL, tag: 3'd5, a: 32'h4040_0000, b: 32'h4130_0000, imm: '0};
    @(negedge clk);
    req.valid = 0;
    check(!out.valid, "no result after X1 and X2");
    @(negedge clk);
    check(out.valid && out.tag == 3'd4 && out.value == 32'h41A8_0000, "first result after 3 cycles");
    @(negedge clk);
    check(out.valid && out.tag == 3'd5 && out.value == 32'h4204_0000, "second result one cycle later");
    @(negedge clk);
    check(!out.valid, "pipe empty");
    // values written out by hand
    one(32'h3FC0_0000, 32'hC000_0000, 32'hC040_0000, "1.5 * -2.0");
    one(32'h3F80_0800, 32'h3F80_0800, 32'h3F80_1000, "tie, rounds to even (down)");
    one(32'h3F80_0800, 32'h3F80_1800, 32'h3F80_2002, "tie, rounds to even (up)");
    one(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002, "below half, rounds down");
    one(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h407F_FFFE, "carry into the exponent");
    one(32'h3F80_0001, 32'h3FFF_FFFF, 32'h4000_0000, "rounding overflows the mantissa");
    one(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000, "overflow to +inf");
    one(32'h0080_0000, 32'hBF00_0000, 32'h8000_0000, "underflow to -0");
    one(32'h0000_0001, 32'h4000_0000, 32'h0000_0000, "subnormal input counts as zero");
    one(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000, "inf * -2 = -inf");
    one(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000, "inf * 0 = NaN");
    one(32'h7FA0_0000, 32'h3F80_0000, 32'h7FC0_0000, "NaN input");
    // the reference agrees with the hand-written values
    check(fmul_ref(32'h3F80_0800, 32'h3F80_1800) == 32'h3F80_2002, "reference rounding");
    for (int n = 0; n < 4000; n++) begin
      req.valid = 1'($urandom);
      req.tag   = tag_t'($urandom_range(4, 5));
      req.a     = rand_operand();
      req.b     = rand_operand();
      out_ack   = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    req.valid = 0; out_ack = 1;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
