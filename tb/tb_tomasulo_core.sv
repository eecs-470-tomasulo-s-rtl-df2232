// Testbench for tomasulo_core: replays the lecture's timed example.
//
// Registers f0, f1, f2 and r1 are mapped to r0, r1, r2 and r3. After setting
// f0 and r1 with two ADDIs and letting the core drain, it runs
//   ldf X(r1),f1 ; mulf f0,f1,f2 ; stf f2,Z(r1) ; addi r1,4,r1 ;
//   ldf X(r1),f1 ; mulf f0,f1,f2 ; stf f2,Z(r1)
// and records for every instruction the cycle of D, S, first X and W. Those
// are compared with the instruction-status table of the example (cycles 1 to
// 10), extended by hand for the last two instructions (mulf #2 W in c13,
// stf #2 S c13, X c14, W c15). Final register and memory values are then
// checked against a hand calculation, and the map table must be all zero.
// Finally the lecture's two timing-free four-instruction examples run and
// their register results are compared with an in-order calculation.
module tb_tomasulo_core;
  import tomasulo_pkg::*;

  localparam int unsigned MEM_WORDS = 64;
  localparam word_t X = 32'h20, Z = 32'h60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              insn_valid;
  insn_t             insn;
  logic              insn_ready;
  tag_t              disp_tag;
  cdb_t              cdb;
  logic [NUM_RS-1:0] s_mask, x_mask, w_mask, rs_busy, rs_waiting;
  reg_idx_t          dbg_reg;
  word_t             dbg_reg_val;
  tag_t              dbg_reg_tag;
  logic              host_we;
  word_t             host_addr, host_wdata, host_rdata;

  tomasulo_core #(.MEM_WORDS(MEM_WORDS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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


  function automatic insn_t mk(op_e op, int rd, int rs1, int rs2, logic u1, logic u2, word_t imm);
    insn_t i;
    i.op = op; i.rd = reg_idx_t'(rd); i.rs1 = reg_idx_t'(rs1); i.rs2 = reg_idx_t'(rs2);
    i.use1 = u1; i.use2 = u2; i.imm = imm;
    return i;
  endfunction

  localparam int N = 7;
  insn_t prog [N];
  int    d_c [N], s_c [N], x_c [N], w_c [N];
  int    rs_owner [NUM_RS];
  int    cyc;
  // expected D, S, X, W
  int    exp_tab [N][4] = '{'{1, 2, 3, 4}, '{2, 4, 5, 8}, '{3, 8, 9, 10}, '{4, 5, 6, 7},
                            '{5, 7, 8, 9}, '{6, 9, 10, 13}, '{10, 13, 14, 15}};

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called on a falling edge, where inputs change; an instruction is taken on
  // the rising edge at which insn_ready is high. Returns on a falling edge.
  task automatic send(input insn_t i);
    insn_valid = 1'b1;
    insn       = i;
    #1;
    while (!insn_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    insn_valid = 1'b0;
  endtask

  task automatic drain();
    do @(negedge clk); while (rs_busy != '0);
  endtask

  // record activity per cycle
  int k_disp;
  bit counting = 1'b0;
  always @(posedge clk) begin
    if (counting) begin
      for (int r = 0; r < NUM_RS; r++) begin
        if (rs_owner[r] >= 0) begin
          if (s_mask[r]) s_c[rs_owner[r]] = cyc;
          if (x_mask[r] && x_c[rs_owner[r]] == 0) x_c[rs_owner[r]] = cyc;
          if (w_mask[r]) begin
            w_c[rs_owner[r]] = cyc;
            rs_owner[r] = -1;
          end
        end
      end
      if (insn_valid && insn_ready && k_disp < N) begin
        d_c[k_disp] = cyc;
        rs_owner[disp_tag - 1] = k_disp;
        k_disp++;
      end
      cyc++;
    end
  end

  initial begin
    word_t a, b;
    insn_valid = 0; insn = '0; dbg_reg = '0;
    host_we = 0; host_addr = '0; host_wdata = '0;
    cyc = 0; k_disp = 0;
    for (int r = 0; r < NUM_RS; r++) rs_owner[r] = -1;
    for (int n = 0; n < N; n++) begin d_c[n] = 0; s_c[n] = 0; x_c[n] = 0; w_c[n] = 0; end
    a = 32'h3FC0_0000; b = 32'h4020_0000;   // 1.5 and 2.5
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // preload memory: X(r1) with r1 = 16 and 20
    @(posedge clk);
    @(negedge clk);
    host_we = 1; host_addr = X + 16; host_wdata = a;
    @(negedge clk);
    host_addr = X + 20; host_wdata = b;
    @(negedge clk);
    host_we = 0;
    @(negedge clk);
    // f0 = 3.0, r1 = 16
    send(mk(OP_ADDI, 0, 0, 0, 1, 0, 32'h4040_0000));
    send(mk(OP_ADDI, 3, 3, 0, 1, 0, 16));
    drain();

    prog[0] = mk(OP_LD,   1, 0, 3, 0, 1, X);   // ldf X(r1),f1
    prog[1] = mk(OP_MUL,  2, 0, 1, 1, 1, 0);   // mulf f0,f1,f2
    prog[2] = mk(OP_ST,   0, 2, 3, 1, 1, Z);   // stf f2,Z(r1)
    prog[3] = mk(OP_ADDI, 3, 3, 0, 1, 0, 4);   // addi r1,4,r1
    prog[4] = prog[0];
    prog[5] = prog[1];
    prog[6] = prog[2];

    // cycle 1 is the first cycle the first instruction is presented
    counting = 1'b1;
    cyc = 1;
    for (int n = 0; n < N; n++) send(prog[n]);
    drain();

    for (int n = 0; n < N; n++) begin
      check(d_c[n] == exp_tab[n][0], $sformatf("insn %0d D c%0d, expected c%0d", n + 1, d_c[n], exp_tab[n][0]));
      check(s_c[n] == exp_tab[n][1], $sformatf("insn %0d S c%0d, expected c%0d", n + 1, s_c[n], exp_tab[n][1]));
      check(x_c[n] == exp_tab[n][2], $sformatf("insn %0d X c%0d, expected c%0d", n + 1, x_c[n], exp_tab[n][2]));
      check(w_c[n] == exp_tab[n][3], $sformatf("insn %0d W c%0d, expected c%0d", n + 1, w_c[n], exp_tab[n][3]));
    end

    // final values
    begin
      word_t exp_reg [4];
      exp_reg = '{32'h4040_0000, b, 32'h40F0_0000, 20};   // 3.0, 2.5, 7.5
      for (int r = 0; r < 4; r++) begin
        dbg_reg = reg_idx_t'(r);
        #1;
        check(dbg_reg_val == exp_reg[r], $sformatf("reg %0d = %h, expected %h", r, dbg_reg_val, exp_reg[r]));
        check(dbg_reg_tag == '0, $sformatf("map table entry %0d not cleared", r));
      end
    end
    host_addr = Z + 16; #1;
    check(host_rdata == 32'h4090_0000, $sformatf("MEM[Z+16] = %h", host_rdata));
    host_addr = Z + 20; #1;
    check(host_rdata == 32'h40F0_0000, $sformatf("MEM[Z+20] = %h", host_rdata));

    // The lecture's two timing-free examples, checked for values only:
    //   #1: r0=r1*r2; r1=r2*r3; r2=r4+1; r1=r1+r1
    //   #2: r0=r1*r2; r1=r0*r3; r0=r4+1; r1=r1+r0
    begin
      word_t m [5], e1 [5], e2 [5];
      send(mk(OP_ADDI, 3, 4, 0, 1, 0, 32'h3F40_0000));   // r3 = 0.75 (r4 is 0)
      send(mk(OP_ADDI, 4, 4, 0, 1, 0, 32'h3FA0_0000));   // r4 = 1.25
      drain();
      for (int r = 0; r < 5; r++) begin
        dbg_reg = reg_idx_t'(r);
        #1 m[r] = dbg_reg_val;
      end
      e1 = m;
      e1[0] = fmul_ref(e1[1], e1[2]); e1[1] = fmul_ref(e1[2], e1[3]); e1[2] = e1[4] + 1; e1[1] = e1[1] + e1[1];
      send(mk(OP_MUL,  0, 1, 2, 1, 1, 0));
      send(mk(OP_MUL,  1, 2, 3, 1, 1, 0));
      send(mk(OP_ADDI, 2, 4, 0, 1, 0, 1));
      send(mk(OP_ADD,  1, 1, 1, 1, 1, 0));
      drain();
      for (int r = 0; r < 5; r++) begin
        dbg_reg = reg_idx_t'(r);
        #1 check(dbg_reg_val == e1[r], $sformatf("example #1: r%0d = %h, expected %h", r, dbg_reg_val, e1[r]));
      end
      e2 = e1;
      e2[0] = fmul_ref(e2[1], e2[2]); e2[1] = fmul_ref(e2[0], e2[3]); e2[0] = e2[4] + 1; e2[1] = e2[1] + e2[0];
      send(mk(OP_MUL,  0, 1, 2, 1, 1, 0));
      send(mk(OP_MUL,  1, 0, 3, 1, 1, 0));
      send(mk(OP_ADDI, 0, 4, 0, 1, 0, 1));
      send(mk(OP_ADD,  1, 1, 0, 1, 1, 0));
      drain();
      for (int r = 0; r < 5; r++) begin
        dbg_reg = reg_idx_t'(r);
        #1 check(dbg_reg_val == e2[r], $sformatf("example #2: r%0d = %h, expected %h", r, dbg_reg_val, e2[r]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
