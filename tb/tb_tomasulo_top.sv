// End-to-end testbench for tomasulo_top, with every parameter at its default.
//
// Part 1 drives the physical-register renamer with the lecture's renaming
// example (add r2,r3,r1 / sub r2,r1,r3 / mul r2,r3,r3 / div r1,4,r1) and
// checks the renamed registers, the shrinking free list and the stall once
// it is empty.
//
// Part 2 runs random programs through the Tomasulo core and compares the
// architected registers and the stored memory words with an in-order
// reference model after each program drains. MUL is the FP unit's
// single-precision multiply; the model computes it with real arithmetic.
// Loads read only words 0..31 and stores write only words 32..63, both
// addressed off r7, which is never written; the core does not order memory,
// so programs keep memory dependences out of its way, as the lecture
// assumes. The testbench also
// counts the mechanisms the design names and fails if one never happened:
// dispatch stall on a full RS group, an RS taken by D in the cycle its W
// frees it, a source caught from the CDB at dispatch, an issue in the cycle
// of the CDB broadcast it waited for, a CDB conflict (a result waiting for
// the bus), a writeback whose map-table entry was already renamed again, two
// FP operations in flight at once, out-of-order issue, and two FP stations
// ready together, where the older one must be selected.
module tb_tomasulo_top;
  import tomasulo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // core side
  logic              tc_insn_valid;
  insn_t             tc_insn;
  logic              tc_insn_ready;
  tag_t              tc_disp_tag;
  cdb_t              tc_cdb;
  logic [NUM_RS-1:0] tc_s_mask, tc_x_mask, tc_w_mask, tc_rs_busy, tc_rs_waiting;
  reg_idx_t          tc_dbg_reg;
  word_t             tc_dbg_reg_val;
  tag_t              tc_dbg_reg_tag;
  logic              tc_host_we;
  word_t             tc_host_addr, tc_host_wdata, tc_host_rdata;
  // renamer side (defaults: 3 architected, 7 physical registers)
  logic       pr_in_valid, pr_has_dst, pr_in_ready;
  logic [1:0] pr_src1, pr_src2, pr_dst;
  logic [2:0] pr_psrc1, pr_psrc2, pr_pdst, pr_free_count;

  tomasulo_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- renamer
  task automatic rename(input int s1, input int s2, input int d, input int e1, input int e2,
                        input int ed, input int efree);
    pr_in_valid = 1'b1; pr_src1 = 2'(s1); pr_src2 = 2'(s2); pr_dst = 2'(d); pr_has_dst = 1'b1;
    #1;
    check(pr_in_ready, "renamer not ready");
    check(pr_psrc1 == 3'(e1), $sformatf("psrc1 p%0d, expected p%0d", pr_psrc1, e1));
    check(pr_psrc2 == 3'(e2), $sformatf("psrc2 p%0d, expected p%0d", pr_psrc2, e2));
    check(pr_pdst == 3'(ed), $sformatf("pdst p%0d, expected p%0d", pr_pdst, ed));
    check(pr_free_count == 3'(efree), $sformatf("free count %0d, expected %0d", pr_free_count, efree));
    @(negedge clk);
    pr_in_valid = 1'b0;
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

  // ------------------------------------------------------ reference model
  word_t ref_reg [NUM_REGS];
  word_t ref_mem [64];

  function automatic void ref_exec(insn_t i);
    word_t a, b;
    a = ref_reg[i.rs1];
    b = ref_reg[i.rs2];
    case (i.op)
      OP_ADD:  ref_reg[i.rd] = a + b;
      OP_SUB:  ref_reg[i.rd] = a - b;
      OP_ADDI: ref_reg[i.rd] = a + i.imm;
      OP_MUL:  ref_reg[i.rd] = fmul_ref(a, b);
      OP_LD:   ref_reg[i.rd] = ref_mem[(b + i.imm) >> 2];
      OP_ST:   ref_mem[(b + i.imm) >> 2] = a;
      default: ;
    endcase
  endfunction

  function automatic insn_t rand_insn();
    insn_t i;
    int    k;
    i     = '0;
    i.rd  = reg_idx_t'($urandom_range(0, 6));
    i.rs1 = reg_idx_t'($urandom_range(0, 6));
    i.rs2 = reg_idx_t'($urandom_range(0, 6));
    i.use1 = 1'b1;
    i.use2 = 1'b1;
    k = $urandom_range(0, 99);
    if (k < 20)      i.op = OP_ADD;
    else if (k < 30) i.op = OP_SUB;
    else if (k < 45) begin i.op = OP_ADDI; i.use2 = 1'b0; i.imm = word_t'($urandom_range(0, 1000)); end
    else if (k < 70) i.op = OP_MUL;
    else if (k < 85) begin
      i.op = OP_LD; i.use1 = 1'b0; i.rs2 = 3'd7; i.imm = word_t'($urandom_range(0, 31)) << 2;
    end else begin
      i.op = OP_ST; i.rs2 = 3'd7; i.imm = word_t'($urandom_range(32, 63)) << 2;
    end
    return i;
  endfunction

  // ----------------------------------------------------- mechanism counters
  int n_stall, n_wd_same, n_disp_cdb, n_ws_same, n_cdb_conflict, n_stale_wb, n_fp_overlap, n_ooo, n_oldest;
  longint seq_ctr;
  longint rs_seq [NUM_RS];

  always @(posedge clk) begin
    if (rst_n) begin
      int fp_inflight;
      if (tc_insn_valid && !tc_insn_ready) n_stall++;
      if (tc_insn_valid && tc_insn_ready) begin
        if (tc_w_mask[tc_disp_tag - 1]) n_wd_same++;
        if (tc_cdb.valid && ((tc_insn.use1 && dut.u_core.mt_tag1 == tc_cdb.tag) ||
                             (tc_insn.use2 && dut.u_core.mt_tag2 == tc_cdb.tag))) n_disp_cdb++;
      end
      for (int r = 0; r < NUM_RS; r++) begin
        if (tc_s_mask[r]) begin
          if (tc_cdb.valid && (dut.u_core.rs[r].t1 == tc_cdb.tag || dut.u_core.rs[r].t2 == tc_cdb.tag))
            n_ws_same++;
          for (int q = 0; q < NUM_RS; q++)
            if (q != r && tc_rs_waiting[q] && rs_seq[q] < rs_seq[r]) begin
              n_ooo++;
              break;
            end
        end
      end
      // both FP stations ready and the FP unit free: the older must issue
      if (dut.u_core.rs_ready[3] && dut.u_core.rs_ready[4] && dut.u_core.can_sel[FU_FP]) begin
        int older;
        older = (rs_seq[3] < rs_seq[4]) ? 3 : 4;
        n_oldest++;
        check(tc_s_mask[older] && !tc_s_mask[7 - older], "FP select is not oldest first");
      end
      if ((int'(dut.u_core.fp_out.valid) + int'(dut.u_core.ld_out.valid) + int'(dut.u_core.alu_out.valid)) > 1)
        n_cdb_conflict++;
      if (tc_cdb.valid && !dut.u_core.wb_match) n_stale_wb++;
      fp_inflight = int'(dut.u_core.u_fp.s1_valid) + int'(dut.u_core.u_fp.s2_valid) + int'(dut.u_core.u_fp.out.valid);
      if (fp_inflight > 1) n_fp_overlap++;
      if (tc_insn_valid && tc_insn_ready) rs_seq[tc_disp_tag - 1] = seq_ctr++;
    end
  end

  task automatic send(input insn_t i);
    tc_insn_valid = 1'b1;
    tc_insn       = i;
    #1;
    while (!tc_insn_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    tc_insn_valid = 1'b0;
  endtask

  task automatic drain_and_compare(input int prog);
    int guard = 0;
    while (tc_rs_busy != '0 && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(tc_rs_busy == '0, $sformatf("program %0d did not drain", prog));
    for (int r = 0; r < NUM_REGS; r++) begin
      tc_dbg_reg = reg_idx_t'(r);
      #1;
      check(tc_dbg_reg_val == ref_reg[r],
            $sformatf("program %0d: r%0d = %0h, expected %0h", prog, r, tc_dbg_reg_val, ref_reg[r]));
      check(tc_dbg_reg_tag == '0, $sformatf("program %0d: map entry r%0d not cleared", prog, r));
    end
    for (int w = 32; w < 64; w++) begin
      tc_host_addr = word_t'(w) << 2;
      #1;
      check(tc_host_rdata == ref_mem[w],
            $sformatf("program %0d: MEM[%0d] = %0h, expected %0h", prog, w, tc_host_rdata, ref_mem[w]));
    end
  endtask

  initial begin
    localparam int NPROG = 40, NINSN = 60;
    tc_insn_valid = 0; tc_insn = '0; tc_dbg_reg = '0;
    tc_host_we = 0; tc_host_addr = '0; tc_host_wdata = '0;
    pr_in_valid = 0; pr_src1 = '0; pr_src2 = '0; pr_dst = '0; pr_has_dst = 0;
    {n_stall, n_wd_same, n_disp_cdb, n_ws_same, n_cdb_conflict, n_stale_wb, n_fp_overlap, n_ooo, n_oldest} = '0;
    seq_ctr = 0;
    for (int r = 0; r < NUM_RS; r++) rs_seq[r] = 0;
    for (int r = 0; r < NUM_REGS; r++) ref_reg[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Part 1: the lecture's renaming example. Operand order there is
    // "op src1, src2, dst"; div's second source is an immediate.
    rename(2, 3, 1, 2, 3, 4, 4);   // add r2,r3,r1 -> add p2,p3,p4
    rename(2, 1, 3, 2, 4, 5, 3);   // sub r2,r1,r3 -> sub p2,p4,p5
    rename(2, 3, 3, 2, 5, 6, 2);   // mul r2,r3,r3 -> mul p2,p5,p6
    rename(1, 1, 1, 4, 4, 7, 1);   // div r1,4,r1  -> div p4,4,p7
    pr_in_valid = 1'b1; pr_has_dst = 1'b1; #1;
    check(!pr_in_ready, "renamer should stall with an empty free list");
    check(pr_free_count == 0, "free list should be empty");
    pr_has_dst = 1'b0; #1;
    check(pr_in_ready, "an instruction without destination needs no free register");
    @(negedge clk);
    pr_in_valid = 1'b0;

    // Part 2: random programs on the Tomasulo core.
    for (int w = 0; w < 64; w++) begin
      tc_host_we = 1'b1;
      tc_host_addr = word_t'(w) << 2;
      // mostly single-precision numbers of moderate size, so that products
      // stay in the normal range; every eighth word is any bit pattern
      tc_host_wdata = $urandom;
      if (w % 8 != 7) tc_host_wdata[30:23] = 8'($urandom_range(112, 142));
      ref_mem[w] = tc_host_wdata;
      @(negedge clk);
    end
    tc_host_we = 1'b0;
    for (int p = 0; p < NPROG; p++) begin
      for (int n = 0; n < NINSN; n++) begin
        insn_t i;
        i = rand_insn();
        ref_exec(i);
        if (p % 2 == 1) repeat ($urandom_range(0, 2)) @(negedge clk);
        send(i);
      end
      drain_and_compare(p);
    end

    $display("mechanisms: stall=%0d wd_same=%0d disp_cdb=%0d ws_same=%0d cdb_conflict=%0d stale_wb=%0d fp_overlap=%0d ooo=%0d oldest=%0d",
             n_stall, n_wd_same, n_disp_cdb, n_ws_same, n_cdb_conflict, n_stale_wb, n_fp_overlap, n_ooo, n_oldest);
    check(n_oldest > 0,       "two FP stations never competed for issue");
    check(n_stall > 0,        "no dispatch stall seen");
    check(n_wd_same > 0,      "no RS re-allocated in the cycle of its writeback");
    check(n_disp_cdb > 0,     "no source caught from the CDB at dispatch");
    check(n_ws_same > 0,      "no issue in the cycle of the awaited broadcast");
    check(n_cdb_conflict > 0, "no CDB conflict seen");
    check(n_stale_wb > 0,     "no writeback to an already renamed register");
    check(n_fp_overlap > 0,   "FP pipeline never held two operations");
    check(n_ooo > 0,          "no out-of-order issue seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
