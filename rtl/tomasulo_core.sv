// Simple Tomasulo core: dynamic scheduling with value-copy register renaming.
//
// Instructions arrive in program order and pass through D, S, X and W:
//   D (dispatch)  If a reservation station (RS) of the right kind is free,
//                 allocate it; otherwise stall (insn_ready low), which holds
//                 back every younger instruction. Each source either reads
//                 its value (map-table tag 0: from the register file; tag
//                 broadcast on the CDB this cycle: from the CDB) or copies
//                 the tag. The destination register is renamed to the RS#.
//   S (issue)     An RS whose operands are all present wakes up; per unit
//                 the select logic picks one, oldest first. Waiting does
//                 not hold anything else back. An RS woken by this cycle's
//                 CDB broadcast may issue in that same cycle.
//   X (execute)   The unit reads V1/V2 from the issuing RS. ALU, load and
//                 store take one cycle, the FP unit three (pipelined).
//   W (writeback) The result wins the single CDB, which broadcasts
//                 <RS#, value>: waiting RS copy it, and if the map table still
//                 maps the destination to this RS# the mapping is cleared and
//                 the register file written. The RS is freed, and may be
//                 re-allocated by D in the same cycle. A store has no
//                 destination: its W frees the RS without using the CDB.
// There is no bypassing: a dependent instruction's X starts the cycle after
// the producer's W.
//
// The machine follows the lecture's example: five RS (RS#1 ALU, #2 load,
// #3 store, #4/#5 FP), one CDB, tags 0 = ready / 1..5 = RS#. Widths, the
// instruction encoding, the CDB priority, the FP unit doing a
// single-precision multiply, and the data memory's size are this design's
// choices.
//
// Debug outputs give, per RS, the cycles in which it issues (S), starts
// execution (X) and writes back (W), so a testbench can rebuild the
// lecture's instruction-status table.
module tomasulo_core
  import tomasulo_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction stream (in program order)
  input  logic              insn_valid,
  input  insn_t             insn,
  output logic              insn_ready,
  output tag_t              disp_tag,     // RS# allocated when valid && ready
  // common data bus, as broadcast this cycle
  output cdb_t              cdb,
  // per-RS activity this cycle (bit i = RS#i+1)
  output logic [NUM_RS-1:0] s_mask,
  output logic [NUM_RS-1:0] x_mask,
  output logic [NUM_RS-1:0] w_mask,
  output logic [NUM_RS-1:0] rs_busy,
  output logic [NUM_RS-1:0] rs_waiting,   // busy and not yet issued
  // architected state, for inspection
  input  reg_idx_t          dbg_reg,
  output word_t             dbg_reg_val,
  output tag_t              dbg_reg_tag,
  // host access to the data memory
  input  logic              host_we,
  input  word_t             host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata
);

  localparam int unsigned RS_IW = $clog2(NUM_RS);

  // ---------------------------------------------------------------- RS array
  rs_t               rs      [NUM_RS];
  logic [NUM_RS-1:0] rs_ready, rs_issued;
  logic [NUM_RS-1:0] rs_alloc, rs_issue, rs_free;
  rs_t               alloc_data;

  for (genvar i = 0; i < NUM_RS; i++) begin : g_rs
    rs_entry u_rs (
      .clk, .rst_n,
      .alloc      (rs_alloc[i]),
      .alloc_data (alloc_data),
      .cdb        (cdb),
      .issue      (rs_issue[i]),
      .free       (rs_free[i]),
      .entry      (rs[i]),
      .issued     (rs_issued[i]),
      .ready      (rs_ready[i])
    );
    assign rs_busy[i]    = rs[i].busy;
    assign rs_waiting[i] = rs[i].busy && !rs_issued[i];
  end

  // ------------------------------------------------- map table and regfile
  tag_t     mt_tag1, mt_tag2;
  word_t    rf_val1, rf_val2;
  logic     wb_match;
  reg_idx_t wb_reg;
  logic     dispatch;
  tag_t     alloc_tag;

  // The RS still holds R during its W, so the CDB need not carry it.
  assign wb_reg = rs[RS_IW'(cdb.tag - 1'b1)].r;

  map_table u_mt (
    .clk, .rst_n,
    .rd_idx1 (insn.rs1),
    .rd_idx2 (insn.rs2),
    .rd_tag1 (mt_tag1),
    .rd_tag2 (mt_tag2),
    .ren_en  (dispatch && op_writes_reg(insn.op)),
    .ren_reg (insn.rd),
    .ren_tag (alloc_tag),
    .wb_en   (cdb.valid),
    .wb_reg  (wb_reg),
    .wb_tag  (cdb.tag),
    .wb_match(wb_match)
  );

  arch_regfile u_rf (
    .clk, .rst_n,
    .rd_idx1 (insn.rs1),
    .rd_idx2 (insn.rs2),
    .rd_val1 (rf_val1),
    .rd_val2 (rf_val2),
    .wr_en   (wb_match),
    .wr_idx  (wb_reg),
    .wr_val  (cdb.value)
  );

  // inspection port: a second look at the same state
  assign dbg_reg_val = u_rf.regs[dbg_reg];
  assign dbg_reg_tag = u_mt.tags[dbg_reg];

  // --------------------------------------------------------------- dispatch
  logic [NUM_RS-1:0] cand;
  logic              cand_any;
  fu_e               insn_fu;

  assign insn_fu = op_fu(insn.op);

  always_comb begin
    for (int i = 0; i < NUM_RS; i++)
      cand[i] = (!rs[i].busy || rs_free[i]) && (rs_fu(i) == insn_fu);
  end

  logic [NUM_RS-1:0] rs_alloc_pick;
  select_logic #(.W(NUM_RS)) u_alloc_sel (.req(cand), .grant(rs_alloc_pick), .any(cand_any));

  assign insn_ready = cand_any;
  assign dispatch   = insn_valid && cand_any;
  assign rs_alloc   = dispatch ? rs_alloc_pick : '0;

  always_comb begin
    alloc_tag = '0;
    for (int i = 0; i < NUM_RS; i++)
      if (rs_alloc_pick[i]) alloc_tag = tag_t'(i + 1);
  end
  assign disp_tag = alloc_tag;

  // Resolve one source: value from the regfile, from this cycle's CDB, or tag.
  function automatic void resolve(input logic use_it, input tag_t mt, input word_t rf,
                                  input cdb_t bus, output tag_t t, output word_t v);
    t = '0;
    v = '0;
    if (use_it) begin
      if (mt == '0)                        v = rf;
      else if (bus.valid && bus.tag == mt) v = bus.value;
      else                                 t = mt;
    end
  endfunction

  always_comb begin
    alloc_data      = '0;
    alloc_data.busy = 1'b1;
    alloc_data.op   = insn.op;
    alloc_data.r    = insn.rd;
    alloc_data.imm  = insn.imm;
    resolve(insn.use1, mt_tag1, rf_val1, cdb, alloc_data.t1, alloc_data.v1);
    resolve(insn.use2, mt_tag2, rf_val2, cdb, alloc_data.t2, alloc_data.v2);
  end

  // ------------------------------------------------------------ issue (S)
  // One issue register per unit holds the RS picked in S for X next cycle.
  localparam int unsigned NFU = 4;
  logic [NFU-1:0]    iss_valid;
  logic [RS_IW-1:0]  iss_idx   [NFU];
  logic [NFU-1:0]    fu_in_ready;
  logic [NUM_RS-1:0] sel_req   [NFU];
  logic [NUM_RS-1:0] sel_grant [NFU];
  logic [NFU-1:0]    sel_any;
  logic [NFU-1:0]    can_sel;

  for (genvar f = 0; f < NFU; f++) begin : g_sel
    assign can_sel[f] = !iss_valid[f] || fu_in_ready[f];
    always_comb begin
      for (int i = 0; i < NUM_RS; i++)
        sel_req[f][i] = rs_ready[i] && (rs_fu(i) == fu_e'(f)) && can_sel[f];
    end
  end

  age_select #(.W(NUM_RS), .G(NFU)) u_issue_sel (
    .clk, .rst_n,
    .alloc (rs_alloc),
    .req   (sel_req),
    .grant (sel_grant),
    .any   (sel_any)
  );

  always_comb begin
    rs_issue = '0;
    for (int f = 0; f < NFU; f++) rs_issue |= sel_grant[f];
  end
  assign s_mask = rs_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid <= '0;
      for (int f = 0; f < NFU; f++) iss_idx[f] <= '0;
    end else begin
      for (int f = 0; f < NFU; f++) begin
        if (can_sel[f]) begin
          iss_valid[f] <= sel_any[f];
          for (int i = 0; i < NUM_RS; i++)
            if (sel_grant[f][i]) iss_idx[f] <= RS_IW'(i);
        end
      end
    end
  end

  // ---------------------------------------------------------- execute (X)
  fu_req_t fu_req [NFU];

  always_comb begin
    x_mask = '0;
    for (int f = 0; f < NFU; f++) begin
      fu_req[f].valid = iss_valid[f];
      fu_req[f].op    = rs[iss_idx[f]].op;
      fu_req[f].tag   = tag_t'(iss_idx[f]) + tag_t'(1);
      fu_req[f].a     = rs[iss_idx[f]].v1;
      fu_req[f].b     = rs[iss_idx[f]].v2;
      fu_req[f].imm   = rs[iss_idx[f]].imm;
      if (iss_valid[f] && fu_in_ready[f]) x_mask[iss_idx[f]] = 1'b1;
    end
  end

  cdb_t alu_out, ld_out, fp_out;
  logic alu_ack, ld_ack, fp_ack;
  logic st_done;
  tag_t st_done_tag;

  alu_unit u_alu (
    .clk, .rst_n,
    .req      (fu_req[FU_ALU]),
    .in_ready (fu_in_ready[FU_ALU]),
    .out      (alu_out),
    .out_ack  (alu_ack)
  );

  fp_unit u_fp (
    .clk, .rst_n,
    .req      (fu_req[FU_FP]),
    .in_ready (fu_in_ready[FU_FP]),
    .out      (fp_out),
    .out_ack  (fp_ack)
  );

  mem_unit #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n,
    .ld_req      (fu_req[FU_LD]),
    .ld_in_ready (fu_in_ready[FU_LD]),
    .ld_out      (ld_out),
    .ld_out_ack  (ld_ack),
    .st_req      (fu_req[FU_ST]),
    .st_done     (st_done),
    .st_done_tag (st_done_tag),
    .host_we, .host_addr, .host_wdata, .host_rdata
  );
  assign fu_in_ready[FU_ST] = 1'b1;

  // -------------------------------------------------------- writeback (W)
  cdb_t       cdb_req [3];
  logic [2:0] cdb_grant;

  assign cdb_req[0] = fp_out;
  assign cdb_req[1] = ld_out;
  assign cdb_req[2] = alu_out;

  cdb_arbiter #(.N(3)) u_cdb (.req(cdb_req), .grant(cdb_grant), .cdb(cdb));

  assign fp_ack  = cdb_grant[0];
  assign ld_ack  = cdb_grant[1];
  assign alu_ack = cdb_grant[2];

  always_comb begin
    rs_free = '0;
    if (cdb.valid) rs_free[RS_IW'(cdb.tag - 1'b1)] = 1'b1;
    if (st_done)   rs_free[RS_IW'(st_done_tag - 1'b1)] = 1'b1;
  end
  assign w_mask = rs_free;

  // ------------------------------------------------------------ assertions
  a_alloc_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rs_alloc));
  a_alloc_free:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (rs_alloc & rs_busy & ~rs_free) == '0);
  a_cdb_tag:      assert property (@(posedge clk) disable iff (!rst_n)
                                   cdb.valid |-> (cdb.tag != '0 && rs[RS_IW'(cdb.tag - 1'b1)].busy));

endmodule
