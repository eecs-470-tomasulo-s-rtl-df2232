// Top level: the Simple Tomasulo core and the physical-register renamer.
//
// The two are independent designs from the same lecture and stand side by
// side here, each with its own ports. tc_* ports belong to the Tomasulo core
// (instruction stream in, common data bus and per-station activity out, plus
// inspection of the register file and a host port on the data memory);
// pr_* ports belong to the map-table/free-list renamer. See tomasulo_core and
// phys_renamer for timing.
module tomasulo_top
  import tomasulo_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256,
  parameter int unsigned NUM_ARCH  = 3,
  parameter int unsigned NUM_PHYS  = 7,
  localparam int unsigned AW = $clog2(NUM_ARCH + 1),
  localparam int unsigned PW = $clog2(NUM_PHYS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- Tomasulo core
  input  logic              tc_insn_valid,
  input  insn_t             tc_insn,
  output logic              tc_insn_ready,
  output tag_t              tc_disp_tag,
  output cdb_t              tc_cdb,
  output logic [NUM_RS-1:0] tc_s_mask,
  output logic [NUM_RS-1:0] tc_x_mask,
  output logic [NUM_RS-1:0] tc_w_mask,
  output logic [NUM_RS-1:0] tc_rs_busy,
  output logic [NUM_RS-1:0] tc_rs_waiting,
  input  reg_idx_t          tc_dbg_reg,
  output word_t             tc_dbg_reg_val,
  output tag_t              tc_dbg_reg_tag,
  input  logic              tc_host_we,
  input  word_t             tc_host_addr,
  input  word_t             tc_host_wdata,
  output word_t             tc_host_rdata,
  // ---- physical-register renamer
  input  logic              pr_in_valid,
  input  logic [AW-1:0]     pr_src1,
  input  logic [AW-1:0]     pr_src2,
  input  logic [AW-1:0]     pr_dst,
  input  logic              pr_has_dst,
  output logic              pr_in_ready,
  output logic [PW-1:0]     pr_psrc1,
  output logic [PW-1:0]     pr_psrc2,
  output logic [PW-1:0]     pr_pdst,
  output logic [PW-1:0]     pr_free_count
);

  tomasulo_core #(.MEM_WORDS(MEM_WORDS)) u_core (
    .clk, .rst_n,
    .insn_valid  (tc_insn_valid),
    .insn        (tc_insn),
    .insn_ready  (tc_insn_ready),
    .disp_tag    (tc_disp_tag),
    .cdb         (tc_cdb),
    .s_mask      (tc_s_mask),
    .x_mask      (tc_x_mask),
    .w_mask      (tc_w_mask),
    .rs_busy     (tc_rs_busy),
    .rs_waiting  (tc_rs_waiting),
    .dbg_reg     (tc_dbg_reg),
    .dbg_reg_val (tc_dbg_reg_val),
    .dbg_reg_tag (tc_dbg_reg_tag),
    .host_we     (tc_host_we),
    .host_addr   (tc_host_addr),
    .host_wdata  (tc_host_wdata),
    .host_rdata  (tc_host_rdata)
  );

  phys_renamer #(.NUM_ARCH(NUM_ARCH), .NUM_PHYS(NUM_PHYS)) u_ren (
    .clk, .rst_n,
    .in_valid   (pr_in_valid),
    .src1       (pr_src1),
    .src2       (pr_src2),
    .dst        (pr_dst),
    .has_dst    (pr_has_dst),
    .in_ready   (pr_in_ready),
    .psrc1      (pr_psrc1),
    .psrc2      (pr_psrc2),
    .pdst       (pr_pdst),
    .free_count (pr_free_count)
  );

endmodule
