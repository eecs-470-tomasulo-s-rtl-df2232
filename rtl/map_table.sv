// Map table (register alias table) of the Simple Tomasulo core.
//
// One tag per architected register: 0 means the register file holds the
// current value, otherwise the tag is the RS# that will produce it. Dispatch
// reads the tags of two sources and renames the destination to the RS it
// allocates. On writeback the CDB tag is compared with the destination
// register's entry: only if the rename still matches is the mapping cleared
// and the register file written ("match" output); a younger rename of the same
// register keeps the entry. Those rules follow the lecture.
//
// Timing: reads are combinational and return the state before this cycle's
// updates. Both updates land at the end of the cycle; a dispatch rename of the
// same register in the same cycle takes priority over the clear.
module map_table
  import tomasulo_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // dispatch read ports
  input  reg_idx_t rd_idx1,
  input  reg_idx_t rd_idx2,
  output tag_t     rd_tag1,
  output tag_t     rd_tag2,
  // dispatch rename
  input  logic     ren_en,
  input  reg_idx_t ren_reg,
  input  tag_t     ren_tag,
  // writeback: register written by the instruction on the CDB
  input  logic     wb_en,
  input  reg_idx_t wb_reg,
  input  tag_t     wb_tag,
  output logic     wb_match
);

  tag_t tags [NUM_REGS];

  assign rd_tag1  = tags[rd_idx1];
  assign rd_tag2  = tags[rd_idx2];
  assign wb_match = wb_en && (wb_tag != '0) && (tags[wb_reg] == wb_tag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) tags[i] <= '0;
    end else begin
      if (wb_match && !(ren_en && ren_reg == wb_reg)) tags[wb_reg] <= '0;
      if (ren_en) tags[ren_reg] <= ren_tag;
    end
  end

endmodule
