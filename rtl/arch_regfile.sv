// Architected register file (ARF) of the Simple Tomasulo core.
//
// Holds the master copy of each register whose map-table tag is 0. Two
// combinational read ports serve dispatch; one write port is driven by
// writeback when the map table says the rename still matches. The lecture
// gives only this role; the size (8 x 32 bits) and reset to zero are this
// design's choices. A read in the cycle of a write returns the old value;
// dispatch takes a value broadcast that cycle from the CDB instead.
module arch_regfile
  import tomasulo_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t rd_idx1,
  input  reg_idx_t rd_idx2,
  output word_t    rd_val1,
  output word_t    rd_val2,
  input  logic     wr_en,
  input  reg_idx_t wr_idx,
  input  word_t    wr_val
);

  word_t regs [NUM_REGS];

  assign rd_val1 = regs[rd_idx1];
  assign rd_val2 = regs[rd_idx2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_idx] <= wr_val;
    end
  end

endmodule
