// One reservation station (RS) of the Simple Tomasulo core.
//
// An RS holds one dispatched instruction until its writeback: busy, op, the
// destination register R, two source tags T1/T2 and two source values V1/V2,
// plus an immediate. A source tag of 0 means the matching value is present.
// Every cycle the entry compares T1 and T2 against the tag on the common data
// bus (CDB); on a match it clears the tag and copies the CDB value. Those
// fields and the compare-and-copy follow the lecture's data-structure slides.
//
// Interface and timing:
//   alloc  - dispatch (D) writes the entry at the end of this cycle. The
//            dispatch logic has already resolved tags against the map table,
//            register file and the CDB of the same cycle.
//   issue  - select logic picked this entry (S); it is marked issued so it is
//            not picked again, but stays busy so the FU can read V1/V2 during X.
//   free   - writeback (W) of this entry's instruction; busy drops at the end
//            of the cycle. alloc in the same cycle wins, so a structurally
//            stalled instruction can dispatch in the cycle its RS frees.
//   ready  - wakeup: busy, not yet issued, and both operands are present or
//            arrive on the CDB this cycle, so an instruction can issue in the
//            same cycle as the writeback it waits for.
module rs_entry
  import tomasulo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  alloc,
  input  rs_t   alloc_data,
  input  cdb_t  cdb,
  input  logic  issue,
  input  logic  free,
  output rs_t   entry,
  output logic  issued,
  output logic  ready
);

  logic hit1, hit2;

  always_comb begin
    hit1  = cdb.valid && (entry.t1 != '0) && (entry.t1 == cdb.tag);
    hit2  = cdb.valid && (entry.t2 != '0) && (entry.t2 == cdb.tag);
    ready = entry.busy && !issued
            && ((entry.t1 == '0) || hit1)
            && ((entry.t2 == '0) || hit2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entry  <= '0;
      issued <= 1'b0;
    end else if (alloc) begin
      entry      <= alloc_data;
      entry.busy <= 1'b1;
      issued     <= 1'b0;
    end else if (free) begin
      entry.busy <= 1'b0;
      entry.t1   <= '0;
      entry.t2   <= '0;
      issued     <= 1'b0;
    end else begin
      if (issue) issued <= 1'b1;
      if (hit1) begin
        entry.t1 <= '0;
        entry.v1 <= cdb.value;
      end
      if (hit2) begin
        entry.t2 <= '0;
        entry.v2 <= cdb.value;
      end
    end
  end

  // Only a ready entry may be issued; a free entry may not be freed.
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n) issue |-> ready);
  a_free_busy:   assert property (@(posedge clk) disable iff (!rst_n) free |-> entry.busy);

endmodule
