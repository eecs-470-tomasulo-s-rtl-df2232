// Register renaming with a map table and a free list of physical registers.
//
// This is the renaming scheme of the lecture's "register renaming approach"
// example, separate from the Tomasulo core (which renames to RS# tags
// instead). Every time an architected register is written it is given the
// next physical register from the free list; sources are translated through
// the map table, so true (RAW) dependences are kept and WAR/WAW name
// dependences disappear. After reset r1..rN map to p1..pN and
// p(N+1)..pNUM_PHYS are free, in that order, as in the lecture's example
// (defaults: three architected and seven physical registers).
//
// Registers are numbered from 1, as in the lecture. The lecture does not say
// when a physical register returns to the free list, so this block has no
// release port: it renames until the list is empty and then stalls (in_ready
// low for an instruction with a destination) until reset.
//
// Timing: the translation is combinational; the map table and free list
// update at the clock edge when in_valid && in_ready. Sources are translated
// with the mapping from before the instruction's own destination rename.
module phys_renamer #(
  parameter int unsigned NUM_ARCH = 3,
  parameter int unsigned NUM_PHYS = 7,
  localparam int unsigned AW = $clog2(NUM_ARCH + 1),
  localparam int unsigned PW = $clog2(NUM_PHYS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] src1,
  input  logic [AW-1:0] src2,
  input  logic [AW-1:0] dst,
  input  logic          has_dst,
  output logic          in_ready,
  output logic [PW-1:0] psrc1,
  output logic [PW-1:0] psrc2,
  output logic [PW-1:0] pdst,
  output logic [PW-1:0] free_count
);

  localparam int unsigned NFREE = NUM_PHYS - NUM_ARCH;
  localparam int unsigned FW    = $clog2(NFREE + 1);
  localparam int unsigned IW    = (NFREE > 1) ? $clog2(NFREE) : 1;

  logic [PW-1:0] map   [NUM_ARCH + 1];   // entry 0 unused: registers start at 1
  logic [PW-1:0] flist [NFREE];          // free physical registers, in order

  logic [FW-1:0] head;                   // next free entry to hand out
  logic          fire;
  logic [IW-1:0] hidx;                   // head, sized to index the list

  assign free_count = PW'(NFREE - head);
  assign in_ready   = !has_dst || (head < FW'(NFREE));
  assign fire       = in_valid && in_ready;
  assign psrc1      = map[src1];
  assign psrc2      = map[src2];
  assign hidx       = (head < FW'(NFREE)) ? IW'(head) : '0;
  assign pdst       = has_dst ? flist[hidx] : '0;

  // Nothing is ever returned to the list, so its contents stay those of
  // reset: p(NUM_ARCH+1) .. p(NUM_PHYS). Only the head pointer moves.
  always_comb begin
    for (int f = 0; f < NFREE; f++) flist[f] = PW'(NUM_ARCH + 1 + f);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a <= NUM_ARCH; a++) map[a] <= PW'(a);
      head <= '0;
    end else if (fire && has_dst) begin
      map[dst] <= flist[hidx];
      head     <= head + 1'b1;
    end
  end

  a_src_range: assert property (@(posedge clk) disable iff (!rst_n)
                                fire |-> (src1 <= AW'(NUM_ARCH) && src2 <= AW'(NUM_ARCH)
                                          && dst <= AW'(NUM_ARCH)));

endmodule
