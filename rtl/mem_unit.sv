// Load and store units of the Simple Tomasulo core, with their data memory.
//
// The lecture's example machine has one load RS and one store RS, each with
// a 1-cycle unit that includes the memory access. Load: during X the address
// V2 + imm reads the memory; the value sits in a result register and is
// broadcast on the common data bus in W when granted (out_ack). Store: during
// X it writes V1 to address V2 + imm; its W follows in the next cycle and
// has no destination, so it never uses the CDB. Memory ordering is not
// checked: like the lecture, the core assumes loads and stores arrive at the
// units with their memory dependences already respected.
//
// The memory is word addressed by addr[.. : 2] (byte addresses stepping by
// 4, as in the lecture's example) and has MEM_WORDS words; both are this
// design's choices. A host port lets the environment preload and inspect it;
// a host write in the same cycle as a store loses to the store.
module mem_unit
  import tomasulo_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  // load unit
  input  fu_req_t ld_req,
  output logic    ld_in_ready,
  output cdb_t    ld_out,
  input  logic    ld_out_ack,
  // store unit
  input  fu_req_t st_req,
  output logic    st_done,      // W of the store (frees its RS)
  output tag_t    st_done_tag,
  // host access to the data memory
  input  logic    host_we,
  input  word_t   host_addr,
  input  word_t   host_wdata,
  output word_t   host_rdata
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  word_t mem [MEM_WORDS];

  function automatic logic [AW-1:0] widx(input word_t byte_addr);
    return byte_addr[AW+1:2];
  endfunction

  word_t ld_addr, st_addr;
  assign ld_addr     = ld_req.b + ld_req.imm;
  assign st_addr     = st_req.b + st_req.imm;
  assign ld_in_ready = !ld_out.valid || ld_out_ack;
  assign host_rdata  = mem[widx(host_addr)];

  always_ff @(posedge clk) begin
    if (st_req.valid)  mem[widx(st_addr)]   <= st_req.a;
    else if (host_we)  mem[widx(host_addr)] <= host_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_out      <= '0;
      st_done     <= 1'b0;
      st_done_tag <= '0;
    end else begin
      if (ld_in_ready) begin
        ld_out.valid <= ld_req.valid;
        ld_out.tag   <= ld_req.tag;
        ld_out.value <= mem[widx(ld_addr)];
      end
      st_done     <= st_req.valid;
      st_done_tag <= st_req.tag;
    end
  end

endmodule
