// Shared types and constants of the Simple Tomasulo core.
//
// The core has five reservation stations (RS), each tied to one kind of
// functional unit: RS#1 ALU, RS#2 load, RS#3 store, RS#4 and RS#5 FP. A tag
// names the RS that will produce a value; tag 0 means "the value is ready"
// (in the register file, or already copied into the RS). That numbering and
// the 1+1+1+2 split follow the lecture's example machine. The 32-bit data
// width, the 8-entry register file and the opcode encoding are this design's
// own choices.
package tomasulo_pkg;

  localparam int unsigned XLEN     = 32;            // data word width
  localparam int unsigned NUM_REGS = 8;             // architected registers
  localparam int unsigned REG_W    = $clog2(NUM_REGS);
  localparam int unsigned NUM_RS   = 5;             // reservation stations
  localparam int unsigned TAG_W    = $clog2(NUM_RS + 1); // 0 = ready, 1..5 = RS#

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [REG_W-1:0] reg_idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  // Functional-unit kinds, one per RS group.
  typedef enum logic [1:0] {
    FU_ALU = 2'd0,
    FU_LD  = 2'd1,
    FU_ST  = 2'd2,
    FU_FP  = 2'd3
  } fu_e;

  // Operations. Operand slots follow the lecture's RS tables:
  //   ADD/SUB/MUL : R = V1 op V2 (MUL: IEEE-754 single precision, the
  //                 lecture's mulf; ADD/SUB: 32-bit integer)
  //   ADDI        : R = V1 + imm
  //   LD  (ldf)   : R = MEM[V2 + imm]
  //   ST  (stf)   : MEM[V2 + imm] = V1, no destination
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_ADDI = 3'd2,
    OP_MUL  = 3'd3,
    OP_LD   = 3'd4,
    OP_ST   = 3'd5
  } op_e;

  // Decoded instruction presented to dispatch.
  typedef struct packed {
    op_e      op;
    reg_idx_t rd;    // destination register (ignored for ST)
    reg_idx_t rs1;   // source for slot 1 (V1)
    reg_idx_t rs2;   // source for slot 2 (V2)
    logic     use1;  // slot 1 is read
    logic     use2;  // slot 2 is read
    word_t    imm;
  } insn_t;

  // Common data bus: <tag, value> of a completed instruction.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
  } cdb_t;

  // One RS as the issue/execute logic sees it.
  typedef struct packed {
    logic     busy;
    op_e      op;
    reg_idx_t r;
    tag_t     t1;
    tag_t     t2;
    word_t    v1;
    word_t    v2;
    word_t    imm;
  } rs_t;

  // Operation handed from an issued RS to its functional unit (X stage).
  typedef struct packed {
    logic  valid;
    op_e   op;
    tag_t  tag;   // RS# of the issuing station, travels with the result
    word_t a;     // V1
    word_t b;     // V2
    word_t imm;
  } fu_req_t;

  // RS number (1-based tag) -> FU kind: RS#1 ALU, #2 LD, #3 ST, #4/#5 FP.
  function automatic fu_e rs_fu(input int unsigned idx);  // idx is 0-based
    case (idx)
      0:       return FU_ALU;
      1:       return FU_LD;
      2:       return FU_ST;
      default: return FU_FP;
    endcase
  endfunction

  function automatic fu_e op_fu(input op_e op);
    case (op)
      OP_MUL:  return FU_FP;
      OP_LD:   return FU_LD;
      OP_ST:   return FU_ST;
      default: return FU_ALU;
    endcase
  endfunction

  function automatic logic op_writes_reg(input op_e op);
    return op != OP_ST;
  endfunction

endpackage
