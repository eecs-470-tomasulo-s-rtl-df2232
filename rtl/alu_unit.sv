// Integer ALU of the Simple Tomasulo core: ADD, SUB and ADDI in one cycle.
//
// The lecture's example machine has a 1-cycle integer unit fed by one RS. The
// operation is computed during X and lands in a result register; the next
// cycle is W, where the result waits for the common data bus (CDB). While the
// result has not been granted the CDB the unit accepts nothing new
// (in_ready low), which stalls the ALU's issue. Handshake: req.valid with
// in_ready takes an operation; out.valid with out_ack retires the result.
module alu_unit
  import tomasulo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fu_req_t req,
  output logic    in_ready,
  output cdb_t    out,
  input  logic    out_ack
);

  word_t result;

  always_comb begin
    case (req.op)
      OP_SUB:  result = req.a - req.b;
      OP_ADDI: result = req.a + req.imm;
      default: result = req.a + req.b;
    endcase
  end

  assign in_ready = !out.valid || out_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else if (in_ready) begin
      out.valid <= req.valid;
      out.tag   <= req.tag;
      out.value <= result;
    end
  end

endmodule
