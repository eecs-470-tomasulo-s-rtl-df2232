// Common data bus (CDB) arbiter.
//
// There is one CDB, so at most one finished instruction can write back per
// cycle; the others wait in their unit's result register (the structural
// hazard of the W stage). Requester 0 has the highest priority. The core
// connects the FP unit to port 0, then load, then ALU, so the longest-latency
// unit goes first; that order is this design's choice. Combinational: the
// granted request is on the bus in the same cycle.
module cdb_arbiter
  import tomasulo_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  cdb_t         req [N],
  output logic [N-1:0] grant,
  output cdb_t         cdb
);

  logic [N-1:0] valid;
  logic         any;

  always_comb begin
    for (int i = 0; i < N; i++) valid[i] = req[i].valid;
  end

  select_logic #(.W(N)) u_sel (.req(valid), .grant(grant), .any(any));

  always_comb begin
    cdb = '0;
    for (int i = 0; i < N; i++) begin
      if (grant[i]) cdb = req[i];
    end
    cdb.valid = any;
  end

endmodule
