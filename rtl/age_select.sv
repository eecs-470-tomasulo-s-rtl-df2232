// Oldest-first issue select over W reservation stations, for G units.
//
// The lecture names "oldest first" as the safe issue policy. This block keeps
// an age matrix: older[i][j] is 1 when station i was allocated before
// station j. Allocating station k makes it younger than every other station
// (row k cleared, column k set). For each unit g, the grant goes to the
// requesting station that no other requester of the same unit is older than.
// Stations hold at most one instruction and are allocated one per cycle, so
// the busy stations are totally ordered and a non-empty request set always
// yields exactly one grant. The matrix form is this design's choice.
//
// Timing: grants are combinational from req and the matrix; alloc updates the
// matrix at the clock edge. Only busy stations may request.
module age_select #(
  parameter int unsigned W = 5,
  parameter int unsigned G = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] alloc,          // at most one bit set
  input  logic [W-1:0] req   [G],
  output logic [W-1:0] grant [G],
  output logic [G-1:0] any
);

  logic [W-1:0] older [W];   // older[i][j]: i allocated before j

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) older[i] <= '0;
    end else begin
      for (int k = 0; k < W; k++) begin
        if (alloc[k]) begin
          older[k] <= '0;
          for (int j = 0; j < W; j++)
            if (j != k) older[j][k] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int g = 0; g < G; g++) begin
      any[g] = |req[g];
      for (int i = 0; i < W; i++) begin
        logic beaten;
        beaten = 1'b0;
        for (int j = 0; j < W; j++)
          if (j != i && req[g][j] && older[j][i]) beaten = 1'b1;
        grant[g][i] = req[g][i] && !beaten;
      end
    end
  end

  a_alloc_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(alloc));

endmodule
