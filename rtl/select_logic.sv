// Fixed-priority W-to-1 select: the lowest-numbered requester wins.
//
// The core uses it where an order among requesters is a plain convention:
// dispatch takes the lowest-numbered free reservation station of the needed
// kind (so the first FP instruction goes to RS#4, the next to RS#5, as in the
// lecture's example), and the common data bus arbiter grants the first
// finished unit in its port order. Issue uses the oldest-first age_select
// instead. Purely combinational; grant is one-hot or zero, any = |req.
module select_logic #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] req,
  output logic [W-1:0] grant,
  output logic         any
);

  always_comb begin
    grant = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (req[i]) grant = W'(1) << i;
    end
    any = |req;
  end

endmodule
