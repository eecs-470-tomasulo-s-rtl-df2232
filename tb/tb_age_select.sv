// Testbench for age_select: random allocations and request sets for two
// units, checked against a model that stamps each allocation with a
// sequence number; each unit's grant must be its oldest requester.
module tb_age_select;
  localparam int W = 5, G = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] alloc;
  logic [W-1:0] req   [G];
  logic [W-1:0] grant [G];
  logic [G-1:0] any;

  age_select #(.W(W), .G(G)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stamp [W];
  int seq;

  initial begin
    alloc = '0; req[0] = '0; req[1] = '0; seq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // every station allocated once, in a random order
    for (int k = 0; k < W; k++) begin
      alloc = W'(1) << k;
      stamp[k] = seq++;
      @(negedge clk);
    end
    alloc = '0;
    for (int n = 0; n < 1000; n++) begin
      if ($urandom_range(0, 2) == 0) begin
        int k;
        k = $urandom_range(0, W - 1);
        alloc = W'(1) << k;
      end else alloc = '0;
      for (int g = 0; g < G; g++) req[g] = W'($urandom);
      #1;
      for (int g = 0; g < G; g++) begin
        logic [W-1:0] exp;
        int best;
        best = -1;
        for (int i = 0; i < W; i++)
          if (req[g][i] && (best < 0 || stamp[i] < stamp[best])) best = i;
        exp = (best < 0) ? '0 : W'(1) << best;
        checks++;
        if (grant[g] != exp || any[g] != (req[g] != '0)) begin
          failures++;
          $display("FAIL: unit %0d req=%b grant=%b expected %b", g, req[g], grant[g], exp);
        end
      end
      for (int k = 0; k < W; k++) if (alloc[k]) stamp[k] = seq++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
