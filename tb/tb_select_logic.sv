// Testbench for select_logic: every request pattern of a 5-wide selector;
// the grant must be the lowest set request bit, one-hot, and any = |req.
module tb_select_logic;
  localparam int W = 5;
  logic [W-1:0] req, grant;
  logic         any;

  select_logic #(.W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int p = 0; p < (1 << W); p++) begin
      logic [W-1:0] exp;
      req = W'(p);
      exp = '0;
      for (int i = 0; i < W; i++) if (req[i]) begin exp[i] = 1'b1; break; end
      #1;
      checks++;
      if (grant !== exp || any !== (p != 0)) begin
        failures++;
        $display("FAIL: req=%b grant=%b expected %b", req, grant, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
