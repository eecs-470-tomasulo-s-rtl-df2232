// Testbench for cdb_arbiter: random request sets from three units; the bus
// must carry the lowest-numbered valid request and grant exactly it.
module tb_cdb_arbiter;
  import tomasulo_pkg::*;
  localparam int N = 3;
  cdb_t         req [N];
  logic [N-1:0] grant;
  cdb_t         cdb;

  cdb_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 300; n++) begin
      int win;
      win = -1;
      for (int i = 0; i < N; i++) begin
        req[i].valid = 1'($urandom);
        req[i].tag   = tag_t'($urandom_range(1, 5));
        req[i].value = $urandom;
        if (req[i].valid && win < 0) win = i;
      end
      #1;
      checks++;
      if (win < 0) begin
        if (cdb.valid || grant != '0) begin failures++; $display("FAIL: idle bus"); end
      end else if (!cdb.valid || cdb.tag != req[win].tag || cdb.value != req[win].value
                   || grant != N'(1 << win)) begin
        failures++;
        $display("FAIL: winner %0d, grant %b", win, grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
