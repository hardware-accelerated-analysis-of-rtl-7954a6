// tb_flow_basic_latency: random link vectors with a known number of set
// bits; C must be L + hops - 1, or 0 for an empty route, saturating.
module tb_flow_basic_latency;
  import e2erta_pkg::*;
  logic [559:0] route = '0;
  time_t len = '0, c;
  logic [15:0] hops;

  flow_basic_latency dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      automatic int n = (k == 0) ? 0 : $urandom_range(30, 1);
      longint exp_c;
      route = '0;
      for (int m = 0; m < n; m++) begin
        int b;
        do b = $urandom_range(559); while (route[b]);
        route[b] = 1;
      end
      len = (k == 1) ? '1 : time_t'($urandom_range(500, 0));
      #1;
      exp_c = (n == 0) ? 0 : longint'(len) + n - 1;
      if (exp_c > 64'hFFFF_FFFF) exp_c = 64'hFFFF_FFFF;
      check(int'(hops) == n, $sformatf("hops %0d/%0d", hops, n));
      check(longint'(c) == exp_c, $sformatf("C %0d/%0d", c, exp_c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
