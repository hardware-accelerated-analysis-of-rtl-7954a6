// tb_ga_ranking: self-checking test of the population ranking.
//
// Random fitness values (few distinct values, so that ties are common) are
// ranked for several population sizes. The expected order is worked out
// here by sorting the slots by (fitness, slot number): the first keep
// entries must be exactly that, the rest the remaining slots in ascending
// order. The latency keep*(nslots+1) + nslots + 1 cycles is checked too.
module tb_ga_ranking;

  localparam int POP = 16, NS = 2 * POP;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [7:0]  nslots = '0, keep = '0;
  logic [15:0] fit [NS];
  logic [7:0]  order [NS];
  logic        busy, done;

  ga_ranking #(.POP_SIZE(POP)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fit[s]) fit[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      automatic int p = (run < 10) ? 1 + run : $urandom_range(POP, 2);
      automatic int ns = 2 * p;
      automatic int lat = 0;
      int exp_order [NS];
      bit taken [NS];
      int maxv;
      maxv = (run % 3 == 0) ? 3 : 65535;
      foreach (fit[s]) fit[s] = 16'($urandom_range(maxv));
      // reference: repeated selection of the smallest (fit, slot)
      foreach (taken[s]) taken[s] = 0;
      for (int r = 0; r < p; r++) begin
        automatic int best = -1;
        for (int s = 0; s < ns; s++)
          if (!taken[s] && (best < 0 || fit[s] < fit[best])) best = s;
        exp_order[r] = best;
        taken[best] = 1;
      end
      begin
        automatic int r = p;
        for (int s = 0; s < ns; s++) if (!taken[s]) begin exp_order[r] = s; r++; end
      end
      nslots = 8'(ns); keep = 8'(p);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == p * (ns + 1) + ns + 1,
            $sformatf("run %0d latency %0d expected %0d", run, lat, p * (ns + 1) + ns + 1));
      for (int r = 0; r < ns; r++)
        check(int'(order[r]) == exp_order[r],
              $sformatf("run %0d order[%0d]=%0d expected %0d", run, r, order[r], exp_order[r]));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
