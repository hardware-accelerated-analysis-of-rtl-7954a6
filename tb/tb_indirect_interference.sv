// tb_indirect_interference: the OR/XOR example of flow 4 in the 3x3 mesh
// (S_id = {3}, S_id(3) = {2} gives S_ii = {2}; a flow 2 that also hits flow 4
// stays out of S_ii) and random direct sets against the definition; checks
// the cycle count (|S_id(i)| + 1 cycles).
module tb_indirect_interference;
  import e2erta_pkg::*;
  localparam int NF = 128;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  idx_t rd_idx;
  logic [NF-1:0] di_i = '0, di_j, ii;
  logic [NF-1:0] dis [NF];
  assign di_j = dis[rd_idx];

  indirect_interference dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int i, logic [NF-1:0] expect_ii);
    automatic int lat = 0;
    @(negedge clk); di_i = dis[i]; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(ii == expect_ii, $sformatf("flow %0d S_ii %h / %h", i, ii, expect_ii));
    check(lat == $countones(dis[i]) + 1, $sformatf("flow %0d cycles", i));
  endtask

  initial begin
    for (int k = 0; k < NF; k++) dis[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Flows 1..4 of the example at indices 0..3.
    dis[1] = NF'('b0001); dis[2] = NF'('b0010); dis[3] = NF'('b0100);
    run(3, NF'('b0010));
    run(2, NF'('b0001));
    dis[3] = NF'('b0110);                 // flow 2 hits flows 3 and 4
    run(3, NF'('b0001));
    for (int k = 0; k < NF; k++) begin
      dis[k] = '0;
      for (int j = 0; j < k; j++) dis[k][j] = ($urandom_range(9) == 0);
    end
    for (int i = 0; i < NF; i += 5) begin
      automatic logic [NF-1:0] e = '0;
      for (int kk = 0; kk < i; kk++)
        if (!dis[i][kk])
          for (int j = 0; j < i; j++)
            if (dis[i][j] && dis[j][kk]) e[kk] = 1;
      run(i, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
