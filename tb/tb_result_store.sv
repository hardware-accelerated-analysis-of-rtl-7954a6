// tb_result_store: random writes and rewrites of task and flow results;
// readback and the unschedulable counters must match a scoreboard, and
// clear must empty the counters.
module tb_result_store;
  import e2erta_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, clear = 0, t_we = 0, f_we = 0;
  logic t_sched = 0, f_sched = 0, rd_task_sched, rd_flow_sched;
  always #5 clk = ~clk;
  idx_t t_idx = '0, f_idx = '0, rd_idx = '0;
  time_t t_r = '0, f_r = '0, rd_task_r, rd_flow_r;
  time_t task_r [N];
  logic [15:0] unsched_tasks, unsched_flows;

  result_store #(.MAX_TASKS(N), .MAX_FLOWS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit    ts [N], fs [N];
  time_t tr [N], fr [N];
  initial begin
    for (int k = 0; k < N; k++) begin tr[k] = '0; fr[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      #1;
      check(unsched_tasks == 0 && unsched_flows == 0, "cleared");
      for (int k = 0; k < N; k++) begin ts[k] = 1; fs[k] = 1; end
      for (int k = 0; k < 60; k++) begin
        t_we = $urandom_range(1); f_we = $urandom_range(1);
        t_idx = idx_t'($urandom_range(N-1)); f_idx = idx_t'($urandom_range(N-1));
        t_r = time_t'($urandom); f_r = time_t'($urandom);
        t_sched = $urandom_range(1); f_sched = $urandom_range(1);
        if (t_we) begin ts[t_idx] = t_sched; tr[t_idx] = t_r; end
        if (f_we) begin fs[f_idx] = f_sched; fr[f_idx] = f_r; end
        @(negedge clk);
      end
      t_we = 0; f_we = 0;
      @(negedge clk);
      begin
        automatic int mt = 0, mf = 0;
        for (int k = 0; k < N; k++) begin
          mt += !ts[k]; mf += !fs[k];
          rd_idx = idx_t'(k); #1;
          check(rd_task_sched == ts[k] && rd_flow_sched == fs[k], "verdicts");
          check(rd_task_r == tr[k] && task_r[k] == tr[k], "task r");
          check(rd_flow_r == fr[k], "flow r");
        end
        check(int'(unsched_tasks) == mt, $sformatf("task count %0d/%0d", unsched_tasks, mt));
        check(int'(unsched_flows) == mf, $sformatf("flow count %0d/%0d", unsched_flows, mf));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
