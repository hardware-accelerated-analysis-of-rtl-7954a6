// result_store: stores the outcome of an analysis run.
//
// Holds the response time and the schedulable/unschedulable verdict of
// every task and every flow, as written by the task and flow analysis, and
// counts the unschedulable tasks and flows as the verdicts arrive. The task
// response times are also offered as a whole array, because the flow
// analysis uses them as release jitters. A host reads single entries back
// through rd_idx (combinational read).
//
// Interface and timing: clear (one cycle) empties the verdicts and zeroes
// both counters before a run. Each t_we / f_we cycle writes one entry;
// a write to an entry already written replaces it and the counters follow.
// Counters are valid the cycle after the last write.
module result_store
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned MAX_FLOWS = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        t_we,
  input  idx_t        t_idx,
  input  time_t       t_r,
  input  logic        t_sched,
  input  logic        f_we,
  input  idx_t        f_idx,
  input  time_t       f_r,
  input  logic        f_sched,
  output time_t       task_r [MAX_TASKS],
  output logic [15:0] unsched_tasks,
  output logic [15:0] unsched_flows,
  input  idx_t        rd_idx,
  output time_t       rd_task_r,
  output logic        rd_task_sched,
  output time_t       rd_flow_r,
  output logic        rd_flow_sched
);

  time_t                flow_r [MAX_FLOWS];
  logic [MAX_TASKS-1:0] t_miss;
  logic [MAX_FLOWS-1:0] f_miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_miss        <= '0;
      f_miss        <= '0;
      unsched_tasks <= '0;
      unsched_flows <= '0;
      for (int unsigned k = 0; k < MAX_TASKS; k++) task_r[k] <= '0;
      for (int unsigned k = 0; k < MAX_FLOWS; k++) flow_r[k] <= '0;
    end else if (clear) begin
      t_miss        <= '0;
      f_miss        <= '0;
      unsched_tasks <= '0;
      unsched_flows <= '0;
    end else begin
      if (t_we) begin
        task_r[t_idx] <= t_r;
        t_miss[t_idx] <= !t_sched;
        unsched_tasks <= unsched_tasks + 16'(!t_sched) - 16'(t_miss[t_idx]);
      end
      if (f_we) begin
        flow_r[f_idx] <= f_r;
        f_miss[f_idx] <= !f_sched;
        unsched_flows <= unsched_flows + 16'(!f_sched) - 16'(f_miss[f_idx]);
      end
    end
  end

  assign rd_task_r     = task_r[rd_idx];
  assign rd_task_sched = !t_miss[rd_idx];
  assign rd_flow_r     = flow_r[rd_idx];
  assign rd_flow_sched = !f_miss[rd_idx];

endmodule
