// task_interference: builds hp(i), the set of tasks that can preempt task i.
//
// Tasks sit in the task table in priority order (index 0 highest), and a
// task is preempted only by higher-priority tasks mapped on the same core.
// All MAX_TASKS core ids are compared with the core of task idx at once, so
// the whole set is formed in a single combinational step instead of a
// task-by-task scan:
//   hp[j] = (j < idx) and (core[j] == core[idx])
// The set is a bit vector with bit j standing for task j, the same coding
// the flow interference sets use. Purely combinational.
module task_interference
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 128
) (
  input  core_t                cores [MAX_TASKS],
  input  idx_t                 idx,
  output logic [MAX_TASKS-1:0] hp
);

  core_t own;
  always_comb begin
    own = cores[idx];
    for (int unsigned j = 0; j < MAX_TASKS; j++)
      hp[j] = (j < int'(idx)) && (cores[j] == own);
  end

endmodule
