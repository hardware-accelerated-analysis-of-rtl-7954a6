// e2erta_top: hardware end-to-end response time analysis (HW-E2ERTA) of a
// set of sporadic tasks and packet flows mapped on a wormhole-switched,
// priority-preemptive mesh NoC with XY routing.
//
// The accelerator answers, for one task mapping, whether every task meets
// its deadline on its core and every packet flow reaches its destination
// within the deadline of its initial task, even in the worst case. It holds
// the inputs in three tables written by a host:
//   - task table (task mapping and task information): core, c, t, d;
//   - flow table (application information): initial task, destination
//     task, packet length L.
// Table rows are in priority order (row 0 highest priority). On start the
// task analysis and the front end of the flow analysis (routing, basic
// latency, direct and indirect interference sets) run at the same time; the
// flow response times follow as soon as every task response time is known,
// because those are the release jitters of the flows. Results go to the
// result store, which counts unschedulable tasks and flows.
//
// scheme selects the assembly of speed-up components used for every task
// and flow: plain exact analysis, PRE (upper bound first), NLB (exact
// analysis started at a lower bound) or PRE followed by NLB.
//
// Interface and timing: write table rows with task_we / flow_we while the
// accelerator is idle (writes while busy are ignored). Pulse start with
// scheme, num_tasks and num_flows valid. busy stays high until done pulses
// for one cycle; cycles then holds the number of clock cycles the run took,
// from the start cycle to the done cycle. The unschedulable counts, the
// statistics and the per-entry results (rd_idx, combinational) stay valid
// until the next start. rd_flow_route, rd_flow_c, rd_flow_di and rd_flow_ii
// show the link vector, basic latency and interference sets of flow rd_idx.
module e2erta_top
  import e2erta_pkg::*;
#(
  parameter int unsigned MESH_COLS = 10,
  parameter int unsigned MESH_ROWS = 10,
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned MAX_FLOWS = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // table load
  input  logic        task_we,
  input  idx_t        task_widx,
  input  task_info_t  task_wdata,
  input  logic        flow_we,
  input  idx_t        flow_widx,
  input  flow_info_t  flow_wdata,
  // run control
  input  scheme_e     scheme,
  input  idx_t        num_tasks,
  input  idx_t        num_flows,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles,
  // results
  output logic [15:0] unsched_tasks,
  output logic [15:0] unsched_flows,
  output logic [15:0] task_n_pre,
  output logic [15:0] task_n_lbrej,
  output logic [15:0] task_n_exact,
  output logic [15:0] flow_n_pre,
  output logic [15:0] flow_n_lbrej,
  output logic [15:0] flow_n_exact,
  input  idx_t        rd_idx,
  output time_t       rd_task_r,
  output logic        rd_task_sched,
  output time_t       rd_flow_r,
  output logic        rd_flow_sched,
  output logic [num_links(MESH_COLS, MESH_ROWS)-1:0] rd_flow_route,
  output time_t       rd_flow_c,
  output logic [MAX_FLOWS-1:0] rd_flow_di,
  output logic [MAX_FLOWS-1:0] rd_flow_ii
);

  task_info_t tasks [MAX_TASKS];
  flow_info_t flows [MAX_FLOWS];

  always_ff @(posedge clk) begin
    if (task_we && !busy) tasks[task_widx] <= task_wdata;
    if (flow_we && !busy) flows[flow_widx] <= flow_wdata;
  end

  logic go;
  assign go = start && !busy;

  // ------------------------------------------------------------- task side
  logic  ta_busy, ta_done, ta_we, ta_sched;
  idx_t  ta_idx;
  time_t ta_r;
  task_analysis #(.MAX_TASKS(MAX_TASKS)) u_task (
    .clk(clk), .rst_n(rst_n), .start(go), .scheme(scheme),
    .num_tasks(num_tasks), .tasks(tasks), .busy(ta_busy), .done(ta_done),
    .wr_en(ta_we), .wr_idx(ta_idx), .wr_r(ta_r), .wr_sched(ta_sched),
    .n_pre(task_n_pre), .n_lbrej(task_n_lbrej), .n_exact(task_n_exact)
  );

  logic tasks_ready_q, flows_ready_q;

  // ------------------------------------------------------------- flow side
  time_t                task_r [MAX_TASKS];
  logic                 fa_busy, fa_front, fa_done, fa_we, fa_sched;
  idx_t                 fa_idx;
  time_t                fa_r;
  flow_analysis #(
    .MAX_TASKS(MAX_TASKS), .MAX_FLOWS(MAX_FLOWS),
    .MESH_COLS(MESH_COLS), .MESH_ROWS(MESH_ROWS)
  ) u_flow (
    .clk(clk), .rst_n(rst_n), .start(go), .scheme(scheme),
    .num_flows(num_flows), .tasks(tasks), .flows(flows), .task_r(task_r),
    .tasks_ready(tasks_ready_q), .busy(fa_busy), .front_done(fa_front),
    .done(fa_done), .wr_en(fa_we), .wr_idx(fa_idx), .wr_r(fa_r),
    .wr_sched(fa_sched), .n_pre(flow_n_pre), .n_lbrej(flow_n_lbrej),
    .n_exact(flow_n_exact), .dbg_idx(rd_idx), .dbg_route(rd_flow_route),
    .dbg_c(rd_flow_c), .dbg_di(rd_flow_di), .dbg_ii(rd_flow_ii)
  );

  // ---------------------------------------------------------- store results
  result_store #(.MAX_TASKS(MAX_TASKS), .MAX_FLOWS(MAX_FLOWS)) u_store (
    .clk(clk), .rst_n(rst_n), .clear(go),
    .t_we(ta_we), .t_idx(ta_idx), .t_r(ta_r), .t_sched(ta_sched),
    .f_we(fa_we), .f_idx(fa_idx), .f_r(fa_r), .f_sched(fa_sched),
    .task_r(task_r), .unsched_tasks(unsched_tasks),
    .unsched_flows(unsched_flows), .rd_idx(rd_idx), .rd_task_r(rd_task_r),
    .rd_task_sched(rd_task_sched), .rd_flow_r(rd_flow_r),
    .rd_flow_sched(rd_flow_sched)
  );

  // --------------------------------------------------- run control, timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      done          <= 1'b0;
      cycles        <= '0;
      tasks_ready_q <= 1'b0;
      flows_ready_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) begin
        busy          <= 1'b1;
        cycles        <= 32'd1;
        tasks_ready_q <= 1'b0;
        flows_ready_q <= 1'b0;
      end else if (busy) begin
        cycles <= cycles + 32'd1;
        if (ta_done) tasks_ready_q <= 1'b1;
        if (fa_done) flows_ready_q <= 1'b1;
        if (tasks_ready_q && flows_ready_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
