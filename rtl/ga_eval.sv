// ga_eval: fitness function of the genetic algorithm, made of N_INST
// E2ERTA accelerators (e2erta_top) working in lockstep.
//
// Each chromosome is a task mapping: gene g holds the core of task g. The
// fitness of a chromosome is the number of tasks plus the number of flows
// that the end-to-end analysis finds unschedulable under that mapping
// (0 = fully schedulable; lower is better).
//
// The chromosomes to evaluate are list[first .. first+count-1] (population
// slot numbers). They go out in batches of num_inst (1..N_INST; other
// values mean N_INST): in a batch each of the first num_inst instances
// gets its chromosome, all instances start together, and the next
// batch is loaded only once every instance of this one is done, so a fast
// instance sits idle until the slowest finishes (lockstep). In the last
// batch, instances without a chromosome stay idle. Loading a batch writes
// one table row per cycle into all instances at once: task row g takes its
// core from gene g of the instance's chromosome (population read ports
// rd_slot[k] / rd_gene / rd_data[k]) and c, t, d from the shared task
// table; flow row g is copied from the shared flow table. Lockstep and the
// parallel instances follow the document; the row-per-cycle load and the
// fitness formula are this design's choices.
//
// Interface and timing: pulse start with list, first, count, scheme,
// num_tasks, num_flows and the tables valid and held until done. At the
// end of each batch fit_we[k] pulses for one cycle with fit_slot[k] and
// fit_val[k] for every instance that had a chromosome. done pulses one
// cycle after the last batch's fitness write. A batch takes
// max(num_tasks, num_flows) load cycles, 1 start cycle, the slowest
// instance's analysis, and 2 cycles to collect and write back. The
// statistics outputs accumulate from reset (clear with stats_clr).
module ga_eval
  import e2erta_pkg::*;
#(
  parameter int unsigned POP_SIZE  = 16,
  parameter int unsigned N_INST    = 5,
  parameter int unsigned MESH_COLS = 10,
  parameter int unsigned MESH_ROWS = 10,
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned MAX_FLOWS = 128,
  localparam int unsigned NSLOT    = 2 * POP_SIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  list [NSLOT],
  input  logic [7:0]  first,
  input  logic [7:0]  count,
  input  logic [7:0]  num_inst,
  input  scheme_e     scheme,
  input  idx_t        num_tasks,
  input  idx_t        num_flows,
  input  task_info_t  tasks [MAX_TASKS],
  input  flow_info_t  flows [MAX_FLOWS],
  // population read ports
  output idx_t        rd_gene,
  output idx_t        rd_slot [N_INST],
  input  core_t       rd_data [N_INST],
  // fitness write-back
  output logic [N_INST-1:0] fit_we,
  output idx_t        fit_slot [N_INST],
  output logic [15:0] fit_val [N_INST],
  output logic        busy,
  output logic        done,
  // statistics
  input  logic        stats_clr,
  output logic [31:0] n_evals,        // chromosomes evaluated
  output logic [31:0] n_batches,      // lockstep batches run
  output logic [31:0] n_partial,      // batches with an idle instance
  output logic [31:0] idle_cycles,    // instance-cycles spent waiting
  output logic [31:0] n_pre,          // tasks+flows accepted by PRE
  output logic [31:0] n_lbrej,        // tasks+flows rejected by NLB bound
  output logic [31:0] n_exact         // tasks+flows that ran the recurrence
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_LOAD, S_RUN, S_WAIT, S_WB} state_e;
  state_e state_q;

  logic [7:0]        base_q;          // offset of the batch within the list
  idx_t              g_q;
  idx_t              nrows;
  logic [N_INST-1:0] act_q, fin_q;
  idx_t              slot_q [N_INST];

  logic [7:0] ninst;
  assign nrows = (num_tasks > num_flows) ? num_tasks : num_flows;
  assign ninst = (num_inst == '0 || 32'(num_inst) > N_INST) ? 8'(N_INST) : num_inst;
  assign rd_gene = g_q;
  assign rd_slot = slot_q;

  // ------------------------------------------------------ E2ERTA instances
  logic [N_INST-1:0] i_busy, i_done, i_task_we, i_flow_we, i_start;
  task_info_t        i_task_wd [N_INST];
  logic [15:0]       i_ut [N_INST], i_uf [N_INST];
  logic [15:0]       i_tp [N_INST], i_tl [N_INST], i_te [N_INST];
  logic [15:0]       i_fp [N_INST], i_fl [N_INST], i_fe [N_INST];

  for (genvar k = 0; k < N_INST; k++) begin : g_inst
    logic [31:0] cyc_unused;
    time_t       rtr_unused, rfr_unused, rfc_unused;
    logic        rts_unused, rfs_unused;
    logic [num_links(MESH_COLS, MESH_ROWS)-1:0] rroute_unused;
    logic [MAX_FLOWS-1:0] rdi_unused, rii_unused;

    always_comb begin
      i_task_we[k]      = (state_q == S_LOAD) && act_q[k] && (g_q < num_tasks);
      i_flow_we[k]      = (state_q == S_LOAD) && act_q[k] && (g_q < num_flows);
      i_start[k]        = (state_q == S_RUN) && act_q[k];
      i_task_wd[k]      = tasks[g_q];
      i_task_wd[k].core = rd_data[k];
    end

    e2erta_top #(
      .MESH_COLS(MESH_COLS), .MESH_ROWS(MESH_ROWS),
      .MAX_TASKS(MAX_TASKS), .MAX_FLOWS(MAX_FLOWS)
    ) u_e2erta (
      .clk(clk), .rst_n(rst_n),
      .task_we(i_task_we[k]), .task_widx(g_q), .task_wdata(i_task_wd[k]),
      .flow_we(i_flow_we[k]), .flow_widx(g_q), .flow_wdata(flows[g_q]),
      .scheme(scheme), .num_tasks(num_tasks), .num_flows(num_flows),
      .start(i_start[k]), .busy(i_busy[k]), .done(i_done[k]),
      .cycles(cyc_unused),
      .unsched_tasks(i_ut[k]), .unsched_flows(i_uf[k]),
      .task_n_pre(i_tp[k]), .task_n_lbrej(i_tl[k]), .task_n_exact(i_te[k]),
      .flow_n_pre(i_fp[k]), .flow_n_lbrej(i_fl[k]), .flow_n_exact(i_fe[k]),
      .rd_idx('0), .rd_task_r(rtr_unused), .rd_task_sched(rts_unused),
      .rd_flow_r(rfr_unused), .rd_flow_sched(rfs_unused),
      .rd_flow_route(rroute_unused), .rd_flow_c(rfc_unused),
      .rd_flow_di(rdi_unused), .rd_flow_ii(rii_unused)
    );
  end

  // Sums over the instances of this batch.
  logic [31:0] waiting, nact, sum_pre, sum_lbrej, sum_exact;
  always_comb begin
    waiting   = '0;
    nact      = '0;
    sum_pre   = '0;
    sum_lbrej = '0;
    sum_exact = '0;
    for (int unsigned k = 0; k < N_INST; k++) begin
      waiting = waiting + 32'(fin_q[k]);
      if (act_q[k]) begin
        nact      = nact + 32'd1;
        sum_pre   = sum_pre   + 32'(i_tp[k]) + 32'(i_fp[k]);
        sum_lbrej = sum_lbrej + 32'(i_tl[k]) + 32'(i_fl[k]);
        sum_exact = sum_exact + 32'(i_te[k]) + 32'(i_fe[k]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      base_q      <= '0;
      g_q         <= '0;
      act_q       <= '0;
      fin_q       <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      fit_we      <= '0;
      n_evals     <= '0;
      n_batches   <= '0;
      n_partial   <= '0;
      idle_cycles <= '0;
      n_pre       <= '0;
      n_lbrej     <= '0;
      n_exact     <= '0;
      for (int unsigned k = 0; k < N_INST; k++) begin
        slot_q[k]   <= '0;
        fit_slot[k] <= '0;
        fit_val[k]  <= '0;
      end
    end else begin
      done   <= 1'b0;
      fit_we <= '0;
      if (stats_clr) begin
        n_evals     <= '0;
        n_batches   <= '0;
        n_partial   <= '0;
        idle_cycles <= '0;
        n_pre       <= '0;
        n_lbrej     <= '0;
        n_exact     <= '0;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          base_q  <= '0;
          busy    <= 1'b1;
          state_q <= (count == '0) ? S_WB : S_SETUP;
          act_q   <= '0;
        end
        // Hand a chromosome to every instance that has one in this batch.
        S_SETUP: begin
          for (int unsigned k = 0; k < N_INST; k++) begin
            act_q[k]  <= (k < 32'(ninst)) && ((32'(base_q) + k) < 32'(count));
            slot_q[k] <= idx_t'(list[8'(32'(first) + 32'(base_q) + k)]);
          end
          g_q     <= '0;
          fin_q   <= '0;
          state_q <= S_LOAD;
        end
        S_LOAD: begin
          if (g_q + 1'b1 >= nrows) state_q <= S_RUN;
          else                     g_q <= g_q + 1'b1;
        end
        S_RUN: begin
          n_batches <= n_batches + 32'd1;
          if (32'(nact) != 32'(ninst)) n_partial <= n_partial + 32'd1;
          state_q   <= S_WAIT;
        end
        S_WAIT: begin
          fin_q       <= fin_q | (i_done & act_q);
          idle_cycles <= idle_cycles + waiting;
          if ((fin_q | (i_done & act_q)) == act_q) state_q <= S_WB;
        end
        S_WB: begin
          for (int unsigned k = 0; k < N_INST; k++) begin
            fit_we[k]   <= act_q[k];
            fit_slot[k] <= slot_q[k];
            fit_val[k]  <= i_ut[k] + i_uf[k];
          end
          n_evals <= n_evals + nact;
          n_pre   <= n_pre + sum_pre;
          n_lbrej <= n_lbrej + sum_lbrej;
          n_exact <= n_exact + sum_exact;
          act_q   <= '0;
          if (32'(base_q) + 32'(ninst) >= 32'(count)) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            base_q  <= base_q + ninst;
            state_q <= S_SETUP;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
