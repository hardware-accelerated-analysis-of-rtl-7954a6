// task_analysis: response time analysis of every task on its core.
//
// Tasks are handled one after the other in priority order (index 0 first).
// For task i the sequencer
//   1. forms hp(i), the higher-priority tasks on the same core
//      (task_interference, one cycle);
//   2. when a speed-up component is selected, forms u_i = c_i/t_i in fixed
//      point (one division) and runs rta_bounds over hp(i) for the PRE upper
//      bound and/or the NLB lower bound;
//   3. with PRE: if the upper bound meets the deadline, the task is
//      schedulable and the bound is kept as its response time, skipping the
//      exact test; with PRE and NLB together a lower bound above the
//      deadline likewise proves the task unschedulable;
//   4. otherwise runs the exact recurrence r = c_i + sum ceil(r/t_j) c_j
//      (rta_engine), started at c_i, or at the lower bound with NLB, and
//      stopped at the fixed point or once r exceeds the deadline d_i;
//   5. writes r_i and its verdict through the result port.
// The table of utilisations is kept here because the bounds of a task need
// those of the higher-priority tasks already handled.
//
// Interface and timing: pulse start with scheme and num_tasks valid and the
// task table stable. One result write (wr_en) follows per task, in index
// order; done is high for one cycle after the last one. n_pre, n_lbrej and
// n_exact count the tasks decided by the PRE upper bound, by the lower bound
// and by the exact recurrence in this run.
module task_analysis
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  scheme_e    scheme,
  input  idx_t       num_tasks,
  input  task_info_t tasks [MAX_TASKS],
  output logic       busy,
  output logic       done,
  output logic       wr_en,
  output idx_t       wr_idx,
  output time_t      wr_r,
  output logic       wr_sched,
  output logic [15:0] n_pre,
  output logic [15:0] n_lbrej,
  output logic [15:0] n_exact
);

  localparam int unsigned DDW = TW + FRAC;

  typedef enum logic [2:0] {S_IDLE, S_HP, S_UTIL, S_UTILW, S_BND, S_BNDW,
                            S_RTA, S_RTAW} state_e;
  state_e state_q;

  idx_t                 i_q;
  scheme_e              scheme_q;
  logic [MAX_TASKS-1:0] hp_c, hp_q;
  util_t                u_dn [MAX_TASKS];
  util_t                u_up [MAX_TASKS];
  core_t                cores [MAX_TASKS];

  logic use_pre, use_nlb;
  assign use_pre = scheme_q[0];
  assign use_nlb = scheme_q[1];

  always_comb
    for (int unsigned k = 0; k < MAX_TASKS; k++) cores[k] = tasks[k].core;

  task_interference #(.MAX_TASKS(MAX_TASKS)) u_hp (
    .cores(cores), .idx(i_q), .hp(hp_c)
  );

  // Utilisation of the current task.
  logic           ud_start, ud_busy, ud_done;
  logic [DDW-1:0] ud_q, ud_r;
  seq_divider #(.DW(DDW)) u_udiv (
    .clk(clk), .rst_n(rst_n), .start(ud_start),
    .dividend(DDW'(tasks[i_q].c) << FRAC), .divisor(DDW'(tasks[i_q].t)),
    .busy(ud_busy), .done(ud_done), .quotient(ud_q), .remainder(ud_r)
  );
  assign ud_start = (state_q == S_UTIL);

  logic [DDW-1:0] u_ceil;
  assign u_ceil = ud_q + DDW'(ud_r != '0);

  // Bounds.
  idx_t  b_idx;
  logic  b_start, b_busy, b_done, lb_ok, ub_ok;
  time_t lb, ub;
  rta_bounds #(.MAX_N(MAX_TASKS)) u_bnd (
    .clk(clk), .rst_n(rst_n), .start(b_start), .is_task(1'b1),
    .want_lb(use_nlb), .want_ub(use_pre), .base(tasks[i_q].c), .set(hp_q),
    .rd_idx(b_idx), .c_j(tasks[b_idx].c), .u_dn_j(u_dn[b_idx]),
    .u_up_j(u_up[b_idx]), .jit_j('0), .busy(b_busy), .done(b_done),
    .lb(lb), .lb_ok(lb_ok), .ub(ub), .ub_ok(ub_ok)
  );
  assign b_start = (state_q == S_BND);

  // Exact recurrence.
  idx_t        e_idx;
  logic        e_start, e_busy, e_done, e_sched;
  time_t       e_resp, e_init;
  logic [15:0] e_passes;
  assign e_init = (use_nlb && lb_ok) ? lb : tasks[i_q].c;
  rta_engine #(.MAX_N(MAX_TASKS)) u_eng (
    .clk(clk), .rst_n(rst_n), .start(e_start), .base(tasks[i_q].c),
    .init(e_init), .limit(tasks[i_q].d), .set(hp_q), .rd_idx(e_idx),
    .c_j(tasks[e_idx].c), .t_j(tasks[e_idx].t), .jit_j('0),
    .busy(e_busy), .done(e_done), .resp(e_resp), .sched(e_sched),
    .passes(e_passes)
  );
  assign e_start = (state_q == S_RTA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      i_q      <= '0;
      scheme_q <= SCHEME_E2ERTA;
      hp_q     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      wr_en    <= 1'b0;
      wr_idx   <= '0;
      wr_r     <= '0;
      wr_sched <= 1'b0;
      n_pre    <= '0;
      n_lbrej  <= '0;
      n_exact  <= '0;
      for (int unsigned k = 0; k < MAX_TASKS; k++) begin
        u_dn[k] <= '0;
        u_up[k] <= '0;
      end
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          scheme_q <= scheme;
          i_q      <= '0;
          n_pre    <= '0;
          n_lbrej  <= '0;
          n_exact  <= '0;
          if (num_tasks == '0) done <= 1'b1;
          else begin
            busy    <= 1'b1;
            state_q <= S_HP;
          end
        end
        S_HP: begin
          hp_q    <= hp_c;
          state_q <= (scheme_q == SCHEME_E2ERTA) ? S_RTA : S_UTIL;
        end
        S_UTIL:  state_q <= S_UTILW;
        S_UTILW: if (ud_done) begin
          u_dn[i_q] <= (ud_q > DDW'(U_ONE))   ? U_ONE : util_t'(ud_q);
          u_up[i_q] <= (u_ceil > DDW'(U_ONE)) ? U_ONE : util_t'(u_ceil);
          state_q   <= S_BND;
        end
        S_BND:  state_q <= S_BNDW;
        S_BNDW: if (b_done) begin
          if (use_pre && ub_ok && ub <= tasks[i_q].d) begin
            wr_en    <= 1'b1;
            wr_idx   <= i_q;
            wr_r     <= ub;
            wr_sched <= 1'b1;
            n_pre    <= n_pre + 16'd1;
            i_q      <= i_q + 1'b1;
            state_q  <= S_HP;
          end else if (use_pre && use_nlb && lb_ok && lb > tasks[i_q].d) begin
            wr_en    <= 1'b1;
            wr_idx   <= i_q;
            wr_r     <= lb;
            wr_sched <= 1'b0;
            n_lbrej  <= n_lbrej + 16'd1;
            i_q      <= i_q + 1'b1;
            state_q  <= S_HP;
          end else begin
            state_q  <= S_RTA;
          end
        end
        S_RTA:  state_q <= S_RTAW;
        S_RTAW: if (e_done) begin
          wr_en    <= 1'b1;
          wr_idx   <= i_q;
          wr_r     <= e_resp;
          wr_sched <= e_sched;
          n_exact  <= n_exact + 16'd1;
          i_q      <= i_q + 1'b1;
          state_q  <= S_HP;
        end
        default: state_q <= S_IDLE;
      endcase
      // Leave after the last task.
      if (busy && state_q == S_HP && i_q == num_tasks) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        state_q <= S_IDLE;
      end
    end
  end

endmodule
