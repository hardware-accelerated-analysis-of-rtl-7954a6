// flow_analysis: response time analysis of every packet flow on the mesh.
//
// Runs in two phases.
//
// Front end (starts together with the task analysis, needs no task result):
// for every flow i in priority order (index 0 highest)
//   - xy_routing walks the route from the core of the initial task to the
//     core of the destination task and stores the link vector;
//   - flow_basic_latency turns the route and the packet length into C_i,
//     while direct_interference forms S_id(i) by AND-ing the new route with
//     the stored routes of all higher-priority flows;
//   - indirect_interference then forms S_ii(i) from the stored S_id sets.
//
// Response times (start once tasks_ready is high, i.e. once every task
// response time r is known): for every flow i in priority order
//   R_i = C_i + sum_{j in S_id(i)} ceil((R_i + r_j + J^I_j) / T_j) C_j
// where r_j is the response time of the initial task of flow j (its release
// jitter), T_j the period of that task, and J^I_j the interference jitter.
// This design sets J^I_j = R_j - C_j when flow j is itself hit by a flow of
// S_ii(i), and 0 otherwise. The flow's end-to-end response time is r_src +
// R_i; it must not exceed the deadline of its initial task, so the
// recurrence runs with the limit d_src - r_src. A flow whose initial task
// already misses its deadline is unschedulable without further work.
// The speed-up components work as in the task analysis: U_i = C_i/T_i is
// formed, rta_bounds gives the lower/upper bound over S_id(i) with jitter
// r_j + J^I_j, PRE accepts a flow whose upper bound meets the limit, PRE+NLB
// rejects one whose lower bound exceeds it, NLB starts the recurrence at the
// lower bound.
//
// Interface and timing: pulse start with scheme and num_flows valid and the
// tables stable. front_done is high for one cycle when the front end has
// finished. One result write (wr_en) follows per flow in index order, and
// done is high for one cycle after the last. dbg_idx selects the flow whose
// route, C, S_id and S_ii appear on the dbg_* outputs (combinational).
module flow_analysis
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned MAX_FLOWS = 128,
  parameter int unsigned MESH_COLS = 10,
  parameter int unsigned MESH_ROWS = 10,
  localparam int unsigned NLINKS   = num_links(MESH_COLS, MESH_ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  scheme_e              scheme,
  input  idx_t                 num_flows,
  input  task_info_t           tasks  [MAX_TASKS],
  input  flow_info_t           flows  [MAX_FLOWS],
  input  time_t                task_r [MAX_TASKS],
  input  logic                 tasks_ready,
  output logic                 busy,
  output logic                 front_done,
  output logic                 done,
  output logic                 wr_en,
  output idx_t                 wr_idx,
  output time_t                wr_r,
  output logic                 wr_sched,
  output logic [15:0]          n_pre,
  output logic [15:0]          n_lbrej,
  output logic [15:0]          n_exact,
  input  idx_t                 dbg_idx,
  output logic [NLINKS-1:0]    dbg_route,
  output time_t                dbg_c,
  output logic [MAX_FLOWS-1:0] dbg_di,
  output logic [MAX_FLOWS-1:0] dbg_ii
);

  localparam int unsigned DDW = TW + FRAC;

  typedef enum logic [3:0] {S_IDLE, S_ROUTE, S_ROUTEW, S_DI, S_DIW, S_II,
                            S_IIW, S_WAIT, S_SETUP, S_UTIL, S_UTILW, S_BND,
                            S_BNDW, S_RTA, S_RTAW} state_e;
  state_e state_q;

  idx_t    i_q;
  scheme_e scheme_q;
  logic    use_pre, use_nlb;
  assign use_pre = scheme_q[0];
  assign use_nlb = scheme_q[1];

  // Per-flow tables built by the front end and the response time phase.
  logic [NLINKS-1:0]    route_mem [MAX_FLOWS];
  logic [MAX_FLOWS-1:0] di_mem    [MAX_FLOWS];
  logic [MAX_FLOWS-1:0] ii_mem    [MAX_FLOWS];
  time_t                c_mem     [MAX_FLOWS];
  time_t                r_mem     [MAX_FLOWS];
  util_t                u_dn      [MAX_FLOWS];
  util_t                u_up      [MAX_FLOWS];

  assign dbg_route = route_mem[dbg_idx];
  assign dbg_c     = c_mem[dbg_idx];
  assign dbg_di    = di_mem[dbg_idx];
  assign dbg_ii    = ii_mem[dbg_idx];

  // ---------------------------------------------------------------- front end
  logic              rt_start, rt_busy, rt_done;
  logic [NLINKS-1:0] rt_route;
  logic [15:0]       rt_hops, bl_hops;
  time_t             bl_c;

  xy_routing #(.MESH_COLS(MESH_COLS), .MESH_ROWS(MESH_ROWS)) u_route (
    .clk(clk), .rst_n(rst_n), .start(rt_start),
    .src_core(tasks[flows[i_q].src].core), .dst_core(tasks[flows[i_q].dst].core),
    .busy(rt_busy), .done(rt_done), .route(rt_route), .hops(rt_hops)
  );
  assign rt_start = (state_q == S_ROUTE);

  flow_basic_latency #(.NLINKS(NLINKS)) u_blat (
    .route(rt_route), .len(flows[i_q].len), .hops(bl_hops), .c(bl_c)
  );

  idx_t                 di_rd;
  logic                 di_start, di_busy, di_done;
  logic [MAX_FLOWS-1:0] di_vec;
  direct_interference #(.MAX_FLOWS(MAX_FLOWS), .NLINKS(NLINKS)) u_di (
    .clk(clk), .rst_n(rst_n), .start(di_start), .idx(i_q), .route_i(rt_route),
    .rd_idx(di_rd), .route_j(route_mem[di_rd]), .busy(di_busy),
    .done(di_done), .di(di_vec)
  );
  assign di_start = (state_q == S_DI);

  idx_t                 ii_rd;
  logic                 ii_start, ii_busy, ii_done;
  logic [MAX_FLOWS-1:0] ii_vec;
  indirect_interference #(.MAX_FLOWS(MAX_FLOWS)) u_ii (
    .clk(clk), .rst_n(rst_n), .start(ii_start), .di_i(di_vec),
    .rd_idx(ii_rd), .di_j(di_mem[ii_rd]), .busy(ii_busy), .done(ii_done),
    .ii(ii_vec)
  );
  assign ii_start = (state_q == S_II);

  // ------------------------------------------------------ response time phase
  idx_t  src_q;
  time_t lim_q;
  logic  blocked_q;                 // initial task misses its deadline
  logic [MAX_FLOWS-1:0] set_q, iset_q;

  // Jitter r_j + J^I_j of interferer j, seen from the current flow.
  function automatic logic [TW:0] jitter(input idx_t j);
    time_t ji;
    ji = ((di_mem[j] & iset_q) != '0) ? (r_mem[j] - c_mem[j]) : '0;
    return {1'b0, task_r[flows[j].src]} + {1'b0, ji};
  endfunction

  logic           ud_start, ud_busy, ud_done;
  logic [DDW-1:0] ud_q, ud_r, u_ceil;
  seq_divider #(.DW(DDW)) u_udiv (
    .clk(clk), .rst_n(rst_n), .start(ud_start),
    .dividend(DDW'(c_mem[i_q]) << FRAC), .divisor(DDW'(tasks[src_q].t)),
    .busy(ud_busy), .done(ud_done), .quotient(ud_q), .remainder(ud_r)
  );
  assign ud_start = (state_q == S_UTIL);
  assign u_ceil   = ud_q + DDW'(ud_r != '0);

  idx_t  b_idx;
  logic  b_start, b_busy, b_done, lb_ok, ub_ok;
  time_t lb, ub;
  rta_bounds #(.MAX_N(MAX_FLOWS)) u_bnd (
    .clk(clk), .rst_n(rst_n), .start(b_start), .is_task(1'b0),
    .want_lb(use_nlb), .want_ub(use_pre), .base(c_mem[i_q]), .set(set_q),
    .rd_idx(b_idx), .c_j(c_mem[b_idx]), .u_dn_j(u_dn[b_idx]),
    .u_up_j(u_up[b_idx]), .jit_j(jitter(b_idx)), .busy(b_busy),
    .done(b_done), .lb(lb), .lb_ok(lb_ok), .ub(ub), .ub_ok(ub_ok)
  );
  assign b_start = (state_q == S_BND);

  idx_t        e_idx;
  logic        e_start, e_busy, e_done, e_sched;
  time_t       e_resp, e_init;
  logic [15:0] e_passes;
  assign e_init = (use_nlb && lb_ok) ? lb : c_mem[i_q];
  rta_engine #(.MAX_N(MAX_FLOWS)) u_eng (
    .clk(clk), .rst_n(rst_n), .start(e_start), .base(c_mem[i_q]),
    .init(e_init), .limit(lim_q), .set(set_q), .rd_idx(e_idx),
    .c_j(c_mem[e_idx]), .t_j(tasks[flows[e_idx].src].t),
    .jit_j(jitter(e_idx)), .busy(e_busy), .done(e_done), .resp(e_resp),
    .sched(e_sched), .passes(e_passes)
  );
  assign e_start = (state_q == S_RTA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      i_q        <= '0;
      scheme_q   <= SCHEME_E2ERTA;
      src_q      <= '0;
      lim_q      <= '0;
      blocked_q  <= 1'b0;
      set_q      <= '0;
      iset_q     <= '0;
      busy       <= 1'b0;
      front_done <= 1'b0;
      done       <= 1'b0;
      wr_en      <= 1'b0;
      wr_idx     <= '0;
      wr_r       <= '0;
      wr_sched   <= 1'b0;
      n_pre      <= '0;
      n_lbrej    <= '0;
      n_exact    <= '0;
    end else begin
      front_done <= 1'b0;
      done       <= 1'b0;
      wr_en      <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          scheme_q <= scheme;
          i_q      <= '0;
          n_pre    <= '0;
          n_lbrej  <= '0;
          n_exact  <= '0;
          busy     <= 1'b1;
          state_q  <= S_ROUTE;
        end
        // ---- front end
        S_ROUTE: if (i_q == num_flows) begin
          front_done <= 1'b1;
          i_q        <= '0;
          state_q    <= S_WAIT;
        end else begin
          state_q    <= S_ROUTEW;
        end
        S_ROUTEW: if (rt_done) begin
          route_mem[i_q] <= rt_route;
          c_mem[i_q]     <= bl_c;
          state_q        <= S_DI;
        end
        S_DI:  state_q <= S_DIW;
        S_DIW: if (di_done) begin
          di_mem[i_q] <= di_vec;
          state_q     <= S_II;
        end
        S_II:  state_q <= S_IIW;
        S_IIW: if (ii_done) begin
          ii_mem[i_q] <= ii_vec;
          i_q         <= i_q + 1'b1;
          state_q     <= S_ROUTE;
        end
        // ---- response times
        S_WAIT: if (tasks_ready) state_q <= S_SETUP;
        S_SETUP: if (i_q == num_flows) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end else begin
          src_q  <= flows[i_q].src;
          set_q  <= di_mem[i_q];
          iset_q <= ii_mem[i_q];
          lim_q  <= tasks[flows[i_q].src].d - task_r[flows[i_q].src];
          blocked_q <= task_r[flows[i_q].src] > tasks[flows[i_q].src].d;
          if (scheme_q != SCHEME_E2ERTA) begin
            state_q <= S_UTIL;     // U_i is needed by lower flows in any case
          end else if (task_r[flows[i_q].src] > tasks[flows[i_q].src].d) begin
            // The initial task misses its deadline: so does the flow.
            r_mem[i_q] <= c_mem[i_q];
            wr_en      <= 1'b1;
            wr_idx     <= i_q;
            wr_r       <= c_mem[i_q];
            wr_sched   <= 1'b0;
            i_q        <= i_q + 1'b1;
          end else begin
            state_q <= S_RTA;
          end
        end
        S_UTIL:  state_q <= S_UTILW;
        S_UTILW: if (ud_done) begin
          u_dn[i_q] <= (ud_q > DDW'(U_ONE))   ? U_ONE : util_t'(ud_q);
          u_up[i_q] <= (u_ceil > DDW'(U_ONE)) ? U_ONE : util_t'(u_ceil);
          if (blocked_q) begin
            r_mem[i_q] <= c_mem[i_q];
            wr_en      <= 1'b1;
            wr_idx     <= i_q;
            wr_r       <= c_mem[i_q];
            wr_sched   <= 1'b0;
            i_q        <= i_q + 1'b1;
            state_q    <= S_SETUP;
          end else begin
            state_q    <= S_BND;
          end
        end
        S_BND:  state_q <= S_BNDW;
        S_BNDW: if (b_done) begin
          if (use_pre && ub_ok && ub <= lim_q) begin
            r_mem[i_q] <= ub;
            wr_en      <= 1'b1;
            wr_idx     <= i_q;
            wr_r       <= ub;
            wr_sched   <= 1'b1;
            n_pre      <= n_pre + 16'd1;
            i_q        <= i_q + 1'b1;
            state_q    <= S_SETUP;
          end else if (use_pre && use_nlb && lb_ok && lb > lim_q) begin
            r_mem[i_q] <= lb;
            wr_en      <= 1'b1;
            wr_idx     <= i_q;
            wr_r       <= lb;
            wr_sched   <= 1'b0;
            n_lbrej    <= n_lbrej + 16'd1;
            i_q        <= i_q + 1'b1;
            state_q    <= S_SETUP;
          end else begin
            state_q    <= S_RTA;
          end
        end
        S_RTA:  state_q <= S_RTAW;
        S_RTAW: if (e_done) begin
          r_mem[i_q] <= e_resp;
          wr_en      <= 1'b1;
          wr_idx     <= i_q;
          wr_r       <= e_resp;
          wr_sched   <= e_sched;
          n_exact    <= n_exact + 16'd1;
          i_q        <= i_q + 1'b1;
          state_q    <= S_SETUP;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
