// tb_e2erta_top: end-to-end test of the E2ERTA accelerator at its default
// size (10x10 mesh, up to 128 tasks and 128 flows).
//
// Random task sets of 16, 32, 64 and 128 tasks (as many flows as tasks) at
// task/flow loads from 10 % to 90 % are loaded through the table ports and
// analysed with all four assembly schemes. Expected results come from the
// software reference model in e2erta_ref_pkg:
//   - route, basic latency, direct and indirect interference set of every
//     flow must match exactly;
//   - task verdicts must match the exact analysis in every scheme; task
//     response times must match exactly without PRE and may only be larger
//     (a safe upper bound) with PRE;
//   - each flow result is checked against the reference recurrence fed
//     with the jitters the accelerator itself reported, with the same rule;
//   - NLB must give exactly the results of the plain analysis, and a flow
//     accepted under PRE must also be accepted by the plain analysis;
//   - the unschedulable counters must equal the number of failing entries.
// The test also counts how often each mechanism occurred (PRE acceptance,
// lower-bound rejection, exact fallback, NLB-started recurrence, deadline
// misses of tasks and flows, flows blocked by their initial task, flows
// kept inside one core, indirect interference, interference jitter) and
// fails a mechanism that never happened. Cycle counts per run are printed.
module tb_e2erta_top;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;

  localparam int COLS = 10, ROWS = 10, MT = 128, MF = 128;
  localparam int NL = 2*COLS*ROWS + 2*COLS*(ROWS-1) + 2*ROWS*(COLS-1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic task_we = 0, flow_we = 0, start = 0;
  idx_t task_widx = '0, flow_widx = '0, num_tasks = '0, num_flows = '0, rd_idx = '0;
  task_info_t task_wdata = '0;
  flow_info_t flow_wdata = '0;
  scheme_e scheme = SCHEME_E2ERTA;
  logic busy, done, rd_task_sched, rd_flow_sched;
  logic [31:0] cycles;
  logic [15:0] unsched_tasks, unsched_flows, task_n_pre, task_n_lbrej,
               task_n_exact, flow_n_pre, flow_n_lbrej, flow_n_exact;
  time_t rd_task_r, rd_flow_r, rd_flow_c;
  logic [NL-1:0] rd_flow_route;
  logic [MF-1:0] rd_flow_di, rd_flow_ii;

  e2erta_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_pre = 0, m_lbrej = 0, m_exact = 0, m_nlb = 0, m_tmiss = 0,
      m_fmiss = 0, m_fblocked = 0, m_local = 0, m_indirect = 0, m_jitter = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int nt, int nf);
    @(negedge clk);
    for (int i = 0; i < nt; i++) begin
      task_we = 1; task_widx = idx_t'(i);
      task_wdata = '{core: core_t'(core[i]), c: time_t'(c[i]),
                     t: time_t'(t[i]), d: time_t'(d[i])};
      @(negedge clk);
    end
    task_we = 0;
    for (int i = 0; i < nf; i++) begin
      flow_we = 1; flow_widx = idx_t'(i);
      flow_wdata = '{src: idx_t'(fsrc[i]), dst: idx_t'(fdst[i]),
                     len: time_t'(flen[i])};
      @(negedge clk);
    end
    flow_we = 0;
  endtask

  task automatic run(scheme_e s, int nt, int nf);
    @(negedge clk);
    scheme = s; num_tasks = idx_t'(nt); num_flows = idx_t'(nf);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(!busy, "busy low after done");
  endtask

  // results of the plain analysis of the current set
  bit     base_ts [MT];
  bit     base_fs [MF];
  longint base_tr [MT];
  longint base_fr [MF];

  task automatic check_run(scheme_e s, int nt, int nf, int tag);
    bit rs; longint rr;
    int nmiss_t = 0, nmiss_f = 0;
    // front end
    for (int i = 0; i < nf; i++) begin
      rd_idx = idx_t'(i); #1;
      check(rd_flow_route == route[i][NL-1:0], $sformatf("set %0d flow %0d route", tag, i));
      check(rd_flow_c == time_t'(cbase[i]), $sformatf("set %0d flow %0d C", tag, i));
      check(rd_flow_di == di[i][MF-1:0], $sformatf("set %0d flow %0d S_id", tag, i));
      check(rd_flow_ii == ii[i][MF-1:0], $sformatf("set %0d flow %0d S_ii", tag, i));
      if (cbase[i] == 0) m_local++;
      if (ii[i] != '0) m_indirect++;
    end
    // tasks
    for (int i = 0; i < nt; i++) begin
      rd_idx = idx_t'(i); #1;
      task_rta(i, rs, rr);
      check(rd_task_sched == rs, $sformatf("set %0d scheme %0d task %0d verdict %0d/%0d", tag, s, i, rd_task_sched, rs));
      if (rs && rd_task_sched) begin
        if (s[0]) check(longint'(rd_task_r) >= rr, $sformatf("task %0d bound", i));
        else      check(longint'(rd_task_r) == rr, $sformatf("set %0d task %0d r %0d/%0d", tag, i, rd_task_r, rr));
      end
      if (!rd_task_sched) nmiss_t++;
      task_r[i] = longint'(rd_task_r);
      if (s == SCHEME_E2ERTA) begin
        base_ts[i] = rd_task_sched; base_tr[i] = longint'(rd_task_r);
      end else if (s == SCHEME_NLB) begin
        check(rd_task_sched == base_ts[i] && (!rd_task_sched || longint'(rd_task_r) == base_tr[i]),
              $sformatf("NLB task %0d differs from plain", i));
      end
    end
    for (int i = 0; i < nf; i++) begin
      rd_idx = idx_t'(i); #1;
      flow_r[i] = longint'(rd_flow_r);
    end
    // flows
    for (int i = 0; i < nf; i++) begin
      rd_idx = idx_t'(i); #1;
      flow_rta(i, rs, rr);
      check(rd_flow_sched == rs, $sformatf("set %0d scheme %0d flow %0d verdict %0d/%0d", tag, s, i, rd_flow_sched, rs));
      if (rs && rd_flow_sched) begin
        if (s[0]) check(longint'(rd_flow_r) >= rr, $sformatf("flow %0d bound", i));
        else      check(longint'(rd_flow_r) == rr, $sformatf("set %0d flow %0d R %0d/%0d", tag, i, rd_flow_r, rr));
      end
      if (!rd_flow_sched) nmiss_f++;
      if (task_r[fsrc[i]] > d[fsrc[i]]) m_fblocked++;
      for (int j = 0; j < i; j++)
        if (di[i][j] && (di[j] & ii[i]) != '0 && flow_r[j] > cbase[j]) m_jitter++;
      if (s == SCHEME_E2ERTA) begin
        base_fs[i] = rd_flow_sched; base_fr[i] = longint'(rd_flow_r);
      end else if (s == SCHEME_NLB) begin
        // A missed deadline upstream leaves a scheme-dependent value as
        // jitter, so only flows free of such inputs must agree exactly.
        bit clean = base_ts[fsrc[i]];
        for (int j = 0; j < i; j++)
          if (di[i][j] && (!base_ts[fsrc[j]] || ((di[j] & ii[i]) != '0 && !base_fs[j])))
            clean = 0;
        if (clean)
          check(rd_flow_sched == base_fs[i] && (!rd_flow_sched || longint'(rd_flow_r) == base_fr[i]),
                $sformatf("NLB flow %0d differs from plain", i));
      end else begin
        check(!rd_flow_sched || base_fs[i], $sformatf("PRE flow %0d accepted, plain rejects", i));
      end
    end
    check(int'(unsched_tasks) == nmiss_t, "unschedulable task count");
    check(int'(unsched_flows) == nmiss_f, "unschedulable flow count");
    m_tmiss += nmiss_t;
    m_fmiss += nmiss_f;
    m_pre   += task_n_pre + flow_n_pre;
    m_lbrej += task_n_lbrej + flow_n_lbrej;
    m_exact += task_n_exact + flow_n_exact;
    if (s[1]) m_nlb += task_n_exact + flow_n_exact;
    check(int'(task_n_pre + task_n_lbrej + task_n_exact) + nmiss_t >= nt, "task decisions");
  endtask

  localparam int SIZES [4] = '{16, 32, 64, 128};
  localparam int UTILS [5] = '{10, 30, 50, 70, 90};

  initial begin
    int tag = 0;
    real lsum [4];
    int  lcnt = 0;
    lsum = '{0.0, 0.0, 0.0, 0.0};
    cols = COLS; rows = ROWS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (SIZES[si]) foreach (UTILS[ui]) begin
      int nt, ncores;
      int cyc [4];
      nt = SIZES[si];
      // All cores of the mesh for most sets; every fourth set crowds the
      // tasks onto a corner of 3x3 cores to create more sharing.
      ncores = (tag % 4 == 3) ? 9 : COLS * ROWS;
      gen(nt, nt, ncores, UTILS[ui], 2000, 20000, 300);
      if (ncores == 9)
        for (int i = 0; i < nt; i++) core[i] = (core[i] / 3) * ROWS + core[i] % 3;
      flow_front(nt);
      load(nt, nt);
      for (int s = 0; s < 4; s++) begin
        run(scheme_e'(s), nt, nt);
        cyc[s] = cycles;
        lsum[s] += $ln(real'(cycles)) / $ln(10.0);
        check_run(scheme_e'(s), nt, nt, tag);
      end
      lcnt++;
      $display("set %0d: %0d tasks, load %0d%%, cycles E2ERTA=%0d PRE=%0d NLB=%0d PRENLB=%0d",
               tag, nt, UTILS[ui], cyc[0], cyc[1], cyc[2], cyc[3]);
      tag++;
    end
    $display("mean log10(cycles): E2ERTA %.3f PRE %.3f NLB %.3f PRENLB %.3f",
             lsum[0]/lcnt, lsum[1]/lcnt, lsum[2]/lcnt, lsum[3]/lcnt);
    $display("mechanisms: pre=%0d lbrej=%0d exact=%0d nlb=%0d task_miss=%0d flow_miss=%0d blocked=%0d local=%0d indirect=%0d jitter=%0d",
             m_pre, m_lbrej, m_exact, m_nlb, m_tmiss, m_fmiss, m_fblocked, m_local, m_indirect, m_jitter);
    check(m_pre > 0, "PRE acceptance never happened");
    check(m_lbrej > 0, "lower-bound rejection never happened");
    check(m_exact > 0, "exact recurrence never ran");
    check(m_nlb > 0, "NLB-started recurrence never ran");
    check(m_tmiss > 0, "no task missed a deadline");
    check(m_fmiss > 0, "no flow missed a deadline");
    check(m_fblocked > 0, "no flow was blocked by its initial task");
    check(m_local > 0, "no flow stayed inside a core");
    check(m_indirect > 0, "no indirect interference");
    check(m_jitter > 0, "interference jitter never applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
