// tb_ga_eval: self-checking test of the lockstep fitness function.
//
// A small configuration (3 E2ERTA instances, 4x4 mesh, up to 32 tasks and
// flows, 8 population slots) evaluates random chromosomes of random task
// sets. Each chromosome's fitness is recomputed by the software reference
// model (unschedulable tasks plus unschedulable flows under that mapping)
// and compared; with PRE, whose upper bounds feed the flow jitters, the
// fitness may only be larger. The test also checks that every listed slot
// gets exactly one fitness write and no other slot gets any, and that the
// number of lockstep batches is ceil(count / instances used) for 1 to 3
// instances. It counts partial batches, idle instance-cycles spent waiting
// for the slowest instance, and evaluations with and without unschedulable
// entries, and fails any that never happened.
module tb_ga_eval;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;

  localparam int POP = 4, NS = 2 * POP, NI = 3, COLS = 4, ROWS = 4, MT = 32, MF = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, stats_clr = 0;
  logic [7:0]  list [NS];
  logic [7:0]  first = '0, count = '0, num_inst = '0;
  scheme_e     scheme = SCHEME_E2ERTA;
  idx_t        num_tasks = '0, num_flows = '0;
  task_info_t  tasks [MT];
  flow_info_t  flows [MF];
  idx_t        rd_gene;
  idx_t        rd_slot [NI];
  core_t       rd_data [NI];
  logic [NI-1:0] fit_we;
  idx_t        fit_slot [NI];
  logic [15:0] fit_val [NI];
  logic        busy, done;
  logic [31:0] n_evals, n_batches, n_partial, idle_cycles, n_pre, n_lbrej, n_exact;

  ga_eval #(
    .POP_SIZE(POP), .N_INST(NI), .MESH_COLS(COLS), .MESH_ROWS(ROWS),
    .MAX_TASKS(MT), .MAX_FLOWS(MF)
  ) dut (.*);

  core_t popm [NS][MT];
  always_comb
    for (int k = 0; k < NI; k++) rd_data[k] = popm[rd_slot[k]][rd_gene];

  int checks = 0, failures = 0;
  int m_zero = 0, m_nonzero = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [NS];
    int nwr [NS];
    cols = COLS; rows = ROWS;
    foreach (list[s]) list[s] = 8'(s);
    foreach (tasks[i]) tasks[i] = '0;
    foreach (flows[i]) flows[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 24; run++) begin
      automatic int nt = $urandom_range(MT, 4);
      automatic int nf = $urandom_range(MF, 1);
      automatic int ut = (run % 3 == 0) ? 20 : 60;
      automatic int fst = $urandom_range(NS - 1);
      automatic int cnt = $urandom_range(NS - fst, 1);
      automatic int b0 = n_batches, p0 = n_partial;
      automatic int ni = (run % 4 == 0) ? NI : $urandom_range(NI, 1);
      gen(nt, nf, COLS * ROWS, ut, 200, 4000, 40);
      for (int i = 0; i < nt; i++)
        tasks[i] = '{core: '0, c: time_t'(c[i]), t: time_t'(t[i]), d: time_t'(d[i])};
      for (int i = 0; i < nf; i++)
        flows[i] = '{src: idx_t'(fsrc[i]), dst: idx_t'(fdst[i]), len: time_t'(flen[i])};
      // chromosomes: mostly random, some crowded onto few cores
      for (int s = 0; s < NS; s++) begin
        automatic int nc = (s % 2 == 0) ? COLS * ROWS : 2;
        for (int g = 0; g < MT; g++) popm[s][g] = core_t'($urandom_range(nc - 1));
      end
      list.shuffle();
      foreach (nwr[s]) nwr[s] = 0;
      first = 8'(fst); count = 8'(cnt);
      num_inst = (run % 4 == 0) ? 8'd0 : 8'(ni);   // 0 selects all instances
      num_tasks = idx_t'(nt); num_flows = idx_t'(nf);
      scheme = scheme_e'(run % 4);
      start = 1;
      @(negedge clk);
      start = 0;
      do begin
        @(negedge clk);
        for (int k = 0; k < NI; k++)
          if (fit_we[k]) begin nwr[fit_slot[k]]++; got[fit_slot[k]] = fit_val[k]; end
      end while (!done);
      check(int'(n_batches) - b0 == (cnt + ni - 1) / ni,
            $sformatf("run %0d batches %0d", run, int'(n_batches) - b0));
      check(int'(n_partial) - p0 == ((cnt % ni) != 0 ? 1 : 0), $sformatf("run %0d partial", run));
      for (int s = 0; s < NS; s++) begin
        automatic bit listed = 0;
        for (int q = fst; q < fst + cnt; q++) if (int'(list[q]) == s) listed = 1;
        check(nwr[s] == (listed ? 1 : 0), $sformatf("run %0d slot %0d written %0d times", run, s, nwr[s]));
        if (listed) begin
          automatic int eu, ef;
          automatic bit amb;
          for (int i = 0; i < nt; i++) core[i] = longint'(popm[s][i]);
          fitness(nt, nf, eu, ef, amb);
          if (amb)
            check(got[s] >= eu + 1, $sformatf("run %0d slot %0d fitness %0d (ref %0d+%0d, ambiguous)", run, s, got[s], eu, ef));
          else if (scheme[0])
            check(got[s] >= eu + ef, $sformatf("run %0d slot %0d fitness %0d below exact %0d", run, s, got[s], eu + ef));
          else
            check(got[s] == eu + ef, $sformatf("run %0d slot %0d fitness %0d expected %0d", run, s, got[s], eu + ef));
          if (eu + ef == 0) m_zero++; else m_nonzero++;
        end
      end
      @(negedge clk);
    end
    $display("evals=%0d batches=%0d partial=%0d idle_cycles=%0d pre=%0d lbrej=%0d exact=%0d fit0=%0d fit>0=%0d",
             n_evals, n_batches, n_partial, idle_cycles, n_pre, n_lbrej, n_exact, m_zero, m_nonzero);
    check(n_partial > 0, "no partial batch");
    check(idle_cycles > 0, "no lockstep waiting");
    check(m_zero > 0 && m_nonzero > 0, "fitness never zero or never non-zero");
    check(n_pre > 0 && n_lbrej > 0 && n_exact > 0, "a speed-up path never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
