// tb_ga_mapper: end-to-end test of the genetic-algorithm task mapper with
// its E2ERTA fitness function, at the default size (population of up to
// 16, 5 lockstep E2ERTA instances, 10x10 mesh, up to 128 tasks and flows).
//
// Several searches run on random task sets of different sizes and loads,
// with population sizes 16, 6 and 8, 2 to 5 fitness instances and all four
// assembly schemes. After
// every generation the testbench reads the population (slot list, fitness
// table and chromosomes inside the design) and checks that:
//   - every parent's fitness, and from the first offspring on every
//     slot's fitness, equals the reference analysis of its mapping
//     (unschedulable tasks + flows, e2erta_ref_pkg); with PRE, whose
//     upper bounds feed the flow jitters, it may only be larger;
//   - the parents are sorted by fitness and best_fit is the first one;
//   - the best fitness never gets worse;
//   - every gene is a core in 0..ncores-1.
// At the end of a search it checks the stop rule (best fitness 0, or the
// generation limit), the number of evaluations and lockstep batches, the
// best-mapping readback port and the cycle counters. It counts crossover,
// mutation, partial batches, lockstep waiting, improvement of the best
// mapping, both stop reasons, and the PRE / lower-bound / exact paths of
// the analysis, and fails any that never happened. GA operator and fitness
// cycles per generation are printed in the form of the document's table.
module tb_ga_mapper;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;

  localparam int POP = 16, NI = 5, COLS = 10, ROWS = 10, MT = 128, MF = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        task_we = 0, flow_we = 0, start = 0;
  idx_t        task_widx = '0, flow_widx = '0;
  task_info_t  task_wdata = '0;
  flow_info_t  flow_wdata = '0;
  logic [7:0]  num_inst = '0;
  idx_t        pop_size = '0, num_tasks = '0, num_flows = '0, rd_gene = '0;
  logic [15:0] num_gen = '0, ncores = '0;
  logic [7:0]  cx_rate = '0, mut_rate = '0;
  scheme_e     scheme = SCHEME_E2ERTA;
  logic [31:0] seed = '0;
  logic        busy, done, gen_done;
  logic [15:0] generation, best_fit;
  idx_t        best_slot;
  core_t       rd_best_core;
  logic [31:0] ops_cycles, eval_cycles, n_evals, n_batches, n_partial,
               idle_cycles, n_cx, n_mut, n_pre, n_lbrej, n_exact;

  ga_mapper dut (.*);

  int checks = 0, failures = 0;
  int m_cx = 0, m_mut = 0, m_partial = 0, m_idle = 0, m_improve = 0,
      m_found = 0, m_limit = 0, m_pre = 0, m_lbrej = 0, m_exact = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int nt, int nf);
    for (int i = 0; i < nt; i++) begin
      task_we = 1; task_widx = idx_t'(i);
      task_wdata = '{core: '0, c: time_t'(c[i]), t: time_t'(t[i]), d: time_t'(d[i])};
      @(negedge clk);
    end
    task_we = 0;
    for (int i = 0; i < nf; i++) begin
      flow_we = 1; flow_widx = idx_t'(i);
      flow_wdata = '{src: idx_t'(fsrc[i]), dst: idx_t'(fdst[i]), len: time_t'(flen[i])};
      @(negedge clk);
    end
    flow_we = 0;
  endtask

  // Check the population after a ranking: the parents, and from the first
  // bred generation on also the losers (all slots have been evaluated).
  task automatic check_parents(int tag, int p, int nt, int nf, int nc);
    int prev = -1;
    int n = (generation == 0) ? p : 2 * p;
    for (int k = 0; k < n; k++) begin
      automatic int slot = int'(dut.order_q[k]);
      automatic int f = int'(dut.fit_q[slot]);
      automatic int eu, ef;
      automatic bit amb, cores_ok = 1;
      for (int g = 0; g < nt; g++) begin
        core[g] = longint'(dut.u_pop.genes[slot][g]);
        if (core[g] >= nc) cores_ok = 0;
      end
      check(cores_ok, $sformatf("search %0d gen %0d slot %0d has a core out of range", tag, generation, slot));
      fitness(nt, nf, eu, ef, amb);
      check(f <= nt + nf, $sformatf("search %0d gen %0d slot %0d not evaluated (%0d)", tag, generation, slot, f));
      if (amb)
        check(f >= eu + 1, $sformatf("search %0d slot %0d fitness %0d ref %0d+%0d (ambiguous)", tag, slot, f, eu, ef));
      else if (scheme[0])
        // PRE keeps upper bounds as response times, and they feed the flow
        // jitters: the result may only be more pessimistic.
        check(f >= eu + ef, $sformatf("search %0d gen %0d slot %0d fitness %0d below exact %0d", tag, generation, slot, f, eu + ef));
      else
        check(f == eu + ef, $sformatf("search %0d gen %0d slot %0d fitness %0d expected %0d", tag, generation, slot, f, eu + ef));
      if (k < p) begin
        check(f >= prev, $sformatf("search %0d parents not sorted at %0d", tag, k));
        prev = f;
      end else begin
        check(f >= prev, $sformatf("search %0d a loser beats parent %0d", tag, p - 1));
      end
      if (k == 0) check(int'(best_fit) == f && int'(best_slot) == slot, $sformatf("search %0d best", tag));
    end
  endtask

  task automatic search(int tag, int p, int ni, int nt, int nf, int gen_ncores,
                        int util, int nc, int ngen, scheme_e sch);
    int last_best = 1 << 20, total = 0, cx0 = n_cx;
    gen(nt, nf, gen_ncores, util, 2000, 20000, 200);
    load(nt, nf);
    pop_size = idx_t'(p); num_inst = 8'(ni); num_tasks = idx_t'(nt); num_flows = idx_t'(nf);
    num_gen = 16'(ngen); ncores = 16'(nc); scheme = sch;
    cx_rate = 8'd200; mut_rate = 8'd12; seed = $urandom;
    start = 1;
    @(negedge clk);
    start = 0;
    total = 1;
    while (!done) begin
      if (gen_done) begin
        check_parents(tag, p, nt, nf, nc);
        check(int'(best_fit) <= last_best, $sformatf("search %0d best fitness got worse", tag));
        if (last_best != (1 << 20) && int'(best_fit) < last_best) m_improve++;
        last_best = int'(best_fit);
      end
      @(negedge clk);
      total++;
    end
    check(int'(generation) <= ngen, $sformatf("search %0d generation %0d > limit", tag, generation));
    check(best_fit == 0 || int'(generation) == ngen, $sformatf("search %0d stopped early", tag));
    check(int'(n_evals) == p * (int'(generation) + 1), $sformatf("search %0d evals %0d", tag, n_evals));
    check(int'(n_batches) == ((p + ni - 1) / ni) * (int'(generation) + 1), $sformatf("search %0d batches", tag));
    check(int'(ops_cycles + eval_cycles) >= total - 2 && int'(ops_cycles + eval_cycles) <= total + 2,
          $sformatf("search %0d cycle counters %0d+%0d vs %0d", tag, ops_cycles, eval_cycles, total));
    check(ops_cycles > 0 && eval_cycles > ops_cycles, $sformatf("search %0d cycle split", tag));
    for (int g = 0; g < nt; g++) begin
      rd_gene = idx_t'(g);
      #1;
      check(rd_best_core == dut.u_pop.genes[best_slot][g], $sformatf("search %0d readback gene %0d", tag, g));
    end
    if (best_fit == 0) m_found++;
    if (int'(generation) == ngen && best_fit != 0) m_limit++;
    m_cx += int'(n_cx); m_mut += int'(n_mut);
    m_partial += int'(n_partial); m_idle += int'(idle_cycles);
    m_pre += int'(n_pre); m_lbrej += int'(n_lbrej); m_exact += int'(n_exact);
    $display("search %0d: pop %0d, %0d instances, %0d tasks/%0d flows on %0d cores, scheme %0d: %0d generations, best fitness %0d, GA ops %0d cycles/gen, E2ERTA %0d cycles/gen",
             tag, p, ni, nt, nf, nc, sch, generation, best_fit,
             ops_cycles / (generation + 1), eval_cycles / (generation + 1));
    @(negedge clk);
  endtask

  initial begin
    cols = COLS; rows = ROWS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    //    tag pop inst nt  nf gencores util cores gens scheme
    search(0, 16, 4, 20, 20,  4, 60,  4, 12, SCHEME_PRENLB);
    search(1,  6, 5, 32, 32,  4, 95,  4,  4, SCHEME_PRE);
    search(2,  8, 2, 16, 16, 16, 20, 16, 10, SCHEME_NLB);
    search(3, 16, 5, 48, 48,  8, 70,  8,  3, SCHEME_E2ERTA);
    search(4,  6, 4, 24, 24,  6, 50,  6, 15, SCHEME_PRENLB);
    search(5,  6, 3, 16, 16,  3, 80,  3,  6, SCHEME_PRE);
    $display("mechanisms: crossover=%0d mutation=%0d partial_batch=%0d lockstep_wait=%0d improve=%0d found=%0d limit=%0d pre=%0d lbrej=%0d exact=%0d",
             m_cx, m_mut, m_partial, m_idle, m_improve, m_found, m_limit, m_pre, m_lbrej, m_exact);
    check(m_cx > 0, "crossover never happened");
    check(m_mut > 0, "mutation never happened");
    check(m_partial > 0, "no partial lockstep batch");
    check(m_idle > 0, "no instance waited in lockstep");
    check(m_improve > 0, "the best mapping never improved");
    check(m_found > 0, "no search found a schedulable mapping");
    check(m_limit > 0, "no search hit the generation limit");
    check(m_pre > 0, "PRE never accepted");
    check(m_lbrej > 0, "lower bound never rejected");
    check(m_exact > 0, "exact recurrence never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
