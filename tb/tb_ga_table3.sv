// tb_ga_table3: runs the genetic-algorithm configurations of the
// performance table (population 6 with 2, 3, 4 and 5 E2ERTA instances,
// population 8 with 2 and 4, population 16 with 2 and 4) on the default
// design, and prints the average GA-operator and fitness-function cycles
// per generation for each.
//
// All configurations search the same random task set (32 tasks and 32
// flows on 8 cores) with the same seed for a fixed number of generations.
// The random stream is consumed only by the GA operators, so a search must
// give the same result whatever the number of instances: the testbench
// checks that best fitness, generations, evaluations and GA operator
// cycles agree across instance counts of one population size. It checks
// the number of lockstep batches, checks that a configuration whose
// batches are unions of another's (4 vs 2 instances) is not slower, and
// checks the best mapping's fitness against the reference model. Lockstep
// waiting is counted and must occur.
module tb_ga_table3;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;

  localparam int COLS = 10, ROWS = 10;
  localparam int NCONF = 8, NT = 32, NCORES = 8, NGEN = 4;
  localparam int CONF_POP [NCONF] = '{6, 6, 6, 6, 8, 8, 16, 16};
  localparam int CONF_NI  [NCONF] = '{2, 3, 4, 5, 2, 4, 2, 4};

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
  scheme_e     scheme = SCHEME_PRENLB;
  logic [31:0] seed = '0;
  logic        busy, done, gen_done;
  logic [15:0] generation, best_fit;
  idx_t        best_slot;
  core_t       rd_best_core;
  logic [31:0] ops_cycles, eval_cycles, n_evals, n_batches, n_partial,
               idle_cycles, n_cx, n_mut, n_pre, n_lbrej, n_exact;

  ga_mapper dut (.*);

  int checks = 0, failures = 0;

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

  initial begin
    int r_fit [NCONF], r_gen [NCONF], r_evals [NCONF], r_ops [NCONF], r_eval [NCONF];
    int idle_total = 0;
    cols = COLS; rows = ROWS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    gen(NT, NT, NCORES, 70, 2000, 20000, 200);
    for (int i = 0; i < NT; i++) begin
      task_we = 1; task_widx = idx_t'(i);
      task_wdata = '{core: '0, c: time_t'(c[i]), t: time_t'(t[i]), d: time_t'(d[i])};
      @(negedge clk);
    end
    task_we = 0;
    for (int i = 0; i < NT; i++) begin
      flow_we = 1; flow_widx = idx_t'(i);
      flow_wdata = '{src: idx_t'(fsrc[i]), dst: idx_t'(fdst[i]), len: time_t'(flen[i])};
      @(negedge clk);
    end
    flow_we = 0;
    $display("population | instances | GA operators (cycles/gen) | E2ERTA (cycles/gen) | best fitness");
    for (int k = 0; k < NCONF; k++) begin
      automatic int p = CONF_POP[k], ni = CONF_NI[k];
      automatic int eu, ef;
      automatic bit amb;
      pop_size = idx_t'(p); num_inst = 8'(ni);
      num_tasks = idx_t'(NT); num_flows = idx_t'(NT);
      num_gen = 16'(NGEN); ncores = 16'(NCORES);
      cx_rate = 8'd200; mut_rate = 8'd12; seed = 32'h1234_5678;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      r_fit[k] = int'(best_fit); r_gen[k] = int'(generation); r_evals[k] = int'(n_evals);
      r_ops[k] = int'(ops_cycles); r_eval[k] = int'(eval_cycles);
      idle_total += int'(idle_cycles);
      $display("%10d | %9d | %25d | %19d | %0d", p, ni, ops_cycles / (generation + 1),
               eval_cycles / (generation + 1), best_fit);
      check(int'(n_batches) == ((p + ni - 1) / ni) * (int'(generation) + 1),
            $sformatf("config %0d batches %0d", k, n_batches));
      check(int'(n_evals) == p * (int'(generation) + 1), $sformatf("config %0d evals", k));
      for (int g = 0; g < NT; g++) core[g] = longint'(dut.u_pop.genes[best_slot][g]);
      fitness(NT, NT, eu, ef, amb);
      // PRE+NLB: upper bounds may make the fitness more pessimistic
      check(amb ? (best_fit > 0) : (int'(best_fit) >= eu + ef),
            $sformatf("config %0d best fitness %0d below reference %0d", k, best_fit, eu + ef));
      @(negedge clk);
    end
    for (int k = 1; k < NCONF; k++)
      if (CONF_POP[k] == CONF_POP[k-1] || (k >= 2 && CONF_POP[k] == CONF_POP[0])) begin
        automatic int b = (CONF_POP[k] == CONF_POP[k-1]) ? k - 1 : 0;
        check(r_fit[k] == r_fit[b] && r_gen[k] == r_gen[b] && r_evals[k] == r_evals[b],
              $sformatf("config %0d search differs from config %0d", k, b));
        check(r_ops[k] == r_ops[b], $sformatf("config %0d GA operator cycles %0d vs %0d", k, r_ops[k], r_ops[b]));
      end
    // 4 instances versus 2: each 4-batch is the union of two 2-batches
    check(r_eval[2] <= r_eval[0], "population 6: 4 instances slower than 2");
    check(r_eval[5] <= r_eval[4], "population 8: 4 instances slower than 2");
    check(r_eval[7] <= r_eval[6], "population 16: 4 instances slower than 2");
    $display("speed-up 2 -> 4 instances: pop 6 %.2f, pop 8 %.2f, pop 16 %.2f",
             real'(r_eval[0]) / r_eval[2], real'(r_eval[4]) / r_eval[5], real'(r_eval[6]) / r_eval[7]);
    check(idle_total > 0, "no lockstep waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
