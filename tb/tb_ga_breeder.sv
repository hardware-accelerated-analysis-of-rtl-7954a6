// tb_ga_breeder: self-checking test of the offspring generator.
//
// The testbench owns the random stream (a new 32-bit value every cycle),
// a model of the population memory and the fitness table, so it can work
// out each child independently: the two tournaments, the crossover
// decision and the per-gene mutation use the values of the cycles the
// timing in ga_breeder's header gives. Every written gene, the destination
// slot, the crossover and mutation reports and the latency (num_tasks + 4
// cycles from start to done) are compared. Rates 0, 255 and random ones
// are used, with tied and untied fitness values.
module tb_ga_breeder;
  import e2erta_pkg::*;

  localparam int POP = 16, NS = 2 * POP, MT = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  idx_t        dst_slot = '0, pop_size = '0, num_tasks = '0;
  logic [15:0] ncores = '0;
  logic [7:0]  cx_rate = '0, mut_rate = '0;
  idx_t        parents [POP];
  logic [15:0] fit [NS];
  logic [31:0] rnd = '0;
  idx_t        rd_slot_a, rd_slot_b, rd_gene;
  core_t       rd_a, rd_b;
  logic        we, busy, done, cx_done;
  idx_t        wr_slot, wr_gene;
  core_t       wr_data;
  logic [15:0] mutated;

  ga_breeder #(.POP_SIZE(POP)) dut (.*);

  core_t popm [NS][MT];
  assign rd_a = popm[rd_slot_a][rd_gene];
  assign rd_b = popm[rd_slot_b][rd_gene];

  int checks = 0, failures = 0;
  int n_cx = 0, n_mut = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(logic [31:0] r, int p);
    int i1 = int'((longint'(r[15:0]) * p) >> 16);
    int i2 = int'((longint'(r[31:16]) * p) >> 16);
    return (fit[parents[i1]] <= fit[parents[i2]]) ? int'(parents[i1]) : int'(parents[i2]);
  endfunction

  initial begin
    logic [31:0] rlog [MT + 8];
    int child [MT];
    foreach (parents[k]) parents[k] = '0;
    foreach (fit[s]) fit[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      automatic int p  = $urandom_range(POP, 2);
      automatic int nt = (run % 7 == 0) ? $urandom_range(4, 1) : $urandom_range(MT, 1);
      automatic int nc = (run % 5 == 0) ? 256 : $urandom_range(100, 1);
      automatic int cxr = (run % 4 == 0) ? 0 : (run % 4 == 1) ? 255 : $urandom_range(255);
      automatic int mr  = (run % 6 == 0) ? 0 : (run % 6 == 1) ? 255 : $urandom_range(40);
      automatic int dst, pa, pb, lat, exp_mut;
      automatic bit cx;
      // slots: parents are a random permutation prefix, dst is a free slot
      for (int s = 0; s < NS; s++) begin
        fit[s] = (run % 2 == 0) ? 16'($urandom_range(3)) : 16'($urandom);
        for (int g = 0; g < MT; g++) popm[s][g] = core_t'($urandom_range(nc - 1));
      end
      for (int k = 0; k < POP; k++) parents[k] = idx_t'((k * 7 + run) % NS);
      dst = (p * 7 + run) % NS;
      foreach (child[g]) child[g] = -1;
      pop_size = idx_t'(p); num_tasks = idx_t'(nt); ncores = 16'(nc);
      cx_rate = 8'(cxr); mut_rate = 8'(mr); dst_slot = idx_t'(dst);
      start = 1;
      rnd = $urandom; rlog[0] = rnd;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin
        if (lat < MT + 8) begin rnd = $urandom; rlog[lat] = rnd; end
        @(negedge clk);
        if (we) begin
          check(int'(wr_slot) == dst, $sformatf("run %0d wrong slot %0d", run, wr_slot));
          child[wr_gene] = int'(wr_data);
        end
        lat++;
      end
      check(lat == nt + 5, $sformatf("run %0d latency %0d expected %0d", run, lat - 1, nt + 4));
      // expected child
      pa = pick(rlog[1], p);
      pb = pick(rlog[2], p);
      cx = rlog[3][7:0] < 8'(cxr);
      exp_mut = 0;
      check(cx_done == cx, $sformatf("run %0d crossover flag", run));
      for (int g = 0; g < nt; g++) begin
        automatic logic [31:0] r = rlog[4 + g];
        automatic int e;
        if (r[7:0] < 8'(mr)) begin
          e = int'((longint'(r[31:16]) * nc) >> 16);
          exp_mut++;
        end else
          e = (cx && g >= nt / 2) ? int'(popm[pb][g]) : int'(popm[pa][g]);
        check(child[g] == e, $sformatf("run %0d gene %0d = %0d expected %0d", run, g, child[g], e));
      end
      check(int'(mutated) == exp_mut, $sformatf("run %0d mutated %0d expected %0d", run, mutated, exp_mut));
      if (cx) n_cx++;
      n_mut += exp_mut;
      @(negedge clk);
    end
    $display("crossovers=%0d mutated genes=%0d", n_cx, n_mut);
    check(n_cx > 0 && n_mut > 0, "crossover or mutation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
