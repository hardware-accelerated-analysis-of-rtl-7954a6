// tb_task_analysis: random task sets on a few cores, analysed with every
// assembly scheme. Verdicts must equal the exact analysis of the reference
// model; response times must be exact without PRE and a safe upper bound
// with PRE. Results must arrive once per task, in order.
module tb_task_analysis;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;
  localparam int NT = 32;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  scheme_e scheme = SCHEME_E2ERTA;
  idx_t num_tasks = '0, wr_idx;
  task_info_t tasks [NT];
  logic busy, done, wr_en, wr_sched;
  time_t wr_r;
  logic [15:0] n_pre, n_lbrej, n_exact;

  task_analysis #(.MAX_TASKS(NT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_pre = 0, m_lbrej = 0, m_miss = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int set_no = 0; set_no < 24; set_no++) begin
      automatic int nt = (set_no % 3 == 0) ? NT : $urandom_range(NT, 1);
      gen(nt, 0, 4, 20 + (set_no % 8) * 12, 500, 8000, 1);
      for (int i = 0; i < NT; i++)
        tasks[i] = '{core: core_t'(core[i]), c: time_t'(c[i]), t: time_t'(t[i]), d: time_t'(d[i])};
      for (int s = 0; s < 4; s++) begin
        automatic int next = 0;
        @(negedge clk);
        scheme = scheme_e'(s); num_tasks = idx_t'(nt); start = 1;
        @(negedge clk); start = 0;
        while (!done) begin
          if (wr_en) begin
            bit rs; longint rr;
            check(int'(wr_idx) == next, "write order");
            task_rta(int'(wr_idx), rs, rr);
            check(wr_sched == rs, $sformatf("set %0d scheme %0d task %0d verdict", set_no, s, wr_idx));
            if (rs && wr_sched) begin
              if (s[0]) check(longint'(wr_r) >= rr, "upper bound below exact");
              else      check(longint'(wr_r) == rr, $sformatf("task %0d r %0d/%0d", wr_idx, wr_r, rr));
            end
            if (!rs) m_miss++;
            next++;
          end
          @(negedge clk);
        end
        check(next == nt, "one result per task");
        check(int'(n_pre + n_lbrej + n_exact) == nt, "decision counters");
        m_pre += n_pre; m_lbrej += n_lbrej;
      end
    end
    check(m_pre > 0 && m_lbrej > 0 && m_miss > 0, "PRE, lower-bound rejection and misses seen");
    $display("pre %0d lbrej %0d miss %0d", m_pre, m_lbrej, m_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
