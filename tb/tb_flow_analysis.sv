// tb_flow_analysis: flow analysis on the 3x3 example mesh and on random
// flow sets of a 4x4 mesh.
//
// Example: tasks 1..4 on IP(2), IP(5), IP(8), IP(8), flows 1..4 from them
// to IP(0), IP(1), IP(2), IP(5) in priority order. The direct sets must be
// {}, {1}, {2}, {3} and the indirect sets {}, {}, {1}, {2}, the routes the
// link sets {1,12,19,20}, {2,15,20,33}, {3,18,33,36}, {6,18,36}.
// Random sets: routes, C, S_id and S_ii are compared with the reference
// model, and each flow result with the reference recurrence fed with the
// task response times given to the DUT and the flow results it reported.
module tb_flow_analysis;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;
  localparam int NT = 24, NF = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- DUTs
  task_info_t tasks [NT];
  flow_info_t flows [NF];
  time_t      tr    [NT];
  logic start3 = 0, start4 = 0, ready = 0;
  scheme_e scheme = SCHEME_E2ERTA;
  idx_t num_flows = '0, dbg_idx = '0;

  logic b3, fd3, d3, we3, s3;  idx_t wi3; time_t wr3, c3; logic [15:0] p3, l3, e3;
  logic [41:0] route3; logic [NF-1:0] di3, ii3;
  flow_analysis #(.MAX_TASKS(NT), .MAX_FLOWS(NF), .MESH_COLS(3), .MESH_ROWS(3)) dut3 (
    .clk, .rst_n, .start(start3), .scheme, .num_flows, .tasks, .flows,
    .task_r(tr), .tasks_ready(ready), .busy(b3), .front_done(fd3), .done(d3),
    .wr_en(we3), .wr_idx(wi3), .wr_r(wr3), .wr_sched(s3), .n_pre(p3),
    .n_lbrej(l3), .n_exact(e3), .dbg_idx, .dbg_route(route3), .dbg_c(c3),
    .dbg_di(di3), .dbg_ii(ii3));

  logic b4, fd4, d4, we4, s4;  idx_t wi4; time_t wr4, c4; logic [15:0] p4, l4, e4;
  logic [79:0] route4; logic [NF-1:0] di4, ii4;
  flow_analysis #(.MAX_TASKS(NT), .MAX_FLOWS(NF), .MESH_COLS(4), .MESH_ROWS(4)) dut4 (
    .clk, .rst_n, .start(start4), .scheme, .num_flows, .tasks, .flows,
    .task_r(tr), .tasks_ready(ready), .busy(b4), .front_done(fd4), .done(d4),
    .wr_en(we4), .wr_idx(wi4), .wr_r(wr4), .wr_sched(s4), .n_pre(p4),
    .n_lbrej(l4), .n_exact(e4), .dbg_idx, .dbg_route(route4), .dbg_c(c4),
    .dbg_di(di4), .dbg_ii(ii4));

  function automatic logic [41:0] links(int a, int b, int c, int d = 0);
    logic [41:0] v = '0;
    v[a-1] = 1; v[b-1] = 1; v[c-1] = 1;
    if (d != 0) v[d-1] = 1;
    return v;
  endfunction

  time_t got_r [NF];
  bit    got_s [NF];
  int    nwr;
  always @(posedge clk) begin
    if (we3) begin got_r[wi3] <= wr3; got_s[wi3] <= s3; nwr <= nwr + 1; end
    if (we4) begin got_r[wi4] <= wr4; got_s[wi4] <= s4; nwr <= nwr + 1; end
  end

  int m_pre = 0, m_lbrej = 0, m_miss = 0, m_blocked = 0, m_ii = 0;

  initial begin
    for (int k = 0; k < NT; k++) begin
      tasks[k] = '{core: '0, c: 10, t: 1000, d: 1000}; tr[k] = 10;
    end
    for (int k = 0; k < NF; k++) flows[k] = '{src: '0, dst: '0, len: 1};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------- 3x3 example mesh
    tasks[0].core = 2; tasks[1].core = 5; tasks[2].core = 8; tasks[3].core = 8;
    tasks[4].core = 0; tasks[5].core = 1;
    flows[0] = '{src: 0, dst: 4, len: 8};   // IP(2) -> IP(0)
    flows[1] = '{src: 1, dst: 5, len: 8};   // IP(5) -> IP(1)
    flows[2] = '{src: 2, dst: 0, len: 8};   // IP(8) -> IP(2)
    flows[3] = '{src: 3, dst: 1, len: 8};   // IP(8) -> IP(5)
    num_flows = 4; ready = 1; nwr = 0;
    @(negedge clk); start3 = 1;
    @(negedge clk); start3 = 0;
    while (!d3) @(negedge clk);
    dbg_idx = 0; #1;
    check(route3 == links(1, 12, 19, 20) && di3 == '0 && ii3 == '0, "flow 1");
    check(c3 == 8 + 4 - 1, "flow 1 basic latency");
    dbg_idx = 1; #1;
    check(route3 == links(2, 15, 20, 33) && di3 == NF'('b0001) && ii3 == '0, "flow 2");
    dbg_idx = 2; #1;
    check(route3 == links(3, 18, 33, 36) && di3 == NF'('b0010) && ii3 == NF'('b0001), "flow 3");
    dbg_idx = 3; #1;
    check(route3 == links(6, 18, 36) && di3 == NF'('b0100) && ii3 == NF'('b0010), "flow 4");
    check(nwr == 4, "four results");
    // Flow 1 has no interference; flow 2 is hit once by flow 1.
    check(got_s[0] && got_r[0] == 11, "flow 1 R = C");
    check(got_s[1] && got_r[1] == 22, "flow 2 R = C2 + C1");

    // ------------------------------------------------ random 4x4 sets
    cols = 4; rows = 4;
    for (int set_no = 0; set_no < 16; set_no++) begin
      automatic int nf = (set_no % 2) ? NF : $urandom_range(NF, 2);
      gen(NT, nf, 16, 30 + (set_no % 6) * 12, 2000, 12000, 400);
      if (set_no % 4 == 1) for (int i = 0; i < NT; i++) core[i] = core[i] % 4;
      for (int i = 0; i < NT; i++) begin
        bit rs; longint rr;
        task_rta(i, rs, rr);
        task_r[i] = rr;
        tasks[i] = '{core: core_t'(core[i]), c: time_t'(c[i]), t: time_t'(t[i]), d: time_t'(d[i])};
        tr[i] = time_t'(rr);
      end
      for (int i = 0; i < nf; i++)
        flows[i] = '{src: idx_t'(fsrc[i]), dst: idx_t'(fdst[i]), len: time_t'(flen[i])};
      flow_front(nf);
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        scheme = scheme_e'(s); num_flows = idx_t'(nf); ready = 0; nwr = 0;
        start4 = 1;
        @(negedge clk); start4 = 0;
        while (!fd4) @(negedge clk);
        repeat ($urandom_range(20)) @(negedge clk);
        check(nwr == 0, "no result before tasks are ready");
        ready = 1;
        while (!d4) @(negedge clk);
        @(negedge clk);
        check(nwr == nf, "one result per flow");
        for (int i = 0; i < nf; i++) flow_r[i] = longint'(got_r[i]);
        for (int i = 0; i < nf; i++) begin
          bit rs; longint rr;
          dbg_idx = idx_t'(i); #1;
          check(route4 == route[i][79:0] && c4 == time_t'(cbase[i]) &&
                di4 == di[i][NF-1:0] && ii4 == ii[i][NF-1:0], $sformatf("set %0d flow %0d front end", set_no, i));
          flow_rta(i, rs, rr);
          check(got_s[i] == rs, $sformatf("set %0d scheme %0d flow %0d verdict", set_no, s, i));
          if (rs && got_s[i]) begin
            if (s[0]) check(longint'(got_r[i]) >= rr, "flow bound");
            else      check(longint'(got_r[i]) == rr, $sformatf("flow %0d R %0d/%0d", i, got_r[i], rr));
          end
          if (!rs) m_miss++;
          if (task_r[fsrc[i]] > d[fsrc[i]]) m_blocked++;
          if (ii[i] != '0) m_ii++;
        end
        m_pre += p4; m_lbrej += l4;
      end
    end
    $display("pre %0d lbrej %0d miss %0d blocked %0d indirect %0d", m_pre, m_lbrej, m_miss, m_blocked, m_ii);
    check(m_pre > 0 && m_miss > 0 && m_blocked > 0 && m_ii > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
