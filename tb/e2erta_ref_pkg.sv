// e2erta_ref_pkg: software reference model of the end-to-end response time
// analysis, used by the testbenches to work out expected results
// independently of the RTL.
//
// The model is written the way a program would do it: routes as link sets
// walked coordinate by coordinate, interference sets by comparing routes
// link by link, ceilings by integer division, and the recurrences iterated
// literally. Inputs and outputs live in package-level arrays that a
// testbench fills before calling the functions.
package e2erta_ref_pkg;

  localparam int MAXN = 256;
  localparam int MAXL = 2048;

  int unsigned cols, rows;
  // task table
  longint core [MAXN];
  longint c    [MAXN];
  longint t    [MAXN];
  longint d    [MAXN];
  // flow table
  int     fsrc [MAXN];
  int     fdst [MAXN];
  longint flen [MAXN];
  // derived flow data
  bit [MAXL-1:0] route [MAXN];
  bit [MAXN-1:0] di    [MAXN];
  bit [MAXN-1:0] ii    [MAXN];
  longint        cbase [MAXN];
  // jitter inputs for the flow analysis: task and flow response times
  longint task_r [MAXN];
  longint flow_r [MAXN];

  function automatic int nlinks();
    return 2*cols*rows + 2*cols*(rows-1) + 2*rows*(cols-1);
  endfunction

  // Link numbers (0-based) of the mesh, grouped as eject, inject, up, down,
  // left, right.
  function automatic int lk_eject(int n);   return n; endfunction
  function automatic int lk_inject(int n);  return cols*rows + n; endfunction
  function automatic int lk_up(int x, int y);
    return 2*cols*rows + x*(rows-1) + (y-1);
  endfunction
  function automatic int lk_down(int x, int y);
    return 2*cols*rows + cols*(rows-1) + x*(rows-1) + y;
  endfunction
  function automatic int lk_left(int x, int y);
    return 2*cols*rows + 2*cols*(rows-1) + (x-1)*rows + y;
  endfunction
  function automatic int lk_right(int x, int y);
    return 2*cols*rows + 2*cols*(rows-1) + rows*(cols-1) + x*rows + y;
  endfunction

  function automatic bit [MAXL-1:0] xy_route(int s, int e);
    bit [MAXL-1:0] r = '0;
    int x = s / rows, y = s % rows, ex = e / rows, ey = e % rows;
    if (s == e) return r;
    r[lk_inject(s)] = 1;
    while (x != ex) begin
      if (ex > x) begin r[lk_right(x, y)] = 1; x++; end
      else        begin r[lk_left(x, y)]  = 1; x--; end
    end
    while (y != ey) begin
      if (ey > y) begin r[lk_down(x, y)] = 1; y++; end
      else        begin r[lk_up(x, y)]   = 1; y--; end
    end
    r[lk_eject(e)] = 1;
    return r;
  endfunction

  function automatic int count_links(bit [MAXL-1:0] r);
    int n = 0;
    for (int k = 0; k < MAXL; k++) if (r[k]) n++;
    return n;
  endfunction

  function automatic bit share_link(int a, int b);
    for (int k = 0; k < nlinks(); k++)
      if (route[a][k] && route[b][k]) return 1;
    return 0;
  endfunction

  // Routes, basic latencies and interference sets of flows 0..nf-1.
  function automatic void flow_front(int nf);
    for (int i = 0; i < nf; i++) begin
      int h;
      route[i] = xy_route(int'(core[fsrc[i]]), int'(core[fdst[i]]));
      h = count_links(route[i]);
      cbase[i] = (h == 0) ? 0 : flen[i] + h - 1;
    end
    for (int i = 0; i < nf; i++) begin
      di[i] = '0;
      for (int j = 0; j < i; j++) di[i][j] = share_link(i, j);
    end
    for (int i = 0; i < nf; i++) begin
      ii[i] = '0;
      for (int k = 0; k < i; k++)
        if (!di[i][k])
          for (int j = 0; j < i; j++)
            if (di[i][j] && di[j][k]) ii[i][k] = 1;
    end
  endfunction

  function automatic longint ceil_div(longint a, longint b);
    return (a + b - 1) / b;
  endfunction

  // Exact response time of task i (Eq. 1 iterated from c_i).
  function automatic void task_rta(int i, output bit sched, output longint r);
    longint rn;
    r = c[i];
    forever begin
      rn = c[i];
      for (int j = 0; j < i; j++)
        if (core[j] == core[i]) rn += ceil_div(r, t[j]) * c[j];
      if (rn > d[i]) begin sched = 0; r = rn; return; end
      if (rn == r)   begin sched = 1; return; end
      r = rn;
    end
  endfunction

  function automatic longint flow_jitter(int i, int j);
    longint ji = ((di[j] & ii[i]) != '0) ? flow_r[j] - cbase[j] : 0;
    return task_r[fsrc[j]] + ji;
  endfunction

  // Exact response time of flow i (Eq. 3) given task_r[] and flow_r[] of
  // the higher-priority flows; lim is the deadline left after the initial
  // task's response time.
  function automatic void flow_rta(int i, output bit sched, output longint r);
    longint rn, lim;
    int s = fsrc[i];
    r = cbase[i];
    if (task_r[s] > d[s]) begin sched = 0; return; end
    lim = d[s] - task_r[s];
    forever begin
      rn = cbase[i];
      for (int j = 0; j < i; j++)
        if (di[i][j])
          rn += ceil_div(r + flow_jitter(i, j), t[fsrc[j]]) * cbase[j];
      if (rn > lim) begin sched = 0; r = rn; return; end
      if (rn == r)  begin sched = 1; return; end
      r = rn;
    end
  endfunction

  // Random task set: nt tasks with periods in [pmin, pmax], computation
  // times scaled so that a core holds about util_pct % load, deadlines equal
  // to periods, random mapping on ncores cores; nf flows between random
  // task pairs with lengths 1..maxlen.
  function automatic void gen(int nt, int nf, int ncores, int util_pct,
                              int pmin, int pmax, int maxlen);
    int per_core = (nt + ncores - 1) / ncores;
    for (int i = 0; i < nt; i++) begin
      core[i] = $urandom_range(ncores - 1);
      t[i]    = $urandom_range(pmax, pmin);
      c[i]    = (t[i] * util_pct) / (100 * per_core);
      if (c[i] < 1) c[i] = 1;
      d[i]    = t[i];
    end
    for (int i = 0; i < nf; i++) begin
      fsrc[i] = $urandom_range(nt - 1);
      fdst[i] = $urandom_range(nt - 1);
      flen[i] = $urandom_range(maxlen, 1);
    end
  endfunction


  // Whole analysis of the current mapping (core[]): number of unschedulable
  // tasks ut and flows uf. The response time kept for an unschedulable flow
  // is where the analysis gave up, which an implementation may choose
  // differently; amb is set when such a value feeds the jitter of another
  // flow, so that uf may legitimately differ (it is then at least 1).
  function automatic void fitness(int nt, int nf, output int ut, output int uf,
                                  output bit amb);
    bit s;
    longint r;
    bit [MAXN-1:0] bad = '0;
    ut = 0; uf = 0; amb = 0;
    flow_front(nf);
    for (int i = 0; i < nt; i++) begin
      task_rta(i, s, r);
      task_r[i] = r;
      if (!s) ut++;
    end
    for (int i = 0; i < nf; i++) begin
      if ((di[i] & bad) != '0) amb = 1;
      flow_rta(i, s, r);
      flow_r[i] = r;
      if (!s) begin uf++; bad[i] = 1; end
    end
  endfunction

endpackage
