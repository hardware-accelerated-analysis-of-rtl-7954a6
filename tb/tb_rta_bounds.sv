// tb_rta_bounds: random interference sets in task mode and flow mode. The
// lower bound must not exceed the exact fixed point and the upper bound
// must not be below it; both must lie within rounding distance of the
// real-valued formulas (lb <= real lb, ub >= real ub). A set whose
// utilisation reaches 1 must report no bound.
module tb_rta_bounds;
  import e2erta_pkg::*;
  localparam int N = 32;

  logic clk = 0, rst_n = 0, start = 0, is_task = 0, busy, done, lb_ok, ub_ok;
  logic want_lb = 1, want_ub = 1;
  always #5 clk = ~clk;
  time_t base = '0, lb, ub;
  logic [N-1:0] set = '0;
  idx_t rd_idx;
  time_t cs [N], ts [N];
  util_t udn [N], uup [N];
  logic [TW:0] js [N];

  rta_bounds #(.MAX_N(N)) dut (
    .clk, .rst_n, .start, .is_task, .want_lb, .want_ub, .base, .set, .rd_idx,
    .c_j(cs[rd_idx[4:0]]), .u_dn_j(udn[rd_idx[4:0]]), .u_up_j(uup[rd_idx[4:0]]),
    .jit_j(js[rd_idx[4:0]]), .busy, .done, .lb, .lb_ok, .ub, .ub_ok);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fixpoint();
    longint r = base, rn;
    forever begin
      rn = base;
      for (int j = 0; j < N; j++)
        if (set[j]) rn += ((r + js[j] + ts[j] - 1) / ts[j]) * cs[j];
      if (rn == r) return r;
      r = rn;
    end
  endfunction

  int n_bounded = 0, n_unbounded = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      real su, nl, nu, rlb, rub;
      automatic int load = (k % 5 == 4) ? 6 : 20;
      is_task = k[0];
      su = 0; nl = base; nu = base;
      for (int j = 0; j < N; j++) begin
        ts[j]  = time_t'($urandom_range(5000, 100));
        cs[j]  = time_t'($urandom_range(int'(ts[j]) / load, 1));
        js[j]  = is_task ? '0 : (TW+1)'($urandom_range(2000));
        udn[j] = util_t'((longint'(cs[j]) << FRAC) / ts[j]);
        uup[j] = util_t'(((longint'(cs[j]) << FRAC) + ts[j] - 1) / ts[j]);
        set[j] = ($urandom_range(2) == 0);
      end
      base = time_t'($urandom_range(300, 1));
      su = 0; nl = real'(base); nu = real'(base);
      for (int j = 0; j < N; j++)
        if (set[j]) begin
          automatic real u = real'(cs[j]) / real'(ts[j]);
          su += u;
          nl += real'(js[j]) * u;
          nu += is_task ? real'(cs[j]) * (1.0 - u) : real'(js[j]) * u + real'(cs[j]);
        end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      if (su < 0.999) begin
        automatic longint r = fixpoint();
        rlb = nl / (1.0 - su);
        rub = nu / (1.0 - su);
        n_bounded++;
        check(lb_ok && ub_ok, $sformatf("case %0d bounds exist", k));
        check(longint'(lb) <= r && longint'(ub) >= r,
              $sformatf("case %0d lb %0d <= R %0d <= ub %0d", k, lb, r, ub));
        check(real'(lb) <= rlb + 1e-6 && real'(lb) >= rlb * 0.98 - 2,
              $sformatf("case %0d lb %0d vs %f", k, lb, rlb));
        check(real'(ub) >= rub - 1e-6 && (rub > 1e9 || real'(ub) <= rub * 1.02 + 2),
              $sformatf("case %0d ub %0d vs %f", k, ub, rub));
      end else if (su > 1.001) begin
        n_unbounded++;
        check(!lb_ok && !ub_ok, $sformatf("case %0d no bound", k));
      end
    end
    check(n_bounded > 0 && n_unbounded > 0, "both cases seen");
    $display("bounded %0d unbounded %0d", n_bounded, n_unbounded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
