// tb_rta_engine: random interference sets with random periods, costs and
// jitters; the response time and verdict must equal a literal iteration of
// R = base + sum ceil((R + J_j)/T_j) C_j started at base. Also starts the
// engine at the fixed point itself (must end after one pass with the same
// result) and above it (must report a value not below the fixed point).
module tb_rta_engine;
  import e2erta_pkg::*;
  localparam int N = 32;

  logic clk = 0, rst_n = 0, start = 0, busy, done, sched;
  always #5 clk = ~clk;
  time_t base = '0, init = '0, limit = '0, resp;
  logic [N-1:0] set = '0;
  idx_t rd_idx;
  time_t cs [N], ts [N];
  logic [TW:0] js [N];
  logic [15:0] passes;

  rta_engine #(.MAX_N(N)) dut (
    .clk, .rst_n, .start, .base, .init, .limit, .set, .rd_idx,
    .c_j(cs[rd_idx[4:0]]), .t_j(ts[rd_idx[4:0]]), .jit_j(js[rd_idx[4:0]]),
    .busy, .done, .resp, .sched, .passes);

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

  function automatic void reference(output bit s, output longint r);
    longint rn;
    r = base;
    forever begin
      rn = base;
      for (int j = 0; j < N; j++)
        if (set[j]) rn += ((r + js[j] + ts[j] - 1) / ts[j]) * cs[j];
      if (rn > limit) begin s = 0; r = rn; return; end
      if (rn == r) begin s = 1; return; end
      r = rn;
    end
  endfunction

  task automatic run();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  int n_sched = 0, n_miss = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      bit rs; longint rr;
      for (int j = 0; j < N; j++) begin
        ts[j] = time_t'($urandom_range(5000, 100));
        cs[j] = time_t'($urandom_range(int'(ts[j]) / 12, 1));
        js[j] = (k % 2) ? (TW+1)'($urandom_range(3000)) : '0;
        set[j] = ($urandom_range(3) == 0);
      end
      base  = time_t'($urandom_range(400, 1));
      limit = time_t'($urandom_range(20000, 200));
      init  = base;
      reference(rs, rr);
      run();
      check(sched == rs, $sformatf("case %0d verdict", k));
      if (rs) begin
        check(longint'(resp) == rr, $sformatf("case %0d R %0d/%0d", k, resp, rr));
        n_sched++;
        init = resp;                       // start at the fixed point
        run();
        check(sched && resp == time_t'(rr) && passes == 16'd1, "start at fixed point");
        init = time_t'(rr + 50);           // start above it
        run();
        check(longint'(resp) >= rr, "start above fixed point");
      end else begin
        check(longint'(resp) > longint'(limit), "reported value passes the limit");
        n_miss++;
      end
    end
    check(n_sched > 0 && n_miss > 0, "both verdicts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
