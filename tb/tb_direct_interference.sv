// tb_direct_interference: the direct interference sets of the 3x3 example
// ({}, {1}, {2}, {3} for flows 1..4, written 0-based here) and of random
// route sets on a 10x10 mesh, against the reference model; checks the cycle
// count (done idx+1 cycles after start).
module tb_direct_interference;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;
  localparam int NF = 128, NL = 560;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  idx_t idx = '0, rd_idx;
  logic [NL-1:0] route_i = '0, route_j;
  logic [NL-1:0] routes [NF];
  logic [NF-1:0] di;
  assign route_j = routes[rd_idx];

  direct_interference dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int i, logic [NF-1:0] expect_di);
    automatic int lat = 0;
    @(negedge clk); idx = idx_t'(i); route_i = routes[i]; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(di == expect_di, $sformatf("flow %0d S_id %h", i, di));
    check(lat == ((i == 0) ? 0 : i), $sformatf("flow %0d cycles %0d", i, lat + 1));
  endtask

  initial begin
    for (int k = 0; k < NF; k++) routes[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cols = 3; rows = 3;
    routes[0] = NL'(xy_route(2, 0)); routes[1] = NL'(xy_route(5, 1));
    routes[2] = NL'(xy_route(8, 2)); routes[3] = NL'(xy_route(8, 5));
    run(0, '0); run(1, NF'(1)); run(2, NF'(2)); run(3, NF'(4));
    cols = 10; rows = 10;
    for (int k = 0; k < NF; k++)
      routes[k] = NL'(xy_route($urandom_range(99), $urandom_range(99)));
    for (int i = 0; i < NF; i += 7) begin
      automatic logic [NF-1:0] e = '0;
      for (int j = 0; j < i; j++) e[j] = (routes[i] & routes[j]) != '0;
      run(i, e);
    end
    run(NF - 1, di_ref(NF - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NF-1:0] di_ref(int i);
    logic [NF-1:0] e = '0;
    for (int j = 0; j < i; j++) e[j] = (routes[i] & routes[j]) != '0;
    return e;
  endfunction
endmodule
