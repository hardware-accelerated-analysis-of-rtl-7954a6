// tb_xy_routing: checks the link vectors of the four flows of the 3x3
// example mesh (link sets {1,12,19,20}, {2,15,20,33}, {3,18,33,36} and
// {6,18,36}, 1-based) and random source/destination pairs on a 10x10 mesh
// against the reference model; also checks the cycle count (done hops
// cycles after start, one cycle for a local flow).
module tb_xy_routing;
  import e2erta_pkg::*;
  import e2erta_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s3 = 0, s10 = 0, b3, b10, d3, d10;
  core_t src = '0, dst = '0;
  logic [41:0]  r3;
  logic [559:0] r10;
  logic [15:0]  h3, h10;

  xy_routing #(.MESH_COLS(3), .MESH_ROWS(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .start(s3), .src_core(src), .dst_core(dst),
    .busy(b3), .done(d3), .route(r3), .hops(h3));
  xy_routing dut10 (
    .clk(clk), .rst_n(rst_n), .start(s10), .src_core(src), .dst_core(dst),
    .busy(b10), .done(d10), .route(r10), .hops(h10));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic route3(int s, int e, logic [41:0] expect_r);
    automatic int lat = 0;
    @(negedge clk); src = core_t'(s); dst = core_t'(e); s3 = 1;
    @(negedge clk); s3 = 0;
    while (!d3) begin @(negedge clk); lat++; end
    check(r3 == expect_r, $sformatf("3x3 route %0d->%0d = %h", s, e, r3));
    check(lat + 1 == ((s == e) ? 1 : int'(h3)), "3x3 cycle count");
  endtask

  function automatic logic [41:0] links(int a, int b, int c, int d = 0);
    logic [41:0] v = '0;
    v[a-1] = 1; v[b-1] = 1; v[c-1] = 1;
    if (d != 0) v[d-1] = 1;
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    route3(2, 0, links(1, 12, 19, 20));   // Flow 1: IP(2) -> IP(0)
    route3(5, 1, links(2, 15, 20, 33));   // Flow 2: IP(5) -> IP(1)
    route3(8, 2, links(3, 18, 33, 36));   // Flow 3: IP(8) -> IP(2)
    route3(8, 5, links(6, 18, 36));       // Flow 4: IP(8) -> IP(5)
    route3(4, 4, '0);
    cols = 10; rows = 10;
    for (int k = 0; k < 300; k++) begin
      automatic int s = $urandom_range(99), e = $urandom_range(99), lat = 0;
      bit [2047:0] ref_r;
      if (k % 25 == 0) e = s;
      ref_r = xy_route(s, e);
      @(negedge clk); src = core_t'(s); dst = core_t'(e); s10 = 1;
      @(negedge clk); s10 = 0;
      while (!d10) begin @(negedge clk); lat++; end
      check(r10 == ref_r[559:0], $sformatf("10x10 route %0d->%0d", s, e));
      check(int'(h10) == count_links(ref_r), "10x10 hops");
      check(lat + 1 == ((s == e) ? 1 : int'(h10)), "10x10 cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
