// tb_seq_divider: random and corner-case divisions against the simulator's
// own / and % operators; also checks that each result arrives exactly DW
// cycles after start.
module tb_seq_divider;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] dividend = '0, divisor = '0, quotient, remainder;
  always #5 clk = ~clk;

  seq_divider #(.DW(DW)) dut (.*);

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

  task automatic divide(logic [DW-1:0] a, logic [DW-1:0] b);
    automatic int lat = 0;
    @(negedge clk);
    dividend = a; divisor = b; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == DW, $sformatf("latency %0d", lat));
    if (b != 0) begin
      check(quotient == a / b, $sformatf("%0d / %0d = %0d", a, b, quotient));
      check(remainder == a % b, $sformatf("%0d %% %0d = %0d", a, b, remainder));
    end else begin
      check(quotient == '1, "divide by zero");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    divide(100, 7);
    divide(0, 5);
    divide(5, 100);
    divide('1, 1);
    divide('1, '1);
    divide(12345, 0);
    for (int k = 0; k < 200; k++) begin
      automatic logic [DW-1:0] a = {$urandom, $urandom};
      automatic logic [DW-1:0] b = {$urandom, $urandom} >> $urandom_range(63, 0);
      if (b == 0) b = 1;
      divide(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
