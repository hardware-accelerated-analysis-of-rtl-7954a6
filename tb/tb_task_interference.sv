// tb_task_interference: random task mappings; hp(i) must hold exactly the
// lower-indexed tasks on the core of task i.
module tb_task_interference;
  import e2erta_pkg::*;
  localparam int N = 128;
  core_t cores [N];
  idx_t idx = '0;
  logic [N-1:0] hp;

  task_interference dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 5; round++) begin
      automatic int ncores = (round == 0) ? 1 : (round * 8);
      for (int k = 0; k < N; k++) cores[k] = core_t'($urandom_range(ncores - 1));
      for (int i = 0; i < N; i++) begin
        automatic logic [N-1:0] e = '0;
        idx = idx_t'(i);
        for (int j = 0; j < i; j++) e[j] = (cores[j] == cores[i]);
        #1;
        check(hp == e, $sformatf("round %0d task %0d", round, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
