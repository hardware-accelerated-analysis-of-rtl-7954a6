// indirect_interference: builds the indirect interference set S_ii of flow i.
//
// A flow k interferes indirectly with flow i when k has higher priority,
// shares no link with i, and interferes directly with some flow j of S_id(i).
// For every j in S_id(i) the direct set of j is combined with the direct set
// of i by an OR and an XOR:
//   (S_id(i) | S_id(j)) ^ S_id(i)  =  S_id(j) & ~S_id(i)
// which keeps the flows that hit j but not i; the results for all j are
// OR-ed together. A flow that preempts both i and j therefore stays out of
// S_ii(i), as required. Only the members j of S_id(i) are visited, one per
// clock cycle, picked by a priority encoder over the members not yet
// visited; S_id(j) is read from the parent through rd_idx / di_j, a
// combinational read.
//
// Timing: pulse start with di_i valid (it must hold until done). done is
// high for one cycle, with ii complete, |S_id(i)|+1 cycles after start.
// ii holds until the next start.
module indirect_interference
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_FLOWS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [MAX_FLOWS-1:0] di_i,
  output idx_t                 rd_idx,
  input  logic [MAX_FLOWS-1:0] di_j,
  output logic                 busy,
  output logic                 done,
  output logic [MAX_FLOWS-1:0] ii
);

  logic [MAX_FLOWS-1:0] todo_q;   // members of S_id(i) not yet visited
  logic                 any_c;
  idx_t                 next_c;

  always_comb begin
    any_c  = 1'b0;
    next_c = '0;
    for (int k = MAX_FLOWS - 1; k >= 0; k--)
      if (todo_q[k]) begin
        any_c  = 1'b1;
        next_c = idx_t'(k);
      end
  end

  assign rd_idx = next_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      todo_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      ii     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ii     <= '0;
        todo_q <= di_i;
        busy   <= 1'b1;
      end else if (busy) begin
        if (any_c) begin
          ii             <= ii | ((di_i | di_j) ^ di_i);
          todo_q[next_c] <= 1'b0;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
