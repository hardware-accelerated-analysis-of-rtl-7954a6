// direct_interference: builds the direct interference set S_id of flow i.
//
// A higher-priority flow j interferes directly with flow i when the two
// routes share at least one link. With routes coded as link vectors, that
// is one wide AND followed by an OR-reduction:
//   di[j] = | (route_i & route_j)       for every j < i
// Flows sit in priority order (index 0 highest), so only j < i are tested,
// one flow per clock cycle. The route of flow j is read from the route
// memory of the parent through rd_idx / route_j, a combinational read.
//
// Timing: pulse start with idx and route_i valid (route_i must hold until
// done). done is high for one cycle, with di complete, idx+1 cycles after
// start (one cycle after start for flow 0). di holds until the next start.
module direct_interference
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_FLOWS = 128,
  parameter int unsigned NLINKS    = 560
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  idx_t                 idx,
  input  logic [NLINKS-1:0]    route_i,
  output idx_t                 rd_idx,
  input  logic [NLINKS-1:0]    route_j,
  output logic                 busy,
  output logic                 done,
  output logic [MAX_FLOWS-1:0] di
);

  idx_t last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_idx <= '0;
      last_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      di     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        di     <= '0;
        rd_idx <= '0;
        last_q <= idx;
        if (idx == '0) done <= 1'b1;
        else           busy <= 1'b1;
      end else if (busy) begin
        di[rd_idx] <= |(route_i & route_j);
        rd_idx     <= rd_idx + 1'b1;
        if (rd_idx + 1'b1 == last_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
