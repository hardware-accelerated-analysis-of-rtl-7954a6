// xy_routing: XY (dimension-ordered) routing of one packet flow over a
// MESH_COLS x MESH_ROWS mesh, written as a link vector.
//
// The route of a flow is coded in binary: one bit per unidirectional link of
// the NoC, set when the flow uses that link. Every core has an injection link
// (core to router) and an ejection link (router to core); routers are joined
// by up, down, left and right links. Bit k stands for link number k+1 of the
// numbering below, which generalises the numbering of the 3x3 example mesh
// (ejection 1..9, injection 10..18, up 19..24, down 25..30, left 31..36,
// right 37..42) to any mesh size:
//   eject(n)     = n                          n = core id
//   inject(n)    = N + n                      N = MESH_COLS*MESH_ROWS
//   up(c,r)      = 2N + c(R-1) + r-1          router (c,r) to (c,r-1)
//   down(c,r)    = 2N + C(R-1) + c(R-1) + r   router (c,r) to (c,r+1)
//   left(c,r)    = 2N + 2C(R-1) + (c-1)R + r  router (c,r) to (c-1,r)
//   right(c,r)   = 2N + 2C(R-1) + R(C-1) + cR + r
// XY routing moves along the row (X) first, then along the column (Y).
//
// Timing: pulse start with src_core and dst_core valid. The route register
// is cleared and the injection link is written at the first clock edge;
// one more link is written at every following edge. done is high for one
// cycle, together with the complete route, hops cycles after the start
// cycle. A flow whose two tasks share a core does not enter the network: its
// route stays empty, hops is 0 and done follows one cycle after start.
// route and hops hold until the next start.
module xy_routing
  import e2erta_pkg::*;
#(
  parameter int unsigned MESH_COLS = 10,
  parameter int unsigned MESH_ROWS = 10,
  localparam int unsigned NLINKS   = num_links(MESH_COLS, MESH_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  core_t             src_core,
  input  core_t             dst_core,
  output logic              busy,
  output logic              done,
  output logic [NLINKS-1:0] route,
  output logic [15:0]       hops
);

  localparam int unsigned N  = MESH_COLS * MESH_ROWS;
  localparam int unsigned C  = MESH_COLS;
  localparam int unsigned R  = MESH_ROWS;
  localparam int unsigned UP_BASE    = 2 * N;
  localparam int unsigned DOWN_BASE  = 2 * N + C * (R - 1);
  localparam int unsigned LEFT_BASE  = 2 * N + 2 * C * (R - 1);
  localparam int unsigned RIGHT_BASE = 2 * N + 2 * C * (R - 1) + R * (C - 1);

  int unsigned col_q, row_q, dcol_q, drow_q;

  int unsigned link_c;     // link taken in this cycle
  logic        at_dst;
  always_comb begin
    at_dst = (col_q == dcol_q) && (row_q == drow_q);
    link_c = 0;
    if (col_q < dcol_q)      link_c = RIGHT_BASE + col_q * R + row_q;
    else if (col_q > dcol_q) link_c = LEFT_BASE + (col_q - 1) * R + row_q;
    else if (row_q < drow_q) link_c = DOWN_BASE + col_q * (R - 1) + row_q;
    else if (row_q > drow_q) link_c = UP_BASE + col_q * (R - 1) + row_q - 1;
    else                     link_c = dcol_q * R + drow_q;   // eject
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q  <= 0;
      row_q  <= 0;
      dcol_q <= 0;
      drow_q <= 0;
      busy   <= 1'b0;
      done   <= 1'b0;
      route  <= '0;
      hops   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        col_q  <= int'(src_core) / R;
        row_q  <= int'(src_core) % R;
        dcol_q <= int'(dst_core) / R;
        drow_q <= int'(dst_core) % R;
        route  <= '0;
        if (src_core == dst_core) begin
          hops <= '0;
          done <= 1'b1;
        end else begin
          route[N + int'(src_core)] <= 1'b1;
          hops <= 16'd1;
          busy <= 1'b1;
        end
      end else if (busy) begin
        route[link_c] <= 1'b1;
        hops <= hops + 16'd1;
        if (col_q < dcol_q)      col_q <= col_q + 1;
        else if (col_q > dcol_q) col_q <= col_q - 1;
        else if (row_q < drow_q) row_q <= row_q + 1;
        else if (row_q > drow_q) row_q <= row_q - 1;
        if (at_dst) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
