// rta_engine: exact response time by fixed-point iteration.
//
// Solves the recurrence shared by tasks and flows,
//   R(n+1) = base + sum_{j in set} ceil((R(n) + J_j) / T_j) * C_j
// with base = c_i and J_j = 0 for a task (hp(i) as set), and base = C_i,
// J_j = r_j + J^I_j for a flow (S_id(i) as set). The iteration starts at
// init (base for plain analysis, the NLB lower bound otherwise) and ends
// when R(n+1) = R(n) (schedulable, R is the response time) or when the
// response time passes limit, the deadline (unschedulable).
//
// No divider is used. Because R only grows from pass to pass, the number
// of releases k_j = ceil((R + J_j)/T_j) of every interferer only grows too.
// The engine keeps, per interferer, the end of its counted releases
// B_j = k_j T_j and the running interference I = sum k_j C_j. In a pass,
// each member j of the set is visited and, while R + J_j > B_j, one more
// release is counted (B_j += T_j, I += C_j), one release per clock cycle.
// A pass thus costs one cycle per member plus one per new release, and
// R(n+1) = base + I at its end. A pass stops early as soon as base + I
// exceeds limit. The counting scheme is this design's own.
//
// Interface and timing: pulse start with base, init, limit and set valid;
// they must hold until done. Interferer data c_j, t_j (non-zero) and jit_j
// are read through rd_idx, combinationally, from the parent's tables. done
// is high for one cycle with resp, sched and passes (number of passes);
// they hold until the next start. If init is already above the fixed point
// the iteration stops once R no longer grows and reports that safe value.
module rta_engine
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_N = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  time_t            base,
  input  time_t            init,
  input  time_t            limit,
  input  logic [MAX_N-1:0] set,
  output idx_t             rd_idx,
  input  time_t            c_j,
  input  time_t            t_j,
  input  logic [TW:0]      jit_j,
  output logic             busy,
  output logic             done,
  output time_t            resp,
  output logic             sched,
  output logic [15:0]      passes
);

  localparam int unsigned XW = TW + 2;   // R + J and release bounds

  logic [XW-1:0]    bnd_q [MAX_N];       // B_j, valid where bval_q[j]
  logic [MAX_N-1:0] bval_q;
  logic [MAX_N-1:0] todo_q;
  logic [XW-1:0]    r_q;                 // R(n)
  logic [XW-1:0]    i_q;                 // interference counted so far

  logic  any_c;
  idx_t  next_c;
  always_comb begin
    any_c  = 1'b0;
    next_c = '0;
    for (int k = MAX_N - 1; k >= 0; k--)
      if (todo_q[k]) begin
        any_c  = 1'b1;
        next_c = idx_t'(k);
      end
  end
  assign rd_idx = next_c;

  logic [XW-1:0] x_c, b_c, i_next, r_next, r_max, lim_x;
  logic          more_c;
  always_comb begin
    x_c    = r_q + XW'(jit_j);
    b_c    = bval_q[next_c] ? bnd_q[next_c] : '0;
    more_c = x_c > b_c;
    i_next = i_q + XW'(c_j);
    r_next = XW'(base) + i_q;
    r_max  = (r_next > r_q) ? r_next : r_q;
    lim_x  = XW'(limit);
  end

  function automatic time_t sat(input logic [XW-1:0] v);
    return (v > XW'({TW{1'b1}})) ? '1 : v[TW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bval_q <= '0;
      todo_q <= '0;
      r_q    <= '0;
      i_q    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      resp   <= '0;
      sched  <= 1'b0;
      passes <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        bval_q <= '0;
        todo_q <= set;
        r_q    <= (init > base) ? XW'(init) : XW'(base);
        i_q    <= '0;
        passes <= 16'd1;
        busy   <= 1'b1;
      end else if (busy) begin
        if (any_c) begin
          if (more_c) begin
            bnd_q[next_c]  <= b_c + XW'(t_j);
            bval_q[next_c] <= 1'b1;
            i_q            <= i_next;
            if (XW'(base) + i_next > lim_x) begin   // cannot meet limit
              resp   <= sat(XW'(base) + i_next);
              sched  <= 1'b0;
              busy   <= 1'b0;
              done   <= 1'b1;
            end
          end else begin
            todo_q[next_c] <= 1'b0;
          end
        end else begin                               // end of a pass
          if (r_max > lim_x) begin
            resp  <= sat(r_max);
            sched <= 1'b0;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else if (r_next <= r_q) begin          // converged
            resp  <= sat(r_q);
            sched <= 1'b1;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            r_q    <= r_next;
            todo_q <= set;
            passes <= passes + 16'd1;
          end
        end
      end
    end
  end

endmodule
