// rta_bounds: the PRE upper bound and the NLB lower bound of a response time.
//
// Removing the ceiling from the response-time recurrence brackets its
// fixed point between two closed forms that need only the utilisations of
// the interference set. With S the set, U_j = C_j/T_j and J_j the jitter of
// interferer j (zero for tasks):
//   lower bound (tasks and flows)
//     lb = (C_i + sum_j J_j U_j) / (1 - sum_j U_j)
//   upper bound for a task (Bini-Baruah bound)
//     ub = (c_i + sum_j c_j (1 - u_j)) / (1 - sum_j u_j)
//   upper bound for a flow (from ceil(x) <= x + 1)
//     ub = (C_i + sum_j (J_j U_j + C_j)) / (1 - sum_j U_j)
// All sums are formed in one pass over the set, so both bounds share their
// inputs and the accumulators; one bit-serial divider then forms lb and ub.
// A bound exists only when the summed utilisation is below 1.
//
// Rounding is chosen so that the bounds stay safe: every utilisation comes
// as a rounded-down (u_dn) and a rounded-up (u_up) fixed point value; lb
// uses u_dn and is rounded down, ub uses u_up in the denominator and in
// J_j U_j, u_dn in c_j (1 - u_j), and is rounded up. Both saturate at the
// largest time value.
//
// Interface and timing: pulse start with is_task, want_lb, want_ub, base
// (c_i or C_i) and set valid; these must hold until done. The module walks
// the members of set, one per cycle, reading the interferer's c_j, u_dn_j,
// u_up_j and jit_j through rd_idx (combinational read in the parent). Then
// each requested bound takes one division of 64 cycles plus two cycles.
// done is high for one cycle; lb_ok / ub_ok say whether each bound exists
// and was requested. Results hold until the next start.
module rta_bounds
  import e2erta_pkg::*;
#(
  parameter int unsigned MAX_N = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_task,
  input  logic             want_lb,
  input  logic             want_ub,
  input  time_t            base,
  input  logic [MAX_N-1:0] set,
  output idx_t             rd_idx,
  input  time_t            c_j,
  input  util_t            u_dn_j,
  input  util_t            u_up_j,
  input  logic [TW:0]      jit_j,
  output logic             busy,
  output logic             done,
  output time_t            lb,
  output logic             lb_ok,
  output time_t            ub,
  output logic             ub_ok
);

  localparam int unsigned AW = 64;          // accumulator and divider width
  localparam int unsigned SW = UW + IW;     // summed utilisation width

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_LB, S_LBW, S_UB, S_UBW} state_e;
  state_e state_q;

  logic [MAX_N-1:0] todo_q;
  logic [SW-1:0]    su_dn_q, su_up_q;
  logic [AW-1:0]    nl_q, nu_q;

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

  // Denominators 1 - sum(u), in units of 2^-FRAC.
  logic [SW-1:0] one_s;
  logic          den_lb_ok, den_ub_ok;
  logic [AW-1:0] den_lb, den_ub;
  always_comb begin
    one_s     = SW'(U_ONE);
    den_lb_ok = su_dn_q < one_s;
    den_ub_ok = su_up_q < one_s;
    den_lb    = AW'(one_s - su_dn_q);
    den_ub    = AW'(one_s - su_up_q);
  end

  // Per-interferer terms, in units of 2^-FRAC.
  logic [AW-1:0] t_lb, t_ub;
  always_comb begin
    t_lb = AW'(jit_j) * AW'(u_dn_j);
    if (is_task) t_ub = AW'(c_j) * AW'(U_ONE - u_dn_j);
    else         t_ub = AW'(jit_j) * AW'(u_up_j) + (AW'(c_j) << FRAC);
  end

  logic          div_start, div_busy, div_done;
  logic [AW-1:0] div_a, div_b, div_q, div_r;

  seq_divider #(.DW(AW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (div_a),
    .divisor  (div_b),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  always_comb begin
    div_start = (state_q == S_LB) || (state_q == S_UB);
    div_a     = (state_q == S_LB) ? nl_q : nu_q;
    div_b     = (state_q == S_LB) ? den_lb : den_ub;
  end

  function automatic time_t sat(input logic [AW-1:0] v);
    return (v > AW'({TW{1'b1}})) ? '1 : v[TW-1:0];
  endfunction

  logic [AW-1:0] q_ceil;
  assign q_ceil = div_q + AW'(div_r != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      todo_q  <= '0;
      su_dn_q <= '0;
      su_up_q <= '0;
      nl_q    <= '0;
      nu_q    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      lb      <= '0;
      lb_ok   <= 1'b0;
      ub      <= '1;
      ub_ok   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          todo_q  <= set;
          su_dn_q <= '0;
          su_up_q <= '0;
          nl_q    <= AW'(base) << FRAC;
          nu_q    <= AW'(base) << FRAC;
          lb      <= '0;
          lb_ok   <= 1'b0;
          ub      <= '1;
          ub_ok   <= 1'b0;
          busy    <= 1'b1;
          state_q <= S_ACC;
        end
        S_ACC: begin
          if (any_c) begin
            su_dn_q        <= su_dn_q + SW'(u_dn_j);
            su_up_q        <= su_up_q + SW'(u_up_j);
            nl_q           <= nl_q + t_lb;
            nu_q           <= nu_q + t_ub;
            todo_q[next_c] <= 1'b0;
          end else if (want_lb && den_lb_ok) begin
            state_q <= S_LB;
          end else if (want_ub && den_ub_ok) begin
            state_q <= S_UB;
          end else begin
            busy    <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_LB:  state_q <= S_LBW;
        S_LBW: if (div_done) begin
          lb    <= sat(div_q);
          lb_ok <= 1'b1;
          if (want_ub && den_ub_ok) state_q <= S_UB;
          else begin
            busy    <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        S_UB:  state_q <= S_UBW;
        S_UBW: if (div_done) begin
          ub      <= sat(q_ceil);
          ub_ok   <= 1'b1;
          busy    <= 1'b0;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
