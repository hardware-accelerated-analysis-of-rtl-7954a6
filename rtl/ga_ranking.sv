// ga_ranking: ranks the combined parent and offspring population and keeps
// the best half as the next parents.
//
// Fitness is the number of unschedulable tasks and flows of a mapping, so
// lower is better. The ranking is a sequential selection sort: keep rounds
// each scan all nslots slots once (one slot per cycle) and take the slot
// with the lowest fitness not yet taken (the lower slot number wins a tie).
// A last scan lists the slots not taken, which the next offspring will
// overwrite. The sort method is this design's own.
//
// Interface and timing: pulse start with nslots (2 x population size),
// keep (population size) and fit valid; they must hold until done. done
// is high for one cycle keep*(nslots+1) + nslots + 1 cycles after the
// start cycle. Then
// order[0..keep-1] lists the parents from best to worst and
// order[keep..nslots-1] the free slots; order holds until the next start.
module ga_ranking #(
  parameter int unsigned POP_SIZE = 16,
  localparam int unsigned NSLOT   = 2 * POP_SIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  nslots,
  input  logic [7:0]  keep,
  input  logic [15:0] fit [NSLOT],
  output logic [7:0]  order [NSLOT],
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_FREE} state_e;
  state_e state_q;

  logic [NSLOT-1:0] taken_q;
  logic [7:0]       r_q, s_q, best_q;
  logic [16:0]      best_fit_q;       // bit 16 set: nothing found yet

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      taken_q    <= '0;
      r_q        <= '0;
      s_q        <= '0;
      best_q     <= '0;
      best_fit_q <= '1;
      busy       <= 1'b0;
      done       <= 1'b0;
      for (int unsigned k = 0; k < NSLOT; k++) order[k] <= 8'(k);
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          taken_q    <= '0;
          r_q        <= '0;
          s_q        <= '0;
          best_fit_q <= '1;
          busy       <= 1'b1;
          state_q    <= S_SCAN;
        end
        S_SCAN: begin
          if (s_q == nslots) begin
            order[r_q]      <= best_q;
            taken_q[best_q] <= 1'b1;
            r_q             <= r_q + 8'd1;
            s_q             <= '0;
            best_fit_q      <= '1;
            if (r_q + 8'd1 == keep) state_q <= S_FREE;
          end else begin
            if (!taken_q[s_q] && {1'b0, fit[s_q]} < best_fit_q) begin
              best_q     <= s_q;
              best_fit_q <= {1'b0, fit[s_q]};
            end
            s_q <= s_q + 8'd1;
          end
        end
        S_FREE: begin
          if (s_q == nslots) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            if (!taken_q[s_q]) begin
              order[r_q] <= s_q;
              r_q        <= r_q + 8'd1;
            end
            s_q <= s_q + 8'd1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
