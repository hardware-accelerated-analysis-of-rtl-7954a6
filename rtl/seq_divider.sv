// seq_divider: unsigned restoring divider producing one quotient bit per
// clock cycle.
//
// The accelerator needs divisions only off the critical recurrence: to form
// utilisations c/t in fixed point and to divide the numerators of the PRE and
// NLB bounds by 1 - (sum of utilisations). A bit-serial divider keeps that
// cheap. The divider is this design's own choice.
//
// Interface and timing: pulse start for one cycle with dividend and divisor
// valid. The operands are captured, busy rises, and done is high for one
// cycle DW+1 cycles after the start cycle, with quotient and remainder
// valid; they hold until the next start. A start while busy is ignored. Division by zero
// returns an all-ones quotient and the dividend as remainder.
module seq_divider #(
  parameter int unsigned DW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  localparam int unsigned CNTW = $clog2(DW + 1);

  logic [DW-1:0]   dvs_q;      // divisor
  logic [DW-1:0]   quo_q;      // dividend shifting out, quotient shifting in
  logic [DW:0]     rem_q;      // partial remainder, one guard bit
  logic [CNTW-1:0] cnt_q;

  logic [DW:0] rem_shift;
  logic [DW:0] rem_sub;
  always_comb begin
    rem_shift = {rem_q[DW-1:0], quo_q[DW-1]};
    rem_sub   = rem_shift - {1'b0, dvs_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvs_q <= '0;
      quo_q <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dvs_q <= divisor;
        quo_q <= dividend;
        rem_q <= '0;
        cnt_q <= CNTW'(DW);
        busy  <= 1'b1;
      end else if (busy) begin
        if (rem_sub[DW]) begin          // negative: restore
          rem_q <= rem_shift;
          quo_q <= {quo_q[DW-2:0], 1'b0};
        end else begin
          rem_q <= rem_sub;
          quo_q <= {quo_q[DW-2:0], 1'b1};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q[DW-1:0];

endmodule
