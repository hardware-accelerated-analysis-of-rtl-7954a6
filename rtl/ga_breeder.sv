// ga_breeder: creates one offspring chromosome by selection, crossover and
// mutation.
//
// Selection: each of the two parents is the fitter of two parents drawn at
// random from the current parent list (binary tournament; lower fitness
// value = fewer unschedulable tasks and flows = fitter). Crossover: with
// probability cx_rate/256 the child takes the first half of its genes from
// parent A and the second half from parent B; otherwise it copies A.
// Mutation: each gene is, with probability mut_rate/256, replaced by a
// random core id in 0..ncores-1. Random numbers come from ga_lfsr, which
// steps every cycle; a value in 0..n-1 is formed as (r16 * n) >> 16.
// Tournament selection and the half-and-half cut are this design's choices
// for the operators the genetic algorithm names.
//
// Interface and timing: pulse start with dst_slot and the configuration
// valid. Two cycles pick the parents and one decides on crossover; then one
// gene per cycle is written to the population memory (we, wr_slot, wr_gene,
// wr_data) while the parents' genes are read through rd_slot_a/b, rd_gene
// and rd_a/rd_b. done is high for one cycle after the last gene, i.e.
// num_tasks + 4 cycles after start. cx_done and mutated report whether the
// last child was crossed over and how many genes were mutated.
module ga_breeder
  import e2erta_pkg::*;
#(
  parameter int unsigned POP_SIZE = 16,
  localparam int unsigned NSLOT   = 2 * POP_SIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  idx_t        dst_slot,
  input  idx_t        pop_size,
  input  idx_t        num_tasks,
  input  logic [15:0] ncores,
  input  logic [7:0]  cx_rate,
  input  logic [7:0]  mut_rate,
  input  idx_t        parents [POP_SIZE],
  input  logic [15:0] fit [NSLOT],
  input  logic [31:0] rnd,
  output idx_t        rd_slot_a,
  output idx_t        rd_slot_b,
  output idx_t        rd_gene,
  input  core_t       rd_a,
  input  core_t       rd_b,
  output logic        we,
  output idx_t        wr_slot,
  output idx_t        wr_gene,
  output core_t       wr_data,
  output logic        busy,
  output logic        done,
  output logic        cx_done,
  output logic [15:0] mutated
);

  typedef enum logic [2:0] {S_IDLE, S_SELA, S_SELB, S_CX, S_GENE} state_e;
  state_e state_q;

  idx_t pa_q, pb_q, g_q, half_q;
  logic cx_q;

  // Tournament between two random parents.
  idx_t i1, i2, winner;
  always_comb begin
    i1 = idx_t'((32'(rnd[15:0])  * 32'(pop_size)) >> 16);
    i2 = idx_t'((32'(rnd[31:16]) * 32'(pop_size)) >> 16);
    winner = (fit[parents[i1]] <= fit[parents[i2]]) ? parents[i1] : parents[i2];
  end

  // Gene of the child.
  core_t src_gene, new_core;
  logic  mut_c;
  always_comb begin
    src_gene = (cx_q && g_q >= half_q) ? rd_b : rd_a;
    mut_c    = rnd[7:0] < mut_rate;
    new_core = core_t'((32'(rnd[31:16]) * 32'(ncores)) >> 16);
  end

  assign rd_slot_a = pa_q;
  assign rd_slot_b = pb_q;
  assign rd_gene   = g_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pa_q    <= '0;
      pb_q    <= '0;
      g_q     <= '0;
      half_q  <= '0;
      cx_q    <= 1'b0;
      we      <= 1'b0;
      wr_slot <= '0;
      wr_gene <= '0;
      wr_data <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      cx_done <= 1'b0;
      mutated <= '0;
    end else begin
      done <= 1'b0;
      we   <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          wr_slot <= dst_slot;
          half_q  <= num_tasks >> 1;
          g_q     <= '0;
          mutated <= '0;
          busy    <= 1'b1;
          state_q <= S_SELA;
        end
        S_SELA: begin pa_q <= winner; state_q <= S_SELB; end
        S_SELB: begin pb_q <= winner; state_q <= S_CX; end
        S_CX: begin
          cx_q    <= rnd[7:0] < cx_rate;
          cx_done <= rnd[7:0] < cx_rate;
          state_q <= S_GENE;
        end
        S_GENE: begin
          if (g_q == num_tasks) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            we      <= 1'b1;
            wr_gene <= g_q;
            wr_data <= mut_c ? new_core : src_gene;
            if (mut_c) mutated <= mutated + 16'd1;
            g_q     <= g_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
