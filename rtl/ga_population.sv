// ga_population: chromosome memory of the genetic algorithm.
//
// A chromosome is one task mapping: gene g holds the core id task g is
// mapped on. The memory holds 2*POP_SIZE chromosomes ("slots"): the parent
// population and the offspring created from it share the memory, and a
// ranking step decides which slots are parents in the next generation, so
// no chromosome is ever copied.
//
// Interface and timing: one write port (we, wr_slot, wr_gene, wr_data),
// written at the clock edge. NRD read ports share one gene index rd_gene,
// each with its own slot rd_slot[k]; reads are combinational. The shared
// gene index lets the E2ERTA instances of the evaluator be loaded with
// different chromosomes in the same cycle.
module ga_population
  import e2erta_pkg::*;
#(
  parameter int unsigned POP_SIZE  = 16,
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned NRD       = 4,
  localparam int unsigned NSLOT    = 2 * POP_SIZE
) (
  input  logic  clk,
  input  logic  we,
  input  idx_t  wr_slot,
  input  idx_t  wr_gene,
  input  core_t wr_data,
  input  idx_t  rd_gene,
  input  idx_t  rd_slot [NRD],
  output core_t rd_data [NRD]
);

  core_t genes [NSLOT][MAX_TASKS];

  always_ff @(posedge clk)
    if (we) genes[wr_slot][wr_gene] <= wr_data;

  always_comb
    for (int unsigned k = 0; k < NRD; k++) rd_data[k] = genes[rd_slot[k]][rd_gene];

endmodule
