// ga_lfsr: pseudo-random number source of the genetic algorithm.
//
// A 32-bit xorshift generator (x ^= x << 13; x ^= x >> 17; x ^= x << 5)
// that steps once per enabled clock cycle. The genetic operators draw every
// random choice (individuals, crossover, mutation, new core ids) from its
// output. The choice of generator is this design's own.
//
// Interface and timing: load (one cycle) sets the state to seed, or to a
// fixed non-zero constant when seed is zero, since zero is a fixed point of
// xorshift. rnd is the current state; with en high it advances at the next
// clock edge.
module ga_lfsr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        en,
  output logic [31:0] rnd
);

  logic [31:0] a, b, n;
  always_comb begin
    a = rnd ^ (rnd << 13);
    b = a ^ (a >> 17);
    n = b ^ (b << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rnd <= 32'h2545_F491;
    else if (load) rnd <= (seed == '0) ? 32'h2545_F491 : seed;
    else if (en)   rnd <= n;
  end

endmodule
