// ga_mapper: hardware genetic-algorithm search for a task-to-core mapping
// that makes a task set end-to-end schedulable on the mesh NoC, with the
// E2ERTA accelerator as its fitness function.
//
// A chromosome is a mapping: gene g holds the core task g runs on, so it
// has num_tasks genes. The search keeps 2 x pop_size chromosome slots in
// ga_population. It first fills pop_size slots with random cores and
// evaluates them (ga_eval: N_INST E2ERTA instances in lockstep; fitness =
// unschedulable tasks + unschedulable flows). Then each generation:
//   1. rank   - ga_ranking sorts all slots by fitness and keeps the best
//               pop_size as parents; the other slots are free;
//   2. stop   - if the best fitness is 0 (a schedulable mapping) or
//               num_gen generations have been bred, the search ends;
//   3. breed  - ga_breeder writes pop_size offspring into the free slots
//               (tournament selection, crossover of two halves, mutation);
//   4. eval   - ga_eval computes the offspring's fitness.
// Parents survive when they rank among the best of the combined population,
// so the best fitness never gets worse from one generation to the next.
// The flow of the pipeline, the fixed generation limit, the early stop, the
// parallel lockstep fitness instances and their default numbers follow the
// document; the operators' details are this design's choices (see
// ga_breeder, ga_ranking).
//
// Interface: while idle, the host writes the task table (c, t, d; the core
// field is ignored) and the flow table, and sets the configuration
// (pop_size 2..POP_SIZE, num_inst 1..N_INST fitness instances used,
// num_gen, cx_rate and mut_rate out of 256, ncores
// 1..256, num_tasks, num_flows, scheme, seed). start begins a search; busy
// stays high until done pulses. gen_done pulses after every ranking with
// generation (offspring populations bred so far) and best_fit updated.
// After done, best_fit/best_slot give the best mapping found and
// rd_best_core returns gene rd_gene of it. ops_cycles counts the cycles
// spent in the GA operators (initialisation, ranking, breeding) and
// eval_cycles those spent in the fitness function, both from start.
module ga_mapper
  import e2erta_pkg::*;
#(
  parameter int unsigned POP_SIZE  = 16,
  parameter int unsigned N_INST    = 5,
  parameter int unsigned MESH_COLS = 10,
  parameter int unsigned MESH_ROWS = 10,
  parameter int unsigned MAX_TASKS = 128,
  parameter int unsigned MAX_FLOWS = 128,
  localparam int unsigned NSLOT    = 2 * POP_SIZE
) (
  input  logic        clk,
  input  logic        rst_n,
  // table load
  input  logic        task_we,
  input  idx_t        task_widx,
  input  task_info_t  task_wdata,
  input  logic        flow_we,
  input  idx_t        flow_widx,
  input  flow_info_t  flow_wdata,
  // configuration
  input  idx_t        pop_size,
  input  logic [7:0]  num_inst,
  input  logic [15:0] num_gen,
  input  logic [7:0]  cx_rate,
  input  logic [7:0]  mut_rate,
  input  logic [15:0] ncores,
  input  idx_t        num_tasks,
  input  idx_t        num_flows,
  input  scheme_e     scheme,
  input  logic [31:0] seed,
  // control and results
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        gen_done,
  output logic [15:0] generation,
  output logic [15:0] best_fit,
  output idx_t        best_slot,
  input  idx_t        rd_gene,
  output core_t       rd_best_core,
  output logic [31:0] ops_cycles,
  output logic [31:0] eval_cycles,
  // statistics of the run
  output logic [31:0] n_evals,
  output logic [31:0] n_batches,
  output logic [31:0] n_partial,
  output logic [31:0] idle_cycles,
  output logic [31:0] n_cx,
  output logic [31:0] n_mut,
  output logic [31:0] n_pre,
  output logic [31:0] n_lbrej,
  output logic [31:0] n_exact
);

  localparam int unsigned NRD = N_INST + 2;

  // ------------------------------------------------------------ host tables
  task_info_t tasks [MAX_TASKS];
  flow_info_t flows [MAX_FLOWS];

  always_ff @(posedge clk) begin
    if (task_we && !busy) tasks[task_widx] <= task_wdata;
    if (flow_we && !busy) flows[flow_widx] <= flow_wdata;
  end

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_EVAL, S_EVALW, S_RANK, S_RANKW, S_BREED, S_BREEDW,
    S_DONE
  } state_e;
  state_e state_q;

  logic [7:0]  order_q [NSLOT];
  logic [15:0] fit_q [NSLOT];
  idx_t        slot_q, g_q, k_q;
  logic        go;

  assign go = start && !busy;

  // -------------------------------------------------------- random numbers
  // The generator steps only while random numbers are used, so a search is
  // the same whatever the fitness function's timing (number of instances).
  logic [31:0] rnd;
  logic        rng_en;
  ga_lfsr u_rng (
    .clk(clk), .rst_n(rst_n), .load(go), .seed(seed), .en(rng_en), .rnd(rnd)
  );

  // ------------------------------------------------------------ population
  logic  pop_we;
  idx_t  pop_wslot, pop_wgene, pop_rgene;
  core_t pop_wdata;
  idx_t  pop_rslot [NRD];
  core_t pop_rdata [NRD];

  ga_population #(.POP_SIZE(POP_SIZE), .MAX_TASKS(MAX_TASKS), .NRD(NRD)) u_pop (
    .clk(clk), .we(pop_we), .wr_slot(pop_wslot), .wr_gene(pop_wgene),
    .wr_data(pop_wdata), .rd_gene(pop_rgene), .rd_slot(pop_rslot),
    .rd_data(pop_rdata)
  );

  // --------------------------------------------------------------- breeder
  logic  br_start, br_busy, br_done, br_we, br_cx;
  assign rng_en = (state_q == S_INIT) || br_busy;
  idx_t  br_sa, br_sb, br_gene, br_wslot, br_wgene;
  core_t br_wdata;
  idx_t  parents [POP_SIZE];
  logic [15:0] br_mut;

  always_comb
    for (int unsigned k = 0; k < POP_SIZE; k++) parents[k] = idx_t'(order_q[k]);

  ga_breeder #(.POP_SIZE(POP_SIZE)) u_breed (
    .clk(clk), .rst_n(rst_n), .start(br_start),
    .dst_slot(idx_t'(order_q[8'(32'(pop_size) + 32'(k_q))])),
    .pop_size(pop_size), .num_tasks(num_tasks), .ncores(ncores),
    .cx_rate(cx_rate), .mut_rate(mut_rate), .parents(parents), .fit(fit_q),
    .rnd(rnd), .rd_slot_a(br_sa), .rd_slot_b(br_sb), .rd_gene(br_gene),
    .rd_a(pop_rdata[N_INST]), .rd_b(pop_rdata[N_INST+1]),
    .we(br_we), .wr_slot(br_wslot), .wr_gene(br_wgene), .wr_data(br_wdata),
    .busy(br_busy), .done(br_done), .cx_done(br_cx), .mutated(br_mut)
  );

  // ------------------------------------------------------- fitness function
  logic              ev_start, ev_busy, ev_done;
  logic [7:0]        ev_first;
  idx_t              ev_gene;
  idx_t              ev_slot [N_INST];
  core_t             ev_data [N_INST];
  logic [N_INST-1:0] fit_we;
  idx_t              fit_slot [N_INST];
  logic [15:0]       fit_val [N_INST];

  always_comb
    for (int unsigned k = 0; k < N_INST; k++) ev_data[k] = pop_rdata[k];

  ga_eval #(
    .POP_SIZE(POP_SIZE), .N_INST(N_INST), .MESH_COLS(MESH_COLS),
    .MESH_ROWS(MESH_ROWS), .MAX_TASKS(MAX_TASKS), .MAX_FLOWS(MAX_FLOWS)
  ) u_eval (
    .clk(clk), .rst_n(rst_n), .start(ev_start), .list(order_q),
    .first(ev_first), .count(pop_size), .num_inst(num_inst), .scheme(scheme),
    .num_tasks(num_tasks), .num_flows(num_flows), .tasks(tasks),
    .flows(flows), .rd_gene(ev_gene), .rd_slot(ev_slot), .rd_data(ev_data),
    .fit_we(fit_we), .fit_slot(fit_slot), .fit_val(fit_val),
    .busy(ev_busy), .done(ev_done), .stats_clr(go),
    .n_evals(n_evals), .n_batches(n_batches), .n_partial(n_partial),
    .idle_cycles(idle_cycles), .n_pre(n_pre), .n_lbrej(n_lbrej),
    .n_exact(n_exact)
  );

  // --------------------------------------------------------------- ranking
  logic       rk_start, rk_busy, rk_done;
  logic [7:0] rk_order [NSLOT];

  ga_ranking #(.POP_SIZE(POP_SIZE)) u_rank (
    .clk(clk), .rst_n(rst_n), .start(rk_start),
    .nslots(8'(2 * 32'(pop_size))), .keep(8'(pop_size)), .fit(fit_q),
    .order(rk_order), .busy(rk_busy), .done(rk_done)
  );

  // ------------------------------------------------ population port muxing
  always_comb begin
    pop_we    = br_we;
    pop_wslot = br_wslot;
    pop_wgene = br_wgene;
    pop_wdata = br_wdata;
    if (state_q == S_INIT) begin
      pop_we    = 1'b1;
      pop_wslot = slot_q;
      pop_wgene = g_q;
      pop_wdata = core_t'((32'(rnd[31:16]) * 32'(ncores)) >> 16);
    end
    pop_rgene = busy ? (ev_busy ? ev_gene : br_gene) : rd_gene;
    for (int unsigned k = 0; k < N_INST; k++) pop_rslot[k] = ev_slot[k];
    pop_rslot[N_INST]   = busy ? br_sa : best_slot;
    pop_rslot[N_INST+1] = br_sb;
  end

  assign rd_best_core = pop_rdata[N_INST];
  assign ev_start = (state_q == S_EVAL);
  assign rk_start = (state_q == S_RANK);
  assign br_start = (state_q == S_BREED);
  assign ev_first = (generation == '0) ? 8'd0 : 8'(pop_size);

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      slot_q      <= '0;
      g_q         <= '0;
      k_q         <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      gen_done    <= 1'b0;
      generation  <= '0;
      best_fit    <= '1;
      best_slot   <= '0;
      ops_cycles  <= '0;
      eval_cycles <= '0;
      n_cx        <= '0;
      n_mut       <= '0;
      for (int unsigned s = 0; s < NSLOT; s++) begin
        order_q[s] <= 8'(s);
        fit_q[s]   <= '1;
      end
    end else begin
      done     <= 1'b0;
      gen_done <= 1'b0;
      if (busy) begin
        if (ev_busy || state_q == S_EVAL) eval_cycles <= eval_cycles + 32'd1;
        else                              ops_cycles  <= ops_cycles + 32'd1;
      end
      for (int unsigned k = 0; k < N_INST; k++)
        if (fit_we[k]) fit_q[fit_slot[k]] <= fit_val[k];
      unique case (state_q)
        S_IDLE: if (go) begin
          busy        <= 1'b1;
          generation  <= '0;
          best_fit    <= '1;
          ops_cycles  <= '0;
          eval_cycles <= '0;
          n_cx        <= '0;
          n_mut       <= '0;
          slot_q      <= '0;
          g_q         <= '0;
          for (int unsigned s = 0; s < NSLOT; s++) begin
            order_q[s] <= 8'(s);
            fit_q[s]   <= '1;
          end
          state_q     <= (num_tasks == '0) ? S_EVAL : S_INIT;
        end
        // Random initial population: one gene per cycle.
        S_INIT: begin
          if (g_q + 1'b1 == num_tasks) begin
            g_q <= '0;
            if (slot_q + 1'b1 == pop_size) state_q <= S_EVAL;
            slot_q <= slot_q + 1'b1;
          end else begin
            g_q <= g_q + 1'b1;
          end
        end
        S_EVAL:  state_q <= S_EVALW;
        S_EVALW: if (ev_done) state_q <= S_RANK;
        S_RANK:  state_q <= S_RANKW;
        S_RANKW: if (rk_done) begin
          order_q   <= rk_order;
          best_fit  <= fit_q[rk_order[0]];
          best_slot <= idx_t'(rk_order[0]);
          gen_done  <= 1'b1;
          k_q       <= '0;
          if (fit_q[rk_order[0]] == '0 || generation == num_gen)
            state_q <= S_DONE;
          else
            state_q <= S_BREED;
        end
        S_BREED:  state_q <= S_BREEDW;
        S_BREEDW: if (br_done) begin
          n_cx  <= n_cx + 32'(br_cx);
          n_mut <= n_mut + 32'(br_mut);
          if (k_q + 1'b1 == pop_size) begin
            generation <= generation + 16'd1;
            state_q    <= S_EVAL;
          end else begin
            k_q     <= k_q + 1'b1;
            state_q <= S_BREED;
          end
        end
        S_DONE: begin
          busy    <= 1'b0;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
