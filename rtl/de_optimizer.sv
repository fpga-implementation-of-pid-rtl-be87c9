// de_optimizer: differential-evolution optimiser of the PID coefficients.
//
// The population holds NP = 4 individuals, each three 16-bit genes
// (Kp, Ti, Td) with its own mutation factor F and crossover rate CR. The state
// machine first fills the population with random genes (F = 0.5, CR = 0.9)
// and has the fitness module cost each one. Then, for G generations, it builds
// one trial vector per target individual i and costs it:
//
//   * ranking: the population is ranked by cost; the three individuals other
//     than i are listed best first.
//   * ranking-based parent choice: the base vector is the better-ranked of two
//     uniform picks among the three, the first vector of the difference the
//     better-ranked of two uniform picks among the remaining two, and the
//     second vector the last one (so base, a and b are distinct and differ
//     from i).
//   * self-adaptation: with probability 0.1 each, the trial gets a new F in
//     [0.1, 1.0) and a new CR in [0, 1), otherwise it inherits those of i.
//   * mutation v = base + F (a - b); binomial crossover with the target i.
//   * selection: the trial replaces i in the next population when its cost is
//     lower or equal; the next population becomes current at generation end.
//
// Optionally (seed_en with start) individual 0 starts from manually given
// genes instead of random ones, for example the gains in use, so that the
// result is never worse than that starting point.
//
// The algorithm (DE/rand/1/bin), NP = 4, three 16-bit genes, ranking-based
// mutation, self-adaptive F and CR, generational replacement, manually
// given initial values and 50 generations follow the design description. The parent-choice scheme for
// NP = 4, the adaptation rule, the initial F and CR and the LFSR seeds and
// start delays are this design's choices.
//
// Interface: start (one cycle while idle) begins an optimisation; busy is
// high until done pulses for one cycle; best and best_cost then hold the
// lowest-cost individual. pop_best_cost is the lowest cost of the current
// population at any time. The counters report the generations completed,
// trials that won selection and F / CR regenerations.
module de_optimizer
  import de_pid_pkg::*;
#(
  parameter int unsigned G           = 50,
  parameter int unsigned N_EVAL      = 16,
  parameter int unsigned REF         = 2000,
  parameter int unsigned PLANT_SHIFT = 2,
  parameter int unsigned FRAC        = 16,
  parameter int unsigned DERIV_SHIFT = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        seed_en,     // sampled with start: use seed_genes
  input  genes_t      seed_genes,  // manual initial values of individual 0
  output logic        busy,
  output logic        done,
  output genes_t      best,
  output cost_t       best_cost,
  output cost_t       pop_best_cost,
  output logic [15:0] gen_count,
  output logic [15:0] n_trial_wins,
  output logic [15:0] n_f_regen,
  output logic [15:0] n_cr_regen
);

  localparam f_t  F_INIT  = f_t'(64);    // 0.5
  localparam cr_t CR_INIT = cr_t'(230);  // 0.9

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_IEVAL_GO, S_IEVAL_WAIT, S_MUT, S_EVAL_GO, S_EVAL_WAIT,
    S_SEL, S_GEN_END, S_FIN
  } dstate_t;

  dstate_t st;
  indiv_t [NP-1:0] pop, nxt;
  cost_t  [NP-1:0] cost, nxt_cost;
  idx_t            i;
  indiv_t          trial;
  logic            seed_use;
  genes_t          seed_r;

  // ---------------- random numbers ----------------
  logic [3:0][31:0] rng_q;
  logic [3:0]       rng_run;
  logic [2:0][31:0] lanes;
  rand_draws_t      draws;

  rng_lfsr #(.SEED(32'hACE1_2468), .START_DELAY(0))  u_rng0 (.clk, .rst, .en(1'b1), .q(rng_q[0]), .running(rng_run[0]));
  rng_lfsr #(.SEED(32'h1357_9BDF), .START_DELAY(3))  u_rng1 (.clk, .rst, .en(1'b1), .q(rng_q[1]), .running(rng_run[1]));
  rng_lfsr #(.SEED(32'h0F1E_2D3C), .START_DELAY(7))  u_rng2 (.clk, .rst, .en(1'b1), .q(rng_q[2]), .running(rng_run[2]));
  rng_lfsr #(.SEED(32'h7A5B_C3D1), .START_DELAY(12)) u_rng3 (.clk, .rst, .en(1'b1), .q(rng_q[3]), .running(rng_run[3]));

  rng_mixer #(.NRNG(4), .NLANE(3)) u_mix (
    .clk, .rst, .mix_en(busy), .rng_in(rng_q), .lanes
  );

  random_module u_rand (.lanes, .draws);

  // ---------------- ranking ----------------
  idx_t [NP-1:0] rank_of, order;
  idx_t          best_idx, second_idx;

  ranking_module u_rank (
    .cost, .rank_of, .order, .best(best_idx), .second(second_idx)
  );

  assign pop_best_cost = cost[best_idx];

  // ---------------- parent choice, mutation, crossover ----------------
  idx_t [2:0] others;     // the individuals other than i, best first
  idx_t       base_idx, a_idx, b_idx;
  logic [1:0] pa;
  logic       pb;
  idx_t [1:0] rem;
  f_t         f_use;
  cr_t        cr_use;
  genes_t     mutant, trial_genes;

  always_comb begin
    int k;
    k = 0;
    others = '0;
    for (int r = 0; r < NP; r++)
      if (order[r] != i) begin
        others[k] = order[r];
        k++;
      end
    pa       = (draws.pick3_a < draws.pick3_b) ? draws.pick3_a : draws.pick3_b;
    base_idx = others[pa];
    rem      = (pa == 2'd0) ? {others[2], others[1]}
             : (pa == 2'd1) ? {others[2], others[0]}
             :                {others[1], others[0]};
    pb       = draws.pick2_a & draws.pick2_b;
    a_idx    = rem[pb];
    b_idx    = rem[!pb];
    f_use    = draws.tau_f  ? draws.f_new  : pop[i].f;
    cr_use   = draws.tau_cr ? draws.cr_new : pop[i].cr;
  end

  mutation_vector u_mut (
    .base(pop[base_idx].genes), .a(pop[a_idx].genes), .b(pop[b_idx].genes),
    .f(f_use), .v(mutant)
  );

  // ---------------- fitness ----------------
  logic   fit_start, fit_busy, fit_done;
  genes_t fit_genes;
  cost_t  fit_cost;

  assign fit_start = (st == S_IEVAL_GO) || (st == S_EVAL_GO);
  assign fit_genes = (st == S_IEVAL_GO) ? pop[i].genes : trial.genes;

  fitness_module #(
    .REF(REF), .N_EVAL(N_EVAL), .PLANT_SHIFT(PLANT_SHIFT),
    .FRAC(FRAC), .DERIV_SHIFT(DERIV_SHIFT)
  ) u_fit (
    .clk, .rst, .start(fit_start), .genes(fit_genes),
    .busy(fit_busy), .done(fit_done), .cost(fit_cost)
  );

  // ---------------- crossover and selection ----------------
  indiv_t winner;
  cost_t  winner_cost;
  logic   trial_wins;

  crossover_selection u_xs (
    .target_genes(pop[i].genes), .mutant_genes(mutant), .cr(cr_use),
    .cr_draw(draws.cr_draw), .jrand(draws.jrand), .trial_genes,
    .target(pop[i]), .target_cost(cost[i]), .trial, .trial_cost(fit_cost),
    .winner, .winner_cost, .trial_wins
  );

  // ---------------- state machine ----------------
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= S_IDLE;
      pop          <= '0;
      nxt          <= '0;
      cost         <= '0;
      nxt_cost     <= '0;
      i            <= '0;
      trial        <= '0;
      seed_use     <= 1'b0;
      seed_r       <= '0;
      done         <= 1'b0;
      best         <= '0;
      best_cost    <= '0;
      gen_count    <= '0;
      n_trial_wins <= '0;
      n_f_regen    <= '0;
      n_cr_regen   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          i            <= '0;
          gen_count    <= '0;
          n_trial_wins <= '0;
          n_f_regen    <= '0;
          n_cr_regen   <= '0;
          seed_use     <= seed_en;
          seed_r       <= seed_genes;
          st           <= S_INIT;
        end
        S_INIT: begin
          pop[i] <= '{genes: (seed_use && i == '0) ? seed_r : draws.init_genes,
                      f: F_INIT, cr: CR_INIT};
          i      <= i + 1'b1;
          if (i == idx_t'(NP - 1)) st <= S_IEVAL_GO;
        end
        S_IEVAL_GO: st <= S_IEVAL_WAIT;
        S_IEVAL_WAIT: if (fit_done) begin
          cost[i] <= fit_cost;
          i       <= i + 1'b1;
          st      <= (i == idx_t'(NP - 1)) ? S_MUT : S_IEVAL_GO;
        end
        S_MUT: begin
          trial <= '{genes: trial_genes, f: f_use, cr: cr_use};
          if (draws.tau_f)  n_f_regen  <= n_f_regen + 16'd1;
          if (draws.tau_cr) n_cr_regen <= n_cr_regen + 16'd1;
          st <= S_EVAL_GO;
        end
        S_EVAL_GO: st <= S_EVAL_WAIT;
        S_EVAL_WAIT: if (fit_done) st <= S_SEL;
        S_SEL: begin
          nxt[i]      <= winner;
          nxt_cost[i] <= winner_cost;
          if (trial_wins) n_trial_wins <= n_trial_wins + 16'd1;
          i  <= i + 1'b1;
          st <= (i == idx_t'(NP - 1)) ? S_GEN_END : S_MUT;
        end
        S_GEN_END: begin
          pop       <= nxt;
          cost      <= nxt_cost;
          gen_count <= gen_count + 16'd1;
          st        <= (32'(gen_count) == G - 1) ? S_FIN : S_MUT;
        end
        S_FIN: begin
          best      <= pop[best_idx].genes;
          best_cost <= cost[best_idx];
          done      <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // S_SEL uses the cost of the trial, which must be the latest result.
  assert property (@(posedge clk) disable iff (rst) (st == S_SEL) |-> !fit_busy);

endmodule
