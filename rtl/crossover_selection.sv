// crossover_selection: binomial crossover and greedy selection of DE.
//
// Crossover: gene j of the trial vector comes from the mutant when its random
// draw cr_draw[j] is below CR or when j is jrand, otherwise from the target,
// so at least one gene always comes from the mutant. Selection: once the
// trial's cost is known, the trial (with its F and CR) replaces the target
// when its cost is lower or equal; ties go to the trial. Both rules follow the
// design description. Purely combinational.
module crossover_selection
  import de_pid_pkg::*;
(
  // crossover
  input  genes_t          target_genes,
  input  genes_t          mutant_genes,
  input  cr_t             cr,
  input  cr_t [D-1:0]     cr_draw,
  input  logic [1:0]      jrand,
  output genes_t          trial_genes,
  // selection
  input  indiv_t          target,
  input  cost_t           target_cost,
  input  indiv_t          trial,
  input  cost_t           trial_cost,
  output indiv_t          winner,
  output cost_t           winner_cost,
  output logic            trial_wins
);

  always_comb begin
    for (int j = 0; j < D; j++)
      trial_genes[j] = (cr_draw[j] < cr || 2'(j) == jrand) ? mutant_genes[j]
                                                           : target_genes[j];
    trial_wins  = (trial_cost <= target_cost);
    winner      = trial_wins ? trial : target;
    winner_cost = trial_wins ? trial_cost : target_cost;
  end

endmodule
