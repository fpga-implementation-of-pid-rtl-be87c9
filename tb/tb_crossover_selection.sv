// tb_crossover_selection: checks binomial crossover (gene from the mutant when
// its draw is below CR or it is jrand, so at least one gene always comes from
// the mutant) and greedy selection (the trial wins on lower or equal cost,
// ties included) against a direct computation.
module tb_crossover_selection;
  import de_pid_pkg::*;
  genes_t target_genes, mutant_genes, trial_genes;
  cr_t cr;
  cr_t [D-1:0] cr_draw;
  logic [1:0] jrand;
  indiv_t target, trial, winner;
  cost_t target_cost, trial_cost, winner_cost;
  logic trial_wins;
  int checks = 0, failures = 0, n_ties = 0;

  crossover_selection dut (.*);

  initial begin
    for (int n = 0; n < 20000; n++) begin
      for (int j = 0; j < D; j++) begin
        target_genes[j] = 16'($urandom);
        mutant_genes[j] = ~target_genes[j];
        cr_draw[j] = cr_t'($urandom);
      end
      cr = cr_t'($urandom);
      jrand = 2'($urandom_range(0, 2));
      target = indiv_t'({$urandom, $urandom, $urandom});
      trial  = indiv_t'({$urandom, $urandom, $urandom});
      target_cost = cost_t'($urandom_range(0, 20));
      trial_cost  = cost_t'($urandom_range(0, 20));
      #1;
      for (int j = 0; j < D; j++) begin
        checks++;
        if (trial_genes[j] != ((cr_draw[j] < cr || j == int'(jrand)) ? mutant_genes[j] : target_genes[j])) begin
          failures++;
          if (failures < 10) $display("FAIL: crossover gene %0d", j);
        end
      end
      checks++;
      if (trial_genes[jrand] != mutant_genes[jrand]) failures++;
      if (trial_cost == target_cost) n_ties++;
      checks++;
      if (trial_wins != (trial_cost <= target_cost) ||
          winner != ((trial_cost <= target_cost) ? trial : target) ||
          winner_cost != ((trial_cost <= target_cost) ? trial_cost : target_cost)) begin
        failures++;
        if (failures < 10) $display("FAIL: selection trial %0d target %0d", trial_cost, target_cost);
      end
    end
    checks++;
    if (n_ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
