// tb_de_optimizer: runs two complete optimisations and checks
//   * the run length: done exactly 210 + 213 G clocks after start
//     (N_EVAL = 16: 4 initial clocks, 4 initial costings of 51 clocks,
//     then per generation 4 trials of 53 clocks plus 1);
//   * the generation counter reaches G;
//   * the best cost of the population never rises from one generation to the
//     next (greedy selection keeps every individual at least as good);
//   * the reported best cost equals an independent model's cost of the
//     reported best genes, and is no worse than the initial population's;
//   * trials won selection, and F and CR were regenerated, at least once;
//   * a third run seeded with the first run's best genes ends with a cost no
//     higher than the seed's (manually given initial values).
module tb_de_optimizer;
  import de_pid_pkg::*;
  import tb_model_pkg::*;
  localparam int G = 20;
  localparam int N_EVAL = 16;
  logic clk = 0, rst = 1, start = 0, seed_en = 0;
  genes_t seed_genes = '0;
  longint seed_cost = -1;
  logic busy, done;
  genes_t best;
  cost_t best_cost, pop_best_cost;
  logic [15:0] gen_count, n_trial_wins, n_f_regen, n_cr_regen;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  de_optimizer #(.G(G), .N_EVAL(N_EVAL)) dut (.*);

  genes_t dut_seed;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    for (int run = 0; run < 3; run++) begin
      int k;
      longint last_gen_best, first_best, want;
      logic [15:0] last_gen;
      seed_en = (run == 2);
      start = 1;
      @(negedge clk);
      start = 0;
      seed_en = 0;
      seed_genes = '1;   // must have been latched with start
      k = 1;
      last_gen = 0;
      last_gen_best = -1;
      first_best = -1;
      while (!done && k < 100000) begin
        if (gen_count != last_gen) begin
          // a generation has just ended
          if (first_best < 0) first_best = pop_best_cost;
          checks++;
          if (last_gen_best >= 0 && longint'(pop_best_cost) > last_gen_best) begin
            failures++;
            $display("FAIL: best cost rose from %0d to %0d", last_gen_best, pop_best_cost);
          end
          last_gen_best = pop_best_cost;
          last_gen = gen_count;
        end
        @(negedge clk);
        k++;
      end
      checks++;
      if (k != 210 + 213 * G) begin failures++; $display("FAIL: done after %0d clocks, expected %0d", k, 210 + 213 * G); end
      checks++;
      if (gen_count != 16'(G)) begin failures++; $display("FAIL: %0d generations", gen_count); end
      want = fitness_cost(best[0], best[1], best[2], N_EVAL, 2000);
      checks++;
      if (longint'(best_cost) != want) begin
        failures++;
        $display("FAIL: best cost %0d, model gives %0d for %0d %0d %0d", best_cost, want, best[0], best[1], best[2]);
      end
      checks++;
      if (longint'(best_cost) > first_best || best_cost != pop_best_cost) begin
        failures++; $display("FAIL: final best %0d, first generation %0d", best_cost, first_best);
      end
      checks++;
      if (n_trial_wins == 0 || n_f_regen == 0 || n_cr_regen == 0) begin
        failures++;
        $display("FAIL: mechanism missing: wins %0d F %0d CR %0d", n_trial_wins, n_f_regen, n_cr_regen);
      end
      $display("run %0d: %0d clocks, best Kp=%0d Ti=%0d Td=%0d cost %0d (after generation 1: %0d), wins %0d, F regen %0d, CR regen %0d",
               run, k, best[0], best[1], best[2], best_cost, first_best, n_trial_wins, n_f_regen, n_cr_regen);
      if (run == 0) begin
        dut_seed  = best;
        seed_cost = best_cost;
      end else if (run == 2) begin
        checks++;
        if (longint'(best_cost) > seed_cost) begin
          failures++; $display("FAIL: seeded run ended at %0d, seed cost %0d", best_cost, seed_cost);
        end
      end
      repeat (5) @(negedge clk);
      seed_genes = dut_seed;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
