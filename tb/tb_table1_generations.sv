// tb_table1_generations: optimisations of 25, 50 and 100 generations, the run
// lengths of the published performance table. Each run must take exactly
// 210 + 213 G clocks (N_EVAL = 16), finish with G generations counted and
// report a best cost equal to the reference model's cost of its best genes.
// The clock counts are printed next to the published ones (1398, 3281, 6010),
// which this implementation does not reproduce: it spends 16 closed-loop
// samples on each candidate.
module tb_table1_generations;
  import de_pid_pkg::*;
  import tb_model_pkg::*;
  localparam int NG = 3;
  localparam int GS[NG] = '{25, 50, 100};
  localparam int PUBLISHED[NG] = '{1398, 3281, 6010};

  logic clk = 0, rst = 1;
  logic [NG-1:0] start = '0, busy, done;
  genes_t best[NG];
  cost_t best_cost[NG], pop_best[NG];
  logic [15:0] gens[NG], wins[NG], fr[NG], crr[NG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NG; g++) begin : g_opt
    de_optimizer #(.G(GS[g])) dut (
      .clk, .rst, .start(start[g]), .seed_en(1'b0), .seed_genes('0),
      .busy(busy[g]), .done(done[g]), .best(best[g]), .best_cost(best_cost[g]),
      .pop_best_cost(pop_best[g]), .gen_count(gens[g]), .n_trial_wins(wins[g]),
      .n_f_regen(fr[g]), .n_cr_regen(crr[g])
    );
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < NG; g++) begin
      int k;
      longint want;
      start[g] = 1;
      @(negedge clk);
      start[g] = 0;
      k = 1;
      while (!done[g] && k < 100000) begin @(negedge clk); k++; end
      checks++;
      if (k != 210 + 213 * GS[g]) begin failures++; $display("FAIL: %0d clocks", k); end
      checks++;
      if (gens[g] != 16'(GS[g])) begin failures++; $display("FAIL: %0d generations", gens[g]); end
      want = fitness_cost(best[g][0], best[g][1], best[g][2], 16, 2000);
      checks++;
      if (longint'(best_cost[g]) != want) begin failures++; $display("FAIL: cost %0d, model %0d", best_cost[g], want); end
      $display("G=%0d: %0d clocks (published %0d), best Kp=%0d Ti=%0d Td=%0d cost %0d",
               GS[g], k, PUBLISHED[g], best[g][0], best[g][1], best[g][2], best_cost[g]);
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
