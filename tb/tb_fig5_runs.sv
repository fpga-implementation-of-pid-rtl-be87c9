// tb_fig5_runs: twenty optimisation runs of 50 generations in a row, as in
// the published series of test runs. After each run, a PID controller with
// the run's best gains is fed 20 samples with the reference 2000 and a
// measured value within 5 % of it (a random error of up to 100 counts). Its
// P, I and D terms and output are compared with the integer model and the
// last sample is printed. The test also checks that the runs do not all end
// with the same gains: the optimiser keeps running its random generators
// between runs, so results differ from run to run.
module tb_fig5_runs;
  import de_pid_pkg::*;
  import tb_model_pkg::*;
  localparam int RUNS = 20;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  genes_t best;
  cost_t best_cost, pop_best;
  logic [15:0] gens, wins, fr, crr;

  logic en = 0;
  gene_t mv;
  out_t u;
  logic u_valid;
  acc_t p_term, i_term, d_term;

  int checks = 0, failures = 0;
  genes_t results[RUNS];

  always #5 clk = ~clk;

  de_optimizer opt (
    .clk, .rst, .start, .seed_en(1'b0), .seed_genes('0),
    .busy, .done, .best, .best_cost, .pop_best_cost(pop_best),
    .gen_count(gens), .n_trial_wins(wins), .n_f_regen(fr), .n_cr_regen(crr)
  );

  logic clear = 0;
  pid_core pid (
    .clk, .rst, .clear, .en, .kp(best[0]), .ti(best[1]), .td(best[2]),
    .ref_val(16'd2000), .mv, .u, .u_valid, .p_term, .i_term, .d_term
  );

  initial begin
    pid_model pm;
    int distinct;
    pm = new();
    mv = 16'd2000;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < RUNS; r++) begin
      int k;
      longint want;
      start = 1;
      @(negedge clk);
      start = 0;
      k = 1;
      while (!done && k < 100000) begin @(negedge clk); k++; end
      checks++;
      if (!done) begin failures++; $display("FAIL: run %0d did not finish", r); end
      want = fitness_cost(best[0], best[1], best[2], 16, 2000);
      checks++;
      if (longint'(best_cost) != want) begin failures++; $display("FAIL: run %0d cost %0d, model %0d", r, best_cost, want); end
      results[r] = best;
      // PID test with a random error of up to 5 % of the reference
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      pm.reset();
      for (int n = 0; n < 20; n++) begin
        longint uw;
        mv = 16'(2000 + $urandom_range(0, 200) - 100);
        en = 1;
        uw = pm.step(best[0], best[1], best[2], 2000, mv);
        @(negedge clk); en = 0;
        @(negedge clk);
        checks++;
        if (!u_valid || longint'(u) != uw || longint'(i_term) != pm.i_acc || longint'(d_term) != pm.d_acc) begin
          failures++;
          if (failures < 10) $display("FAIL: run %0d sample %0d u=%0d expected %0d", r, n, u, uw);
        end
      end
      $display("run %2d: Kp=%5d Ti=%5d Td=%5d cost %6d | error %4d P %5d I %6d D %6d control %6d",
               r + 1, best[0], best[1], best[2], best_cost, 2000 - int'(mv),
               p_term >>> 16, i_term >>> 16, d_term >>> 16, u);
    end
    distinct = 0;
    for (int a = 0; a < RUNS; a++) begin
      bit seen;
      seen = 0;
      for (int b = 0; b < a; b++) if (results[b] == results[a]) seen = 1;
      if (!seen) distinct++;
    end
    $display("%0d distinct best gain sets in %0d runs", distinct, RUNS);
    checks++;
    if (distinct < 2) begin failures++; $display("FAIL: every run gave the same gains"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
