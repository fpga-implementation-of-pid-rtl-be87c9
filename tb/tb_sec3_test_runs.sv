// tb_sec3_test_runs: the random-individual test runs of the optimiser's
// random-number and ranking chain.
//
// Four LFSRs with staggered starts (delays 0, 3, 7 and 12 clocks, seeds as in
// de_optimizer) feed the mixer, random_module turns its lanes into draws, and
// ranking_module ranks individuals. The test has two phases:
//
//   1. Mixer off for 20 clocks: each generator's running flag must rise
//      exactly at its start delay, and every lane must copy its generator
//      with one clock of latency, so the only variation comes from the
//      staggered starts.
//   2. Mixer on, 24 test runs. Each run takes four consecutive draws of the
//      three initial genes, i.e. four individuals of three parameters, or 12
//      random parameters. Each individual's fitness is the sum of its three
//      parameters, and the largest sum is best. ranking_module ranks by lowest
//      cost, so it is fed 3*65535 - sum. The testbench sorts the sums itself
//      (ties to the lower index) and checks the best, the second best and
//      the full order. It also checks that no parameter value repeats within
//      a run.
//
// It prints how many of the 288 parameters were distinct over all runs. Ends
// with the TB_RESULT line; a watchdog stops it after 10000 clocks.
module tb_sec3_test_runs;
  import de_pid_pkg::*;

  localparam int RUNS = 24;
  localparam int unsigned DELAYS [4] = '{0, 3, 7, 12};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic mix_en = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][31:0] rng_q;
  logic [3:0]       rng_run;
  logic [2:0][31:0] lanes;
  rand_draws_t      draws;
  cost_t [NP-1:0]   cost;
  idx_t  [NP-1:0]   rank_of, order;
  idx_t             best, second;

  rng_lfsr #(.SEED(32'hACE1_2468), .START_DELAY(0))  u_rng0 (.clk, .rst, .en(1'b1), .q(rng_q[0]), .running(rng_run[0]));
  rng_lfsr #(.SEED(32'h1357_9BDF), .START_DELAY(3))  u_rng1 (.clk, .rst, .en(1'b1), .q(rng_q[1]), .running(rng_run[1]));
  rng_lfsr #(.SEED(32'h0F1E_2D3C), .START_DELAY(7))  u_rng2 (.clk, .rst, .en(1'b1), .q(rng_q[2]), .running(rng_run[2]));
  rng_lfsr #(.SEED(32'h7A5B_C3D1), .START_DELAY(12)) u_rng3 (.clk, .rst, .en(1'b1), .q(rng_q[3]), .running(rng_run[3]));

  rng_mixer #(.NRNG(4), .NLANE(3)) u_mix (.clk, .rst, .mix_en, .rng_in(rng_q), .lanes);
  random_module u_rand (.lanes, .draws);
  ranking_module u_rank (.cost, .rank_of, .order, .best, .second);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][31:0] prev_q;
    gene_t params [RUNS][NP][D];
    int    sums [NP];
    int    exp_order [NP];
    int    distinct;
    bit    repeated;

    // ---------------- phase 1: mixer off, staggered starts ----------------
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 20; t++) begin
      @(posedge clk);
      #1;
      // t+1 clocks have passed since reset was released
      for (int k = 0; k < 4; k++)
        check(rng_run[k] == (t + 1 >= DELAYS[k]),
              $sformatf("generator %0d running=%0b after %0d clocks", k, rng_run[k], t + 1));
      if (t > 0)
        for (int k = 0; k < 3; k++)
          check(lanes[k] == prev_q[k],
                $sformatf("lane %0d %h does not copy generator %h with the mixer off", k, lanes[k], prev_q[k]));
      prev_q = rng_q;
    end

    // ---------------- phase 2: mixer on, 24 test runs ----------------
    mix_en <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < RUNS; r++) begin
      for (int i = 0; i < NP; i++) begin
        @(posedge clk);
        #1;
        for (int j = 0; j < D; j++) params[r][i][j] = draws.init_genes[j];
      end

      // fitness: sum of the parameters, largest best
      for (int i = 0; i < NP; i++) begin
        sums[i] = int'(params[r][i][0]) + int'(params[r][i][1]) + int'(params[r][i][2]);
        cost[i] = cost_t'(3 * 65535 - sums[i]);
      end
      #1;

      // reference order: selection sort, largest sum first, ties to the lower index
      for (int i = 0; i < NP; i++) exp_order[i] = i;
      for (int a = 0; a < NP; a++)
        for (int b = a + 1; b < NP; b++)
          if (sums[exp_order[b]] > sums[exp_order[a]] ||
              (sums[exp_order[b]] == sums[exp_order[a]] && exp_order[b] < exp_order[a])) begin
            int tmp;
            tmp = exp_order[a];
            exp_order[a] = exp_order[b];
            exp_order[b] = tmp;
          end

      check(int'(best) == exp_order[0],
            $sformatf("run %0d: best %0d, expected %0d", r, best, exp_order[0]));
      check(int'(second) == exp_order[1],
            $sformatf("run %0d: second %0d, expected %0d", r, second, exp_order[1]));
      for (int i = 0; i < NP; i++)
        check(int'(order[i]) == exp_order[i],
              $sformatf("run %0d: order[%0d]=%0d, expected %0d", r, i, order[i], exp_order[i]));

      repeated = 1'b0;
      for (int a = 0; a < NP * D; a++)
        for (int b = a + 1; b < NP * D; b++)
          if (params[r][a / D][a % D] == params[r][b / D][b % D]) repeated = 1'b1;
      check(!repeated, $sformatf("run %0d: a parameter value repeats", r));

      $display("run %2d: sums %6d %6d %6d %6d  largest %0d, second %0d",
               r + 1, sums[0], sums[1], sums[2], sums[3], best, second);
    end

    distinct = 0;
    for (int a = 0; a < RUNS * NP * D; a++) begin
      bit seen;
      seen = 1'b0;
      for (int b = 0; b < a; b++)
        if (params[b / (NP * D)][(b / D) % NP][b % D] == params[a / (NP * D)][(a / D) % NP][a % D])
          seen = 1'b1;
      if (!seen) distinct++;
    end
    $display("%0d of %0d parameters distinct over %0d runs", distinct, RUNS * NP * D, RUNS);
    check(distinct > RUNS * NP * D * 9 / 10, "too many repeated parameter values");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
