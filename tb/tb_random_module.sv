// tb_random_module: checks every field of the random draws for given input
// words against an independent computation, and checks the statistics of the
// ranges: jrand and the three-way picks cover 0..2, F stays in [13, 127],
// and the F / CR regeneration flags fire close to 10 % of the time.
module tb_random_module;
  import de_pid_pkg::*;
  logic [2:0][31:0] lanes;
  rand_draws_t draws;
  int checks = 0, failures = 0;
  int hist_j[3], hist_p[3], n_tf, n_tc;

  random_module dut (.*);

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %0d expected %0d", what, got, want);
    end
  endtask

  localparam int N = 20000;
  initial begin
    n_tf = 0; n_tc = 0;
    for (int k = 0; k < 3; k++) begin hist_j[k] = 0; hist_p[k] = 0; end
    for (int n = 0; n < N; n++) begin
      for (int k = 0; k < 3; k++) lanes[k] = $urandom;
      #1;
      expect_eq("gene0", draws.init_genes[0], lanes[0] & 32'hFFFF);
      expect_eq("gene1", draws.init_genes[1], lanes[0] >> 16);
      expect_eq("gene2", draws.init_genes[2], lanes[1] & 32'hFFFF);
      expect_eq("jrand", draws.jrand, ((lanes[2] >> 8) & 255) * 3 / 256);
      expect_eq("pick3_a", draws.pick3_a, ((lanes[0] >> 16) & 255) * 3 / 256);
      expect_eq("pick3_b", draws.pick3_b, ((lanes[0] >> 24) & 255) * 3 / 256);
      expect_eq("pick2_a", draws.pick2_a, lanes[1] & 1);
      expect_eq("pick2_b", draws.pick2_b, (lanes[1] >> 8) & 1);
      expect_eq("cr_draw0", draws.cr_draw[0], (lanes[1] >> 16) & 255);
      expect_eq("cr_draw2", draws.cr_draw[2], lanes[2] & 255);
      expect_eq("f_new", draws.f_new, 13 + ((lanes[2] >> 16) & 255) * 115 / 256);
      expect_eq("cr_new", draws.cr_new, lanes[2] >> 24);
      expect_eq("tau_f", draws.tau_f, (lanes[0] & 255) < 26);
      expect_eq("tau_cr", draws.tau_cr, ((lanes[0] >> 8) & 255) < 26);
      if (draws.jrand < 3) hist_j[draws.jrand]++; else begin checks++; failures++; end
      if (draws.pick3_a < 3) hist_p[draws.pick3_a]++; else begin checks++; failures++; end
      checks++;
      if (draws.f_new < 13 || draws.f_new > 127) failures++;
      n_tf += draws.tau_f;
      n_tc += draws.tau_cr;
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (hist_j[k] < N / 4 || hist_p[k] < N / 4) begin failures++; $display("FAIL: range %0d rarely drawn", k); end
    end
    checks++;
    if (n_tf < N / 14 || n_tf > N / 8 || n_tc < N / 14 || n_tc > N / 8) begin
      failures++; $display("FAIL: regeneration rate %0d %0d of %0d", n_tf, n_tc, N);
    end
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
