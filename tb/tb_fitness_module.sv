// tb_fitness_module: costs random PID parameter sets and compares each cost
// with an integer model of the PID in closed loop with the plant model; also
// checks busy and that done comes exactly 2 + 3 * N_EVAL clocks after the
// clock in which start is driven.
module tb_fitness_module;
  import de_pid_pkg::*;
  import tb_model_pkg::*;
  localparam int N_EVAL = 16;
  logic clk = 0, rst = 1, start = 0;
  genes_t genes;
  logic busy, done;
  cost_t cost;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fitness_module #(.N_EVAL(N_EVAL)) dut (.*);

  initial begin
    genes = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      longint want;
      int k;
      case (n % 3)
        0: for (int j = 0; j < D; j++) genes[j] = 16'($urandom);
        1: begin genes[0] = 16'($urandom_range(0, 600)); genes[1] = 16'($urandom_range(0, 40));
                 genes[2] = 16'($urandom_range(0, 200)); end
        default: begin genes[0] = 16'($urandom_range(0, 3000)); genes[1] = 16'($urandom_range(0, 300));
                 genes[2] = 16'($urandom_range(0, 3000)); end
      endcase
      want = fitness_cost(genes[0], genes[1], genes[2], N_EVAL, 2000);
      start = 1;
      @(negedge clk);
      start = 0;
      genes = '1;   // the module must have latched the genes
      k = 1;
      checks++;
      if (!busy) begin failures++; $display("FAIL: not busy after start"); end
      while (!done && k < 1000) begin @(negedge clk); k++; end
      checks++;
      if (k != 2 + 3 * N_EVAL) begin failures++; $display("FAIL: done after %0d clocks", k); end
      checks++;
      if (longint'(cost) != want) begin
        failures++;
        if (failures < 10) $display("FAIL: cost %0d expected %0d", cost, want);
      end
      @(negedge clk);
      checks++;
      if (busy || done) begin failures++; $display("FAIL: still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
