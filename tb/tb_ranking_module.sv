// tb_ranking_module: random costs (many ties) are ranked and compared with a
// reference ranking computed by sorting: order must list the individuals by
// ascending cost, ties by index, rank_of must be its inverse, and best and
// second must be its first two entries.
module tb_ranking_module;
  import de_pid_pkg::*;
  cost_t [NP-1:0] cost;
  idx_t  [NP-1:0] rank_of, order;
  idx_t best, second;
  int checks = 0, failures = 0;

  ranking_module dut (.*);

  int ref_order[NP];
  int t;
  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < NP; i++)
        cost[i] = (n % 2) ? cost_t'($urandom_range(0, 3)) : cost_t'($urandom);
      #1;
      // reference: selection sort on (cost, index)
      for (int i = 0; i < NP; i++) ref_order[i] = i;
      for (int a = 0; a < NP; a++)
        for (int b = a + 1; b < NP; b++)
          if (cost[ref_order[b]] < cost[ref_order[a]] ||
              (cost[ref_order[b]] == cost[ref_order[a]] && ref_order[b] < ref_order[a])) begin
            t = ref_order[a]; ref_order[a] = ref_order[b]; ref_order[b] = t;
          end
      for (int r = 0; r < NP; r++) begin
        checks++;
        if (order[r] != idx_t'(ref_order[r]) || rank_of[ref_order[r]] != idx_t'(r)) begin
          failures++;
          if (failures < 10) $display("FAIL: rank %0d got %0d expected %0d", r, order[r], ref_order[r]);
        end
      end
      checks++;
      if (best != idx_t'(ref_order[0]) || second != idx_t'(ref_order[1])) failures++;
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
