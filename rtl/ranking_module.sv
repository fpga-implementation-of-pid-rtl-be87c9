// ranking_module: ranks the population by fitness (cost, lower is better).
//
// The rank of individual i is the number of individuals with a lower cost,
// plus those with the same cost and a lower index, so ranks are unique. order
// lists the individuals from best (order[0]) to worst; best is order[0] and
// second is order[1]. All comparisons run in parallel (NP*(NP-1) comparators),
// purely combinational. That the population is ranked by fitness and the best
// and second best are picked follows the design description; the comparator
// network is this design's choice.
module ranking_module
  import de_pid_pkg::*;
(
  input  cost_t [NP-1:0] cost,
  output idx_t  [NP-1:0] rank_of,
  output idx_t  [NP-1:0] order,
  output idx_t           best,
  output idx_t           second
);

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      rank_of[i] = '0;
      for (int j = 0; j < NP; j++)
        if (j != i && (cost[j] < cost[i] || (cost[j] == cost[i] && j < i)))
          rank_of[i] = rank_of[i] + 1'b1;
    end
    order = '0;
    for (int i = 0; i < NP; i++)
      order[rank_of[i]] = idx_t'(i);
  end

  assign best   = order[0];
  assign second = order[1];

endmodule
