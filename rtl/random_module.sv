// random_module: turns three mixed 32-bit random words into the draws the
// differential-evolution steps need in one cycle.
//
//   init_genes  three uniform 16-bit genes for the initial population
//   cr_draw     one 8-bit draw per gene, compared with CR in crossover
//   jrand       the gene index that always comes from the mutant, uniform in
//               0..2 (multiply-high range reduction: (r8 * 3) >> 8)
//   pick3_*     two draws in 0..2 and pick2_* two draws in 0..1; the optimiser
//               takes the smaller of each pair to favour better-ranked parents
//   tau_f/cr    true with probability TAU/256: regenerate F or CR
//   f_new       F_LO + (r8 * F_SPAN) >> 8, i.e. F in [0.1, 1.0) in units of 1/128
//   cr_new      uniform CR in [0, 1) in units of 1/256
//
// Self-adaptive F and CR follow the design description; the adaptation rule
// (regenerate with probability 0.1, F in [0.1, 1.0)) is the usual one for
// self-adaptive DE and is this design's choice, as are the bit assignment and
// range reduction. Purely combinational.
module random_module
  import de_pid_pkg::*;
#(
  parameter int unsigned TAU    = 26,   // 0.1 * 256
  parameter int unsigned F_LO   = 13,   // 0.1 * 128
  parameter int unsigned F_SPAN = 115   // (1.0 - 0.1) * 128
) (
  input  logic [2:0][31:0] lanes,
  output rand_draws_t      draws
);

  function automatic logic [1:0] below3(logic [7:0] r);
    logic [9:0] m;
    m = 10'(r) * 10'd3;
    return m[9:8];
  endfunction

  logic [15:0] f_scaled;

  always_comb begin
    draws = '0;
    // Initial genes (used only while the population is created).
    draws.init_genes[0] = lanes[0][15:0];
    draws.init_genes[1] = lanes[0][31:16];
    draws.init_genes[2] = lanes[1][15:0];
    // Draws used while a trial vector is built.
    draws.tau_f   = (lanes[0][7:0]  < 8'(TAU));
    draws.tau_cr  = (lanes[0][15:8] < 8'(TAU));
    draws.pick3_a = below3(lanes[0][23:16]);
    draws.pick3_b = below3(lanes[0][31:24]);
    draws.pick2_a = lanes[1][0];
    draws.pick2_b = lanes[1][8];
    draws.cr_draw[0] = lanes[1][23:16];
    draws.cr_draw[1] = lanes[1][31:24];
    draws.cr_draw[2] = lanes[2][7:0];
    draws.jrand   = below3(lanes[2][15:8]);
    f_scaled      = 16'(lanes[2][23:16]) * 16'(F_SPAN);
    draws.f_new   = f_t'(F_LO + 32'(f_scaled[15:8]));
    draws.cr_new  = lanes[2][31:24];
  end

endmodule
