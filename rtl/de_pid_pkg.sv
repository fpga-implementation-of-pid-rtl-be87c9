// de_pid_pkg: types, sizes and arithmetic helpers shared by the
// differential-evolution (DE) optimiser and the fixed-point PID controller.
//
// The optimiser works on NP = 4 individuals of D = 3 genes (Kp, Ti, Td), each
// gene a 16-bit unsigned number. The PID datapath is 36 bits wide and its
// output is 18 bits; the error (reference minus measurement) is 18 bits signed.
// These sizes follow the design description. The fixed-point formats of F and
// CR (F in units of 1/128, CR in units of 1/256) and the 32-bit cost are this
// design's own choices.
package de_pid_pkg;

  localparam int unsigned NP      = 4;   // population size
  localparam int unsigned D       = 3;   // genes per individual: Kp, Ti, Td
  localparam int unsigned GENE_W  = 16;  // gene (PID coefficient) width
  localparam int unsigned ERR_W   = 18;  // subtractor output width
  localparam int unsigned ACC_W   = 36;  // PID internal width
  localparam int unsigned OUT_W   = 18;  // PID output width
  localparam int unsigned F_W     = 8;   // mutation factor, F = f / 2**F_FRAC
  localparam int unsigned F_FRAC  = 7;
  localparam int unsigned CR_W    = 8;   // crossover rate, CR = cr / 256
  localparam int unsigned COST_W  = 32;  // fitness (cost) width
  localparam int unsigned IDX_W   = 2;   // index into the population

  typedef logic [GENE_W-1:0]        gene_t;
  typedef gene_t [D-1:0]            genes_t;   // [0]=Kp [1]=Ti [2]=Td
  typedef logic [F_W-1:0]           f_t;
  typedef logic [CR_W-1:0]          cr_t;
  typedef logic [COST_W-1:0]        cost_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OUT_W-1:0]  out_t;
  typedef logic signed [ERR_W-1:0]  err_t;

  // One individual with its own self-adaptive control parameters.
  typedef struct packed {
    genes_t genes;
    f_t     f;
    cr_t    cr;
  } indiv_t;

  // Random draws handed from the random module to the optimiser each cycle.
  typedef struct packed {
    genes_t          init_genes; // uniform genes for the initial population
    cr_t [D-1:0]     cr_draw;    // per-gene crossover draws
    logic [1:0]      jrand;      // gene always taken from the mutant, 0..D-1
    logic [1:0]      pick3_a;    // 0..2, two draws: base vector by rank
    logic [1:0]      pick3_b;
    logic            pick2_a;    // 0..1, two draws: second difference vector by rank
    logic            pick2_b;
    logic            tau_f;      // regenerate F of this trial
    logic            tau_cr;     // regenerate CR of this trial
    f_t              f_new;      // new F, in [0.1, 1.0)
    cr_t             cr_new;     // new CR, in [0, 1)
  } rand_draws_t;

  // Saturating signed add of two ACC_W-bit numbers.
  function automatic acc_t sat_add(acc_t a, acc_t b);
    logic signed [ACC_W:0] s;
    s = {a[ACC_W-1], a} + {b[ACC_W-1], b};
    if (s[ACC_W] != s[ACC_W-1])
      return s[ACC_W] ? {1'b1, {(ACC_W-1){1'b0}}} : {1'b0, {(ACC_W-1){1'b1}}};
    return s[ACC_W-1:0];
  endfunction

  // Saturating signed subtract a - b.
  function automatic acc_t sat_sub(acc_t a, acc_t b);
    logic signed [ACC_W:0] s;
    s = {a[ACC_W-1], a} - {b[ACC_W-1], b};
    if (s[ACC_W] != s[ACC_W-1])
      return s[ACC_W] ? {1'b1, {(ACC_W-1){1'b0}}} : {1'b0, {(ACC_W-1){1'b1}}};
    return s[ACC_W-1:0];
  endfunction

endpackage
