// mutation_vector: DE mutant vector v = base + F * (a - b), gene by gene.
//
// a - b is the difference vector (17 bits signed), F * (a - b) >> 7 the
// weighted difference vector (F in units of 1/128, shifted arithmetically),
// and the sum with the base vector is clamped to the 16-bit unsigned gene
// range 0..65535. The vector arithmetic follows the design description; the
// fixed-point format of F and the clamping are this design's choices.
// Purely combinational.
module mutation_vector
  import de_pid_pkg::*;
(
  input  genes_t base,
  input  genes_t a,
  input  genes_t b,
  input  f_t     f,
  output genes_t v
);

  always_comb begin
    for (int j = 0; j < D; j++) begin
      logic signed [GENE_W:0]         diff;   // difference vector
      logic signed [GENE_W+F_W+1:0]   wdiff;  // weighted difference vector
      logic signed [GENE_W+F_W+2:0]   sum;
      diff  = $signed({1'b0, a[j]}) - $signed({1'b0, b[j]});
      wdiff = (diff * $signed({1'b0, f})) >>> F_FRAC;
      sum   = $signed({1'b0, base[j]}) + wdiff;
      if (sum < 0)
        v[j] = '0;
      else if (sum > (GENE_W+F_W+3)'(2**GENE_W - 1))
        v[j] = '1;
      else
        v[j] = sum[GENE_W-1:0];
    end
  end

endmodule
