// rng_mixer: combines the outputs of several random number generators.
//
// Before mixing is switched on (mix_en low) lane k simply copies generator k,
// so the only variation comes from the generators' staggered start. With
// mix_en high, lane k is generator k XOR generator k+1 rotated by 7 XOR
// generator k+2 rotated by 19, plus a free-running counter; the counter
// breaks up short repeats. That the mixer starts only when the optimisation
// starts follows the design description; the mixing function is this
// design's own choice.
//
// Interface: NRNG generator words in, NLANE mixed words out, registered (one
// cycle latency).
module rng_mixer #(
  parameter int unsigned NRNG  = 4,
  parameter int unsigned NLANE = 3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   mix_en,
  input  logic [NRNG-1:0][31:0]  rng_in,
  output logic [NLANE-1:0][31:0] lanes
);

  logic [31:0] cnt;

  function automatic logic [31:0] rotl(logic [31:0] x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      lanes <= '0;
    end else begin
      cnt <= cnt + 32'd1;
      for (int k = 0; k < NLANE; k++) begin
        if (mix_en)
          lanes[k] <= (rng_in[k % NRNG] ^ rotl(rng_in[(k + 1) % NRNG], 7)
                      ^ rotl(rng_in[(k + 2) % NRNG], 19)) + cnt;
        else
          lanes[k] <= rng_in[k % NRNG];
      end
    end
  end

endmodule
