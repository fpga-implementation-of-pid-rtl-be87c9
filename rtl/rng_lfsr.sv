// rng_lfsr: 32-bit pseudo-random number generator with a delayed start.
//
// A Galois linear-feedback shift register with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1 (feedback mask 32'h8020_0003) advances one step
// per clock while en is high. After reset it first waits START_DELAY enabled
// cycles, counted by its own counter: giving each generator of a design a
// different START_DELAY starts them at different times, so that they are out
// of step with each other. The delayed start with counters follows the design
// description; the LFSR kind, polynomial and seeds are this design's choice.
//
// Interface: q is the register state, valid from reset (SEED). running goes
// high once the start delay has passed.
module rng_lfsr #(
  parameter logic [31:0] SEED        = 32'hACE1_2468, // must be non-zero
  parameter int unsigned START_DELAY = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [31:0] q,
  output logic        running
);

  localparam logic [31:0] POLY = 32'h8020_0003;
  localparam int unsigned CNT_W = (START_DELAY < 2) ? 1 : $clog2(START_DELAY + 1);

  logic [CNT_W-1:0] cnt;

  assign running = (32'(cnt) >= START_DELAY);

  always_ff @(posedge clk) begin
    if (rst) begin
      q   <= SEED;
      cnt <= '0;
    end else if (en) begin
      if (!running)
        cnt <= cnt + 1'b1;
      else
        q <= q[0] ? ((q >> 1) ^ POLY) : (q >> 1);
    end
  end

  initial assert (SEED != 32'h0) else $error("rng_lfsr: SEED must be non-zero");

endmodule
