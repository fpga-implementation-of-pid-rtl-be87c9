// fitness_module: cost of one PID parameter set (Kp, Ti, Td).
//
// The parameter set drives a pid_core instance, the PID-algorithm used as a
// sub-structure of the optimiser, in closed loop with a first-order plant
// model y[n+1] = y[n] + ((u[n] - y[n]) >>> PLANT_SHIFT) that starts at
// y = 0. The reference is REF. Over N_EVAL samples the module sums the
// absolute error |REF - y[n]| (integral of absolute error, IAE): the lower the
// sum, the better the parameters. The reference value 2000 and the use of an
// absolute-error criterion built from the PID's error follow the design
// description; the plant model, its time constant and N_EVAL are this
// design's own choices.
//
// Timing: start (one cycle, while idle) latches genes. One cycle clears the
// PID, then each sample takes three cycles (PID latency two). done is high
// for one cycle with cost valid from then on, 2 + 3 * N_EVAL cycles after
// start. busy is high from the cycle after start until done.
module fitness_module
  import de_pid_pkg::*;
#(
  parameter int unsigned REF         = 2000,
  parameter int unsigned N_EVAL      = 16,
  parameter int unsigned PLANT_SHIFT = 2,
  parameter int unsigned FRAC        = 16,
  parameter int unsigned DERIV_SHIFT = 1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  genes_t genes,
  output logic   busy,
  output logic   done,
  output cost_t  cost
);

  typedef enum logic [2:0] {F_IDLE, F_CLR, F_EN, F_W1, F_W2} fstate_t;
  localparam int unsigned Y_W = OUT_W + 2;

  fstate_t st;
  genes_t  g;
  logic signed [Y_W-1:0] y;
  cost_t   acc;
  logic [15:0] n;

  logic  pid_en, pid_clear, u_valid;
  out_t  u;
  acc_t  p_t, i_t, d_t;
  gene_t mv;
  logic signed [Y_W:0] err;
  logic signed [Y_W:0] y_step;

  assign pid_clear = (st == F_CLR);
  assign pid_en    = (st == F_EN);
  assign busy      = (st != F_IDLE);

  // Measured value handed to the PID: the plant output clamped to 16 bits.
  always_comb begin
    if (y < 0)
      mv = '0;
    else if (y > Y_W'(2**GENE_W - 1))
      mv = '1;
    else
      mv = y[GENE_W-1:0];
    err    = (Y_W+1)'(signed'({1'b0, 32'(REF)})) - (Y_W+1)'(y);
    y_step = ((Y_W+1)'(u) - (Y_W+1)'(y)) >>> PLANT_SHIFT;
  end

  pid_core #(.FRAC(FRAC), .DERIV_SHIFT(DERIV_SHIFT)) u_pid (
    .clk, .rst, .clear(pid_clear), .en(pid_en),
    .kp(g[0]), .ti(g[1]), .td(g[2]),
    .ref_val(gene_t'(REF)), .mv,
    .u, .u_valid, .p_term(p_t), .i_term(i_t), .d_term(d_t)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= F_IDLE;
      g    <= '0;
      y    <= '0;
      acc  <= '0;
      n    <= '0;
      done <= 1'b0;
      cost <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          g   <= genes;
          y   <= '0;
          acc <= '0;
          n   <= '0;
          st  <= F_CLR;
        end
        F_CLR: st <= F_EN;
        F_EN: begin
          acc <= acc + cost_t'(err < 0 ? -err : err);
          st  <= F_W1;
        end
        F_W1: st <= F_W2;
        F_W2: begin
          y <= y + Y_W'(y_step);
          if (32'(n) == N_EVAL - 1) begin
            cost <= acc;
            done <= 1'b1;
            st   <= F_IDLE;
          end else begin
            n  <= n + 16'd1;
            st <= F_EN;
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // The PID result arrives exactly in the third cycle of each sample.
  assert property (@(posedge clk) disable iff (rst) (st == F_W2) |-> u_valid);

endmodule
