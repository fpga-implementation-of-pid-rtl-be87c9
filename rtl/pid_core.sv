// pid_core: fixed-point discrete PID controller.
//
// The error e = ref - mv (18 bits signed) is multiplied by the three gains,
// which arrive as 16-bit unsigned numbers and are used as non-negative signed
// values. The proportional product is held in the output register. The
// integral path is a trapezoidal integrator: the product is added to its
// value from the previous sample (Delay, Adder) and accumulated (Adder1 with
// its feedback register Delay1). The derivative path is the bilinear (Tustin)
// form: the difference of the product and its previous value (Delay2, Sub) is
// doubled, and the previous derivative term (Delay3) is subtracted (Sub2).
// AdderB sums P, I and D, shifts the 36-bit sum right by FRAC bits and
// saturates it to the 18-bit output.
//
// The block structure, the 16-bit unsigned gains, the 18-bit error and output
// and the 36-bit internal width follow the design description. The factor two
// in the derivative path is included (DERIV_SHIFT = 1); DERIV_SHIFT = 0 gives
// the variant without it. The sample strobe, the FRAC scaling, saturation of
// the accumulators and of the output, and the synchronous clear are this
// design's own choices.
//
// Each block of the datapath is a small module of its own (pid_subtractor,
// pid_gain, pid_delay, pid_addsub, pid_output_adder), instantiated and named
// as in the block diagram.
//
// Timing: a sample is taken when en is high. The P, I and D products are
// registered in that cycle; one cycle later the integrator, derivative and
// output registers load, and u_valid is high for one cycle in the cycle after
// that (u is valid two cycles after en). en must not be raised again before
// u_valid. clear zeroes every register.
module pid_core
  import de_pid_pkg::*;
#(
  parameter int unsigned FRAC        = 16, // binary point of the gains
  parameter int unsigned DERIV_SHIFT = 1   // log2 of the derivative factor
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  en,
  input  gene_t kp,
  input  gene_t ti,
  input  gene_t td,
  input  gene_t ref_val,
  input  gene_t mv,
  output out_t  u,
  output logic  u_valid,
  output acc_t  p_term,
  output acc_t  i_term,
  output acc_t  d_term
);

  err_t e;
  acc_t kp_e, ti_e, td_e;                 // gain outputs
  acc_t p_reg, ix, ix_d, dx, dx_d, i_acc, d_acc;
  acc_t adder, i_new, sub, sub2x, d_new;
  out_t u_next;
  logic en_d;

  // Sample timing: stage 1 on en, stage 2 one clock later.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      en_d    <= 1'b0;
      u_valid <= 1'b0;
    end else begin
      en_d    <= en;
      u_valid <= en_d;
    end
  end

  pid_subtractor u_sub (.ref_val, .mv, .e);

  // Proportional path: gain -> output register
  pid_gain  u_pgain (.k(kp), .e, .p(kp_e));
  pid_delay #(.W(ACC_W)) u_outreg (.clk, .rst, .clear, .en, .d(kp_e), .q(p_reg));

  // Integral path: gain, Delay, Adder, Adder1 with Delay1
  pid_gain  u_igain (.k(ti), .e, .p(ti_e));
  pid_delay #(.W(ACC_W)) u_ireg   (.clk, .rst, .clear, .en, .d(ti_e), .q(ix));
  pid_delay #(.W(ACC_W)) u_delay  (.clk, .rst, .clear, .en, .d(ix), .q(ix_d));
  pid_addsub #(.SUB(1'b0)) u_adder  (.a(ix), .b(ix_d), .y(adder));
  pid_addsub #(.SUB(1'b0)) u_adder1 (.a(adder), .b(i_acc), .y(i_new));
  pid_delay #(.W(ACC_W)) u_delay1 (.clk, .rst, .clear, .en(en_d), .d(i_new), .q(i_acc));

  // Derivative path: gain, Delay2, Sub, doubling, Sub2 with Delay3
  pid_gain  u_dgain (.k(td), .e, .p(td_e));
  pid_delay #(.W(ACC_W)) u_dreg   (.clk, .rst, .clear, .en, .d(td_e), .q(dx));
  pid_delay #(.W(ACC_W)) u_delay2 (.clk, .rst, .clear, .en, .d(dx), .q(dx_d));
  pid_addsub #(.SUB(1'b1)) u_sub1 (.a(dx), .b(dx_d), .y(sub));
  assign sub2x = (DERIV_SHIFT != 0) ? sat_add(sub, sub) : sub;
  pid_addsub #(.SUB(1'b1)) u_sub2 (.a(sub2x), .b(d_acc), .y(d_new));
  pid_delay #(.W(ACC_W)) u_delay3 (.clk, .rst, .clear, .en(en_d), .d(d_new), .q(d_acc));

  // AdderB and the output register
  pid_output_adder #(.FRAC(FRAC)) u_adderb (.p(p_reg), .i(i_new), .d(d_new), .u(u_next));
  pid_delay #(.W(OUT_W)) u_ureg (.clk, .rst, .clear, .en(en_d), .d(u_next), .q(u));

  assign p_term = p_reg;
  assign i_term = i_acc;
  assign d_term = d_acc;

endmodule
