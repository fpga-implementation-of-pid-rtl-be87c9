// de_pid_top: self-tuning PID temperature controller.
//
// A heating system is controlled in closed loop: the ADC interface samples
// the temperature sensor, the PID controller compares the measurement with
// the user's set value and the PWM generator switches the heater. The PID
// coefficients (Kp, Ti, Td) are found on chip by a differential-evolution
// optimiser, which scores candidate coefficients with its own PID instance.
// The user interface turns buttons and switches into commands and the set
// value; the controller state machine sequences stand-by, optimisation, run
// and shutdown and loads the optimiser's result into the controller. With the
// seed switch on, an optimisation starts from the gains in use (individual 0),
// so its result is never worse than those gains under the optimiser's cost.
//
// The block structure follows the design description. The wiring details
// (the PID runs once per ADC sample, the PWM period equals the sample period
// by default, the optimiser's result is applied when optimisation ends) are
// this design's choices.
//
// Timing: one PID sample per ADC conversion (SAMPLE_DIV clocks, 500 Hz at a
// 50 MHz clock by default); the PID output u follows 2 clocks after the
// measurement. An optimisation of G generations takes roughly
// G * NP * (3 * N_EVAL + 5) clocks.
module de_pid_top
  import de_pid_pkg::*;
#(
  parameter int unsigned G           = 50,
  parameter int unsigned N_EVAL      = 16,
  parameter int unsigned SAMPLE_DIV  = 100_000,
  parameter int unsigned PWM_W       = 17,
  parameter int unsigned PWM_PERIOD  = 100_000,
  parameter int unsigned ADC_W       = 16,
  parameter int unsigned FRAC        = 16,
  parameter int unsigned DERIV_SHIFT = 1
) (
  input  logic             clk,
  input  logic             rst,
  // user inputs
  input  logic [15:0]      sw,
  input  logic             key_set,
  input  logic             key_start,
  input  logic             key_stop,
  input  logic             key_opt,
  input  logic             sw_seed,
  // external ADC
  output logic             adc_convst,
  input  logic             adc_drdy,
  input  logic [ADC_W-1:0] adc_data,
  // heater
  output logic             pwm_out,
  // status
  output logic [1:0]       state,
  output logic [15:0]      setpoint,
  output genes_t           gains,
  output out_t             u,
  output logic             u_valid,
  output logic             de_busy,
  output cost_t            de_best_cost,
  output logic [15:0]      de_generations,
  output logic [15:0]      adc_missed
);

  logic   cmd_start, cmd_stop, cmd_opt;
  logic   seed_sel;
  logic   de_start, de_done, pid_clear, pid_run, pwm_en;
  genes_t de_best;
  cost_t  de_pop_best;
  logic [15:0] de_wins, de_fregen, de_crregen;
  logic [15:0] mv;
  logic        mv_valid, pwm_period_start;
  acc_t        p_term, i_term, d_term;

  user_interface u_ui (
    .clk, .rst, .sw, .key_set, .key_start, .key_stop, .key_opt,
    .sw_seed, .setpoint, .seed_sel, .cmd_start, .cmd_stop, .cmd_opt
  );

  controller_fsm u_fsm (
    .clk, .rst, .cmd_start, .cmd_stop, .cmd_opt,
    .de_done, .de_best, .de_start, .pid_clear, .pid_run, .pwm_en,
    .gains, .state
  );

  de_optimizer #(
    .G(G), .N_EVAL(N_EVAL), .FRAC(FRAC), .DERIV_SHIFT(DERIV_SHIFT)
  ) u_de (
    .clk, .rst, .start(de_start), .seed_en(seed_sel), .seed_genes(gains),
    .busy(de_busy), .done(de_done),
    .best(de_best), .best_cost(de_best_cost), .pop_best_cost(de_pop_best),
    .gen_count(de_generations), .n_trial_wins(de_wins),
    .n_f_regen(de_fregen), .n_cr_regen(de_crregen)
  );

  adc_interface #(.SAMPLE_DIV(SAMPLE_DIV), .ADC_W(ADC_W)) u_adc (
    .clk, .rst, .en(pid_run), .adc_convst, .adc_drdy, .adc_data,
    .mv, .mv_valid, .n_missed(adc_missed)
  );

  pid_core #(.FRAC(FRAC), .DERIV_SHIFT(DERIV_SHIFT)) u_pid (
    .clk, .rst, .clear(pid_clear), .en(mv_valid && pid_run),
    .kp(gains[0]), .ti(gains[1]), .td(gains[2]),
    .ref_val(setpoint), .mv, .u, .u_valid,
    .p_term, .i_term, .d_term
  );

  pwm_generator #(.W(PWM_W)) u_pwm (
    .clk, .rst, .en(pwm_en), .period(PWM_W'(PWM_PERIOD)), .duty_in(u),
    .pwm_out, .period_start(pwm_period_start)
  );

endmodule
