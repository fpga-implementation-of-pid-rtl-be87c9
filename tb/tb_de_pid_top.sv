// tb_de_pid_top: end-to-end test of the self-tuning temperature controller
// with every parameter at its default (50 generations, 500 Hz sampling at a
// 50 MHz clock, PWM period equal to the sample period).
//
// A heater model integrates the PWM on-time of each sample period and loses
// heat towards an ambient temperature of 1500 ADC counts; an ADC model
// answers each conversion 20 clocks later with the temperature. The test
//   1. loads the set value 2000 through the switches,
//   2. optimises from stand-by and checks the result (50 generations, the
//      reported cost equals an independent model's cost of the loaded gains),
//   3. runs the loop for 30 samples, checking every PID output against an
//      integer model and the on-time of every PWM period against the duty
//      value taken at the end of the previous period,
//   4. optimises again from run, starting from the gains in use (seed switch
//      on), checks that the new cost is no higher than theirs, restarts and
//      shuts down.
// Each mechanism (set value load, optimisation from stand-by and from run,
// PID sample, PWM period with on-time, heating, shutdown) is counted and must
// occur at least once.
module tb_de_pid_top;
  import de_pid_pkg::*;
  import tb_model_pkg::*;

  localparam int PERIOD = 100_000;  // default SAMPLE_DIV and PWM_PERIOD
  localparam int AMBIENT = 1500;

  logic clk = 0, rst = 1;
  logic [15:0] sw = 16'd0;
  logic key_set = 0, key_start = 0, key_stop = 0, key_opt = 0, sw_seed = 0;
  logic adc_convst, adc_drdy;
  logic [15:0] adc_data;
  logic pwm_out;
  logic [1:0] state;
  logic [15:0] setpoint;
  genes_t gains;
  out_t u;
  logic u_valid, de_busy;
  cost_t de_best_cost;
  logic [15:0] de_generations, adc_missed;

  int checks = 0, failures = 0;
  int n_set = 0, n_opt_standby = 0, n_opt_run = 0, n_samples = 0, n_pwm_periods = 0,
      n_pwm_on = 0, n_shutdown = 0;

  always #10 clk = ~clk;   // 50 MHz

  de_pid_top dut (.*);

  localparam logic [1:0] STANDBY = 0, OPTIMIZE = 1, RUN = 2, SHUTDOWN = 3;

  // ---------------- heater and ADC models ----------------
  longint temp = AMBIENT, on_cycles = 0;
  int adc_wait = -1;
  logic [15:0] last_sent = 16'd0;
  always @(negedge clk) begin
    adc_drdy <= 1'b0;
    if (pwm_out) on_cycles++;
    if (adc_convst) begin
      temp = temp + (on_cycles * 400) / PERIOD - (temp - AMBIENT) / 16;
      on_cycles = 0;
      adc_wait = 20;
    end else if (adc_wait > 0) adc_wait--;
    else if (adc_wait == 0) begin
      adc_drdy  <= 1'b1;
      adc_data  <= 16'(temp);
      last_sent = 16'(temp);
      adc_wait = -1;
    end
  end

  // ---------------- PID and PWM checkers ----------------
  pid_model pm = new();
  logic [1:0] prev_state = STANDBY;
  longint run_clk = 0, pwm_want = 0, pwm_count = 0;
  always @(negedge clk) begin
    if (state == RUN && prev_state != RUN) begin
      pm.reset();
      run_clk = 0;
      pwm_want = 0;
      pwm_count = 0;
    end
    if (state == RUN) begin
      if (u_valid) begin
        longint want;
        want = pm.step(gains[0], gains[1], gains[2], setpoint, last_sent);
        n_samples++;
        checks++;
        if (longint'(u) != want) begin
          failures++;
          if (failures < 10) $display("FAIL: PID output %0d expected %0d", u, want);
        end
      end
      pwm_count += pwm_out;
      if (run_clk % PERIOD == PERIOD - 1) begin
        checks++;
        if (pwm_count != pwm_want) begin
          failures++;
          if (failures < 10) $display("FAIL: PWM on for %0d clocks, expected %0d", pwm_count, pwm_want);
        end
        if (pwm_count > 0) n_pwm_on++;
        n_pwm_periods++;
        pwm_want = (u < 0) ? 0 : (longint'(u) > PERIOD) ? PERIOD : longint'(u);
        pwm_count = 0;
      end
      run_clk++;
    end else begin
      checks++;
      if (pwm_out) begin failures++; if (failures < 10) $display("FAIL: PWM on outside run"); end
    end
    if (state == SHUTDOWN) n_shutdown++;
    prev_state = state;
  end

  task automatic press(ref logic key);
    @(negedge clk); key = 1;
    repeat (3) @(negedge clk); key = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic optimise_and_check(input string from);
    int k;
    longint want;
    press(key_opt);
    checks++;
    if (state != OPTIMIZE || !de_busy) begin failures++; $display("FAIL: optimisation from %s did not start", from); end
    k = 0;
    while (de_busy && k < 100000) begin @(negedge clk); k++; end
    @(negedge clk);
    checks++;
    if (state != STANDBY) begin failures++; $display("FAIL: not back in stand-by"); end
    checks++;
    if (de_generations != 16'd50) begin failures++; $display("FAIL: %0d generations", de_generations); end
    want = fitness_cost(gains[0], gains[1], gains[2], 16, 2000);
    checks++;
    if (longint'(de_best_cost) != want) begin
      failures++; $display("FAIL: optimiser cost %0d, model cost of loaded gains %0d", de_best_cost, want);
    end
    $display("optimisation from %s: about %0d clocks, Kp=%0d Ti=%0d Td=%0d (units of 1/65536), cost %0d",
             from, k + 6, gains[0], gains[1], gains[2], de_best_cost);
  endtask

  initial begin
    adc_data = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    // 1. set value
    sw = 16'd2000;
    press(key_set);
    checks++;
    if (setpoint == 16'd2000) n_set++; else begin failures++; $display("FAIL: set value %0d", setpoint); end
    // 2. optimisation from stand-by
    optimise_and_check("stand-by");
    n_opt_standby++;
    // 3. closed loop
    press(key_start);
    checks++;
    if (state != RUN) begin failures++; $display("FAIL: not running"); end
    repeat (30 * PERIOD) @(negedge clk);
    $display("after 30 samples: temperature %0d (ambient %0d, set value %0d), %0d samples",
             temp, AMBIENT, setpoint, n_samples);
    checks++;
    if (temp <= AMBIENT) begin failures++; $display("FAIL: no heating"); end
    // 4. optimisation from run, restart, shutdown
    begin
      longint old_cost;
      old_cost = fitness_cost(gains[0], gains[1], gains[2], 16, 2000);
      sw_seed = 1;
      optimise_and_check("run");
      sw_seed = 0;
      checks++;
      if (longint'(de_best_cost) > old_cost) begin
        failures++; $display("FAIL: seeded optimisation cost %0d above the seed's %0d", de_best_cost, old_cost);
      end
    end
    n_opt_run++;
    press(key_start);
    repeat (3 * PERIOD) @(negedge clk);
    press(key_stop);
    checks++;
    if (state != STANDBY) begin failures++; $display("FAIL: not in stand-by after stop"); end
    checks++;
    if (adc_missed != 0) begin failures++; $display("FAIL: %0d missed conversions", adc_missed); end

    $display("mechanisms: set %0d, optimise from stand-by %0d, from run %0d, PID samples %0d, PWM periods %0d (with on-time %0d), shutdown %0d",
             n_set, n_opt_standby, n_opt_run, n_samples, n_pwm_periods, n_pwm_on, n_shutdown);
    checks++;
    if (n_set == 0 || n_opt_standby == 0 || n_opt_run == 0 || n_samples == 0 ||
        n_pwm_periods == 0 || n_pwm_on == 0 || n_shutdown == 0) begin
      failures++; $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
