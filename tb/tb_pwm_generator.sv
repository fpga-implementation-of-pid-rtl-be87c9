// tb_pwm_generator: for random periods and duty values (negative, in range
// and above the period) checks, period by period, that the output is on for
// exactly clamp(duty, 0, period) clocks, that the duty is taken at the end of
// the previous period, that period_start marks every period, and that the
// output is off while disabled.
module tb_pwm_generator;
  import de_pid_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] period;
  out_t duty_in;
  logic pwm_out, period_start;
  int checks = 0, failures = 0, n_full = 0, n_zero = 0, n_mid = 0;

  always #5 clk = ~clk;

  pwm_generator #(.W(W)) dut (.*);

  initial begin
    period = 17'd10; duty_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      int p, want, on;
      p = (t % 4 == 0) ? 1 : $urandom_range(2, 40);
      period = W'(p);
      en = 1;
      #1;
      // first period: duty register still zero
      for (int c = 0; c < p; c++) begin
        checks++;
        if (pwm_out || (period_start != (c == 0))) begin failures++; $display("FAIL: first period c=%0d p=%0d pwm=%0d ps=%0d", c, p, pwm_out, period_start); end
        case ($urandom_range(0, 3))
          0: duty_in = out_t'(-$urandom_range(1, 1000));
          1: duty_in = out_t'($urandom_range(p + 1, 100000));
          default: duty_in = out_t'($urandom_range(0, p));
        endcase
        @(negedge clk);
      end
      for (int k = 0; k < 5; k++) begin
        want = (duty_in < 0) ? 0 : (int'(duty_in) > p) ? p : int'(duty_in);
        if (want == 0) n_zero++; else if (want == p) n_full++; else n_mid++;
        on = 0;
        for (int c = 0; c < p; c++) begin
          checks++;
          if (period_start != (c == 0)) begin failures++; $display("FAIL: period_start at %0d", c); end
          checks++;
          if (pwm_out != (c < want)) begin failures++; if (failures < 10) $display("FAIL: pwm at %0d of %0d, duty %0d", c, p, want); end
          on += pwm_out;
          if (c == p - 1)
            case ($urandom_range(0, 3))
              0: duty_in = out_t'(-$urandom_range(1, 1000));
              1: duty_in = out_t'($urandom_range(p + 1, 100000));
              default: duty_in = out_t'($urandom_range(0, p));
            endcase
          else
            duty_in = out_t'($urandom);   // ignored mid-period
          @(negedge clk);
        end
      end
      en = 0;
      #1;
      checks++;
      if (pwm_out || period_start) begin failures++; $display("FAIL: on while disabled"); end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_zero == 0 || n_mid == 0) begin failures++; $display("FAIL: duty cases %0d %0d %0d", n_zero, n_mid, n_full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
