// pwm_generator: turns the PID output into a pulse-width-modulated signal.
//
// A counter increases by one every clock and returns to zero after period - 1
// clocks. The output is on while the duty value is greater than the counter.
// The duty value is the PID output with negative values taken as zero and
// values above the period taken as the period (always on); it is sampled at
// the start of each period so that a period is never cut short. The counter
// and comparator follow the design description; sampling the duty once per
// period and the clamping are this design's choices. With en low the counter
// is held at zero and the output is off.
//
// Interface: period is the number of clocks per PWM period (at least 1),
// period_start is high in the first clock of each period.
module pwm_generator
  import de_pid_pkg::*;
#(
  parameter int unsigned W = 17   // counter width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] period,
  input  out_t         duty_in,
  output logic         pwm_out,
  output logic         period_start
);

  logic [W-1:0] cnt, duty;
  logic [W-1:0] duty_clamped;

  always_comb begin
    if (duty_in < 0)
      duty_clamped = '0;
    else if ((W+OUT_W)'(unsigned'(duty_in)) > (W+OUT_W)'(period))
      duty_clamped = period;
    else
      duty_clamped = W'(unsigned'(duty_in));
  end

  assign period_start = en && (cnt == '0);
  assign pwm_out      = en && (duty > cnt);

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt  <= '0;
      duty <= '0;
    end else begin
      cnt <= (cnt >= period - 1'b1) ? '0 : cnt + 1'b1;
      if (cnt >= period - 1'b1)
        duty <= duty_clamped;
    end
  end

endmodule
