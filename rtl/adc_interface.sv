// adc_interface: samples the external analog-to-digital converter at a fixed
// rate and passes the measured value to the PID controller.
//
// Every SAMPLE_DIV clocks the interface raises adc_convst for one clock to
// start a conversion, then waits for the converter's data-ready strobe
// adc_drdy, captures adc_data and presents it as mv with a one-cycle
// mv_valid strobe. With the 50 MHz board clock, SAMPLE_DIV = 100000 gives the
// 500 Hz sampling rate of the design description. The converter handshake (a
// parallel converter with start and data-ready lines) is this design's own
// choice, as the converter itself is outside the design. A conversion that
// has not finished when the next one is due is dropped and counted in
// n_missed.
module adc_interface #(
  parameter int unsigned SAMPLE_DIV = 100_000,
  parameter int unsigned ADC_W      = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  // converter side
  output logic             adc_convst,
  input  logic             adc_drdy,
  input  logic [ADC_W-1:0] adc_data,
  // PID side
  output logic [15:0]      mv,
  output logic             mv_valid,
  output logic [15:0]      n_missed
);

  localparam int unsigned CNT_W = $clog2(SAMPLE_DIV + 1);

  logic [CNT_W-1:0] cnt;
  logic             waiting;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt        <= '0;
      waiting    <= 1'b0;
      adc_convst <= 1'b0;
      mv_valid   <= 1'b0;
      if (rst) begin
        mv       <= '0;
        n_missed <= '0;
      end
    end else begin
      adc_convst <= 1'b0;
      mv_valid   <= 1'b0;
      cnt <= (32'(cnt) == SAMPLE_DIV - 1) ? '0 : cnt + 1'b1;
      if (cnt == '0) begin
        adc_convst <= 1'b1;
        waiting    <= 1'b1;
        if (waiting) n_missed <= n_missed + 16'd1;
      end else if (waiting && adc_drdy) begin
        mv       <= (ADC_W >= 16) ? 16'(adc_data >> (ADC_W - 16))
                                  : 16'(adc_data) << (16 - ADC_W);
        mv_valid <= 1'b1;
        waiting  <= 1'b0;
      end
    end
  end

endmodule
