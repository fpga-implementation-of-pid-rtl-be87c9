// tb_adc_interface: a converter model answers each conversion start after a
// random delay with a random word. Checks that conversions start exactly every
// SAMPLE_DIV clocks, that each answer appears on mv with a one-clock mv_valid,
// and that a conversion still running when the next is due is counted as
// missed and produces no sample.
module tb_adc_interface;
  localparam int DIV = 20;
  logic clk = 0, rst = 1, en = 0;
  logic adc_convst, adc_drdy;
  logic [15:0] adc_data, mv, n_missed;
  logic mv_valid;
  int checks = 0, failures = 0;
  int last_start = -1, cyc = 0, n_conv = 0, n_samples = 0, n_slow = 0;
  int delay, pending;
  logic [15:0] sent;

  always #5 clk = ~clk;

  adc_interface #(.SAMPLE_DIV(DIV), .ADC_W(16)) dut (.*);

  // converter model
  initial begin
    adc_drdy = 0; adc_data = '0; pending = -1; sent = '0;
    forever begin
      @(negedge clk);
      adc_drdy = 0;
      if (pending == 0) begin
        adc_drdy = 1;
        adc_data = sent;
        pending = -1;
      end else if (pending > 0) pending--;
      if (adc_convst) begin
        // mostly quick, sometimes slower than the sample period
        delay = ($urandom_range(0, 9) == 0) ? DIV + 5 : $urandom_range(0, DIV - 4);
        if (delay > DIV) n_slow++;
        pending = delay;
        sent = 16'($urandom);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    en = 1;
    for (int c = 0; c < 4000; c++) begin
      @(posedge clk); #1;
      cyc++;
      if (adc_convst) begin
        if (last_start >= 0) begin
          checks++;
          if (cyc - last_start != DIV) begin failures++; $display("FAIL: conversion spacing %0d", cyc - last_start); end
        end
        last_start = cyc;
        n_conv++;
      end
      if (mv_valid) begin
        n_samples++;
        checks++;
        if (mv != sent) begin failures++; $display("FAIL: mv %h expected %h", mv, sent); end
      end
    end
    checks++;
    if (n_slow == 0 || n_missed == 0) begin failures++; $display("FAIL: no missed conversion"); end
    checks++;
    if (n_samples + int'(n_missed) < n_conv - 1 || n_samples + int'(n_missed) > n_conv) begin
      failures++; $display("FAIL: %0d samples + %0d missed for %0d conversions", n_samples, n_missed, n_conv);
    end
    $display("conversions %0d samples %0d missed %0d", n_conv, n_samples, n_missed);
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
