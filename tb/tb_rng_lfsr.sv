// tb_rng_lfsr: checks the 32-bit Galois LFSR against a software model, the
// start delay (state held for START_DELAY enabled cycles), that en pauses it,
// and that the sequence does not return to the seed within the run.
module tb_rng_lfsr;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] q;
  logic running;
  int checks = 0, failures = 0;
  localparam logic [31:0] SEED = 32'h1234_5678;
  localparam int DELAY = 5;

  always #5 clk = ~clk;

  rng_lfsr #(.SEED(SEED), .START_DELAY(DELAY)) dut (.*);

  logic [31:0] m;
  initial begin
    m = SEED;
    repeat (2) @(negedge clk);
    rst = 0;
    en  = 1;
    for (int c = 0; c < DELAY; c++) begin
      checks++;
      if (q != SEED || running) begin failures++; $display("FAIL: moved during start delay"); end
      @(negedge clk);
    end
    for (int c = 0; c < 3000; c++) begin
      checks++;
      if (!running || q != m) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d q=%h expected %h", c, q, m);
      end
      if ((c % 97) == 50) begin
        en = 0;
        @(negedge clk);
        checks++;
        if (q != m) begin failures++; $display("FAIL: advanced while disabled"); end
        en = 1;
      end
      m = m[0] ? ((m >> 1) ^ 32'h8020_0003) : (m >> 1);
      @(negedge clk);
      checks++;
      if (q == SEED || q == 0) begin failures++; $display("FAIL: short cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
