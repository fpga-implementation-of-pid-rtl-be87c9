// tb_rng_mixer: drives random generator words and checks each output lane
// against a model of the mixing function, both with mixing off (lanes copy
// the generators) and on (XOR of rotated words plus a free-running counter),
// with one cycle of latency.
module tb_rng_mixer;
  logic clk = 0, rst = 1, mix_en = 0;
  logic [3:0][31:0] rng_in;
  logic [2:0][31:0] lanes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rng_mixer #(.NRNG(4), .NLANE(3)) dut (.*);

  function automatic logic [31:0] rotl(logic [31:0] x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  logic [2:0][31:0] exp_l;
  int cyc;
  initial begin
    rng_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    cyc = 0;   // counter value in the first clock after reset
    for (int c = 0; c < 2000; c++) begin
      mix_en = (c >= 500) && ($urandom_range(0, 9) != 0);
      for (int k = 0; k < 4; k++) rng_in[k] = $urandom;
      for (int k = 0; k < 3; k++)
        exp_l[k] = mix_en ? ((rng_in[k] ^ rotl(rng_in[(k+1)%4], 7) ^ rotl(rng_in[(k+2)%4], 19)) + 32'(cyc))
                          : rng_in[k];
      @(negedge clk);
      cyc++;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (lanes[k] != exp_l[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d lane %0d %h expected %h", c, k, lanes[k], exp_l[k]);
        end
      end
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
