// tb_controller_fsm: walks the controller through every transition
// (stand-by -> run -> shutdown -> stand-by, stand-by -> optimise -> stand-by,
// run -> optimise) and checks the state, the outputs of each state, that
// commands are ignored while optimising and that the optimiser's result is
// loaded into the gains.
module tb_controller_fsm;
  import de_pid_pkg::*;
  logic clk = 0, rst = 1;
  logic cmd_start = 0, cmd_stop = 0, cmd_opt = 0, de_done = 0;
  genes_t de_best;
  logic de_start, pid_clear, pid_run, pwm_en;
  genes_t gains;
  logic [1:0] state;
  int checks = 0, failures = 0;

  localparam logic [1:0] STANDBY = 0, OPTIMIZE = 1, RUN = 2, SHUTDOWN = 3;

  always #5 clk = ~clk;

  controller_fsm dut (.*);

  task automatic expect_state(logic [1:0] s, string what);
    checks++;
    if (state != s) begin failures++; $display("FAIL: %s: state %0d expected %0d", what, state, s); end
    checks++;
    if (pid_run != (s == RUN) || pwm_en != (s == RUN)) begin failures++; $display("FAIL: %s: run outputs", what); end
  endtask

  task automatic pulse(ref logic sig, input logic exp_start, input logic exp_clear);
    @(negedge clk);
    sig = 1;
    #1;
    checks++;
    if (de_start != exp_start || pid_clear != exp_clear) begin
      failures++; $display("FAIL: de_start %0d pid_clear %0d", de_start, pid_clear);
    end
    @(negedge clk);
    sig = 0;
  endtask

  initial begin
    de_best = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    #1;
    expect_state(STANDBY, "reset");
    checks++;
    if (gains != '{16'd0, 16'd655, 16'd32768}) begin failures++; $display("FAIL: reset gains"); end
    pulse(cmd_stop, 0, 0);   #1; expect_state(STANDBY, "stop in stand-by");
    pulse(cmd_start, 0, 1);  #1; expect_state(RUN, "start");
    pulse(cmd_start, 0, 0);  #1; expect_state(RUN, "start while running");
    @(negedge clk); cmd_stop = 1; #1;
    checks++; if (pid_clear) failures++;
    @(negedge clk); cmd_stop = 0; #1;
    expect_state(SHUTDOWN, "stop");
    checks++; if (!pid_clear) begin failures++; $display("FAIL: shutdown does not clear"); end
    @(negedge clk); #1; expect_state(STANDBY, "after shutdown");
    // optimisation from stand-by
    pulse(cmd_opt, 1, 0); #1; expect_state(OPTIMIZE, "optimise");
    pulse(cmd_start, 0, 0); #1; expect_state(OPTIMIZE, "start ignored");
    pulse(cmd_stop, 0, 0);  #1; expect_state(OPTIMIZE, "stop ignored");
    pulse(cmd_opt, 0, 0);   #1; expect_state(OPTIMIZE, "optimise ignored");
    @(negedge clk); de_best = '{16'd111, 16'd222, 16'd333}; de_done = 1;
    @(negedge clk); de_done = 0; de_best = '0; #1;
    expect_state(STANDBY, "optimisation done");
    checks++;
    if (gains != '{16'd111, 16'd222, 16'd333}) begin failures++; $display("FAIL: gains not loaded"); end
    // optimisation from run
    pulse(cmd_start, 0, 1); #1; expect_state(RUN, "start again");
    pulse(cmd_opt, 1, 0);   #1; expect_state(OPTIMIZE, "optimise from run");
    repeat (5) @(negedge clk);
    expect_state(OPTIMIZE, "waiting");
    @(negedge clk); de_best = '{16'd7, 16'd8, 16'd9}; de_done = 1;
    @(negedge clk); de_done = 0; #1;
    expect_state(STANDBY, "second optimisation done");
    checks++;
    if (gains != '{16'd7, 16'd8, 16'd9}) begin failures++; $display("FAIL: second gains"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
