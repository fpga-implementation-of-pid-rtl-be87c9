// tb_user_interface: presses buttons of random length at random times and
// checks that each press gives exactly one one-clock command, two clocks
// after the button changes (two synchroniser stages; the edge detector is
// combinational), that the set button loads the switch value into the set
// value, and that the seed switch reaches seed_sel two clocks later.
module tb_user_interface;
  logic clk = 0, rst = 1;
  logic [15:0] sw, setpoint;
  logic key_set, key_start, key_stop, key_opt;
  logic cmd_start, cmd_stop, cmd_opt;
  logic sw_seed, seed_sel;
  int checks = 0, failures = 0;
  int n_cmd[3];
  logic seed_prev = 0;

  always #5 clk = ~clk;

  user_interface dut (.*);

  always @(posedge clk) begin
    if (cmd_start) n_cmd[0]++;
    if (cmd_stop)  n_cmd[1]++;
    if (cmd_opt)   n_cmd[2]++;
  end

  initial begin
    sw_seed = 0;
    sw = 16'd0; key_set = 0; key_start = 0; key_stop = 0; key_opt = 0;
    for (int k = 0; k < 3; k++) n_cmd[k] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (setpoint != 16'd2000) begin failures++; $display("FAIL: reset set value %0d", setpoint); end
    for (int n = 0; n < 200; n++) begin
      int which, len;
      logic [15:0] v;
      int prev_cnt[3];
      for (int k = 0; k < 3; k++) prev_cnt[k] = n_cmd[k];
      which = $urandom_range(0, 3);
      len = $urandom_range(1, 6);
      v = 16'($urandom);
      sw = v;
      case (which)
        0: key_set = 1;
        1: key_start = 1;
        2: key_stop = 1;
        default: key_opt = 1;
      endcase
      for (int c = 1; c <= len + 6; c++) begin
        @(negedge clk);
        if (c == len) begin key_set = 0; key_start = 0; key_stop = 0; key_opt = 0; end
        if (which > 0) begin
          checks++;
          if ((which == 1 ? cmd_start : which == 2 ? cmd_stop : cmd_opt) != (c == 2)) begin
            failures++; $display("FAIL: command %0d at clock %0d", which, c);
          end
        end
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (n_cmd[k] != prev_cnt[k] + ((which == k + 1) ? 1 : 0)) begin failures++; $display("FAIL: command count %0d", k); end
      end
      if (which == 0) begin
        checks++;
        if (setpoint != v) begin failures++; $display("FAIL: set value %0d expected %0d", setpoint, v); end
      end
      sw = 16'($urandom);   // switches move without a press: no effect
      repeat (4) @(negedge clk);
      if (which == 0) begin
        checks++;
        if (setpoint != v) begin failures++; $display("FAIL: set value changed without a press"); end
      end
    end
    // seed switch: follows with two clocks of latency
    for (int n = 0; n < 50; n++) begin
      logic v;
      v = 1'($urandom);
      sw_seed = v;
      @(negedge clk);
      checks++;
      if (seed_sel == v && n > 0 && v != seed_prev) begin failures++; $display("FAIL: seed switch too early"); end
      @(negedge clk);
      checks++;
      if (seed_sel != v) begin failures++; $display("FAIL: seed switch %0d, seed_sel %0d", v, seed_sel); end
      seed_prev = v;
    end
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
