// tb_pid_core: checks the PID controller sample by sample against an integer
// model of the same difference equations:
//   e = ref - mv, P = Kp e, I[n] = I[n-1] + Ti e[n] + Ti e[n-1],
//   D[n] = 2 (Td e[n] - Td e[n-1]) - D[n-1], u = sat18((P + I + D) >>> 16),
// with the 36-bit accumulators saturating. It also checks that u_valid comes
// exactly two clocks after en, that clear resets the state, and that output
// and accumulator saturation both occur.
module tb_pid_core;
  import de_pid_pkg::*;

  logic clk = 0, rst = 1, clear = 0, en = 0;
  gene_t kp, ti, td, ref_val, mv;
  out_t u;
  logic u_valid;
  acc_t p_term, i_term, d_term;
  int checks = 0, failures = 0;
  int n_out_sat = 0, n_acc_sat = 0;

  always #5 clk = ~clk;

  pid_core dut (.*);

  localparam longint AMAX = (longint'(1) <<< 35) - 1;
  localparam longint AMIN = -(longint'(1) <<< 35);
  function automatic longint sat36(longint x);
    if (x > AMAX) return AMAX;
    if (x < AMIN) return AMIN;
    return x;
  endfunction

  longint m_ix_prev, m_dx_prev, m_i, m_d;

  task automatic model_reset();
    m_ix_prev = 0; m_dx_prev = 0; m_i = 0; m_d = 0;
  endtask

  function automatic longint model_step(longint k_p, longint k_i, longint k_d,
                                        longint r, longint m);
    longint e, p, ix, dx, sub, sum, sh;
    e   = r - m;
    p   = k_p * e;
    ix  = k_i * e;
    dx  = k_d * e;
    m_i = sat36(sat36(ix + m_ix_prev) + m_i);
    sub = sat36(dx - m_dx_prev);
    m_d = sat36(sat36(sub + sub) - m_d);
    m_ix_prev = ix;
    m_dx_prev = dx;
    if (m_i == AMAX || m_i == AMIN || m_d == AMAX || m_d == AMIN) n_acc_sat++;
    sum = p + m_i + m_d;
    sh  = sum >>> 16;
    if (sh > 131071)  begin sh = 131071;  n_out_sat++; end
    if (sh < -131072) begin sh = -131072; n_out_sat++; end
    return sh;
  endfunction

  task automatic sample(gene_t k_p, gene_t k_i, gene_t k_d, gene_t r, gene_t m);
    longint exp_u;
    @(negedge clk);
    kp = k_p; ti = k_i; td = k_d; ref_val = r; mv = m; en = 1;
    exp_u = model_step(k_p, k_i, k_d, r, m);
    @(negedge clk);
    en = 0;
    checks++;
    if (u_valid) begin failures++; $display("FAIL: u_valid one clock after en"); end
    @(negedge clk);
    checks++;
    if (!u_valid) begin failures++; $display("FAIL: u_valid missing two clocks after en"); end
    checks++;
    if (longint'(u) != exp_u) begin
      failures++;
      $display("FAIL: u=%0d expected %0d (kp=%0d ti=%0d td=%0d ref=%0d mv=%0d)",
               u, exp_u, k_p, k_i, k_d, r, m);
    end
    checks++;
    if (longint'(i_term) != m_i || longint'(d_term) != m_d) begin
      failures++;
      $display("FAIL: I=%0d/%0d D=%0d/%0d", i_term, m_i, d_term, m_d);
    end
  endtask

  initial begin
    kp = 0; ti = 0; td = 0; ref_val = 0; mv = 0;
    model_reset();
    repeat (3) @(negedge clk);
    rst = 0;
    // Small gains, temperature-like values around the 2000 reference.
    for (int n = 0; n < 200; n++)
      sample(16'($urandom_range(0, 1024)), 16'($urandom_range(0, 64)),
             16'($urandom_range(0, 256)), 16'd2000,
             16'(2000 + $urandom_range(0, 200) - 100));
    // Clear, then full-range random values.
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    model_reset();
    checks++;
    if (i_term != 0 || d_term != 0 || u != 0) begin failures++; $display("FAIL: clear"); end
    for (int n = 0; n < 200; n++)
      sample(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    // Constant large error drives the integrator into saturation.
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    model_reset();
    for (int n = 0; n < 20; n++)
      sample(16'd0, 16'hFFFF, 16'd0, 16'hFFFF, 16'd0);
    // Separated samples: en pulses with idle clocks in between.
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      sample(16'($urandom_range(0, 300)), 16'($urandom_range(0, 10)),
             16'($urandom_range(0, 300)), 16'd2000, 16'($urandom_range(1800, 2200)));
    end
    checks++;
    if (n_out_sat == 0) begin failures++; $display("FAIL: output saturation never happened"); end
    checks++;
    if (n_acc_sat == 0) begin failures++; $display("FAIL: accumulator saturation never happened"); end
    $display("output saturations %0d, accumulator saturations %0d", n_out_sat, n_acc_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
