// tb_mutation_vector: compares v = clamp(base + floor(F (a - b) / 128)) with
// an integer computation for random vectors and F, and checks that both the
// lower and the upper clamp are exercised.
module tb_mutation_vector;
  import de_pid_pkg::*;
  genes_t base, a, b, v;
  f_t f;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  mutation_vector dut (.*);

  initial begin
    for (int n = 0; n < 20000; n++) begin
      for (int j = 0; j < D; j++) begin
        base[j] = (n % 3 == 0) ? 16'($urandom_range(0, 2000)) : 16'($urandom);
        a[j] = 16'($urandom);
        b[j] = 16'($urandom);
      end
      f = f_t'($urandom);
      #1;
      for (int j = 0; j < D; j++) begin
        longint w, s;
        w = ((longint'(a[j]) - longint'(b[j])) * longint'(f)) >>> 7;
        s = longint'(base[j]) + w;
        if (s < 0) begin s = 0; n_lo++; end
        if (s > 65535) begin s = 65535; n_hi++; end
        checks++;
        if (longint'(v[j]) != s) begin
          failures++;
          if (failures < 10) $display("FAIL: base=%0d a=%0d b=%0d f=%0d v=%0d expected %0d", base[j], a[j], b[j], f, v[j], s);
        end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL: clamps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
