// tb_model_pkg: integer reference models used by several testbenches.
//
// pid_model repeats the PID difference equations with 64-bit integers:
//   e = ref - mv, P = Kp e, I[n] = I[n-1] + Ti e[n] + Ti e[n-1],
//   D[n] = 2 (Td e[n] - Td e[n-1]) - D[n-1]  (36-bit saturating),
//   u = sat18((P + I + D) >>> 16).
// fitness_cost runs that model in closed loop with the first-order plant
// y += (u - y) >>> 2 from y = 0 and sums |ref - y| over n_eval samples.
package tb_model_pkg;

  localparam longint AMAX = (longint'(1) <<< 35) - 1;
  localparam longint AMIN = -(longint'(1) <<< 35);

  function automatic longint sat36(longint x);
    if (x > AMAX) return AMAX;
    if (x < AMIN) return AMIN;
    return x;
  endfunction

  class pid_model;
    longint ix_prev, dx_prev, i_acc, d_acc;
    function new(); reset(); endfunction
    function void reset();
      ix_prev = 0; dx_prev = 0; i_acc = 0; d_acc = 0;
    endfunction
    function longint step(longint kp, longint ti, longint td, longint r, longint m);
      longint e, p, ix, dx, sub, sh;
      e     = r - m;
      p     = kp * e;
      ix    = ti * e;
      dx    = td * e;
      i_acc = sat36(sat36(ix + ix_prev) + i_acc);
      sub   = sat36(dx - dx_prev);
      d_acc = sat36(sat36(sub + sub) - d_acc);
      ix_prev = ix;
      dx_prev = dx;
      sh = (p + i_acc + d_acc) >>> 16;
      if (sh > 131071)  sh = 131071;
      if (sh < -131072) sh = -131072;
      return sh;
    endfunction
  endclass

  function automatic longint fitness_cost(longint kp, longint ti, longint td,
                                          int n_eval, longint r);
    pid_model pm = new();
    longint y, cost, mv, u;
    y = 0; cost = 0;
    for (int n = 0; n < n_eval; n++) begin
      cost += (r - y < 0) ? (y - r) : (r - y);
      mv = (y < 0) ? 0 : (y > 65535) ? 65535 : y;
      u  = pm.step(kp, ti, td, r, mv);
      y  = y + ((u - y) >>> 2);
    end
    return cost;
  endfunction

endpackage
