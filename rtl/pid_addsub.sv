// pid_addsub: saturating 36-bit adder or subtractor of the PID datapath.
//
// y = a + b (SUB = 0) or y = a - b (SUB = 1), clamped to the most positive or
// most negative 36-bit value on overflow. Combinational. Used for the Adder,
// Adder1, Sub and Sub2 blocks; the saturation is this design's choice.
module pid_addsub
  import de_pid_pkg::*;
#(
  parameter bit SUB = 1'b0
) (
  input  acc_t a,
  input  acc_t b,
  output acc_t y
);
  assign y = SUB ? sat_sub(a, b) : sat_add(a, b);
endmodule
