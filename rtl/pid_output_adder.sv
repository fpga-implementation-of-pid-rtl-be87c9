// pid_output_adder: final adder (AdderB) of the PID controller.
//
// Sums the P, I and D terms in 38 bits, shifts the sum right arithmetically
// by FRAC bits (the binary point of the gains) and saturates it to the 18-bit
// signed output. Combinational. The 18-bit output follows the design
// description; the shift and saturation are this design's choices.
module pid_output_adder
  import de_pid_pkg::*;
#(
  parameter int unsigned FRAC = 16
) (
  input  acc_t p,
  input  acc_t i,
  input  acc_t d,
  output out_t u
);
  logic signed [ACC_W+1:0] sum, sh;
  always_comb begin
    sum = (ACC_W+2)'(p) + (ACC_W+2)'(i) + (ACC_W+2)'(d);
    sh  = sum >>> FRAC;
    if (sh > (ACC_W+2)'(2**(OUT_W-1) - 1))
      u = {1'b0, {(OUT_W-1){1'b1}}};
    else if (sh < -(ACC_W+2)'(2**(OUT_W-1)))
      u = {1'b1, {(OUT_W-1){1'b0}}};
    else
      u = sh[OUT_W-1:0];
  end
endmodule
