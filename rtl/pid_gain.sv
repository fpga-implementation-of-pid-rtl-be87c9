// pid_gain: one gain block of the PID controller, p = k * e.
//
// The 16-bit unsigned coefficient k is used as a non-negative signed number
// (zero-extended to 17 bits) and multiplied by the 18-bit signed error; the
// 35-bit product is sign-extended to the 36-bit datapath width.
// Combinational. Unsigned 16-bit coefficients made signed, and the 36-bit
// width, follow the design description.
module pid_gain
  import de_pid_pkg::*;
(
  input  gene_t k,
  input  err_t  e,
  output acc_t  p
);
  logic signed [GENE_W:0] ks;
  assign ks = {1'b0, k};
  assign p  = ks * e;
endmodule
