// pid_subtractor: error of the PID controller, e = ref - mv.
//
// Both inputs are 16-bit unsigned; the result is 18 bits signed, wide enough
// for every difference. Combinational. Width and function follow the design
// description (Subtractor, [17:0]).
module pid_subtractor
  import de_pid_pkg::*;
(
  input  gene_t ref_val,
  input  gene_t mv,
  output err_t  e
);
  assign e = err_t'({2'b00, ref_val}) - err_t'({2'b00, mv});
endmodule
