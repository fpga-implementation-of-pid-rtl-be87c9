// pid_delay: one-sample delay register z^-1 of the PID datapath.
//
// Loads d when en is high and holds otherwise; rst and clear zero it
// (synchronous). Used for the output register and the Delay, Delay1, Delay2
// and Delay3 blocks. One clock from d to q.
module pid_delay #(
  parameter int unsigned W = 36
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (en)      q <= d;
  end
endmodule
