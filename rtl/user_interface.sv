// user_interface: takes the user's commands and the temperature set value.
//
// The push-button and switch inputs are asynchronous to the clock, so each
// passes a two-flip-flop synchroniser. A rising edge of a button becomes a
// one-cycle command: set (load the set value from the switches), start, stop
// (shutdown) or optimise. The set value is held in a register and given to
// the PID controller as its reference. A further switch, synchronised the
// same way, selects whether an optimisation starts from the gains in use. The commands (set value, start,
// shutdown, optimisation) follow the design description; the buttons,
// synchroniser, edge detection and the reset set value are this design's
// choices (buttons are assumed already debounced).
module user_interface #(
  parameter logic [15:0] SETPOINT_RESET = 16'd2000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sw,          // set value switches
  input  logic        key_set,
  input  logic        key_start,
  input  logic        key_stop,
  input  logic        key_opt,
  input  logic        sw_seed,     // switch: optimise from the gains in use
  output logic [15:0] setpoint,
  output logic        seed_sel,
  output logic        cmd_start,
  output logic        cmd_stop,
  output logic        cmd_opt
);

  logic [3:0]  k_s1, k_s2, k_prev;
  logic [15:0] sw_s1, sw_s2;
  logic [3:0]  rise;
  logic        seed_s1;

  assign rise      = k_s2 & ~k_prev;
  assign cmd_start = rise[1];
  assign cmd_stop  = rise[2];
  assign cmd_opt   = rise[3];

  always_ff @(posedge clk) begin
    if (rst) begin
      k_s1     <= '0;
      k_s2     <= '0;
      k_prev   <= '0;
      sw_s1    <= '0;
      sw_s2    <= '0;
      setpoint <= SETPOINT_RESET;
      seed_s1  <= 1'b0;
      seed_sel <= 1'b0;
    end else begin
      seed_s1  <= sw_seed;
      seed_sel <= seed_s1;
      k_s1   <= {key_opt, key_stop, key_start, key_set};
      k_s2   <= k_s1;
      k_prev <= k_s2;
      sw_s1  <= sw;
      sw_s2  <= sw_s1;
      if (rise[0]) setpoint <= sw_s2;
    end
  end

endmodule
