// controller_fsm: state machine of the controller.
//
// States: STANDBY (heater off, waiting for a command), OPTIMIZE (the DE
// optimiser searches new PID coefficients), RUN (closed-loop control, PWM
// on) and SHUTDOWN (heater off, PID state cleared, back to STANDBY the next
// cycle). From STANDBY, optimise starts the optimiser and start begins
// control. While optimising, commands are ignored; when the optimiser is done
// its best coefficients are loaded and the controller returns to STANDBY.
// From RUN, stop goes to SHUTDOWN and optimise stops the heater and starts an
// optimisation. The PID state is cleared on every entry to RUN.
//
// The four states follow the design description (stand-by, start, shutdown,
// optimisation); the transitions, the gains after reset (KP0, TI0, TD0) and
// ignoring commands during optimisation are this design's choices.
module controller_fsm
  import de_pid_pkg::*;
#(
  parameter gene_t KP0 = 16'd32768, // 0.5 with 16 fraction bits
  parameter gene_t TI0 = 16'd655,   // 0.01
  parameter gene_t TD0 = 16'd0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   cmd_start,
  input  logic   cmd_stop,
  input  logic   cmd_opt,
  input  logic   de_done,
  input  genes_t de_best,
  output logic   de_start,
  output logic   pid_clear,
  output logic   pid_run,
  output logic   pwm_en,
  output genes_t gains,
  output logic [1:0] state
);

  typedef enum logic [1:0] {STANDBY, OPTIMIZE, RUN, SHUTDOWN} cstate_t;
  cstate_t st;

  assign state     = st;
  assign pid_run   = (st == RUN);
  assign pwm_en    = (st == RUN);
  assign pid_clear = (st == SHUTDOWN) || (st == STANDBY && cmd_start && !cmd_opt);
  assign de_start  = (st == STANDBY || st == RUN) && cmd_opt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= STANDBY;
      gains <= '{TD0, TI0, KP0};
    end else begin
      unique case (st)
        STANDBY:
          if (cmd_opt)        st <= OPTIMIZE;
          else if (cmd_start) st <= RUN;
        OPTIMIZE:
          if (de_done) begin
            gains <= de_best;
            st    <= STANDBY;
          end
        RUN:
          if (cmd_stop)      st <= SHUTDOWN;
          else if (cmd_opt)  st <= OPTIMIZE;
        SHUTDOWN: st <= STANDBY;
        default:  st <= STANDBY;
      endcase
    end
  end

endmodule
