// bldc_drive: closed-loop speed drive for a brushless DC motor.
//
// pid_core compares the speed command with the measured speed and computes a
// throttle; advanced_pwm turns the throttle (clamped to one PWM period) into
// a chopping signal of period PWM_PERIOD+1 clocks (10 kHz at a 10 MHz
// clock); bldc_commutator routes that signal to the high-side switch of the
// phase the Hall sensors select and holds the matching low-side switch on.
// dead_time sets both safety gaps: the PWM stage delays each turn-on of
// the chopping signal by dead_time clocks, and the commutator keeps every
// gate off for dead_time+1 clocks after each Hall change.
// enable and fault_n stop the controller, the PWM and every gate.
// The three blocks, their order and the 10 kHz chopping follow the source
// block diagram and plots. The measured speed is an input port because the
// source does not show where it comes from; the clock frequency and the
// throttle clamp are this design's choices.
module bldc_drive #(
  parameter int PWM_PERIOD = 999,
  parameter int SHIFT      = 8,
  parameter int I_LIMIT    = 1048576
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        fault_n,
  input  logic [15:0] speed_sp,
  input  logic [15:0] speed_fb,
  input  logic [7:0]  kp,
  input  logic [7:0]  ki,
  input  logic [7:0]  kd,
  input  logic [2:0]  hall_state,
  input  logic [7:0]  dead_time,
  output logic        ah,
  output logic        al,
  output logic        bh,
  output logic        bl,
  output logic        ch,
  output logic        cl,
  output logic        hall_error,
  output logic [15:0] throttle
);

  localparam logic [15:0] FULL = 16'(PWM_PERIOD + 1);

  logic [15:0] control;
  // pwm_l is left unused: in this unipolar scheme the low-side switch of
  // the active pair is held on by the commutator, not chopped.
  logic        pwm_h, pwm_l;

  pid_core #(.IN_W (16), .OUT_W (16), .ACC_W (32), .SHIFT (SHIFT), .I_LIMIT (I_LIMIT)) u_pid (
    .clk, .rst_n, .enable,
    .setpoint (speed_sp), .feedback (speed_fb), .kp, .ki, .kd,
    .control_out (control)
  );

  assign throttle = (control > FULL) ? FULL : control;

  advanced_pwm u_pwm (
    .clk, .rst_n, .enable, .fault_n,
    .period (16'(PWM_PERIOD)), .duty_cycle (throttle), .dead_time,
    .pwm_h, .pwm_l
  );

  bldc_commutator u_comm (
    .clk, .rst_n, .enable, .fault_n, .hall_state,
    .pwm (pwm_h), .dead_time,
    .ah, .al, .bh, .bl, .ch, .cl, .hall_error
  );

endmodule
