// svpwm: space-vector PWM core, reference vector in, six gate drives out.
//
// (v_alpha, v_beta) is a Q15 stationary-frame reference (full scale = radius
// of the inscribed circle, Vdc/sqrt(3)). svpwm_sector_id picks the 60-degree
// sector, svpwm_dwell_time computes T1, T2 and T0 for one half carrier
// period, svpwm_pwm_gen turns them into center-aligned U, V, W signals
// (sampled once per half period, at the carrier peak), and svpwm_dead_time
// splits each into complementary high/low gate drives with a DEAD-clock dead
// band. PWM period = 2*HALF_PERIOD clocks (10 kHz at the 5 MHz clock).
// The chain of blocks and the 3-clock dead time follow the source block
// diagram; HALF_PERIOD is this design's choice.
module svpwm
  import svpwm_pkg::*;
#(
  parameter int HALF_PERIOD = 250,
  parameter int DEAD        = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] v_alpha,
  input  logic signed [15:0] v_beta,
  output logic               u_high,
  output logic               u_low,
  output logic               v_high,
  output logic               v_low,
  output logic               w_high,
  output logic               w_low,
  output sector_t            sector,
  output logic               period_start
);

  logic [15:0] t1, t2, t0;
  logic        pwm_u, pwm_v, pwm_w;
  logic [2:0]  high, low;

  svpwm_sector_id u_sector (.v_alpha, .v_beta, .sector);

  svpwm_dwell_time #(.HALF_PERIOD(HALF_PERIOD)) u_dwell (
    .v_alpha, .v_beta, .sector, .t1, .t2, .t0
  );

  svpwm_pwm_gen #(.HALF_PERIOD(HALF_PERIOD)) u_pwm (
    .clk, .rst_n, .sector, .t1, .t2, .t0,
    .pwm_u, .pwm_v, .pwm_w, .period_start
  );

  svpwm_dead_time #(.DEAD(DEAD)) u_dead (
    .clk, .rst_n, .pwm ({pwm_u, pwm_v, pwm_w}), .high, .low
  );

  assign {u_high, v_high, w_high} = high;
  assign {u_low,  v_low,  w_low}  = low;

endmodule
