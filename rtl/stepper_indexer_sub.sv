// stepper_indexer_sub: microstepping driver for a bipolar two-phase stepper.
//
// stepper_indexer turns step/dir pulses into sine and cosine coil duties,
// two advanced_pwm generators (one per coil, period PWM_PERIOD+1 clocks,
// DEAD_TIME clocks of dead band) turn the duties into complementary chopping
// pulses, and two hbridge_router blocks steer those pulses to the four gates
// of each coil's H-bridge. enable and fault_n stop the PWM and open every
// switch at once. With a 10 MHz clock the defaults give 39 kHz chopping and
// 1 us dead time. The block chain and the pin-out follow the source; the PWM
// period and dead time values are this design's choices.
module stepper_indexer_sub #(
  parameter int PWM_PERIOD = 255,
  parameter int DEAD_TIME  = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       fault_n,
  input  logic       step,
  input  logic       dir,
  input  logic [1:0] step_mode,
  output logic       a_tl,
  output logic       a_tr,
  output logic       a_bl,
  output logic       a_br,
  output logic       b_tl,
  output logic       b_tr,
  output logic       b_bl,
  output logic       b_br,
  output logic [7:0] phase
);

  logic [7:0] duty_a, duty_b;
  logic       pol_a, pol_b;
  logic       a_h, a_l, b_h, b_l;
  logic       bridge_en;

  assign bridge_en = enable & fault_n;

  stepper_indexer u_indexer (
    .clk, .rst_n, .enable, .step, .dir, .step_mode,
    .phase, .duty_a, .pol_a, .duty_b, .pol_b
  );

  advanced_pwm u_pwm_a (
    .clk, .rst_n, .enable, .fault_n,
    .period (16'(PWM_PERIOD)), .duty_cycle ({8'd0, duty_a}), .dead_time (8'(DEAD_TIME)),
    .pwm_h (a_h), .pwm_l (a_l)
  );

  advanced_pwm u_pwm_b (
    .clk, .rst_n, .enable, .fault_n,
    .period (16'(PWM_PERIOD)), .duty_cycle ({8'd0, duty_b}), .dead_time (8'(DEAD_TIME)),
    .pwm_h (b_h), .pwm_l (b_l)
  );

  hbridge_router u_route_a (
    .clk, .rst_n, .enable (bridge_en), .pwm_h (a_h), .pwm_l (a_l), .pol (pol_a),
    .tl (a_tl), .tr (a_tr), .bl (a_bl), .br (a_br)
  );

  hbridge_router u_route_b (
    .clk, .rst_n, .enable (bridge_en), .pwm_h (b_h), .pwm_l (b_l), .pol (pol_b),
    .tl (b_tl), .tr (b_tr), .bl (b_bl), .br (b_br)
  );

endmodule
