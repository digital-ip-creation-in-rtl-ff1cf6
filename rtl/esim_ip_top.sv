// esim_ip_top: the library of motor-control, safety and communication cores,
// side by side.
//
// The cores are independent IP blocks, not one system, so each keeps its own
// ports, prefixed by the core's name: general-purpose complementary PWM
// (pwm_), soft-start inrush limiter (ss_), sigma-delta modulator (sd_),
// space-vector PWM source (sv_), microstepping stepper driver (st_), BLDC
// speed drive (bldc_), 8-bit PID controller (pid_), quadrature encoder
// interface (qei_), windowed watchdog (wd_) and I2C master (i2c_). All share
// rst_n. The SVPWM source has its own clock, sv_clk, because its timing
// (600 ns dead time, 10 kHz carrier) is set for 5 MHz; every other core runs
// on clk, for which 10 MHz is assumed (1 us stepper dead time, 10 kHz BLDC
// chopping, 100 kHz I2C). The analog parts each core drives (bridges,
// filters, power stages) are outside this RTL and connect to these ports.
module esim_ip_top (
  input  logic        clk,
  input  logic        sv_clk,
  input  logic        rst_n,
  // general-purpose PWM
  input  logic        pwm_enable,
  input  logic        pwm_fault_n,
  input  logic [15:0] pwm_period,
  input  logic [15:0] pwm_duty_cycle,
  input  logic [7:0]  pwm_dead_time,
  output logic        pwm_h,
  output logic        pwm_l,
  // soft-start inrush limiter
  input  logic [7:0]  ss_target_duty,
  input  logic [7:0]  ss_ramp_rate_delay,
  output logic [7:0]  ss_safe_duty,
  output logic        ss_pdm_out,
  // sigma-delta modulator
  input  logic [7:0]  sd_in,
  output logic        sd_out,
  // space-vector PWM
  output logic        sv_u_high,
  output logic        sv_u_low,
  output logic        sv_v_high,
  output logic        sv_v_low,
  output logic        sv_w_high,
  output logic        sv_w_low,
  output logic [15:0] sv_v_alpha,
  output logic [15:0] sv_v_beta,
  output logic [2:0]  sv_sector,
  // stepper driver
  input  logic        st_enable,
  input  logic        st_fault_n,
  input  logic        st_step,
  input  logic        st_dir,
  input  logic [1:0]  st_step_mode,    // 0 microstep, 1 half step, 2/3 full step
  output logic [3:0]  st_a_gates,      // {tl, tr, bl, br}, tl/tr active low
  output logic [3:0]  st_b_gates,
  output logic [7:0]  st_phase,
  // BLDC speed drive
  input  logic        bldc_enable,
  input  logic        bldc_fault_n,
  input  logic [15:0] bldc_speed_sp,
  input  logic [15:0] bldc_speed_fb,
  input  logic [7:0]  bldc_kp,
  input  logic [7:0]  bldc_ki,
  input  logic [7:0]  bldc_kd,
  input  logic [2:0]  bldc_hall_state,
  input  logic [7:0]  bldc_dead_time,
  output logic [5:0]  bldc_gates,      // {ah, al, bh, bl, ch, cl}
  output logic        bldc_hall_error,
  output logic [15:0] bldc_throttle,
  // 8-bit PID controller
  input  logic        pid_enable,
  input  logic [7:0]  pid_sp,
  input  logic [7:0]  pid_fb,
  output logic [7:0]  pid_out,
  // quadrature encoder interface
  input  logic        qei_enable,
  input  logic        qei_phase_a,
  input  logic        qei_phase_b,
  input  logic        qei_index,
  input  logic [15:0] qei_max_count,
  output logic [15:0] qei_position,
  output logic        qei_direction,
  output logic        qei_error,
  // windowed watchdog
  input  logic        wd_enable,
  input  logic        wd_feed,
  input  logic [7:0]  wd_key,
  input  logic [7:0]  wd_window_open,
  input  logic [7:0]  wd_window_close,
  input  logic [7:0]  wd_timeout,
  output logic [7:0]  wd_count,
  output logic        wd_ewi,
  output logic        wd_reset,
  output logic [2:0]  wd_cause,
  // I2C master
  input  logic        i2c_start,
  input  logic [6:0]  i2c_addr,
  input  logic        i2c_rw,
  input  logic [7:0]  i2c_tx_data,
  output logic [7:0]  i2c_rx_data,
  output logic        i2c_busy,
  output logic        i2c_done,
  output logic        i2c_ack_error,
  output logic        i2c_scl_oe,
  input  logic        i2c_scl_i,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_i
);

  advanced_pwm u_pwm (
    .clk, .rst_n, .enable (pwm_enable), .fault_n (pwm_fault_n),
    .period (pwm_period), .duty_cycle (pwm_duty_cycle), .dead_time (pwm_dead_time),
    .pwm_h, .pwm_l
  );

  soft_start_sub u_soft_start (
    .clk, .rst_n, .target_duty (ss_target_duty), .ramp_rate_delay (ss_ramp_rate_delay),
    .safe_duty (ss_safe_duty), .pdm_out (ss_pdm_out)
  );

  sd_modulator u_sd (
    .clk, .rst_n, .digital_val_in (sd_in), .sigma_delta_out (sd_out)
  );

  svpwm_subcircuit u_svpwm (
    .clk (sv_clk), .rst_n,
    .u_high (sv_u_high), .u_low (sv_u_low), .v_high (sv_v_high), .v_low (sv_v_low),
    .w_high (sv_w_high), .w_low (sv_w_low),
    .v_alpha (sv_v_alpha), .v_beta (sv_v_beta), .sector (sv_sector)
  );

  stepper_indexer_sub u_stepper (
    .clk, .rst_n, .enable (st_enable), .fault_n (st_fault_n), .step (st_step), .dir (st_dir), .step_mode (st_step_mode),
    .a_tl (st_a_gates[3]), .a_tr (st_a_gates[2]), .a_bl (st_a_gates[1]), .a_br (st_a_gates[0]),
    .b_tl (st_b_gates[3]), .b_tr (st_b_gates[2]), .b_bl (st_b_gates[1]), .b_br (st_b_gates[0]),
    .phase (st_phase)
  );

  bldc_drive u_bldc (
    .clk, .rst_n, .enable (bldc_enable), .fault_n (bldc_fault_n),
    .speed_sp (bldc_speed_sp), .speed_fb (bldc_speed_fb),
    .kp (bldc_kp), .ki (bldc_ki), .kd (bldc_kd),
    .hall_state (bldc_hall_state), .dead_time (bldc_dead_time),
    .ah (bldc_gates[5]), .al (bldc_gates[4]), .bh (bldc_gates[3]),
    .bl (bldc_gates[2]), .ch (bldc_gates[1]), .cl (bldc_gates[0]),
    .hall_error (bldc_hall_error), .throttle (bldc_throttle)
  );

  pid_release u_pid (
    .clk, .rst_n, .enable (pid_enable), .sp (pid_sp), .fb (pid_fb), .out (pid_out)
  );

  qei u_qei (
    .clk, .rst_n, .enable (qei_enable),
    .phase_a (qei_phase_a), .phase_b (qei_phase_b), .index (qei_index),
    .max_count (qei_max_count),
    .position (qei_position), .direction (qei_direction), .error (qei_error)
  );

  wwdt u_wwdt (
    .clk, .rst_n, .enable (wd_enable), .feed (wd_feed), .key (wd_key),
    .window_open (wd_window_open), .window_close (wd_window_close), .timeout (wd_timeout),
    .count (wd_count), .ewi (wd_ewi), .wdt_reset (wd_reset), .cause (wd_cause)
  );

  i2c_master u_i2c (
    .clk, .rst_n, .start (i2c_start), .addr (i2c_addr), .rw (i2c_rw), .tx_data (i2c_tx_data),
    .rx_data (i2c_rx_data), .busy (i2c_busy), .done (i2c_done), .ack_error (i2c_ack_error),
    .scl_oe (i2c_scl_oe), .scl_i (i2c_scl_i), .sda_oe (i2c_sda_oe), .sda_i (i2c_sda_i)
  );

endmodule
