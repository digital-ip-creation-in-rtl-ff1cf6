// svpwm_subcircuit: free-running three-phase SVPWM gate-drive source.
//
// svpwm_ref_gen synthesises a rotating Q15 reference vector (about 50 Hz by
// default) and svpwm converts it to six dead-time-protected gate drives for
// a three-phase inverter, at 10 kHz with a 5 MHz clock. The two blocks and
// their connection follow the source subcircuit; the reference frequency is
// this design's choice.
module svpwm_subcircuit
  import svpwm_pkg::*;
#(
  parameter int unsigned PHASE_STEP  = 42950,
  parameter int          HALF_PERIOD = 250,
  parameter int          DEAD        = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               u_high,
  output logic               u_low,
  output logic               v_high,
  output logic               v_low,
  output logic               w_high,
  output logic               w_low,
  output logic signed [15:0] v_alpha,
  output logic signed [15:0] v_beta,
  output sector_t            sector
);

  // period_start is not brought out: the subcircuit's pins are only the
  // gates, the reference and the sector.
  logic period_start;

  svpwm_ref_gen #(.PHASE_STEP(PHASE_STEP)) u_ref (.clk, .rst_n, .v_alpha, .v_beta);

  svpwm #(.HALF_PERIOD(HALF_PERIOD), .DEAD(DEAD)) u_svpwm (
    .clk, .rst_n, .v_alpha, .v_beta,
    .u_high, .u_low, .v_high, .v_low, .w_high, .w_low,
    .sector, .period_start
  );

endmodule
