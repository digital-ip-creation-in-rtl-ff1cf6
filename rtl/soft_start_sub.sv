// soft_start_sub: soft-start inrush limiter subcircuit.
//
// soft_start_limiter ramps the requested duty up from zero and sd_modulator
// turns the ramped 8-bit duty into a 1-bit pulse-density stream (pdm_out).
// Filtered by an external RC network, pdm_out becomes an analog control
// voltage that rises smoothly from 0 to target_duty/256 of the supply over
// about 255*(ramp_rate_delay+1) clocks, which then sets the duty of an analog
// power stage. The two cores and their connection follow the source
// subcircuit; the analog filter and power stage are outside this RTL.
module soft_start_sub #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] target_duty,
  input  logic [W-1:0] ramp_rate_delay,
  output logic [W-1:0] safe_duty,
  output logic         pdm_out
);

  soft_start_limiter #(.W(W)) u_limiter (
    .clk, .rst_n,
    .target_duty, .ramp_rate_delay,
    .safe_duty_out (safe_duty)
  );

  sd_modulator #(.W(W)) u_modulator (
    .clk, .rst_n,
    .digital_val_in  (safe_duty),
    .sigma_delta_out (pdm_out)
  );

endmodule
