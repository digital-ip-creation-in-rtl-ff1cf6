// pid_release: 8-bit PID controller IP with fixed gains.
//
// A pid_core with 8-bit setpoint (sp), 8-bit measured value (fb) and an 8-bit
// saturated output (out) that drives an external resistor-ladder DAC and
// plant. The gains are not pins; they are the parameters KP, KI and KD with
// the scaling shift SHIFT. The defaults (P gain 1/2, I gain 1/128 per
// clock, no D term: a PI controller whose zero cancels a plant time constant
// of 64 clocks) and I_LIMIT = 32768 (so ki*integral >> SHIFT can just reach
// full scale) are this design's choices; the pin set follows the source.
module pid_release #(
  parameter int KP      = 128,
  parameter int KI      = 2,
  parameter int KD      = 0,
  parameter int SHIFT   = 8,
  parameter int I_LIMIT = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [7:0] sp,
  input  logic [7:0] fb,
  output logic [7:0] out
);

  pid_core #(
    .IN_W (8), .OUT_W (8), .ACC_W (32), .SHIFT (SHIFT), .I_LIMIT (I_LIMIT)
  ) u_core (
    .clk, .rst_n, .enable,
    .setpoint (sp), .feedback (fb),
    .kp (8'(KP)), .ki (8'(KI)), .kd (8'(KD)),
    .control_out (out)
  );

endmodule
