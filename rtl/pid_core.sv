// pid_core: discrete-time PID controller with anti-windup and saturation.
//
// Every clock while enable is high:
//   e        = setpoint - feedback                       (signed, IN_W+1 bits)
//   integral = clamp(integral + e, -I_LIMIT, +I_LIMIT)   (ACC_W-bit accumulator)
//   u        = kp*e + ki*integral + kd*(e - e_previous)
//   control_out = clamp(u >>> SHIFT, 0, 2^OUT_W - 1)
// The gains are unsigned 8-bit numbers; SHIFT makes them fractional (gain
// kp/2^SHIFT per LSB). The clamp on the accumulator is the anti-windup
// bound; the output clamp keeps a drive value from rolling over. control_out
// is registered and reflects the error sampled on the same clock edge.
// enable low clears the integral, the stored error and the output.
// The 32-bit accumulator, the anti-windup bound, the right-shift scaling and
// the saturated output follow the source; one update per clock, the clear on
// enable low and the default SHIFT and I_LIMIT are this design's choices.
module pid_core #(
  parameter int IN_W    = 16,
  parameter int OUT_W   = 16,
  parameter int ACC_W   = 32,
  parameter int SHIFT   = 8,
  parameter int I_LIMIT = 1048576
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [IN_W-1:0]  setpoint,
  input  logic [IN_W-1:0]  feedback,
  input  logic [7:0]       kp,
  input  logic [7:0]       ki,
  input  logic [7:0]       kd,
  output logic [OUT_W-1:0] control_out
);

  localparam int SW = ACC_W + 12;   // room for the sum of the three products

  logic signed [IN_W:0]  err, err_q;
  logic signed [ACC_W:0] integ_sum;
  logic signed [ACC_W-1:0] integ, integ_d;
  logic signed [SW-1:0]  u, u_shift;
  logic [OUT_W-1:0]      out_d;

  always_comb begin
    err       = $signed({1'b0, setpoint}) - $signed({1'b0, feedback});
    integ_sum = (ACC_W+1)'(integ) + (ACC_W+1)'(err);
    if (integ_sum > (ACC_W+1)'(I_LIMIT))        integ_d = ACC_W'(I_LIMIT);
    else if (integ_sum < -(ACC_W+1)'(I_LIMIT))  integ_d = -ACC_W'(I_LIMIT);
    else                                        integ_d = ACC_W'(integ_sum);
    u = SW'($signed({1'b0, kp})) * SW'(err)
      + SW'($signed({1'b0, ki})) * SW'(integ_d)
      + SW'($signed({1'b0, kd})) * (SW'(err) - SW'(err_q));
    u_shift = u >>> SHIFT;
    if (u_shift < 0)                          out_d = '0;
    else if (u_shift > SW'({OUT_W{1'b1}}))    out_d = '1;
    else                                      out_d = OUT_W'(u_shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q       <= '0;
      integ       <= '0;
      control_out <= '0;
    end else if (!enable) begin
      err_q       <= '0;
      integ       <= '0;
      control_out <= '0;
    end else begin
      err_q       <= err;
      integ       <= integ_d;
      control_out <= out_d;
    end
  end

endmodule
