// soft_start_limiter: digital ramp generator that limits inrush current.
//
// safe_duty_out moves towards target_duty by one LSB every ramp_rate_delay+1
// clocks, so a full 0..255 ramp takes 255*(ramp_rate_delay+1) clocks. After
// reset the output starts from zero, which is what makes the start soft; if
// the target is lowered, the output follows it down at the same rate.
// Interface and widths follow the source pin-out (8-bit target, 8-bit ramp
// delay, 8-bit safe duty). The one-LSB step size and the downward ramp are
// this design's choices.
module soft_start_limiter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] target_duty,
  input  logic [W-1:0] ramp_rate_delay,
  output logic [W-1:0] safe_duty_out
);

  logic [W-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt       <= '0;
      safe_duty_out <= '0;
    end else if (div_cnt >= ramp_rate_delay) begin
      div_cnt <= '0;
      if (safe_duty_out < target_duty)
        safe_duty_out <= safe_duty_out + 1'b1;
      else if (safe_duty_out > target_duty)
        safe_duty_out <= safe_duty_out - 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

endmodule
