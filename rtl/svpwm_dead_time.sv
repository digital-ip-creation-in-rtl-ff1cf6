// svpwm_dead_time: splits three ideal PWM signals into six gate drives.
//
// For each phase an edge detector restarts a small counter whenever the
// ideal signal changes; the high-side gate follows a high ideal signal and
// the low-side gate a low one, each only once the counter has reached DEAD.
// Every transition therefore leaves both switches of the leg off for DEAD
// clocks (3 clocks = 600 ns at 5 MHz), and the two gates are complementary
// otherwise. Outputs are registered: at an ideal edge sampled on clock t the
// old gate turns off after clock t and the new one turns on after clock
// t+DEAD. DEAD must be at least 1.
// Edge detection, the 3-clock dead time and the six complementary outputs
// follow the source block diagram.
module svpwm_dead_time #(
  parameter int DEAD = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] pwm,
  output logic [2:0] high,
  output logic [2:0] low
);

  localparam int DW = $clog2(DEAD + 2);

  logic [2:0]    pwm_q;
  logic [DW-1:0] cnt [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_q <= '0;
      high  <= '0;
      low   <= '0;
      for (int p = 0; p < 3; p++) cnt[p] <= '0;
    end else begin
      pwm_q <= pwm;
      for (int p = 0; p < 3; p++) begin
        if (pwm[p] != pwm_q[p]) begin
          cnt[p]  <= '0;
          high[p] <= 1'b0;
          low[p]  <= 1'b0;
        end else begin
          if (cnt[p] < DW'(DEAD)) cnt[p] <= cnt[p] + 1'b1;
          high[p] <= (cnt[p] >= DW'(DEAD - 1)) &  pwm_q[p];
          low[p]  <= (cnt[p] >= DW'(DEAD - 1)) & ~pwm_q[p];
        end
      end
    end
  end

  for (genvar p = 0; p < 3; p++) begin : g_chk
    a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(high[p] && low[p]));
  end

endmodule
