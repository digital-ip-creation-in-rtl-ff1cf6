// advanced_pwm: complementary PWM generator with dead-time insertion.
//
// A free-running counter runs 0..period and wraps. It advances once every
// PRESCALE clocks (the frequency prescaler), so one PWM period lasts
// PRESCALE*(period+1) clocks; the figures below are for PRESCALE = 1, and
// the dead time is always counted in clocks. The ideal signal is high while the counter is below
// duty_cycle (duty_cycle > period gives 100 %). Each output turns on only
// after the ideal signal has held its new level for dead_time clocks, so at
// every edge both pwm_h and pwm_l are low for dead_time clocks: pwm_h is high
// for duty_cycle - dead_time clocks and pwm_l for period + 1 - duty_cycle -
// dead_time clocks of every period (zero when negative).
//
// enable low holds the counter at zero with both outputs low; fault_n low
// does the same and also gates the outputs combinationally, so a fault
// removes the drive in the same cycle.
//
// The counter/comparator structure, the pin set and the dead-time feature
// follow the source description, and so does the prescaler; making the
// prescaler a parameter (the pin set has no prescaler input), the turn-on-
// delay form of the dead time and the behaviour of enable and fault_n are
// this design's choices.
module advanced_pwm #(
  parameter int CNT_W = 16,
  parameter int DT_W  = 8,
  parameter int PRESCALE = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             fault_n,
  input  logic [CNT_W-1:0] period,
  input  logic [CNT_W-1:0] duty_cycle,
  input  logic [DT_W-1:0]  dead_time,
  output logic             pwm_h,
  output logic             pwm_l
);

  logic             run;
  logic [CNT_W-1:0] cnt;
  logic             ideal_d, ideal_q;
  logic [DT_W-1:0]  dt_cnt;
  logic             settled;
  localparam int PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;
  logic [PW-1:0]    pre;
  logic             pre_tick;

  assign run     = enable & fault_n;
  assign ideal_d = (cnt < duty_cycle);
  assign pre_tick = (pre == PW'(PRESCALE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre     <= '0;
      cnt     <= '0;
      ideal_q <= 1'b0;
      dt_cnt  <= '0;
    end else if (!run) begin
      pre     <= '0;
      cnt     <= '0;
      ideal_q <= 1'b0;
      dt_cnt  <= '0;
    end else begin
      pre <= pre_tick ? '0 : pre + 1'b1;
      if (pre_tick) cnt <= (cnt >= period) ? '0 : cnt + 1'b1;
      if (ideal_d != ideal_q) begin
        ideal_q <= ideal_d;
        dt_cnt  <= '0;
      end else if (dt_cnt != '1) begin
        dt_cnt <= dt_cnt + 1'b1;
      end
    end
  end

  assign settled = (dt_cnt >= dead_time);
  assign pwm_h   = run &  ideal_q & settled;
  assign pwm_l   = run & ~ideal_q & settled;

  // The two switches of one leg are never driven together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(pwm_h && pwm_l));

endmodule
