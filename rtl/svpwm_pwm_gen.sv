// svpwm_pwm_gen: center-aligned three-phase PWM for space-vector modulation.
//
// A triangular carrier counts 0, 1, ..., N-1, N-1, ..., 1, 0, 0, 1, ...
// (N = HALF_PERIOD), so one PWM period is 2N clocks and every count value
// occurs twice. A phase output is high while the carrier is below its
// on-time, giving a pulse of exactly 2*on clocks centred on the carrier
// valley. For a reference in sector k the on-times form the symmetric
// seven-segment sequence:
//   on_x = T0/2 + (x is on in vector k ? T1 : 0) + (x is on in vector k+1 ? T2 : 0)
// Sector and times are sampled at the carrier peak (period_start pulses
// there), so the pattern never changes inside a half period; the outputs are
// registered, one clock behind the carrier.
// Center alignment and phases U, V, W follow the source; the carrier shape,
// the update point and the switching frequency (5 MHz / 500 = 10 kHz) are
// this design's choices.
module svpwm_pwm_gen
  import svpwm_pkg::*;
#(
  parameter int HALF_PERIOD = 250
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sector_t     sector,
  input  logic [15:0] t1,
  input  logic [15:0] t2,
  input  logic [15:0] t0,
  output logic        pwm_u,
  output logic        pwm_v,
  output logic        pwm_w,
  output logic        period_start
);

  localparam int CW = $clog2(HALF_PERIOD + 1);

  logic [CW-1:0] cnt;
  logic          down;
  logic [15:0]   on_d [3];
  logic [15:0]   on_q [3];
  logic [2:0]    sa, sb;

  always_comb begin
    sa = VEC_STATE[sector];
    sb = VEC_STATE[(int'(sector) + 1) % 6];
    for (int p = 0; p < 3; p++)
      on_d[p] = (t0 >> 1) + (sa[2-p] ? t1 : 16'd0) + (sb[2-p] ? t2 : 16'd0);
  end

  assign period_start = !down && (cnt == CW'(HALF_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      down  <= 1'b0;
      pwm_u <= 1'b0;
      pwm_v <= 1'b0;
      pwm_w <= 1'b0;
      for (int p = 0; p < 3; p++) on_q[p] <= '0;
    end else begin
      if (!down) begin
        if (cnt == CW'(HALF_PERIOD - 1)) down <= 1'b1;
        else                             cnt  <= cnt + 1'b1;
      end else begin
        if (cnt == '0) down <= 1'b0;
        else           cnt  <= cnt - 1'b1;
      end
      if (period_start)
        for (int p = 0; p < 3; p++) on_q[p] <= on_d[p];
      pwm_u <= (16'(cnt) < on_q[0]);
      pwm_v <= (16'(cnt) < on_q[1]);
      pwm_w <= (16'(cnt) < on_q[2]);
    end
  end

endmodule
