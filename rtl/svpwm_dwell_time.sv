// svpwm_dwell_time: active and zero vector times of one half carrier period.
//
// Combinational. With Ts = HALF_PERIOD carrier counts and the reference in
// sector k: T1 = -Ts*proj(k+1) (time on vector k), T2 = Ts*proj(k) (time on
// vector k+1), T0 = Ts - T1 - T2 (time on the zero vectors), all in counts,
// the Q15 products truncated. A magnitude up to the inscribed circle keeps
// T1 + T2 <= Ts; values that rounding pushes below zero are clamped to zero.
// T1, T2 and T0 are the quantities the source names; the fixed-point form is
// this design's choice.
module svpwm_dwell_time
  import svpwm_pkg::*;
#(
  parameter int HALF_PERIOD = 250
) (
  input  logic signed [15:0] v_alpha,
  input  logic signed [15:0] v_beta,
  input  sector_t            sector,
  output logic [15:0]        t1,
  output logic [15:0]        t2,
  output logic [15:0]        t0
);

  localparam logic signed [35:0] TS = 36'(HALF_PERIOD);

  logic signed [17:0] p_k, p_k1;
  logic signed [35:0] m1, m2;
  logic signed [19:0] rem;

  always_comb begin
    p_k  = proj(v_alpha, v_beta, int'(sector));
    p_k1 = proj(v_alpha, v_beta, int'(sector) + 1);
    m1   = (-36'(p_k1) * TS) >>> 15;
    m2   = ( 36'(p_k)  * TS) >>> 15;
    t1   = (m1 < 0) ? '0 : (m1 > TS) ? 16'(HALF_PERIOD) : 16'(m1);
    t2   = (m2 < 0) ? '0 : (m2 > TS) ? 16'(HALF_PERIOD) : 16'(m2);
    rem  = 20'(HALF_PERIOD) - 20'(t1) - 20'(t2);
    t0   = (rem < 0) ? '0 : 16'(rem);
  end

endmodule
