// svpwm_pkg: shared arithmetic of the space-vector PWM cores.
//
// Reference vectors are Q15 signed numbers whose full scale (32767) is the
// radius of the circle inscribed in the inverter hexagon, Vdc/sqrt(3). The
// six active vectors V0..V5 point at 0, 60, ..., 300 degrees.
// proj(a, b, j) returns the Q15 value b*cos(60j) - a*sin(60j), which equals
// m*sin(theta - 60j) for a reference of magnitude m and angle theta. The
// reference lies in sector k (angles [60k, 60k+60)) exactly when
// proj(k) >= 0 and proj(k+1) < 0, and the standard dwell times are
// T2 = Ts*proj(k) (on vector k+1) and T1 = -Ts*proj(k+1) (on vector k).
// VEC_STATE[j] gives the (U,V,W) switch states of vector j, U in bit 2.
// The six-sector space-vector method follows the source; the Q15 number
// format and this projection formulation are this design's choices.
package svpwm_pkg;

  localparam int unsigned SQRT3_2_Q15 = 28378;   // round(32768*sqrt(3)/2)

  localparam logic [2:0] VEC_STATE [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  typedef logic [2:0] sector_t;

  function automatic logic signed [17:0] proj(input logic signed [15:0] a,
                                              input logic signed [15:0] b,
                                              input int unsigned        j);
    logic signed [33:0] ra;
    logic signed [17:0] sa, hb;
    ra = 34'(a) * 34'(SQRT3_2_Q15);
    sa = 18'(ra >>> 15);
    hb = 18'(b) >>> 1;
    case (j % 6)
      0:       return 18'(b);
      1:       return hb - sa;
      2:       return -hb - sa;
      3:       return -18'(b);
      4:       return sa - hb;
      default: return hb + sa;
    endcase
  endfunction

endpackage
