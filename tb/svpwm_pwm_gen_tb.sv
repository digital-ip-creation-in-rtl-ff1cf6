// svpwm_pwm_gen_tb: for fixed dwell times in each sector, measures each
// phase's high time over one PWM period (2*HALF_PERIOD clocks) against the
// seven-segment expectation, checks the period from period_start spacing,
// and checks that the three pulses share one centre (center alignment).
//
// 10 ns clock, HALF_PERIOD reduced to 50 for speed. The centre-aligned,
// symmetric switching follows the source; the exact loading point of new
// on-times is this design's choice.
module svpwm_pwm_gen_tb;
  localparam int N = 50;
  logic clk = 0, rst_n = 0;
  logic [2:0]  sector;
  logic [15:0] t1, t2, t0;
  logic pu, pv, pw, ps;
  int checks = 0, failures = 0;
  // switch states (u,v,w) of active vectors 0..5, written out per phase
  int U_ON [6] = '{1, 1, 0, 0, 0, 1};
  int V_ON [6] = '{0, 1, 1, 1, 0, 0};
  int W_ON [6] = '{0, 0, 0, 1, 1, 1};

  svpwm_pwm_gen #(.HALF_PERIOD(N)) dut (.clk, .rst_n, .sector, .t1, .t2, .t0,
                                        .pwm_u (pu), .pwm_v (pv), .pwm_w (pw), .period_start (ps));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hu, hv, hw, a, b, eu, ev, ew, k1, gap;
    int cu, cv, cw, nu, nv, nw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      for (int r = 0; r < 3; r++) begin
        a = int'($urandom_range(0, 25)); b = int'($urandom_range(0, 25));
        sector = 3'(k); t1 = 16'(a); t2 = 16'(b); t0 = 16'(N - a - b);
        k1 = (k + 1) % 6;
        eu = 2 * ((N - a - b) / 2 + U_ON[k] * a + U_ON[k1] * b);
        ev = 2 * ((N - a - b) / 2 + V_ON[k] * a + V_ON[k1] * b);
        ew = 2 * ((N - a - b) / 2 + W_ON[k] * a + W_ON[k1] * b);
        // wait for two loads so the new times are in force for a whole period
        repeat (2) begin @(posedge clk); while (!ps) @(posedge clk); end
        hu = 0; hv = 0; hw = 0; cu = 0; cv = 0; cw = 0; nu = 0; nv = 0; nw = 0;
        gap = 0;
        @(posedge clk);
        for (int i = 0; i < 2 * N; i++) begin
          @(negedge clk);
          if (pu) begin hu++; cu += i; end
          if (pv) begin hv++; cv += i; end
          if (pw) begin hw++; cw += i; end
          if (ps) gap++;
        end
        check(hu == eu, $sformatf("sector %0d t1 %0d t2 %0d: U high %0d exp %0d", k, a, b, hu, eu));
        check(hv == ev, $sformatf("sector %0d t1 %0d t2 %0d: V high %0d exp %0d", k, a, b, hv, ev));
        check(hw == ew, $sformatf("sector %0d t1 %0d t2 %0d: W high %0d exp %0d", k, a, b, hw, ew));
        // pulses are centred on the same instant: equal mean position
        if (hu > 0 && hv > 0 && hu < 2*N && hv < 2*N)
          check(cu * hv == cv * hu, "U and V pulses share a centre");
        if (hw > 0 && hv > 0 && hw < 2*N && hv < 2*N)
          check(cw * hv == cv * hw, "W and V pulses share a centre");
        check(gap == 1, $sformatf("one load per PWM period (%0d)", gap));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
