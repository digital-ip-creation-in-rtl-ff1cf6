// svpwm_tb: SVPWM core with a reduced carrier (HALF_PERIOD = 50). For
// constant reference vectors at many angles and magnitudes, each phase's
// high-gate and low-gate times over one PWM period are compared with an
// independent model: the min-max (zero-sequence injection) form of SVPWM,
// duty_x = 0.5 + (v_x - (v_max + v_min)/2)/sqrt(3) for per-unit phase
// voltages v_x, less DEAD clocks of dead band per edge. Also checks the
// sector output and that no leg ever has both gates on.
//
// 10 ns clock, HALF_PERIOD reduced to 50. The core's structure follows the
// source; the min-max reference model is independent of the sector arithmetic
// used in the RTL.
module svpwm_tb;
  localparam int  N = 50, DEAD = 3;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] va, vb;
  logic uh, ul, vh, vl, wh, wl, ps;
  logic [2:0] sector;
  int checks = 0, failures = 0;

  svpwm #(.HALF_PERIOD(N), .DEAD(DEAD)) dut (
    .clk, .rst_n, .v_alpha (va), .v_beta (vb),
    .u_high (uh), .u_low (ul), .v_high (vh), .v_low (vl), .w_high (wh), .w_low (wl),
    .sector, .period_start (ps));

  always #5 clk = ~clk;

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && ((uh && ul) || (vh && vl) || (wh && wl))) begin
    failures++; $display("FAIL: shoot-through");
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, th, p [3], mx, mn, d, eh, el;
    int hi [3], lo [3];
    va = 0; vb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      m  = (i < 12) ? 0.9 : 0.2 + 0.75 * real'($urandom_range(0, 1000)) / 1000.0;
      th = (i < 12) ? (2.0 * PI * (real'(i) + 0.5) / 12.0)
                    : 2.0 * PI * real'($urandom_range(0, 3599)) / 3600.0;
      va = 16'($rtoi(32767.0 * m * $cos(th)));
      vb = 16'($rtoi(32767.0 * m * $sin(th)));
      p[0] = m * $cos(th); p[1] = m * $cos(th - 2.0 * PI / 3.0); p[2] = m * $cos(th + 2.0 * PI / 3.0);
      mx = p[0]; mn = p[0];
      for (int x = 1; x < 3; x++) begin if (p[x] > mx) mx = p[x]; if (p[x] < mn) mn = p[x]; end
      #1;
      check(int'(sector) == $rtoi($floor(th / (PI / 3.0))) % 6, $sformatf("sector %0d at %f rad", sector, th));
      repeat (2) begin @(posedge clk); while (!ps) @(posedge clk); end
      repeat (4) @(posedge clk);
      hi = '{0, 0, 0}; lo = '{0, 0, 0};
      for (int c = 0; c < 2 * N; c++) begin
        @(negedge clk);
        hi[0] += int'(uh); hi[1] += int'(vh); hi[2] += int'(wh);
        lo[0] += int'(ul); lo[1] += int'(vl); lo[2] += int'(wl);
      end
      for (int x = 0; x < 3; x++) begin
        d  = 0.5 + (p[x] - (mx + mn) / 2.0) / $sqrt(3.0);
        eh = 2.0 * N * d - DEAD;      if (eh < 0.0) eh = 0.0;
        el = 2.0 * N * (1.0 - d) - DEAD; if (el < 0.0) el = 0.0;
        check(absr(real'(hi[x]) - eh) <= 4.0, $sformatf("m %f th %f phase %0d high %0d exp %f", m, th, x, hi[x], eh));
        check(absr(real'(lo[x]) - el) <= 4.0, $sformatf("m %f th %f phase %0d low %0d exp %f", m, th, x, lo[x], el));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
