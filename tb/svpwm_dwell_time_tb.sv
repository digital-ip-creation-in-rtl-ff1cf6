// svpwm_dwell_time_tb: T1, T2, T0 for random vectors against the textbook
// formulas T1 = Ts*m*sin(60-th'), T2 = Ts*m*sin(th'), T0 = Ts - T1 - T2
// (th' = angle within the sector), within 2 counts.
//
// Combinational block sampled once per vector. The T1/T2/T0 split follows
// standard SVPWM theory that the source names; the Q15 scaling is this
// design's choice.
module svpwm_dwell_time_tb;
  localparam int  TS = 250;
  localparam real PI = 3.14159265358979;
  logic signed [15:0] va, vb;
  logic [2:0]  sector;
  logic [15:0] t1, t2, t0;
  int checks = 0, failures = 0;

  svpwm_dwell_time #(.HALF_PERIOD(TS)) dut (.v_alpha (va), .v_beta (vb), .sector, .t1, .t2, .t0);

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, th, thp, e1, e2, e0;
    int k;
    for (int i = 0; i < 3000; i++) begin
      m  = real'($urandom_range(0, 10000)) / 10000.0;
      th = 2.0 * PI * real'($urandom_range(0, 35999)) / 36000.0;
      va = 16'($rtoi(32767.0 * m * $cos(th)));
      vb = 16'($rtoi(32767.0 * m * $sin(th)));
      k  = $rtoi($floor(th / (PI / 3.0))) % 6;
      sector = 3'(k);
      #1;
      thp = th - real'(k) * PI / 3.0;
      e1 = TS * m * $sin(PI / 3.0 - thp);
      e2 = TS * m * $sin(thp);
      e0 = TS - e1 - e2;
      check(absr(real'(t1) - e1) <= 2.0, $sformatf("t1 %0d expected %f", t1, e1));
      check(absr(real'(t2) - e2) <= 2.0, $sformatf("t2 %0d expected %f", t2, e2));
      check(absr(real'(t0) - e0) <= 3.0, $sformatf("t0 %0d expected %f", t0, e0));
      check(int'(t0) + int'(t1) + int'(t2) <= TS, "times fit in the half period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
