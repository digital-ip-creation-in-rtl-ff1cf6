// pid_core_tb: random setpoint, feedback and gains every clock; the output
// is compared each clock with a behavioural PID evaluated in 64-bit integers
// (clamped integral, derivative of the error, floor right-shift, output
// saturation). Counts how often the anti-windup clamp and both output
// saturation limits are hit and fails if any never is. Also checks that
// enable low clears the controller.
//
// 10 ns clock; a
// reduced I_LIMIT makes the anti-windup clamp active often. The reference is
// a 64-bit integer model of the same equation; the equation's form follows
// the source, the scaling is this design's choice.
module pid_core_tb;
  localparam int IN_W = 16, OUT_W = 16, SHIFT = 8, ILIM = 200000;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [IN_W-1:0] sp, fb;
  logic [7:0] kp, ki, kd;
  logic [OUT_W-1:0] out;
  int checks = 0, failures = 0;
  int n_windup = 0, n_sat_hi = 0, n_sat_lo = 0;

  pid_core #(.IN_W(IN_W), .OUT_W(OUT_W), .ACC_W(32), .SHIFT(SHIFT), .I_LIMIT(ILIM)) dut (
    .clk, .rst_n, .enable, .setpoint (sp), .feedback (fb), .kp, .ki, .kd, .control_out (out));

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
    longint e, ep, integ, u, y;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1;
    ep = 0; integ = 0;
    for (int n = 0; n < 20000; n++) begin
      // slowly varying operating point with random gains
      if (n % 500 == 0) begin
        kp = 8'($urandom_range(0, 255)); ki = 8'($urandom_range(0, 8)); kd = 8'($urandom_range(0, 255));
        sp = 16'($urandom);
      end
      fb = 16'($urandom_range(0, 65535));
      if (n % 4 != 0) fb = sp - 16'($urandom_range(0, 60)) + 16'(30);
      @(posedge clk);
      e = longint'(sp) - longint'(fb);
      integ = integ + e;
      if (integ > ILIM)  begin integ = ILIM;  n_windup++; end
      if (integ < -ILIM) begin integ = -ILIM; n_windup++; end
      u = longint'(kp) * e + longint'(ki) * integ + longint'(kd) * (e - ep);
      y = (u >= 0) ? (u >> SHIFT) : -((-u + (1 << SHIFT) - 1) >> SHIFT);
      if (y < 0) begin y = 0; n_sat_lo++; end
      if (y > 65535) begin y = 65535; n_sat_hi++; end
      ep = e;
      #1;
      check(longint'(out) == y, $sformatf("cycle %0d: out %0d expected %0d", n, out, y));
      @(negedge clk);
    end
    check(n_windup > 0, "anti-windup clamp exercised");
    check(n_sat_hi > 0, "upper output saturation exercised");
    check(n_sat_lo > 0, "lower output saturation exercised");
    enable = 0;
    @(posedge clk); #1;
    check(out == 0, "enable low clears the output");
    enable = 1; kp = 0; ki = 1; kd = 0; sp = 1000; fb = 0;
    @(posedge clk); #1;
    check(out == 16'(1000 >> SHIFT), "integral restarts from zero");
    $display("windup %0d sat_hi %0d sat_lo %0d", n_windup, n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
