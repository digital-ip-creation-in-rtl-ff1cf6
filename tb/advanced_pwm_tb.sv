// advanced_pwm_tb: self-checking test of the complementary PWM generator.
// Measures high and low times over whole periods for several duty/dead-time
// settings against the closed-form expectation (pwm_h = duty - dead,
// pwm_l = period + 1 - duty - dead clocks per period), checks that the
// outputs never overlap, that duty 0 and duty > period give 0 % and 100 %,
// and that fault_n removes the drive in the same cycle and enable stops it.
// A second instance with PRESCALE = 3 checks the prescaled period and the
// high and low times (dead time still in clocks).
//
// Runs the block with a 10 ns clock for a few thousand cycles. The expected
// waveform is rebuilt from period, duty and dead time inside the testbench.
// The checked behaviour (complementary outputs, dead band, enable and fault
// kill) follows the source; the test settings are this testbench's choice.
module advanced_pwm_tb;
  logic        clk = 0, rst_n = 0, enable = 0, fault_n = 1;
  logic [15:0] period, duty;
  logic [7:0]  dead;
  logic        pwm_h, pwm_l, pwm_h3, pwm_l3;
  int checks = 0, failures = 0;

  advanced_pwm dut (.clk, .rst_n, .enable, .fault_n, .period, .duty_cycle (duty),
                    .dead_time (dead), .pwm_h, .pwm_l);
  // same inputs, counter prescaled by 3
  advanced_pwm #(.PRESCALE(3)) dut3 (.clk, .rst_n, .enable, .fault_n, .period, .duty_cycle (duty),
                    .dead_time (dead), .pwm_h (pwm_h3), .pwm_l (pwm_l3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && pwm_h && pwm_l) begin
    failures++; $display("FAIL: overlap");
  end

  task automatic measure(input int p, input int d, input int dt);
    int hi, lo, nper, exp_hi, exp_lo;
    period = 16'(p); duty = 16'(d); dead = 8'(dt);
    enable = 0; @(posedge clk); enable = 1;
    repeat (3 * (p + 1)) @(posedge clk);    // settle
    nper = 5; hi = 0; lo = 0;
    repeat (nper * (p + 1)) begin
      @(negedge clk);
      hi += int'(pwm_h); lo += int'(pwm_l);
    end
    exp_hi = (d > p) ? (p + 1) : ((d - dt) > 0 ? d - dt : 0);
    exp_lo = (d > p) ? 0 : ((p + 1 - d - dt) > 0 ? p + 1 - d - dt : 0);
    if (d == 0) exp_lo = p + 1;
    if (d > p)  exp_hi = p + 1;
    check(hi == nper * exp_hi, $sformatf("p=%0d d=%0d dt=%0d high %0d exp %0d", p, d, dt, hi, nper*exp_hi));
    check(lo == nper * exp_lo, $sformatf("p=%0d d=%0d dt=%0d low %0d exp %0d", p, d, dt, lo, nper*exp_lo));
  endtask

  task automatic measure3(input int p, input int d, input int dt);
    int hi, lo, t_rise [2], nr;
    period = 16'(p); duty = 16'(d); dead = 8'(dt);
    enable = 0; @(posedge clk); enable = 1;
    repeat (3 * 3 * (p + 1)) @(posedge clk);
    hi = 0; lo = 0; nr = 0;
    for (int n = 0; n < 5 * 3 * (p + 1); n++) begin
      @(negedge clk);
      hi += int'(pwm_h3); lo += int'(pwm_l3);
      check(!(pwm_h3 && pwm_l3), "prescaled outputs never overlap");
    end
    check(hi == 5 * (3 * d - dt), $sformatf("prescaled high %0d exp %0d", hi, 5 * (3 * d - dt)));
    check(lo == 5 * (3 * (p + 1 - d) - dt), $sformatf("prescaled low %0d exp %0d", lo, 5 * (3 * (p + 1 - d) - dt)));
    // period: two successive rising edges of pwm_h3 are 3*(p+1) clocks apart
    @(posedge pwm_h3); t_rise[0] = int'($time);
    @(negedge pwm_h3);
    @(posedge pwm_h3); t_rise[1] = int'($time);
    nr = (t_rise[1] - t_rise[0]) / 10;
    check(nr == 3 * (p + 1), $sformatf("prescaled period %0d exp %0d", nr, 3 * (p + 1)));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    period = 19; duty = 8; dead = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(19, 8, 2);
    measure(19, 8, 0);
    measure(19, 15, 3);
    measure(99, 37, 5);
    measure(19, 0, 2);
    measure(19, 25, 2);
    measure3(19, 8, 2);
    measure3(49, 30, 4);
    // fault kills the outputs in the same cycle
    measure(19, 10, 1);
    @(negedge clk);
    fault_n = 0; #1;
    check(!pwm_h && !pwm_l, "fault_n low kills outputs combinationally");
    repeat (30) begin @(negedge clk); check(!pwm_h && !pwm_l, "outputs stay off during fault"); end
    fault_n = 1;
    repeat (40) @(posedge clk);
    @(negedge clk);
    check(pwm_h || pwm_l, "running again after fault");
    enable = 0;
    @(negedge clk);
    check(!pwm_h && !pwm_l, "enable low stops outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
