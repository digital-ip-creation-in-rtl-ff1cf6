// pid_release_tb: closes the loop around the 8-bit PI controller with a
// first-order RC plant (v += (out - v)/64 each clock, fb = round(v)) and
// checks, for several setpoint steps up and down, that the plant settles
// to the setpoint within 1 LSB and stays there, with overshoot under 10 %
// of the step and a settling time under 4000 clocks.
//
// 10 ns clock, default parameters. The RC plant stands for the analog load of
// the source's test; its 64-clock time constant and the settling tolerance
// are this testbench's choices.
module pid_release_tb;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [7:0] sp, fb, out;
  real v;
  int checks = 0, failures = 0;

  pid_release dut (.clk, .rst_n, .enable, .sp, .fb, .out);

  always #5 clk = ~clk;

  function automatic bit near(input int d, input int tol);
    return (d >= -tol) && (d <= tol);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    v  <= v + (real'(out) - v) / 64.0;
  end
  assign fb = 8'($rtoi(v + 0.5));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_to(input int target);
    int start, settle, stable;
    real peak, dev;
    start = int'(fb);
    sp = 8'(target);
    peak = 0.0; settle = -1; stable = 0;
    for (int n = 0; n < 8000; n++) begin
      @(posedge clk); #1;
      dev = (target >= start) ? v - real'(target) : real'(target) - v;
      if (dev > peak) peak = dev;
      if (near(int'(fb) - target, 1)) begin
        stable++;
        if (settle < 0) settle = n;
      end else begin
        stable = 0; settle = -1;
      end
    end
    check(stable > 3000, $sformatf("step %0d->%0d settles (fb %0d)", start, target, fb));
    check(settle >= 0 && settle < 4000, $sformatf("step %0d->%0d settling time %0d", start, target, settle));
    check(peak <= 0.1 * real'((target > start) ? target - start : start - target) + 1.0,
          $sformatf("step %0d->%0d overshoot %f", start, target, peak));
  endtask

  initial begin
    v = 0.0; sp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1;
    step_to(128);
    step_to(200);
    step_to(40);
    step_to(250);
    enable = 0;
    @(posedge clk); #1;
    check(out == 0, "disable drops the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
