// soft_start_limiter_tb: checks the ramp rate (one LSB every
// ramp_rate_delay+1 clocks), the time to reach the target, that the output
// holds at the target, and the downward ramp after the target is lowered.
//
// 10 ns clock; ramps up and down with several ramp_rate_delay values. The
// one-step-per-interval rule follows the source's description of the ramp;
// the exact interval of ramp_rate_delay+1 clocks is this design's choice.
module soft_start_limiter_tb;
  logic       clk = 0, rst_n = 0;
  logic [7:0] target, delay, out, prev;
  int checks = 0, failures = 0;

  soft_start_limiter dut (.clk, .rst_n, .target_duty (target), .ramp_rate_delay (delay),
                          .safe_duty_out (out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // time (clocks) to move from the current output to tgt
  task automatic ramp(input int tgt, input int dly);
    int n, start, steps_bad;
    start = int'(out);
    target = 8'(tgt); delay = 8'(dly);
    n = 0; steps_bad = 0;
    while (int'(out) != tgt && n < 100000) begin
      prev = out;
      @(posedge clk); #1; n++;
      if (out != prev && (int'(out) - int'(prev) != ((tgt > start) ? 1 : -1))) steps_bad++;
    end
    check(steps_bad == 0, "ramp moves one LSB at a time toward the target");
    check(n >= (start > tgt ? start - tgt : tgt - start) * (dly + 1) - dly &&
          n <= (start > tgt ? start - tgt : tgt - start) * (dly + 1),
          $sformatf("ramp %0d->%0d delay %0d took %0d clocks", start, tgt, dly, n));
    repeat (3 * (dly + 1)) begin @(posedge clk); #1; check(int'(out) == tgt, "holds at target"); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    target = 200; delay = 3;
    repeat (3) @(posedge clk);
    #1 check(out == 0, "reset value is zero");
    rst_n = 1;
    ramp(200, 3);
    ramp(100, 0);
    ramp(255, 7);
    ramp(0, 1);
    ramp(17, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
