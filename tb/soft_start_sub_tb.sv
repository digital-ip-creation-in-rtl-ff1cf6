// soft_start_sub_tb: end-to-end soft start. The PDM stream's average
// (ones per 256 clocks) must rise gradually from zero, never jump by more
// than the ramp allows, and settle exactly at the target duty; the ramp must
// take target*(ramp_rate_delay+1) clocks.
//
// 10 ns clock. Checks that the pulse density follows the ramped duty, as the
// source's soft-start subcircuit intends; the measurement windows are this
// testbench's choice.
module soft_start_sub_tb;
  logic       clk = 0, rst_n = 0;
  logic [7:0] target, delay, safe;
  logic       pdm;
  int checks = 0, failures = 0;

  soft_start_sub dut (.clk, .rst_n, .target_duty (target), .ramp_rate_delay (delay),
                      .safe_duty (safe), .pdm_out (pdm));

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
    int ones, last, n;
    target = 192; delay = 15;   // 192 steps of 16 clocks = 3072 clocks
    repeat (3) @(posedge clk);
    rst_n = 1;
    last = 0;
    // windows of 256 clocks during the ramp: 16 steps per window
    for (int w = 0; w < 12; w++) begin
      ones = 0;
      repeat (256) begin @(negedge clk); ones += int'(pdm); end
      check(ones >= last && ones <= last + 17, $sformatf("window %0d: %0d ones after %0d", w, ones, last));
      last = ones;
    end
    n = 0;
    while (safe != target && n < 10000) begin @(posedge clk); n++; end
    check(safe == target, "ramp reaches target");
    repeat (8) @(posedge clk);
    ones = 0;
    repeat (256) begin @(negedge clk); ones += int'(pdm); end
    check(ones == 192, $sformatf("settled density %0d/256", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
