// stepper_indexer_sub_tb: full-size microstepping driver (256-clock PWM,
// 10-clock dead time). At microstep positions around a whole electrical
// cycle, in both directions, the on-time of the chopping P-channel switch of
// each coil over one PWM period must equal 255*|sin| (coil A) or 255*|cos|
// (coil B) minus the dead time, on the left leg for positive current and the
// right leg for negative current, with the opposite bottom switch held on.
// Also checks that fault_n and enable open every switch at once and that no
// leg is ever shorted.
//
// Full-size: default parameters, 10 MHz clock. Microstepping with two bridges
// follows the source; the sine table size and the polarity convention are
// this design's choices.
module stepper_indexer_sub_tb;
  localparam real PI = 3.14159265358979;
  localparam int DT = 10, PER = 256;
  logic clk = 0, rst_n = 0, enable = 0, fault_n = 1, step = 0, dir = 1;
  logic a_tl, a_tr, a_bl, a_br, b_tl, b_tr, b_bl, b_br;
  logic [7:0] phase;
  int checks = 0, failures = 0, pos = 0;
  int n_pos = 0, n_neg = 0;

  stepper_indexer_sub dut (.clk, .rst_n, .enable, .fault_n, .step, .dir, .step_mode (2'd0),
    .a_tl, .a_tr, .a_bl, .a_br, .b_tl, .b_tr, .b_bl, .b_br, .phase);

  always #5 clk = ~clk;

  function automatic bit near(input int d, input int tol);
    return (d >= -tol) && (d <= tol);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && ((!a_tl && a_bl) || (!a_tr && a_br) || (!b_tl && b_bl) || (!b_tr && b_br))) begin
    failures++; $display("FAIL: leg shorted");
  end

  task automatic pulse();
    step = 1; repeat (3) @(posedge clk);
    step = 0; repeat (3) @(posedge clk);
  endtask

  task automatic measure();
    real s [2];
    int mag, on_l, on_r, hold_l, hold_r, exp_on;
    s[0] = $sin(2.0 * PI * real'(pos) / 256.0);
    s[1] = $cos(2.0 * PI * real'(pos) / 256.0);
    repeat (3 * PER) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      mag = $rtoi($floor(255.0 * (s[c] < 0 ? -s[c] : s[c]) + 0.5));
      exp_on = (mag > DT) ? mag - DT : 0;
      on_l = 0; on_r = 0; hold_l = 0; hold_r = 0;
      for (int k = 0; k < PER; k++) begin
        @(negedge clk);
        if (c == 0) begin on_l += int'(!a_tl); on_r += int'(!a_tr); hold_l += int'(a_bl); hold_r += int'(a_br); end
        else        begin on_l += int'(!b_tl); on_r += int'(!b_tr); hold_l += int'(b_bl); hold_r += int'(b_br); end
      end
      if (mag <= 1) continue;
      if (s[c] > 0) begin
        n_pos++;
        check(near(on_l - exp_on, 1) && on_r == 0,
              $sformatf("pos %0d coil %0d +: left top on %0d (exp %0d), right top %0d", pos, c, on_l, exp_on, on_r));
        check(hold_r == PER, "right bottom held on for positive current");
      end else begin
        n_neg++;
        check(near(on_r - exp_on, 1) && on_l == 0,
              $sformatf("pos %0d coil %0d -: right top on %0d (exp %0d), left top %0d", pos, c, on_r, exp_on, on_l));
        check(hold_l == PER, "left bottom held on for negative current");
      end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1;
    measure();
    for (int i = 0; i < 20; i++) begin
      repeat (13) begin pulse(); pos = (pos + 1) % 256; end
      measure();
    end
    dir = 0;
    for (int i = 0; i < 6; i++) begin
      repeat (29) begin pulse(); pos = (pos + 255) % 256; end
      measure();
    end
    check(int'(phase) == pos, "indexer position");
    check(n_pos > 10 && n_neg > 10, "both current directions exercised");
    // fault: every switch open in the same cycle
    @(negedge clk) fault_n = 0; #1;
    check(a_tl && a_tr && !a_bl && !a_br && b_tl && b_tr && !b_bl && !b_br, "fault opens all switches");
    repeat (300) @(posedge clk);
    #1 check(a_tl && a_tr && !a_bl && !a_br && b_tl && b_tr && !b_bl && !b_br, "stays open during fault");
    fault_n = 1;
    @(negedge clk) enable = 0; #1;
    check(a_tl && a_tr && !a_bl && !a_br && b_tl && b_tr && !b_bl && !b_br, "disable opens all switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
