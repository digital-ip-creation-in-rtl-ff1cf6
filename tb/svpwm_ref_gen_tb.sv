// svpwm_ref_gen_tb: compares v_alpha/v_beta with 32767*cos/sin of the
// table angle tracked by an independent phase accumulator (one clock of
// latency), and checks the revolution period for a fast tuning word.
//
// 10 ns clock; PHASE_STEP raised to 2^26/5 (320 clocks per turn) for speed. The 64-point table and
// the phase accumulator width are this design's choices; the rotating
// alpha/beta reference follows the source.
module svpwm_ref_gen_tb;
  localparam int unsigned STEP = 32'd67108864 / 5;   // 2^26/5: 320 clocks per turn
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] va, vb;
  int checks = 0, failures = 0;

  svpwm_ref_gen #(.PHASE_STEP(STEP)) dut (.clk, .rst_n, .v_alpha (va), .v_beta (vb));

  always #5 clk = ~clk;

  function automatic bit near(input int d, input int tol);
    return (d >= -tol) && (d <= tol);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ph;
    real ang;
    int zc, last_zc, per;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ph = 0; zc = 0; last_zc = -1; per = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      // output now reflects the phase before this edge
      ang = 2.0 * PI * real'(ph >> 26) / 64.0;
      check(near(va - $rtoi($floor(32767.0 * $cos(ang) + 0.5)), 1),
            $sformatf("v_alpha %0d at index %0d", va, ph >> 26));
      check(near(vb - $rtoi($floor(32767.0 * $sin(ang) + 0.5)), 1),
            $sformatf("v_beta %0d at index %0d", vb, ph >> 26));
      ph = (ph + STEP) & 64'hFFFF_FFFF;
    end
    // revolution period from rising zero crossings of v_beta
    for (int n = 0; n < 2000; n++) begin
      logic signed [15:0] prev;
      prev = vb;
      @(posedge clk); #1;
      if (prev < 0 && vb >= 0) begin
        if (last_zc >= 0) begin per = n - last_zc; zc++; end
        last_zc = n;
      end
    end
    check(zc >= 3, "several revolutions seen");
    check(near(per - 320, 1), $sformatf("revolution period %0d clocks, expected 320", per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
