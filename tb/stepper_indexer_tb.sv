// stepper_indexer_tb: drives step/dir pulses and compares the coil A and B
// duty magnitudes and polarities with 255*|sin| and 255*|cos| of the
// microstep angle kept by the testbench (256 microsteps per cycle), in both
// directions and in microstep, half-step and full-step modes, and checks
// that enable low ignores steps.
//
// 10 ns clock. Compares duty and polarity with a real-valued sine/cosine
// model; the 256-step table is this design's choice.
module stepper_indexer_tb;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, enable = 1, step = 0, dir = 1;
  logic [1:0] mode = 2'd0;
  logic [7:0] phase, duty_a, duty_b;
  logic pol_a, pol_b;
  int checks = 0, failures = 0;
  int pos;

  stepper_indexer dut (.clk, .rst_n, .enable, .step, .dir, .step_mode (mode), .phase,
                       .duty_a, .pol_a, .duty_b, .pol_b);

  always #5 clk = ~clk;

  function automatic bit near(input int d, input int tol);
    return (d >= -tol) && (d <= tol);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    step = 1; repeat (3) @(posedge clk);
    step = 0; repeat (6) @(posedge clk);
  endtask

  task automatic compare();
    real sa, cb;
    int ea, eb;
    sa = $sin(2.0 * PI * real'(pos) / 256.0);
    cb = $cos(2.0 * PI * real'(pos) / 256.0);
    ea = $rtoi($floor(255.0 * (sa < 0 ? -sa : sa) + 0.5));
    eb = $rtoi($floor(255.0 * (cb < 0 ? -cb : cb) + 0.5));
    check(int'(phase) == pos, $sformatf("phase %0d expected %0d", phase, pos));
    check(near(int'(duty_a) - ea, 1), $sformatf("pos %0d duty_a %0d exp %0d", pos, duty_a, ea));
    check(near(int'(duty_b) - eb, 1), $sformatf("pos %0d duty_b %0d exp %0d", pos, duty_b, eb));
    if (ea > 1) check(pol_a == (sa < 0), $sformatf("pos %0d pol_a", pos));
    if (eb > 1) check(pol_b == (cb < 0), $sformatf("pos %0d pol_b", pos));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pos = 0;
    repeat (4) @(posedge clk);
    compare();
    dir = 1;
    repeat (300) begin pulse(); pos = (pos + 1) % 256; compare(); end
    dir = 0;
    repeat (100) begin pulse(); pos = (pos + 255) % 256; compare(); end
    // half steps (45 degrees) and full steps (90 degrees), both directions
    mode = 2'd1;
    repeat (20) begin pulse(); pos = (pos + 256 - 32) % 256; compare(); end
    dir = 1;
    repeat (20) begin pulse(); pos = (pos + 32) % 256; compare(); end
    mode = 2'd2;
    repeat (12) begin pulse(); pos = (pos + 64) % 256; compare(); end
    dir = 0; mode = 2'd3;
    repeat (12) begin pulse(); pos = (pos + 256 - 64) % 256; compare(); end
    enable = 0;
    repeat (10) pulse();
    compare();
    check(int'(phase) == pos, "steps ignored while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
