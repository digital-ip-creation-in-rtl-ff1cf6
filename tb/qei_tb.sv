// qei_tb: a behavioural encoder walks forwards and backwards with edges as
// close as four clocks apart. After every edge the position must match the
// reference count (4 counts per line, wrapping at max_count), direction must
// follow the last step, an index pulse must zero the count, a forbidden
// double transition must set error without counting, and enable low must
// freeze the count.
//
// 10 ns clock; edges 4 to 8 clocks apart, max_count 999 and then 65535. 4x
// decoding, the 16-bit counter, direction and index follow the source; the
// wrap rule and the error flag are this design's choices and are checked as
// such.
module qei_tb;
  logic clk = 0, rst_n = 0, enable = 1, a = 0, b = 0, idx = 0;
  logic [15:0] maxc, pos;
  logic dir, err;
  int checks = 0, failures = 0, ref_pos = 0, state = 0;
  int n_fwd = 0, n_rev = 0, n_wrap = 0, n_idx = 0;
  // (A,B) for quadrature states 0..3, A leading B going forwards
  logic [1:0] QS [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  qei dut (.clk, .rst_n, .enable, .phase_a (a), .phase_b (b), .index (idx), .max_count (maxc),
           .position (pos), .direction (dir), .error (err));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic move(input bit fwd, input int gap);
    state = fwd ? (state + 1) % 4 : (state + 3) % 4;
    @(negedge clk);
    {a, b} = QS[state];
    if (enable) begin
      if (fwd) begin ref_pos = (ref_pos == int'(maxc)) ? 0 : ref_pos + 1; n_fwd++; if (ref_pos == 0) n_wrap++; end
      else     begin ref_pos = (ref_pos == 0) ? int'(maxc) : ref_pos - 1; n_rev++; if (ref_pos == int'(maxc)) n_wrap++; end
    end
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fwd;
    maxc = 16'd999;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fwd = 1;
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 199) == 0) fwd = ~fwd;
      if (n == 4000) maxc = 16'hFFFF;
      if (n == 8000) fwd = 0;
      move(fwd, int'($urandom_range(2, 6)));
      repeat (2) @(negedge clk);
      check(int'(pos) == ref_pos, $sformatf("step %0d: position %0d expected %0d", n, pos, ref_pos));
      check(dir == fwd, "direction flag");
      if (n % 3000 == 1500) begin
        idx = 1; repeat (3) @(negedge clk); idx = 0; repeat (3) @(negedge clk);
        ref_pos = 0; n_idx++;
        check(pos == 0, "index zeroes the position");
      end
    end
    check(!err, "no error on legal sequences");
    // forbidden double change
    state = (state + 2) % 4;
    @(negedge clk) {a, b} = QS[state];
    repeat (5) @(negedge clk);
    check(err, "double transition flagged");
    check(int'(pos) == ref_pos, "double transition not counted");
    // enable low freezes
    enable = 0;
    repeat (10) move(1, 3);
    repeat (3) @(negedge clk);
    check(int'(pos) == ref_pos, "frozen while disabled");
    check(n_fwd > 1000 && n_rev > 1000 && n_wrap > 1 && n_idx > 2, "both directions, wraps and index exercised");
    $display("fwd %0d rev %0d wrap %0d idx %0d", n_fwd, n_rev, n_wrap, n_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
