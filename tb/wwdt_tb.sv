// wwdt_tb: windowed watchdog scenarios, each from reset: feeds inside the
// window (25 % to 75 % of the timeout) keep it alive; starvation raises the early warning at 75 % of the
// timeout and the fatal reset at the timeout, at the expected clock; a feed
// with a wrong key, a feed before the window opens and a feed after it
// closes each give an immediate fatal reset with their cause; enable low holds the counter.
//
// 10 ns clock, window 40..120 and timeout 160 ticks (25 % / 75 %). The
// window, the early warning and the three fatal causes follow the source; the
// key value and cause codes are this design's choices.
module wwdt_tb;
  localparam logic [7:0] KEY = 8'hA5;
  logic clk = 0, rst_n = 0, enable = 0, feed = 0;
  logic [7:0] key, wopen, wclose, tmo, count;
  logic ewi, wrst;
  logic [2:0] cause;
  int checks = 0, failures = 0;

  wwdt dut (.clk, .rst_n, .enable, .feed, .key, .window_open (wopen), .window_close (wclose), .timeout (tmo),
            .count, .ewi, .wdt_reset (wrst), .cause);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart();
    rst_n = 0; enable = 0; feed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) enable = 1;
  endtask

  task automatic do_feed(input logic [7:0] k);
    @(negedge clk) key = k; feed = 1;
    @(negedge clk) feed = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_ewi, t_rst;
    wopen = 8'd40; wclose = 8'd120; tmo = 8'd160; key = KEY;
    // 1: good feeds, then starvation
    restart();
    for (int i = 0; i < 5; i++) begin
      repeat (60 + 10 * i) @(negedge clk);
      do_feed(KEY);
      check(!wrst, "feed inside the window accepted");
      check(count <= 2, "feed restarts the count");
    end
    t_ewi = -1; t_rst = -1;
    for (int n = 0; n < 400 && t_rst < 0; n++) begin
      @(negedge clk);
      if (ewi && t_ewi < 0) t_ewi = n;
      if (wrst) t_rst = n;
    end
    check(t_ewi >= 118 && t_ewi <= 122, $sformatf("early warning after %0d clocks (75%% of 160 = 120)", t_ewi));
    check(t_rst >= 158 && t_rst <= 162, $sformatf("starvation reset after %0d clocks (160)", t_rst));
    check(cause == 3'd4, "cause: timeout");
    repeat (50) @(negedge clk);
    check(wrst, "fatal reset is sticky");
    // 2: wrong key inside the window
    restart();
    repeat (80) @(negedge clk);
    do_feed(8'h5A);
    check(wrst && cause == 3'd3, "wrong key: immediate fatal reset");
    // 3: correct key, window still closed
    restart();
    repeat (10) @(negedge clk);
    do_feed(KEY);
    check(wrst && cause == 3'd1, "early feed: closed-window violation");
    // 3b: correct key a few clocks before the window opens
    restart();
    repeat (35) @(negedge clk);
    check(count < wopen, "still inside the closed window");
    do_feed(KEY);
    check(wrst && cause == 3'd1, "feed just before the window opens is rejected");
    // 3c: correct key a few clocks after the window opens
    restart();
    repeat (45) @(negedge clk);
    do_feed(KEY);
    check(!wrst && count <= 2, "feed just after the window opens is accepted");
    // 3d: late clear, a few clocks after the window closes
    repeat (125) @(negedge clk);
    check(count > wclose && !wrst, "window closed, not yet timed out");
    do_feed(KEY);
    check(wrst && cause == 3'd2, "late clear: closed-window violation");
    // 3e: feed right at the upper bound is still accepted
    restart();
    repeat (116) @(negedge clk);
    do_feed(KEY);
    check(!wrst && count <= 2, "feed at the upper bound accepted");
    // 4: enable low holds the counter at zero
    restart();
    enable = 0;
    repeat (300) @(negedge clk);
    check(!wrst && count == 0, "disabled watchdog never fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
