// svpwm_subcircuit_tb: free-running SVPWM with a fast reference (one turn
// per 4000 clocks) and a short carrier (100 clocks). Checks that the sector
// advances 0,1,...,5,0 one step at a time, that one turn takes the expected
// number of clocks, that no leg ever conducts through both gates, and that
// every gate switches with a mean high-side duty near one half.
//
// 10 ns clock, faster rotation and HALF_PERIOD 50 for speed. The chain
// generator -> SVPWM core follows the source's subcircuit.
module svpwm_subcircuit_tb;
  localparam int unsigned STEP = 32'd1073742;   // 2^32/4000
  localparam int N = 50, DEAD = 3;
  logic clk = 0, rst_n = 0;
  logic uh, ul, vh, vl, wh, wl;
  logic signed [15:0] va, vb;
  logic [2:0] sector;
  int checks = 0, failures = 0;

  svpwm_subcircuit #(.PHASE_STEP(STEP), .HALF_PERIOD(N), .DEAD(DEAD)) dut (
    .clk, .rst_n, .u_high (uh), .u_low (ul), .v_high (vh), .v_low (vl), .w_high (wh), .w_low (wl),
    .v_alpha (va), .v_beta (vb), .sector);

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
    logic [2:0] prev;
    int changes, bad_step, turns, first_wrap, last_wrap, overlap;
    int uhi, vhi, whi, edges;
    logic uh_q;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(posedge clk);
    prev = sector; changes = 0; bad_step = 0; turns = 0; first_wrap = -1; last_wrap = -1;
    overlap = 0; uhi = 0; vhi = 0; whi = 0; edges = 0; uh_q = 0;
    for (int n = 0; n < 16000; n++) begin
      @(negedge clk);
      if (sector != prev) begin
        changes++;
        if (sector != 3'((int'(prev) + 1) % 6)) bad_step++;
        if (sector == 0) begin
          turns++;
          if (first_wrap < 0) first_wrap = n;
          last_wrap = n;
        end
      end
      prev = sector;
      if ((uh && ul) || (vh && vl) || (wh && wl)) overlap++;
      uhi += int'(uh); vhi += int'(vh); whi += int'(wh);
      if (uh != uh_q) edges++;
      uh_q = uh;
    end
    check(bad_step == 0, "sector advances one step at a time");
    check(changes >= 20, $sformatf("sector changes %0d", changes));
    check(turns >= 3, "several turns");
    check(near((last_wrap - first_wrap) / (turns - 1) - 4000, 10),
          $sformatf("clocks per turn %0d", (last_wrap - first_wrap) / (turns - 1)));
    check(overlap == 0, "no shoot-through");
    check(uhi > 16000 * 40 / 100 && uhi < 16000 * 55 / 100, $sformatf("U duty %0d/16000", uhi));
    check(vhi > 16000 * 40 / 100 && vhi < 16000 * 55 / 100, $sformatf("V duty %0d/16000", vhi));
    check(whi > 16000 * 40 / 100 && whi < 16000 * 55 / 100, $sformatf("W duty %0d/16000", whi));
    check(edges > 200, "U high gate switches every carrier period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
